// tb_trt_readout_unit: end-to-end test of the TRT readout unit at reduced size (two optical inputs per ROD,
// 60 data links per ROD, 32-entry parameter memory per link).
//
// Front-end chips are behavioural models (dtmroc_model), one per data link,
// 3 per TTC link, each with its own phase on the data line; the optical
// links between the data patch panels and the RODs are modelled as one
// register stage.  The test:
//   1. sends ECR and, every orbit, BCR; loads the test Huffman table into both
//      RODs; loads the parameter memory and runs INIT with read-back
//      verification (mechanism: parameter download);
//   2. sends L1As from the TTCrx inputs; each travels as a fast command to all
//      chips, comes back as 40 Mbit/s frames, is phase aligned and combined on
//      the patch panels, checked and Huffman-compressed by the RODs; both RODs'
//      S-LINK streams are compared word by word with the reference event
//      (mechanisms: event building, escapes, S-LINK back-pressure and BUSY);
//   3. sends one L1A from the NIM inputs (mechanism: command source switch);
//   4. flips a register bit in one chip and runs POLL inside the beam gaps
//      until the link is flagged, then REFRESH and POLL again until clean
//      (mechanisms: gap gating, single event upset detection, refresh);
//   5. puts chips and module in Fast OR mode and lets hits produce cosmic
//      triggers that are turned into L1As and built into events (mechanism:
//      Fast OR trigger).
// Every mechanism must have happened at least once.
module tb_trt_readout_unit;
  import trt_pkg::*;
  import trt_tb_pkg::*;
  localparam int NGOL  = 2;
  localparam int NPAR  = 32;
  localparam int NROD  = 2;
  localparam int NTTC  = 40;
  localparam int NDL   = NROD * NGOL * 30;      // data links
  localparam int CPL   = NDL / NTTC;            // chips per TTC link
  localparam int RPC   = 8;
  localparam int NEV   = 3;

  logic clk = 0, clk4x = 0, bc_stb = 0, rst_n = 0;
  logic ttc_l1a = 0, ttc_bcr = 0, ttc_ecr = 0; logic [7:0] ttc_ttype = 8'h21;
  logic nim_sel = 0, nim_l1a = 0, nim_bcr = 0, nim_ecr = 0;
  logic [NTTC-1:0] fe_cmd, fe_rb;
  logic [NDL-1:0] fe_data;
  logic [31:0] pp2_gol_word [NROD*NGOL]; logic [NROD*NGOL-1:0] pp2_gol_valid;
  logic [31:0] rod_gol_word [NROD*NGOL]; logic [NROD*NGOL-1:0] rod_gol_valid = 0;
  logic [NROD-1:0] slink_lff = 0, slink_valid, slink_ctrl; logic [31:0] slink_data [NROD];
  logic p3_bcr, p3_ecr, busy_out, fastor_trig; logic [NTTC-1:0] p2_lines; logic [1:0] pp2_fastor_any;
  logic [3:0] link_delay [NTTC];
  logic [11:0] gap_start = 12'd3443, gap_end = 12'd3563;
  logic fastor_mode = 0, cosmic_l1a_en = 0;
  logic [NTTC-1:0] fastor_en = '1, pp2_fastor_en = '1;
  logic [5:0] fastor_thr = 6'd20; logic [7:0] fastor_holdoff = 8'd100; logic [15:0] fastor_count;
  logic [3:0] busy_en = '1; logic busy_clear = 0;
  logic [31:0] busy_time [4]; logic [15:0] busy_count [4]; logic [31:0] busy_max [4];
  logic mem_we = 0; logic [5:0] mem_link = 0; logic [$clog2(NPAR)-1:0] mem_idx = 0; logic [31:0] mem_wdata = 0;
  pe_mode_e pe_mode = MODE_IDLE; logic pe_start = 0, pe_stop = 0, pe_verify = 0;
  logic [$clog2(NPAR+1)-1:0] pe_n_entries = ($clog2(NPAR+1))'(CPL * RPC);
  logic [NTTC-1:0] pe_link_en = '1; logic [5:0] dir_link = 0; reg_frame_t dir_frame = '0; logic [31:0] dir_rdata;
  logic pe_err_clear = 0, pe_busy, pe_done; logic [NTTC-1:0] pe_err_link;
  logic [15:0] pe_mismatches, pe_passes, pe_gap_waits;
  logic [11:0] bcid; logic [23:0] evcnt; logic [NTTC-1:0] fc_overflow; logic [15:0] fc_collisions;
  logic [NGOL*30-1:0] rod_link_en [NROD];
  logic [7:0] bcid_offset = 8'd255; logic [4:0] busy_thr = 5'd8; logic rod_clear = 0;
  logic [NROD-1:0] tbl_we = 0; logic [8:0] tbl_addr = 0; logic tbl_valid = 0; straw_t tbl_pattern = 0;
  logic [31:0] tbl_code = 0; logic [5:0] tbl_len = 0; logic [NROD-1:0] esc_we = 0;
  logic [4:0] esc_code = 5'b11; logic [2:0] esc_len = 3'd2;
  logic [7:0] spy_prescale = 0; logic [NROD-1:0] spy_rd = 0; logic [32:0] spy_rdata [NROD];
  logic [NROD-1:0] spy_empty; logic [12:0] spy_level [NROD]; logic [NROD-1:0] trig_lost;
  logic [31:0] rod_events [NROD], rod_sync_errors [NROD], rod_escapes [NROD];
  logic [15:0] rod_parity_err [NROD*NGOL];
  logic [NDL-1:0] rod_link_ovf, pp2_locked;

  trt_readout_unit #(.NGOL(NGOL), .NPAR(NPAR)) dut (.*);

  int checks = 0, failures = 0;
  int m_init = 0, m_events = 0, m_escape = 0, m_lff = 0, m_busy = 0, m_nim = 0, m_gap = 0, m_seu = 0,
      m_refresh = 0, m_fastor = 0, m_locked = 0;
  task automatic chk(logic cnd, string m);
    checks++;
    if (!cnd) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask
  initial begin
    #(64'd200_000_000);
    failures++;
    $display("watchdog: events %0d %0d", rod_events[0], rod_events[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clocks: clk4x 160 MHz, clk 40 MHz; bc_stb in the clk4x cycle before a clk rising edge
  always #3.125 clk4x = ~clk4x;
  int ph4 = 0;
  always @(posedge clk4x) begin
    ph4 <= (ph4 + 1) % 4;
    bc_stb <= (ph4 == 2);
    if (ph4 == 3) clk <= 1; else if (ph4 == 1) clk <= 0;
  end

  // front-end chips
  logic [NDL-1:0] chip_dout;
  logic upset [NDL];
  logic hit = 0;
  logic [NDL-1:0] chip_rb;
  for (genvar g = 0; g < NDL; g++) begin : g_fe
    int a, b, c, d, e;
    dtmroc_model #(.CHIP(g % CPL), .GID(g), .RB_DELAY(3), .DATA_LAT(20)) u (
      .clk, .cmd(fe_cmd[g / CPL]), .hit, .rb(chip_rb[g]), .dout(chip_dout[g]), .upset(upset[g]),
      .n_l1a(a), .n_bcr(b), .n_ecr(c), .n_wr(d), .n_rd(e));
    // each data line arrives with its own phase
    assign #(3.125 * (g % 7)) fe_data[g] = chip_dout[g];
  end
  for (genvar t = 0; t < NTTC; t++) begin : g_rb
    assign fe_rb[t] = |chip_rb[t * CPL +: CPL];
  end

  // optical links: one register stage in the BC domain
  always @(posedge clk) begin
    rod_gol_word  <= pp2_gol_word;
    rod_gol_valid <= '1;
  end

  // BCR once per orbit from the TTC system, aligned with the module's counter
  bit orbit_bcr = 0;
  always @(negedge clk) ttc_bcr <= orbit_bcr && (bcid == 12'd3562);

  // S-LINK sinks with random back-pressure on ROD 0
  logic [32:0] expq [NROD][$];
  int nout [NROD];
  always @(negedge clk) slink_lff[0] <= ($urandom % 9) == 0;
  for (genvar r = 0; r < NROD; r++) begin : g_sink
    always @(posedge clk) if (rst_n && slink_valid[r]) begin
      chk(expq[r].size() > 0 && {slink_ctrl[r], slink_data[r]} == expq[r][0],
          $sformatf("rod %0d word %0d: %h exp %h", r, nout[r], {slink_ctrl[r], slink_data[r]},
                    expq[r].size() ? expq[r][0] : 33'h0));
      if (expq[r].size()) void'(expq[r].pop_front());
      nout[r]++;
    end
  end
  always @(posedge clk) begin
    if (slink_lff[0]) m_lff++;
    if (busy_out) m_busy++;
  end

  // reference for each trigger seen on P3
  int ntrig = 0;
  always @(posedge clk) if (rst_n && dut.p3_trig_valid) begin
    for (int r = 0; r < NROD; r++) begin
      build_event(int'(dut.p3_trig.l1id), int'(dut.p3_trig.bcid), int'(dut.p3_trig.ttype),
                  NGOL * 30, r * NGOL * 30, int'(dut.p3_trig.l1id));
      for (int i = 0; i < ev_words.size(); i++) expq[r].push_back(ev_words[i]);
    end
    ntrig++;
  end

  task automatic wait_built(int n);
    int t; t = 0;
    while ((rod_events[0] < 32'(n) || rod_events[1] < 32'(n)) && t < 200000) begin @(negedge clk); t++; end
    chk(rod_events[0] == 32'(n) && rod_events[1] == 32'(n), $sformatf("events built %0d", n));
  endtask

  task automatic run_mode(pe_mode_e m, logic ver);
    @(negedge clk); pe_mode = m; pe_verify = ver; pe_start = 1; @(negedge clk); pe_start = 0;
  endtask

  logic [31:0] memv [NTTC][NPAR];

  initial begin
    for (int i = 0; i < NDL; i++) upset[i] = 0;
    for (int t = 0; t < NTTC; t++) link_delay[t] = 4'd0;
    for (int r = 0; r < NROD; r++) begin rod_link_en[r] = '1; nout[r] = 0; end
    repeat (4) @(posedge clk); rst_n = 1;
    repeat (80) @(negedge clk);
    // synchronise: ECR, then BCR once per orbit
    @(negedge clk); ttc_ecr = 1; @(negedge clk); ttc_ecr = 0;
    repeat (10) @(negedge clk);
    @(negedge clk); ttc_bcr = 1; @(negedge clk); ttc_bcr = 0;
    orbit_bcr = 1;
    // Huffman tables
    for (int k = 1; k <= 7; k++) begin
      @(negedge clk); tbl_we = '1; tbl_addr = 9'(k); tbl_valid = 1; tbl_pattern = common_pattern(k);
      tbl_code = {27'd0, 2'b10, 3'(k)}; tbl_len = 6'd5;
    end
    @(negedge clk); tbl_we = 0; esc_we = '1; @(negedge clk); esc_we = 0;
    // 1. parameter download with verification
    for (int t = 0; t < NTTC; t++) for (int i = 0; i < NPAR; i++) begin
      memv[t][i] = $urandom & 32'hFFFF_FFFE;
      @(negedge clk); mem_we = 1; mem_link = 6'(t); mem_idx = ($clog2(NPAR))'(i); mem_wdata = memv[t][i];
    end
    @(negedge clk); mem_we = 0;
    run_mode(MODE_INIT, 1);
    wait (pe_done); @(negedge clk);
    chk(pe_err_link == 0 && pe_mismatches == 0, "INIT verified");
    chk(g_fe[NDL-1].u.regs[3] == memv[NTTC-1][(CPL - 1) * RPC + 3], "last chip loaded");
    if (pe_err_link == 0) m_init++;
    repeat (300) @(negedge clk);
    rod_clear = 1; @(negedge clk); rod_clear = 0;
    // 2. triggers from the TTC system
    for (int e = 0; e < NEV; e++) begin
      while (bcid > 12'd3300 || bcid < 12'd5) @(negedge clk);   // no trigger next to BCR
      @(negedge clk); ttc_l1a = 1; @(negedge clk); ttc_l1a = 0;
      wait_built(e + 1);
    end
    // 3. one trigger from the NIM inputs
    nim_sel = 1;
    while (bcid > 12'd3300 || bcid < 12'd5) @(negedge clk);
    @(negedge clk); nim_l1a = 1; @(negedge clk); nim_l1a = 0;
    nim_sel = 0;
    wait_built(NEV + 1);
    if (rod_events[0] == 32'(NEV + 1)) m_nim++;
    m_events = int'(rod_events[0]);
    m_escape = int'(rod_escapes[0]);
    m_locked = int'(&pp2_locked);
    chk(rod_sync_errors[0] == 0 && rod_sync_errors[1] == 0, $sformatf("no sync errors %0d %0d", rod_sync_errors[0], rod_sync_errors[1]));
    chk(rod_link_ovf == 0 && trig_lost == 0, "no overflow");
    for (int i = 0; i < NROD * NGOL; i++) chk(rod_parity_err[i] == 0, "parity");
    chk(busy_time[1] > 0, "S-LINK busy measured");
    // 4. single event upset found by POLL in the beam gaps, repaired by REFRESH
    // wider gap window for a shorter test; it ends early enough that no
    // register frame is on a command line when the orbit BCR is sent
    gap_start = 12'd2800; gap_end = 12'd3500;
    @(negedge clk); upset[CPL + 1] = 1; @(negedge clk); upset[CPL + 1] = 0;   // TTC link 1, chip 1, register 1
    pe_err_clear = 1; @(negedge clk); pe_err_clear = 0;
    run_mode(MODE_POLL, 0);
    while (pe_passes == 0) @(negedge clk);
    pe_stop = 1; wait (!pe_busy); @(negedge clk); pe_stop = 0;
    chk(pe_err_link == 40'(2), $sformatf("upset located %h", pe_err_link));
    if (pe_err_link == 40'(2)) m_seu++;
    if (pe_gap_waits > 0) m_gap++;
    pe_err_clear = 1; @(negedge clk); pe_err_clear = 0;
    run_mode(MODE_REFRESH, 0);
    while (pe_passes < 2) @(negedge clk);
    pe_stop = 1; wait (!pe_busy); @(negedge clk); pe_stop = 0;
    run_mode(MODE_POLL, 0);
    while (pe_passes < 3) @(negedge clk);
    pe_stop = 1; wait (!pe_busy); @(negedge clk); pe_stop = 0;
    chk(pe_err_link == 0, "repaired by refresh");
    if (pe_err_link == 0) m_refresh++;
    // 5. Fast OR cosmic trigger: register 7 bit 0 of every chip, then module mode
    for (int t = 0; t < NTTC; t++) for (int c = 0; c < CPL; c++) begin
      @(negedge clk); mem_we = 1; mem_link = 6'(t); mem_idx = ($clog2(NPAR))'(c * RPC + 7); mem_wdata = 32'd1;
    end
    @(negedge clk); mem_we = 0;
    run_mode(MODE_INIT, 0);
    wait (pe_done); @(negedge clk);
    fastor_mode = 1; cosmic_l1a_en = 1;
    repeat (20) @(negedge clk);
    while (bcid > 12'd3300 || bcid < 12'd5) @(negedge clk);
    @(negedge clk); hit = 1; @(negedge clk); hit = 0;
    repeat (20) @(negedge clk);
    fastor_mode = 0; cosmic_l1a_en = 0;
    m_fastor = int'(fastor_count);
    wait_built(NEV + 2);
    repeat (100) @(negedge clk);
    for (int r = 0; r < NROD; r++) chk(expq[r].size() == 0, $sformatf("rod %0d all words (%0d left)", r, expq[r].size()));
    chk(ntrig == NEV + 2, "triggers");
    // every mechanism happened
    chk(m_init > 0, "mechanism: INIT download");
    chk(m_events > 0, "mechanism: event building");
    chk(m_escape > 0, "mechanism: Huffman escape");
    chk(m_lff > 0 && m_busy > 0, "mechanism: S-LINK back-pressure / BUSY");
    chk(m_nim > 0, "mechanism: NIM command source");
    chk(m_gap > 0, "mechanism: beam-gap gating");
    chk(m_seu > 0, "mechanism: upset detection");
    chk(m_refresh > 0, "mechanism: refresh");
    chk(m_fastor > 0, "mechanism: Fast OR trigger");
    chk(m_locked > 0, "mechanism: phase alignment lock");
    $display("mechanisms: init=%0d events=%0d escapes=%0d lff=%0d busy=%0d nim=%0d gapwait=%0d seu=%0d refresh=%0d fastor=%0d locked=%0d",
             m_init, m_events, m_escape, m_lff, m_busy, m_nim, m_gap, m_seu, m_refresh, m_fastor, m_locked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
