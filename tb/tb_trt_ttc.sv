// tb_trt_ttc: self-checking test of the TRT-TTC module with 4 TTC links and
// two behavioural front-end chips per link.
// Checks: TTCrx and NIM fast commands reach every chip (L1A, BCR, ECR counts);
// the P3 trigger information counts L1IDs from 0 after ECR with the BCID of
// the bunch counter; the per-link delay shifts the command line by the set
// number of BCs; INIT with verification loads every chip register; the
// combined BUSY and the busy time follow the ROD BUSY inputs; in Fast OR mode
// the chips' hits on the read-back lines produce cosmic triggers, and with
// cosmic_l1a_en those triggers become L1As sent to the front end.
module tb_trt_ttc;
  import trt_pkg::*;
  localparam int NL = 4, NC = 2, RPC = 8, NP = 16;
  logic clk = 0, rst_n = 0;
  logic ttc_l1a = 0, ttc_bcr = 0, ttc_ecr = 0; logic [7:0] ttc_ttype = 8'h5A;
  logic nim_sel = 0, nim_l1a = 0, nim_bcr = 0, nim_ecr = 0;
  logic [NL-1:0] cmd_out, rb_in;
  logic p3_trig_valid, p3_bcr, p3_ecr; trig_info_t p3_trig;
  logic [3:0] p3_busy = 0;
  logic busy_out, fastor_trig; logic [NL-1:0] p2_lines; logic [15:0] fastor_count;
  logic [3:0] link_delay [NL];
  logic [11:0] gap_start = 12'd3443, gap_end = 12'd3563;
  logic fastor_mode = 0, cosmic_l1a_en = 0;
  logic [NL-1:0] fastor_en = '1; logic [2:0] fastor_thr = 3'd2; logic [7:0] fastor_holdoff = 8'd20;
  logic [3:0] busy_en = 4'b1111; logic busy_clear = 0;
  logic [31:0] busy_time [4]; logic [15:0] busy_count [4]; logic [31:0] busy_max [4];
  logic mem_we = 0; logic [1:0] mem_link = 0; logic [3:0] mem_idx = 0; logic [31:0] mem_wdata = 0;
  pe_mode_e pe_mode = MODE_IDLE; logic pe_start = 0, pe_stop = 0, pe_verify = 1;
  logic [4:0] pe_n_entries = 5'(NP); logic [NL-1:0] link_en = '1;
  logic [1:0] dir_link = 0; reg_frame_t dir_frame = '0; logic [31:0] dir_rdata;
  logic pe_err_clear = 0, pe_busy, pe_done; logic [NL-1:0] pe_err_link;
  logic [15:0] pe_mismatches, pe_passes, pe_gap_waits;
  logic [11:0] bcid; logic [23:0] evcnt; logic [NL-1:0] fc_overflow; logic [15:0] fc_collisions;
  logic hit = 0;
  int checks = 0, failures = 0, ntrig = 0, cyc = 0;
  logic [31:0] memref [NL][NP];
  int l1a_cyc [$];

  trt_ttc #(.NLINKS(NL), .NBUSY(4), .REGS_PER_CHIP(RPC), .NPAR(NP)) dut (.*);

  int nl1 [NL][NC], nbcr [NL][NC], necr [NL][NC];
  int b_l1 [NL][NC], b_bcr [NL][NC], b_ecr [NL][NC];
  for (genvar l = 0; l < NL; l++) begin : g_l
    logic [NC-1:0] rbc;
    for (genvar c = 0; c < NC; c++) begin : g_c
      int a, b, d, e, f;
      dtmroc_model #(.CHIP(c), .GID(l * NC + c)) u_chip (.clk, .cmd(cmd_out[l]), .hit(hit), .rb(rbc[c]),
        .dout(), .upset(1'b0), .n_l1a(a), .n_bcr(b), .n_ecr(d), .n_wr(e), .n_rd(f));
      assign nl1[l][c] = a; assign nbcr[l][c] = b; assign necr[l][c] = d;
    end
    assign rb_in[l] = |rbc;
  end

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic cnd, string m);
    checks++;
    if (!cnd) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  // P3 trigger information
  int exp_l1id = 0;
  always @(posedge clk) if (rst_n && p3_trig_valid) begin
    chk(int'(p3_trig.l1id) == exp_l1id, $sformatf("l1id %0d exp %0d", p3_trig.l1id, exp_l1id));
    chk(p3_trig.ttype == 8'h5A || fastor_mode, "ttype");
    exp_l1id++;
    ntrig++;
  end

  // delay: link l has delay 2*l, so its line equals link 0's line 2*l BCs later
  logic [NL-1:0] hist [$];
  bit delay_phase = 1;
  always @(posedge clk) begin
    hist.push_front(cmd_out);
    if (hist.size() > 10) void'(hist.pop_back());
    if (hist.size() == 10 && delay_phase)
      for (int l = 1; l < NL; l++) chk(hist[0][l] == hist[2 * l][0], "link delay");
  end

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
    repeat (12) @(negedge clk);
  endtask

  initial begin
    for (int l = 0; l < NL; l++) link_delay[l] = 4'(2 * l);
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (60) @(negedge clk);
    // counts before this point come from the line before reset
    for (int l = 0; l < NL; l++) for (int c = 0; c < NC; c++) begin
      b_l1[l][c] = nl1[l][c]; b_bcr[l][c] = nbcr[l][c]; b_ecr[l][c] = necr[l][c];
    end
    pulse(ttc_ecr); pulse(ttc_bcr);
    begin
      int b0; b0 = int'(bcid);
      repeat (7) @(negedge clk);
      chk(int'(bcid) == b0 + 7, "bunch counter runs");
    end
    for (int i = 0; i < 5; i++) pulse(ttc_l1a);
    nim_sel = 1;
    for (int i = 0; i < 3; i++) pulse(nim_l1a);
    pulse(nim_ecr); exp_l1id = 0;
    pulse(nim_l1a);
    pulse(ttc_l1a);    // ignored while NIM is selected
    nim_sel = 0;
    repeat (30) @(negedge clk);
    for (int l = 0; l < NL; l++) for (int c = 0; c < NC; c++) begin
      chk(nl1[l][c] - b_l1[l][c] == 9, $sformatf("chip l1a %0d", nl1[l][c]));
      chk(nbcr[l][c] - b_bcr[l][c] == 1 && necr[l][c] - b_ecr[l][c] == 2, "chip bcr/ecr");
    end
    chk(ntrig == 9, "P3 triggers");
    delay_phase = 0;
    // INIT with verification
    for (int l = 0; l < NL; l++) for (int i = 0; i < NP; i++) begin
      memref[l][i] = $urandom & 32'hFFFF_FFFE;
      @(negedge clk); mem_we = 1; mem_link = 2'(l); mem_idx = 4'(i); mem_wdata = memref[l][i];
    end
    @(negedge clk); mem_we = 0; pe_mode = MODE_INIT; pe_start = 1; @(negedge clk); pe_start = 0;
    wait (pe_done); @(negedge clk);
    chk(pe_err_link == 0 && pe_mismatches == 0, "init verified");
    chk(tb_trt_ttc.g_l[3].g_c[1].u_chip.regs[5] == memref[3][RPC + 5], "chip register loaded");
    // BUSY
    @(negedge clk); p3_busy = 4'b0100; repeat (10) @(negedge clk);
    chk(busy_out, "busy out");
    p3_busy = 0; @(negedge clk);
    chk(!busy_out && busy_time[2] == 10 && busy_count[2] == 1, "busy time");
    // Fast OR: switch chips (register 7 bit 0) and the module to Fast OR mode
    for (int l = 0; l < NL; l++) for (int c = 0; c < NC; c++) begin
      dir_link = 2'(l); dir_frame = '{rw: 1'b0, chip: 4'(c), regad: 4'd7, data: 32'd1};
      @(negedge clk); pe_mode = MODE_DIRECT; pe_start = 1; @(negedge clk); pe_start = 0;
      wait (pe_done); @(negedge clk);
    end
    fastor_mode = 1; cosmic_l1a_en = 1;
    repeat (10) @(negedge clk);
    for (int i = 0; i < 5; i++) begin
      @(negedge clk); hit = 1; @(negedge clk); hit = 0;
      repeat (40) @(negedge clk);
    end
    chk(fastor_count == 5, $sformatf("cosmic triggers %0d", fastor_count));
    chk(ntrig == 14, "cosmic triggers become L1A");
    chk(tb_trt_ttc.g_l[0].g_c[0].u_chip.n_l1a - b_l1[0][0] == 14, "cosmic L1A sent to front end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
