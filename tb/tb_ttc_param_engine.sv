// tb_ttc_param_engine: self-checking test of ttc_param_engine.
// Three TTC links, each with a command serialiser, a read-back receiver and
// two behavioural front-end chips (dtmroc_model).  The test loads the board
// memory, runs INIT with read-back verification and checks every chip
// register against the memory; checks a DIRECT read; flips one register bit
// in one chip (single event upset) and checks that POLL flags exactly that
// link; runs REFRESH and checks that the register is repaired; and checks that
// in POLL and REFRESH no frame starts outside the beam gap or too close to its
// end.  The orbit is shortened to 400 BCs with a 120-BC gap.
module tb_ttc_param_engine;
  import trt_pkg::*;
  localparam int NL = 3, NC = 2, RPC = 8, NP = NC * RPC, TMO = 64, DMAX = 15;
  localparam int ORBIT = 400, GAP0 = 280, GAP1 = 399;
  logic clk = 0, rst_n = 0;
  logic mem_we = 0; logic [1:0] mem_link = 0; logic [3:0] mem_idx = 0; logic [31:0] mem_wdata = 0;
  pe_mode_e mode = MODE_IDLE;
  logic start = 0, stop = 0, verify = 0, err_clear = 0;
  logic [4:0] n_entries = 5'(NP);
  logic [NL-1:0] link_en = '1;
  logic [1:0] dir_link = 0;
  reg_frame_t dir_frame = '0;
  logic [31:0] dir_rdata;
  logic busy, done;
  logic [NL-1:0] err_link;
  logic [15:0] mismatches, passes, gap_waits;
  logic in_gap; logic [11:0] gap_left;
  logic [NL-1:0] frame_req, frame_ready, link_busy, rb_valid, cmd, rb, fo;
  reg_frame_t frames [NL];
  logic [31:0] rb_data [NL];
  logic [31:0] memref [NL][NP];
  int checks = 0, failures = 0, bc = 0, bad_starts = 0, gated_starts = 0;
  logic upset [NL][NC];

  ttc_param_engine #(.NLINKS(NL), .REGS_PER_CHIP(RPC), .NPAR(NP), .RB_TIMEOUT(TMO), .DLY_MAX(DMAX)) dut (.*);

  for (genvar l = 0; l < NL; l++) begin : g_l
    logic [NC-1:0] rbc;
    int nl1, nbcr, necr, nwr, nrd;
    ttc_link_tx #(.DLY_MAX(DMAX)) u_tx (.clk, .rst_n, .fc(FC_NONE), .frame_req(frame_req[l]),
      .frame(frames[l]), .frame_ready(frame_ready[l]), .busy(link_busy[l]), .delay(4'(l * 3)),
      .cmd_out(cmd[l]), .fc_overflow());
    ttc_readback_rx u_rx (.clk, .rst_n, .rb_in(rb[l]), .fastor_mode(1'b0), .rb_valid(rb_valid[l]),
      .rb_data(rb_data[l]), .fastor(fo[l]));
    for (genvar c = 0; c < NC; c++) begin : g_c
      int a, b, d, e, f;
      dtmroc_model #(.CHIP(c), .GID(l * NC + c)) u_chip (.clk, .cmd(cmd[l]), .hit(1'b0), .rb(rbc[c]),
        .dout(), .upset(upset[l][c]), .n_l1a(a), .n_bcr(b), .n_ecr(d), .n_wr(e), .n_rd(f));
    end
    assign rb[l] = |rbc;
  end

  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic cnd, string m);
    checks++;
    if (!cnd) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  // beam gap of a shortened orbit
  always @(posedge clk) bc <= (bc == ORBIT - 1) ? 0 : bc + 1;
  assign in_gap   = bc >= GAP0 && bc <= GAP1;
  assign gap_left = in_gap ? 12'(GAP1 - bc) : 12'd0;

  // frames started in POLL/REFRESH must fit in the gap
  always @(posedge clk) if (rst_n && frame_req != 0 && (mode == MODE_POLL || mode == MODE_REFRESH)) begin
    gated_starts++;
    if (!in_gap || gap_left < 12'(WR_FRAME_BITS)) bad_starts++;
  end

  function automatic logic [31:0] chipreg(int l, int idx);
    case (l * NC + idx / RPC)
      0: return tb_ttc_param_engine.g_l[0].g_c[0].u_chip.regs[idx % RPC];
      1: return tb_ttc_param_engine.g_l[0].g_c[1].u_chip.regs[idx % RPC];
      2: return tb_ttc_param_engine.g_l[1].g_c[0].u_chip.regs[idx % RPC];
      3: return tb_ttc_param_engine.g_l[1].g_c[1].u_chip.regs[idx % RPC];
      4: return tb_ttc_param_engine.g_l[2].g_c[0].u_chip.regs[idx % RPC];
      default: return tb_ttc_param_engine.g_l[2].g_c[1].u_chip.regs[idx % RPC];
    endcase
  endfunction

  task automatic run(pe_mode_e m, int cycles);
    @(negedge clk); mode = m; start = 1; @(negedge clk); start = 0;
    if (cycles == 0) begin
      fork
        wait (done);
        begin repeat (200000) @(negedge clk); chk(0, "mode timeout"); end
      join_any
      disable fork;
    end else begin
      repeat (cycles) @(negedge clk);
      stop = 1; wait (!busy); @(negedge clk); stop = 0;
    end
    @(negedge clk);
  endtask

  initial begin
    for (int l = 0; l < NL; l++) for (int c = 0; c < NC; c++) upset[l][c] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int l = 0; l < NL; l++) for (int i = 0; i < NP; i++) begin
      memref[l][i] = $urandom & 32'hFFFF_FF7E;   // keep register 7 bit 0 (Fast OR mode) clear
      @(negedge clk); mem_we = 1; mem_link = 2'(l); mem_idx = 4'(i); mem_wdata = memref[l][i];
    end
    @(negedge clk); mem_we = 0;
    // INIT with verification
    verify = 1;
    run(MODE_INIT, 0);
    for (int l = 0; l < NL; l++) for (int i = 0; i < NP; i++)
      chk(chipreg(l, i) == memref[l][i], $sformatf("init l%0d i%0d", l, i));
    chk(err_link == 0 && mismatches == 0, "init verify clean");
    // DIRECT read of link 2, chip 1, register 3
    dir_link = 2; dir_frame = '{rw: 1'b1, chip: 4'd1, regad: 4'd3, data: 32'd0};
    run(MODE_DIRECT, 0);
    chk(dir_rdata == memref[2][RPC + 3], "direct read");
    // single event upset in link 1 chip 0 register 1, found by POLL
    @(negedge clk); upset[1][0] = 1; @(negedge clk); upset[1][0] = 0;
    run(MODE_POLL, 7200);
    chk(err_link == 3'b010, $sformatf("poll finds upset %b", err_link));
    chk(mismatches >= 1, "mismatch counted");
    chk(passes >= 1, "poll loops");
    chk(gap_waits > 0, "waited for gap");
    // REFRESH repairs it
    err_clear = 1; @(negedge clk); err_clear = 0;
    run(MODE_REFRESH, 4000);
    chk(chipreg(1, 1) == memref[1][1], "refresh repaired");
    run(MODE_POLL, 7200);
    chk(err_link == 0, "clean after refresh");
    chk(gated_starts > 10 && bad_starts == 0, $sformatf("gap gating %0d %0d", gated_starts, bad_starts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
