// tb_trt_rod: self-checking test of the ROD module at one optical input
// (30 links).  The testbench plays the data patch panel: for each event it
// serialises 30 DTMROC frames (each link starting a few BCs apart) into the
// 32-bit optical words with even parity, and sends the event's trigger
// information as the TTC would over P3.  The S-LINK stream is compared word by
// word with trt_tb_pkg::build_event.  It also corrupts the parity bit of one
// word and checks the parity error count, and checks that busy[1] follows the
// S-LINK full flag and busy[0] rises while triggers are queued.
module tb_trt_rod;
  import trt_pkg::*;
  import trt_tb_pkg::*;
  localparam int NG = 1, NL = 30, NE = 12;
  logic clk = 0, rst_n = 0;
  logic [31:0] gol_word [NG];
  logic [NG-1:0] gol_valid = 0;
  logic [15:0] parity_err [NG];
  logic trig_valid = 0; trig_info_t trig = '0;
  logic [1:0] busy;
  logic [NL-1:0] link_en = '1, link_ovf;
  logic [7:0] bcid_offset = 0;
  logic [4:0] busy_thr = 5'd2;
  logic clear = 0, tbl_we = 0, tbl_valid = 0, esc_we = 0;
  logic [8:0] tbl_addr = 0; straw_t tbl_pattern = 0; logic [31:0] tbl_code = 0; logic [5:0] tbl_len = 0;
  logic [4:0] esc_code = 5'b11; logic [2:0] esc_len = 3'd2;
  logic slink_lff = 0, slink_valid, slink_ctrl; logic [31:0] slink_data;
  logic [7:0] spy_prescale = 0; logic spy_rd = 0; logic [32:0] spy_rdata; logic spy_empty;
  logic [12:0] spy_level;
  logic [31:0] events, sync_errors, escapes; logic trig_lost;
  int checks = 0, failures = 0, nout = 0, busy0 = 0, busy1 = 0;
  logic [32:0] expq [$];

  trt_rod #(.NGOL(NG)) dut (.*);
  always #12.5 clk = ~clk;
  initial begin #50000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic cnd, string m);
    checks++;
    if (!cnd) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (slink_valid) begin
      chk(expq.size() > 0 && {slink_ctrl, slink_data} == expq[0], $sformatf("word %0d %h exp %h", nout, {slink_ctrl, slink_data}, expq.size() ? expq[0] : 33'h0));
      if (expq.size()) void'(expq.pop_front());
      nout <= nout + 1;
    end
    chk(busy[1] == slink_lff, "busy[1]");
    if (busy[0]) busy0 <= busy0 + 1;
    if (busy[1]) busy1 <= busy1 + 1;
  end
  always @(negedge clk) slink_lff <= ($urandom % 7) == 0;

  initial begin
    gol_word[0] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 1; k <= 7; k++) begin
      @(negedge clk); tbl_we = 1; tbl_addr = 9'(k); tbl_valid = 1; tbl_pattern = common_pattern(k);
      tbl_code = {27'd0, 2'b10, 3'(k)}; tbl_len = 6'd5;
    end
    @(negedge clk); tbl_we = 0; esc_we = 1; @(negedge clk); esc_we = 0;
    for (int ev = 0; ev < NE; ev++) begin
      logic [444:0] fr [NL];
      int off [NL];
      int bcid;
      bcid = 200 + 11 * ev;
      build_event(ev, bcid, 3, NL, 0, ev);
      for (int i = 0; i < ev_words.size(); i++) expq.push_back(ev_words[i]);
      // the builder needs longer per event than a frame takes on the link:
      // send the next event once the previous one is built
      while (int'(events) < ev) @(negedge clk);
      @(negedge clk); trig_valid = 1; trig = '{l1id: 24'(ev), bcid: 12'(bcid), ttype: 8'd3};
      @(negedge clk); trig_valid = 0;
      for (int l = 0; l < NL; l++) begin
        logic [431:0] d;
        for (int s = 0; s < 16; s++) d[431 - 27*s -: 27] = straw_pattern(l, ev, s);
        fr[l] = {1'b1, 3'(ev), 8'(bcid), 1'b0, d};
        off[l] = $urandom % 6;
      end
      for (int t = 0; t < 445 + 8; t++) begin
        logic [29:0] b;
        @(negedge clk);
        for (int l = 0; l < NL; l++)
          b[l] = (t >= off[l] && t - off[l] < 445) ? fr[l][444 - (t - off[l])] : 1'b0;
        gol_word[0] = {^{1'b1, b}, 1'b1, b};
        if (ev == 4 && t == 100) gol_word[0][31] = ~gol_word[0][31];
        gol_valid = 1;
      end
    end
    @(negedge clk); gol_valid = 0;
    wait (events == NE);
    repeat (100) @(negedge clk);
    chk(expq.size() == 0, $sformatf("all words out, %0d left", expq.size()));
    chk(parity_err[0] == 1, $sformatf("parity errors %0d", parity_err[0]));
    chk(sync_errors == 0 && link_ovf == 0, "no sync errors");
    chk(busy1 > 0, "S-LINK busy seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
