// tb_rod_event_builder: self-checking test of rod_event_builder.
// Four links (link 2 disabled) with frames built from trt_tb_pkg patterns, the
// test Huffman table loaded, and random S-LINK back-pressure.  The testbench
// builds every expected event word by word (header, link markers, packed
// Huffman codes, trailer) with the package's reference encoder and compares
// the S-LINK stream.  Event 10 has a wrong BC counter on link 1, event 20 no
// frame on link 3 (timeout), event 25 a receiver overflow on link 0; their
// error bits, the sync error count and the trailer error count are checked.
// Every second event must appear in the spy buffer, read out between events,
// and the buffer BUSY must follow the trigger queue level.
module tb_rod_event_builder;
  import trt_pkg::*;
  import trt_tb_pkg::*;
  localparam int NL = 4, NE = 30;
  logic clk = 0, rst_n = 0;
  logic trig_valid = 0; trig_info_t trig = '0;
  logic [NL-1:0] link_en = 4'b1011, link_valid = 0, link_err = 0, link_ovf = 0, link_pop;
  logic [2:0] link_l1id [NL]; logic [7:0] link_bcid [NL]; logic [431:0] link_data [NL];
  logic [7:0] bcid_offset = 8'd3;
  logic tbl_we = 0, tbl_valid = 0, esc_we = 0;
  logic [8:0] tbl_addr = 0; straw_t tbl_pattern = 0; logic [31:0] tbl_code = 0; logic [5:0] tbl_len = 0;
  logic [4:0] esc_code = 5'b11; logic [2:0] esc_len = 3'd2;
  logic slink_lff = 0, slink_valid, slink_ctrl; logic [31:0] slink_data;
  logic [7:0] spy_prescale = 8'd2; logic spy_rd = 0; logic [32:0] spy_rdata; logic spy_empty;
  logic [12:0] spy_level;
  logic [4:0] busy_thr = 5'd3; logic buf_busy;
  logic [31:0] events, sync_errors, escapes; logic trig_lost;
  int checks = 0, failures = 0, nout = 0, busy_seen = 0, stalls = 0;
  logic [32:0] expq [$];
  logic [32:0] spyexp [$];

  rod_event_builder #(.NLINKS(NL), .NCODES(512), .TRIG_DEPTH(16), .SPY_DEPTH(4096), .LINK_TIMEOUT(50)) dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; $display("nout=%0d events=%0d st=%0d lv=%b tq=%0d", nout, events, dut.st, link_valid, dut.tq_level); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic cnd, string m);
    checks++;
    if (!cnd) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  logic [32:0] w [$];
  function automatic void build(int ev);
    int nerr = 0;
    w.delete();
    w.push_back({1'b1, EVT_HEADER_MARK});
    w.push_back({1'b0, 8'(ev + 1), 24'(ev)});
    w.push_back({1'b0, 20'b0, 12'(100 + 7 * ev)});
    for (int l = 0; l < NL; l++) if (link_en[l]) begin
      logic [4:0] e; e = 0;
      if (ev == 20 && l == 3) e[3] = 1;
      if (ev == 10 && l == 1) e[1] = 1;
      if (ev >= 25 && l == 0) e[4] = 1;
      if (e != 0) nerr++;
      w.push_back({1'b0, 4'hB, 12'(l), 11'b0, e});
      if (!e[3]) begin
        logic bits [$]; logic [31:0] c; int len;
        for (int s = 0; s < 16; s++) begin
          ref_code(straw_pattern(l, ev, s), c, len);
          for (int b = len - 1; b >= 0; b--) bits.push_back(c[b]);
        end
        while (bits.size() % 32) bits.push_back(1'b0);
        for (int i = 0; i < bits.size(); i += 32) begin
          logic [31:0] x;
          for (int b = 0; b < 32; b++) x[31 - b] = bits[i + b];
          w.push_back({1'b0, x});
        end
      end
    end
    w.push_back({1'b1, 4'hE, 4'h0, 8'(nerr), 16'(w.size() + 1)});
  endfunction

  // S-LINK sink with random back-pressure
  always @(posedge clk) if (rst_n) begin
    if (slink_valid) begin
      chk(expq.size() > 0 && {slink_ctrl, slink_data} == expq[0],
          $sformatf("word %0d: %h exp %h", nout, {slink_ctrl, slink_data}, expq.size() ? expq[0] : 33'h0));
      if (expq.size()) void'(expq.pop_front());
      nout <= nout + 1;
    end
    if (slink_lff) stalls <= stalls + 1;
    if (buf_busy) busy_seen <= busy_seen + 1;
    chk(buf_busy == (dut.tq_level >= busy_thr), "busy");
  end
  always @(negedge clk) slink_lff <= ($urandom % 5) == 0;

  initial begin
    for (int l = 0; l < NL; l++) begin link_l1id[l] = 0; link_bcid[l] = 0; link_data[l] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 1; k <= 7; k++) begin
      @(negedge clk); tbl_we = 1; tbl_addr = 9'(k); tbl_valid = 1; tbl_pattern = common_pattern(k);
      tbl_code = {27'd0, 2'b10, 3'(k)}; tbl_len = 6'd5;
    end
    @(negedge clk); tbl_we = 0; esc_we = 1; @(negedge clk); esc_we = 0;
    for (int ev = 0; ev < NE; ev++) begin
      build(ev);
      for (int i = 0; i < w.size(); i++) expq.push_back(w[i]);
      if (ev % 2 == 1) for (int i = 0; i < w.size(); i++) spyexp.push_back(w[i]);
    end
    for (int ev = 0; ev < NE; ev++) begin
      // the central trigger holds off while the ROD signals BUSY
      @(negedge clk);
      while (buf_busy) @(negedge clk);
      trig_valid = 1; trig = '{l1id: 24'(ev), bcid: 12'(100 + 7 * ev), ttype: 8'(ev + 1)};
      @(negedge clk); trig_valid = 0;
    end
    @(negedge clk); trig_valid = 0;
  end

  // link frame sources: one frame per event, presented after a random delay
  for (genvar l = 0; l < NL; l++) begin : g_src
    initial begin
      wait (rst_n);
      repeat (40) @(negedge clk);
      for (int ev = 0; ev < NE; ev++) begin
        if (ev == 20 && l == 3) continue;
        repeat ($urandom % 30) @(negedge clk);
        // the frame after the missing one only arrives once that event timed out
        if (ev == 21 && l == 3) wait (events == 21);
        link_l1id[l] = 3'(ev);
        link_bcid[l] = 8'(100 + 7 * ev + 3 + ((ev == 10 && l == 1) ? 1 : 0));
        for (int s = 0; s < 16; s++) link_data[l][431 - 27*s -: 27] = straw_pattern(l, ev, s);
        link_valid[l] = 1;
        if (ev == 25 && l == 0) link_ovf[0] = 1;
        do @(posedge clk); while (!link_pop[l]);
        @(negedge clk); link_valid[l] = 0;
      end
    end
  end

  // spy reader: empties the spy buffer after each event is complete in it
  logic [32:0] spygot [$];
  always @(negedge clk) begin
    spy_rd = 0;
    if (!spy_empty && int'(dut.st) == 0) begin
      spy_rd = 1;
      spygot.push_back(spy_rdata);
    end
  end

  initial begin
    wait (rst_n);
    wait (events == NE);
    repeat (200) @(negedge clk);
    chk(expq.size() == 0, $sformatf("all words out, %0d left", expq.size()));
    chk(sync_errors == 1, $sformatf("sync errors %0d", sync_errors));
    chk(escapes > 10, "escapes counted");
    chk(busy_seen > 0 && stalls > 0, "busy and back-pressure exercised");
    chk(spygot.size() == spyexp.size(), $sformatf("spy words %0d exp %0d", spygot.size(), spyexp.size()));
    for (int i = 0; i < spygot.size() && i < spyexp.size(); i++) chk(spygot[i] == spyexp[i], $sformatf("spy word %0d %h %h", i, spygot[i], spyexp[i]));
    chk(!trig_lost, "no trigger lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
