// tb_rod_link_rx: self-checking test of rod_link_rx.
// Sends DTMROC-format frames (start bit, 3-bit L1 counter, 8-bit BC counter,
// error bit, 16 x 27 straw bits) with random gaps and random bit-enable
// patterns, pops them after random delays and compares every field with what
// was sent.  Then sends two frames without popping and checks that the
// second is lost and flagged as overflow, and that clear resets the flag.
module tb_rod_link_rx;
  import trt_tb_pkg::*;
  logic clk = 0, rst_n = 0, bit_en = 0, bit_in = 0, frame_pop = 0, clear = 0;
  logic frame_valid, chip_err, overflow;
  logic [2:0] l1id;
  logic [7:0] bcid;
  logic [431:0] data;
  int checks = 0, failures = 0, rx = 0;
  logic [444:0] fq [$];

  rod_link_rx dut (.*);
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic cnd, string m);
    checks++;
    if (!cnd) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  function automatic logic [444:0] mkframe(int ev);
    logic [431:0] d;
    for (int s = 0; s < 16; s++) d[431 - 27*s -: 27] = straw_pattern(5, ev, s);
    return {1'b1, 3'(ev), 8'(ev * 37), 1'(ev % 5 == 0), d};
  endfunction

  task automatic send(logic [444:0] f);
    for (int i = 444; i >= 0; i--) begin
      do begin @(negedge clk); bit_en = ($urandom % 4) != 0; bit_in = f[i]; end while (!bit_en);
    end
    @(negedge clk); bit_en = 1; bit_in = 0;
  endtask

  // consumer
  always @(posedge clk) begin
    frame_pop <= 0;
    if (frame_valid && !frame_pop && ($urandom % 8 == 0) && fq.size() > 0 && rst_n && rx < 20) begin
      logic [444:0] e; e = fq.pop_front();
      chk({1'b1, l1id, bcid, chip_err, data} == e, $sformatf("frame %0d", rx));
      rx <= rx + 1;
      frame_pop <= 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int ev = 0; ev < 20; ev++) begin
      logic [444:0] f; f = mkframe(ev);
      fq.push_back(f);
      send(f);
      repeat ($urandom % 20) @(negedge clk);
    end
    wait (rx == 20);
    chk(!overflow, "no overflow");
    repeat (3) @(negedge clk);
    // overflow: three frames with nobody popping
    send(mkframe(100));
    chk(frame_valid && !overflow, "frame held");
    send(mkframe(101));
    repeat (2) @(negedge clk);
    chk(overflow, "overflow flagged");
    chk(l1id == 3'(100) && bcid == 8'(100 * 37), "first frame kept");
    clear = 1; @(negedge clk); clear = 0; @(negedge clk);
    chk(!overflow, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
