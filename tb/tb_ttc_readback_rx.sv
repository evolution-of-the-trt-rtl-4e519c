// tb_ttc_readback_rx: self-checking test of ttc_readback_rx.
// Sends read-back frames (start bit + 32 data bits) with random gaps and
// checks each received word and its latency (35 cycles from start bit to
// rb_valid); then checks that in Fast OR mode no frame is received and the
// line is passed to `fastor` two cycles late.
module tb_ttc_readback_rx;
  logic clk = 0, rst_n = 0, rb_in = 0, fastor_mode = 0, rb_valid, fastor;
  logic [31:0] rb_data;
  int checks = 0, failures = 0, nrx = 0;
  logic [31:0] q [$];
  int tstart [$];
  int cyc = 0;

  ttc_readback_rx dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic cnd, string m);
    checks++;
    if (!cnd) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  always @(posedge clk) if (rb_valid) begin
    chk(q.size() > 0 && rb_data == q[0], "data");
    chk(tstart.size() > 0 && cyc - tstart[0] == 35, $sformatf("latency %0d", cyc - tstart[0]));
    if (q.size() > 0) begin void'(q.pop_front()); void'(tstart.pop_front()); end
    nrx++;
  end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      logic [32:0] w; w = {1'b1, 32'($urandom)};
      q.push_back(w[31:0]);
      for (int i = 32; i >= 0; i--) begin
        @(negedge clk); rb_in = w[i];
        if (i == 32) tstart.push_back(cyc);
      end
      @(negedge clk); rb_in = 0;
      repeat ($urandom % 10) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    chk(nrx == 40, "all frames");
    fastor_mode = 1;
    for (int i = 0; i < 300; i++) begin
      logic a, b;
      @(negedge clk); rb_in = 1'($urandom);
      a = rb_in;
      @(negedge clk); @(negedge clk);
      b = fastor;
      chk(b == a, "fastor pass");
      chk(!rb_valid, "no frame in fast or mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
