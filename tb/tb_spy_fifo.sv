// tb_spy_fifo: self-checking test of spy_fifo against a queue model.
// Random writes and reads, including writes to a full and reads from an empty
// FIFO; checks data order, empty/full and level every cycle.
module tb_spy_fifo;
  localparam int W = 12, DEPTH = 8;
  logic clk = 0, rst_n = 0, clear = 0, wr = 0, rd = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic empty, full;
  logic [3:0] level;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];

  spy_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == DEPTH), "full");
      chk(int'(level) == q.size(), "level");
      if (q.size() > 0) chk(rdata == q[0], "data");
      wr = ($urandom % 100) < (i < 1000 ? 60 : 35);
      rd = ($urandom % 100) < (i < 1000 ? 35 : 60);
      wdata = W'($urandom);
      @(posedge clk);
      begin
        bit can_wr;
        can_wr = q.size() < DEPTH;
        if (rd && q.size() > 0) void'(q.pop_front());
        if (wr && can_wr) q.push_back(wdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
