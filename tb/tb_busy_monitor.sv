// tb_busy_monitor: self-checking test of busy_monitor.
// Drives random BUSY waveforms on 4 sources (one disabled) and checks the
// combined BUSY every cycle and the accumulated time, assertion count and
// longest assertion against counts kept by the testbench; then checks clear.
module tb_busy_monitor;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, clear = 0, busy_out;
  logic [N-1:0] busy_in = 0, src_en = 4'b1011;
  logic [31:0] busy_time [N], busy_max [N];
  logic [15:0] busy_count [N];
  int checks = 0, failures = 0;
  int t [N], c [N], mx [N], run [N];
  logic [N-1:0] prev = 0;

  busy_monitor #(.NSRC(N), .CW(32)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic cnd, string m);
    checks++;
    if (!cnd) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin t[i] = 0; c[i] = 0; mx[i] = 0; run[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++)
        if (($urandom % 100) < (busy_in[i] ? 8 : 3)) busy_in[i] = ~busy_in[i];
      #1 chk(busy_out == |(busy_in & src_en), "combined");
      for (int i = 0; i < N; i++) if (busy_in[i] && src_en[i]) begin
        t[i]++;
        if (!prev[i]) begin c[i]++; run[i] = 1; end else run[i]++;
        if (run[i] > mx[i]) mx[i] = run[i];
      end
      prev = busy_in & src_en;
    end
    @(negedge clk); busy_in = 0; @(negedge clk);
    for (int i = 0; i < N; i++) begin
      chk(int'(busy_time[i]) == t[i], $sformatf("time %0d %0d %0d", i, busy_time[i], t[i]));
      chk(int'(busy_count[i]) == c[i], $sformatf("count %0d", i));
      chk(int'(busy_max[i]) == mx[i], $sformatf("max %0d %0d %0d", i, busy_max[i], mx[i]));
    end
    chk(busy_time[2] == 0 && c[0] > 10, "disabled source / activity");
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < N; i++) chk(busy_time[i] == 0 && busy_count[i] == 0 && busy_max[i] == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
