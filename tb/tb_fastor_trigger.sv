// tb_fastor_trigger: self-checking test of fastor_trigger.
// Drives random Fast OR lines and checks, cycle by cycle, the trigger against
// a model of the multiplicity threshold with hold-off, the masked copy sent
// to P2, the trigger count, and that nothing fires while disabled.
module tb_fastor_trigger;
  localparam int N = 40;
  logic clk = 0, rst_n = 0, enable = 0, trig;
  logic [N-1:0] lines = 0, line_en = 0, p2_lines;
  logic [5:0] threshold = 0;
  logic [7:0] holdoff = 0;
  logic [15:0] trig_count;
  int checks = 0, failures = 0, hold = 0, exp_cnt = 0;
  logic exp_trig = 0;
  logic [N-1:0] exp_p2 = 0;

  fastor_trigger #(.NLINKS(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic cnd, string m);
    checks++;
    if (!cnd) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    line_en = {$urandom, $urandom}; threshold = 3; holdoff = 5;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      chk(trig == exp_trig && p2_lines == exp_p2 && int'(trig_count) == exp_cnt, "outputs");
      enable = cyc > 100;
      lines = 0;
      // 0..6 lines hit, so the masked multiplicity is often just at the threshold
      for (int k = int'($urandom % 7); k > 0; k--) lines[$urandom % N] = 1;
      // model of the next cycle
      exp_p2 = lines & line_en;
      exp_trig = 0;
      if (hold > 0) hold--;
      else if (enable && $countones(lines & line_en) >= int'(threshold)) begin
        exp_trig = 1; exp_cnt++; hold = holdoff;
      end
    end
    chk(exp_cnt > 20, "triggers happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
