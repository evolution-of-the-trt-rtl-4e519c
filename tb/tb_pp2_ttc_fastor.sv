// tb_pp2_ttc_fastor: self-checking test of pp2_ttc_fastor.
// Outside Fast OR mode the read-back lines pass unchanged (one cycle late);
// in Fast OR mode masked lines are zero and fastor_any is the OR of the
// enabled lines.
module tb_pp2_ttc_fastor;
  localparam int N = 20;
  logic clk = 0, rst_n = 0, fastor_mode = 0, fastor_any;
  logic [N-1:0] line_en = 0, rb_in = 0, rb_out;
  int checks = 0, failures = 0, ors = 0;

  pp2_ttc_fastor #(.NLINKS(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic cnd, string m);
    checks++;
    if (!cnd) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    logic [N-1:0] pin; logic pmode;
    repeat (2) @(posedge clk); rst_n = 1;
    line_en = 20'h0F0F3;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      fastor_mode = (cyc / 250) % 2;
      rb_in = N'($urandom) & N'($urandom) & N'($urandom);
      pin = rb_in; pmode = fastor_mode;
      @(negedge clk);
      chk(rb_out == (pmode ? (pin & line_en) : pin), "lines");
      chk(fastor_any == (pmode && |(pin & line_en)), "or");
      if (fastor_any) ors++;
    end
    chk(ors > 50, "fast or seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
