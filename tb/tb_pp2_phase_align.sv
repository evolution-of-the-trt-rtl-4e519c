// tb_pp2_phase_align: self-checking test of pp2_phase_align.
// For each of the four possible phases of the incoming 40 Mbit/s link relative
// to the panel clock, sends idle, then random bits, and checks that after lock
// the BC-rate output reproduces the sent bits at a constant latency of 1 or 2
// BCs, and that `locked` rises.
module tb_pp2_phase_align;
  logic clk4x = 0, rst_n = 0, bc_stb = 0, din = 0, dout, locked;
  int checks = 0, failures = 0;
  int ph = 0;
  logic sent [400];
  logic got [400];

  pp2_phase_align dut (.*);
  always #1.5625 clk4x = ~clk4x;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic cnd, string m);
    checks++;
    if (!cnd) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    for (ph = 0; ph < 4; ph++) begin
      rst_n = 0; din = 0; bc_stb = 0;
      repeat (8) @(posedge clk4x);
      rst_n = 1;
      for (int i = 0; i < 400; i++) sent[i] = (i < 20) ? 0 : (i == 20) ? 1 : 1'($urandom);
      // cycle j of clk4x: bc_stb when j%4==3; din changes at cycles 4*i + ph
      for (int j = 0; j < 4 * 400 + 16; j++) begin
        @(negedge clk4x);
        bc_stb = (j % 4 == 3);
        if (j % 4 == ph && j / 4 < 400) din = sent[j / 4];
        if (j % 4 == 0 && j / 4 >= 1 && j / 4 <= 400) got[j / 4 - 1] = dout;
      end
      chk(locked, $sformatf("locked ph %0d", ph));
      begin
        int best; best = -1;
        for (int lat = 1; lat <= 3 && best < 0; lat++) begin
          bit ok; ok = 1;
          for (int i = 20; i + lat < 400; i++) if (got[i + lat] != sent[i]) ok = 0;
          if (ok) best = lat;
        end
        chk(best >= 1, $sformatf("bits recovered at phase %0d", ph));
        for (int i = 20; i + 2 < 400; i += 16) begin
          chk(best >= 1 && got[i + best] == sent[i], "bit");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
