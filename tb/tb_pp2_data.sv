// tb_pp2_data: self-checking test of pp2_data (one data patch panel board).
// Drives all 120 links with random bits, each link with its own phase relative
// to the panel clock, and checks that each 32-bit output word carries, in bit
// i, link 30*g+i of group g at one latency common to all links of a phase,
// that the lock bit rises, that the parity bit makes every word even, and that
// one word is produced per BC.
module tb_pp2_data;
  localparam int NG = 4, NL = NG * 30, NB = 300;
  logic clk4x = 0, rst_n = 0, bc_stb = 0;
  logic [NL-1:0] din = 0, locked;
  logic [31:0] gol_word [NG];
  logic [NG-1:0] gol_valid;
  int checks = 0, failures = 0, nvalid = 0;
  logic [NL-1:0] sent [NB];
  logic [31:0] got [NG][NB + 8];
  int ph [NL];

  pp2_data #(.NGROUPS(NG)) dut (.*);
  always #1.5625 clk4x = ~clk4x;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic chk(logic cnd, string m);
    checks++;
    if (!cnd) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  always @(posedge clk4x) if (rst_n && gol_valid[0]) begin
    for (int g = 0; g < NG; g++) if (nvalid < NB + 8) got[g][nvalid] <= gol_word[g];
    nvalid <= nvalid + 1;
  end

  initial begin
    for (int l = 0; l < NL; l++) ph[l] = $urandom % 4;
    for (int b = 0; b < NB; b++)
      for (int l = 0; l < NL; l++) sent[b][l] = (b < 10) ? 0 : (b == 10) ? 1 : 1'($urandom);
    repeat (8) @(posedge clk4x);
    rst_n = 1;
    for (int j = 0; j < 4 * NB + 40; j++) begin
      @(negedge clk4x);
      bc_stb = (j % 4 == 3);
      for (int l = 0; l < NL; l++) if (j % 4 == ph[l] && j / 4 < NB) din[l] = sent[j / 4][l];
    end
    chk(&locked, "all locked");
    chk(nvalid >= NB, "one word per BC");
    for (int g = 0; g < NG; g++) begin
      for (int l = 0; l < 30; l++) begin
        int best; best = -1;
        for (int lat = 0; lat <= 4 && best < 0; lat++) begin
          bit ok; ok = 1;
          for (int b = 11; b + lat < NB; b++) if (got[g][b + lat][l] != sent[b][g*30 + l]) ok = 0;
          if (ok) best = lat;
        end
        chk(best >= 0, $sformatf("link %0d", g * 30 + l));
      end
      for (int b = 0; b < NB; b++) chk(^got[g][b] == 0, "parity");
      chk(got[g][NB - 1][30] == 1'b1, "lock bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
