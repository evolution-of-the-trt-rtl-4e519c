// tb_huffman_encoder: self-checking test of huffman_encoder.
// Checks the reset table (empty straw -> 0, all else escaped with 1), then loads
// the test table of trt_tb_pkg (7 common patterns, escape 11) into the middle
// of a 64-entry table and compares code and length for many straw patterns
// with the package's reference encoder.  Also checks the lowest-entry-wins rule
// and that invalidating an entry sends its pattern to the escape.
module tb_huffman_encoder;
  import trt_tb_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  logic tbl_we = 0, tbl_valid = 0, esc_we = 0;
  logic [5:0] tbl_addr = 0;
  logic [26:0] tbl_pattern = 0, pattern = 0;
  logic [31:0] tbl_code = 0, code;
  logic [5:0] tbl_len = 0, len;
  logic [4:0] esc_code = 0;
  logic [2:0] esc_len = 0;
  logic hit;
  int checks = 0, failures = 0;

  huffman_encoder #(.NCODES(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(logic c, string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  task automatic wr(int a, logic v, logic [26:0] p, logic [31:0] c, int l);
    @(negedge clk); tbl_we = 1; tbl_addr = 6'(a); tbl_valid = v; tbl_pattern = p; tbl_code = c; tbl_len = 6'(l);
    @(negedge clk); tbl_we = 0;
  endtask

  initial begin
    logic [31:0] rc; int rl;
    repeat (2) @(posedge clk); rst_n = 1;
    // reset table
    @(negedge clk); pattern = 0; #1;
    chk(hit && len == 1 && code == 0, "reset empty");
    pattern = 27'h123; #1;
    chk(!hit && len == 28 && code == {4'b0, 1'b1, 27'h123}, "reset escape");
    // test table at entries 20..27, empty straw kept at entry 0
    for (int k = 1; k <= 7; k++) wr(19 + k, 1, common_pattern(k), {27'd0, 2'b10, 3'(k)}, 5);
    @(negedge clk); esc_we = 1; esc_code = 5'b11; esc_len = 3'd2; @(negedge clk); esc_we = 0;
    for (int i = 0; i < 3000; i++) begin
      pattern = straw_pattern(i % 13, i, i % 16); #1;
      ref_code(pattern, rc, rl);
      chk(code == rc && int'(len) == rl, $sformatf("code %h", pattern));
      chk(hit == (rl != 29), "hit");
      @(negedge clk);
    end
    // lowest entry wins
    wr(50, 1, common_pattern(3), 32'h3ff, 10);
    pattern = common_pattern(3); #1;
    chk(len == 5 && code == {27'd0, 2'b10, 3'd3}, "priority low");
    wr(22, 0, common_pattern(3), 0, 5);
    pattern = common_pattern(3); #1;
    chk(len == 10 && code == 32'h3ff, "priority next");
    wr(50, 0, 0, 0, 1);
    pattern = common_pattern(3); #1;
    chk(!hit && len == 29 && code == {3'b0, 2'b11, common_pattern(3)}, "invalidated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
