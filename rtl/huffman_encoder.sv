// huffman_encoder: table-driven Huffman encoder for 27-bit straw patterns.
//
// Only a small number of the 2^27 possible straw bit patterns occur often, so
// the most common ones get short codes from a loadable table and every other
// pattern is sent as an escape code followed by its 27 raw bits.  The table has
// NCODES entries {valid, pattern, code, len}; the lowest-numbered valid entry
// whose pattern equals `pattern` gives the output.  Codes are right-aligned in
// `code` and `len` (1..32) bits long; the escape code must be at most 5 bits so
// that an escaped pattern also fits 32 bits.  The table and the escape code
// are written through the `tbl_*` and `esc_*` ports (from VME), so they can be
// rebuilt from the measured pattern frequencies.  After reset entry 0 maps the
// empty straw (all zero) to the 1-bit code 0, the other entries are invalid and
// the escape code is the 1-bit code 1, a valid prefix-free code.
// The lookup is combinational: code/len/hit follow `pattern` in the same cycle.
// Huffman coding with a table of the common patterns follows the document;
// the table size, the escape mechanism and the reset table are this design's.
module huffman_encoder
  import trt_pkg::*;
#(
  parameter int unsigned NCODES = 512
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      tbl_we,
  input  logic [$clog2(NCODES)-1:0] tbl_addr,
  input  logic                      tbl_valid,
  input  straw_t                    tbl_pattern,
  input  logic [31:0]               tbl_code,
  input  logic [5:0]                tbl_len,
  input  logic                      esc_we,
  input  logic [4:0]                esc_code,
  input  logic [2:0]                esc_len,
  input  straw_t                    pattern,
  output logic [31:0]               code,
  output logic [5:0]                len,
  output logic                      hit
);

  logic        t_valid [NCODES];
  straw_t      t_pat   [NCODES];
  logic [31:0] t_code  [NCODES];
  logic [5:0]  t_len   [NCODES];
  logic [4:0]  e_code;
  logic [2:0]  e_len;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCODES; i++) begin
        t_valid[i] <= (i == 0);
        t_pat[i]   <= '0;
        t_code[i]  <= '0;
        t_len[i]   <= 6'd1;
      end
      e_code <= 5'b1;
      e_len  <= 3'd1;
    end else begin
      if (tbl_we) begin
        t_valid[tbl_addr] <= tbl_valid;
        t_pat[tbl_addr]   <= tbl_pattern;
        t_code[tbl_addr]  <= tbl_code;
        t_len[tbl_addr]   <= tbl_len;
      end
      if (esc_we) begin
        e_code <= esc_code;
        e_len  <= esc_len;
      end
    end
  end

  always_comb begin
    hit  = 1'b0;
    code = 32'(e_code) << STRAW_BITS | 32'(pattern);
    len  = 6'(e_len) + 6'(STRAW_BITS);
    for (int i = NCODES - 1; i >= 0; i--) begin
      if (t_valid[i] && t_pat[i] == pattern) begin
        hit  = 1'b1;
        code = t_code[i];
        len  = t_len[i];
      end
    end
  end

endmodule
