// trt_tb_pkg: shared testbench helpers for the TRT back-end testbenches.
//
// straw_pattern() gives the 27-bit content of a straw for an event as a fixed
// function of chip, event number and straw, mixing empty straws, a few common
// patterns that the test Huffman table covers and arbitrary patterns that must
// be escaped.  The test table is: empty straw -> code 0 (1 bit), common
// pattern k (k = 1..7) -> 10 followed by k in 3 bits (5 bits), everything else
// -> escape 11 followed by the 27 raw bits.  ref_code() encodes a pattern with
// that table, independently of the RTL encoder.
package trt_tb_pkg;

  function automatic logic [26:0] common_pattern(int k);
    // bits set in consecutive time bins, as a hit straw would give
    return 27'((32'h0000_00FF >> (k - 1)) << (3 * k));
  endfunction

  function automatic logic [31:0] mix(logic [31:0] x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic logic [26:0] straw_pattern(int chip, int ev, int straw);
    logic [31:0] h;
    h = mix(32'(chip) * 32'd1000003 + 32'(ev) * 32'd7919 + 32'(straw));
    if (h[3:0] < 4'd9)       return '0;
    else if (h[3:0] < 4'd14) return common_pattern(1 + int'(h[10:8]) % 7);
    else                     return 27'(mix(h));
  endfunction

  // reference encoding with the test table: returns code (right-aligned) and length
  function automatic void ref_code(logic [26:0] p, output logic [31:0] code, output int len);
    code = '0;
    len  = 0;
    if (p == '0) begin
      code = 32'd0; len = 1;
      return;
    end
    for (int k = 1; k <= 7; k++) begin
      if (p == common_pattern(k)) begin
        code = {27'd0, 2'b10, 3'(k)}; len = 5;
        return;
      end
    end
    code = {3'b0, 2'b11, p}; len = 29;
  endfunction

  // expected ROD output of one event with all links present and error free,
  // links numbered 0..nlinks-1 whose chips are gid_base+link; result in ev_words
  // as {ctrl, word}
  logic [32:0] ev_words [$];
  function automatic void build_event(int l1id, int bcid, int ttype, int nlinks, int gid_base, int ev);
    ev_words.delete();
    ev_words.push_back({1'b1, 32'hEE12_34EE});
    ev_words.push_back({1'b0, 8'(ttype), 24'(l1id)});
    ev_words.push_back({1'b0, 20'b0, 12'(bcid)});
    for (int l = 0; l < nlinks; l++) begin
      logic bits [$];
      logic [31:0] c;
      int len;
      ev_words.push_back({1'b0, 4'hB, 12'(l), 16'h0});
      for (int s = 0; s < 16; s++) begin
        ref_code(straw_pattern(gid_base + l, ev, s), c, len);
        for (int b = len - 1; b >= 0; b--) bits.push_back(c[b]);
      end
      while (bits.size() % 32 != 0) bits.push_back(1'b0);
      for (int i = 0; i < bits.size(); i += 32) begin
        logic [31:0] x;
        for (int b = 0; b < 32; b++) x[31 - b] = bits[i + b];
        ev_words.push_back({1'b0, x});
      end
    end
    ev_words.push_back({1'b1, 4'hE, 4'h0, 8'd0, 16'(ev_words.size() + 1)});
  endfunction

endpackage
