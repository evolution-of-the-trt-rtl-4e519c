// dtmroc_model: behavioural model of a DTMROC front-end chip, for testbenches.
//
// It listens to its TTC command line (fast commands L1A 110, BCR 1010,
// ECR 1011, register frames 111 rw chip reg [data]), keeps a BC counter
// (cleared by BCR) and an L1 counter (cleared by ECR), answers register reads
// addressed to its CHIP number on the read-back line (start bit and 32 data
// bits, RB_DELAY clocks after the frame) and, for each L1A, queues an event
// (up to 42, like the chip's derandomiser) that it sends on its data line as
// start bit, L1 counter[2:0], BC counter[7:0], error bit 0 and 16 x 27 straw
// bits from trt_tb_pkg::straw_pattern(GID, event, straw).  When its register 7
// bit 0 is set (Fast OR mode) the read-back line shows `hit` instead.
// `upset` lets a testbench flip a stored register bit, as a single event upset.
module dtmroc_model
  import trt_tb_pkg::*;
#(
  parameter int CHIP     = 0,
  parameter int GID      = 0,
  parameter int RB_DELAY = 3,
  parameter int DATA_LAT = 10
) (
  input  logic clk,
  input  logic cmd,
  input  logic hit,
  output logic rb,
  output logic dout,
  input  logic upset,
  output int   n_l1a,
  output int   n_bcr,
  output int   n_ecr,
  output int   n_wr,
  output int   n_rd
);
  logic [31:0] regs [16];
  logic [7:0]  bc;
  logic [2:0]  l1;
  int          evno;
  // command decoder
  logic [47:0] sh;
  int          nb;
  // read-back
  logic [32:0] rbs;
  int          rbn, rbwait;
  // data
  int          q_ev [$];
  logic [2:0]  q_l1 [$];
  logic [7:0]  q_bc [$];
  logic [444:0] fr;
  int          frn, lat;

  initial begin
    for (int i = 0; i < 16; i++) regs[i] = '0;
    bc = 0; l1 = 0; evno = 0; sh = 0; nb = 0; rbn = 0; rbwait = 0; frn = 0; lat = 0;
    n_l1a = 0; n_bcr = 0; n_ecr = 0; n_wr = 0; n_rd = 0; rb = 0; dout = 0; rbs = 0; fr = 0;
  end

  always @(posedge clk) begin
    bc <= bc + 1;
    if (upset) regs[1][5] <= ~regs[1][5];
    // ---- command decode
    if (nb == 0) begin
      if (cmd) begin sh <= 48'd1; nb <= 1; end
    end else begin
      logic [47:0] s; int n;
      s = {sh[46:0], cmd}; n = nb + 1;
      sh <= s; nb <= n;
      if (n == 3 && s[2:0] == 3'b110) begin
        n_l1a <= n_l1a + 1; nb <= 0;
        if (q_ev.size() < 42) begin q_ev.push_back(evno); q_l1.push_back(l1); q_bc.push_back(bc); end
        evno <= evno + 1; l1 <= l1 + 1;
      end else if (n == 4 && s[3:1] == 3'b101) begin
        nb <= 0;
        if (s[0]) begin n_ecr <= n_ecr + 1; l1 <= 0; evno <= 0; end
        else      begin n_bcr <= n_bcr + 1; bc <= 0; end
      end else if (n == 12 && s[11:9] == 3'b111 && s[8]) begin
        nb <= 0;
        if (int'(s[7:4]) == CHIP) begin
          n_rd <= n_rd + 1;
          rbs <= {1'b1, regs[s[3:0]]}; rbwait <= RB_DELAY; rbn <= 33;
        end
      end else if (n == 44 && s[43:41] == 3'b111) begin
        nb <= 0;
        if (int'(s[39:36]) == CHIP) begin
          n_wr <= n_wr + 1;
          regs[s[35:32]] <= s[31:0];
        end
      end else if (n >= 44) begin
        nb <= 0;   // no valid command: resynchronise
      end
    end
    // ---- read-back
    if (rbwait > 0) rbwait <= rbwait - 1;
    else if (rbn > 0) begin
      rb <= rbs[32]; rbs <= {rbs[31:0], 1'b0}; rbn <= rbn - 1;
    end else rb <= regs[7][0] ? hit : 1'b0;
    // ---- data frames
    if (frn > 0) begin
      dout <= fr[444]; fr <= {fr[443:0], 1'b0}; frn <= frn - 1;
    end else begin
      dout <= 1'b0;
      if (q_ev.size() > 0) begin
        if (lat < DATA_LAT) lat <= lat + 1;
        else begin
          logic [431:0] d;
          for (int s = 0; s < 16; s++) d[431 - 27*s -: 27] = straw_pattern(GID, q_ev[0], s);
          fr  <= {1'b1, q_l1[0], q_bc[0], 1'b0, d};
          frn <= 445;
          void'(q_ev.pop_front()); void'(q_l1.pop_front()); void'(q_bc.pop_front());
          lat <= 0;
        end
      end
    end
  end
endmodule
