// ttc_bc_counter: bunch and event counters of the TRT-TTC module, and the
// beam-gap window.
//
// The bunch counter runs over one LHC orbit (3564 bunch crossings) and is
// cleared by BCR; the event counter counts L1A and is cleared by ECR, so the
// first event after ECR has L1ID 0.  `in_gap` is high while the bunch counter
// lies in the programmable window [gap_start, gap_end], the part of the orbit
// without collisions in which the TTC links may be used for parameter traffic;
// `gap_left` is the number of crossings left in the window.  On each L1A the
// trigger information for the RODs (L1ID, BCID, trigger type) is presented on
// `trig` with `trig_valid`, registered one cycle after the L1A.
module ttc_bc_counter
  import trt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        l1a,
  input  logic        bcr,
  input  logic        ecr,
  input  logic [7:0]  ttype,
  input  logic [11:0] gap_start,
  input  logic [11:0] gap_end,
  output logic [11:0] bcid,
  output logic [23:0] evcnt,
  output logic        in_gap,
  output logic [11:0] gap_left,
  output logic        trig_valid,
  output trig_info_t  trig
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcid       <= '0;
      evcnt      <= '0;
      trig_valid <= 1'b0;
      trig       <= '0;
    end else begin
      if (bcr || bcid == 12'(BC_PER_ORBIT - 1)) bcid <= '0;
      else                                      bcid <= bcid + 1;
      trig_valid <= 1'b0;
      if (ecr) begin
        evcnt <= '0;
      end else if (l1a) begin
        evcnt      <= evcnt + 1;
        trig_valid <= 1'b1;
        trig       <= '{l1id: evcnt, bcid: bcid, ttype: ttype};
      end
    end
  end

  assign in_gap   = (bcid >= gap_start) && (bcid <= gap_end);
  assign gap_left = in_gap ? (gap_end - bcid) : 12'd0;

endmodule
