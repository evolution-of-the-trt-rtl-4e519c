// pp2_phase_align: phase alignment of one 40 Mbit/s DTMROC data link on the
// data patch panel.
//
// The link arrives with an unknown, fixed phase relative to the panel's
// bunch-crossing clock.  The line is sampled four times per bit on `clk4x`
// (4 x 40 MHz) after a two-flop synchroniser.  Whenever two successive samples
// differ, the position of that edge within the bit period (0..3) is recorded,
// and the bit is taken at the sample two positions later, the middle of the
// bit.  The sampled bit is handed to the bunch-crossing domain at the next
// `bc_stb` (one clk4x cycle in four) on `dout`.  `locked` rises after LOCK_EDGES
// edges in a row were seen at the same position.  The document names phase
// alignment only; four-times oversampling with edge tracking is this design's
// choice.  Latency: 3 to 7 clk4x cycles, constant once locked.
module pp2_phase_align #(
  parameter int unsigned LOCK_EDGES = 4
) (
  input  logic clk4x,
  input  logic rst_n,
  input  logic bc_stb,
  input  logic din,
  output logic dout,
  output logic locked
);

  logic [2:0] sync;          // two synchroniser stages and the previous sample
  logic [1:0] ph;            // sample position within the bit period
  logic [1:0] edge_ph;
  logic [1:0] samp_ph;
  logic       bit_hold;
  logic [$clog2(LOCK_EDGES+1)-1:0] same;

  assign samp_ph = edge_ph + 2'd2;

  always_ff @(posedge clk4x or negedge rst_n) begin
    if (!rst_n) begin
      sync     <= '0;
      ph       <= '0;
      edge_ph  <= '0;
      bit_hold <= 1'b0;
      dout     <= 1'b0;
      same     <= '0;
      locked   <= 1'b0;
    end else begin
      sync <= {sync[1:0], din};
      ph   <= bc_stb ? 2'd1 : ph + 2'd1;
      if (sync[2] != sync[1]) begin
        // edge between the previous and the current sample
        if (ph == edge_ph) begin
          if (same != LOCK_EDGES[$bits(same)-1:0]) same <= same + 1;
          else                                     locked <= 1'b1;
        end else begin
          same   <= '0;
          locked <= 1'b0;
        end
        edge_ph <= ph;
      end
      if (ph == samp_ph)
        bit_hold <= sync[1];
      if (bc_stb) dout <= bit_hold;
    end
  end

endmodule
