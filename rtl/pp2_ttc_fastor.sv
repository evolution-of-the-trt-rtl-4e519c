// pp2_ttc_fastor: programmable Fast OR of the TTC patch panel.
//
// The TTC patch panel repeats the read-back lines of its NLINKS front-end links
// towards the TRT-TTC module.  When `fastor_mode` is set these lines carry the
// front-end Fast OR signals; the panel then applies the programmable mask
// `line_en` (set over the panel's control interface) so that noisy or unused
// groups are silenced before the TTC module sees them, and also forms
// `fastor_any`, the OR of all enabled lines of the panel.  Outside Fast OR mode
// the read-back lines pass unchanged.  Outputs are registered (one BC of
// latency), standing in for the repeater stage.  The mask-and-OR form of the
// programmable Fast OR is this design's choice.
module pp2_ttc_fastor #(
  parameter int unsigned NLINKS = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fastor_mode,
  input  logic [NLINKS-1:0] line_en,
  input  logic [NLINKS-1:0] rb_in,
  output logic [NLINKS-1:0] rb_out,
  output logic              fastor_any
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb_out     <= '0;
      fastor_any <= 1'b0;
    end else begin
      rb_out     <= fastor_mode ? (rb_in & line_en) : rb_in;
      fastor_any <= fastor_mode && |(rb_in & line_en);
    end
  end

endmodule
