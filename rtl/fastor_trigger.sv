// fastor_trigger: cosmic trigger logic of the TRT-TTC module.
//
// With the front-end chips in Fast OR mode, each TTC link's read-back line
// carries the OR of that front-end group's hits.  This block forms a trigger
// with simple logic: it counts the enabled lines (`line_en`) that are high in
// the current BC and fires `trig` for one cycle when the count reaches
// `threshold` (a multiplicity trigger), then ignores the lines for `holdoff`
// cycles so one cosmic track gives one trigger.  `trig_count` counts triggers.
// The masked lines are also registered and driven to `p2_lines`, for an
// extension module on the P2 connector that builds more elaborate triggers.
// The majority/hold-off form of the "simple on-board logic" is this design's
// choice.  Latency: trig rises one cycle after the lines.
module fastor_trigger #(
  parameter int unsigned NLINKS = 40
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        enable,
  input  logic [NLINKS-1:0]           lines,
  input  logic [NLINKS-1:0]           line_en,
  input  logic [$clog2(NLINKS+1)-1:0] threshold,
  input  logic [7:0]                  holdoff,
  output logic                        trig,
  output logic [15:0]                 trig_count,
  output logic [NLINKS-1:0]           p2_lines
);

  localparam int unsigned CW = $clog2(NLINKS+1);

  logic [CW-1:0] mult;
  logic [7:0]    hold;

  always_comb begin
    mult = '0;
    for (int i = 0; i < NLINKS; i++) mult = mult + CW'(lines[i] & line_en[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig       <= 1'b0;
      trig_count <= '0;
      hold       <= '0;
      p2_lines   <= '0;
    end else begin
      p2_lines <= lines & line_en;
      trig     <= 1'b0;
      if (hold != 0) begin
        hold <= hold - 1;
      end else if (enable && threshold != 0 && mult >= threshold) begin
        trig       <= 1'b1;
        trig_count <= trig_count + 1;
        hold       <= holdoff;
      end
    end
  end

endmodule
