// pp2_data: data patch panel board.
//
// The panel receives NGROUPS x 30 serial data links at 40 Mbit/s from the
// DTMROC chips.  Every link is phase aligned to the panel's bunch-crossing
// clock (pp2_phase_align, running on the 4x clock `clk4x` with the BC strobe
// `bc_stb`), and the 30 links of a group are combined, one bit of each link per
// BC, into the 32-bit word that a 1.6 Gbit/s serialiser sends over one optical
// fibre to the ROD.  Word layout (this design's choice):
//   [29:0]  bit of link 0..29 of the group for this BC
//   [30]    all 30 links of the group locked
//   [31]    even parity over bits [30:0]
// `gol_word` and `gol_valid` change on the clk4x edge at which bc_stb is high,
// one word per BC.  Group size 30, 120 links per board and the 1.6 Gbit/s line
// rate follow the document; 32 bits x 40 MHz, 8b/10b coded, gives that rate.
module pp2_data
  import trt_pkg::*;
#(
  parameter int unsigned NGROUPS = 4
) (
  input  logic                               clk4x,
  input  logic                               rst_n,
  input  logic                               bc_stb,
  input  logic [NGROUPS*LINKS_PER_GOL-1:0]   din,
  output logic [31:0]                        gol_word  [NGROUPS],
  output logic [NGROUPS-1:0]                 gol_valid,
  output logic [NGROUPS*LINKS_PER_GOL-1:0]   locked
);

  logic [NGROUPS*LINKS_PER_GOL-1:0] bits;

  for (genvar i = 0; i < NGROUPS * LINKS_PER_GOL; i++) begin : g_al
    pp2_phase_align u_al (
      .clk4x, .rst_n, .bc_stb, .din(din[i]), .dout(bits[i]), .locked(locked[i])
    );
  end

  // the aligners update their outputs at bc_stb; pack them one clk4x later
  logic stb_d;
  always_ff @(posedge clk4x or negedge rst_n) begin
    if (!rst_n) begin
      stb_d     <= 1'b0;
      gol_valid <= '0;
      for (int g = 0; g < NGROUPS; g++) gol_word[g] <= '0;
    end else begin
      stb_d <= bc_stb;
      for (int g = 0; g < NGROUPS; g++) begin
        logic [30:0] w;
        w = {&locked[g*LINKS_PER_GOL +: LINKS_PER_GOL], bits[g*LINKS_PER_GOL +: LINKS_PER_GOL]};
        if (stb_d) gol_word[g] <= {^w, w};
        gol_valid[g] <= stb_d;
      end
    end
  end

endmodule
