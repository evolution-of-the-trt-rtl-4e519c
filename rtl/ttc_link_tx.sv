// ttc_link_tx: command serialiser for one TTC link of the TRT-TTC module.
//
// Each TTC link carries, on one line clocked by the bunch-crossing clock, the
// fast commands that every front-end chip must see (L1A, BCR, ECR) and the
// register frames used to load and read back front-end parameters.  Fast
// commands are broadcast to all links; register frames are per link.
//
// Encoding (MSB first, idle line = 0; this design's choice):
//   L1A = 110, BCR = 1010, ECR = 1011,
//   register frame = 111, rw, chip[3:0], reg[3:0], then data[31:0] for a write.
// A fast command never waits for a register frame to be requested, but one that
// arrives while the line is busy is held in a 4-entry queue and sent as soon as
// the line is free; `fc_overflow` flags a lost command.  A register frame is
// accepted (`frame_req` and `frame_ready` high in the same cycle) only when the
// line and the queue are empty and no fast command arrives in that cycle.
//
// The finished line goes through a programmable delay of `delay` BC periods
// (0..DLY_MAX); the document requires an adjustable delay on every line to the
// front end, the step of one BC is this design's choice.
module ttc_link_tx
  import trt_pkg::*;
#(
  parameter int unsigned DLY_MAX = 15
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  fast_cmd_e                      fc,            // broadcast fast command, one cycle
  input  logic                           frame_req,
  input  reg_frame_t                     frame,
  output logic                           frame_ready,
  output logic                           busy,          // a command is on the line
  input  logic [$clog2(DLY_MAX+1)-1:0]   delay,
  output logic                           cmd_out,
  output logic                           fc_overflow
);

  localparam int unsigned SR_W = WR_FRAME_BITS;

  logic [SR_W-1:0]  sr;
  logic [5:0]       cnt;           // bits still to send
  fast_cmd_e        q [4];
  logic [2:0]       q_n;
  logic             line;

  function automatic logic [3:0] fc_code(fast_cmd_e c);
    unique case (c)
      FC_L1A:  fc_code = 4'b1100;
      FC_BCR:  fc_code = 4'b1010;
      FC_ECR:  fc_code = 4'b1011;
      default: fc_code = 4'b0000;
    endcase
  endfunction

  function automatic logic [5:0] fc_len(fast_cmd_e c);
    return (c == FC_L1A) ? 6'd3 : 6'd4;
  endfunction

  assign busy        = (cnt != 0);
  assign frame_ready = (cnt == 0) && (q_n == 0) && (fc == FC_NONE);

  logic free, pop_q, take_direct, push;
  assign free        = (cnt <= 1);
  assign pop_q       = free && (q_n != 0);
  assign take_direct = free && (q_n == 0) && (fc != FC_NONE);
  assign push        = (fc != FC_NONE) && !take_direct;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr          <= '0;
      cnt         <= '0;
      q_n         <= '0;
      fc_overflow <= 1'b0;
      for (int i = 0; i < 4; i++) q[i] <= FC_NONE;
    end else begin
      // queue: pop the head when the line frees, push a fast command that
      // cannot go out directly
      if (pop_q)
        for (int i = 0; i < 3; i++) q[i] <= q[i+1];
      if (push) begin
        if (q_n - 3'(pop_q) < 4) q[2'(q_n - 3'(pop_q))] <= fc;
        else                     fc_overflow <= 1'b1;
      end
      q_n <= q_n - 3'(pop_q) + 3'(push && (q_n - 3'(pop_q) < 4));

      if (!free) begin
        sr  <= {sr[SR_W-2:0], 1'b0};
        cnt <= cnt - 1;
      end else if (pop_q) begin
        sr  <= {fc_code(q[0]), {(SR_W-4){1'b0}}};
        cnt <= fc_len(q[0]);
      end else if (take_direct) begin
        sr  <= {fc_code(fc), {(SR_W-4){1'b0}}};
        cnt <= fc_len(fc);
      end else if (frame_req && cnt == 0) begin
        sr  <= {3'b111, frame.rw, frame.chip, frame.regad, frame.data};
        cnt <= frame.rw ? 6'(RD_FRAME_BITS) : 6'(WR_FRAME_BITS);
      end else begin
        sr  <= '0;
        cnt <= '0;
      end
    end
  end

  // current bit: MSB of the shift register while a command is on the line
  assign line = (cnt != 0) ? sr[SR_W-1] : 1'b0;

  // programmable delay line in BC steps
  logic [DLY_MAX:0] dl;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dl <= '0;
    else        dl <= {dl[DLY_MAX-1:0], line};
  end
  assign cmd_out = (delay == 0) ? line : dl[delay-1];

endmodule
