// ttc_readback_rx: receiver for the parameter read-back line of one TTC link.
//
// A front-end chip answers a register read on the shared read-back line with a
// start bit (1) followed by 32 data bits, MSB first, one bit per BC clock (this
// design's encoding).  The line is first passed through a two-flop synchroniser.
// When the last bit has been shifted in, `rb_valid` pulses for one cycle with
// the word on `rb_data`.  While `fastor_mode` is high the line carries Fast OR
// hit signals instead, so frame reception is suspended and the synchronised
// line is presented on `fastor` for the trigger logic.
// Latency: rb_valid rises 2 + 33 cycles after the start bit enters `rb_in`.
module ttc_readback_rx
  import trt_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rb_in,
  input  logic                  fastor_mode,
  output logic                  rb_valid,
  output logic [PDATA_BITS-1:0] rb_data,
  output logic                  fastor
);

  logic [1:0]            sync;
  logic [PDATA_BITS-1:0] sr;
  logic [5:0]            cnt;      // data bits still expected; 0 = waiting for start

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[0], rb_in};
  end

  assign fastor = fastor_mode & sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr       <= '0;
      cnt      <= '0;
      rb_valid <= 1'b0;
      rb_data  <= '0;
    end else begin
      rb_valid <= 1'b0;
      if (fastor_mode) begin
        cnt <= '0;
      end else if (cnt == 0) begin
        if (sync[1]) cnt <= 6'(PDATA_BITS);
      end else begin
        sr  <= {sr[PDATA_BITS-2:0], sync[1]};
        cnt <= cnt - 1;
        if (cnt == 1) begin
          rb_valid <= 1'b1;
          rb_data  <= {sr[PDATA_BITS-2:0], sync[1]};
        end
      end
    end
  end

endmodule
