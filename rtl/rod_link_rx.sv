// rod_link_rx: receiver of one DTMROC data link in the ROD.
//
// The link carries one bit per bunch crossing (`bit_en` marks the BCs).  The
// line idles at 0; an event frame starts with a 1, followed by the chip's
// 3-bit L1 counter, its 8-bit BC counter, an error bit and 16 x 27 straw bits,
// MSB first (this design's frame layout).  The receiver shifts the frame in
// and, when complete, moves it to a holding register that the event builder
// reads (`frame_valid`, header fields, `data`) and releases with `frame_pop`.
// While the holding register is full the next frame can still be shifted in;
// a frame completed while the holding register is still full is lost, and
// `overflow` is set (sticky until `clear`).
// Straw s occupies data[DATA_BITS-1-27*s -: 27] (straw 0 is sent first).
module rod_link_rx
  import trt_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  bit_en,
  input  logic                  bit_in,
  input  logic                  frame_pop,
  input  logic                  clear,
  output logic                  frame_valid,
  output logic [L1ID_BITS-1:0]  l1id,
  output logic [BCID_BITS-1:0]  bcid,
  output logic                  chip_err,
  output logic [DATA_BITS-1:0]  data,
  output logic                  overflow
);

  localparam int unsigned BODY = FRAME_BITS - 1;   // bits after the start bit

  logic [BODY-1:0] sr;
  logic [8:0]      cnt;   // body bits still to receive; 0 = waiting for start bit
  logic            done;

  assign done = bit_en && (cnt == 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr          <= '0;
      cnt         <= '0;
      frame_valid <= 1'b0;
      l1id        <= '0;
      bcid        <= '0;
      chip_err    <= 1'b0;
      data        <= '0;
      overflow    <= 1'b0;
    end else begin
      if (clear) begin
        overflow <= 1'b0;
      end
      if (frame_pop) frame_valid <= 1'b0;
      if (bit_en) begin
        if (cnt == 0) begin
          if (bit_in) cnt <= 9'(BODY);
        end else begin
          sr  <= {sr[BODY-2:0], bit_in};
          cnt <= cnt - 1;
        end
      end
      if (done) begin
        if (!frame_valid || frame_pop) begin
          frame_valid <= 1'b1;
          {l1id, bcid, chip_err, data} <= {sr[BODY-2:0], bit_in};
        end else begin
          overflow <= 1'b1;
        end
      end
    end
  end

endmodule
