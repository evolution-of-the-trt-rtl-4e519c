// spy_fifo: synchronous first-in first-out buffer.
//
// Used in the ROD as the spy buffer, which holds complete built events exactly
// as they leave on the S-LINK so that the crate computer can read them over
// VME for monitoring, and as the queue of trigger information received from
// the TTC module.  DEPTH words of W bits; a write to a full FIFO and a read of
// an empty one are ignored.  `rdata` shows the oldest word whenever `empty` is
// low (first-word fall-through); `rd` removes it.  `level` is the fill count.
module spy_fifo #(
  parameter int unsigned W     = 33,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       wr,
  input  logic [W-1:0]               wdata,
  input  logic                       rd,
  output logic [W-1:0]               rdata,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (level == 0);
  assign full  = (level == ($bits(level))'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else if (clear) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1;
      level <= level + ($bits(level))'(do_wr) - ($bits(level))'(do_rd);
    end
  end

endmodule
