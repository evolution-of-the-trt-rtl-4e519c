// trt_rod: the TRT ReadOut Driver module.
//
// A ROD reads NGOL x 30 DTMROC links (240 at the default).  The links arrive on
// NGOL optical inputs, each delivering per bunch crossing a 32-bit word with
// one bit of each of 30 links (see pp2_data); the word's parity is checked and
// failures are counted per input in `parity_err`.  Each link bit stream feeds a
// rod_link_rx frame receiver.  The rod_event_builder checks every frame against
// the L1ID/BCID received from the TRT-TTC module over P3, Huffman-compresses
// the straw data and writes complete events to the S-LINK output, copying a
// fraction of them to the VME-readable spy buffer.  Two BUSY signals go back
// to the TTC module: `busy[0]`, buffer control (trigger queue filling or a link
// receiver overflow), and `busy[1]`, the S-LINK full flag.
// The receiver overflow flags are cleared with `clear`.  All logic runs on the
// bunch-crossing clock; `gol_valid` marks the cycles in which the optical
// words carry a new BC.
module trt_rod
  import trt_pkg::*;
#(
  parameter int unsigned NGOL         = 8,
  parameter int unsigned NCODES       = 512,
  parameter int unsigned TRIG_DEPTH   = 16,
  parameter int unsigned SPY_DEPTH    = 4096,
  parameter int unsigned LINK_TIMEOUT = 1024
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [31:0]                       gol_word [NGOL],
  input  logic [NGOL-1:0]                   gol_valid,
  output logic [15:0]                       parity_err [NGOL],
  // P3 from the TTC module
  input  logic                              trig_valid,
  input  trig_info_t                        trig,
  output logic [1:0]                        busy,
  // configuration (VME)
  input  logic [NGOL*LINKS_PER_GOL-1:0]     link_en,
  input  logic [7:0]                        bcid_offset,
  input  logic [$clog2(TRIG_DEPTH+1)-1:0]   busy_thr,
  input  logic                              clear,
  input  logic                              tbl_we,
  input  logic [$clog2(NCODES)-1:0]         tbl_addr,
  input  logic                              tbl_valid,
  input  straw_t                            tbl_pattern,
  input  logic [31:0]                       tbl_code,
  input  logic [5:0]                        tbl_len,
  input  logic                              esc_we,
  input  logic [4:0]                        esc_code,
  input  logic [2:0]                        esc_len,
  // S-LINK
  input  logic                              slink_lff,
  output logic                              slink_valid,
  output logic                              slink_ctrl,
  output logic [31:0]                       slink_data,
  // spy buffer
  input  logic [7:0]                        spy_prescale,
  input  logic                              spy_rd,
  output logic [32:0]                       spy_rdata,
  output logic                              spy_empty,
  output logic [$clog2(SPY_DEPTH+1)-1:0]    spy_level,
  // status
  output logic [NGOL*LINKS_PER_GOL-1:0]     link_ovf,
  output logic [31:0]                       events,
  output logic [31:0]                       sync_errors,
  output logic [31:0]                       escapes,
  output logic                              trig_lost
);

  localparam int unsigned NLINKS = NGOL * LINKS_PER_GOL;

  logic [NLINKS-1:0]          lv, lerr, lpop;
  logic [L1ID_BITS-1:0]       ll1 [NLINKS];
  logic [BCID_BITS-1:0]       lbc [NLINKS];
  logic [DATA_BITS-1:0]       ldat [NLINKS];
  logic                       buf_busy;

  // parity of the optical words
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < NGOL; g++) parity_err[g] <= '0;
    end else begin
      for (int g = 0; g < NGOL; g++)
        if (gol_valid[g] && ^gol_word[g] && parity_err[g] != '1)
          parity_err[g] <= parity_err[g] + 1;
    end
  end

  for (genvar l = 0; l < NLINKS; l++) begin : g_rx
    localparam int unsigned G = l / LINKS_PER_GOL;
    localparam int unsigned B = l % LINKS_PER_GOL;
    rod_link_rx u_rx (
      .clk, .rst_n, .bit_en(gol_valid[G]), .bit_in(gol_word[G][B]),
      .frame_pop(lpop[l]), .clear, .frame_valid(lv[l]), .l1id(ll1[l]),
      .bcid(lbc[l]), .chip_err(lerr[l]), .data(ldat[l]), .overflow(link_ovf[l])
    );
  end

  rod_event_builder #(
    .NLINKS(NLINKS), .NCODES(NCODES), .TRIG_DEPTH(TRIG_DEPTH),
    .SPY_DEPTH(SPY_DEPTH), .LINK_TIMEOUT(LINK_TIMEOUT)
  ) u_eb (
    .clk, .rst_n, .trig_valid, .trig, .link_en, .link_valid(lv),
    .link_l1id(ll1), .link_bcid(lbc), .link_err(lerr), .link_data(ldat),
    .link_ovf, .link_pop(lpop), .bcid_offset,
    .tbl_we, .tbl_addr, .tbl_valid, .tbl_pattern, .tbl_code, .tbl_len,
    .esc_we, .esc_code, .esc_len,
    .slink_lff, .slink_valid, .slink_ctrl, .slink_data,
    .spy_prescale, .spy_rd, .spy_rdata, .spy_empty, .spy_level,
    .busy_thr, .buf_busy, .events, .sync_errors, .escapes, .trig_lost
  );

  assign busy = {slink_lff, buf_busy || (link_ovf != '0)};

endmodule
