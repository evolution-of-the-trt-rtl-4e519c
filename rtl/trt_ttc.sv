// trt_ttc: the TRT-TTC VME module.
//
// The module sits between the ATLAS TTC system and the TRT front end.  Its
// fast-command source is either the TTCrx receiver (decoded L1A, BCR, ECR and
// trigger type of the optical TTC signal) or, for test beams and system tests,
// the front-panel NIM inputs; optionally the on-board Fast OR cosmic trigger
// also generates L1A.  From these it
//   * keeps the bunch and event counters and the beam-gap window
//     (ttc_bc_counter) and sends each L1A's L1ID/BCID/trigger type, BCR and ECR
//     to the RODs over the P3 backplane (`p3_*`);
//   * drives the command line of each of its NLINKS TTC links (ttc_link_tx),
//     each with its own programmable delay, broadcasting fast commands and
//     carrying the register frames of the parameter engine;
//   * receives the read-back line of each link (ttc_readback_rx) for parameter
//     read-back, or for Fast OR signals when `fastor_mode` is set;
//   * loads, checks and refreshes the front-end parameters (ttc_param_engine);
//   * measures the BUSY signals of the RODs and S-LINKs and forms the combined
//     BUSY (busy_monitor);
//   * forms a cosmic trigger from the Fast OR lines (fastor_trigger) and copies
//     those lines to the P2 connector.
// VME registers are represented by plain input/output ports.  When several
// fast commands arrive in the same BC, L1A goes first, then BCR, then ECR; the
// others are dropped and counted in `fc_collisions` (this design's choice).
// All logic runs on the 40 MHz bunch-crossing clock `clk`.
module trt_ttc
  import trt_pkg::*;
#(
  parameter int unsigned NLINKS        = 40,
  parameter int unsigned NBUSY         = 4,
  parameter int unsigned REGS_PER_CHIP = 8,
  parameter int unsigned NPAR          = 128,
  parameter int unsigned RB_TIMEOUT    = 64,
  parameter int unsigned DLY_MAX       = 15
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // TTCrx outputs
  input  logic                          ttc_l1a,
  input  logic                          ttc_bcr,
  input  logic                          ttc_ecr,
  input  logic [7:0]                    ttc_ttype,
  // front-panel NIM inputs
  input  logic                          nim_sel,
  input  logic                          nim_l1a,
  input  logic                          nim_bcr,
  input  logic                          nim_ecr,
  // front-end links
  output logic [NLINKS-1:0]             cmd_out,
  input  logic [NLINKS-1:0]             rb_in,
  // P3 backplane to the RODs
  output logic                          p3_trig_valid,
  output trig_info_t                    p3_trig,
  output logic                          p3_bcr,
  output logic                          p3_ecr,
  input  logic [NBUSY-1:0]              p3_busy,
  // BUSY to the central trigger, Fast OR lines to P2
  output logic                          busy_out,
  output logic                          fastor_trig,
  output logic [NLINKS-1:0]             p2_lines,
  output logic [15:0]                   fastor_count,
  // configuration (VME registers)
  input  logic [$clog2(DLY_MAX+1)-1:0]  link_delay [NLINKS],
  input  logic [11:0]                   gap_start,
  input  logic [11:0]                   gap_end,
  input  logic                          fastor_mode,
  input  logic                          cosmic_l1a_en,
  input  logic [NLINKS-1:0]             fastor_en,
  input  logic [$clog2(NLINKS+1)-1:0]   fastor_thr,
  input  logic [7:0]                    fastor_holdoff,
  input  logic [NBUSY-1:0]              busy_en,
  input  logic                          busy_clear,
  output logic [31:0]                   busy_time  [NBUSY],
  output logic [15:0]                   busy_count [NBUSY],
  output logic [31:0]                   busy_max   [NBUSY],
  // parameter engine (VME)
  input  logic                          mem_we,
  input  logic [$clog2(NLINKS)-1:0]     mem_link,
  input  logic [$clog2(NPAR)-1:0]       mem_idx,
  input  logic [PDATA_BITS-1:0]         mem_wdata,
  input  pe_mode_e                      pe_mode,
  input  logic                          pe_start,
  input  logic                          pe_stop,
  input  logic                          pe_verify,
  input  logic [$clog2(NPAR+1)-1:0]     pe_n_entries,
  input  logic [NLINKS-1:0]             link_en,
  input  logic [$clog2(NLINKS)-1:0]     dir_link,
  input  reg_frame_t                    dir_frame,
  output logic [PDATA_BITS-1:0]         dir_rdata,
  input  logic                          pe_err_clear,
  output logic                          pe_busy,
  output logic                          pe_done,
  output logic [NLINKS-1:0]             pe_err_link,
  output logic [15:0]                   pe_mismatches,
  output logic [15:0]                   pe_passes,
  output logic [15:0]                   pe_gap_waits,
  // status
  output logic [11:0]                   bcid,
  output logic [23:0]                   evcnt,
  output logic [NLINKS-1:0]             fc_overflow,
  output logic [15:0]                   fc_collisions
);

  // ---- fast command source ----------------------------------------------
  logic l1a, bcr, ecr;
  assign l1a = (nim_sel ? nim_l1a : ttc_l1a) | (cosmic_l1a_en & fastor_trig);
  assign bcr =  nim_sel ? nim_bcr : ttc_bcr;
  assign ecr =  nim_sel ? nim_ecr : ttc_ecr;

  fast_cmd_e fc;
  always_comb begin
    if      (l1a) fc = FC_L1A;
    else if (bcr) fc = FC_BCR;
    else if (ecr) fc = FC_ECR;
    else          fc = FC_NONE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         fc_collisions <= '0;
    else if (32'(l1a) + 32'(bcr) + 32'(ecr) > 1) fc_collisions <= fc_collisions + 1;
  end

  // ---- counters and P3 ---------------------------------------------------------
  logic        in_gap;
  logic [11:0] gap_left;

  ttc_bc_counter u_cnt (
    .clk, .rst_n, .l1a, .bcr, .ecr, .ttype(ttc_ttype),
    .gap_start, .gap_end, .bcid, .evcnt, .in_gap, .gap_left,
    .trig_valid(p3_trig_valid), .trig(p3_trig)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p3_bcr <= 1'b0;
      p3_ecr <= 1'b0;
    end else begin
      p3_bcr <= bcr;
      p3_ecr <= ecr;
    end
  end

  // ---- links -----------------------------------------------------------------
  logic [NLINKS-1:0]     frame_req, frame_ready, link_busy, rb_valid, fo_lines;
  reg_frame_t            frames  [NLINKS];
  logic [PDATA_BITS-1:0] rb_data [NLINKS];

  for (genvar l = 0; l < NLINKS; l++) begin : g_link
    ttc_link_tx #(.DLY_MAX(DLY_MAX)) u_tx (
      .clk, .rst_n, .fc,
      .frame_req(frame_req[l]), .frame(frames[l]), .frame_ready(frame_ready[l]),
      .busy(link_busy[l]), .delay(link_delay[l]), .cmd_out(cmd_out[l]),
      .fc_overflow(fc_overflow[l])
    );
    ttc_readback_rx u_rx (
      .clk, .rst_n, .rb_in(rb_in[l]), .fastor_mode,
      .rb_valid(rb_valid[l]), .rb_data(rb_data[l]), .fastor(fo_lines[l])
    );
  end

  ttc_param_engine #(
    .NLINKS(NLINKS), .REGS_PER_CHIP(REGS_PER_CHIP), .NPAR(NPAR),
    .RB_TIMEOUT(RB_TIMEOUT), .DLY_MAX(DLY_MAX)
  ) u_pe (
    .clk, .rst_n, .mem_we, .mem_link, .mem_idx, .mem_wdata,
    .mode(pe_mode), .start(pe_start), .stop(pe_stop), .verify(pe_verify),
    .n_entries(pe_n_entries), .link_en, .dir_link, .dir_frame, .dir_rdata,
    .err_clear(pe_err_clear), .busy(pe_busy), .done(pe_done),
    .err_link(pe_err_link), .mismatches(pe_mismatches), .passes(pe_passes),
    .gap_waits(pe_gap_waits), .in_gap, .gap_left,
    .frame_req, .frames, .frame_ready, .link_busy, .rb_valid, .rb_data
  );

  // ---- BUSY and Fast OR ----------------------------------------------------------
  busy_monitor #(.NSRC(NBUSY), .CW(32)) u_busy (
    .clk, .rst_n, .busy_in(p3_busy), .src_en(busy_en), .clear(busy_clear),
    .busy_out, .busy_time, .busy_count, .busy_max
  );

  fastor_trigger #(.NLINKS(NLINKS)) u_fo (
    .clk, .rst_n, .enable(fastor_mode), .lines(fo_lines), .line_en(fastor_en),
    .threshold(fastor_thr), .holdoff(fastor_holdoff),
    .trig(fastor_trig), .trig_count(fastor_count), .p2_lines
  );

endmodule
