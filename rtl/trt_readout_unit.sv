// trt_readout_unit: the basic readout unit of the TRT back end.
//
// One TRT-TTC module and two RODs, connected over the P3 backplane, together
// with the patch panels (PP2) that feed them:
//   * trt_ttc drives NLINKS_TTC = 40 TTC links; their read-back lines pass
//     through two TTC patch panels of 20 links (pp2_ttc_fastor) on the way in;
//   * each ROD (trt_rod) reads 240 DTMROC data links, which arrive through two
//     data patch panels (pp2_data, 120 links each, four optical outputs of 30
//     links);
//   * the TTC module sends trigger information (L1ID, BCID, trigger type) to
//     both RODs and monitors their two BUSY signals each.
// The optical links between the data panels and the RODs (serialiser, fibre
// and deserialiser) are outside this design: the panels' 32-bit words leave
// on `pp2_gol_word` and the RODs take theirs on `rod_gol_word`, so that a link
// model or real transceivers can sit between them.  The front-end chips are
// likewise outside: `fe_cmd` goes to them, `fe_rb` and `fe_data` come back.
// Clocks: `clk` is the 40 MHz bunch-crossing clock, `clk4x` the panels'
// 160 MHz oversampling clock, phase-locked to it, with `bc_stb` high in the one
// clk4x cycle of four that precedes a clk edge.
module trt_readout_unit
  import trt_pkg::*;
#(
  parameter int unsigned NLINKS_TTC = 40,
  parameter int unsigned NROD       = 2,
  parameter int unsigned NGOL       = 8,       // optical inputs per ROD
  parameter int unsigned NCODES     = 512,
  parameter int unsigned NPAR       = 128,
  parameter int unsigned SPY_DEPTH  = 4096
) (
  input  logic                          clk,
  input  logic                          clk4x,
  input  logic                          bc_stb,
  input  logic                          rst_n,
  // TTCrx and NIM
  input  logic                          ttc_l1a,
  input  logic                          ttc_bcr,
  input  logic                          ttc_ecr,
  input  logic [7:0]                    ttc_ttype,
  input  logic                          nim_sel,
  input  logic                          nim_l1a,
  input  logic                          nim_bcr,
  input  logic                          nim_ecr,
  // front end
  output logic [NLINKS_TTC-1:0]         fe_cmd,
  input  logic [NLINKS_TTC-1:0]         fe_rb,
  input  logic [NROD*NGOL*LINKS_PER_GOL-1:0] fe_data,
  // optical links PP2 -> ROD
  output logic [31:0]                   pp2_gol_word [NROD*NGOL],
  output logic [NROD*NGOL-1:0]          pp2_gol_valid,
  input  logic [31:0]                   rod_gol_word [NROD*NGOL],
  input  logic [NROD*NGOL-1:0]          rod_gol_valid,
  // S-LINK outputs
  input  logic [NROD-1:0]               slink_lff,
  output logic [NROD-1:0]               slink_valid,
  output logic [NROD-1:0]               slink_ctrl,
  output logic [31:0]                   slink_data [NROD],
  // central trigger
  output logic                          p3_bcr,
  output logic                          p3_ecr,
  output logic                          busy_out,
  output logic                          fastor_trig,
  output logic [NLINKS_TTC-1:0]         p2_lines,
  output logic [NLINKS_TTC/20-1:0]      pp2_fastor_any,
  // TTC configuration and status (VME)
  input  logic [3:0]                    link_delay [NLINKS_TTC],
  input  logic [11:0]                   gap_start,
  input  logic [11:0]                   gap_end,
  input  logic                          fastor_mode,
  input  logic                          cosmic_l1a_en,
  input  logic [NLINKS_TTC-1:0]         fastor_en,
  input  logic [NLINKS_TTC-1:0]         pp2_fastor_en,
  input  logic [$clog2(NLINKS_TTC+1)-1:0] fastor_thr,
  input  logic [7:0]                    fastor_holdoff,
  output logic [15:0]                   fastor_count,
  input  logic [2*NROD-1:0]             busy_en,
  input  logic                          busy_clear,
  output logic [31:0]                   busy_time  [2*NROD],
  output logic [15:0]                   busy_count [2*NROD],
  output logic [31:0]                   busy_max   [2*NROD],
  input  logic                          mem_we,
  input  logic [$clog2(NLINKS_TTC)-1:0] mem_link,
  input  logic [$clog2(NPAR)-1:0]       mem_idx,
  input  logic [31:0]                   mem_wdata,
  input  pe_mode_e                      pe_mode,
  input  logic                          pe_start,
  input  logic                          pe_stop,
  input  logic                          pe_verify,
  input  logic [$clog2(NPAR+1)-1:0]     pe_n_entries,
  input  logic [NLINKS_TTC-1:0]         pe_link_en,
  input  logic [$clog2(NLINKS_TTC)-1:0] dir_link,
  input  reg_frame_t                    dir_frame,
  output logic [31:0]                   dir_rdata,
  input  logic                          pe_err_clear,
  output logic                          pe_busy,
  output logic                          pe_done,
  output logic [NLINKS_TTC-1:0]         pe_err_link,
  output logic [15:0]                   pe_mismatches,
  output logic [15:0]                   pe_passes,
  output logic [15:0]                   pe_gap_waits,
  output logic [11:0]                   bcid,
  output logic [23:0]                   evcnt,
  output logic [NLINKS_TTC-1:0]         fc_overflow,
  output logic [15:0]                   fc_collisions,
  // ROD configuration and status (VME)
  input  logic [NGOL*LINKS_PER_GOL-1:0] rod_link_en [NROD],
  input  logic [7:0]                    bcid_offset,
  input  logic [4:0]                    busy_thr,
  input  logic                          rod_clear,
  input  logic [NROD-1:0]               tbl_we,
  input  logic [$clog2(NCODES)-1:0]     tbl_addr,
  input  logic                          tbl_valid,
  input  straw_t                        tbl_pattern,
  input  logic [31:0]                   tbl_code,
  input  logic [5:0]                    tbl_len,
  input  logic [NROD-1:0]               esc_we,
  input  logic [4:0]                    esc_code,
  input  logic [2:0]                    esc_len,
  input  logic [7:0]                    spy_prescale,
  input  logic [NROD-1:0]               spy_rd,
  output logic [32:0]                   spy_rdata [NROD],
  output logic [NROD-1:0]               spy_empty,
  output logic [$clog2(SPY_DEPTH+1)-1:0] spy_level [NROD],
  output logic [NROD-1:0]               trig_lost,
  output logic [31:0]                   rod_events [NROD],
  output logic [31:0]                   rod_sync_errors [NROD],
  output logic [31:0]                   rod_escapes [NROD],
  output logic [15:0]                   rod_parity_err [NROD*NGOL],
  output logic [NROD*NGOL*LINKS_PER_GOL-1:0] rod_link_ovf,
  output logic [NROD*NGOL*LINKS_PER_GOL-1:0] pp2_locked
);

  localparam int unsigned NPP2_TTC  = NLINKS_TTC / 20;
  localparam int unsigned NPP2_DATA = NROD * NGOL / 4;

  // ---- TTC patch panels ----------------------------------------------------
  logic [NLINKS_TTC-1:0] ttc_rb;
  for (genvar p = 0; p < NPP2_TTC; p++) begin : g_pp2t
    pp2_ttc_fastor #(.NLINKS(20)) u_pp2t (
      .clk, .rst_n, .fastor_mode, .line_en(pp2_fastor_en[p*20 +: 20]),
      .rb_in(fe_rb[p*20 +: 20]), .rb_out(ttc_rb[p*20 +: 20]),
      .fastor_any(pp2_fastor_any[p])
    );
  end

  // ---- TTC module ------------------------------------------------------------------
  logic          p3_trig_valid;
  trig_info_t    p3_trig;
  logic [2*NROD-1:0] p3_busy;

  trt_ttc #(.NLINKS(NLINKS_TTC), .NBUSY(2*NROD), .NPAR(NPAR)) u_ttc (
    .clk, .rst_n, .ttc_l1a, .ttc_bcr, .ttc_ecr, .ttc_ttype,
    .nim_sel, .nim_l1a, .nim_bcr, .nim_ecr,
    .cmd_out(fe_cmd), .rb_in(ttc_rb),
    .p3_trig_valid, .p3_trig, .p3_bcr, .p3_ecr, .p3_busy,
    .busy_out, .fastor_trig, .p2_lines, .fastor_count,
    .link_delay, .gap_start, .gap_end, .fastor_mode, .cosmic_l1a_en,
    .fastor_en, .fastor_thr, .fastor_holdoff, .busy_en, .busy_clear,
    .busy_time, .busy_count, .busy_max,
    .mem_we, .mem_link, .mem_idx, .mem_wdata, .pe_mode, .pe_start, .pe_stop,
    .pe_verify, .pe_n_entries, .link_en(pe_link_en), .dir_link, .dir_frame,
    .dir_rdata, .pe_err_clear, .pe_busy, .pe_done, .pe_err_link,
    .pe_mismatches, .pe_passes, .pe_gap_waits, .bcid, .evcnt, .fc_overflow,
    .fc_collisions
  );

  // ---- data patch panels -----------------------------------------------------------
  for (genvar p = 0; p < NPP2_DATA; p++) begin : g_pp2d
    logic [31:0] w [4];
    pp2_data #(.NGROUPS(4)) u_pp2d (
      .clk4x, .rst_n, .bc_stb, .din(fe_data[p*120 +: 120]),
      .gol_word(w), .gol_valid(pp2_gol_valid[p*4 +: 4]), .locked(pp2_locked[p*120 +: 120])
    );
    for (genvar g = 0; g < 4; g++) begin : g_w
      assign pp2_gol_word[p*4+g] = w[g];
    end
  end

  // ---- RODs ------------------------------------------------------------------------
  for (genvar r = 0; r < NROD; r++) begin : g_rod
    logic [31:0] gw [NGOL];
    logic [15:0] pe [NGOL];
    for (genvar g = 0; g < NGOL; g++) begin : g_in
      assign gw[g] = rod_gol_word[r*NGOL+g];
      assign rod_parity_err[r*NGOL+g] = pe[g];
    end
    trt_rod #(.NGOL(NGOL), .NCODES(NCODES), .SPY_DEPTH(SPY_DEPTH)) u_rod (
      .clk, .rst_n, .gol_word(gw), .gol_valid(rod_gol_valid[r*NGOL +: NGOL]),
      .parity_err(pe), .trig_valid(p3_trig_valid), .trig(p3_trig),
      .busy(p3_busy[2*r +: 2]), .link_en(rod_link_en[r]), .bcid_offset,
      .busy_thr, .clear(rod_clear),
      .tbl_we(tbl_we[r]), .tbl_addr, .tbl_valid, .tbl_pattern, .tbl_code, .tbl_len,
      .esc_we(esc_we[r]), .esc_code, .esc_len,
      .slink_lff(slink_lff[r]), .slink_valid(slink_valid[r]),
      .slink_ctrl(slink_ctrl[r]), .slink_data(slink_data[r]),
      .spy_prescale, .spy_rd(spy_rd[r]), .spy_rdata(spy_rdata[r]),
      .spy_empty(spy_empty[r]), .spy_level(spy_level[r]),
      .link_ovf(rod_link_ovf[r*NGOL*LINKS_PER_GOL +: NGOL*LINKS_PER_GOL]),
      .events(rod_events[r]), .sync_errors(rod_sync_errors[r]),
      .escapes(rod_escapes[r]), .trig_lost(trig_lost[r])
    );
  end

endmodule
