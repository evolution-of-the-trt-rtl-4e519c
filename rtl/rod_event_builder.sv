// rod_event_builder: synchronisation check, compression and event building of
// the ROD.
//
// For every L1A the TTC module sends the event's L1ID, BCID and trigger type
// (`trig_valid`/`trig`), which are queued in a TRIG_DEPTH-entry FIFO.  When an
// event is at the head of that queue and every enabled link holds a frame (or
// LINK_TIMEOUT cycles have passed since the first frame of the event arrived),
// the builder writes the event to the S-LINK, one 32-bit word per cycle:
//   header   EVT_HEADER_MARK                      (ctrl = 1)
//            {ttype[7:0], l1id[23:0]}
//            {20'b0, bcid[11:0]}
//   per enabled link l:
//            {4'hB, l[11:0], 11'b0, err[4:0]}      link marker
//            Huffman codes of its 16 straws, packed MSB first into 32-bit
//            words, the last word of the link padded with zeros
//   trailer  {4'hE, 4'b0, nerr[7:0], nwords[15:0]} (ctrl = 1)
// err bits: [0] chip L1 counter != low bits of L1ID, [1] chip BC counter !=
// BCID + bcid_offset (mod 256), [2] chip error bit, [3] no frame (timeout),
// [4] the link receiver has lost a frame (sticky until cleared).  nerr counts links with any
// error, nwords counts all words of the event including header and trailer.
// Synchronisation checking, Huffman compression and the S-LINK/spy outputs
// follow the document; the event format is this design's.
//
// Output: the word is valid when `slink_valid`; the builder stops while the
// S-LINK asserts `slink_lff` (link full).  Every `spy_prescale`-th event (0 =
// none) is also written, with its ctrl bit as bit 32, to the spy FIFO read from
// VME, provided the spy FIFO is empty when the event starts, so that the spy
// buffer only ever holds complete events.
// `buf_busy` is raised while the trigger queue holds `busy_thr` or more events.
module rod_event_builder
  import trt_pkg::*;
#(
  parameter int unsigned NLINKS       = 240,
  parameter int unsigned NCODES       = 512,
  parameter int unsigned TRIG_DEPTH   = 16,
  parameter int unsigned SPY_DEPTH    = 4096,
  parameter int unsigned LINK_TIMEOUT = 1024
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // trigger information from the TTC (P3)
  input  logic                          trig_valid,
  input  trig_info_t                    trig,
  // link receivers
  input  logic [NLINKS-1:0]             link_en,
  input  logic [NLINKS-1:0]             link_valid,
  input  logic [L1ID_BITS-1:0]          link_l1id [NLINKS],
  input  logic [BCID_BITS-1:0]          link_bcid [NLINKS],
  input  logic [NLINKS-1:0]             link_err,
  input  logic [DATA_BITS-1:0]          link_data [NLINKS],
  input  logic [NLINKS-1:0]             link_ovf,
  output logic [NLINKS-1:0]             link_pop,
  input  logic [7:0]                    bcid_offset,
  // Huffman table (VME)
  input  logic                          tbl_we,
  input  logic [$clog2(NCODES)-1:0]     tbl_addr,
  input  logic                          tbl_valid,
  input  straw_t                        tbl_pattern,
  input  logic [31:0]                   tbl_code,
  input  logic [5:0]                    tbl_len,
  input  logic                          esc_we,
  input  logic [4:0]                    esc_code,
  input  logic [2:0]                    esc_len,
  // S-LINK
  input  logic                          slink_lff,
  output logic                          slink_valid,
  output logic                          slink_ctrl,
  output logic [31:0]                   slink_data,
  // spy buffer (VME)
  input  logic [7:0]                    spy_prescale,
  input  logic                          spy_rd,
  output logic [32:0]                   spy_rdata,
  output logic                          spy_empty,
  output logic [$clog2(SPY_DEPTH+1)-1:0] spy_level,
  // status
  input  logic [$clog2(TRIG_DEPTH+1)-1:0] busy_thr,
  output logic                          buf_busy,
  output logic [31:0]                   events,
  output logic [31:0]                   sync_errors,
  output logic [31:0]                   escapes,
  output logic                          trig_lost
);

  localparam int unsigned LW = $clog2(NLINKS + 1);

  // ---- trigger queue ------------------------------------------------------
  logic       tq_empty, tq_full, tq_rd;
  trig_info_t tq_head;
  logic [$clog2(TRIG_DEPTH+1)-1:0] tq_level;

  spy_fifo #(.W($bits(trig_info_t)), .DEPTH(TRIG_DEPTH)) u_tq (
    .clk, .rst_n, .clear(1'b0), .wr(trig_valid), .wdata(trig),
    .rd(tq_rd), .rdata(tq_head), .empty(tq_empty), .full(tq_full), .level(tq_level)
  );

  assign buf_busy = (tq_level >= busy_thr);

  // ---- encoder -------------------------------------------------------------
  logic [LW-1:0] lnk;
  logic [3:0]    straw;
  straw_t        pat;
  logic [31:0]   hcode;
  logic [5:0]    hlen;
  logic          hhit;
  logic [DATA_BITS-1:0] cur_data;

  assign cur_data = (lnk < LW'(NLINKS)) ? link_data[lnk[LW-1:0]] : '0;
  assign pat      = cur_data[DATA_BITS - 1 - STRAW_BITS * straw -: STRAW_BITS];

  huffman_encoder #(.NCODES(NCODES)) u_huff (
    .clk, .rst_n, .tbl_we, .tbl_addr, .tbl_valid, .tbl_pattern, .tbl_code, .tbl_len,
    .esc_we, .esc_code, .esc_len, .pattern(pat), .code(hcode), .len(hlen), .hit(hhit)
  );

  // ---- packer arithmetic -------------------------------------------------
  logic [63:0] acc;        // nb valid bits, right-aligned
  logic [5:0]  nb;         // always < 32 between cycles
  logic [63:0] acc_new;
  logic [6:0]  nb_new;
  assign acc_new = (acc << hlen) | 64'(hcode);
  assign nb_new  = 7'(nb) + 7'(hlen);

  // ---- control ----------------------------------------------------------------
  typedef enum logic [2:0] {S_WAIT, S_HDR0, S_HDR1, S_HDR2, S_LNK, S_DATA, S_FLUSH, S_TRL} state_e;
  state_e st;

  logic [NLINKS-1:0] present;
  logic [$clog2(LINK_TIMEOUT+1)-1:0] tmo;
  logic [15:0] nwords;
  logic [7:0]  nerr;
  logic [7:0]  pres_cnt;
  logic        spy_sel;
  logic        adv;
  logic        emit;
  logic        emit_ctrl;
  logic [31:0] emit_word;
  logic        all_there;
  logic [4:0]  lerr;

  assign adv       = !slink_lff;
  assign all_there = &(link_valid | ~link_en);

  always_comb begin
    lerr = '0;
    if (lnk < LW'(NLINKS)) begin
      if (!present[lnk[LW-1:0]]) begin
        lerr[3] = 1'b1;
      end else begin
        lerr[0] = link_l1id[lnk[LW-1:0]] != tq_head.l1id[L1ID_BITS-1:0];
        lerr[1] = link_bcid[lnk[LW-1:0]] != BCID_BITS'(tq_head.bcid[BCID_BITS-1:0] + 12'(bcid_offset));
        lerr[2] = link_err[lnk[LW-1:0]];
      end
      lerr[4] = link_ovf[lnk[LW-1:0]];
    end
  end

  // word produced this cycle
  always_comb begin
    emit      = 1'b0;
    emit_ctrl = 1'b0;
    emit_word = '0;
    unique case (st)
      S_HDR0: begin emit = 1'b1; emit_ctrl = 1'b1; emit_word = EVT_HEADER_MARK; end
      S_HDR1: begin emit = 1'b1; emit_word = {tq_head.ttype, tq_head.l1id}; end
      S_HDR2: begin emit = 1'b1; emit_word = {20'b0, tq_head.bcid}; end
      S_LNK:  if (lnk < LW'(NLINKS) && link_en[lnk[LW-1:0]]) begin
                emit = 1'b1;
                emit_word = {4'hB, 12'(lnk), 11'b0, lerr};
              end
      S_DATA: if (nb_new >= 7'd32) begin
                emit = 1'b1;
                emit_word = 32'(acc_new >> (nb_new - 7'd32));
              end
      S_FLUSH: if (nb != 0) begin
                emit = 1'b1;
                emit_word = 32'(acc << (6'd32 - nb));
              end
      S_TRL:  begin emit = 1'b1; emit_ctrl = 1'b1; emit_word = {4'hE, 4'h0, nerr, nwords + 16'd1}; end
      default: ;
    endcase
  end

  // ---- spy buffer -------------------------------------------------------------
  logic spy_full_unused;
  spy_fifo #(.W(33), .DEPTH(SPY_DEPTH)) u_spy (
    .clk, .rst_n, .clear(1'b0), .wr(emit && adv && spy_sel), .wdata({emit_ctrl, emit_word}),
    .rd(spy_rd), .rdata(spy_rdata), .empty(spy_empty), .full(spy_full_unused), .level(spy_level)
  );

  assign tq_rd    = (st == S_TRL) && adv;
  assign link_pop = tq_rd ? present : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_WAIT;
      lnk         <= '0;
      straw       <= '0;
      acc         <= '0;
      nb          <= '0;
      present     <= '0;
      tmo         <= '0;
      nwords      <= '0;
      nerr        <= '0;
      pres_cnt    <= '0;
      spy_sel     <= 1'b0;
      slink_valid <= 1'b0;
      slink_ctrl  <= 1'b0;
      slink_data  <= '0;
      events      <= '0;
      sync_errors <= '0;
      escapes     <= '0;
      trig_lost   <= 1'b0;
    end else begin
      slink_valid <= emit && adv;
      if (emit && adv) begin
        slink_ctrl <= emit_ctrl;
        slink_data <= emit_word;
        nwords     <= nwords + 1;
      end
      if (trig_valid && tq_full) trig_lost <= 1'b1;

      if (adv) unique case (st)
        S_WAIT: begin
          nwords <= '0;
          nerr   <= '0;
          if (!tq_empty && ((link_valid & link_en) != '0 || link_en == '0)) begin
            if (all_there || tmo == ($bits(tmo))'(LINK_TIMEOUT)) begin
              present <= link_valid & link_en;
              tmo     <= '0;
              st      <= S_HDR0;
              // choose whether this event goes to the spy buffer
              if (spy_prescale != 0 && pres_cnt + 1 >= spy_prescale) begin
                pres_cnt <= '0;
                spy_sel  <= spy_empty;
              end else begin
                pres_cnt <= pres_cnt + 1;
                spy_sel  <= 1'b0;
              end
            end else begin
              tmo <= tmo + 1;
            end
          end
        end
        S_HDR0: st <= S_HDR1;
        S_HDR1: st <= S_HDR2;
        S_HDR2: begin
          lnk <= '0;
          st  <= S_LNK;
        end
        S_LNK: begin
          if (lnk >= LW'(NLINKS)) begin
            st <= S_TRL;
          end else if (!link_en[lnk[LW-1:0]]) begin
            lnk <= lnk + 1;
          end else begin
            if (lerr != 0) begin
              nerr <= nerr + 1;
              if (lerr[1:0] != 0) sync_errors <= sync_errors + 1;
            end
            straw <= '0;
            acc   <= '0;
            nb    <= '0;
            if (present[lnk[LW-1:0]]) st <= S_DATA;
            else                      lnk <= lnk + 1;
          end
        end
        S_DATA: begin
          if (!hhit) escapes <= escapes + 1;
          if (nb_new >= 7'd32) begin
            acc <= acc_new & ((64'd1 << (nb_new - 7'd32)) - 64'd1);
            nb  <= 6'(nb_new - 7'd32);
          end else begin
            acc <= acc_new;
            nb  <= 6'(nb_new);
          end
          straw <= straw + 1;
          if (straw == 4'(STRAWS_PER_CHIP - 1)) st <= S_FLUSH;
        end
        S_FLUSH: begin
          acc <= '0;
          nb  <= '0;
          lnk <= lnk + 1;
          st  <= S_LNK;
        end
        S_TRL: begin
          events   <= events + 1;
          spy_sel  <= 1'b0;
          st       <= S_WAIT;
        end
        default: st <= S_WAIT;
      endcase
    end
  end

endmodule
