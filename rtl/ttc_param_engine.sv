// ttc_param_engine: front-end parameter memory and access modes of the TRT-TTC
// module.
//
// The board memory holds, for each of the NLINKS TTC links, NPAR parameter
// words; entry i of a link is register (i mod REGS_PER_CHIP) of chip
// (i / REGS_PER_CHIP) on that link.  The memory is written from VME (mem_we).
// Access modes, selected by `mode` and started by `start`:
//   DIRECT  - one register write or read on one link (dir_link, dir_frame),
//             read data returned on dir_rdata; meant for system tests.
//   INIT    - writes entries 0..n_entries-1 to all enabled links at the same
//             time; with `verify` each write is followed by a read-back that is
//             compared with the memory.  Stops when done.
//   POLL    - reads every entry back on all links and compares it with the
//             memory, looping until `stop`; finds registers corrupted by
//             single event upsets.
//   REFRESH - rewrites every entry on all links periodically, looping until
//             `stop`.
// POLL and REFRESH start a frame only inside the beam gap and only if the gap
// has enough crossings left for the frame (and its read-back) to finish, so the
// links stay free for triggers outside the gap.  DIRECT and INIT are not gated.
// Read-back words that differ from the memory, or that do not arrive within
// RB_TIMEOUT cycles, set the link's bit in `err_link` and count in `mismatches`.
// The mode names and their purpose follow the document; the frame sequencing,
// memory organisation and the gap test are this design's choices.
module ttc_param_engine
  import trt_pkg::*;
#(
  parameter int unsigned NLINKS        = 40,
  parameter int unsigned REGS_PER_CHIP = 8,
  parameter int unsigned NPAR          = 128,
  parameter int unsigned RB_TIMEOUT    = 64,
  parameter int unsigned DLY_MAX       = 15
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // VME side
  input  logic                          mem_we,
  input  logic [$clog2(NLINKS)-1:0]     mem_link,
  input  logic [$clog2(NPAR)-1:0]       mem_idx,
  input  logic [PDATA_BITS-1:0]         mem_wdata,
  input  pe_mode_e                      mode,
  input  logic                          start,
  input  logic                          stop,
  input  logic                          verify,
  input  logic [$clog2(NPAR+1)-1:0]     n_entries,
  input  logic [NLINKS-1:0]             link_en,
  input  logic [$clog2(NLINKS)-1:0]     dir_link,
  input  reg_frame_t                    dir_frame,
  output logic [PDATA_BITS-1:0]         dir_rdata,
  input  logic                          err_clear,
  output logic                          busy,
  output logic                          done,        // one-cycle pulse
  output logic [NLINKS-1:0]             err_link,
  output logic [15:0]                   mismatches,
  output logic [15:0]                   passes,      // completed POLL/REFRESH loops
  output logic [15:0]                   gap_waits,   // cycles a gated frame waited for a gap
  // beam gap from the bunch counter
  input  logic                          in_gap,
  input  logic [11:0]                   gap_left,
  // link side
  output logic [NLINKS-1:0]             frame_req,
  output reg_frame_t                    frames [NLINKS],
  input  logic [NLINKS-1:0]             frame_ready,
  input  logic [NLINKS-1:0]             link_busy,
  input  logic [NLINKS-1:0]             rb_valid,
  input  logic [PDATA_BITS-1:0]         rb_data [NLINKS]
);

  localparam int unsigned IW = $clog2(NPAR);
  localparam int unsigned CW = $clog2(NPAR+1);
  localparam int unsigned WR_NEED = WR_FRAME_BITS + DLY_MAX + 2;
  localparam int unsigned RD_NEED = RD_FRAME_BITS + RB_TIMEOUT + 2 * DLY_MAX;

  logic [PDATA_BITS-1:0] mem [NLINKS][NPAR];

  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_TX, S_RB, S_NEXT} state_e;
  state_e    st;
  pe_mode_e  cur;
  logic      op_rd;
  logic [CW-1:0] idx;
  logic [NLINKS-1:0] active, got;
  logic [$clog2(RB_TIMEOUT+1)-1:0] tmo;

  always_ff @(posedge clk) begin
    if (mem_we) mem[mem_link][mem_idx] <= mem_wdata;
  end

  logic gated, gap_ok, all_ready;
  assign gated     = (cur == MODE_POLL) || (cur == MODE_REFRESH);
  assign gap_ok    = !gated || (in_gap && (gap_left >= (op_rd ? 12'(RD_NEED) : 12'(WR_NEED))));
  assign all_ready = &(frame_ready | ~active);
  assign busy      = (st != S_IDLE);

  // frames for every link: same register, link's own memory data
  always_comb begin
    for (int l = 0; l < NLINKS; l++) begin
      if (cur == MODE_DIRECT) begin
        frames[l] = dir_frame;
      end else begin
        frames[l].rw    = op_rd;
        frames[l].chip  = CHIP_BITS'(idx[IW-1:0] / IW'(REGS_PER_CHIP));
        frames[l].regad = REG_BITS'(idx[IW-1:0] % IW'(REGS_PER_CHIP));
        frames[l].data  = mem[l][idx[IW-1:0]];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      cur        <= MODE_IDLE;
      op_rd      <= 1'b0;
      idx        <= '0;
      active     <= '0;
      got        <= '0;
      tmo        <= '0;
      frame_req  <= '0;
      done       <= 1'b0;
      err_link   <= '0;
      mismatches <= '0;
      passes     <= '0;
      gap_waits  <= '0;
      dir_rdata  <= '0;
    end else begin
      done      <= 1'b0;
      frame_req <= '0;
      if (err_clear) begin
        err_link   <= '0;
        mismatches <= '0;
      end
      unique case (st)
        S_IDLE: if (start && mode != MODE_IDLE) begin
          cur <= mode;
          idx <= '0;
          st  <= S_ISSUE;
          if (mode == MODE_DIRECT) begin
            active <= NLINKS'(1) << dir_link;
            op_rd  <= dir_frame.rw;
          end else begin
            active <= link_en;
            op_rd  <= (mode == MODE_POLL);
          end
        end
        S_ISSUE: begin
          if (stop && gated) begin
            st <= S_IDLE;
            done <= 1'b1;
          end else if (all_ready && gap_ok && frame_req == '0) begin
            frame_req <= active;
            got       <= '0;
            st        <= S_TX;
          end else if (!gap_ok) begin
            gap_waits <= gap_waits + 1;
          end
        end
        S_TX: begin
          // wait until every active line has finished sending the frame
          if (frame_req == '0 && (link_busy & active) == '0) begin
            tmo <= '0;
            st  <= op_rd ? S_RB : S_NEXT;
          end
        end
        S_RB: begin
          logic [15:0] bad;
          bad = '0;
          for (int l = 0; l < NLINKS; l++) begin
            if (active[l] && rb_valid[l] && !got[l]) begin
              got[l] <= 1'b1;
              if (cur == MODE_DIRECT) begin
                dir_rdata <= rb_data[l];
              end else if (rb_data[l] != mem[l][idx[IW-1:0]]) begin
                err_link[l] <= 1'b1;
                bad = bad + 1;
              end
            end
          end
          tmo <= tmo + 1;
          if ((got | (rb_valid & active)) == active || tmo == RB_TIMEOUT[$bits(tmo)-1:0]) begin
            st <= S_NEXT;
            // links that never answered
            if (cur != MODE_DIRECT)
              for (int l = 0; l < NLINKS; l++)
                if (active[l] && !got[l] && !rb_valid[l]) begin
                  bad = bad + 1;
                  err_link[l] <= 1'b1;
                end
          end
          if (cur != MODE_DIRECT) mismatches <= mismatches + bad;
        end
        S_NEXT: begin
          if (cur == MODE_DIRECT) begin
            st   <= S_IDLE;
            done <= 1'b1;
          end else if (cur == MODE_INIT && verify && !op_rd) begin
            op_rd <= 1'b1;                 // read back what was just written
            st    <= S_ISSUE;
          end else begin
            op_rd <= (cur == MODE_POLL);
            if (idx + 1 >= n_entries) begin
              idx <= '0;
              if (cur == MODE_INIT) begin
                st   <= S_IDLE;
                done <= 1'b1;
              end else begin
                passes <= passes + 1;
                st     <= S_ISSUE;
              end
            end else begin
              idx <= idx + 1;
              st  <= S_ISSUE;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
