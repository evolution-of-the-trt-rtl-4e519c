// trt_pkg: constants and types shared by the TRT back-end modules.
//
// Front end: a DTMROC serves 16 straws and reads out 27 bits per straw for each
// triggered event; it sends the event on one 40 Mbit/s serial link.  The frame
// layout on that link (start bit, 3-bit L1 counter, 8-bit BC counter, error bit,
// then 16 x 27 straw bits) and the command-line encoding of the TTC links are
// this design's choices; the channel count and the 27 bits per straw follow the
// front-end description.
package trt_pkg;

  // ---- front-end data ----------------------------------------------------
  localparam int unsigned STRAWS_PER_CHIP = 16;
  localparam int unsigned STRAW_BITS      = 27;
  localparam int unsigned L1ID_BITS       = 3;   // L1 counter sent by the chip
  localparam int unsigned BCID_BITS       = 8;   // BC counter sent by the chip
  localparam int unsigned HDR_BITS        = 1 + L1ID_BITS + BCID_BITS + 1;
  localparam int unsigned DATA_BITS       = STRAWS_PER_CHIP * STRAW_BITS;   // 432
  localparam int unsigned FRAME_BITS      = HDR_BITS + DATA_BITS;          // 445 incl. start bit

  typedef logic [STRAW_BITS-1:0] straw_t;

  // ---- LHC machine -------------------------------------------------------
  localparam int unsigned BC_PER_ORBIT = 3564;

  // ---- TTC command line (one per TTC link, MSB first) --------------------
  // fast commands are prefix-free:  L1A = 110, BCR = 1010, ECR = 1011
  // register frame:                 111 rw chip[3:0] reg[3:0] [data[31:0] if write]
  localparam int unsigned CHIP_BITS  = 4;
  localparam int unsigned REG_BITS   = 4;
  localparam int unsigned PDATA_BITS = 32;
  localparam int unsigned RD_FRAME_BITS = 3 + 1 + CHIP_BITS + REG_BITS;     // 12
  localparam int unsigned WR_FRAME_BITS = RD_FRAME_BITS + PDATA_BITS;      // 44
  // read-back line: start bit 1 then 32 data bits, MSB first
  localparam int unsigned RB_FRAME_BITS = 1 + PDATA_BITS;

  typedef enum logic [1:0] {
    FC_NONE = 2'd0,
    FC_L1A  = 2'd1,
    FC_BCR  = 2'd2,
    FC_ECR  = 2'd3
  } fast_cmd_e;

  typedef struct packed {
    logic                  rw;      // 1 = read
    logic [CHIP_BITS-1:0]  chip;
    logic [REG_BITS-1:0]   regad;
    logic [PDATA_BITS-1:0] data;
  } reg_frame_t;

  // ---- parameter engine modes ---------------------------------------------
  typedef enum logic [2:0] {
    MODE_IDLE    = 3'd0,
    MODE_DIRECT  = 3'd1,
    MODE_INIT    = 3'd2,
    MODE_POLL    = 3'd3,
    MODE_REFRESH = 3'd4
  } pe_mode_e;

  // ---- ROD output ------------------------------------------------------------
  localparam logic [31:0] EVT_HEADER_MARK  = 32'hEE12_34EE;
  localparam logic [31:0] LINK_MARK_PREFIX = 32'hB000_0000;   // | link[15:0] | err[11:0]

  // trigger information passed from the TTC to the RODs over the P3 backplane
  typedef struct packed {
    logic [23:0] l1id;
    logic [11:0] bcid;
    logic [7:0]  ttype;
  } trig_info_t;

  // GOL transport word: 30 link bits, one per 25 ns, plus a frame marker bit
  localparam int unsigned LINKS_PER_GOL = 30;

endpackage
