// readout_pkg: types and constants shared by the GERI / GBTxEMU readout-chain RTL.
//
// Holds the Wishbone request/response structs used by the register banks, the layout of the
// 80-bit GBT downlink data field (time counter in bits [79:24]), the time-marker record written
// to the marker FIFO, and the magic words that open and close a time-slice packet.
// The ID/VER register values and the header/trailer magic words are the values seen on the
// real boards; the Wishbone width, the register map and the time counter width are choices of
// this design.
package readout_pkg;

  // ---------------------------------------------------------------- GBT frame layout
  localparam int unsigned FRAME_W  = 80;   // GBT data field carried per 40 MHz frame
  localparam int unsigned TIME_LSB = 24;   // time counter occupies frame[79:24]
  localparam int unsigned TIME_W   = FRAME_W - TIME_LSB;  // 56-bit time counter

  // ---------------------------------------------------------------- time-marker receiver
  localparam int unsigned SAMPLES_PER_SUB   = 8;   // 960 MHz samples per 120 MHz cycle
  localparam int unsigned SUBS_PER_FRAME    = 3;   // 120 MHz cycles per 40 MHz frame
  localparam int unsigned SAMPLES_PER_FRAME = SAMPLES_PER_SUB * SUBS_PER_FRAME;  // 24
  localparam int unsigned PHASE_W = 5;             // holds 0..23

  typedef struct packed {
    logic [PHASE_W-1:0] phase;   // marker centre, in 1/24 of the frame period after the ref edge
    logic [TIME_W-1:0]  time_v;  // received time counter when the marker was measured
  } marker_rec_t;

  localparam int unsigned MARKER_REC_W = $bits(marker_rec_t);  // 61

  // ---------------------------------------------------------------- Wishbone (classic, 32-bit)
  localparam int unsigned WB_ADR_W = 8;   // word address
  localparam int unsigned WB_DAT_W = 32;

  typedef struct packed {
    logic                cyc;
    logic                stb;
    logic                we;
    logic [WB_ADR_W-1:0] adr;
    logic [WB_DAT_W-1:0] dat;
  } wb_req_t;

  typedef struct packed {
    logic                ack;
    logic [WB_DAT_W-1:0] dat;
  } wb_rsp_t;

  // Register map (word addresses)
  typedef enum logic [WB_ADR_W-1:0] {
    REG_ID      = 8'h00,   // RO  firmware ID
    REG_VER     = 8'h01,   // RO  firmware version
    REG_CTRL    = 8'h02,   // RW  [0] run
    REG_STATUS  = 8'h03,   // RO  [0] fifo empty, [1] fifo full, [15:8] fifo count, [31:16] overflows
    REG_MARK_HI = 8'h04,   // RO  {3'b0, phase[4:0], time[55:32]} of the FIFO head
    REG_MARK_LO = 8'h05    // RO  time[31:0] of the FIFO head; reading it pops the FIFO
  } wb_reg_e;

  localparam logic [31:0] FW_ID       = 32'h1ed9_1fca;
  localparam logic [31:0] GERI_VER    = 32'hadd1_5038;
  localparam logic [31:0] GBTXEMU_VER = 32'h52c6_231d;

  // ---------------------------------------------------------------- time-slice packets
  localparam logic [31:0] HDR_MAGIC = 32'h579a_cce7;
  localparam logic [31:0] TRL_MAGIC = 32'hed9a_cce7;

endpackage
