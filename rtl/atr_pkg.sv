// atr_pkg: constants and types shared by the infrared target-recognition
// accelerator. Round 0 tests every pixel of an image strip against one
// template pair of 30 background and 30 target points; pixels are kept with
// five bits, test-point locations are 16-bit SRAM address offsets, and the
// ROI decision uses integer forms of the correlation threshold 0.65 = 13/20.
// Round 1 uses 4-bit points and the threshold 0.45^2 = 81/400.
// The host reaches every chip through a small request/acknowledge register
// bus (hbus_req_t / hbus_rsp_t); its register map is this design's own, the
// board's host bus timing is not modelled.
// Some constants (sizes of the Round 1 word, the broadcast code) are used
// only by some modules and testbenches, so a lone module may report them as
// unused parameters.
package atr_pkg;

  // ---------------- Round 0 sizes ----------------
  localparam int unsigned PIX_W      = 5;    // bits kept per pixel
  localparam int unsigned NPTS       = 30;   // points per template
  localparam int unsigned NTP        = 2 * NPTS;  // points per template pair
  localparam int unsigned ADDR_W     = 16;   // SRAM word address
  localparam int unsigned DATA_W     = 16;   // SRAM word (two bytes)
  localparam int unsigned SUM_W      = 10;   // SUM of 30 five-bit pixels <= 930
  localparam int unsigned T30_W      = 16;   // Hot30/Cold30 and their sums (<= 55800)

  // ---------------- Round 1 sizes ----------------
  localparam int unsigned R1_PT_W    = 4;    // bits per test point
  localparam int unsigned R1_PAIRS   = 40;   // point pairs per template
  localparam int unsigned R1_LAT     = 5;    // cycles from last pair to result

  // ---------------- host register bus ----------------
  localparam int unsigned HB_REG_W   = 4;    // register select within a chip
  localparam int unsigned HB_CHIP_W  = 4;    // chip select on the board bus
  localparam logic [HB_CHIP_W-1:0] HB_BROADCAST = '1;  // all Round 0 chips

  typedef struct packed {
    logic                req;    // access requested, held until ack
    logic                we;     // 1 = write, 0 = read
    logic [HB_REG_W-1:0] addr;   // register within the chip
    logic [15:0]         wdata;
  } hbus_req_t;

  typedef struct packed {
    logic        ack;            // one-cycle acknowledge, rdata valid with it
    logic [15:0] rdata;
  } hbus_rsp_t;

  // Round 0 chip register map
  typedef enum logic [HB_REG_W-1:0] {
    R0_CMD       = 4'd0,   // W: bit0 start, bit1 clear test points, bit2 ack irq
    R0_STATUS    = 4'd1,   // R: bit0 busy, bit1 irq, bits 15:8 test points held
    R0_IMG_ADDR  = 4'd2,   // W: first SRAM word of the next image load
    R0_IMG_DATA  = 4'd3,   // W: next 8-bit pixel of the image stream
    R0_TP_DATA   = 4'd4,   // W: push one test-point offset
    R0_BASE      = 4'd5,   // W/R: address of the first pixel of the area
    R0_DX        = 4'd6,   // W/R: pixels per row of the area
    R0_DY        = 4'd7,   // W/R: rows of the area
    R0_ROI_BASE  = 4'd8,   // W/R: SRAM word where the ROI list starts
    R0_ROI_COUNT = 4'd9,   // R: number of ROI locations written
    R0_RD_ADDR   = 4'd10,  // W: SRAM word for host read-back
    R0_RD_DATA   = 4'd11   // R: SRAM word at RD_ADDR, then RD_ADDR+1
  } r0_reg_e;

  // Round 1 chip register map
  typedef enum logic [HB_REG_W-1:0] {
    R1_CMD       = 4'd0,   // W: bit0 clear the accumulators for a new template
    R1_PAIRS_IN  = 4'd1,   // W: {P_sumP, Q_sumP, P_sumM, Q_sumM}, 4 bits each
    R1_RESULT    = 4'd2,   // R: bit0 result valid, bit1 pass to Round 2
    R1_DBG_SUMP  = 4'd3,   // R: SumP (debug read-back)
    R1_DBG_SUMM  = 4'd4,   // R: SumM
    R1_DBG_SSUM  = 4'd5    // R: SSum
  } r1_reg_e;

  // ---------------- SRAM port ----------------
  typedef struct packed {
    logic              en;     // access this cycle
    logic              we;     // write
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } sram_req_t;

  // One template-pair result set from a TEMPERATURE unit
  typedef struct packed {
    logic [T30_W-1:0] bkg_hot;
    logic [T30_W-1:0] bkg_cold;
    logic [T30_W-1:0] trg_hot;
    logic [T30_W-1:0] trg_cold;
  } temp_t;

  // CONVERT result: numerators and denominators of the two correlations
  typedef struct packed {
    logic [T30_W-1:0] hot_n;
    logic [T30_W-1:0] hot_d;
    logic [T30_W-1:0] cold_n;
    logic [T30_W-1:0] cold_d;
  } conv_t;

endpackage
