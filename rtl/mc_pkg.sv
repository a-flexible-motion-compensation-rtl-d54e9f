// mc_pkg: types and constants shared by the motion compensation engine and its
// SDRAM frame memory access controller.
// Motion vectors are 10-bit two's complement per component, in quarter-pel
// (H.264 luma) or half-pel (MPEG-2) units, matching a 120 x 10-bit line MV
// store and the [-128, +127.75] search range. The SDRAM geometry is the
// 512K x 32 x 4-bank part (2048 rows x 256 columns per bank); one 32-bit
// word holds four vertically adjacent pixels. Timing defaults are for a
// 100 MHz clock with CAS latency 2 and burst length 1.
package mc_pkg;
  localparam int MV_W      = 10;     // motion vector component width
  localparam int PIX_W     = 8;
  localparam int BANKS     = 4;
  localparam int BA_W      = 2;
  localparam int ROW_W     = 11;     // 2048 rows
  localparam int COL_W     = 8;      // 256 columns
  localparam int DQ_W      = 32;     // 4 pixels
  localparam int SD_ADDR_W = BA_W + ROW_W + COL_W;

  // SDRAM timing in clock cycles (timing unit)
  localparam int T_CL   = 2;
  localparam int T_RCD  = 2;
  localparam int T_RP   = 2;
  localparam int T_RAS  = 5;
  localparam int T_WR   = 2;

  typedef logic signed [MV_W-1:0] mvc_t;
  typedef struct packed {
    mvc_t x;
    mvc_t y;
  } mv_t;

  // SDRAM command, encoded as {cs_n, ras_n, cas_n, we_n}
  typedef enum logic [3:0] {
    CMD_NOP   = 4'b0111,
    CMD_ACT   = 4'b0011,
    CMD_READ  = 4'b0101,
    CMD_WRITE = 4'b0100,
    CMD_PRE   = 4'b0010,   // A10 high: precharge all
    CMD_BST   = 4'b0110,
    CMD_MRS   = 4'b0000,
    CMD_DESEL = 4'b1111
  } sd_cmd_e;

  typedef struct packed {
    logic [BA_W-1:0]  ba;
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
  } sd_addr_t;

  // Picture component
  typedef enum logic [1:0] { COMP_Y = 2'd0, COMP_CB = 2'd1, COMP_CR = 2'd2 } comp_e;

  // Interpolator operating modes
  typedef enum logic [1:0] {
    IM_COPY   = 2'd0,  // integer MV: 4x4 passes straight through
    IM_LUMA   = 2'd1,  // H.264 luma 6-tap half + bilinear quarter
    IM_CHROMA = 2'd2,  // H.264 chroma 1/8 bilinear, 2x2 block
    IM_MPEG2  = 2'd3   // MPEG-2 half-pel bilinear, 8x8 block
  } imode_e;

  // H.264 macroblock / sub-macroblock partition types
  typedef enum logic [2:0] {
    MB_SKIP = 3'd0, MB_16x16 = 3'd1, MB_16x8 = 3'd2, MB_8x16 = 3'd3, MB_8x8 = 3'd4
  } mbtype_e;
  typedef enum logic [1:0] { SUB_8x8 = 2'd0, SUB_8x4 = 2'd1, SUB_4x8 = 2'd2, SUB_4x4 = 2'd3 } subtype_e;
endpackage
