// mc_pkg: types and constants shared by the motion-compensation SDRAM fetch
// controller.
//
// Geometry. One SDRAM row holds 2048 pixels (a 16384-bit row of 8-bit
// pixels) and is filled with a 64 x 32 pixel window of one reference frame,
// so a pixel's column address is simply {y[4:0], x[5:0]}. The window sizes
// are the published choice of the mapping; the widths of the coordinates,
// the four banks and the 13-bit row address are this design's choices and
// match a 512 Mbit x8 SDR SDRAM (4 banks x 8192 rows x 2048 columns).
// Frames are placed on a 2048 x 2048 pixel grid, so up to 16 reference
// frames fit (enough for H.264's 16 reference pictures, and for frames up
// to 1920 x 2048).
//
// Commands are encoded as the SDRAM pins {cs_n, ras_n, cas_n, we_n}.
package mc_pkg;

  // ---- geometry -------------------------------------------------------
  localparam int unsigned WIN_W_LOG2 = 6;   // row window width  = 64 pixels
  localparam int unsigned WIN_H_LOG2 = 5;   // row window height = 32 pixels
  localparam int unsigned X_BITS     = 11;  // pixel x within a frame
  localparam int unsigned Y_BITS     = 11;  // pixel y within a frame
  localparam int unsigned BANK_BITS  = 2;   // 4 banks, 2 x 2 interleave
  localparam int unsigned NUM_BANKS  = 1 << BANK_BITS;
  localparam int unsigned ROW_BITS   = 13;  // 8192 rows per bank
  localparam int unsigned COL_BITS   = WIN_W_LOG2 + WIN_H_LOG2; // 2048 columns
  localparam int unsigned ADDR_BITS  = 13;  // SDRAM address pins A0..A12
  localparam int unsigned PIX_BITS   = 8;   // one pixel per column (x8 part)
  localparam int unsigned LEN_BITS   = 5;   // block width/height 1..31

  // row address bits taken by the window index inside one frame
  localparam int unsigned WX_ROW_BITS = X_BITS - WIN_W_LOG2 - 1;  // 4
  localparam int unsigned WY_ROW_BITS = Y_BITS - WIN_H_LOG2 - 1;  // 5
  localparam int unsigned REF_BITS    = ROW_BITS - WX_ROW_BITS - WY_ROW_BITS; // 4

  typedef logic [X_BITS-1:0]    xcoord_t;
  typedef logic [Y_BITS-1:0]    ycoord_t;
  typedef logic [REF_BITS-1:0]  refidx_t;
  typedef logic [BANK_BITS-1:0] bank_t;
  typedef logic [ROW_BITS-1:0]  row_t;
  typedef logic [COL_BITS-1:0]  col_t;
  typedef logic [LEN_BITS-1:0]  len_t;
  typedef logic [PIX_BITS-1:0]  pix_t;

  // A reference-block request: the rectangle of reference pixels one
  // motion-compensated block needs (block size plus interpolation margin,
  // so widths and heights of 4, 8, 9, 13, 16 or 21 in H.264).
  typedef struct packed {
    refidx_t ref_idx;  // reference frame
    xcoord_t x;        // top-left pixel
    ycoord_t y;
    len_t    w;        // width  in pixels, 1..31
    len_t    h;        // height in pixels, 1..31
  } mc_req_t;

  // Request classes: how many SDRAM rows (row windows) a request touches.
  typedef enum logic [1:0] {
    CASE_1 = 2'd1,  // one row
    CASE_2 = 2'd2,  // two rows: horizontal or vertical window break
    CASE_3 = 2'd3   // four rows: horizontal and vertical break
  } req_case_e;

  // The (up to) four windows a request touches, in the order their rows are
  // activated: top-left, top-right, bottom-left, bottom-right.
  localparam int unsigned NUM_WIN = 4;
  localparam int unsigned WIN_TL = 0, WIN_TR = 1, WIN_BL = 2, WIN_BR = 3;

  // SDRAM command encoding {cs_n, ras_n, cas_n, we_n}
  typedef enum logic [3:0] {
    SD_NOP  = 4'b0111,
    SD_ACT  = 4'b0011,
    SD_READ = 4'b0101,
    SD_PRE  = 4'b0010   // precharge; A10 = 1 selects all banks
  } sd_cmd_e;

  localparam int unsigned A10 = 10;  // auto-precharge / all-banks address bit

endpackage
