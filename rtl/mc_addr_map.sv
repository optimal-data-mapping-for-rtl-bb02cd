// mc_addr_map: pixel position -> SDRAM bank, row and column.
//
// The frame is cut into 64 x 32 pixel windows and each window fills one
// 2048-pixel SDRAM row, so a rectangle read for motion compensation usually
// stays inside a single row. Within the window the column is the pixel's
// raster position, {y[4:0], x[5:0]}. Windows are spread over the four banks
// as a 2 x 2 checkerboard, bank = {wy[0], wx[0]} where wx = x >> 6 and
// wy = y >> 5, so any two horizontally, vertically or diagonally adjacent
// windows are in different banks: a block that crosses window borders can
// have all its rows open at the same time. The remaining window bits and the
// reference frame index form the row address, row = {ref, wy >> 1, wx >> 1}.
// Because the window sides are powers of two, the whole translation is bit
// selection, with no arithmetic.
//
// The 64 x 32 window follows the published mapping; the checkerboard bank
// order and the placement of the frame index in the upper row bits are this
// design's choices.
//
// Purely combinational; no clock.
module mc_addr_map
  import mc_pkg::*;
(
  input  refidx_t ref_idx,
  input  xcoord_t x,
  input  ycoord_t y,
  output bank_t   bank,
  output row_t    row,
  output col_t    col
);

  always_comb begin
    col  = {y[WIN_H_LOG2-1:0], x[WIN_W_LOG2-1:0]};
    bank = {y[WIN_H_LOG2], x[WIN_W_LOG2]};
    row  = {ref_idx, y[Y_BITS-1:WIN_H_LOG2+1], x[X_BITS-1:WIN_W_LOG2+1]};
  end

endmodule
