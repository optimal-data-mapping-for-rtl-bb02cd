// mc_req_classifier: sort a reference-block request into the three request
// classes and locate the SDRAM rows it needs.
//
// A request of w x h pixels at (x, y) crosses a vertical window border when
// x[5:0] + w > 64 and a horizontal one when y[4:0] + h > 32. Since a block is
// never wider than a window nor taller than one, it touches one window
// (case 1), two windows (case 2, either border) or four (case 3, both).
// The window of each corner pixel is translated with mc_addr_map to give the
// bank and row of the top-left, top-right, bottom-left and bottom-right
// window; win_need marks which of them the request really touches. The four
// windows always lie in four different banks.
//
// The case definitions follow the published request classification; how
// they are computed here (border test and corner translation) is this
// design's.
//
// Purely combinational; no clock.
module mc_req_classifier
  import mc_pkg::*;
(
  input  mc_req_t   req,
  output req_case_e req_case,
  output logic      hbreak,                // crosses a vertical border (x)
  output logic      vbreak,                // crosses a horizontal border (y)
  output logic [NUM_WIN-1:0] win_need,     // TL, TR, BL, BR
  output bank_t     win_bank [NUM_WIN],
  output row_t      win_row  [NUM_WIN]
);

  // offset of the block inside its window plus its size, one bit wider
  logic [WIN_W_LOG2:0] x_end;
  logic [WIN_H_LOG2:0] y_end;
  xcoord_t x_right;
  ycoord_t y_bottom;

  always_comb begin
    x_end    = (WIN_W_LOG2+1)'(req.x[WIN_W_LOG2-1:0]) + (WIN_W_LOG2+1)'(req.w);
    y_end    = (WIN_H_LOG2+1)'(req.y[WIN_H_LOG2-1:0]) + (WIN_H_LOG2+1)'(req.h);
    hbreak   = x_end > (WIN_W_LOG2+1)'(1 << WIN_W_LOG2);
    vbreak   = y_end > (WIN_H_LOG2+1)'(1 << WIN_H_LOG2);
    x_right  = req.x + X_BITS'(req.w) - X_BITS'(1);
    y_bottom = req.y + Y_BITS'(req.h) - Y_BITS'(1);

    win_need = {hbreak & vbreak, vbreak, hbreak, 1'b1};
    unique case ({vbreak, hbreak})
      2'b00:   req_case = CASE_1;
      2'b01,
      2'b10:   req_case = CASE_2;
      default: req_case = CASE_3;
    endcase
  end

  logic [COL_BITS-1:0] unused_col [NUM_WIN];

  mc_addr_map u_map_tl (.ref_idx(req.ref_idx), .x(req.x),    .y(req.y),
                        .bank(win_bank[WIN_TL]), .row(win_row[WIN_TL]), .col(unused_col[WIN_TL]));
  mc_addr_map u_map_tr (.ref_idx(req.ref_idx), .x(x_right),  .y(req.y),
                        .bank(win_bank[WIN_TR]), .row(win_row[WIN_TR]), .col(unused_col[WIN_TR]));
  mc_addr_map u_map_bl (.ref_idx(req.ref_idx), .x(req.x),    .y(y_bottom),
                        .bank(win_bank[WIN_BL]), .row(win_row[WIN_BL]), .col(unused_col[WIN_BL]));
  mc_addr_map u_map_br (.ref_idx(req.ref_idx), .x(x_right),  .y(y_bottom),
                        .bank(win_bank[WIN_BR]), .row(win_row[WIN_BR]), .col(unused_col[WIN_BR]));

endmodule
