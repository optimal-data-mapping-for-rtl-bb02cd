// tb_mc_addr_map: checks the pixel-to-SDRAM translation against the
// arithmetic reference (mc_tb_pkg::ref_loc) for the corners of the address
// space, every pixel of one window border region and random pixels, and
// checks that the four windows around any window corner use four banks.
module tb_mc_addr_map;
  import mc_pkg::*;
  import mc_tb_pkg::*;

  refidx_t ref_idx;
  xcoord_t x;
  ycoord_t y;
  bank_t   bank;
  row_t    row;
  col_t    col;
  int checks = 0, failures = 0;

  mc_addr_map dut (.ref_idx(ref_idx), .x(x), .y(y), .bank(bank), .row(row), .col(col));

  task automatic check_one(int unsigned r, int unsigned xi, int unsigned yi);
    loc_t l;
    ref_idx = refidx_t'(r); x = xcoord_t'(xi); y = ycoord_t'(yi);
    #1;
    l = ref_loc(r, xi, yi);
    checks++;
    if (bank != bank_t'(l.bank) || row != row_t'(l.row) || col != col_t'(l.col)) begin
      failures++;
      if (failures < 10)
        $display("FAIL ref=%0d x=%0d y=%0d: got b%0d r%0d c%0d, want b%0d r%0d c%0d",
                 r, xi, yi, bank, row, col, l.bank, l.row, l.col);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bank_t b4 [4];
    check_one(0, 0, 0);
    check_one(15, 2047, 2047);
    // all pixels around the corner where four windows meet
    for (int yi = 28; yi < 36; yi++)
      for (int xi = 60; xi < 68; xi++) check_one(3, xi, yi);
    for (int i = 0; i < 2000; i++)
      check_one($urandom_range(15), $urandom_range(2047), $urandom_range(2047));
    // neighbouring windows are in different banks
    for (int i = 0; i < 200; i++) begin
      int unsigned wx, wy;
      wx = $urandom_range(30); wy = $urandom_range(62);
      for (int k = 0; k < 4; k++) begin
        ref_idx = '0; x = xcoord_t'((wx + k % 2) * 64); y = ycoord_t'((wy + k / 2) * 32);
        #1 b4[k] = bank;
      end
      checks++;
      if (b4[0] == b4[1] || b4[0] == b4[2] || b4[0] == b4[3] ||
          b4[1] == b4[2] || b4[1] == b4[3] || b4[2] == b4[3]) begin
        failures++;
        $display("FAIL banks of windows around (%0d,%0d) not distinct", wx, wy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
