// tb_mc_req_classifier: checks the request class and the bank/row of every
// needed window against a reference that counts the windows a block
// touches and translates its corner pixels arithmetically. Requests use the
// H.264 reference sizes (4, 8, 9, 13, 16, 21) plus random sizes, at random
// positions and at positions chosen to straddle window borders.
module tb_mc_req_classifier;
  import mc_pkg::*;
  import mc_tb_pkg::*;

  mc_req_t   req;
  req_case_e req_case;
  logic      hbreak, vbreak;
  logic [NUM_WIN-1:0] win_need;
  bank_t     win_bank [NUM_WIN];
  row_t      win_row  [NUM_WIN];
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  mc_req_classifier dut (.req(req), .req_case(req_case), .hbreak(hbreak), .vbreak(vbreak),
                         .win_need(win_need), .win_bank(win_bank), .win_row(win_row));

  const int unsigned SIZES [6] = '{4, 8, 9, 13, 16, 21};

  task automatic check_req(int unsigned r, int unsigned xi, int unsigned yi,
                           int unsigned w, int unsigned h);
    int unsigned nwin, want_case;
    int unsigned cx [4], cy [4];
    logic [3:0] want_need;
    loc_t l;
    req = '{ref_idx: refidx_t'(r), x: xcoord_t'(xi), y: ycoord_t'(yi), w: len_t'(w), h: len_t'(h)};
    #1;
    nwin = windows_touched(xi, yi, w, h);
    want_case = (nwin == 1) ? 1 : (nwin == 2) ? 2 : 3;
    want_need[0] = 1'b1;
    want_need[1] = ((xi + w - 1) / 64) != (xi / 64);
    want_need[2] = ((yi + h - 1) / 32) != (yi / 32);
    want_need[3] = want_need[1] && want_need[2];
    checks++;
    if (int'(req_case) != want_case || win_need != want_need) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d,%0d) %0dx%0d: case %0d need %b, want %0d %b",
                                  xi, yi, w, h, req_case, win_need, want_case, want_need);
    end
    seen[want_case]++;
    cx = '{xi, xi + w - 1, xi, xi + w - 1};
    cy = '{yi, yi, yi + h - 1, yi + h - 1};
    for (int q = 0; q < 4; q++) begin
      if (!want_need[q]) continue;
      l = ref_loc(r, cx[q], cy[q]);
      checks++;
      if (win_bank[q] != bank_t'(l.bank) || win_row[q] != row_t'(l.row)) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) %0dx%0d window %0d: b%0d r%0d want b%0d r%0d",
                                    xi, yi, w, h, q, win_bank[q], win_row[q], l.bank, l.row);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exact border cases: a 16x16 block ending on and one past a border
    check_req(0, 48, 16, 16, 16);   // fits exactly: case 1
    check_req(0, 49, 16, 16, 16);   // one pixel over the x border: case 2
    check_req(0, 48, 17, 16, 16);   // one line over the y border: case 2
    check_req(0, 49, 17, 16, 16);   // both: case 3
    for (int i = 0; i < 3000; i++) begin
      int unsigned w, h, xi, yi;
      if (i % 2 == 0) begin
        w = SIZES[$urandom_range(5)]; h = SIZES[$urandom_range(5)];
      end else begin
        w = $urandom_range(31, 1); h = $urandom_range(31, 1);
      end
      if (i % 3 == 0) begin  // near a window corner
        xi = 64 * $urandom_range(1, 20) - $urandom_range(w);
        yi = 32 * $urandom_range(1, 40) - $urandom_range(h);
      end else begin
        xi = $urandom_range(2047 - w);
        yi = $urandom_range(2047 - h);
      end
      check_req($urandom_range(15), xi, yi, w, h);
    end
    checks++;
    if (seen[1] == 0 || seen[2] == 0 || seen[3] == 0) begin
      failures++;
      $display("FAIL not every class was exercised");
    end
    $display("classes seen: case1=%0d case2=%0d case3=%0d", seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
