// mc_tb_pkg: reference functions shared by the testbenches.
//
// ref_loc gives the SDRAM location of a pixel with plain arithmetic
// (divisions and remainders by the 64 x 32 window size), independently of
// the bit slicing in the RTL. pattern is the content the SDRAM model stores
// at a location: a multiplicative hash of {bank, row, column}, so a pixel
// read from the wrong place almost always shows a different value.
package mc_tb_pkg;

  typedef struct {
    int unsigned bank;
    int unsigned row;
    int unsigned col;
  } loc_t;

  function automatic loc_t ref_loc(int unsigned ref_idx, int unsigned x, int unsigned y);
    loc_t l;
    int unsigned wx, wy;
    wx = x / 64;
    wy = y / 32;
    l.bank = (wy % 2) * 2 + (wx % 2);
    l.row  = ref_idx * 512 + (wy / 2) * 16 + (wx / 2);
    l.col  = (y % 32) * 64 + (x % 64);
    return l;
  endfunction

  function automatic logic [7:0] pattern(int unsigned bank, int unsigned row, int unsigned col);
    logic [31:0] v, h;
    v = (bank << 24) | (row << 11) | col;
    h = v * 32'h9E37_79B1;
    return h[31:24] ^ h[15:8];
  endfunction

  // number of distinct 64 x 32 windows a w x h block at (x, y) touches
  function automatic int unsigned windows_touched(int unsigned x, int unsigned y,
                                                  int unsigned w, int unsigned h);
    int unsigned nx, ny;
    nx = (x + w - 1) / 64 - x / 64 + 1;
    ny = (y + h - 1) / 32 - y / 32 + 1;
    return nx * ny;
  endfunction

  // One reference-block request as the testbenches generate it.
  typedef struct {
    int unsigned r, x, y, w, h;
  } treq_t;

  // Motion-compensation reference requests for one inter-coded frame of
  // fw x fh pixels, macroblock by macroblock in raster order. Each 16 x 16
  // macroblock is split as 16x16, 16x8, 8x16, 8x8 or 4x4; each partition
  // gets a motion vector in quarter pixels (zero 40 % of the time, else up
  // to +-16 pixels across and +-8 down) and a reference frame (0 most of the
  // time). A fractional vector component widens the fetched area by the
  // 6-tap interpolation margin, 2 pixels before and 3 after, giving the
  // request sizes 4, 8, 9, 13, 16 and 21. Areas are clamped into the frame.
  function automatic void gen_frame(int unsigned fw, int unsigned fh, ref treq_t q[$]);
    for (int unsigned mby = 0; mby < fh / 16; mby++)
      for (int unsigned mbx = 0; mbx < fw / 16; mbx++) begin
        int unsigned mode, bw, bh;
        mode = $urandom_range(7);
        case (mode)
          0, 1, 2: begin bw = 16; bh = 16; end
          3:       begin bw = 16; bh = 8;  end
          4:       begin bw = 8;  bh = 16; end
          5, 6:    begin bw = 8;  bh = 8;  end
          default: begin bw = 4;  bh = 4;  end
        endcase
        for (int unsigned py = 0; py < 16; py += bh)
          for (int unsigned px = 0; px < 16; px += bw) begin
            int mvx, mvy, x0, y0;
            int unsigned w, h;
            treq_t t;
            if ($urandom_range(9) < 4) begin mvx = 0; mvy = 0; end
            else begin
              mvx = int'($urandom_range(128)) - 64;
              mvy = int'($urandom_range(64)) - 32;
            end
            x0 = int'(mbx * 16 + px) + (mvx >>> 2);
            y0 = int'(mby * 16 + py) + (mvy >>> 2);
            w  = bw; h = bh;
            if ((mvx & 3) != 0) begin x0 -= 2; w += 5; end
            if ((mvy & 3) != 0) begin y0 -= 2; h += 5; end
            if (x0 < 0) x0 = 0;
            if (y0 < 0) y0 = 0;
            if (x0 > int'(fw - w)) x0 = int'(fw - w);
            if (y0 > int'(fh - h)) y0 = int'(fh - h);
            t.r = ($urandom_range(9) < 8) ? 0 : $urandom_range(3, 1);
            t.x = x0; t.y = y0; t.w = w; t.h = h;
            q.push_back(t);
          end
      end
  endfunction

endpackage
