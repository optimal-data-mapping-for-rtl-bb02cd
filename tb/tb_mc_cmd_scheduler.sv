// tb_mc_cmd_scheduler: the command scheduler on its own, with the request
// classification and the open-row table supplied by reference models in
// the testbench and the SDRAM replaced by sdram_model.
//
// A fixed sequence of requests covers every start condition and checks the
// bus occupancy, from the first command of a request on the bus to its last
// data word on the bus, against the expected cycle counts (L = pixels):
//   all banks closed:  case 1 L+4, case 2 L+5, case 3 L+7
//   all rows open:     L+2
//   one more bank:     L+3 (one ACTIVATE takes one command slot)
//   row conflict:      precharge-all and tRP add 2 to the closed-bank count
// It then checks that requests hitting open rows stream back to back with
// no gap in the pixel stream. Every pixel is compared with the SDRAM
// content expected at its arithmetic address, and the SDRAM model must see
// no timing violation.
module tb_mc_cmd_scheduler;
  import mc_pkg::*;
  import mc_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      req_valid = 0, req_ready;
  mc_req_t   req = '0;
  req_case_e cls_case;
  logic [NUM_WIN-1:0] cls_need, tbl_hit, tbl_conflict;
  bank_t     cls_bank [NUM_WIN];
  row_t      cls_row  [NUM_WIN];
  logic      tbl_act_valid, tbl_prea_valid;
  bank_t     tbl_act_bank;
  row_t      tbl_act_row;
  logic      sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n;
  bank_t     sd_ba;
  logic [ADDR_BITS-1:0] sd_a;
  pix_t      sd_dq;
  logic      dq_valid;
  logic      pix_valid, pix_last, busy, acc_valid;
  pix_t      pix_data;
  req_case_e acc_case;
  int        violations, n_act, n_pre, n_read;

  mc_cmd_scheduler dut (
    .clk, .rst_n, .req_valid, .req_ready, .req, .cls_case, .cls_need, .cls_bank, .cls_row,
    .tbl_hit, .tbl_conflict, .tbl_act_valid, .tbl_act_bank, .tbl_act_row, .tbl_prea_valid,
    .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dq,
    .pix_valid, .pix_data, .pix_last, .busy, .acc_valid, .acc_case);

  sdram_model #(.CL(2), .TRCD(2), .TRRD(2), .TRP(2)) mem (
    .clk, .active(rst_n), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .a(sd_a), .dq(sd_dq), .dq_valid, .violations, .n_act, .n_pre, .n_read);

  // ---- reference classification and open-row table -----------------------
  logic        m_open [4];
  int unsigned m_row  [4];

  always_comb begin
    int unsigned cx [4], cy [4];
    loc_t l;
    cx = '{req.x, req.x + req.w - 1, req.x, req.x + req.w - 1};
    cy = '{req.y, req.y, req.y + req.h - 1, req.y + req.h - 1};
    cls_need[0] = 1'b1;
    cls_need[1] = ((req.x + req.w - 1) / 64) != (req.x / 64);
    cls_need[2] = ((req.y + req.h - 1) / 32) != (req.y / 32);
    cls_need[3] = cls_need[1] && cls_need[2];
    cls_case = cls_need[3] ? CASE_3 : (cls_need[1] || cls_need[2]) ? CASE_2 : CASE_1;
    for (int q = 0; q < 4; q++) begin
      l = ref_loc(req.ref_idx, cx[q], cy[q]);
      cls_bank[q] = bank_t'(l.bank);
      cls_row[q]  = row_t'(l.row);
      tbl_hit[q]      = m_open[l.bank] && m_row[l.bank] == l.row;
      tbl_conflict[q] = m_open[l.bank] && m_row[l.bank] != l.row;
    end
  end

  always @(posedge clk) begin
    if (!rst_n) for (int b = 0; b < 4; b++) begin m_open[b] <= 0; m_row[b] <= 0; end
    else if (tbl_prea_valid) for (int b = 0; b < 4; b++) m_open[b] <= 0;
    else if (tbl_act_valid) begin m_open[tbl_act_bank] <= 1; m_row[tbl_act_bank] <= tbl_act_row; end
  end

  // ---- checking -----------------------------------------------------------
  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [7:0] exp_q [$];
  longint t_first = -1, t_last = -1;
  int gaps = 0;
  logic prev_valid = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} != SD_NOP && t_first < 0) t_first <= cyc;
    if (rst_n && pix_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected pixel");
      end else begin
        logic [7:0] e;
        e = exp_q.pop_front();
        if (e != pix_data) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %h want %h @%0d", pix_data, e, cyc);
        end
        checks++;
        if (pix_last != (exp_q.size() == 0 ? 1'b1 : pix_last)) failures++;
      end
      if (pix_last) t_last <= cyc;
    end
    if (prev_valid && !pix_valid && exp_q.size() != 0) gaps++;
    prev_valid <= pix_valid;
  end

  task automatic push_expect(int unsigned r, int unsigned x, int unsigned y, int unsigned w, int unsigned h);
    for (int i = 0; i < h; i++)
      for (int j = 0; j < w; j++) begin
        loc_t l;
        l = ref_loc(r, x + j, y + i);
        exp_q.push_back(pattern(l.bank, l.row, l.col));
      end
  endtask

  task automatic send(int unsigned r, int unsigned x, int unsigned y, int unsigned w, int unsigned h);
    req       <= '{ref_idx: refidx_t'(r), x: xcoord_t'(x), y: ycoord_t'(y), w: len_t'(w), h: len_t'(h)};
    req_valid <= 1;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    push_expect(r, x, y, w, h);
    req_valid <= 0;
  endtask

  // one request on an otherwise quiet bus; checks its bus occupancy
  task automatic timed(string what, int unsigned r, int unsigned x, int unsigned y,
                       int unsigned w, int unsigned h, int unsigned extra);
    int unsigned want;
    t_first = -1; t_last = -1;
    send(r, x, y, w, h);
    while (t_last < 0) @(posedge clk);
    repeat (6) @(posedge clk);
    want = w * h + extra;
    checks++;
    if (t_last - t_first != want) begin
      failures++;
      $display("FAIL %s: %0d cycles, want L+%0d = %0d", what, t_last - t_first, extra, want);
    end else
      $display("%-34s L=%0d: %0d cycles (L+%0d)", what, w * h, t_last - t_first, extra);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // banks closed: one row
    timed("case 1, banks closed",          0, 64*3+8, 32*5+4, 16, 16, 4);
    // same window again: all rows open
    timed("case 1, row hit",               0, 64*3+20, 32*5+10, 9, 9, 2);
    // extends into the right neighbour, whose bank is closed
    timed("case 2, one more bank",         0, 64*3+50, 32*5+4, 21, 9, 3);
    // another frame: conflict in every bank, four rows
    timed("case 3, after conflict",        1, 64*7+60, 32*9+28, 13, 13, 7+2);
    // vertical break elsewhere: conflict
    timed("case 2 (vertical), conflict",   2, 64*4+8, 32*2+24, 8, 16, 5+2);
    // horizontal break elsewhere: conflict
    timed("case 2 (horizontal), conflict", 3, 64*9+56, 32*6+4, 16, 8, 5+2);
    // small blocks
    timed("case 3 4x4, conflict",          4, 64*1+62, 32*1+30, 4, 4, 7+2);
    timed("case 1 4x4, conflict",          5, 64*2, 32*2, 4, 4, 4+2);

    // back to back: four requests in open rows must stream without gaps
    timed("case 3, conflict",              6, 64*5+50, 32*5+16, 21, 21, 7+2);
    gaps = 0;
    fork
      begin
        send(6, 64*5+44, 32*5+18, 16, 16);
        send(6, 64*5+50, 32*5+20, 8, 8);
        send(6, 64*5+41, 32*5+17, 21, 21);
        send(6, 64*5+60, 32*5+30, 4, 4);
      end
    join
    while (exp_q.size() != 0) @(posedge clk);
    repeat (6) @(posedge clk);
    checks++;
    if (gaps != 0) begin failures++; $display("FAIL %0d gaps between back-to-back hits", gaps); end
    else $display("back-to-back row hits: continuous pixel stream");

    checks++;
    if (violations != 0) begin failures++; $display("FAIL %0d SDRAM timing violations", violations); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d pixels missing", exp_q.size()); end
    $display("SDRAM commands: act=%0d pre=%0d read=%0d", n_act, n_pre, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
