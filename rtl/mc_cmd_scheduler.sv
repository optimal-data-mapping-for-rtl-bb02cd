// mc_cmd_scheduler: SDRAM command sequencing for one reference-block request
// at a time.
//
// On accepting a request the scheduler decides, from the request class and
// the open-row table, what has to happen before data can be read:
//   * every needed row already open (row hit)  -> read at once;
//   * a needed bank is closed                 -> ACTIVATE that bank;
//   * a needed bank holds another row         -> PRECHARGE-ALL, then
//                                                ACTIVATE every needed row.
// All rows a request needs are opened at its start, top-left, top-right,
// bottom-left, bottom-right. Reads then walk the block in raster order, one
// column READ per pixel, alternating between the banks as the lines cross
// window borders. One command slot per cycle is shared by the three command
// kinds with priority PRECHARGE-ALL > ACTIVATE > READ, each held back only
// by its own SDRAM timing (tRP, tRRD, tRCD). With TRCD = TRRD = CL = 2 a
// request that starts with all banks closed takes, from its first command on
// the bus to its last data word on the bus,
//     case 1: L+4 cycles, case 2: L+5 cycles, case 3: L+7 cycles
// (L = number of pixels), the one extra cycle of case 3 being the command
// slot taken by the third and fourth ACTIVATE.
//
// INTER_REQ_OPT = 1 (default) leaves rows open after a request, so that the
// next request, whose reference area usually overlaps, reuses them; it then
// accepts the next request in the cycle of its last READ, so requests that
// hit open rows stream back to back. INTER_REQ_OPT = 0 closes all banks with
// a PRECHARGE-ALL right after the last READ of every request; the next
// request is accepted in that cycle and its first ACTIVATE waits tRP.
//
// Interface: req/req_valid/req_ready is a valid-ready handshake; cls_* are
// the classifier's results for the request on req, tbl_hit/tbl_conflict the
// open-row table's answers for the windows in cls_bank/cls_row, and tbl_act_*
// and tbl_prea_valid update that table with the commands issued. The SDRAM
// pins (cs_n, ras_n, cas_n, we_n, ba, a) are driven from flip-flops, one
// cycle after the decision. Read data on sd_dq is captured CL cycles after
// its READ is on the bus and appears on pix_data/pix_valid one cycle later,
// in raster order; pix_last marks a request's final pixel.
//
// The request classes, the cycle counts, opening all needed rows at the
// start of a request, bank-alternating reads and precharge-all between
// requests follow the published scheme. The timing values, the raster read
// order, the command priority, single-word reads and the handshake are this
// design's choices. Refresh, tRAS and tRC are not handled here: the
// requester must leave room for refresh, and rows are assumed to stay open
// long enough for tRAS.
module mc_cmd_scheduler
  import mc_pkg::*;
#(
  parameter int unsigned TRCD = 2,  // ACTIVATE to READ, cycles
  parameter int unsigned TRRD = 2,  // ACTIVATE to ACTIVATE (other bank)
  parameter int unsigned TRP  = 2,  // PRECHARGE to ACTIVATE
  parameter int unsigned CL   = 2,  // CAS latency
  parameter bit          INTER_REQ_OPT = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  // request
  input  logic      req_valid,
  output logic      req_ready,
  input  mc_req_t   req,
  // classification of req
  input  req_case_e cls_case,
  input  logic [NUM_WIN-1:0] cls_need,
  input  bank_t     cls_bank [NUM_WIN],
  input  row_t      cls_row  [NUM_WIN],
  // open-row table
  input  logic [NUM_WIN-1:0] tbl_hit,
  input  logic [NUM_WIN-1:0] tbl_conflict,
  output logic      tbl_act_valid,
  output bank_t     tbl_act_bank,
  output row_t      tbl_act_row,
  output logic      tbl_prea_valid,
  // SDRAM
  output logic      sd_cs_n,
  output logic      sd_ras_n,
  output logic      sd_cas_n,
  output logic      sd_we_n,
  output bank_t     sd_ba,
  output logic [ADDR_BITS-1:0] sd_a,
  input  pix_t      sd_dq,
  // pixel stream
  output logic      pix_valid,
  output pix_t      pix_data,
  output logic      pix_last,
  // status
  output logic      busy,
  output logic      acc_valid,   // a request was accepted this cycle
  output req_case_e acc_case     // its class
);

  localparam int unsigned CW = 4;  // timing counter width
  typedef logic [CW-1:0] tcnt_t;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_CLOSE} state_e;
  state_e state;

  // request being served
  mc_req_t  cur;
  len_t     pi, pj;                 // walker: line and pixel within block
  logic     prea_pend;
  logic [NUM_WIN-1:0] act_pend;
  bank_t    wbank [NUM_WIN];
  row_t     wrow  [NUM_WIN];

  // timing
  tcnt_t    rcd_cnt [NUM_BANKS];
  tcnt_t    rrd_cnt, rp_cnt;

  // ---------------------------------------------------------------- walker
  xcoord_t  px;
  ycoord_t  py;
  bank_t    p_bank;
  row_t     p_row;
  col_t     p_col;

  always_comb begin
    px = cur.x + X_BITS'(pj);
    py = cur.y + Y_BITS'(pi);
  end

  mc_addr_map u_map (.ref_idx(cur.ref_idx), .x(px), .y(py),
                     .bank(p_bank), .row(p_row), .col(p_col));

  logic last_pix;
  assign last_pix = (pi == cur.h - len_t'(1)) && (pj == cur.w - len_t'(1));

  // ------------------------------------------------------------- decision
  logic [NUM_BANKS-1:0] bank_pend;  // bank still waits for its ACTIVATE
  logic    any_act;
  logic [1:0] act_sel;
  logic    do_prea, do_act, do_read, do_close;

  always_comb begin
    bank_pend = '0;
    any_act   = 1'b0;
    act_sel   = 0;
    for (int q = NUM_WIN-1; q >= 0; q--) begin
      if (act_pend[q]) begin
        bank_pend[wbank[q]] = 1'b1;
        any_act = 1'b1;
        act_sel = 2'(q);
      end
    end

    do_prea  = (state == S_RUN) && prea_pend;
    do_act   = (state == S_RUN) && !prea_pend && any_act &&
               (rrd_cnt == '0) && (rp_cnt == '0);
    do_read  = (state == S_RUN) && !prea_pend && !do_act &&
               !bank_pend[p_bank] && (rcd_cnt[p_bank] == '0);
    do_close = (state == S_CLOSE);
  end

  // accept: when idle, while closing, or in the cycle of the last READ
  always_comb begin
    req_ready = (state == S_IDLE) || (state == S_CLOSE) ||
                (INTER_REQ_OPT && do_read && last_pix);
  end
  logic accept;
  assign accept = req_valid && req_ready;

  // what the new request has to do first; banks being closed this cycle
  // count as closed
  logic [NUM_WIN-1:0] new_conflict, new_act;
  logic new_prea;
  always_comb begin
    new_conflict = (do_close) ? '0 : (cls_need & tbl_conflict);
    new_prea     = |new_conflict;
    if (do_close || new_prea) new_act = cls_need;
    else                      new_act = cls_need & ~tbl_hit;
  end

  // ------------------------------------------------------------ state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cur       <= '0;
      pi        <= '0;
      pj        <= '0;
      prea_pend <= 1'b0;
      act_pend  <= '0;
      for (int q = 0; q < NUM_WIN; q++) begin
        wbank[q] <= '0;
        wrow[q]  <= '0;
      end
    end else begin
      if (do_prea) prea_pend <= 1'b0;
      if (do_act)  act_pend[act_sel] <= 1'b0;
      if (do_read) begin
        if (pj == cur.w - len_t'(1)) begin
          pj <= '0;
          pi <= pi + len_t'(1);
        end else begin
          pj <= pj + len_t'(1);
        end
        if (last_pix) state <= INTER_REQ_OPT ? S_IDLE : S_CLOSE;
      end
      if (do_close) state <= S_IDLE;
      if (accept) begin
        state     <= S_RUN;
        cur       <= req;
        pi        <= '0;
        pj        <= '0;
        prea_pend <= new_prea;
        act_pend  <= new_act;
        wbank     <= cls_bank;
        wrow      <= cls_row;
      end
    end
  end

  // ------------------------------------------------------------ timing
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BANKS; b++) rcd_cnt[b] <= '0;
      rrd_cnt <= '0;
      rp_cnt  <= '0;
    end else begin
      for (int b = 0; b < NUM_BANKS; b++)
        if (do_act && wbank[act_sel] == bank_t'(b)) rcd_cnt[b] <= tcnt_t'(TRCD - 1);
        else if (rcd_cnt[b] != '0)                  rcd_cnt[b] <= rcd_cnt[b] - tcnt_t'(1);
      if (do_act)              rrd_cnt <= tcnt_t'(TRRD - 1);
      else if (rrd_cnt != '0)  rrd_cnt <= rrd_cnt - tcnt_t'(1);
      if (do_prea || do_close) rp_cnt  <= tcnt_t'(TRP - 1);
      else if (rp_cnt != '0)   rp_cnt  <= rp_cnt - tcnt_t'(1);
    end
  end

  // table updates happen with the decision
  always_comb begin
    tbl_act_valid  = do_act;
    tbl_act_bank   = wbank[act_sel];
    tbl_act_row    = wrow[act_sel];
    tbl_prea_valid = do_prea || do_close;
  end

  // ------------------------------------------------------------ SDRAM pins
  sd_cmd_e cmd_d;
  bank_t   ba_d;
  logic [ADDR_BITS-1:0] a_d;

  always_comb begin
    cmd_d = SD_NOP;
    ba_d  = '0;
    a_d   = '0;
    if (do_prea || do_close) begin
      cmd_d    = SD_PRE;
      a_d[A10] = 1'b1;
    end else if (do_act) begin
      cmd_d = SD_ACT;
      ba_d  = wbank[act_sel];
      a_d   = ADDR_BITS'(wrow[act_sel]);
    end else if (do_read) begin
      // column on A0..A9, A11; A10 = 0: no auto-precharge
      cmd_d = SD_READ;
      ba_d  = p_bank;
      a_d   = {1'b0, p_col[10], 1'b0, p_col[9:0]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= SD_NOP;
      sd_ba <= '0;
      sd_a  <= '0;
    end else begin
      {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} <= cmd_d;
      sd_ba <= ba_d;
      sd_a  <= a_d;
    end
  end

  // ------------------------------------------------------------ read data
  // rd_vld[k] / rd_lst[k] are true k+1 cycles after the READ decision, i.e.
  // k cycles after the READ is on the bus; the data is on sd_dq at k = CL.
  logic [CL:0] rd_vld, rd_lst;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_vld    <= '0;
      rd_lst    <= '0;
      pix_valid <= 1'b0;
      pix_last  <= 1'b0;
      pix_data  <= '0;
    end else begin
      rd_vld    <= {rd_vld[CL-1:0], do_read};
      rd_lst    <= {rd_lst[CL-1:0], do_read && last_pix};
      pix_valid <= rd_vld[CL];
      pix_last  <= rd_lst[CL];
      pix_data  <= sd_dq;
    end
  end

  // ------------------------------------------------------------ status
  assign busy      = (state != S_IDLE) || (rd_vld != '0) || pix_valid;
  assign acc_valid = accept;
  assign acc_case  = cls_case;

  // ------------------------------------------------------------ checks
  a_req_size: assert property (@(posedge clk) disable iff (!rst_n)
                               accept |-> (req.w != '0 && req.h != '0));
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               req_valid && !req_ready |=> req_valid && $stable(req));
  // the row a READ addresses is the one recorded for its bank
  logic [NUM_WIN-1:0] p_row_ok;
  always_comb
    for (int q = 0; q < NUM_WIN; q++)
      p_row_ok[q] = (wbank[q] == p_bank) && (wrow[q] == p_row);
  a_read_row: assert property (@(posedge clk) disable iff (!rst_n) do_read |-> |p_row_ok);

  initial begin
    assert (TRCD >= 1 && TRCD < (1 << CW) && TRRD >= 1 && TRRD < (1 << CW) &&
            TRP >= 1 && TRP < (1 << CW) && CL >= 1)
      else $error("mc_cmd_scheduler: timing parameter out of range");
  end

endmodule
