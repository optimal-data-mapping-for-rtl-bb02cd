// mc_sdram_ctrl: reference-pixel fetch controller for H.264 motion
// compensation, reading from an external SDR SDRAM.
//
// Motion compensation asks for small rectangles of a reference frame (4 to
// 21 pixels a side once the interpolation margin is added), and successive
// rectangles largely overlap. The cost of such reads is dominated by row
// activations, so the controller combines two ideas:
//   * data mapping - each SDRAM row holds a 64 x 32 pixel window of a frame
//     and neighbouring windows sit in different banks (mc_addr_map), so most
//     rectangles lie in one row and the rest in two or four rows of different
//     banks that can all be opened at once (mc_req_classifier);
//   * operation scheduling - all rows a request needs are activated at its
//     start and read in a bank-alternating order (mc_cmd_scheduler); rows
//     stay open after the request and are reused by the next one, and are
//     closed, with a single precharge-all, only when a needed bank holds a
//     different row (mc_open_row_table).
//
// Interface: a valid/ready request port carrying mc_req_t (reference frame,
// top-left x/y, width, height); a pixel stream in raster order of the
// rectangle (pix_valid, pix_data, pix_last on its final pixel); the SDRAM
// command pins and the 8-bit read data bus; acc_valid/acc_case report each
// accepted request and its class (1, 2 or 4 rows). Everything is synchronous
// to clk; rst_n is active low and synchronous. With all banks closed a
// request of L pixels occupies the SDRAM bus for L+4, L+5 or L+7 cycles for
// the three classes; when all its rows are already open, L+2.
//
// The mapping, the request classes, the cycle counts and the row policy are
// the published scheme; the pin-level details, the SDRAM timing values and
// the request format are this design's choices (see mc_pkg and
// mc_cmd_scheduler). Only reads are handled: writing decoded frames into
// the same mapping, and refresh, belong to the surrounding memory system.
module mc_sdram_ctrl
  import mc_pkg::*;
#(
  parameter int unsigned TRCD = 2,
  parameter int unsigned TRRD = 2,
  parameter int unsigned TRP  = 2,
  parameter int unsigned CL   = 2,
  parameter bit          INTER_REQ_OPT = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  // request port
  input  logic      req_valid,
  output logic      req_ready,
  input  mc_req_t   req,
  // pixel stream
  output logic      pix_valid,
  output pix_t      pix_data,
  output logic      pix_last,
  // SDRAM
  output logic      sd_cs_n,
  output logic      sd_ras_n,
  output logic      sd_cas_n,
  output logic      sd_we_n,
  output bank_t     sd_ba,
  output logic [ADDR_BITS-1:0] sd_a,
  input  pix_t      sd_dq,
  // status
  output logic      busy,
  output logic      acc_valid,
  output req_case_e acc_case,
  output logic [NUM_BANKS-1:0] bank_open
);

  req_case_e cls_case;
  logic      cls_hbreak, cls_vbreak;
  logic [NUM_WIN-1:0] cls_need;
  bank_t     cls_bank [NUM_WIN];
  row_t      cls_row  [NUM_WIN];

  logic [NUM_WIN-1:0] tbl_hit, tbl_conflict;
  logic      tbl_act_valid, tbl_prea_valid;
  bank_t     tbl_act_bank;
  row_t      tbl_act_row;

  mc_req_classifier u_classifier (
    .req      (req),
    .req_case (cls_case),
    .hbreak   (cls_hbreak),
    .vbreak   (cls_vbreak),
    .win_need (cls_need),
    .win_bank (cls_bank),
    .win_row  (cls_row)
  );

  mc_open_row_table #(.NUM_Q(NUM_WIN)) u_rows (
    .clk        (clk),
    .rst_n      (rst_n),
    .act_valid  (tbl_act_valid),
    .act_bank   (tbl_act_bank),
    .act_row    (tbl_act_row),
    .prea_valid (tbl_prea_valid),
    .q_bank     (cls_bank),
    .q_row      (cls_row),
    .q_hit      (tbl_hit),
    .q_conflict (tbl_conflict),
    .bank_open  (bank_open)
  );

  mc_cmd_scheduler #(
    .TRCD(TRCD), .TRRD(TRRD), .TRP(TRP), .CL(CL), .INTER_REQ_OPT(INTER_REQ_OPT)
  ) u_sched (
    .clk            (clk),
    .rst_n          (rst_n),
    .req_valid      (req_valid),
    .req_ready      (req_ready),
    .req            (req),
    .cls_case       (cls_case),
    .cls_need       (cls_need),
    .cls_bank       (cls_bank),
    .cls_row        (cls_row),
    .tbl_hit        (tbl_hit),
    .tbl_conflict   (tbl_conflict),
    .tbl_act_valid  (tbl_act_valid),
    .tbl_act_bank   (tbl_act_bank),
    .tbl_act_row    (tbl_act_row),
    .tbl_prea_valid (tbl_prea_valid),
    .sd_cs_n        (sd_cs_n),
    .sd_ras_n       (sd_ras_n),
    .sd_cas_n       (sd_cas_n),
    .sd_we_n        (sd_we_n),
    .sd_ba          (sd_ba),
    .sd_a           (sd_a),
    .sd_dq          (sd_dq),
    .pix_valid      (pix_valid),
    .pix_data       (pix_data),
    .pix_last       (pix_last),
    .busy           (busy),
    .acc_valid      (acc_valid),
    .acc_case       (acc_case)
  );

  // the break flags are implied by cls_need; checked here for consistency
  a_breaks: assert property (@(posedge clk) disable iff (!rst_n)
                             req_valid |-> (cls_need[WIN_TR] == cls_hbreak) &&
                                           (cls_need[WIN_BL] == cls_vbreak));

endmodule
