// tb_mc_inter_request_gain: what keeping rows open between requests buys.
//
// Two fetch controllers at default timing receive the same generated CIF
// (352x288) inter frame, one with INTER_REQ_OPT = 1 (rows stay open, closed
// by precharge-all on a conflict) and one with INTER_REQ_OPT = 0 (all banks
// closed after every request). Each has its own SDRAM model; every pixel of
// both is checked and neither may cause a timing violation. The test prints
// for both the bus cycles, the ACTIVATE count and the share of requests that
// had to open at least one row, and requires the open-row controller to
// need fewer cycles and fewer activations than the closing one.
module tb_mc_inter_request_gain;
  import mc_pkg::*;
  import mc_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      req_valid [2];
  logic      req_ready [2];
  mc_req_t   req       [2];
  logic      pix_valid [2], pix_last [2], busy [2], acc_valid [2];
  pix_t      pix_data  [2];
  req_case_e acc_case  [2];
  logic [NUM_BANKS-1:0] bank_open [2];
  logic      cs_n [2], ras_n [2], cas_n [2], we_n [2];
  bank_t     ba   [2];
  logic [ADDR_BITS-1:0] a [2];
  pix_t      dq   [2];
  logic      dq_valid [2];
  int        violations [2], n_act [2], n_pre [2], n_read [2];

  mc_sdram_ctrl #(.INTER_REQ_OPT(1'b1)) dut_open (
    .clk, .rst_n, .req_valid(req_valid[0]), .req_ready(req_ready[0]), .req(req[0]),
    .pix_valid(pix_valid[0]), .pix_data(pix_data[0]), .pix_last(pix_last[0]),
    .sd_cs_n(cs_n[0]), .sd_ras_n(ras_n[0]), .sd_cas_n(cas_n[0]), .sd_we_n(we_n[0]),
    .sd_ba(ba[0]), .sd_a(a[0]), .sd_dq(dq[0]),
    .busy(busy[0]), .acc_valid(acc_valid[0]), .acc_case(acc_case[0]), .bank_open(bank_open[0]));

  mc_sdram_ctrl #(.INTER_REQ_OPT(1'b0)) dut_close (
    .clk, .rst_n, .req_valid(req_valid[1]), .req_ready(req_ready[1]), .req(req[1]),
    .pix_valid(pix_valid[1]), .pix_data(pix_data[1]), .pix_last(pix_last[1]),
    .sd_cs_n(cs_n[1]), .sd_ras_n(ras_n[1]), .sd_cas_n(cas_n[1]), .sd_we_n(we_n[1]),
    .sd_ba(ba[1]), .sd_a(a[1]), .sd_dq(dq[1]),
    .busy(busy[1]), .acc_valid(acc_valid[1]), .acc_case(acc_case[1]), .bank_open(bank_open[1]));

  for (genvar k = 0; k < 2; k++) begin : g_mem
    sdram_model mem (
      .clk, .active(rst_n), .cs_n(cs_n[k]), .ras_n(ras_n[k]), .cas_n(cas_n[k]), .we_n(we_n[k]),
      .ba(ba[k]), .a(a[k]), .dq(dq[k]), .dq_valid(dq_valid[k]), .violations(violations[k]),
      .n_act(n_act[k]), .n_pre(n_pre[k]), .n_read(n_read[k]));
  end

  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [7:0] exp_q0 [$], exp_q1 [$];
  longint t_done [2] = '{0, 0};
  int n_open_req [2] = '{0, 0};   // requests that issued at least one ACTIVATE
  int cur_act [2] = '{0, 0};
  logic have_cur [2] = '{0, 0};
  int n_reqs [2] = '{0, 0};

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int k = 0; k < 2; k++) begin
      if (rst_n && sd_cmd_e'({cs_n[k], ras_n[k], cas_n[k], we_n[k]}) == SD_ACT) cur_act[k]++;
      if (rst_n && acc_valid[k]) begin
        if (have_cur[k] && cur_act[k] != 0) n_open_req[k]++;
        have_cur[k] = 1; cur_act[k] = 0; n_reqs[k]++;
      end
      if (rst_n && pix_valid[k]) begin
        logic [7:0] e;
        checks++;
        if ((k == 0 ? exp_q0.size() : exp_q1.size()) == 0) begin
          failures++; $display("FAIL unexpected pixel from controller %0d", k);
        end else begin
          e = (k == 0) ? exp_q0.pop_front() : exp_q1.pop_front();
          if (e != pix_data[k]) begin
            failures++;
            if (failures < 10) $display("FAIL controller %0d pixel %h want %h @%0d", k, pix_data[k], e, cyc);
          end
        end
        if (pix_last[k]) t_done[k] = cyc;
      end
    end
  end

  task automatic send(int k, treq_t t);
    @(negedge clk);
    req[k]       = '{ref_idx: refidx_t'(t.r), x: xcoord_t'(t.x), y: ycoord_t'(t.y),
                     w: len_t'(t.w), h: len_t'(t.h)};
    req_valid[k] = 1;
    while (!req_ready[k]) @(negedge clk);
    for (int i = 0; i < t.h; i++)
      for (int j = 0; j < t.w; j++) begin
        loc_t l;
        l = ref_loc(t.r, t.x + j, t.y + i);
        if (k == 0) exp_q0.push_back(pattern(l.bank, l.row, l.col));
        else        exp_q1.push_back(pattern(l.bank, l.row, l.col));
      end
    @(posedge clk);
    #1 req_valid[k] = 0;
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    treq_t q [$];
    for (int k = 0; k < 2; k++) begin req_valid[k] = 0; req[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    gen_frame(352, 288, q);
    fork
      foreach (q[i]) send(0, q[i]);
      foreach (q[i]) send(1, q[i]);
    join
    while (exp_q0.size() != 0 || exp_q1.size() != 0) @(posedge clk);
    repeat (6) @(posedge clk);
    for (int k = 0; k < 2; k++) if (cur_act[k] != 0) n_open_req[k]++;

    for (int k = 0; k < 2; k++)
      $display("%s: %0d cycles for %0d pixels (%.4f per pixel), %0d activates, %0d precharges, %.1f %% of %0d requests opened a row",
               k == 0 ? "rows kept open   " : "closed after each", t_done[k], n_read[k],
               real'(t_done[k]) / real'(n_read[k]), n_act[k], n_pre[k],
               100.0 * real'(n_open_req[k]) / real'(n_reqs[k]), n_reqs[k]);
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (violations[k] != 0) begin failures++; $display("FAIL controller %0d: %0d SDRAM timing violations", k, violations[k]); end
      checks++;
      if (n_reqs[k] != q.size()) begin failures++; $display("FAIL controller %0d accepted %0d of %0d", k, n_reqs[k], q.size()); end
    end
    checks++;
    if (n_read[0] != n_read[1]) begin failures++; $display("FAIL read counts differ"); end
    checks++;
    if (!(t_done[0] < t_done[1])) begin failures++; $display("FAIL keeping rows open did not save cycles"); end
    checks++;
    if (!(n_act[0] < n_act[1])) begin failures++; $display("FAIL keeping rows open did not save activates"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
