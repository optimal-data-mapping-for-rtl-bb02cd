// tb_mc_sdram_ctrl: end-to-end test of the fetch controller at its default
// parameters, against the SDRAM model.
//
// After reset a single 16 x 16 request checks the closed-bank timing (L+4
// cycles from its first command to its last data word on the bus). Then one
// inter-coded frame of each of four picture formats (QCIF 176x144, CIF
// 352x288, 525-line SD 720x480 and 720p HD 1280x720) is fetched as
// mc_tb_pkg::gen_frame generates it, with requests offered back to back.
// Every pixel is compared with the SDRAM content at its arithmetic address,
// and the SDRAM model must report no timing violation.
//
// The test counts how often each mechanism of the design occurred and
// fails if one never did: the three request classes; requests served
// entirely from open rows, requests that only open idle banks, and requests
// that first close all banks with a precharge-all; and requests accepted
// while the previous one was still being read. Per format it prints the
// bus cycles per pixel and the share of requests that needed a precharge.
module tb_mc_sdram_ctrl;
  import mc_pkg::*;
  import mc_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      req_valid = 0, req_ready;
  mc_req_t   req = '0;
  logic      pix_valid, pix_last, busy, acc_valid;
  pix_t      pix_data;
  req_case_e acc_case;
  logic [NUM_BANKS-1:0] bank_open;
  logic      sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n;
  bank_t     sd_ba;
  logic [ADDR_BITS-1:0] sd_a;
  pix_t      sd_dq;
  logic      dq_valid;
  int        violations, n_act, n_pre, n_read;

  mc_sdram_ctrl dut (
    .clk, .rst_n, .req_valid, .req_ready, .req, .pix_valid, .pix_data, .pix_last,
    .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_a, .sd_dq,
    .busy, .acc_valid, .acc_case, .bank_open);

  sdram_model #(.CL(2), .TRCD(2), .TRRD(2), .TRP(2)) mem (
    .clk, .active(rst_n), .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n), .we_n(sd_we_n),
    .ba(sd_ba), .a(sd_a), .dq(sd_dq), .dq_valid, .violations, .n_act, .n_pre, .n_read);

  int checks = 0, failures = 0;
  longint cyc = 0;
  logic [7:0] exp_q [$];
  longint t_first = -1, t_last = -1;

  // mechanism counters
  int n_case [4] = '{0, 0, 0, 0};
  int n_hit = 0, n_bankmiss = 0, n_conflict = 0, n_pipelined = 0, n_reqs = 0;
  int cur_act = 0, cur_pre = 0;
  logic have_cur = 0;

  always @(posedge clk) begin
    sd_cmd_e c;
    cyc <= cyc + 1;
    c = sd_cmd_e'({sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n});
    if (rst_n && c != SD_NOP && t_first < 0) t_first <= cyc;
    // commands on the bus belong to the latest accepted request
    if (c == SD_ACT) cur_act++;
    if (c == SD_PRE) cur_pre++;
    if (rst_n && acc_valid) begin
      if (have_cur) begin
        if (cur_pre != 0)      n_conflict++;
        else if (cur_act != 0) n_bankmiss++;
        else                   n_hit++;
      end
      have_cur = 1; cur_act = 0; cur_pre = 0;
      n_reqs++;
      n_case[acc_case]++;
      if (busy) n_pipelined++;
    end
    if (rst_n && pix_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected pixel @%0d", cyc);
      end else begin
        logic [7:0] e;
        e = exp_q.pop_front();
        if (e != pix_data) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %h want %h @%0d", pix_data, e, cyc);
        end
      end
      if (pix_last) t_last <= cyc;
    end
  end

  task automatic push_expect(treq_t t);
    for (int i = 0; i < t.h; i++)
      for (int j = 0; j < t.w; j++) begin
        loc_t l;
        l = ref_loc(t.r, t.x + j, t.y + i);
        exp_q.push_back(pattern(l.bank, l.row, l.col));
      end
  endtask

  // present a request from a falling edge and hold it until accepted
  task automatic send(treq_t t);
    @(negedge clk);
    req       = '{ref_idx: refidx_t'(t.r), x: xcoord_t'(t.x), y: ycoord_t'(t.y),
                  w: len_t'(t.w), h: len_t'(t.h)};
    req_valid = 1;
    while (!req_ready) @(negedge clk);
    push_expect(t);
    @(posedge clk);
    #1 req_valid = 0;
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  task automatic run_frame(string name, int unsigned fw, int unsigned fh);
    treq_t q [$];
    longint c0, pix0, c_end;
    int pre0, req0, conf0;
    gen_frame(fw, fh, q);
    c0 = cyc; pre0 = n_pre; req0 = n_reqs; conf0 = n_conflict;
    pix0 = n_read;
    foreach (q[i]) send(q[i]);
    drain();
    c_end = cyc;
    $display("%-6s %0dx%0d: %0d requests, %0d pixels, %0d cycles (%.3f per pixel), %0d precharge-alls (%.1f %% of requests)",
             name, fw, fh, n_reqs - req0, n_read - pix0, c_end - c0,
             real'(c_end - c0) / real'(n_read - pix0), n_pre - pre0,
             100.0 * real'(n_pre - pre0) / real'(n_reqs - req0));
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    treq_t t;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);

    // closed banks, one row: L+4
    t = '{r: 0, x: 64 + 8, y: 32 + 8, w: 16, h: 16};
    send(t);
    drain();
    checks++;
    if (t_last - t_first != 16 * 16 + 4) begin
      failures++;
      $display("FAIL first request took %0d cycles, want L+4 = %0d", t_last - t_first, 16 * 16 + 4);
    end

    run_frame("QCIF",  176, 144);
    run_frame("CIF",   352, 288);
    run_frame("525SD", 720, 480);
    run_frame("720HD", 1280, 720);

    // close the statistics of the last request
    if (cur_pre != 0) n_conflict++; else if (cur_act != 0) n_bankmiss++; else n_hit++;

    $display("requests %0d: case1 %0d, case2 %0d, case3 %0d", n_reqs, n_case[1], n_case[2], n_case[3]);
    $display("row hit %0d, idle banks opened %0d, precharge-all first %0d, accepted while busy %0d",
             n_hit, n_bankmiss, n_conflict, n_pipelined);
    foreach (n_case[k]) if (k > 0) begin
      checks++;
      if (n_case[k] == 0) begin failures++; $display("FAIL no case %0d request", k); end
    end
    checks += 4;
    if (n_hit == 0)       begin failures++; $display("FAIL no row-hit request"); end
    if (n_bankmiss == 0)  begin failures++; $display("FAIL no request opening idle banks only"); end
    if (n_conflict == 0)  begin failures++; $display("FAIL no precharge-all"); end
    if (n_pipelined == 0) begin failures++; $display("FAIL no request accepted while busy"); end
    checks++;
    if (violations != 0) begin failures++; $display("FAIL %0d SDRAM timing violations", violations); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d pixels missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
