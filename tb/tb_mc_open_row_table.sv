// tb_mc_open_row_table: drives random activates, precharge-alls and
// queries and compares hit/conflict and the open-bank mask with a
// reference model kept in the testbench.
module tb_mc_open_row_table;
  import mc_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  act_valid = 0, prea_valid = 0;
  bank_t act_bank = '0;
  row_t  act_row = '0;
  bank_t q_bank [NUM_WIN];
  row_t  q_row  [NUM_WIN];
  logic [NUM_WIN-1:0] q_hit, q_conflict;
  logic [NUM_BANKS-1:0] bank_open;
  int checks = 0, failures = 0;
  int hits = 0, conflicts = 0;

  logic        m_open [NUM_BANKS];
  int unsigned m_row  [NUM_BANKS];

  mc_open_row_table dut (.clk(clk), .rst_n(rst_n), .act_valid(act_valid), .act_bank(act_bank),
                         .act_row(act_row), .prea_valid(prea_valid), .q_bank(q_bank), .q_row(q_row),
                         .q_hit(q_hit), .q_conflict(q_conflict), .bank_open(bank_open));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NUM_BANKS; b++) begin m_open[b] = 0; m_row[b] = 0; end
    for (int q = 0; q < NUM_WIN; q++) begin q_bank[q] = '0; q_row[q] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      // compare queries set up on the previous negedge with the model
      for (int q = 0; q < NUM_WIN; q++) begin
        logic want_hit, want_conf;
        want_hit  = m_open[q_bank[q]] && m_row[q_bank[q]] == q_row[q];
        want_conf = m_open[q_bank[q]] && m_row[q_bank[q]] != q_row[q];
        checks++;
        if (q_hit[q] != want_hit || q_conflict[q] != want_conf) begin
          failures++;
          if (failures < 10) $display("FAIL query %0d bank %0d row %0d: hit %b conf %b want %b %b",
                                      q, q_bank[q], q_row[q], q_hit[q], q_conflict[q], want_hit, want_conf);
        end
        hits += int'(want_hit);
        conflicts += int'(want_conf);
      end
      for (int b = 0; b < NUM_BANKS; b++) begin
        checks++;
        if (bank_open[b] != m_open[b]) begin
          failures++;
          $display("FAIL bank %0d open %b want %b", b, bank_open[b], m_open[b]);
        end
      end
      // next operation; rows drawn from a small set so hits happen
      act_valid  = 0;
      prea_valid = 0;
      case ($urandom_range(9))
        0:       prea_valid = 1;
        1,2,3,4: begin
          act_valid = 1;
          act_bank  = bank_t'($urandom_range(NUM_BANKS-1));
          act_row   = row_t'($urandom_range(3));
        end
        default: ;
      endcase
      if (prea_valid) for (int b = 0; b < NUM_BANKS; b++) m_open[b] = 0;
      else if (act_valid) begin m_open[act_bank] = 1; m_row[act_bank] = act_row; end
      @(posedge clk);
      #1;
      act_valid = 0; prea_valid = 0;
      for (int q = 0; q < NUM_WIN; q++) begin
        q_bank[q] = bank_t'($urandom_range(NUM_BANKS-1));
        q_row[q]  = row_t'($urandom_range(3));
      end
    end
    checks++;
    if (hits == 0 || conflicts == 0) begin failures++; $display("FAIL no hit or no conflict seen"); end
    $display("hits=%0d conflicts=%0d", hits, conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
