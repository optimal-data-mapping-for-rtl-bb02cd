// mc_open_row_table: which row is open in each SDRAM bank.
//
// Rows are left open when a request ends, so the next request, whose
// reference area mostly overlaps the last one, can read them again without
// a new activation. This table mirrors the banks' state: an ACTIVATE records
// its bank and row, a PRECHARGE-ALL closes every bank (the controller only
// ever closes all banks at once, which costs one command instead of one per
// bank). For NUM_Q queried (bank, row) pairs it reports, combinationally,
// a hit (that row is already open) or a conflict (another row is open in
// that bank, so the bank must be precharged first). A bank that is closed
// gives neither.
//
// Keeping rows open between requests and closing them with a single
// precharge-all follows the published inter-request scheme; the table
// itself is this design's way of doing it.
//
// Timing: updates take effect at the next rising clock edge; queries are
// combinational from the current state. rst_n (active low, synchronous)
// marks all banks closed.
module mc_open_row_table
  import mc_pkg::*;
#(
  parameter int unsigned NUM_Q = NUM_WIN
) (
  input  logic  clk,
  input  logic  rst_n,
  // updates
  input  logic  act_valid,
  input  bank_t act_bank,
  input  row_t  act_row,
  input  logic  prea_valid,
  // queries
  input  bank_t q_bank [NUM_Q],
  input  row_t  q_row  [NUM_Q],
  output logic [NUM_Q-1:0] q_hit,
  output logic [NUM_Q-1:0] q_conflict,
  // state, for observation
  output logic [NUM_BANKS-1:0] bank_open
);

  row_t open_row [NUM_BANKS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bank_open <= '0;
      for (int b = 0; b < NUM_BANKS; b++) open_row[b] <= '0;
    end else if (prea_valid) begin
      bank_open <= '0;
    end else if (act_valid) begin
      bank_open[act_bank] <= 1'b1;
      open_row[act_bank]  <= act_row;
    end
  end

  always_comb begin
    for (int q = 0; q < NUM_Q; q++) begin
      q_hit[q]      =  bank_open[q_bank[q]] && (open_row[q_bank[q]] == q_row[q]);
      q_conflict[q] =  bank_open[q_bank[q]] && (open_row[q_bank[q]] != q_row[q]);
    end
  end

  // an activate and a precharge-all never share a command slot
  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n) !(act_valid && prea_valid));

endmodule
