// sdram_model: behavioural model of the external SDR SDRAM, read side only.
// Not synthesizable logic: it stands in for the memory chip in simulation.
//
// It decodes, while `active` is high, {cs_n, ras_n, cas_n, we_n} at each rising clock edge, keeps
// the open row of each of the four banks, and returns for every READ the
// byte mc_tb_pkg::pattern(bank, open row, column) on dq exactly CL cycles
// after the READ was on the bus (dq_valid marks those cycles). It checks the
// timing the controller must obey and counts each breach in `violations`:
// READ to a closed bank or before tRCD, ACTIVATE to an open bank, ACTIVATE
// before tRRD after another ACTIVATE, ACTIVATE before tRP after a
// precharge. It also counts ACTIVATE, PRECHARGE and READ commands.
module sdram_model #(
  parameter int unsigned CL   = 2,
  parameter int unsigned TRCD = 2,
  parameter int unsigned TRRD = 2,
  parameter int unsigned TRP  = 2
) (
  input  logic        clk,
  input  logic        active,   // commands are decoded only while high
  input  logic        cs_n,
  input  logic        ras_n,
  input  logic        cas_n,
  input  logic        we_n,
  input  logic [1:0]  ba,
  input  logic [12:0] a,
  output logic [7:0]  dq,
  output logic        dq_valid,
  output int          violations,
  output int          n_act,
  output int          n_pre,
  output int          n_read
);
  import mc_tb_pkg::*;

  longint      cyc = 0;
  logic        open_q [4];
  int unsigned row_q  [4];
  longint      t_act  [4];
  longint      t_last_act = -100;
  longint      t_last_pre = -100;
  logic [7:0]  dpipe [CL];
  logic        vpipe [CL];

  initial begin
    violations = 0; n_act = 0; n_pre = 0; n_read = 0;
    for (int b = 0; b < 4; b++) begin open_q[b] = 1'b0; row_q[b] = 0; t_act[b] = -100; end
    for (int k = 0; k < CL; k++) begin dpipe[k] = '0; vpipe[k] = 1'b0; end
  end

  assign dq       = dpipe[CL-1];
  assign dq_valid = vpipe[CL-1];

  always @(posedge clk) begin
    logic [7:0] d;
    logic       v;
    d = '0;
    v = 1'b0;
    if (active && !cs_n) begin
      case ({ras_n, cas_n, we_n})
        3'b011: begin  // ACTIVATE
          n_act++;
          if (open_q[ba])              begin violations++; $display("SDRAM: ACT to open bank %0d @%0d", ba, cyc); end
          if (cyc - t_last_act < longint'(TRRD)) begin violations++; $display("SDRAM: tRRD @%0d", cyc); end
          if (cyc - t_last_pre < longint'(TRP))  begin violations++; $display("SDRAM: tRP @%0d", cyc); end
          open_q[ba] = 1'b1;
          row_q[ba]  = int'(a);
          t_act[ba]  = cyc;
          t_last_act = cyc;
        end
        3'b101: begin  // READ
          n_read++;
          if (!open_q[ba])             begin violations++; $display("SDRAM: READ closed bank %0d @%0d", ba, cyc); end
          else if (cyc - t_act[ba] < longint'(TRCD)) begin violations++; $display("SDRAM: tRCD @%0d", cyc); end
          d = pattern(int'(ba), row_q[ba], int'({a[11], a[9:0]}));
          v = 1'b1;
        end
        3'b010: begin  // PRECHARGE
          n_pre++;
          if (a[10]) for (int b = 0; b < 4; b++) open_q[b] = 1'b0;
          else       open_q[ba] = 1'b0;
          t_last_pre = cyc;
        end
        default: ;
      endcase
    end
    for (int k = CL-1; k > 0; k--) begin dpipe[k] <= dpipe[k-1]; vpipe[k] <= vpipe[k-1]; end
    dpipe[0] <= d;
    vpipe[0] <= v;
    cyc++;
  end

endmodule
