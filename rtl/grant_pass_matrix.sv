// grant_pass_matrix: the output-grant passing circuit of an N x N switch.
//
// Holds the Request(i,j) and Grant(i,j) storage cells (i = input, j =
// output, both 0-based here; the scheme numbers them from 1). After the
// single matching iteration has loaded the grants, an excess grant is moved
// from a multi-granted input to the next input:
//   And(i,j) = Grant(i,j) & Request(i+1,j) & MultiGrant(i)
// and when the ring-counter pulse assigned to that gate is active the grant
// moves: Grant(i,j) is cleared and Grant(i+1,j) is set (input N-1 passes to
// input 0). Pulse T(k+1) enables the gates with i + j = k (mod N), which is
// the schedule of Table 1 of the scheme: one gate per output column and one
// per input row in every sub-interval, so a grant moves at most one input
// per sub-interval and a multi-granted input never loses its last grant.
// Because an output grants one input only, a column never holds more than
// one grant; an assertion checks this.
//
// The storage cells are edge-triggered flip-flops here (the scheme speaks
// of latches); one clock cycle is one sub-interval and all gates of a
// sub-interval are evaluated on the state at its start.
//
// Interface and timing:
//   req_load   : Request <= req_in at the next edge
//   grant_load : Grant   <= grant_in at the next edge
//   t          : one-hot T lines (or zero); a pass takes effect at the edge
//                that ends the cycle in which its T line is high
//   clear      : both matrices cleared at the next edge (end of time slot)
//   and_gate   : the And(i,j) signals (without the T gating)
//   fire       : And(i,j) gated by its T line, i.e. the passes of this cycle
module grant_pass_matrix #(
  parameter int N = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                req_load,
  input  logic [N-1:0][N-1:0] req_in,
  input  logic                grant_load,
  input  logic [N-1:0][N-1:0] grant_in,
  input  logic [N-1:0]        t,
  output logic [N-1:0][N-1:0] request,
  output logic [N-1:0][N-1:0] grant,
  output logic [N-1:0]        multigrant,
  output logic [N-1:0][N-1:0] and_gate,
  output logic [N-1:0][N-1:0] fire
);
  import atm_sched_pkg::*;

  logic [N-1:0][N-1:0] grant_next;

  for (genvar i = 0; i < N; i++) begin : g_row
    multigrant_detect #(.N(N)) u_mg (.grant_row(grant[i]), .multigrant(multigrant[i]));

    for (genvar j = 0; j < N; j++) begin : g_col
      localparam int NEXT = (i + 1) % N;
      localparam int PREV = (i + N - 1) % N;
      localparam int K    = pass_slot(i, j, N);
      assign and_gate[i][j]   = grant[i][j] & request[NEXT][j] & multigrant[i];
      assign fire[i][j]       = and_gate[i][j] & t[K];
      assign grant_next[i][j] = (grant[i][j] & ~fire[i][j]) | fire[PREV][j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      request <= '0;
      grant   <= '0;
    end else if (clear) begin
      request <= '0;
      grant   <= '0;
    end else begin
      if (req_load) request <= req_in;
      if (grant_load) grant <= grant_in;
      else            grant <= grant_next;
    end
  end

  // An output grants one input only, and passing keeps it that way; hence
  // at most one And gate of a column is high at any time.
  for (genvar j = 0; j < N; j++) begin : g_chk
    logic [N-1:0] col, and_col;
    for (genvar i = 0; i < N; i++) begin : g_i
      assign col[i]     = grant[i][j];
      assign and_col[i] = and_gate[i][j];
    end
    a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $countones(col) <= 1)
      else $error("grant_pass_matrix: output %0d granted to several inputs", j);
    a_one_and: assert property (@(posedge clk) disable iff (!rst_n) $countones(and_col) <= 1)
      else $error("grant_pass_matrix: several And gates high for output %0d", j);
  end
endmodule
