// pgp_scheduler: single-iteration parallel matching with output-grant
// passing, producing one input-output matching per time slot.
//
// Every slot (see slot_controller for the cycle plan):
//   1. Request(i,j) is latched for every non-empty VOQ(i,j).
//   2. One request-grant iteration: each output grants one requesting
//      input at random (output_grant_arbiter), latched into Grant(i,j).
//   3. N sub-intervals T1..TN (ring_counter) in which grant_pass_matrix
//      moves excess grants from multi-granted inputs towards following
//      inputs that request the same output, one input per sub-interval.
//   4. Each input accepts one of the grants it holds (input_accept_arbiter);
//      with saturated VOQs it then normally holds exactly one.
// The passing replaces the further iterations of parallel iterative
// matching. A slot takes N+3 cycles; the matching is valid in the cycle
// `accept` is high (the last cycle of the slot).
//
// Interface: `voq_req[i][j]` is high when VOQ(i,j) holds a cell; it is
// sampled in the PH_REQUEST cycle. `match[i][j]` is one-hot per row and
// per column and is only meaningful while `accept` is high. The remaining
// outputs expose internal state for observation.
module pgp_scheduler #(
  parameter int N = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  enable,
  input  logic [N-1:0][N-1:0]   voq_req,
  output logic                  accept,
  output logic [N-1:0][N-1:0]   match,
  output atm_sched_pkg::phase_e phase,
  output logic [N-1:0][N-1:0]   request,
  output logic [N-1:0][N-1:0]   grant,
  output logic [N-1:0]          multigrant,
  output logic [N-1:0][N-1:0]   and_gate,
  output logic [N-1:0][N-1:0]   fire,
  output logic [N-1:0]          t
);
  import atm_sched_pkg::*;

  logic req_load, grant_load, ring_start, ring_advance, ring_clear, slot_clear;
  logic [N-1:0][N-1:0] grant_in;   // [i][j], from the output arbiters
  logic [N-1:0][N-1:0] acc;

  slot_controller u_ctrl (
    .clk, .rst_n, .enable,
    .t_last(t[N-1]),
    .phase, .req_load, .grant_load, .ring_start, .ring_advance, .ring_clear,
    .accept, .slot_clear
  );

  ring_counter #(.N(N)) u_ring (
    .clk, .rst_n, .clear(ring_clear), .start(ring_start), .advance(ring_advance), .t
  );

  // Output side: one random grant per output over the latched requests.
  for (genvar j = 0; j < N; j++) begin : g_out
    logic [N-1:0] col_req, col_grant;
    for (genvar i = 0; i < N; i++) begin : g_i
      assign col_req[i]     = request[i][j];
      assign grant_in[i][j] = col_grant[i];
    end
    output_grant_arbiter #(.N(N), .SEED(16'h1D2B + 16'(j) * 16'h0F31)) u_arb (
      .clk, .rst_n, .step(grant_load), .req(col_req), .grant(col_grant)
    );
  end

  grant_pass_matrix #(.N(N)) u_pass (
    .clk, .rst_n,
    .clear(slot_clear),
    .req_load, .req_in(voq_req),
    .grant_load, .grant_in,
    .t,
    .request, .grant, .multigrant, .and_gate, .fire
  );

  // Input side: accept one of the grants still held.
  for (genvar i = 0; i < N; i++) begin : g_in
    input_accept_arbiter #(.N(N), .SEED(16'h5A3C + 16'(i) * 16'h2E47)) u_acc (
      .clk, .rst_n, .step(accept), .grant(grant[i]), .accept(acc[i])
    );
  end

  assign match = accept ? acc : '0;

  // The matching is a partial permutation.
  for (genvar j = 0; j < N; j++) begin : g_chk
    logic [N-1:0] col;
    for (genvar i = 0; i < N; i++) begin : g_i
      assign col[i] = match[i][j];
    end
    a_out_once: assert property (@(posedge clk) disable iff (!rst_n) $countones(col) <= 1)
      else $error("pgp_scheduler: output %0d matched twice", j);
    a_in_once: assert property (@(posedge clk) disable iff (!rst_n) $countones(match[j]) <= 1)
      else $error("pgp_scheduler: input %0d matched twice", j);
  end
endmodule
