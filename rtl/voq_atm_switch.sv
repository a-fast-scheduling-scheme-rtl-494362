// voq_atm_switch: N x N input-buffered ATM switch with virtual output
// queues and the single-iteration grant-passing scheduler.
//
// Cells arrive at the N inputs tagged with their output port and wait in
// the VOQs of their input (voq_input). Once per time slot the scheduler
// (pgp_scheduler) computes a matching of inputs to outputs: one random
// request-grant iteration, then N sub-intervals in which excess grants of
// inputs granted by several outputs are passed on to following inputs that
// have no grant, then one accept per input. In the last cycle of the slot
// each matched input dequeues the head cell of the accepted VOQ, and the
// crossbar delivers it to its output one cycle later.
//
// Timing: a slot is N+3 cycles; each input sends at most one cell and each
// output receives at most one cell per slot. Under saturated VOQs the
// grant passing aims to match every input in each slot (100% throughput)
// without further matching iterations.
//
// Interface:
//   in_valid[i], in_dest[i], in_cell[i], in_ready[i] : cell arrival at
//       input i for output in_dest[i]; taken at the edge when in_ready[i]
//   out_valid[j], out_cell[j] : cell leaving output j (one-cycle pulse)
//   slot_end  : high in the accept cycle that closes a slot
//   match     : the matching of that slot ([input][output]), valid with slot_end
//   enable    : scheduling runs while high
//   sched_request, sched_grant, sched_fire : observation of the scheduler's
//       Request(i,j) and Grant(i,j) cells and of the grant passes of the
//       current cycle (see grant_pass_matrix)
module voq_atm_switch #(
  parameter int N      = 4,
  parameter int CELL_W = 424,
  parameter int DEPTH  = 16,
  localparam int PW    = $clog2(N),
  localparam int AW    = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     enable,
  input  logic [N-1:0]             in_valid,
  input  logic [N-1:0][PW-1:0]     in_dest,
  input  logic [N-1:0][CELL_W-1:0] in_cell,
  output logic [N-1:0]             in_ready,
  output logic [N-1:0]             out_valid,
  output logic [N-1:0][CELL_W-1:0] out_cell,
  output logic                     slot_end,
  output logic [N-1:0][N-1:0]      match,
  output logic [N-1:0][N-1:0]      sched_request,
  output logic [N-1:0][N-1:0]      sched_grant,
  output logic [N-1:0][N-1:0]      sched_fire
);
  import atm_sched_pkg::*;

  logic [N-1:0][N-1:0]      voq_req;
  logic [N-1:0][CELL_W-1:0] head_cell;
  logic [N-1:0]             deq;
  logic [N-1:0][PW-1:0]     deq_sel;

  // Scheduler state not brought out of the switch.
  phase_e              phase;
  logic [N-1:0][N-1:0] and_gate;
  logic [N-1:0]        multigrant, t;

  for (genvar i = 0; i < N; i++) begin : g_in
    logic [N-1:0][AW:0] count;

    always_comb begin
      deq_sel[i] = '0;
      for (int j = 0; j < N; j++)
        if (match[i][j]) deq_sel[i] = PW'(j);
    end
    assign deq[i] = |match[i];

    voq_input #(.N(N), .CELL_W(CELL_W), .DEPTH(DEPTH)) u_voq (
      .clk, .rst_n,
      .in_valid(in_valid[i]), .in_dest(in_dest[i]), .in_cell(in_cell[i]),
      .in_ready(in_ready[i]),
      .deq(deq[i]), .deq_sel(deq_sel[i]), .head_cell(head_cell[i]),
      .nonempty(voq_req[i]), .count
    );
  end

  pgp_scheduler #(.N(N)) u_sched (
    .clk, .rst_n, .enable, .voq_req,
    .accept(slot_end), .match,
    .phase, .request(sched_request), .grant(sched_grant), .multigrant, .and_gate,
    .fire(sched_fire), .t
  );

  crossbar #(.N(N), .CELL_W(CELL_W)) u_xbar (
    .clk, .rst_n, .match, .in_cell(head_cell), .out_valid, .out_cell
  );
endmodule
