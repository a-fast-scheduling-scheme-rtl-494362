// random_select: picks one set bit of a request vector, starting the search
// at a given position and wrapping around (a rotating-priority pick).
//
// With `start` drawn at random, every requester of a fully requested vector
// is chosen with equal probability; this is how the arbiters turn the
// "random selection" of the scheduling scheme into logic. Purely
// combinational: `pick` is one-hot, or all zero when `req` is zero.
module random_select #(
  parameter int N = 4
) (
  input  logic [N-1:0]         req,
  input  logic [$clog2(N)-1:0] start,
  output logic [N-1:0]         pick
);
  always_comb begin
    logic                 found;
    logic [$clog2(N)-1:0] idx;
    pick  = '0;
    found = 1'b0;
    for (int k = 0; k < N; k++) begin
      idx = $clog2(N)'((int'(start) + k) % N);
      if (!found && req[idx]) begin
        pick[idx] = 1'b1;
        found     = 1'b1;
      end
    end
  end
endmodule
