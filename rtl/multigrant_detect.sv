// multigrant_detect: MultiGrant(i) of one input row.
//
// High when the input holds more than one grant. Built exactly as the
// sum-of-products form of the scheme:
//   F(i,0) = OR over j of Grant(i,j)                  (at least one grant)
//   F(i,k) = NOT Grant(i,k) OR (OR over j != k of Grant(i,j))
//            (grant k is not the only one)
//   MultiGrant(i) = F(i,0) AND (AND over k of F(i,k))
// Purely combinational; `grant_row[j]` is Grant(i,j).
module multigrant_detect #(
  parameter int N = 4
) (
  input  logic [N-1:0] grant_row,
  output logic         multigrant
);
  logic         f0;
  logic [N-1:0] fk;

  assign f0 = |grant_row;

  for (genvar k = 0; k < N; k++) begin : g_fk
    logic [N-1:0] others;
    always_comb begin
      others    = grant_row;
      others[k] = 1'b0;
    end
    assign fk[k] = ~grant_row[k] | (|others);
  end

  assign multigrant = f0 & (&fk);
endmodule
