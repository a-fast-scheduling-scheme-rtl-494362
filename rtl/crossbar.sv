// crossbar: the N x N switch fabric.
//
// Connects every matched input to its matched output for one cell time and
// registers the result: out_valid[j]/out_cell[j] carry, one cycle after the
// match, the cell of the input i with match[i][j] high. The match must be a
// partial permutation (at most one bit per row and per column), which the
// scheduler guarantees; each output is an AND-OR multiplexer over the
// inputs. The fabric itself is only named by the scheme; the registered
// AND-OR structure is this design's choice.
module crossbar #(
  parameter int N      = 4,
  parameter int CELL_W = 424
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0][N-1:0]          match,    // [input][output]
  input  logic [N-1:0][CELL_W-1:0]     in_cell,  // per input
  output logic [N-1:0]                 out_valid,
  output logic [N-1:0][CELL_W-1:0]     out_cell
);
  logic [N-1:0]              v_next;
  logic [N-1:0][CELL_W-1:0]  c_next;

  always_comb begin
    v_next = '0;
    c_next = '0;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++)
        if (match[i][j]) begin
          v_next[j] = 1'b1;
          c_next[j] = c_next[j] | in_cell[i];
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_cell  <= '0;
    end else begin
      out_valid <= v_next;
      out_cell  <= c_next;
    end
  end
endmodule
