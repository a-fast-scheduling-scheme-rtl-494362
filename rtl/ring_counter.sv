// ring_counter: produces the grant-passing pulses T1..TN.
//
// A one-hot ring of N flip-flops, each driving its own T line. `start`
// loads T1, every cycle with `advance` moves the token to the next line
// (TN wraps to T1) and `clear` empties the ring so that no T line is
// active. One clock cycle is one sub-interval, so a full turn divides the
// part of the slot left after the matching iteration into N equal
// sub-intervals. `t[k]` is T(k+1). Priority: clear, then start, then advance.
module ring_counter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         start,
  input  logic         advance,
  output logic [N-1:0] t
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       t <= '0;
    else if (clear)   t <= '0;
    else if (start)   t <= N'(1);
    else if (advance) t <= {t[N-2:0], t[N-1]};
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $countones(t) <= 1)
    else $error("ring_counter: more than one T line active");
endmodule
