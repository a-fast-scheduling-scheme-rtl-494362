// input_accept_arbiter: the accept step of one input port.
//
// After grant passing an input normally holds one grant; when it still
// holds several (the next input did not request that output, so an excess
// grant could not be passed on) it accepts one of them at random, as in the
// accept step of parallel iterative matching. The random choice is a
// rotating-priority pick started at a position from a private 16-bit LFSR
// (value mod N), which advances once per time slot on `step`.
//
// Interface: `grant[j]` is Grant(this input, j); `accept` is one-hot over
// the outputs, or zero when the input holds no grant. Combinational from
// `grant` and the LFSR state.
module input_accept_arbiter #(
  parameter int          N    = 4,
  parameter logic [15:0] SEED = 16'h5A3C
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic [N-1:0] grant,
  output logic [N-1:0] accept
);
  logic [15:0]          rnd;
  logic [$clog2(N)-1:0] start;

  lfsr16 #(.SEED(SEED)) u_rng (.clk, .rst_n, .step, .value(rnd));

  assign start = $clog2(N)'(rnd % 16'(N));

  random_select #(.N(N)) u_pick (.req(grant), .start, .pick(accept));
endmodule
