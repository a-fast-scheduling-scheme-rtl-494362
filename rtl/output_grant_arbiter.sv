// output_grant_arbiter: the grant step of one output port.
//
// When the output receives requests from several inputs it grants exactly
// one of them, chosen at random (the single request-grant iteration of the
// scheduling scheme). The random choice is a rotating-priority pick whose
// starting input is taken from a private 16-bit LFSR (value mod N); the
// LFSR advances once per time slot on `step`, so successive slots use fresh
// random numbers. Different SEEDs keep the N output arbiters uncorrelated.
//
// Interface: `req[i]` is Request(i, this output); `grant` is one-hot over
// the inputs, or zero when no input requests. `grant` is combinational from
// `req` and the LFSR state; the caller latches it.
module output_grant_arbiter #(
  parameter int          N    = 4,
  parameter logic [15:0] SEED = 16'h1D2B
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);
  logic [15:0]          rnd;
  logic [$clog2(N)-1:0] start;

  lfsr16 #(.SEED(SEED)) u_rng (.clk, .rst_n, .step, .value(rnd));

  assign start = $clog2(N)'(rnd % 16'(N));

  random_select #(.N(N)) u_pick (.req, .start, .pick(grant));
endmodule
