// lfsr16: 16-bit maximal-length Galois LFSR (taps 16,14,13,11) used as the
// random source of the grant and accept arbiters.
//
// The scheduling scheme selects requests and grants at random; this design
// approximates that with one pseudo-random generator per arbiter. The state
// advances by one step on every cycle `step` is high and restarts from SEED
// at reset. `value` is the current state (never zero).
module lfsr16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  output logic [15:0] value
);
  logic [15:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= (SEED == 16'd0) ? 16'h0001 : SEED;
    else if (step) state <= {1'b0, state[15:1]} ^ (state[0] ? 16'hB400 : 16'h0000);
  end

  assign value = state;
endmodule
