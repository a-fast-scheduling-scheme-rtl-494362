// tb_saturation_sweep: throughput of the scheduler under saturated VOQs
// (every VOQ always holds a cell) for switches of 4, 8, 16 and 32 ports.
//
// For each size the grants of the single iteration and the final matching
// are recorded over SLOTS slots. Checks per slot: the matching is a
// partial permutation contained in the grants. Checks per size: the share
// of inputs granted after the single iteration is within 0.03 of the
// analytic value 1 - (1 - 1/N)^N, and grant passing raises the share of
// matched inputs by at least 0.15 above it. The measured figures are
// printed for comparison with the 100 % the scheme aims at.
module tb_saturation_sweep;
  import atm_sched_pkg::*;
  localparam int NS = 4;
  localparam int SIZES [NS] = '{4, 8, 16, 32};
  localparam int SLOTS = 1000;

  int checks = 0, failures = 0;
  int done = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (SLOTS * slot_cycles(32) + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NS; g++) begin : g_size
    localparam int N = SIZES[g];
    typedef logic [N-1:0][N-1:0] mat_t;
    logic accept;
    mat_t match, request, grant, and_gate, fire;
    phase_e phase;
    logic [N-1:0] multigrant, t;
    int slots = 0, matched = 0, granted1 = 0, full = 0, passes = 0;

    pgp_scheduler #(.N(N)) dut (
      .clk, .rst_n, .enable(1'b1), .voq_req('1), .accept, .match, .phase, .request,
      .grant, .multigrant, .and_gate, .fire, .t
    );

    always @(negedge clk) if (rst_n && slots < SLOTS) begin
      passes += $countones(fire);
      if (phase == PH_PASS && t[0]) begin
        for (int i = 0; i < N; i++) granted1 += (grant[i] != '0);
      end
      if (accept) begin
        automatic int nm = 0;
        automatic bit ok = 1;
        for (int i = 0; i < N; i++) begin
          if ($countones(match[i]) != (grant[i] != '0) || (match[i] & ~grant[i]) != '0) ok = 0;
          nm += (match[i] != '0);
        end
        for (int j = 0; j < N; j++) begin
          automatic int c = 0;
          for (int i = 0; i < N; i++) c += match[i][j];
          if (c > 1) ok = 0;
        end
        checks++;
        if (!ok) begin failures++; $display("N=%0d: bad matching %h", N, match); end
        matched += nm;
        full += (nm == N);
        slots++;
        if (slots == SLOTS) begin
          real thr, one, pim1;
          thr  = real'(matched) / real'(SLOTS * N);
          one  = real'(granted1) / real'(SLOTS * N);
          pim1 = 1.0 - (1.0 - 1.0 / N) ** N;
          $display("N=%2d: single iteration %f (formula %f), after passing %f, fully matched slots %0d of %0d, passes %0d",
                   N, one, pim1, thr, full, SLOTS, passes);
          checks++;
          if (one < pim1 - 0.03 || one > pim1 + 0.03) begin failures++; $display("N=%0d: single iteration off the formula", N); end
          checks++;
          if (thr < pim1 + 0.15) begin failures++; $display("N=%0d: passing gains too little", N); end
          done++;
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    wait (done == NS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
