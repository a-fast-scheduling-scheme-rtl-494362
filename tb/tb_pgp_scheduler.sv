// tb_pgp_scheduler: runs the scheduler for many slots on random and on
// saturated VOQ occupancy and checks every slot:
//   - the slot is N + 3 cycles long and the requests are the VOQ state
//     sampled in its first cycle;
//   - after the single iteration each output grants exactly one of its
//     requesting inputs (none if no input requests it);
//   - during T1..TN the grant matrix follows a model of the passing rule
//     written here from Table 1 of the scheme;
//   - the matching accepts exactly one grant of every input holding one.
// Under saturation the share of matched inputs must beat one iteration of
// parallel matching, 1 - (1 - 1/N)^N; the measured figure is printed.
module tb_pgp_scheduler;
  import atm_sched_pkg::*;
  localparam int N = 4;
  localparam int SLOTS = 4000;
  typedef logic [N-1:0][N-1:0] mat_t;

  int checks = 0, failures = 0;
  int passes = 0, multi_at_accept = 0, sat_slots = 0, sat_matched = 0, one_iter_matched = 0;

  logic clk = 0, rst_n = 0, enable = 0;
  mat_t voq_req = '0, match, request, grant, and_gate, fire;
  logic accept;
  phase_e phase;
  logic [N-1:0] multigrant, t;

  pgp_scheduler #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (SLOTS * slot_cycles(N) + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int row_count(mat_t g, int i);
    int c = 0;
    for (int j = 0; j < N; j++) c += g[i][j];
    return c;
  endfunction

  function automatic mat_t model_step(mat_t g, mat_t r, int k);
    mat_t nxt = g;
    for (int j = 0; j < N; j++) begin
      int from = ((k - j) % N + N) % N;
      int to   = (from + 1) % N;
      if (g[from][j] && r[to][j] && row_count(g, from) > 1) begin
        nxt[from][j] = 1'b0;
        nxt[to][j]   = 1'b1;
      end
    end
    return nxt;
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("[%0t] %s", $time, msg);
  endtask

  initial begin
    mat_t r, m;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    enable = 1;
    for (int s = 0; s < SLOTS; s++) begin
      automatic bit sat = (s % 2 == 0);
      automatic int len = 1;
      r = sat ? '1 : mat_t'({$urandom, $urandom});
      voq_req = r;
      // request cycle
      #1;
      checks++;
      if (phase != PH_REQUEST) fail("slot does not start in the request phase");
      @(negedge clk); len++;
      voq_req = mat_t'({$urandom, $urandom});   // later changes must not matter
      checks++;
      if (phase != PH_GRANT || request !== r) fail("requests not latched");
      @(negedge clk); len++;
      // grants of the single iteration
      m = grant;
      for (int j = 0; j < N; j++) begin
        automatic int cnt = 0, any = 0, ok = 1;
        for (int i = 0; i < N; i++) begin
          cnt += m[i][j];
          any |= r[i][j];
          if (m[i][j] && !r[i][j]) ok = 0;
        end
        checks++;
        if (cnt != any || !ok) fail($sformatf("output %0d: bad grant column", j));
      end
      if (sat) for (int i = 0; i < N; i++) one_iter_matched += (row_count(m, i) > 0);
      for (int k = 0; k < N; k++) begin
        checks++;
        if (phase != PH_PASS || t !== N'(1) << k || grant !== m)
          fail($sformatf("sub-interval T%0d: phase %s t=%b grant=%h model %h", k + 1, phase.name(), t, grant, m));
        passes += $countones(fire);
        m = model_step(m, r, k);
        @(negedge clk); len++;
      end
      // accept
      checks++;
      if (phase != PH_ACCEPT || !accept || grant !== m) fail("accept phase / grants after passing");
      for (int i = 0; i < N; i++) begin
        checks++;
        if ($countones(match[i]) != (row_count(m, i) > 0) || (match[i] & ~m[i]) != '0)
          fail($sformatf("input %0d: match %b with grants %b", i, match[i], m[i]));
        if (row_count(m, i) > 1) multi_at_accept++;
        if (sat && match[i] != '0) sat_matched++;
      end
      checks++;
      if (len != slot_cycles(N)) fail($sformatf("slot took %0d cycles", len));
      if (sat) sat_slots++;
      @(negedge clk);
    end
    begin
      real thr, one_iter, pim1;
      thr      = real'(sat_matched) / real'(sat_slots * N);
      one_iter = real'(one_iter_matched) / real'(sat_slots * N);
      pim1     = 1.0 - (1.0 - 1.0 / N) ** N;
      $display("saturated throughput: %f after passing, %f after the single iteration (formula %f)",
               thr, one_iter, pim1);
      checks++;
      if (!(thr > pim1 + 0.1)) fail("grant passing does not raise the throughput");
      checks++;
      if (passes == 0 || multi_at_accept == 0) fail("passing or a blocked excess grant never seen");
      $display("grants passed %0d, inputs still multi-granted at accept %0d", passes, multi_at_accept);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
