// tb_grant_pass_matrix: checks the grant-passing circuit of a 4x4 switch.
//
// First the worked 4x4 example of the scheme: every input requests every
// output; input 1 holds the grants of outputs 3 and 4, input 2 that of
// output 1, input 3 none and input 4 that of output 2 (1-based). Nothing
// may move in T1 and T2, Grant(1,3) must move to input 2 in T3 and on to
// input 3 in T4, leaving every input with one grant.
// Then random request matrices with random legal grants (each output
// grants one of its requesters) are run through T1..T4 and the grant
// matrix is compared after every sub-interval with a model written from
// Table 1 of the scheme (pulse Tk serves input (k - j) mod N of output j).
module tb_grant_pass_matrix;
  localparam int N = 4;
  localparam int RANDOM_SLOTS = 3000;
  typedef logic [N-1:0][N-1:0] mat_t;

  int checks = 0, failures = 0;
  int full_slots = 0, sat_slots = 0, passes_seen = 0;

  logic clk = 0, rst_n = 0;
  logic clear = 0, req_load = 0, grant_load = 0;
  mat_t req_in, grant_in, request, grant, and_gate, fire;
  logic [N-1:0] t = '0, multigrant;

  grant_pass_matrix #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (RANDOM_SLOTS * (N + 4) + 200) @(posedge clk);
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

  // One sub-interval, Table 1: during pulse k (0-based) output j may pass
  // from input (k - j) mod N to the next input.
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

  task automatic check_mat(string what, mat_t exp);
    checks++;
    if (grant !== exp) begin
      failures++;
      $display("%s: grant=%h expected %h", what, grant, exp);
    end
  endtask

  // Loads a slot and runs the N sub-intervals, checking after each one.
  task automatic run_slot(mat_t r, mat_t g, output mat_t final_g);
    mat_t m = g;
    req_in   <= r;
    req_load <= 1;
    @(posedge clk);
    req_load   <= 0;
    grant_in   <= g;
    grant_load <= 1;
    @(posedge clk);
    grant_load <= 0;
    #1 check_mat("after grant load", m);
    for (int k = 0; k < N; k++) begin
      t <= N'(1) << k;
      @(posedge clk);
      passes_seen += $countones(fire);
      m = model_step(m, r, k);
      #1 check_mat($sformatf("after T%0d", k + 1), m);
    end
    t <= '0;
    final_g = m;
    clear <= 1;
    @(posedge clk);
    clear <= 0;
    #1 check_mat("after clear", '0);
  endtask

  function automatic mat_t random_grants(mat_t r);
    mat_t g = '0;
    for (int j = 0; j < N; j++) begin
      int cand [$];
      for (int i = 0; i < N; i++) if (r[i][j]) cand.push_back(i);
      if (cand.size() > 0) g[cand[$urandom_range(cand.size() - 1)]][j] = 1'b1;
    end
    return g;
  endfunction

  initial begin
    mat_t r, g, fin;
    req_in   = '0;
    grant_in = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // ---- worked example (0-based indices) ----
    r = '1;
    g = '0;
    g[0][2] = 1; g[0][3] = 1;  // input 1: outputs 3 and 4
    g[1][0] = 1;               // input 2: output 1
    g[3][1] = 1;               // input 4: output 2
    req_in   <= r;
    req_load <= 1;
    @(posedge clk);
    req_load   <= 0;
    grant_in   <= g;
    grant_load <= 1;
    @(posedge clk);
    grant_load <= 0;
    #1;
    checks++;
    if (multigrant !== 4'b0001) begin failures++; $display("example: multigrant=%b", multigrant); end
    t <= 4'b0001;  @(posedge clk); #1 check_mat("example T1", g);
    t <= 4'b0010;  @(posedge clk); #1 check_mat("example T2", g);
    checks++;
    if (and_gate[0][2] !== 1'b1 || fire !== '0) begin failures++; $display("example: And(1,3) not ready"); end
    t <= 4'b0100;  @(posedge clk);
    g[0][2] = 0; g[1][2] = 1;
    #1 check_mat("example T3", g);
    checks++;
    if (multigrant !== 4'b0010) begin failures++; $display("example: after T3 multigrant=%b", multigrant); end
    t <= 4'b1000;  @(posedge clk);
    g[1][2] = 0; g[2][2] = 1;
    #1 check_mat("example T4", g);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (row_count(grant, i) != 1) begin failures++; $display("example: input %0d holds %0d grants", i + 1, row_count(grant, i)); end
    end
    t <= '0;
    clear <= 1; @(posedge clk); clear <= 0;

    // ---- random slots ----
    for (int s = 0; s < RANDOM_SLOTS; s++) begin
      automatic int matched = 0;
      r = (s % 2 == 0) ? '1 : mat_t'({$urandom, $urandom});
      g = random_grants(r);
      run_slot(r, g, fin);
      if (r == '1) begin
        sat_slots++;
        for (int i = 0; i < N; i++) matched += (row_count(fin, i) > 0);
        if (matched == N) full_slots++;
      end
    end
    checks++;
    if (passes_seen == 0) begin failures++; $display("no grant was ever passed"); end
    $display("saturated slots with every input granted: %0d of %0d; grants passed: %0d",
             full_slots, sat_slots, passes_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
