// tb_output_grant_arbiter: the grant of one output. For random request
// vectors the grant must be a single requesting input (none without
// requests). With all inputs requesting, every input must be granted with
// about equal frequency, and with two requesters both must win sometimes.
module tb_output_grant_arbiter;
  localparam int N = 4;
  localparam int TRIALS = 4000;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, step = 0;
  logic [N-1:0] req, grant;
  int hist [N];

  output_grant_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * TRIALS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_legal();
    checks++;
    if (req == '0 ? grant != '0 : ($countones(grant) != 1 || (grant & ~req) != '0)) begin
      failures++;
      $display("req=%b grant=%b", req, grant);
    end
  endtask

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    step  <= 1;
    // random requests
    for (int n = 0; n < TRIALS; n++) begin
      req = N'($urandom);
      #1 check_legal();
      @(posedge clk);
    end
    // all requesting: uniform choice
    foreach (hist[i]) hist[i] = 0;
    req = '1;
    for (int n = 0; n < TRIALS; n++) begin
      #1 check_legal();
      for (int i = 0; i < N; i++) if (grant[i]) hist[i]++;
      @(posedge clk);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (hist[i] < TRIALS / N * 3 / 4 || hist[i] > TRIALS / N * 5 / 4) begin
        failures++;
        $display("input %0d granted %0d of %0d times", i, hist[i], TRIALS);
      end
    end
    // two requesters
    foreach (hist[i]) hist[i] = 0;
    req = 4'b1010;
    for (int n = 0; n < TRIALS / 4; n++) begin
      #1 check_legal();
      for (int i = 0; i < N; i++) if (grant[i]) hist[i]++;
      @(posedge clk);
    end
    checks++;
    if (hist[1] < TRIALS / 16 || hist[3] < TRIALS / 16) begin
      failures++;
      $display("two requesters: %0d / %0d", hist[1], hist[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
