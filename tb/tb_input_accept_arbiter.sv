// tb_input_accept_arbiter: the accept of one input. For random grant
// vectors the accept must be a single granting output (none without
// grants). With all outputs granting, every output must be accepted with
// about equal frequency, and with two grants both must win sometimes.
module tb_input_accept_arbiter;
  localparam int N = 4;
  localparam int TRIALS = 4000;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, step = 0;
  logic [N-1:0] grant, accept;
  int hist [N];

  input_accept_arbiter #(.N(N)) dut (.*);

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
    if (grant == '0 ? accept != '0 : ($countones(accept) != 1 || (accept & ~grant) != '0)) begin
      failures++;
      $display("grant=%b accept=%b", grant, accept);
    end
  endtask

  initial begin
    grant = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    step  <= 1;
    // random requests
    for (int n = 0; n < TRIALS; n++) begin
      grant = N'($urandom);
      #1 check_legal();
      @(posedge clk);
    end
    // all requesting: uniform choice
    foreach (hist[i]) hist[i] = 0;
    grant = '1;
    for (int n = 0; n < TRIALS; n++) begin
      #1 check_legal();
      for (int i = 0; i < N; i++) if (accept[i]) hist[i]++;
      @(posedge clk);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (hist[i] < TRIALS / N * 3 / 4 || hist[i] > TRIALS / N * 5 / 4) begin
        failures++;
        $display("output %0d accepted %0d of %0d times", i, hist[i], TRIALS);
      end
    end
    // two grants
    foreach (hist[i]) hist[i] = 0;
    grant = 4'b1010;
    for (int n = 0; n < TRIALS / 4; n++) begin
      #1 check_legal();
      for (int i = 0; i < N; i++) if (accept[i]) hist[i]++;
      @(posedge clk);
    end
    checks++;
    if (hist[1] < TRIALS / 16 || hist[3] < TRIALS / 16) begin
      failures++;
      $display("two grants: %0d / %0d", hist[1], hist[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
