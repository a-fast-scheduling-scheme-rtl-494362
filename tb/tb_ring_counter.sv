// tb_ring_counter: checks that start loads T1, that each advance moves the
// single token to the next T line with TN wrapping to T1, that the lines
// stay put without advance, and that clear empties the ring.
module tb_ring_counter;
  localparam int N = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, clear = 0, start = 0, advance = 0;
  logic [N-1:0] t;

  ring_counter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_t(int idx);  // idx < 0: no line active
    logic [N-1:0] exp;
    exp = (idx < 0) ? '0 : N'(1) << idx;
    checks++;
    if (t !== exp) begin
      failures++;
      $display("t=%b expected %b", t, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1 expect_t(-1);
    start <= 1;
    @(posedge clk); #1 expect_t(0);
    start <= 0;
    advance <= 1;
    for (int k = 1; k <= 2 * N; k++) begin
      @(posedge clk); #1 expect_t(k % N);
    end
    advance <= 0;
    repeat (3) begin
      @(posedge clk); #1 expect_t(0);
    end
    advance <= 1;
    @(posedge clk); #1 expect_t(1);
    clear <= 1;
    @(posedge clk); #1 expect_t(-1);
    clear <= 0;
    @(posedge clk); #1 expect_t(-1);   // advancing an empty ring keeps it empty
    advance <= 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
