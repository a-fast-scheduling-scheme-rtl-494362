// tb_voq_input: random arrivals and departures on the VOQs of one input,
// compared with one queue per output kept here. Checks the head cell of
// the selected VOQ, the per-VOQ occupancy and non-empty flags, that a full
// VOQ refuses cells while the others still accept them, and FIFO order.
module tb_voq_input;
  localparam int N = 4, CELL_W = 32, DEPTH = 4;
  localparam int CYCLES = 5000;
  int checks = 0, failures = 0;
  int fulls = 0, both = 0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, deq = 0;
  logic [1:0] in_dest = 0, deq_sel = 0;
  logic [CELL_W-1:0] in_cell = 0, head_cell;
  logic [N-1:0] nonempty;
  logic [N-1:0][2:0] count;

  voq_input #(.N(N), .CELL_W(CELL_W), .DEPTH(DEPTH)) dut (.*);

  logic [CELL_W-1:0] q [N][$];

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      // compare state
      for (int j = 0; j < N; j++) begin
        checks++;
        if (count[j] != 3'(q[j].size()) || nonempty[j] != (q[j].size() > 0)) begin
          failures++;
          $display("VOQ %0d: count=%0d nonempty=%b model %0d", j, count[j], nonempty[j], q[j].size());
        end
      end
      // stimulus: bias towards filling in the first half, draining after
      in_valid = ($urandom_range(99) < ((c / 500) % 2 == 0 ? 70 : 30));
      in_dest  = 2'($urandom);
      in_cell  = $urandom;
      deq_sel  = 2'($urandom);
      deq      = ($urandom_range(99) < ((c / 500) % 2 == 0 ? 30 : 70)) && q[deq_sel].size() > 0;
      #1;
      checks++;
      if (in_ready != (q[in_dest].size() < DEPTH)) begin
        failures++;
        $display("in_ready=%b with %0d cells in VOQ %0d", in_ready, q[in_dest].size(), in_dest);
      end
      if (q[deq_sel].size() > 0) begin
        checks++;
        if (head_cell !== q[deq_sel][0]) begin
          failures++;
          $display("head of VOQ %0d = %h, expected %h", deq_sel, head_cell, q[deq_sel][0]);
        end
      end
      if (in_valid && !in_ready) fulls++;
      if (in_valid && in_ready && deq && in_dest == deq_sel) both++;
      @(posedge clk);
      begin
        automatic bit taken = in_valid && q[in_dest].size() < DEPTH;
        if (deq) void'(q[deq_sel].pop_front());
        if (taken) q[in_dest].push_back(in_cell);
      end
    end
    checks++;
    if (fulls == 0 || both == 0) begin
      failures++;
      $display("coverage: full refusals %0d, same-VOQ enqueue+dequeue %0d", fulls, both);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
