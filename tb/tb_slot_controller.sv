// tb_slot_controller: checks the phase sequence of the time slot against
// a ring counter of N = 4 lines: request (1 cycle), grant (1 cycle, ring
// started), pass (exactly N cycles with T1..TN in order), accept (1 cycle,
// cells cleared), so a slot is N + 3 cycles; with enable low the controller
// idles in the request phase.
module tb_slot_controller;
  import atm_sched_pkg::*;
  localparam int N = 4;
  localparam int SLOTS = 20;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, enable = 0;
  logic [N-1:0] t;
  phase_e phase;
  logic req_load, grant_load, ring_start, ring_advance, ring_clear, accept, slot_clear;

  slot_controller dut (.clk, .rst_n, .enable, .t_last(t[N-1]), .phase, .req_load, .grant_load,
                       .ring_start, .ring_advance, .ring_clear, .accept, .slot_clear);
  ring_counter #(.N(N)) ring (.clk, .rst_n, .clear(ring_clear), .start(ring_start),
                              .advance(ring_advance), .t);

  always #5 clk = ~clk;

  initial begin
    repeat (SLOTS * (N + 3) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(string what, phase_e ph, logic [6:0] strobes, logic [N-1:0] tl);
    // strobes: req_load grant_load ring_start ring_advance ring_clear accept slot_clear
    logic [6:0] got;
    got = {req_load, grant_load, ring_start, ring_advance, ring_clear, accept, slot_clear};
    checks++;
    if (phase !== ph || got !== strobes || t !== tl) begin
      failures++;
      $display("%s: phase=%s strobes=%b t=%b, expected %s %b %b", what, phase.name(), got, t,
               ph.name(), strobes, tl);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // idle
    repeat (3) begin
      @(negedge clk);
      expect_cycle("idle", PH_REQUEST, 7'b0, '0);
    end
    enable = 1;
    #1;
    for (int s = 0; s < SLOTS; s++) begin
      automatic int len = 1;
      expect_cycle("request", PH_REQUEST, 7'b1000000, '0);
      @(negedge clk); len++;
      expect_cycle("grant", PH_GRANT, 7'b0110000, '0);
      for (int k = 0; k < N; k++) begin
        @(negedge clk); len++;
        expect_cycle($sformatf("T%0d", k + 1), PH_PASS, (k == N - 1) ? 7'b0000100 : 7'b0001000,
                     N'(1) << k);
      end
      @(negedge clk); len++;
      expect_cycle("accept", PH_ACCEPT, 7'b0000011, '0);
      checks++;
      if (len != slot_cycles(N)) begin failures++; $display("slot took %0d cycles", len); end
      @(negedge clk);
      if (s == SLOTS - 1) enable = 0;
      #1;
    end
    @(negedge clk);
    expect_cycle("idle again", PH_REQUEST, 7'b0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
