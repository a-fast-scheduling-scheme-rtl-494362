// tb_voq_atm_switch: end-to-end test of the switch at its default size
// (4 x 4 ports, 424-bit cells, 16-cell VOQs), with no parameter overrides.
//
// Every cell carries its input, output and a per-(input, output) sequence
// number. A scoreboard checks that each cell leaves at the output it was
// addressed to, that the cells of every VOQ leave in order with none lost
// or duplicated, that an output delivers at most one cell per slot and an
// input sends at most one, and that slots are N + 3 cycles apart. Traffic
// runs in three phases: saturation (every VOQ kept non-empty), light
// random load, and a hot-spot phase that fills one VOQ until it refuses
// cells; then arrivals stop and everything must drain.
// Mechanisms counted (each must occur): grants passed between inputs,
// slots with a multi-granted input left after passing, saturated slots with
// every input matched, VOQ-full refusals, and slots in which an input had
// nothing to send.
module tb_voq_atm_switch;
  import atm_sched_pkg::*;
  localparam int N = 4, CELL_W = 424, DEPTH = 16, PW = 2;
  localparam int SAT_SLOTS = 600, LIGHT_SLOTS = 600, HOT_SLOTS = 200;
  localparam int TOTAL_CYCLES = (SAT_SLOTS + LIGHT_SLOTS + HOT_SLOTS + 200) * (N + 3);

  int checks = 0, failures = 0;
  int n_pass = 0, n_multi_left = 0, n_full_match = 0, n_refused = 0, n_idle_input = 0;
  int sat_matched = 0, sat_slots = 0;

  logic clk = 0, rst_n = 0, enable = 0;
  logic [N-1:0] in_valid = '0, in_ready, out_valid;
  logic [N-1:0][PW-1:0] in_dest = '0;
  logic [N-1:0][CELL_W-1:0] in_cell = '0, out_cell;
  logic slot_end;
  logic [N-1:0][N-1:0] match, sched_request, sched_grant, sched_fire;

  voq_atm_switch dut (.*);

  always #5 clk = ~clk;

  int sent [N][N];      // cells accepted into VOQ(i,j)
  int got  [N][N];      // cells of VOQ(i,j) delivered
  int in_q [N][N];      // cells currently held, model

  function automatic logic [CELL_W-1:0] make_cell(int i, int j, int seq);
    return {CELL_W'(32'hCE11_0000) << 64} | CELL_W'({8'(i), 8'(j), 16'(seq)}) |
           (CELL_W'(seq * 7 + i) << 200);
  endfunction

  initial begin
    repeat (TOTAL_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // All driving and monitoring happens at the falling edge: new arrivals
  // are driven, and 1 time unit later the settled signals of the cycle are
  // recorded; they stay unchanged until the rising edge samples them.
  int phase_sel = 0;   // 0 saturate, 1 light, 2 hot spot, 3 stop
  int last_slot_end = -1, cyc = 0;
  logic [N-1:0][N-1:0] match_d = '0;   // matching of the previous cycle

  always @(negedge clk) if (rst_n) begin
    // ---------------- arrivals ----------------
    for (int i = 0; i < N; i++) begin
      int j;
      in_valid[i] = 1'b0;
      case (phase_sel)
        0: begin  // keep every VOQ of the input non-empty: feed the emptiest one
          j = 0;
          for (int k = 1; k < N; k++) if (in_q[i][k] < in_q[i][j]) j = k;
          in_valid[i] = (in_q[i][j] < 3);
        end
        1: begin j = $urandom_range(N - 1); in_valid[i] = ($urandom_range(99) < 4); end
        2: begin j = 0; in_valid[i] = (i == 0); end
        default: j = 0;
      endcase
      in_dest[i] = PW'(j);
      in_cell[i] = make_cell(i, j, sent[i][j]);
    end
    #1;
    cyc++;
    for (int i = 0; i < N; i++) begin
      if (in_valid[i] && in_ready[i]) begin
        sent[i][in_dest[i]]++;
        in_q[i][in_dest[i]]++;
      end
      if (in_valid[i] && !in_ready[i]) n_refused++;
    end
    n_pass += $countones(sched_fire);

    // ---------------- outputs: the cells matched one cycle earlier ----------------
    for (int j = 0; j < N; j++) begin
      automatic int src = -1;
      for (int i = 0; i < N; i++) if (match_d[i][j]) src = i;
      checks++;
      if (out_valid[j] != (src >= 0)) begin
        failures++;
        $display("output %0d valid=%b, expected %b", j, out_valid[j], src >= 0);
      end else if (out_valid[j]) begin
        int ci, cj, seq;
        ci  = int'(out_cell[j][31:24]);
        cj  = int'(out_cell[j][23:16]);
        seq = int'(out_cell[j][15:0]);
        checks++;
        if (ci != src || cj != j || seq != got[src][j] || out_cell[j] !== make_cell(ci, cj, seq)) begin
          failures++;
          $display("output %0d: cell from %0d to %0d seq %0d, expected from %0d seq %0d",
                   j, ci, cj, seq, src, got[src][j]);
        end
        got[src][j]++;
      end
    end
    match_d = slot_end ? match : '0;

    // ---------------- slot end ----------------
    if (slot_end) begin
      int nm;
      logic [N-1:0][N-1:0] g;
      nm = 0;
      g = sched_grant;
      if (last_slot_end >= 0) begin
        checks++;
        if (cyc - last_slot_end != slot_cycles(N)) begin
          failures++;
          $display("slot of %0d cycles", cyc - last_slot_end);
        end
      end
      last_slot_end = cyc;
      for (int i = 0; i < N; i++) begin
        if ($countones(g[i]) > 1) n_multi_left++;
        if (match[i] != '0) nm++;
        if (sched_request[i] == '0) n_idle_input++;
        for (int j = 0; j < N; j++) if (match[i][j]) in_q[i][j]--;
        checks++;
        if ($countones(match[i]) != (g[i] != '0) || (match[i] & ~g[i]) != '0) begin
          failures++;
          $display("input %0d: match %b with grants %b", i, match[i], g[i]);
        end
      end
      if (phase_sel == 0 && sched_request == '1) begin
        sat_slots++;
        sat_matched += nm;
        if (nm == N) n_full_match++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    enable <= 1;
    phase_sel = 0;
    repeat (SAT_SLOTS * (N + 3)) @(posedge clk);
    phase_sel = 1;
    repeat (LIGHT_SLOTS * (N + 3)) @(posedge clk);
    phase_sel = 2;
    repeat (HOT_SLOTS * (N + 3)) @(posedge clk);
    phase_sel = 3;
    repeat (150 * (N + 3)) @(posedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        checks++;
        if (got[i][j] != sent[i][j] || in_q[i][j] != 0) begin
          failures++;
          $display("VOQ(%0d,%0d): %0d sent, %0d delivered", i, j, sent[i][j], got[i][j]);
        end
      end
    $display("saturated slots %0d, matched inputs per slot %f, fully matched slots %0d",
             sat_slots, real'(sat_matched) / real'(sat_slots), n_full_match);
    $display("grants passed %0d, multi-granted inputs left %0d, VOQ-full refusals %0d, idle inputs %0d",
             n_pass, n_multi_left, n_refused, n_idle_input);
    checks++;
    if (n_pass == 0 || n_multi_left == 0 || n_full_match == 0 || n_refused == 0 || n_idle_input == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
