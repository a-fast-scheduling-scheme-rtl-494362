// tb_crossbar: random partial permutations and cells; one cycle after each
// match, output j must carry the cell of the input matched to it and be
// valid, and unmatched outputs must be idle.
module tb_crossbar;
  localparam int N = 4, CELL_W = 424;
  localparam int ROUNDS = 2000;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [N-1:0][N-1:0] match = '0;
  logic [N-1:0][CELL_W-1:0] in_cell = '0, out_cell;
  logic [N-1:0] out_valid;

  crossbar #(.N(N), .CELL_W(CELL_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2 * ROUNDS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [N];
    logic [N-1:0][N-1:0] m;
    logic [N-1:0][CELL_W-1:0] cells;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < ROUNDS; r++) begin
      // random permutation, some rows dropped
      foreach (perm[i]) perm[i] = i;
      perm.shuffle();
      m = '0;
      for (int i = 0; i < N; i++) if ($urandom_range(3) != 0) m[i][perm[i]] = 1'b1;
      for (int i = 0; i < N; i++) cells[i] = CELL_W'({14{$urandom}});
      @(negedge clk);
      match   = m;
      in_cell = cells;
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        automatic logic exp_v = 1'b0;
        automatic logic [CELL_W-1:0] exp_c = '0;
        for (int i = 0; i < N; i++) if (m[i][j]) begin exp_v = 1'b1; exp_c = cells[i]; end
        checks++;
        if (out_valid[j] !== exp_v || (exp_v && out_cell[j] !== exp_c)) begin
          failures++;
          $display("output %0d: valid=%b, expected %b", j, out_valid[j], exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
