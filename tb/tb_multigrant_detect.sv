// tb_multigrant_detect: exhaustive check of the MultiGrant(i) logic.
// Every grant pattern of a 4-wide and a 5-wide row is applied and the
// output is compared with "more than one bit set", counted here directly.
module tb_multigrant_detect;
  int checks = 0, failures = 0;

  logic [3:0] row4;
  logic       mg4;
  logic [4:0] row5;
  logic       mg5;

  multigrant_detect #(.N(4)) dut4 (.grant_row(row4), .multigrant(mg4));
  multigrant_detect #(.N(5)) dut5 (.grant_row(row5), .multigrant(mg5));

  function automatic int ones(int v, int w);
    int c = 0;
    for (int b = 0; b < w; b++) c += (v >> b) & 1;
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      row4 = 4'(v);
      #1;
      checks++;
      if (mg4 !== (ones(v, 4) > 1)) begin
        failures++;
        $display("N=4 row=%b multigrant=%b", row4, mg4);
      end
    end
    for (int v = 0; v < 32; v++) begin
      row5 = 5'(v);
      #1;
      checks++;
      if (mg5 !== (ones(v, 5) > 1)) begin
        failures++;
        $display("N=5 row=%b multigrant=%b", row5, mg5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
