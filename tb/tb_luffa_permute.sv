// tb_luffa_permute: self-checking testbench for luffa_permute.
// Permute blocks Q_0, Q_1 and Q_2 (eight steps) on random states.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_luffa_permute;
  import sha3_common_pkg::*;
  import ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [2047:0] got, logic [2047:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 4) $display("MISMATCH %s: got %h exp %h", what, got, exp);
    end
  endtask
  w32x8_t a, y0, y1, y2;

  luffa_permute #(.J(0)) dut0 (.a(a), .y(y0));
  luffa_permute #(.J(1)) dut1 (.a(a), .y(y1));
  luffa_permute #(.J(2), .STEPS(8)) dut2 (.a(a), .y(y2));

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = rnd_words();
      #1;
      check("q0", y0, lf_perm(a, 0, 8));
      check("q1", y1, lf_perm(a, 1, 8));
      check("q2", y2, lf_perm(a, 2, 8));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
