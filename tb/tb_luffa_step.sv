// tb_luffa_step: self-checking testbench for luffa_step.
// Three parameter settings (J,R) = (0,0), (1,3), (2,7) on random states.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_luffa_step;
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

  luffa_step #(.J(0), .R(0)) dut0 (.a(a), .y(y0));
  luffa_step #(.J(1), .R(3)) dut1 (.a(a), .y(y1));
  luffa_step #(.J(2), .R(7)) dut2 (.a(a), .y(y2));

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = rnd_words();
      #1;
      check("s00", y0, lf_step(a, 0, 0));
      check("s13", y1, lf_step(a, 1, 3));
      check("s27", y2, lf_step(a, 2, 7));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
