// tb_threefish_round: self-checking testbench for threefish_round.
// Random states for all eight rotation sets.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_threefish_round;
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
  w64x4_t v, y;
  logic [2:0] d;

  threefish_round dut (.v(v), .rnd_mod8(d), .y(y));

  initial begin
    for (int n = 0; n < 200; n++) begin
      v = rnd_words(); d = 3'(n);
      #1;
      check("round", y, tf_round(v, n % 8));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
