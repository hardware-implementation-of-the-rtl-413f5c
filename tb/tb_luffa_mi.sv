// tb_luffa_mi: self-checking testbench for luffa_mi.
// Random chain values and message; checks the injected values.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_luffa_mi;
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
  w32x3x8_t h, x;
  w32x8_t m;

  luffa_mi dut (.h(h), .m(m), .x(x));

  initial begin
    for (int n = 0; n < 200; n++) begin
      h = rnd_words(); m = rnd_words();
      if (n == 0) begin h = '0; m = 256'h1 << 224; end
      #1;
      check("x", x, lf_mi(h, m));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
