// tb_luffa_mixword: self-checking testbench for luffa_mixword.
// Random word pairs; checks the MixWord result.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_luffa_mixword;
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
  w32_t xl, xr, yl, yr, a, b;

  luffa_mixword dut (.xl(xl), .xr(xr), .yl(yl), .yr(yr));

  initial begin
    for (int n = 0; n < 200; n++) begin
      xl = $urandom; xr = $urandom;
      if (n == 0) begin xl = 32'h1; xr = 32'h0; end
      #1;
      a = xl; b = xr;
      b ^= a; a = rl(a, 2) ^ b; b = rl(b, 14) ^ a; a = rl(a, 10) ^ b; b = rl(b, 1);
      check("mix", {yl, yr}, {a, b});
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
