// tb_threefish_mix: self-checking testbench for threefish_mix.
// Random words and every rotation amount 0..63.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_threefish_mix;
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
  w64_t x0, x1, y0, y1, e0;
  logic [5:0] rot;

  threefish_mix dut (.x0(x0), .x1(x1), .rot(rot), .y0(y0), .y1(y1));

  initial begin
    for (int n = 0; n < 200; n++) begin
      x0 = {$urandom, $urandom}; x1 = {$urandom, $urandom}; rot = 6'(n);
      #1;
      e0 = x0 + x1;
      check("mix", {y0, y1}, {e0, rl64(x1, int'(rot)) ^ e0});
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
