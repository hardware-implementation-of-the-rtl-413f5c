// tb_bmw_f2: self-checking testbench for bmw_f2.
// Random message and Q_0..Q_31; checks the new double pipe.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_bmw_f2;
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
  w32x16_t m, h;
  w32x32_t q;

  bmw_f2 dut (.m(m), .q(q), .h(h));

  initial begin
    for (int n = 0; n < 200; n++) begin
      m = rnd_words(); q = {rnd_words(), rnd_words()};
      #1;
      check("h", h, bmw_f2(m, q));
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
