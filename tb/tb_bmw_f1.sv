// tb_bmw_f1: self-checking testbench for bmw_f1.
// Random message and Q_0..Q_15; checks Q_16..Q_31.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_bmw_f1;
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
  w32x16_t m, qa, qb;

  bmw_f1 dut (.m(m), .qa(qa), .qb(qb));

  initial begin
    for (int n = 0; n < 200; n++) begin
      m = rnd_words(); qa = rnd_words();
      #1;
      begin
        logic [31:0][31:0] q2;
        q2 = bmw_expand(m, qa);
        check("qb", qb, q2[31:16]);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
