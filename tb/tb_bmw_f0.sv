// tb_bmw_f0: self-checking testbench for bmw_f0.
// Random message and double-pipe words; checks Q_0..Q_15.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_bmw_f0;
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
  w32x16_t m, h, q;
  logic [31:0][31:0] e;

  bmw_f0 dut (.m(m), .h(h), .q(q));

  initial begin
    for (int n = 0; n < 200; n++) begin
      m = rnd_words(); h = rnd_words();
      if (n == 0) begin m = '0; h = '0; end
      #1;
      e = bmw_q(m, h);
      check("q", q, e[15:0]);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
