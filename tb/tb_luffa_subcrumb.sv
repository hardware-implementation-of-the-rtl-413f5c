// tb_luffa_subcrumb: self-checking testbench for luffa_subcrumb.
// Random words plus one word pattern sweeping all 16 crumbs; checks against the s-box table.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_luffa_subcrumb;
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
  w32x4_t a, y, e;
  int v;
  int sbox [16] = '{7, 13, 11, 10, 12, 4, 8, 3, 5, 15, 6, 0, 9, 1, 2, 14};

  luffa_subcrumb dut (.a(a), .y(y));

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = rnd_words();
      if (n == 0) for (int l = 0; l < 32; l++) for (int k = 0; k < 4; k++) a[k][l] = l[k];
      #1;
      for (int l = 0; l < 32; l++) begin
        v = int'({a[3][l], a[2][l], a[1][l], a[0][l]});
        for (int k = 0; k < 4; k++) e[k][l] = sbox[v][k];
      end
      check("y", y, e);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
