// tb_blake_g: self-checking testbench for blake_g.
// Random words; checks the eight-operation G function.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_blake_g;
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
  w32_t a, b, c, d, m0, m1, ao, bo, co, dd, ea, eb, ec, ed;

  blake_g dut (.a(a), .b(b), .c(c), .d(d), .m0(m0), .m1(m1), .ao(ao), .bo(bo), .co(co), .do_(dd));

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = $urandom; b = $urandom; c = $urandom; d = $urandom; m0 = $urandom; m1 = $urandom;
      #1;
      ea = a + b + m0; ed = rr(d ^ ea, 16); ec = c + ed; eb = rr(b ^ ec, 12);
      ea = ea + eb + m1; ed = rr(ed ^ ea, 8); ec = ec + ed; eb = rr(eb ^ ec, 7);
      check("g", {ao, bo, co, dd}, {ea, eb, ec, ed});
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
