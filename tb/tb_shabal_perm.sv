// tb_shabal_perm: self-checking testbench for shabal_perm.
// Random A, B, C, M; checks P's A and B outputs, the pass-through C and M, and the 16-cycle latency.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_shabal_perm;
  import sha3_common_pkg::*;
  import ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (720) @(posedge clk);
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
  w32x12_t a, ea, ao;
  w32x16_t b, c, m, eb, ec, em, bo, co, mo;
  logic [43:0][31:0] e;
  logic load;
  assign load = start;

  logic rst_n, start, busy, done;
  int cycles;

  shabal_perm dut (.clk, .rst_n, .load, .a_i(a), .b_i(b), .c_i(c), .m_i(m), .busy, .done,
                   .a_o(ao), .b_o(bo), .c_o(co), .m_o(mo));

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    a = rnd_words(); b = rnd_words(); c = rnd_words(); m = rnd_words();
    ea = a; eb = b; ec = c; em = m;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check("idle after reset", {busy, done}, 2'b00);
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      a = rnd_words(); b = rnd_words(); c = rnd_words(); m = rnd_words();
      ea = a; eb = b; ec = c; em = m;
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      // change the inputs: the core must work from its input register
      a = rnd_words(); b = rnd_words(); c = rnd_words(); m = rnd_words();
      cycles = 0;
      while (!done && cycles < 21) begin
        check("busy while working", busy, 1'b1);
        @(posedge clk);
        #1 cycles++;
      end
      check("latency", cycles, 16);
      begin
        w32x16_t bm;
        for (int i = 0; i < 16; i++) bm[i] = eb[i] - em[i];
        e = shabal_ref(ea, bm, ec, em, 64'd0);
      end
      check("a_o", ao, e[11:0]);
      check("b_o", bo, e[43:28]);
      check("c_o", co, ec);
      check("m_o", mo, em);
      // result holds after done
      @(posedge clk);
      #1 check("done is a pulse", done, 1'b0);
      begin
        w32x16_t bm;
        for (int i = 0; i < 16; i++) bm[i] = eb[i] - em[i];
        e = shabal_ref(ea, bm, ec, em, 64'd0);
      end
      check("a_o", ao, e[11:0]);
      check("b_o", bo, e[43:28]);
      check("c_o", co, ec);
      check("m_o", mo, em);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
