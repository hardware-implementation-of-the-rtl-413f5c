// tb_bmw256_compress: self-checking testbench for bmw256_compress.
// Random blocks; checks H^i, the digest half and the one-cycle latency.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_bmw256_compress;
  import sha3_common_pkg::*;
  import ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (420) @(posedge clk);
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
  w32x16_t m, h, ho, em, eh;
  w32x8_t dg;

  logic rst_n, start, busy, done;
  int cycles;

  bmw256_compress dut (.clk, .rst_n, .start, .m_i(m), .h_i(h), .busy, .done, .h_o(ho), .digest_o(dg));

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    m = rnd_words(); h = rnd_words(); em = m; eh = h;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check("idle after reset", {busy, done}, 2'b00);
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      m = rnd_words(); h = rnd_words(); em = m; eh = h;
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      // change the inputs: the core must work from its input register
      m = rnd_words(); h = rnd_words();
      cycles = 0;
      while (!done && cycles < 6) begin
        check("busy while working", busy, 1'b1);
        @(posedge clk);
        #1 cycles++;
      end
      check("latency", cycles, 1);
      check("h_o", ho, bmw_f2(em, bmw_q(em, eh)));
      check("digest", dg, ho[15:8]);
      // result holds after done
      @(posedge clk);
      #1 check("done is a pulse", done, 1'b0);
      check("h_o", ho, bmw_f2(em, bmw_q(em, eh)));
      check("digest", dg, ho[15:8]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
