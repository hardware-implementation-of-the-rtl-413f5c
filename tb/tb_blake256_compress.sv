// tb_blake256_compress: self-checking testbench for blake256_compress.
// Random chain value, message, salt and counter; checks h' and the 11-cycle schedule (load plus ten rounds).
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_blake256_compress;
  import sha3_common_pkg::*;
  import ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (600) @(posedge clk);
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
  w32x8_t h, eh, ho;
  w32x16_t m, em;
  w32x4_t s, es;
  w32x2_t t, et;

  logic rst_n, start, busy, done;
  int cycles;

  blake256_compress dut (.clk, .rst_n, .start, .h_i(h), .m_i(m), .s_i(s), .t_i(t), .busy, .done, .h_o(ho));

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    h = rnd_words(); m = rnd_words(); s = rnd_words(); t = rnd_words();
    eh = h; em = m; es = s; et = t;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check("idle after reset", {busy, done}, 2'b00);
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      h = rnd_words(); m = rnd_words(); s = rnd_words(); t = rnd_words();
      eh = h; em = m; es = s; et = t;
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      // change the inputs: the core must work from its input register
      h = rnd_words(); m = rnd_words(); s = rnd_words(); t = rnd_words();
      cycles = 0;
      while (!done && cycles < 15) begin
        check("busy while working", busy, 1'b1);
        @(posedge clk);
        #1 cycles++;
      end
      check("latency", cycles, 10);
      check("h_o", ho, blake_ref(eh, em, es, et, 10));
      // result holds after done
      @(posedge clk);
      #1 check("done is a pulse", done, 1'b0);
      check("h_o", ho, blake_ref(eh, em, es, et, 10));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
