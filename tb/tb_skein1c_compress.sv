// tb_skein1c_compress: self-checking testbench for skein1c_compress.
// Random key, tweak and message; checks the UBI output and the 72-cycle latency.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_skein1c_compress;
  import sha3_common_pkg::*;
  import ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (1020) @(posedge clk);
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
  w64x4_t key, msg, ekey, emsg, ho;
  w64x2_t tw, etw;

  logic rst_n, start, busy, done;
  int cycles;

  skein1c_compress dut (.clk, .rst_n, .start, .key_i(key), .tweak_i(tw), .msg_i(msg), .busy, .done, .h_o(ho));

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    key = rnd_words(); msg = rnd_words(); tw = rnd_words(); ekey = key; emsg = msg; etw = tw;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check("idle after reset", {busy, done}, 2'b00);
    for (int n = 0; n < 10; n++) begin
      @(negedge clk);
      key = rnd_words(); msg = rnd_words(); tw = rnd_words(); ekey = key; emsg = msg; etw = tw;
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      // change the inputs: the core must work from its input register
      key = rnd_words(); msg = rnd_words(); tw = rnd_words();
      cycles = 0;
      while (!done && cycles < 77) begin
        check("busy while working", busy, 1'b1);
        @(posedge clk);
        #1 cycles++;
      end
      check("latency", cycles, 72);
      check("h_o", ho, skein_ref(ekey, etw, emsg, 72));
      // result holds after done
      @(posedge clk);
      #1 check("done is a pulse", done, 1'b0);
      check("h_o", ho, skein_ref(ekey, etw, emsg, 72));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
