// tb_skein1c_key_schedule: self-checking testbench for skein1c_key_schedule.
// Loads random keys and tweaks and walks through all 19 subkeys of a
// 72-round Skein-256 block, with idle cycles between advances (the schedule
// must hold its subkey when advance is low). Expected subkeys come from
// ref_pkg::tf_subkey. Prints one TB_RESULT line; a watchdog ends a hung run.
module tb_skein1c_key_schedule;
  import sha3_common_pkg::*;
  import ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst_n, load, advance;
  w64x4_t key, sk;
  w64x2_t tw;

  skein1c_key_schedule dut (.clk, .rst_n, .load, .advance, .k_i(key), .t_i(tw), .subkey(sk));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [255:0] got, logic [255:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 4) $display("MISMATCH %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; advance = 1'b0; key = '0; tw = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 8; n++) begin
      w64x4_t k0;
      w64x2_t t0;
      @(negedge clk);
      key = rnd_words(); tw = rnd_words(); k0 = key; t0 = tw;
      load = 1'b1;
      @(posedge clk);
      #1 load = 1'b0;
      key = rnd_words(); tw = rnd_words();
      for (int s = 0; s <= 18; s++) begin
        check($sformatf("subkey %0d", s), sk, tf_subkey(k0, t0, s));
        repeat (n % 3) @(posedge clk);           // idle cycles: subkey must hold
        #1 check($sformatf("hold %0d", s), sk, tf_subkey(k0, t0, s));
        @(negedge clk) advance = 1'b1;
        @(posedge clk);
        #1 advance = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
