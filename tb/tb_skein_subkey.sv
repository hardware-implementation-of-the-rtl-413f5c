// tb_skein_subkey: self-checking testbench for skein_subkey.
// Random state, key and tweak for subkey indices 0..18.
// Expected values come from the sequential models in ref_pkg. Prints one
// TB_RESULT line; a watchdog ends the run with a failure if it hangs.
module tb_skein_subkey;
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
  w64x4_t v, y, key, sk;
  w64x2_t tw;
  logic [4:0][63:0] k;
  logic [2:0][63:0] t;
  logic [4:0] s;

  skein_subkey dut (.v(v), .k(k), .t(t), .s(s), .y(y));

  initial begin
    for (int n = 0; n < 200; n++) begin
      v = rnd_words(); key = rnd_words(); tw = rnd_words(); s = 5'(n % 19);
      k = {64'h1BD11BDAA9FC1A22 ^ key[0] ^ key[1] ^ key[2] ^ key[3], key};
      t = {tw[0] ^ tw[1], tw};
      #1;
      sk = tf_subkey(key, tw, n % 19);
      check("subkey", y, {v[3] + sk[3], v[2] + sk[2], v[1] + sk[1], v[0] + sk[0]});
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
