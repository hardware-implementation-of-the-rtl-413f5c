// tb_cdc_pulse: self-checking testbench for cdc_pulse.
// Two instances carry pulses between a 10-unit clock and a 23-unit clock,
// one in each direction, so both slow-to-fast and fast-to-slow crossings
// occur. Pulses are sent at random gaps, never closer than the rule in
// cdc_pulse allows. Checks:
//   * every source pulse gives exactly one destination pulse;
//   * each destination pulse is one destination cycle wide;
//   * it comes 2 or 3 destination edges after the source edge that took the
//     pulse.
module tb_cdc_pulse;
  int checks = 0, failures = 0;

  logic fast_clk = 1'b0, slow_clk = 1'b0;
  always #5 fast_clk = ~fast_clk;
  initial begin
    #2;
    forever #11.5 slow_clk = ~slow_clk;
  end

  logic rst_n;
  logic f2s_i, f2s_o, s2f_i, s2f_o;

  cdc_pulse u_f2s (.src_clk(fast_clk), .src_rst_n(rst_n), .pulse_i(f2s_i),
                   .dst_clk(slow_clk), .dst_rst_n(rst_n), .pulse_o(f2s_o));
  cdc_pulse u_s2f (.src_clk(slow_clk), .src_rst_n(rst_n), .pulse_i(s2f_i),
                   .dst_clk(fast_clk), .dst_rst_n(rst_n), .pulse_o(s2f_o));

  initial begin
    repeat (20000) @(posedge fast_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 6) $display("MISMATCH %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // destination edges since the last source pulse was taken, per direction
  int f2s_sent = 0, f2s_got = 0, f2s_age = -1, f2s_prev = 0;
  int s2f_sent = 0, s2f_got = 0, s2f_age = -1, s2f_prev = 0;

  always @(posedge fast_clk) begin
    if (f2s_i && rst_n) begin f2s_sent++; f2s_age = 0; end
    if (s2f_age >= 0) s2f_age++;
    if (s2f_o) begin
      s2f_got++;
      checks++;
      if (s2f_age < 2 || s2f_age > 3) begin
        failures++;
        $display("slow-to-fast pulse after %0d edges", s2f_age);
      end
      s2f_age = -1;
    end
    check("slow-to-fast pulse width", int'(s2f_o && s2f_prev), 0);
    s2f_prev = s2f_o;
  end

  always @(posedge slow_clk) begin
    if (s2f_i && rst_n) begin s2f_sent++; s2f_age = 0; end
    if (f2s_age >= 0) f2s_age++;
    if (f2s_o) begin
      f2s_got++;
      checks++;
      if (f2s_age < 2 || f2s_age > 3) begin
        failures++;
        $display("fast-to-slow pulse after %0d edges", f2s_age);
      end
      f2s_age = -1;
    end
    check("fast-to-slow pulse width", int'(f2s_o && f2s_prev), 0);
    f2s_prev = f2s_o;
  end

  initial begin
    rst_n = 1'b0; f2s_i = 1'b0; s2f_i = 1'b0;
    repeat (4) @(posedge slow_clk);
    @(negedge fast_clk) rst_n = 1'b1;
    fork
      // fast to slow: gaps of at least 3 slow cycles (7 fast cycles)
      for (int n = 0; n < 60; n++) begin
        repeat (7 + $urandom_range(0, 9)) @(negedge fast_clk);
        f2s_i = 1'b1;
        @(negedge fast_clk) f2s_i = 1'b0;
      end
      // slow to fast: a slow cycle is already more than three fast ones
      for (int n = 0; n < 60; n++) begin
        repeat (1 + $urandom_range(0, 3)) @(negedge slow_clk);
        s2f_i = 1'b1;
        @(negedge slow_clk) s2f_i = 1'b0;
      end
    join
    repeat (10) @(posedge slow_clk);
    check("fast-to-slow pulses sent", f2s_sent, 60);
    check("fast-to-slow pulses received", f2s_got, f2s_sent);
    check("slow-to-fast pulses sent", s2f_sent, 60);
    check("slow-to-fast pulses received", s2f_got, s2f_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
