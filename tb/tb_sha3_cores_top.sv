// tb_sha3_cores_top: end-to-end testbench for sha3_cores_top at its default
// sizes. Everything goes through the 32-bit port: input words are written
// into each core's SIPO, the core is started, and the result is read back
// word by word from its PISO.
//   * known answers: Skein-256-256 of the byte FF (two UBI calls, run on both
//     the unrolled core and Skein-1c), BLAKE-32 (10 rounds) of one zero byte,
//     and Shabal-256 of the empty message (six compressions, starting from the
//     all-zero state so that the IV is derived on the way);
//   * random blocks on every core, checked against ref_pkg, and chained
//     blocks where a core's result is written back as its next chaining input;
//   * on-chip chaining (chain high with start) on every core, where only the
//     message, counter and tweak words are written;
//   * two cores running at the same time;
//   * the I/O clock (10 time units) and the compression clock (14, offset
//     by 3) are unrelated, so every start and done crosses between them;
//   * the cycle count of every operation, in compression-clock cycles from
//     the start reaching the core to its done, against the expected latency.
// Counts each mechanism and fails if one never occurred.
module tb_sha3_cores_top;
  import sha3_common_pkg::*;
  import ref_pkg::*;

  int checks = 0, failures = 0;
  logic io_clk = 1'b0, cf_clk = 1'b0;
  always #5 io_clk = ~io_clk;
  initial begin
    #3;
    forever #7 cf_clk = ~cf_clk;
  end

  logic rst_n, in_we, start, chain;
  core_e in_core, start_core, out_core;
  logic [5:0] in_addr, out_addr;
  logic [31:0] in_data, out_data;
  logic [NUM_CORES-1:0] busy, ready;

  sha3_cores_top dut (.*);

  // mechanism counters
  int n_ops [NUM_CORES];
  int n_chain [NUM_CORES];
  int n_onchip [NUM_CORES];
  int n_kat, n_overlap, n_words_in, n_words_out, n_cross;

  // compression-clock cycles from the start reaching core k to its done
  int cf_lat [NUM_CORES];
  int cf_cnt [NUM_CORES];
  initial for (int k = 0; k < NUM_CORES; k++) begin cf_cnt[k] = -1; cf_lat[k] = -1; end
  always @(posedge cf_clk) begin
    for (int k = 0; k < NUM_CORES; k++) begin
      if (dut.cf_go[k]) cf_cnt[k] = 0;
      else if (cf_cnt[k] >= 0) cf_cnt[k]++;
      if (dut.done[k] && cf_cnt[k] >= 0) begin
        cf_lat[k] = cf_cnt[k];
        cf_cnt[k] = -1;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge io_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [2047:0] got, logic [2047:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 6) $display("MISMATCH %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic write_words(core_e c, int base, logic [63:0][31:0] w, int n);
    for (int i = 0; i < n; i++) begin
      @(negedge io_clk);
      in_we = 1'b1; in_core = c; in_addr = 6'(base + i); in_data = w[i];
      @(posedge io_clk);
      #1 in_we = 1'b0;
      n_words_in++;
    end
  endtask

  // writes w[lo..hi] to the same addresses
  task automatic write_range(core_e c, int lo, int hi, logic [63:0][31:0] w);
    for (int i = lo; i <= hi; i++) begin
      @(negedge io_clk);
      in_we = 1'b1; in_core = c; in_addr = 6'(i); in_data = w[i];
      @(posedge io_clk);
      #1 in_we = 1'b0;
      n_words_in++;
    end
  endtask

  task automatic pulse_start(core_e c, bit ch = 1'b0);
    @(negedge io_clk);
    start = 1'b1; start_core = c; chain = ch;
    @(posedge io_clk);
    #1 start = 1'b0; chain = 1'b0;
    if (ch) n_onchip[c]++;
  endtask

  // start a core and wait for it; checks the cycle count
  task automatic run(core_e c, int latency, bit ch = 1'b0);
    int cycles = 0;
    cf_lat[c] = -1;
    pulse_start(c, ch);
    check("ready cleared by start", ready[c], 1'b0);
    check("busy set by start", busy[c], 1'b1);
    while (!ready[c] && cycles < 400) begin
      @(posedge io_clk);
      #1 cycles++;
    end
    check("busy cleared with ready", busy[c], 1'b0);
    // done is sampled one compression-clock edge after it rises
    check($sformatf("latency of core %0d", c), cf_lat[c], latency + 1);
    // on the I/O side the two crossings come on top
    check($sformatf("I/O cycles of core %0d", c), cycles > latency * 14 / 10, 1'b1);
    if (cycles > 0 && cf_lat[c] > 0) n_cross++;
    n_ops[c]++;
  endtask

  task automatic read_words(core_e c, int n, output logic [63:0][31:0] w);
    w = '0;
    for (int i = 0; i < n; i++) begin
      @(negedge io_clk);
      out_core = c; out_addr = 6'(i);
      #1 w[i] = out_data;
      n_words_out++;
    end
  endtask

  localparam int LAT_COMB = 1, LAT_SK1C = 72, LAT_SHABAL = 16, LAT_BLAKE = 10;

  // ---------------------------------------------------------------- Skein
  task automatic skein_block(core_e c, logic [3:0][63:0] key, logic [1:0][63:0] tw,
                             logic [3:0][63:0] msg, output logic [3:0][63:0] h,
                             input bit ch = 1'b0);
    logic [63:0][31:0] w, r;
    w = '0;
    w[7:0] = key; w[11:8] = tw; w[19:12] = msg;
    // with on-chip chaining the key words are not written
    write_range(c, ch ? 8 : 0, 19, w);
    run(c, c == CORE_SKEIN ? LAT_COMB : LAT_SK1C, ch);
    read_words(c, 8, r);
    h = r[7:0];
  endtask

  task automatic skein_kat(core_e c);
    logic [3:0][63:0] iv, g, o, m1;
    iv = {64'h6A54E920FDE8DA69, 64'hB33BC3896656840F, 64'h2FCA66479FA7D833, 64'hFC9DA860D048B449};
    m1 = '0; m1[0] = 64'hFF;
    skein_block(c, iv, {64'hF000000000000000, 64'd1}, m1, g);
    n_chain[c]++;
    // the output UBI call is keyed with the result kept inside the core
    skein_block(c, 'x, {64'hFF00000000000000, 64'd8}, '0, o, 1'b1);
    check("Skein-256-256(FF)", o,
          {64'hd27ee6341f7f63a6, 64'h70f2a1c90fc130da, 64'h235ce244c444a2a7, 64'h500eea98d1dc980b});
    n_kat++;
  endtask

  // ---------------------------------------------------------------- Shabal
  task automatic shabal_block(ref logic [43:0][31:0] st, input logic [15:0][31:0] m,
                              input logic [63:0] w, input bit ch = 1'b0);
    logic [63:0][31:0] wd, r;
    logic [43:0][31:0] e;
    e = shabal_ref(st[11:0], st[27:12], st[43:28], m, w);
    wd = '0;
    wd[43:0] = st;
    wd[59:44] = m;
    wd[61:60] = w;
    // with on-chip chaining only M and W are written
    write_range(CORE_SHABAL, ch ? 44 : 0, 61, wd);
    run(CORE_SHABAL, LAT_SHABAL, ch);
    read_words(CORE_SHABAL, 44, r);
    check("Shabal block", r[43:0], e);
    st = r[43:0];
  endtask

  initial begin
    logic [63:0][31:0] r;
    rst_n = 1'b0; in_we = 1'b0; start = 1'b0; chain = 1'b0; in_core = CORE_BMW; start_core = CORE_BMW;
    out_core = CORE_BMW; in_addr = '0; out_addr = '0; in_data = '0;
    n_kat = 0; n_overlap = 0; n_cross = 0; n_words_in = 0; n_words_out = 0;
    for (int k = 0; k < NUM_CORES; k++) begin n_ops[k] = 0; n_chain[k] = 0; n_onchip[k] = 0; end
    repeat (6) @(posedge io_clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge cf_clk);
    check("idle", {busy, ready}, '0);

    // ---- Skein KAT on both Skein cores
    skein_kat(CORE_SKEIN);
    skein_kat(CORE_SKEIN1C);

    // ---- BLAKE-32 KAT: one zero byte
    begin
      logic [63:0][31:0] w;
      w = '0;
      w[7:0] = {32'h5BE0CD19, 32'h1F83D9AB, 32'h9B05688C, 32'h510E527F,
                32'hA54FF53A, 32'h3C6EF372, 32'hBB67AE85, 32'h6A09E667};
      w[8] = 32'h00800000; w[8+13] = 32'h1; w[8+15] = 32'd8;
      w[28] = 32'd8;
      write_words(CORE_BLAKE, 0, w, 30);
      run(CORE_BLAKE, LAT_BLAKE);
      read_words(CORE_BLAKE, 8, r);
      check("BLAKE-32(00)", r[7:0], {32'h7f4aeb28, 32'h07fd3a3e, 32'h7549106b, 32'hc1b423b8,
                                     32'h4157fba4, 32'hf5b152e7, 32'h7d2250b4, 32'hd1e39b45});
      n_kat++;
    end

    // ---- Shabal-256 KAT: empty message from the all-zero state
    begin
      logic [43:0][31:0] st;
      logic [15:0][31:0] m;
      st = '0;
      for (int i = 0; i < 16; i++) m[i] = 32'(256 + i);
      shabal_block(st, m, 64'hFFFF_FFFF_FFFF_FFFF);
      for (int i = 0; i < 16; i++) m[i] = 32'(272 + i);
      shabal_block(st, m, 64'd0);
      check("Shabal IV A0", st[0], 32'h52F84552);
      m = '0; m[0] = 32'h80;
      for (int f = 0; f < 4; f++) begin
        shabal_block(st, m, 64'd1, f[0]);   // alternate port and on-chip chaining
        n_chain[CORE_SHABAL]++;
      end
      check("Shabal-256()", st[43:36], {32'h14908870, 32'h009458f8, 32'h20d7f89e, 32'h01622f14,
                                        32'hbea9f5ba, 32'h2f927162, 32'hf1e9ee1f, 32'hd150c7ae});
      n_kat++;
    end

    // ---- BMW-256: two chained random blocks
    begin
      logic [63:0][31:0] w;
      logic [15:0][31:0] h, m;
      h = rnd_words();
      for (int b = 0; b < 2; b++) begin
        m = rnd_words();
        w = '0; w[15:0] = m; w[31:16] = h;
        write_words(CORE_BMW, 0, w, 32);
        run(CORE_BMW, LAT_COMB);
        read_words(CORE_BMW, 16, r);
        check("BMW block", r[15:0], bmw_f2(m, bmw_q(m, h)));
        h = r[15:0];
        n_chain[CORE_BMW] += b;
      end
      m = rnd_words();
      w = '0; w[15:0] = m;
      write_range(CORE_BMW, 0, 15, w);
      run(CORE_BMW, LAT_COMB, 1'b1);
      read_words(CORE_BMW, 16, r);
      check("BMW on-chip chained block", r[15:0], bmw_f2(m, bmw_q(m, h)));
    end

    // ---- Luffa-256: two chained random blocks
    begin
      logic [63:0][31:0] w;
      logic [2:0][7:0][31:0] h;
      logic [7:0][31:0] m;
      h = rnd_words();
      for (int b = 0; b < 2; b++) begin
        m = rnd_words();
        w = '0; w[7:0] = m; w[31:8] = h;
        write_words(CORE_LUFFA, 0, w, 32);
        run(CORE_LUFFA, LAT_COMB);
        read_words(CORE_LUFFA, 24, r);
        check("Luffa block", r[23:0], luffa_ref(h, m, 8));
        h = r[23:0];
        n_chain[CORE_LUFFA] += b;
      end
      m = rnd_words();
      w = '0; w[7:0] = m;
      write_range(CORE_LUFFA, 0, 7, w);
      run(CORE_LUFFA, LAT_COMB, 1'b1);
      read_words(CORE_LUFFA, 24, r);
      check("Luffa on-chip chained block", r[23:0], luffa_ref(h, m, 8));
    end

    // ---- BLAKE-32: chained random block
    begin
      logic [63:0][31:0] w;
      logic [7:0][31:0] h;
      logic [15:0][31:0] m;
      logic [3:0][31:0] s;
      h = r[7:0];   // whatever was read last: a chain input from the port
      m = rnd_words(); s = rnd_words();
      w = '0; w[7:0] = h; w[23:8] = m; w[27:24] = s; w[28] = 32'd512;
      write_words(CORE_BLAKE, 0, w, 30);
      run(CORE_BLAKE, LAT_BLAKE);
      read_words(CORE_BLAKE, 8, r);
      check("BLAKE block", r[7:0], blake_ref(h, m, s, {32'd0, 32'd512}, 10));
      n_chain[CORE_BLAKE]++;
      h = r[7:0];
      m = rnd_words();
      w[23:8] = m; w[28] = 32'd1024;
      write_range(CORE_BLAKE, 8, 29, w);
      run(CORE_BLAKE, LAT_BLAKE, 1'b1);
      read_words(CORE_BLAKE, 8, r);
      check("BLAKE on-chip chained block", r[7:0], blake_ref(h, m, s, {32'd0, 32'd1024}, 10));
    end

    // ---- Skein-1c and BLAKE running at the same time
    begin
      logic [63:0][31:0] w;
      logic [3:0][63:0] key, msg;
      logic [1:0][63:0] tw;
      key = rnd_words(); msg = rnd_words(); tw = rnd_words();
      w = '0; w[7:0] = key; w[11:8] = tw; w[19:12] = msg;
      write_words(CORE_SKEIN1C, 0, w, 20);
      pulse_start(CORE_SKEIN1C);
      pulse_start(CORE_BLAKE);   // BLAKE repeats its last block
      #1;
      if (busy[CORE_SKEIN1C] && busy[CORE_BLAKE]) n_overlap++;
      wait (ready[CORE_SKEIN1C] && ready[CORE_BLAKE]);
      read_words(CORE_SKEIN1C, 8, r);
      check("Skein-1c overlapped", r[7:0], skein_ref(key, tw, msg, 72));
      n_ops[CORE_SKEIN1C]++;
      n_ops[CORE_BLAKE]++;
    end

    // ---- mechanism coverage
    for (int k = 0; k < NUM_CORES; k++) begin
      $display("core %0d: %0d operations, %0d chained, %0d chained on chip",
               k, n_ops[k], n_chain[k], n_onchip[k]);
      check($sformatf("core %0d chained on chip", k), n_onchip[k] > 0, 1'b1);
      check($sformatf("core %0d used", k), n_ops[k] > 0, 1'b1);
      check($sformatf("core %0d chained", k), n_chain[k] > 0, 1'b1);
    end
    $display("known answers %0d, overlapped runs %0d, words in %0d, words out %0d",
             n_kat, n_overlap, n_words_in, n_words_out);
    check("known answers", n_kat, 4);
    check("overlap", n_overlap > 0, 1'b1);
    $display("operations across the two clocks %0d", n_cross);
    check("clock crossings", n_cross > 0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
