// sha3_cores_top: six SHA-3 candidate compression cores behind a 32-bit port.
// BMW-256, Luffa-256, unrolled Skein-256, sequential Skein-1c, Shabal-256 and
// BLAKE-32 stand side by side. Each core has its own SIPO, which collects its
// inputs one 32-bit word per cycle, and its own PISO, which captures its
// result on the core's done pulse and hands it out one word at a time, the
// arrangement used to fit wide cores to a pin-limited device.
//
// Input word maps (in_addr), 64-bit words split low half first:
//   BMW     0-15 M, 16-31 H                     result 0-15 H'
//   Luffa   0-7 M, 8-15 H0, 16-23 H1, 24-31 H2  result 0-23 H0'..H2'
//   Skein,  0-7 key, 8-11 tweak, 12-19 message  result 0-7 output
//   Skein-1c (same map)
//   Shabal  0-11 A, 12-27 B, 28-43 C, 44-59 M, 60-61 W
//                                               result 0-11 A, 12-27 B, 28-43 C
//   BLAKE   0-7 h, 8-23 m, 24-27 salt, 28-29 counter   result 0-7 h'
//
// Protocol: write words with in_we/in_core/in_addr/in_data, pulse start with
// start_core, wait for ready[core], then read with out_core/out_addr
// (out_data is combinational). When chain is high together with start, the
// core takes its chaining input from its own previous result instead of from
// its SIPO (BMW H, Luffa H0..H2, Skein key, Shabal A/B/C, BLAKE h), so for
// a multi-block message only the message words, counters and tweaks pass
// through the port: the chaining value stays on chip. This feedback is
// this design's way of passing each output on as the next chaining input.
//
// Clocks: the SIPOs, the port and the status run on io_clk; the cores and
// their PISOs run on cf_clk, the compression clock, which may have any
// frequency and phase relative to io_clk. Only start and done cross the
// boundary, each through a toggle synchronizer (cdc_pulse). The wide data
// does not need synchronizing because it is held still while the other
// side samples it: a core samples its SIPO words and the chain selection
// on its start, which the user must not disturb until ready, and a PISO
// is loaded before the done pulse that sets ready. rst_n is synchronous on
// io_clk and is passed through two flops to reset the cf_clk side. Hold it
// low for at least four cycles of the slower clock.
// busy[k] is set by a start of core k and cleared when its done arrives in
// the io_clk domain, and ready[k] is the opposite except before the first
// run. A start takes 2-3 cf_clk edges to arrive, then the core's own
// latency in cf_clk cycles, and its done 2-3 io_clk edges to come back.
// The sizes of the cores are their defaults. The
// digest_o outputs of BMW, Luffa and Shabal are left open on purpose: their
// PISOs hold the full chaining state, and the digest is part of it.
module sha3_cores_top
  import sha3_common_pkg::*;
(
  input  logic                 io_clk,
  input  logic                 cf_clk,
  input  logic                 rst_n,
  input  logic                 in_we,
  input  core_e                in_core,
  input  logic [5:0]           in_addr,
  input  logic [31:0]          in_data,
  input  logic                 start,
  input  logic                 chain,
  input  core_e                start_core,
  input  core_e                out_core,
  input  logic [5:0]           out_addr,
  output logic [31:0]          out_data,
  output logic [NUM_CORES-1:0] busy,
  output logic [NUM_CORES-1:0] ready
);
  logic [NUM_CORES-1:0] we, go, done, cf_go, io_done, chain_q, core_busy;
  logic [NUM_CORES-1:0][31:0] rd;
  logic [1:0] cf_rst_q;
  logic       cf_rst_n;

  always_comb begin
    for (int k = 0; k < NUM_CORES; k++) begin
      we[k] = in_we && (in_core == core_e'(k));
      go[k] = start && (start_core == core_e'(k));
    end
  end

  // ---------------- clock-domain crossing ----------------
  always_ff @(posedge cf_clk) cf_rst_q <= {cf_rst_q[0], rst_n};
  assign cf_rst_n = cf_rst_q[1];

  // chain is held per core from its start until the next one
  always_ff @(posedge io_clk) begin
    if (!rst_n) chain_q <= '0;
    else
      for (int k = 0; k < NUM_CORES; k++)
        if (go[k]) chain_q[k] <= chain;
  end

  for (genvar k = 0; k < NUM_CORES; k++) begin : g_cdc
    cdc_pulse u_start (.src_clk(io_clk), .src_rst_n(rst_n), .pulse_i(go[k]),
                       .dst_clk(cf_clk), .dst_rst_n(cf_rst_n), .pulse_o(cf_go[k]));
    cdc_pulse u_done  (.src_clk(cf_clk), .src_rst_n(cf_rst_n), .pulse_i(done[k]),
                       .dst_clk(io_clk), .dst_rst_n(rst_n), .pulse_o(io_done[k]));
  end

  // ---------------- BMW-256 ----------------
  logic [31:0][31:0] bmw_in;
  w32x16_t bmw_h;
  sipo #(.WORDS(32)) u_bmw_in (.clk(io_clk), .rst_n, .we(we[CORE_BMW]), .addr(in_addr), .wdata(in_data), .q(bmw_in));
  bmw256_compress u_bmw (
    .clk(cf_clk), .rst_n(cf_rst_n), .start(cf_go[CORE_BMW]), .m_i(bmw_in[15:0]), .h_i(chain_q[CORE_BMW] ? bmw_h : w32x16_t'(bmw_in[31:16])),
    .busy(core_busy[CORE_BMW]), .done(done[CORE_BMW]), .h_o(bmw_h), .digest_o());
  piso #(.WORDS(16)) u_bmw_out (.clk(cf_clk), .rst_n(cf_rst_n), .load(done[CORE_BMW]), .d(bmw_h), .sel(out_addr), .q(rd[CORE_BMW]));

  // ---------------- Luffa-256 ----------------
  logic [31:0][31:0] luffa_in;
  w32x3x8_t luffa_h;
  sipo #(.WORDS(32)) u_luffa_in (.clk(io_clk), .rst_n, .we(we[CORE_LUFFA]), .addr(in_addr), .wdata(in_data), .q(luffa_in));
  luffa256_compress u_luffa (
    .clk(cf_clk), .rst_n(cf_rst_n), .start(cf_go[CORE_LUFFA]), .m_i(luffa_in[7:0]), .h_i(chain_q[CORE_LUFFA] ? luffa_h : w32x3x8_t'(luffa_in[31:8])),
    .busy(core_busy[CORE_LUFFA]), .done(done[CORE_LUFFA]), .h_o(luffa_h), .digest_o());
  piso #(.WORDS(24)) u_luffa_out (.clk(cf_clk), .rst_n(cf_rst_n), .load(done[CORE_LUFFA]), .d(luffa_h), .sel(out_addr), .q(rd[CORE_LUFFA]));

  // ---------------- Skein-256, fully unrolled ----------------
  logic [19:0][31:0] skein_in;
  w64x4_t skein_h;
  sipo #(.WORDS(20)) u_skein_in (.clk(io_clk), .rst_n, .we(we[CORE_SKEIN]), .addr(in_addr), .wdata(in_data), .q(skein_in));
  skein256_compress u_skein (
    .clk(cf_clk), .rst_n(cf_rst_n), .start(cf_go[CORE_SKEIN]),
    .key_i(chain_q[CORE_SKEIN] ? skein_h : w64x4_t'(skein_in[7:0])), .tweak_i(skein_in[11:8]), .msg_i(skein_in[19:12]),
    .busy(core_busy[CORE_SKEIN]), .done(done[CORE_SKEIN]), .h_o(skein_h));
  piso #(.WORDS(8)) u_skein_out (.clk(cf_clk), .rst_n(cf_rst_n), .load(done[CORE_SKEIN]), .d(skein_h), .sel(out_addr), .q(rd[CORE_SKEIN]));

  // ---------------- Skein-1c, one round ----------------
  logic [19:0][31:0] sk1c_in;
  w64x4_t sk1c_h;
  sipo #(.WORDS(20)) u_sk1c_in (.clk(io_clk), .rst_n, .we(we[CORE_SKEIN1C]), .addr(in_addr), .wdata(in_data), .q(sk1c_in));
  skein1c_compress u_sk1c (
    .clk(cf_clk), .rst_n(cf_rst_n), .start(cf_go[CORE_SKEIN1C]),
    .key_i(chain_q[CORE_SKEIN1C] ? sk1c_h : w64x4_t'(sk1c_in[7:0])), .tweak_i(sk1c_in[11:8]), .msg_i(sk1c_in[19:12]),
    .busy(core_busy[CORE_SKEIN1C]), .done(done[CORE_SKEIN1C]), .h_o(sk1c_h));
  piso #(.WORDS(8)) u_sk1c_out (.clk(cf_clk), .rst_n(cf_rst_n), .load(done[CORE_SKEIN1C]), .d(sk1c_h), .sel(out_addr), .q(rd[CORE_SKEIN1C]));

  // ---------------- Shabal-256 ----------------
  logic [61:0][31:0] shabal_in;
  w32x12_t shabal_a;
  w32x16_t shabal_b, shabal_c;
  sipo #(.WORDS(62)) u_shabal_in (.clk(io_clk), .rst_n, .we(we[CORE_SHABAL]), .addr(in_addr), .wdata(in_data), .q(shabal_in));
  shabal256_compress u_shabal (
    .clk(cf_clk), .rst_n(cf_rst_n), .start(cf_go[CORE_SHABAL]),
    .a_i(chain_q[CORE_SHABAL] ? shabal_a : w32x12_t'(shabal_in[11:0])),
    .b_i(chain_q[CORE_SHABAL] ? shabal_b : w32x16_t'(shabal_in[27:12])),
    .c_i(chain_q[CORE_SHABAL] ? shabal_c : w32x16_t'(shabal_in[43:28])),
    .m_i(shabal_in[59:44]), .w_i(shabal_in[61:60]),
    .busy(core_busy[CORE_SHABAL]), .done(done[CORE_SHABAL]),
    .a_o(shabal_a), .b_o(shabal_b), .c_o(shabal_c), .digest_o());
  piso #(.WORDS(44)) u_shabal_out (.clk(cf_clk), .rst_n(cf_rst_n), .load(done[CORE_SHABAL]),
    .d({shabal_c, shabal_b, shabal_a}), .sel(out_addr), .q(rd[CORE_SHABAL]));

  // ---------------- BLAKE-32 ----------------
  logic [29:0][31:0] blake_in;
  w32x8_t blake_h;
  sipo #(.WORDS(30)) u_blake_in (.clk(io_clk), .rst_n, .we(we[CORE_BLAKE]), .addr(in_addr), .wdata(in_data), .q(blake_in));
  blake256_compress u_blake (
    .clk(cf_clk), .rst_n(cf_rst_n), .start(cf_go[CORE_BLAKE]),
    .h_i(chain_q[CORE_BLAKE] ? blake_h : w32x8_t'(blake_in[7:0])), .m_i(blake_in[23:8]), .s_i(blake_in[27:24]), .t_i(blake_in[29:28]),
    .busy(core_busy[CORE_BLAKE]), .done(done[CORE_BLAKE]), .h_o(blake_h));
  piso #(.WORDS(8)) u_blake_out (.clk(cf_clk), .rst_n(cf_rst_n), .load(done[CORE_BLAKE]), .d(blake_h), .sel(out_addr), .q(rd[CORE_BLAKE]));

  // ---------------- status and read port ----------------
  always_ff @(posedge io_clk) begin
    if (!rst_n) begin
      ready <= '0;
      busy  <= '0;
    end else begin
      ready <= (ready & ~go) | io_done;
      busy  <= (busy | go) & ~io_done;
    end
  end

  // a start may only reach a core that has finished its last operation
  for (genvar k = 0; k < NUM_CORES; k++) begin : g_chk
    a_start_when_idle: assert property (@(posedge cf_clk) disable iff (!cf_rst_n)
      cf_go[k] |-> !core_busy[k]);
  end

  assign out_data = (int'(out_core) < NUM_CORES) ? rd[out_core] : 32'd0;
endmodule
