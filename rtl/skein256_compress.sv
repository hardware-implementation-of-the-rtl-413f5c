// skein256_compress: fully unrolled Skein-256 compression (one UBI block).
// The key (chaining value), the 128-bit tweak and the 256-bit message are
// captured on start. The key is extended with k_4 = C240 ^ k_0..k_3 and the
// tweak with t_2 = t_0 ^ t_1; then ROUNDS Threefish rounds run as one
// combinational chain with a subkey adder before every fourth round and one
// after the last, and the ciphertext is xored with the message (the UBI
// feed-forward). The next edge stores the result.
// Timing: start sampled at edge 0, done and h_o valid after edge 1.
// Handshake and reset are choices of this design.
module skein256_compress
  import sha3_common_pkg::*, skein_pkg::*;
#(
  parameter int unsigned ROUNDS = 72  // multiple of 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  w64x4_t key_i,
  input  w64x2_t tweak_i,
  input  w64x4_t msg_i,
  output logic   busy,
  output logic   done,
  output w64x4_t h_o
);
  localparam int unsigned NSK = ROUNDS / 4 + 1;

  w64x4_t key_r, msg_r;
  w64x2_t tweak_r;
  logic   pending;

  logic [4:0][63:0] k;
  logic [2:0][63:0] t;
  w64x4_t rin  [ROUNDS];   // round inputs, after any subkey addition
  w64x4_t rout [ROUNDS];   // round outputs
  w64x4_t final_v;

  assign k = {C240 ^ key_r[0] ^ key_r[1] ^ key_r[2] ^ key_r[3], key_r};
  assign t = {tweak_r[0] ^ tweak_r[1], tweak_r};

  for (genvar d = 0; d < ROUNDS; d++) begin : g_round
    if (d % 4 == 0) begin : g_key
      skein_subkey u_sk (
        .v(d == 0 ? msg_r : rout[(d == 0) ? 0 : d-1]), .k(k), .t(t),
        .s(5'(d / 4)), .y(rin[d]));
    end else begin : g_nokey
      assign rin[d] = rout[d-1];
    end
    threefish_round u_rnd (.v(rin[d]), .rnd_mod8(3'(d % 8)), .y(rout[d]));
  end

  skein_subkey u_sk_last (.v(rout[ROUNDS-1]), .k(k), .t(t), .s(5'(NSK - 1)), .y(final_v));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      key_r   <= '0;
      tweak_r <= '0;
      msg_r   <= '0;
      h_o     <= '0;
      pending <= 1'b0;
      done    <= 1'b0;
    end else begin
      done    <= pending;
      pending <= start;
      if (start) begin
        key_r   <= key_i;
        tweak_r <= tweak_i;
        msg_r   <= msg_i;
      end
      if (pending) h_o <= final_v ^ msg_r;
    end
  end

  assign busy = pending;
endmodule
