// shabal256_compress: Shabal-256 compression function.
// On start the input multiplexers load the keyed permutation with
// B + M (word-wise mod 2^32), A with the 64-bit block counter W xored into
// A_0 (low half) and A_1 (high half), C and M. After P finishes the new state
// is A = P's A, B = C - M and C = P's B (the subtraction and the B/C swap are
// wiring and adders after P's registers). digest_o is C_8..C_15, the
// Shabal-256 output words.
// Timing: start sampled at edge 0; done pulses after edge
// 48/STEPS_PER_CYCLE (16 cycles by default); outputs stay valid until the next
// start. Handshake and reset are choices of this design.
module shabal256_compress
  import sha3_common_pkg::*;
#(
  parameter int unsigned STEPS_PER_CYCLE = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  w32x12_t     a_i,
  input  w32x16_t     b_i,
  input  w32x16_t     c_i,
  input  w32x16_t     m_i,
  input  logic [63:0] w_i,
  output logic        busy,
  output logic        done,
  output w32x12_t     a_o,
  output w32x16_t     b_o,
  output w32x16_t     c_o,
  output w32x8_t      digest_o
);
  w32x12_t a_ld;
  w32x16_t b_ld, pb, pc, pm;

  always_comb begin
    a_ld    = a_i;
    a_ld[0] = a_i[0] ^ w_i[31:0];
    a_ld[1] = a_i[1] ^ w_i[63:32];
    for (int k = 0; k < 16; k++) b_ld[k] = b_i[k] + m_i[k];
  end

  shabal_perm #(.STEPS_PER_CYCLE(STEPS_PER_CYCLE)) u_p (
    .clk(clk), .rst_n(rst_n), .load(start),
    .a_i(a_ld), .b_i(b_ld), .c_i(c_i), .m_i(m_i),
    .busy(busy), .done(done), .a_o(a_o), .b_o(pb), .c_o(pc), .m_o(pm));

  always_comb begin
    for (int k = 0; k < 16; k++) b_o[k] = pc[k] - pm[k];
    c_o = pb;
  end

  assign digest_o = c_o[15:8];
endmodule
