// blake_g: the G function of BLAKE-32 on one column or diagonal.
// a += b + m0; d = (d ^ a) >>> 16; c += d; b = (b ^ c) >>> 12;
// a += b + m1; d = (d ^ a) >>> 8;  c += d; b = (b ^ c) >>> 7;
// m0 and m1 arrive already xored with their constants
// (m_sigma(2i) ^ c_sigma(2i+1) and m_sigma(2i+1) ^ c_sigma(2i)). Rotations are
// to the right. Combinational: six adders in a chain of depth six.
module blake_g
  import sha3_common_pkg::*;
(
  input  w32_t a,
  input  w32_t b,
  input  w32_t c,
  input  w32_t d,
  input  w32_t m0,
  input  w32_t m1,
  output w32_t ao,
  output w32_t bo,
  output w32_t co,
  output w32_t do_
);
  w32_t a1, b1, c1, d1;

  assign a1  = a + b + m0;
  assign d1  = rotr32(d ^ a1, 16);
  assign c1  = c + d1;
  assign b1  = rotr32(b ^ c1, 12);
  assign ao  = a1 + b1 + m1;
  assign do_ = rotr32(d1 ^ ao, 8);
  assign co  = c1 + do_;
  assign bo  = rotr32(b1 ^ co, 7);
endmodule
