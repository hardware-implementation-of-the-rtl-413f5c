// luffa_mi: message injection of Luffa-256 (three 256-bit chain values).
// t = (H0 ^ H1 ^ H2) * 2 is xored into every chain value, then the message
// is xored in as M, M*2 and M*4 into H0, H1 and H2. "* 2" is the doubling
// in GF(2^8)^32 from luffa_pkg::mult2 (wiring plus a few xors).
// Purely combinational.
module luffa_mi
  import sha3_common_pkg::*, luffa_pkg::*;
(
  input  w32x3x8_t h,  // chain values H_0..H_2
  input  w32x8_t   m,  // message block
  output w32x3x8_t x   // injected values, inputs of Q_0..Q_2
);
  w32x8_t t, m1, m2;

  always_comb begin
    t  = mult2(h[0] ^ h[1] ^ h[2]);
    m1 = mult2(m);
    m2 = mult2(m1);
    x[0] = h[0] ^ t ^ m;
    x[1] = h[1] ^ t ^ m1;
    x[2] = h[2] ^ t ^ m2;
  end
endmodule
