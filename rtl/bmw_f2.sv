// bmw_f2: third function of the BMW-256 compression function.
// Folds the quadruple pipe Q_0..Q_31 and the message into the new double pipe:
// XL = xor of Q_16..Q_23, XH = XL xor Q_24..Q_31; H_0..H_7 mix shifted XH,
// shifted Q_(16+i) and M_i with XL ^ Q_(24+i) ^ Q_i; H_8..H_15 add a rotated
// H_(i-4 mod 8) to two further xor terms. Shift amounts follow BMW-256.
// Purely combinational.
module bmw_f2
  import sha3_common_pkg::*;
(
  input  w32x16_t m,  // message block
  input  w32x32_t q,  // Q_0 .. Q_31
  output w32x16_t h   // new double pipe H^i
);
  w32_t xl, xh;

  always_comb begin
    xl = q[16] ^ q[17] ^ q[18] ^ q[19] ^ q[20] ^ q[21] ^ q[22] ^ q[23];
    xh = xl ^ q[24] ^ q[25] ^ q[26] ^ q[27] ^ q[28] ^ q[29] ^ q[30] ^ q[31];

    h[0]  = ((xh << 5)  ^ (q[16] >> 5) ^ m[0]) + (xl ^ q[24] ^ q[0]);
    h[1]  = ((xh >> 7)  ^ (q[17] << 8) ^ m[1]) + (xl ^ q[25] ^ q[1]);
    h[2]  = ((xh >> 5)  ^ (q[18] << 5) ^ m[2]) + (xl ^ q[26] ^ q[2]);
    h[3]  = ((xh >> 1)  ^ (q[19] << 5) ^ m[3]) + (xl ^ q[27] ^ q[3]);
    h[4]  = ((xh >> 3)  ^ q[20]        ^ m[4]) + (xl ^ q[28] ^ q[4]);
    h[5]  = ((xh << 6)  ^ (q[21] >> 6) ^ m[5]) + (xl ^ q[29] ^ q[5]);
    h[6]  = ((xh >> 4)  ^ (q[22] << 6) ^ m[6]) + (xl ^ q[30] ^ q[6]);
    h[7]  = ((xh >> 11) ^ (q[23] << 2) ^ m[7]) + (xl ^ q[31] ^ q[7]);

    h[8]  = rotl32(h[4], 9)  + (xh ^ q[24] ^ m[8])  + ((xl << 8) ^ q[23] ^ q[8]);
    h[9]  = rotl32(h[5], 10) + (xh ^ q[25] ^ m[9])  + ((xl >> 6) ^ q[16] ^ q[9]);
    h[10] = rotl32(h[6], 11) + (xh ^ q[26] ^ m[10]) + ((xl << 6) ^ q[17] ^ q[10]);
    h[11] = rotl32(h[7], 12) + (xh ^ q[27] ^ m[11]) + ((xl << 4) ^ q[18] ^ q[11]);
    h[12] = rotl32(h[0], 13) + (xh ^ q[28] ^ m[12]) + ((xl >> 3) ^ q[19] ^ q[12]);
    h[13] = rotl32(h[1], 14) + (xh ^ q[29] ^ m[13]) + ((xl >> 4) ^ q[20] ^ q[13]);
    h[14] = rotl32(h[2], 15) + (xh ^ q[30] ^ m[14]) + ((xl >> 7) ^ q[21] ^ q[14]);
    h[15] = rotl32(h[3], 16) + (xh ^ q[31] ^ m[15]) + ((xl >> 2) ^ q[22] ^ q[15]);
  end
endmodule
