// bmw_f0: first function of the BMW-256 compression function.
// Sixteen words W_j are formed from the word-wise xor D_i = M_i ^ H_i of the
// message block and the old double pipe, each W_j being a signed sum of five
// D words (W_7 .. W_15 as in the BMW-256 specification) modulo 2^32. Then
// Q_j = s_(j mod 5)(W_j). Purely combinational; in bmw256_compress it sits
// between the input register and f1.
module bmw_f0
  import sha3_common_pkg::*, bmw_pkg::*;
(
  input  w32x16_t m,  // message block M^i
  input  w32x16_t h,  // old double pipe H^(i-1)
  output w32x16_t q   // Q_0 .. Q_15
);
  // For each W_j: the five D indices (term 0 rightmost) and, per term, a 1
  // when that term is subtracted. Term 0 is always added.
  localparam logic [15:0][4:0][3:0] IDX = {
    {4'd13, 4'd9,  4'd6,  4'd4,  4'd12},  // W15
    {4'd12, 4'd11, 4'd8,  4'd5,  4'd3 },  // W14
    {4'd11, 4'd10, 4'd7,  4'd4,  4'd2 },  // W13
    {4'd10, 4'd9,  4'd6,  4'd3,  4'd1 },  // W12
    {4'd9,  4'd5,  4'd2,  4'd0,  4'd8 },  // W11
    {4'd15, 4'd7,  4'd4,  4'd1,  4'd8 },  // W10
    {4'd14, 4'd7,  4'd6,  4'd3,  4'd0 },  // W9
    {4'd15, 4'd13, 4'd6,  4'd5,  4'd2 },  // W8
    {4'd14, 4'd12, 4'd5,  4'd4,  4'd1 },  // W7
    {4'd13, 4'd11, 4'd3,  4'd0,  4'd4 },  // W6
    {4'd15, 4'd12, 4'd10, 4'd2,  4'd3 },  // W5
    {4'd14, 4'd11, 4'd9,  4'd2,  4'd1 },  // W4
    {4'd13, 4'd10, 4'd8,  4'd1,  4'd0 },  // W3
    {4'd15, 4'd12, 4'd9,  4'd7,  4'd0 },  // W2
    {4'd15, 4'd14, 4'd11, 4'd8,  4'd6 },  // W1
    {4'd14, 4'd13, 4'd10, 4'd7,  4'd5 }}; // W0
  localparam logic [15:0][4:0] SUB = {
    5'b01110,  // W15: +12 -4 -6 -9 +13
    5'b11010,  // W14: +3 -5 +8 -11 -12
    5'b00000,  // W13
    5'b01100,  // W12: +1 +3 -6 -9 +10
    5'b01110,  // W11: +8 -0 -2 -5 +9
    5'b01110,  // W10: +8 -1 -4 -7 +15
    5'b01010,  // W9 : +0 -3 +6 -7 +14
    5'b10110,  // W8 : +2 -5 -6 +13 -15
    5'b11110,  // W7 : +1 -4 -5 -12 -14
    5'b01110,  // W6 : +4 -0 -3 -11 +13
    5'b01010,  // W5 : +3 -2 +10 -12 +15
    5'b11000,  // W4 : +1 +2 +9 -11 -14
    5'b01010,  // W3 : +0 -1 +8 -10 +13
    5'b01000,  // W2 : +0 +7 +9 -12 +15
    5'b10010,  // W1 : +6 -8 +11 +14 -15
    5'b00010}; // W0 : +5 -7 +10 +13 +14

  w32x16_t d, w;

  always_comb begin
    for (int i = 0; i < 16; i++) d[i] = m[i] ^ h[i];
    for (int j = 0; j < 16; j++) begin
      w[j] = d[IDX[j][0]];
      for (int t = 1; t < 5; t++) begin
        if (SUB[j][t]) w[j] = w[j] - d[IDX[j][t]];
        else           w[j] = w[j] + d[IDX[j][t]];
      end
    end
    for (int j = 0; j < 16; j++) q[j] = bmw_s(j % 5, w[j]);
  end
endmodule
