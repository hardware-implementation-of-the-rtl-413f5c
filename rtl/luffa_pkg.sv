// luffa_pkg: tables and the GF(2^8)^32 doubling of Luffa-256.
// SBOX is the 4-bit SubCrumb s-box. RC0[j][r] and RC4[j][r] are the step
// constants xored into words 0 and 4 of permute block Q_j in step r.
// mult2() multiplies a 256-bit value (eight 32-bit words) by 2 in the ring
// built on phi(x) = x^8 + x^4 + x^3 + x + 1: a word shift with feedback of
// word 7 into words 0, 1, 3 and 4.
package luffa_pkg;
  import sha3_common_pkg::*;


  localparam logic [15:0][3:0] SBOX = {
    4'd14, 4'd2, 4'd1, 4'd9, 4'd0, 4'd6, 4'd15, 4'd5,
    4'd3,  4'd8, 4'd4, 4'd12, 4'd10, 4'd11, 4'd13, 4'd7};

  localparam logic [2:0][7:0][31:0] RC0 = {
    {32'ha2c78434, 32'hd9847356, 32'hedb780c8, 32'hbb6de032,
     32'h8438764a, 32'h7ad8818f, 32'h34552e25, 32'hfc20d9d2},
    {32'h40a46f3e, 32'hbaca1589, 32'haeb28562, 32'h707a3d45,
     32'h1c1e8f51, 32'h0707a3d4, 32'h70f47aae, 32'hb6de10ed},
    {32'h96e1db12, 32'h8f5b7882, 32'h7800423d, 32'h1e00108f,
     32'hdc56983e, 32'h6cc33a12, 32'hc0e65299, 32'h303994a6}};

  localparam logic [2:0][7:0][31:0] RC4 = {
    {32'h703aace7, 32'h36eda57f, 32'h27586719, 32'h78e38b9d,
     32'h1e38e2e7, 32'h5c58a4a4, 32'he623bb72, 32'he25e72c1},
    {32'hb923c704, 32'h2e48f1c1, 32'hfaa7ae2b, 32'h144ae5cc,
     32'hf4272b28, 32'hbd09caca, 32'h05a17cf4, 32'h01685f3d},
    {32'h9a226e9d, 32'h26889ba7, 32'h5274baf4, 32'he5a8bce6,
     32'h9389217f, 32'h7f34d442, 32'h441ba90d, 32'he0337818}};

  function automatic w32x8_t mult2(w32x8_t a);
    w32x8_t b;
    b[7] = a[6];
    b[6] = a[5];
    b[5] = a[4];
    b[4] = a[3] ^ a[7];
    b[3] = a[2] ^ a[7];
    b[2] = a[1];
    b[1] = a[0] ^ a[7];
    b[0] = a[7];
    return b;
  endfunction
endpackage
