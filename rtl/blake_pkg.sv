// blake_pkg: constants of BLAKE-32 (the 256-bit BLAKE).
// C holds the sixteen 32-bit constants (leading fraction digits of pi) and
// SIGMA the ten message permutations sigma_r; nibble i of row r is sigma_r(i).
// A round r >= 10 reuses sigma_(r mod 10).
package blake_pkg;
  import sha3_common_pkg::*;

  localparam w32x16_t C = {
    32'hB5470917, 32'h3F84D5B5, 32'hC97C50DD, 32'hC0AC29B7,
    32'h34E90C6C, 32'hBE5466CF, 32'h38D01377, 32'h452821E6,
    32'hEC4E6C89, 32'h082EFA98, 32'h299F31D0, 32'hA4093822,
    32'h03707344, 32'h13198A2E, 32'h85A308D3, 32'h243F6A88};

  localparam logic [9:0][15:0][3:0] SIGMA = {
    64'h0DC3E9BF5167482A, // r = 9: 10 2 8 4 7 6 1 5 15 11 9 14 3 12 13 0
    64'h5A417D2C803B9EF6, // r = 8: 6 15 14 9 11 3 0 8 12 2 13 7 1 4 10 5
    64'hA2684F05931CE7BD, // r = 7: 13 11 7 14 12 1 3 9 5 0 15 4 8 6 2 10
    64'hB8293670A4DEF15C, // r = 6: 12 5 1 15 14 13 4 10 0 7 6 3 9 2 8 11
    64'h91EF57D438B0A6C2, // r = 5: 2 12 6 10 0 11 8 3 4 13 7 5 15 14 1 9
    64'hD386CB1EFA427509, // r = 4: 9 0 5 7 2 4 10 15 14 1 11 12 6 8 3 13
    64'h8F04A562EBCD1397, // r = 3: 7 9 3 1 13 12 11 14 2 6 5 10 4 0 15 8
    64'h491763EADF250C8B, // r = 2: 11 8 12 0 5 2 15 13 10 14 3 6 7 1 9 4
    64'h357B20C16DF984AE, // r = 1: 14 10 4 8 9 15 13 6 1 12 0 2 11 7 5 3
    64'hFEDCBA9876543210}; // r = 0: 0 1 2 3 4 5 6 7 8 9 10 11 12 13 14 15

  function automatic logic [3:0] sigma(int unsigned r, int unsigned i);
    return SIGMA[r % 10][i];
  endfunction
endpackage
