// luffa_mixword: the MixWord linear layer of Luffa on a pair of words.
// xr ^= xl; xl = rotl(xl,2) ^ xr; xr = rotl(xr,14) ^ xl; xl = rotl(xl,10) ^ xr;
// xr = rotl(xr,1). Only xors and wiring. Combinational.
module luffa_mixword
  import sha3_common_pkg::*;
(
  input  w32_t xl,
  input  w32_t xr,
  output w32_t yl,
  output w32_t yr
);
  w32_t l1, r1, r2;

  assign r1 = xr ^ xl;
  assign l1 = rotl32(xl, 2) ^ r1;
  assign r2 = rotl32(r1, 14) ^ l1;
  assign yl = rotl32(l1, 10) ^ r2;
  assign yr = rotl32(r2, 1);
endmodule
