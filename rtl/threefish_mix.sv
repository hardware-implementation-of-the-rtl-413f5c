// threefish_mix: the MIX function of Threefish-256.
// y0 = x0 + x1 (mod 2^64), y1 = rotl(x1, rot) ^ y0. The rotation amount is
// an input: tied to a constant it folds into wiring (unrolled Skein), driven
// from the round counter it becomes the programmable MIX of Skein-1c.
// Combinational.
module threefish_mix
  import sha3_common_pkg::*;
(
  input  w64_t       x0,
  input  w64_t       x1,
  input  logic [5:0] rot,
  output w64_t       y0,
  output w64_t       y1
);
  assign y0 = x0 + x1;
  assign y1 = rotl64(x1, int'(rot)) ^ y0;
endmodule
