// threefish_round: one round of Threefish-256.
// Two MIX functions on the word pairs (0,1) and (2,3) with the rotation set
// R_(d mod 8), followed by the word permutation (0,3,2,1).
// Combinational; rnd_mod8 selects the rotation constants.
module threefish_round
  import sha3_common_pkg::*, skein_pkg::*;
(
  input  w64x4_t     v,
  input  logic [2:0] rnd_mod8,
  output w64x4_t     y
);
  w64_t a0, a1, b0, b1;

  threefish_mix u_m0 (.x0(v[0]), .x1(v[1]), .rot(rot_const(rnd_mod8, 1'b0)), .y0(a0), .y1(a1));
  threefish_mix u_m1 (.x0(v[2]), .x1(v[3]), .rot(rot_const(rnd_mod8, 1'b1)), .y0(b0), .y1(b1));

  assign y = {a1, b0, b1, a0};  // y[0]=a0, y[1]=b1, y[2]=b0, y[3]=a1
endmodule
