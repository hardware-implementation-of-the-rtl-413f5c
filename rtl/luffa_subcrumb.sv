// luffa_subcrumb: the SubCrumb layer of Luffa, 32 copies of a 4-bit s-box.
// Bit l of words a[0..3] forms crumb l (a[0] is its least significant bit);
// the s-box output bits go back to bit l of y[0..3]. Combinational.
module luffa_subcrumb
  import sha3_common_pkg::*, luffa_pkg::*;
(
  input  w32x4_t a,
  output w32x4_t y
);
  always_comb begin
    for (int l = 0; l < 32; l++) begin
      logic [3:0] s;
      s = SBOX[{a[3][l], a[2][l], a[1][l], a[0][l]}];
      for (int k = 0; k < 4; k++) y[k][l] = s[k];
    end
  end
endmodule
