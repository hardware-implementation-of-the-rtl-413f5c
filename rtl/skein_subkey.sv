// skein_subkey: subkey adder module of the unrolled Skein-256.
// Forms subkey s from the extended key k_0..k_4 and tweak t_0..t_2
// (k[(s+i) mod 5], plus t[s mod 3] on word 1, t[(s+1) mod 3] on word 2 and s
// on word 3) and adds it word-wise to the state. Combinational; s is a
// constant in every instance of the unrolled core, so the key-word selection
// is wiring.
module skein_subkey
  import sha3_common_pkg::*, skein_pkg::*;
(
  input  w64x4_t           v,
  input  logic [4:0][63:0] k,
  input  logic [2:0][63:0] t,
  input  logic [4:0]       s,
  output w64x4_t           y
);
  w64x4_t sk;

  always_comb begin
    sk = make_subkey(k, t, int'(s));
    for (int i = 0; i < 4; i++) y[i] = v[i] + sk[i];
  end
endmodule
