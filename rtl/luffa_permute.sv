// luffa_permute: permute block Q_J of Luffa-256.
// The input tweak rotates words 4..7 left by J bits (wires only), then
// STEPS step functions follow in a chain. Combinational.
module luffa_permute
  import sha3_common_pkg::*;
#(
  parameter int unsigned J     = 0,
  parameter int unsigned STEPS = 8
) (
  input  w32x8_t a,
  output w32x8_t y
);
  w32x8_t tw;

  always_comb begin
    tw = a;
    for (int k = 4; k < 8; k++) tw[k] = rotl32(a[k], J);
  end

  // one signal pair per step, so no array is both read and written by the chain
  for (genvar r = 0; r < STEPS; r++) begin : g_step
    w32x8_t x, z;
    if (r == 0) begin : g_first
      assign x = tw;
    end else begin : g_next
      assign x = g_step[r-1].z;
    end
    luffa_step #(.J(J), .R(r)) u_step (.a(x), .y(z));
  end

  assign y = g_step[STEPS-1].z;
endmodule
