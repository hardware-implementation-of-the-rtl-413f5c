// luffa_step: one step function of Luffa permute block Q_J in step R.
// SubCrumb on words (0,1,2,3) and on (5,6,7,4), MixWord on the pairs
// (k, k+4) for k = 0..3, then AddConstant xors the step constants into
// words 0 and 4. The constants are fixed by J and R, so the xors reduce to
// inverters and wires. Combinational.
module luffa_step
  import sha3_common_pkg::*, luffa_pkg::*;
#(
  parameter int unsigned J = 0,  // permute block index 0..2
  parameter int unsigned R = 0   // step index 0..7
) (
  input  w32x8_t a,
  output w32x8_t y
);
  w32x4_t sl, sr;
  w32x8_t s, mx;

  luffa_subcrumb u_sc0 (.a(a[3:0]), .y(sl));
  luffa_subcrumb u_sc1 (.a({a[4], a[7], a[6], a[5]}), .y(sr));

  assign s = {sr[2], sr[1], sr[0], sr[3], sl};

  for (genvar k = 0; k < 4; k++) begin : g_mix
    luffa_mixword u_mw (.xl(s[k]), .xr(s[k+4]), .yl(mx[k]), .yr(mx[k+4]));
  end

  always_comb begin
    y    = mx;
    y[0] = mx[0] ^ RC0[J][R];
    y[4] = mx[4] ^ RC4[J][R];
  end
endmodule
