// skein_pkg: constants of Threefish-256 as used by the Skein-256 cores.
// rot_const gives the MIX rotation amounts R_(d mod 8, i), C240 is the
// key-schedule parity constant, and make_subkey forms subkey s (added before
// every group of four rounds and once more after the last round).
package skein_pkg;
  import sha3_common_pkg::*;

  localparam w64_t C240 = 64'h1BD1_1BDA_A9FC_1A22;

  // rotation amount for MIX i (0 or 1) in round d
  function automatic logic [5:0] rot_const(logic [2:0] d, logic i);
    logic [7:0][5:0] r0, r1;
    r0 = {6'd32, 6'd58, 6'd46, 6'd25, 6'd5,  6'd23, 6'd52, 6'd14};
    r1 = {6'd32, 6'd22, 6'd12, 6'd33, 6'd37, 6'd40, 6'd57, 6'd16};
    return i ? r1[d] : r0[d];
  endfunction

  // subkey s: words k[(s+i) mod 5] plus tweak words on 1 and 2 and s on 3
  function automatic w64x4_t make_subkey(logic [4:0][63:0] k, logic [2:0][63:0] t, int unsigned s);
    w64x4_t y;
    y[0] = k[s % 5];
    y[1] = k[(s + 1) % 5] + t[s % 3];
    y[2] = k[(s + 2) % 5] + t[(s + 1) % 3];
    y[3] = k[(s + 3) % 5] + 64'(s);
    return y;
  endfunction
endpackage
