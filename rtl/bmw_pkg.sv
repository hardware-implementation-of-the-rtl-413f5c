// bmw_pkg: the s- and r-transforms of BLUE MIDNIGHT WISH (BMW-256).
// s0..s3 are xors of shifts and rotations, s4/s5 a single shift xor the
// input, r1..r7 plain left rotations by 3, 7, 13, 16, 19, 23, 27 bits.
// Each is a handful of xor gates and wires in hardware.
package bmw_pkg;
  import sha3_common_pkg::*;

  function automatic w32_t bmw_s(int unsigned k, w32_t x);
    case (k)
      0: return (x >> 1) ^ (x << 3) ^ rotl32(x, 4)  ^ rotl32(x, 19);
      1: return (x >> 1) ^ (x << 2) ^ rotl32(x, 8)  ^ rotl32(x, 23);
      2: return (x >> 2) ^ (x << 1) ^ rotl32(x, 12) ^ rotl32(x, 25);
      3: return (x >> 2) ^ (x << 2) ^ rotl32(x, 15) ^ rotl32(x, 29);
      4: return (x >> 1) ^ x;
      default: return (x >> 2) ^ x;
    endcase
  endfunction

  // r_k(x) = ROTL^n(x) with n = 3, 7, 13, 16, 19, 23, 27 for k = 1..7
  function automatic w32_t bmw_r(int unsigned k, w32_t x);
    case (k)
      1: return rotl32(x, 3);
      2: return rotl32(x, 7);
      3: return rotl32(x, 13);
      4: return rotl32(x, 16);
      5: return rotl32(x, 19);
      6: return rotl32(x, 23);
      default: return rotl32(x, 27);
    endcase
  endfunction
endpackage
