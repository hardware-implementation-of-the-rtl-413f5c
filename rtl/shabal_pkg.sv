// shabal_pkg: the two nonlinear word maps of Shabal, U(x) = 3x and
// V(x) = 5x modulo 2^32. Each is one adder fed by the word and a shifted copy.
package shabal_pkg;
  import sha3_common_pkg::*;

  function automatic w32_t shabal_u(w32_t x);
    return x + (x << 1);
  endfunction

  function automatic w32_t shabal_v(w32_t x);
    return x + (x << 2);
  endfunction
endpackage
