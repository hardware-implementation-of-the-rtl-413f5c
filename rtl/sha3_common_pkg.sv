// sha3_common_pkg: word types and rotate helpers shared by all compression cores.
// Multi-word values are packed arrays whose index 0 is word 0 (the least
// significant word), so a 16-word block is logic [15:0][31:0] and m[i] is M_i.
// Pure functions only; nothing here holds state.
package sha3_common_pkg;
  typedef logic [31:0] w32_t;
  typedef logic [63:0] w64_t;
  typedef logic [1:0][31:0]  w32x2_t;
  typedef logic [3:0][31:0]  w32x4_t;
  typedef logic [7:0][31:0]  w32x8_t;
  typedef logic [11:0][31:0] w32x12_t;
  typedef logic [15:0][31:0] w32x16_t;
  typedef logic [31:0][31:0] w32x32_t;
  typedef logic [2:0][7:0][31:0] w32x3x8_t;
  typedef logic [1:0][63:0]  w64x2_t;
  typedef logic [3:0][63:0]  w64x4_t;

  // the six compression cores of sha3_cores_top
  typedef enum logic [2:0] {
    CORE_BMW    = 3'd0,
    CORE_LUFFA  = 3'd1,
    CORE_SKEIN  = 3'd2,
    CORE_SKEIN1C = 3'd3,
    CORE_SHABAL = 3'd4,
    CORE_BLAKE  = 3'd5
  } core_e;
  localparam int unsigned NUM_CORES = 6;

  function automatic w32_t rotl32(w32_t x, int unsigned n);
    return (x << n) | (x >> ((32 - n) % 32));
  endfunction

  function automatic w32_t rotr32(w32_t x, int unsigned n);
    return (x >> n) | (x << ((32 - n) % 32));
  endfunction

  function automatic w64_t rotl64(w64_t x, int unsigned n);
    return (x << n) | (x >> ((64 - n) % 64));
  endfunction
endpackage
