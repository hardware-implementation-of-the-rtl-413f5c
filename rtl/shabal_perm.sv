// shabal_perm: keyed permutation P of Shabal, built from shift registers.
// A (12 words), B, C and M (16 words each) are held in registers that rotate
// one word per step, so every step reads fixed positions: a[0] is the A word
// being replaced, a[11] the one replaced last, b[0] = B_i, b[6], b[9], b[13]
// are B_(i+6), B_(i+9), B_(i+13), c[0] = C_(8-i) and m[0] = M_i. A step is
//   A' = U(a[0] ^ V(rotl(a[11],15)) ^ c[0]) ^ b[13] ^ (b[9] & ~b[6]) ^ m[0]
//   B' = ~(rotl(b[0],1) ^ A')
// with U(x) = 3x and V(x) = 5x. B is rotated left by 17 bits when loaded.
// STEPS_PER_CYCLE steps are chained per clock (3 gives 48 steps in 16
// cycles, the cycle count of the published implementation). In the last
// cycle the 36 additions A_(j mod 12) += C_(j+3) are made on the way into
// the A output register.
// Timing: load at edge 0; done pulses after edge 48/STEPS_PER_CYCLE, with
// a_o and b_o valid then. c_o and m_o show the loaded C and M.
module shabal_perm
  import sha3_common_pkg::*, shabal_pkg::*;
#(
  parameter int unsigned STEPS_PER_CYCLE = 3  // must divide 48
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  w32x12_t a_i,
  input  w32x16_t b_i,
  input  w32x16_t c_i,
  input  w32x16_t m_i,
  output logic    busy,
  output logic    done,
  output w32x12_t a_o,
  output w32x16_t b_o,
  output w32x16_t c_o,
  output w32x16_t m_o
);
  localparam int unsigned CYCLES = 48 / STEPS_PER_CYCLE;

  w32x12_t a, a_n, a_fin;
  w32x16_t b, c, m, b_n, c_n, m_n;
  logic [5:0] cyc;
  logic       running;

  // STEPS_PER_CYCLE chained steps on the rotating registers
  always_comb begin
    w32_t na;
    a_n = a;
    b_n = b;
    c_n = c;
    m_n = m;
    for (int s = 0; s < STEPS_PER_CYCLE; s++) begin
      na = shabal_u(a_n[0] ^ shabal_v(rotl32(a_n[11], 15)) ^ c_n[0])
           ^ b_n[13] ^ (b_n[9] & ~b_n[6]) ^ m_n[0];
      b_n = {~(rotl32(b_n[0], 1) ^ na), b_n[15:1]};
      a_n = {na, a_n[11:1]};
      c_n = {c_n[14:0], c_n[15]};
      m_n = {m_n[0], m_n[15:1]};
    end
  end

  // C as loaded, in natural order: c[k] holds C_((8+k) mod 16) at rest
  always_comb begin
    for (int x = 0; x < 16; x++) c_o[x] = c[(x + 8) % 16];
    m_o = m;
  end

  // final additions A_(j mod 12) += C_((j+3) mod 16), j = 0..35, taken after
  // the last step, when c_n is back at its rest rotation
  always_comb begin
    a_fin = a_n;
    for (int j = 0; j < 36; j++) a_fin[j % 12] = a_fin[j % 12] + c_n[(j + 3 + 8) % 16];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a <= '0; b <= '0; c <= '0; m <= '0;
      a_o <= '0; b_o <= '0;
      cyc <= '0;
      running <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        a <= a_i;
        for (int k = 0; k < 16; k++) begin
          b[k] <= rotl32(b_i[k], 17);
          c[k] <= c_i[(k + 8) % 16];
        end
        m <= m_i;
        cyc <= '0;
        running <= 1'b1;
      end else if (running) begin
        a <= a_n;
        b <= b_n;
        c <= c_n;
        m <= m_n;
        cyc <= cyc + 6'd1;
        if (cyc == 6'(CYCLES - 1)) begin
          a_o <= a_fin;
          b_o <= b_n;
          running <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign busy = running;
endmodule
