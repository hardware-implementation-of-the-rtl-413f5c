// blake256_compress: BLAKE-32 compression function (256-bit digest).
// Cycle 1 (the start edge) loads the chain value h, message m, salt s and
// counter t into the input registers and the 16-word state v with the
// initialisation h_0..h_7, s_i ^ c_i, t_0 ^ c_4, t_0 ^ c_5, t_1 ^ c_6,
// t_1 ^ c_7. Each following cycle applies one full round: four G functions
// on the columns, then four on the diagonals, eight G instances in all, with
// the message words picked by sigma_(round mod 10). The finalisation
// h'_i = h_i ^ s_(i mod 4) ^ v_i ^ v_(i+8) is formed on the way into the
// output register in the last round cycle.
// Timing: start sampled at edge 0, done and h_o valid after edge ROUNDS,
// so 1 + ROUNDS = 11 cycles per block, as in the published architecture.
// Handshake and reset are choices of this design.
module blake256_compress
  import sha3_common_pkg::*, blake_pkg::*;
#(
  parameter int unsigned ROUNDS = 10
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  w32x8_t  h_i,
  input  w32x16_t m_i,
  input  w32x4_t  s_i,
  input  w32x2_t  t_i,
  output logic    busy,
  output logic    done,
  output w32x8_t  h_o
);
  w32x8_t  h_r;
  w32x16_t m_r;
  w32x4_t  s_r;
  w32x16_t v, vc, vd;       // state, after columns, after diagonals
  w32x8_t  mk0, mk1;        // per G: message word xor constant, for both halves
  logic [3:0] rnd;
  logic       running;

  // message/constant words for the eight G functions of this round
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      mk0[i] = m_r[sigma(int'(rnd), 2*i)]     ^ C[sigma(int'(rnd), 2*i + 1)];
      mk1[i] = m_r[sigma(int'(rnd), 2*i + 1)] ^ C[sigma(int'(rnd), 2*i)];
    end
  end

  // columns: G0..G3 on (i, i+4, i+8, i+12)
  for (genvar i = 0; i < 4; i++) begin : g_col
    blake_g u_g (.a(v[i]), .b(v[i+4]), .c(v[i+8]), .d(v[i+12]), .m0(mk0[i]), .m1(mk1[i]),
                 .ao(vc[i]), .bo(vc[i+4]), .co(vc[i+8]), .do_(vc[i+12]));
  end

  // diagonals: G4..G7 on (i, 4+(i+1)%4, 8+(i+2)%4, 12+(i+3)%4)
  for (genvar i = 0; i < 4; i++) begin : g_diag
    blake_g u_g (.a(vc[i]), .b(vc[4+(i+1)%4]), .c(vc[8+(i+2)%4]), .d(vc[12+(i+3)%4]),
                 .m0(mk0[4+i]), .m1(mk1[4+i]),
                 .ao(vd[i]), .bo(vd[4+(i+1)%4]), .co(vd[8+(i+2)%4]), .do_(vd[12+(i+3)%4]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      h_r <= '0; m_r <= '0; s_r <= '0; v <= '0; h_o <= '0;
      rnd <= '0;
      running <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        h_r <= h_i;
        m_r <= m_i;
        s_r <= s_i;
        v[7:0] <= h_i;
        for (int i = 0; i < 4; i++) v[8+i] <= s_i[i] ^ C[i];
        v[12] <= t_i[0] ^ C[4];
        v[13] <= t_i[0] ^ C[5];
        v[14] <= t_i[1] ^ C[6];
        v[15] <= t_i[1] ^ C[7];
        rnd <= '0;
        running <= 1'b1;
      end else if (running) begin
        v   <= vd;
        rnd <= rnd + 4'd1;
        if (rnd == 4'(ROUNDS - 1)) begin
          for (int i = 0; i < 8; i++) h_o[i] <= h_r[i] ^ s_r[i % 4] ^ vd[i] ^ vd[i+8];
          running <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign busy = running;
endmodule
