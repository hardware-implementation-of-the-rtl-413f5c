// luffa256_compress: Luffa-256 round function between input and output registers.
// The message block M (256 bits) and the three chain values H_0..H_2
// (3 x 256 bits) are captured on start; message injection and the three
// permute blocks Q_0, Q_1, Q_2 (working side by side) form one combinational
// cone, and the next edge stores the new chain values. digest_o is the xor of
// the three stored chain values, Luffa's output function.
// Timing: start sampled at edge 0, done and h_o valid after edge 1.
// Handshake and reset are choices of this design.
module luffa256_compress
  import sha3_common_pkg::*;
#(
  parameter int unsigned STEPS = 8  // step functions per permute block (max 8)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  w32x8_t   m_i,
  input  w32x3x8_t h_i,
  output logic     busy,
  output logic     done,
  output w32x3x8_t h_o,
  output w32x8_t   digest_o
);
  w32x8_t   m_r;
  w32x3x8_t h_r, x, h_next;
  logic     pending;

  luffa_mi u_mi (.h(h_r), .m(m_r), .x(x));

  for (genvar j = 0; j < 3; j++) begin : g_q
    luffa_permute #(.J(j), .STEPS(STEPS)) u_q (.a(x[j]), .y(h_next[j]));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_r     <= '0;
      h_r     <= '0;
      h_o     <= '0;
      pending <= 1'b0;
      done    <= 1'b0;
    end else begin
      done    <= pending;
      pending <= start;
      if (start) begin
        m_r <= m_i;
        h_r <= h_i;
      end
      if (pending) h_o <= h_next;
    end
  end

  assign busy     = pending;
  assign digest_o = h_o[0] ^ h_o[1] ^ h_o[2];
endmodule
