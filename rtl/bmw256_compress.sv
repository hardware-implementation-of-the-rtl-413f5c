// bmw256_compress: BLUE MIDNIGHT WISH (BMW-256) compression function.
// The 512-bit message block M and the 512-bit old double pipe H are captured
// in the input register on start; f0 -> f1 -> f2 run as one combinational
// cone, and the next clock edge captures the new double pipe in the output
// register. digest_o is its least significant half, words H_8..H_15.
// Timing: start sampled at edge 0, done pulses with h_o valid after edge 1
// (one cycle between the two registers, as in the published architecture).
// The start/busy/done handshake and the synchronous active-low reset are
// choices of this design.
module bmw256_compress
  import sha3_common_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  w32x16_t m_i,
  input  w32x16_t h_i,
  output logic    busy,
  output logic    done,
  output w32x16_t h_o,
  output w32x8_t  digest_o
);
  w32x16_t m_r, h_r;   // In_Reg
  w32x16_t qa, qb, h_next;
  logic    pending;

  bmw_f0 u_f0 (.m(m_r), .h(h_r), .q(qa));
  bmw_f1 u_f1 (.m(m_r), .qa(qa), .qb(qb));
  bmw_f2 u_f2 (.m(m_r), .q({qb, qa}), .h(h_next));

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
  assign digest_o = h_o[15:8];
endmodule
