// bmw_f1: second function of the BMW-256 compression function.
// Expands Q_0..Q_15 into Q_16..Q_31. Q_16 and Q_17 use Expand1 (s-transforms
// of the sixteen previous Q words); Q_18..Q_31 use the cheaper Expand2
// (alternating plain and r-rotated words, then s4 and s5 of the last two).
// Both add AddElement(j) = M_(j-16) + M_(j-13) - M_(j-6) + j*0x05555555
// (indices mod 16). The chain is combinational and serial: Q_j needs Q_(j-1).
module bmw_f1
  import sha3_common_pkg::*, bmw_pkg::*;
(
  input  w32x16_t m,   // message block
  input  w32x16_t qa,  // Q_0 .. Q_15
  output w32x16_t qb   // Q_16 .. Q_31
);
  w32x32_t q;

  always_comb begin
    q = '0;
    q[15:0] = qa;
    for (int j = 16; j < 32; j++) begin
      w32_t acc;
      acc = m[(j - 16) % 16] + m[(j - 13) % 16] - m[(j - 6) % 16] + w32_t'(j) * 32'h0555_5555;
      if (j < 18) begin
        for (int k = 0; k < 16; k++) acc = acc + bmw_s((k + 1) % 4, q[j - 16 + k]);
      end else begin
        for (int k = 0; k < 14; k += 2) acc = acc + q[j - 16 + k] + bmw_r(k / 2 + 1, q[j - 15 + k]);
        acc = acc + bmw_s(4, q[j - 2]) + bmw_s(5, q[j - 1]);
      end
      q[j] = acc;
    end
    qb = q[31:16];
  end
endmodule
