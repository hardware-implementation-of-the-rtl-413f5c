// skein1c_key_schedule: subkey generator of the sequential Skein-1c.
// Two circular shift registers hold the extended key k_0..k_4 and the
// extended tweak t_0..t_2, and a 5-bit counter holds the subkey index s.
// The current subkey is {k_0, k_1 + t_0, k_2 + t_1, k_3 + s} taken from the
// register heads, i.e. three 64-bit adders. On advance both registers rotate
// by one word and s counts up, which yields subkey s+1.
// load captures the key and tweak; k_4 = C240 ^ k_0 ^ .. ^ k_3 and
// t_2 = t_0 ^ t_1 are formed here at load time. advance is a clock enable
// that the core raises once every four rounds, standing in for the original
// key-schedule clock running at a quarter of the round clock.
module skein1c_key_schedule
  import sha3_common_pkg::*, skein_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  logic   advance,
  input  w64x4_t k_i,
  input  w64x2_t t_i,
  output w64x4_t subkey
);
  logic [4:0][63:0] kr;
  logic [2:0][63:0] tr;
  logic [4:0]       s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kr <= '0;
      tr <= '0;
      s  <= '0;
    end else if (load) begin
      kr <= {C240 ^ k_i[0] ^ k_i[1] ^ k_i[2] ^ k_i[3], k_i};
      tr <= {t_i[0] ^ t_i[1], t_i};
      s  <= '0;
    end else if (advance) begin
      kr <= {kr[0], kr[4:1]};
      tr <= {tr[0], tr[2:1]};
      s  <= s + 5'd1;
    end
  end

  assign subkey = {kr[3] + 64'(s), kr[2] + tr[1], kr[1] + tr[0], kr[0]};
endmodule
