// skein1c_compress: sequential Skein-256 compression using one Threefish round.
// A single round with programmable MIX rotations is iterated ROUNDS times.
// In rounds whose index is a multiple of four the current subkey from
// skein1c_key_schedule is added first (a multiplexer picks subkey or zero),
// and the schedule then advances. In the last round the final subkey is added
// to the round output and the result is xored with the message (UBI
// feed-forward) on its way into the output register.
// Timing: start sampled at edge 0 (inputs, key schedule, state <= message);
// rounds run at edges 1..ROUNDS; done pulses and h_o is valid after edge
// ROUNDS, so a block takes ROUNDS = 72 cycles after loading.
// start while busy is not allowed. Handshake and reset are choices of this
// design.
module skein1c_compress
  import sha3_common_pkg::*;
#(
  parameter int unsigned ROUNDS = 72  // multiple of 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  w64x4_t key_i,
  input  w64x2_t tweak_i,
  input  w64x4_t msg_i,
  output logic   busy,
  output logic   done,
  output w64x4_t h_o
);
  w64x4_t msg_r, v, sk, rin, rout;
  logic [6:0] rnd;
  logic       running, key_round, last_round;

  assign key_round  = (rnd[1:0] == 2'd0);
  assign last_round = (rnd == 7'(ROUNDS - 1));

  skein1c_key_schedule u_ks (
    .clk(clk), .rst_n(rst_n), .load(start), .advance(running && key_round),
    .k_i(key_i), .t_i(tweak_i), .subkey(sk));

  always_comb begin
    for (int i = 0; i < 4; i++) rin[i] = v[i] + (key_round ? sk[i] : 64'd0);
  end

  threefish_round u_rnd (.v(rin), .rnd_mod8(rnd[2:0]), .y(rout));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      msg_r   <= '0;
      v       <= '0;
      rnd     <= '0;
      running <= 1'b0;
      done    <= 1'b0;
      h_o     <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        msg_r   <= msg_i;
        v       <= msg_i;
        rnd     <= '0;
        running <= 1'b1;
      end else if (running) begin
        v   <= rout;
        rnd <= rnd + 7'd1;
        if (last_round) begin
          for (int i = 0; i < 4; i++) h_o[i] <= (rout[i] + sk[i]) ^ msg_r[i];
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  assign busy = running;

  a_no_start_when_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !running);
endmodule
