// cdc_pulse: carries a one-cycle pulse from one clock domain to another.
// A pulse in the source domain flips a toggle register; the destination
// domain passes the toggle through two synchronizer flops and a third flop,
// and turns each change it sees into a one-cycle pulse.
//
// Interface: pulse_i is sampled on src_clk, pulse_o is a registered
// one-cycle pulse on dst_clk. Both resets are synchronous and active low.
// Timing: pulse_o follows 2 to 3 dst_clk edges after the src_clk edge that
// took pulse_i. Two source pulses must be at least three destination cycles
// apart, or they merge (the top level only pulses a core's start or done
// once per operation, so this holds there).
// The top level uses it to cross the start and done pulses between the I/O
// clock and the compression clock; the structure is this design's choice.
module cdc_pulse (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic pulse_i,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic pulse_o
);
  logic       src_tgl;
  logic [2:0] dst_sync;

  always_ff @(posedge src_clk) begin
    if (!src_rst_n) src_tgl <= 1'b0;
    else            src_tgl <= src_tgl ^ pulse_i;
  end

  always_ff @(posedge dst_clk) begin
    if (!dst_rst_n) dst_sync <= '0;
    else            dst_sync <= {dst_sync[1:0], src_tgl};
  end

  assign pulse_o = dst_sync[2] ^ dst_sync[1];
endmodule
