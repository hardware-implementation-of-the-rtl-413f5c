// sipo: serial-in parallel-out input buffer for a compression core.
// A bank of WORDS 32-bit registers; each write stores wdata in the word
// chosen by the select lines (addr). All words are presented side by side on
// q (word 0 in the least significant bits), ready to be sampled by a core's
// input register. Writes to addr >= WORDS are ignored. One write per cycle.
module sipo #(
  parameter int unsigned WORDS = 32,
  parameter int unsigned AW    = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic [AW-1:0]          addr,
  input  logic [31:0]            wdata,
  output logic [WORDS-1:0][31:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n) q <= '0;
    else if (we && addr < AW'(WORDS)) q[addr] <= wdata;
  end
endmodule
