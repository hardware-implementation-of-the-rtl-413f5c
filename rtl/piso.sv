// piso: parallel-in serial-out output buffer for a compression core.
// load captures the whole result d in one cycle (the core's done pulse);
// the select lines then pick which 32-bit word appears on q, so the result
// leaves 32 bits at a time. q is combinational from the register and sel;
// a sel >= WORDS reads zero.
module piso #(
  parameter int unsigned WORDS = 8,
  parameter int unsigned AW    = 6
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic [WORDS-1:0][31:0] d,
  input  logic [AW-1:0]          sel,
  output logic [31:0]            q
);
  logic [WORDS-1:0][31:0] r;

  always_ff @(posedge clk) begin
    if (!rst_n)    r <= '0;
    else if (load) r <= d;
  end

  assign q = (sel < AW'(WORDS)) ? r[sel] : 32'd0;
endmodule
