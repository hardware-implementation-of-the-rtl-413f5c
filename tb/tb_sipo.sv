// tb_sipo: self-checking testbench for sipo.
// Writes random words to random addresses of a 30-word buffer, including
// addresses past its end that must be ignored and cycles with the write
// enable low, and compares the parallel output with a model array.
// Prints one TB_RESULT line; a watchdog ends a hung run.
module tb_sipo;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned WORDS = 30;
  logic rst_n, we;
  logic [5:0] addr;
  logic [31:0] wdata;
  logic [WORDS-1:0][31:0] q, model;

  sipo #(.WORDS(WORDS)) dut (.clk, .rst_n, .we, .addr, .wdata, .q);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; we = 1'b0; addr = '0; wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    model = '0;
    checks++; if (q !== model) failures++;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0;
      addr = 6'($urandom);
      wdata = $urandom;
      @(posedge clk);
      if (we && addr < WORDS) model[addr] = wdata;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures <= 4) $display("MISMATCH after write %0d addr %0d", n, addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
