// tb_piso: self-checking testbench for piso.
// Loads random 44-word results, reads every word through the select lines
// (plus out-of-range selects that must read zero), and checks that the
// register keeps its contents while load is low and d changes.
// Prints one TB_RESULT line; a watchdog ends a hung run.
module tb_piso;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int unsigned WORDS = 44;
  logic rst_n, load;
  logic [5:0] sel;
  logic [31:0] q;
  logic [WORDS-1:0][31:0] d, held;

  piso #(.WORDS(WORDS)) dut (.clk, .rst_n, .load, .d, .sel, .q);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; sel = '0; d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 10; n++) begin
      @(negedge clk);
      for (int i = 0; i < WORDS; i++) d[i] = $urandom;
      held = d;
      load = 1'b1;
      @(posedge clk);
      #1 load = 1'b0;
      for (int i = 0; i < WORDS; i++) d[i] = $urandom;   // must not be captured
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        sel = 6'(i);
        #1;
        checks++;
        if (q !== (i < WORDS ? held[i] : 32'd0)) begin
          failures++;
          if (failures <= 4) $display("MISMATCH word %0d: %h", i, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
