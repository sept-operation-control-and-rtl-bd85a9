// Testbench of clk_div: counts external clock edges between internal clock
// edges and checks the divide-by-4 ratio and the 50 % duty cycle.
`timescale 1ns/1ps
module tb_clk_div;
  logic clk_ext = 0, rst_n = 1, clk_int;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  int checks = 0, failures = 0;
  clk_div #(.DIV(4)) dut (.clk_ext, .rst_n, .clk_int);
  always #28 clk_ext = ~clk_ext;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hi, lo;
    repeat (3) @(posedge clk_ext);
    checks++; if (clk_int !== 1'b0) begin failures++; $display("not low in reset"); end
    rst_n = 1;
    @(posedge clk_int);
    for (int n = 0; n < 20; n++) begin
      hi = 0; lo = 0;
      while (clk_int) begin @(posedge clk_ext); #1; hi++; end
      while (!clk_int) begin @(posedge clk_ext); #1; lo++; end
      checks++;
      if (hi != 2 || lo != 2) begin failures++; $display("period %0d high %0d low", hi, lo); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
