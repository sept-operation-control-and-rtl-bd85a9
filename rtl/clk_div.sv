// Internal clock generator: divides the 18 MHz external clock by DIV to give
// the 4.5 MHz clock on which the whole FPGA runs (serial link, timer, event
// counting).
//
// A counter runs from 0 to DIV/2-1 and toggles the output at every wrap, so
// the output has a 50 % duty cycle for even DIV. The division ratio of 4 is
// the instrument's (18 MHz to 4.5 MHz); the counter-and-toggle scheme is this
// design's choice.
//
// Interface: clk_ext in, clk_int out; rst_n asynchronously clears the divider
// (clk_int low). clk_int rises DIV/2 external cycles after reset is released.
module clk_div #(
  parameter int DIV = 4
) (
  input  logic clk_ext,
  input  logic rst_n,
  output logic clk_int
);
  localparam int HALF = DIV / 2;
  localparam int CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk_ext or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_int <= 1'b0;
    end else if (cnt == CW'(HALF - 1)) begin
      cnt     <= '0;
      clk_int <= ~clk_int;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
