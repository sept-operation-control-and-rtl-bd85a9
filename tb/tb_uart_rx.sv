// Testbench of uart_rx: sends random bytes in 8-data/2-stop frames at the
// nominal rate and at +-2 % rate error, then a frame with a low stop bit, and
// checks each received byte, the frame error and the absence of stray bytes.
`timescale 1ns/1ps
module tb_uart_rx;
  localparam int CPB = 78;
  logic clk = 0, rst_n = 1, rxd = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0, nvalid = 0, nerr = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .rxd, .data, .valid, .frame_err);
  always #111 clk = ~clk;   // 4.5 MHz

  always @(posedge clk) begin
    if (valid) begin nvalid++; last = data; end
    if (frame_err) nerr++;
  end

  task automatic send(input logic [7:0] b, input real bitns, input logic stop = 1);
    rxd = 0; #(bitns);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; #(bitns); end
    rxd = stop; #(bitns);
    rxd = 1; #(bitns);
  endtask

  initial begin
    #200ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    real nominal;
    logic [7:0] b;
    int nb0;
    nominal = 222.0 * CPB;
    #1000 rst_n = 1; #1000;
    for (int n = 0; n < 60; n++) begin
      real r;
      b = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
      r = (n % 3 == 0) ? nominal : (n % 3 == 1) ? nominal * 1.02 : nominal * 0.98;
      nb0 = nvalid;
      send(b, r);
      #(nominal);
      checks++;
      if (nvalid != nb0 + 1 || last !== b) begin
        failures++; $display("byte %0d: sent %h got %h (%0d strobes)", n, b, last, nvalid - nb0);
      end
    end
    nb0 = nvalid;
    send(8'hA5, nominal, 1'b0);
    #(3 * nominal);
    checks++;
    if (nerr != 1 || nvalid != nb0) begin failures++; $display("frame error not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
