// Testbench of uart_tx: samples the serial output in the middle of each bit
// and checks start bit, data (LSB first), both stop bits and the bit length
// of 78 clocks; checks that a BREAK is twelve low bit periods and that a
// BREAK requested during a byte goes out right after that byte, ahead of the
// next queued byte.
`timescale 1ns/1ps
module tb_uart_tx;
  localparam int CPB = 78;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic [7:0] data = 0;
  logic valid = 0, ready, brk = 0, brk_ack, txd;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst_n, .data, .valid, .ready, .brk, .brk_ack, .txd);
  always #111 clk = ~clk;

  initial begin
    #100ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Decodes one frame starting at the falling edge; returns the mid-bit
  // samples (bit 0 = start): 11 for a byte, 12 for a BREAK.
  task automatic capture(output logic [11:0] s);
    @(negedge txd);
    repeat (CPB / 2) @(posedge clk);
    s = '1;
    for (int i = 0; i < 12; i++) begin
      s[i] = txd;
      if (i == 10 && s[10:1] !== 10'd0) break;  // a byte ends after its stop bits
      if (i < 11) repeat (CPB) @(posedge clk);
    end
  endtask

  task automatic put(input logic [7:0] b);
    @(negedge clk); data = b; valid = 1;
    do @(posedge clk); while (!ready);
    @(negedge clk); valid = 0;
  endtask

  initial begin
    logic [11:0] s;
    logic [7:0] b;
    int t0, t1;
    repeat (4) @(posedge clk); rst_n = 1;
    checks++; if (txd !== 1'b1) begin failures++; $display("idle not high"); end
    for (int n = 0; n < 20; n++) begin
      b = 8'($urandom);
      fork put(b); capture(s); join
      checks++;
      // bits: start, 8 data, 2 stop, then idle high
      if (s[0] !== 0 || s[8:1] !== b || s[10:9] !== 2'b11) begin
        failures++; $display("byte %h frame %b", b, s);
      end
    end
    // bit length: start to first rising edge for data 0x01 spans one bit (start)
    fork put(8'h01); join_none
    @(negedge txd); t0 = 0;
    while (!txd) begin @(posedge clk); t0++; end
    checks++; if (t0 < CPB - 1 || t0 > CPB + 1) begin failures++; $display("bit length %0d", t0); end
    wait (ready);
    // BREAK alone
    @(negedge clk); brk = 1;
    fork begin @(posedge brk_ack); @(negedge clk); brk = 0; end join_none
    @(negedge txd); t1 = 0;
    while (!txd) begin @(posedge clk); t1++; end
    checks++; if (t1 < 12 * CPB - 1 || t1 > 12 * CPB + 1) begin failures++; $display("break length %0d", t1); end
    repeat (CPB) @(posedge clk);
    // BREAK during a byte: goes out after it, before the next queued byte
    fork
      begin put(8'h55); @(negedge clk); brk = 1; put(8'hC3); end
      begin
        capture(s);
        checks++; if (s[8:1] !== 8'h55) begin failures++; $display("first byte %b", s); end
        capture(s);
        checks++; if (s !== 12'h000) begin failures++; $display("break not next %b", s); end
        capture(s);
        checks++; if (s[8:1] !== 8'hC3) begin failures++; $display("queued byte %b", s); end
      end
      begin @(posedge brk_ack); @(negedge clk); brk = 0; end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
