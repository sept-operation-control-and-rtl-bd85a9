// Testbench of acc_timer (TICK_DIV = 10): the alarm must come exactly
// ACC_TIME * TICK_DIV + 1 cycles after the clock edge that takes start, end the accumulation, and the
// timer must hold its final value; stop ends without alarm; the dating keeps
// only the first event of each telescope and start clears it.
`timescale 1ns/1ps
module tb_acc_timer;
  localparam int TD = 10;
  logic clk = 0, rst_n = 1, start = 0, stop = 0, set = 0;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic [15:0] set_val = 0, acc_time, timer;
  logic [1:0] ev_tel = 0;
  logic running, alarm;
  logic [1:0][15:0] date;
  int checks = 0, failures = 0;

  acc_timer #(.TICK_DIV(TD)) dut (.clk, .rst_n, .start, .stop, .set, .set_val, .acc_time,
                                   .ev_tel, .running, .alarm, .timer, .date);
  always #5 clk = ~clk;

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    int cyc;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); set = 1; set_val = 16'd25; @(negedge clk); set = 0;
    checks++; if (acc_time != 16'd25) begin failures++; $display("ACC_TIME not loaded"); end
    // one accumulation with dating events
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 1;
    while (!alarm) begin
      if (cyc == 47)  ev_tel = 2'b10;      // telescope B at timer 4
      else if (cyc == 73) ev_tel = 2'b11;  // A at timer 7, B again (ignored)
      else if (cyc == 150) ev_tel = 2'b01; // A again (ignored)
      else ev_tel = 2'b00;
      @(negedge clk); cyc++;
    end
    ev_tel = 0;
    checks++;
    if (cyc != 25 * TD + 2) begin failures++; $display("alarm after %0d cycles", cyc); end
    checks++;
    if (date[0] != 16'd7 || date[1] != 16'd4) begin failures++; $display("dates %0d %0d", date[0], date[1]); end
    @(negedge clk);
    checks++;
    if (running || alarm || timer != 16'd25) begin failures++; $display("not ended: running %b timer %0d", running, timer); end
    // second start clears the dates; stop ends without alarm
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    checks++; if (date != '0 || !running) begin failures++; $display("start did not clear dates"); end
    repeat (35) @(negedge clk);
    @(negedge clk); stop = 1; @(negedge clk); stop = 0;
    repeat (300) begin
      @(negedge clk);
      if (alarm) begin failures++; $display("alarm after stop"); end
    end
    checks++;
    if (running || timer != 16'd3) begin failures++; $display("after stop: running %b timer %0d", running, timer); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
