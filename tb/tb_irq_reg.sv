// Testbench of irq_reg: every latched bit is set by a one-cycle pulse of its
// source and must stay set; bits 0/1 follow prop_en; clear empties the
// register unless a source is still active; the interrupt line follows the
// latched bits; a BREAK request is raised for each new bit and held until
// acknowledged, and a bit already set gives no new request.
`timescale 1ns/1ps
module tb_irq_reg;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic [1:0] prop_en = 0, sat = 0, meas_err = 0, latchup_a = 0, latchup_d = 0;
  logic alarm = 0, cal_done = 0, clear = 0, brk_ack = 0;
  logic [3:0] cfg_err = 0;
  logic [15:0] irq_word;
  logic irq_line, brk_req;
  int checks = 0, failures = 0;

  irq_reg dut (.clk, .rst_n, .prop_en, .alarm, .sat, .cal_done, .meas_err, .cfg_err,
               .latchup_a, .latchup_d, .clear, .irq_word, .irq_line, .brk_req, .brk_ack);
  always #5 clk = ~clk;

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // drive the source of register bit b for one cycle
  task automatic fire(input int b);
    @(negedge clk);
    case (b)
      2: alarm = 1;  3: sat[0] = 1;  4: sat[1] = 1;  5: cal_done = 1;
      6: meas_err[0] = 1;  7: meas_err[1] = 1;
      8, 9, 10, 11: cfg_err[b-8] = 1;
      12: latchup_a[0] = 1;  13: latchup_d[0] = 1;  14: latchup_a[1] = 1;  15: latchup_d[1] = 1;
      default: ;
    endcase
    @(negedge clk);
    {alarm, sat, cal_done, meas_err, cfg_err, latchup_a, latchup_d} = '0;
  endtask

  task automatic ack();
    @(negedge clk); brk_ack = 1; @(negedge clk); brk_ack = 0;
  endtask

  initial begin
    logic [15:0] expect_w;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    checks++; if (irq_word != 0 || irq_line || brk_req) begin failures++; $display("not clear after reset"); end
    prop_en = 2'b10; #1;
    checks++; if (irq_word != 16'h0002) begin failures++; $display("prop_en not shown: %h", irq_word); end
    expect_w = 16'h0002;
    for (int b = 2; b < 16; b++) begin
      fire(b);
      expect_w[b] = 1'b1;
      checks++;
      if (irq_word != expect_w || !irq_line || !brk_req) begin
        failures++; $display("bit %0d: word %h line %b brk %b", b, irq_word, irq_line, brk_req);
      end
      repeat (3) @(negedge clk);
      checks++; if (!brk_req) begin failures++; $display("break request dropped before ack"); end
      ack();
      checks++; if (brk_req) begin failures++; $display("break request not dropped by ack"); end
    end
    // repeating a set bit gives no new BREAK
    fire(2);
    checks++; if (brk_req) begin failures++; $display("BREAK for a bit already set"); end
    // clear with a source still active
    @(negedge clk); clear = 1; cfg_err[2] = 1;
    @(negedge clk); clear = 0;
    checks++;
    if (irq_word != 16'h0402 || !irq_line) begin failures++; $display("after clear with active source: %h", irq_word); end
    cfg_err = 0;
    ack();
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (irq_word != 16'h0002 || irq_line) begin failures++; $display("after clear: %h line %b", irq_word, irq_line); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
