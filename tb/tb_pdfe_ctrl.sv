// Testbench of pdfe_ctrl: runs the power-on sequence (power, drive, enable,
// control for both telescopes), checks the PP telescope decoding, the
// configuration words and strobes of cConfPDFE, the filter modes of
// cConfFiltr, the latch-up switch-off of one telescope and the power-off
// sequence.
`timescale 1ns/1ps
module tb_pdfe_ctrl;
  import sept_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  action_t act = '0;
  logic [1:0] latchup_a = 0, latchup_d = 0, pwr, drv, en, ctrl, prop_en;
  logic [3:0][23:0] cfg;
  logic [3:0] cfg_wr;
  logic [3:0][1:0] filt;
  int checks = 0, failures = 0, nwr = 0;

  pdfe_ctrl dut (.clk, .rst_n, .act, .latchup_a, .latchup_d, .pwr, .drv, .en, .ctrl,
                 .cfg, .cfg_wr, .filt, .prop_en);
  always #5 clk = ~clk;
  always @(negedge clk) nwr += $countones(cfg_wr);

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic cmd(input logic [7:0] c, input logic [23:0] a = 0);
    @(negedge clk); act = '{valid: 1'b1, op: decode_op(c), cmd: c, args: a};
    @(negedge clk); act = '0;
  endtask

  task automatic expect_lines(input logic [1:0] p, d, e, c, input string what);
    checks++;
    if (pwr != p || drv != d || en != e || ctrl != c || prop_en != (p & d & e & c)) begin
      failures++; $display("%s: pwr %b drv %b en %b ctrl %b prop %b", what, pwr, drv, en, ctrl, prop_en);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    expect_lines(0, 0, 0, 0, "reset");
    cmd(8'b1000_0010);  expect_lines(2'b01, 0, 0, 0, "power A (PP=10)");
    cmd(8'b1000_0001);  expect_lines(2'b10, 0, 0, 0, "power B (PP=01)");
    cmd(8'b1000_0011);  expect_lines(2'b11, 0, 0, 0, "power A+B");
    cmd(8'b1000_0111);  expect_lines(2'b11, 2'b11, 0, 0, "drive");
    cmd(8'b1000_1011);  expect_lines(2'b11, 2'b11, 2'b11, 0, "enable");
    cmd(8'b1000_1111);  expect_lines(2'b11, 2'b11, 2'b11, 2'b11, "control");
    for (int u = 0; u < 4; u++) cmd(8'b1001_0000 | 8'(u), {8'b1000_0000 | 8'(u), 8'(16 * u + 1), 8'(16 * u + 2)});
    checks++;
    for (int u = 0; u < 4; u++)
      if (cfg[u] != {8'b1000_0000 | 8'(u), 8'(16 * u + 1), 8'(16 * u + 2)}) begin
        failures++; $display("cfg[%0d] = %h", u, cfg[u]);
      end
    @(negedge clk);
    checks++; if (nwr != 4) begin failures++; $display("%0d config strobes", nwr); end
    cmd(8'b0011_0010); cmd(8'b0011_0111); cmd(8'b0011_1010); cmd(8'b0011_1101);
    checks++;
    if (filt != {2'b01, 2'b10, 2'b11, 2'b10}) begin failures++; $display("filters %b", filt); end
    // digital latch-up on telescope B
    @(negedge clk); latchup_d[1] = 1; @(negedge clk); latchup_d[1] = 0;
    expect_lines(2'b01, 2'b01, 2'b11, 2'b11, "latch-up B");
    // switched on again only by command
    repeat (5) @(negedge clk);
    expect_lines(2'b01, 2'b01, 2'b11, 2'b11, "stays off");
    cmd(8'b1000_0011); cmd(8'b1000_0111);
    expect_lines(2'b11, 2'b11, 2'b11, 2'b11, "back on");
    // power-off sequence
    cmd(8'b1000_1000); cmd(8'b1000_0100); cmd(8'b1000_0000);
    expect_lines(0, 0, 0, 2'b11, "power off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
