// Testbench of cmd_ctrl at byte level (no serial line): sends commands as
// receiver strobes, lets the transmitter accept bytes at random times, and
// compares the transmitted bytes with the expected echo and data worked out
// from the status values the testbench applies and from its own model of the
// histogram banks. Covers short responses, arguments, the argument time-out
// (just inside and just beyond the limit), an unknown command, a streamed
// cRead32/cRead256 with read-and-clear, and a byte arriving while a response
// is being sent.
`timescale 1ns/1ps
module tb_cmd_ctrl;
  import sept_pkg::*;
  localparam int TO = 100;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic [7:0] rx_data = 0, tx_data;
  logic rx_valid = 0, tx_valid, tx_ready = 0;
  action_t act;
  logic [15:0] irq_word = 16'hA55A, timer = 16'h1234;
  logic [7:0] stat_pdfe = 8'h3C;
  logic [1:0][15:0] date = {16'hBEEF, 16'hCAFE};
  logic [22:0] single = 23'h45_6789;
  logic [15:0][7:0] hk;
  logic [1:0] hist_pdfe;
  logic hist_lin, hist_clr;
  logic [7:0] hist_bin;
  logic [23:0] hist_data;
  int checks = 0, failures = 0, nact = 0;
  logic [7:0] outq [$];
  action_t last_act;
  logic [23:0] hmem [4][2][256];
  int nclr = 0;

  cmd_ctrl #(.ARG_TIMEOUT(TO), .PART_ID(8'h11)) dut (
    .clk, .rst_n, .rx_data, .rx_valid, .tx_data, .tx_valid, .tx_ready, .act,
    .irq_word, .stat_pdfe, .timer, .date, .single, .hk,
    .hist_pdfe, .hist_lin, .hist_bin, .hist_clr, .hist_data);
  always #5 clk = ~clk;

  assign hist_data = hmem[hist_pdfe][hist_lin][hist_bin];
  always @(posedge clk) begin
    tx_ready <= ($urandom % 3) == 0;
    if (tx_valid && tx_ready) outq.push_back(tx_data);
    if (act.valid) begin nact++; last_act <= act; end
    if (hist_clr) begin hmem[hist_pdfe][hist_lin][hist_bin] <= 0; nclr++; end
  end

  initial begin
    #10ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic put(input logic [7:0] b, input int gap = 3);
    @(negedge clk); rx_data = b; rx_valid = 1;
    @(negedge clk); rx_valid = 0;
    repeat (gap) @(negedge clk);
  endtask

  task automatic expect_out(input logic [7:0] exp_q [$], input string what);
    int n = 0;
    while (outq.size() < exp_q.size() && n < 20000) begin @(negedge clk); n++; end
    repeat (20) @(negedge clk);
    checks++;
    if (outq != exp_q) begin
      failures++; $display("%s: got %p expected %p", what, outq, exp_q);
    end
    outq.delete();
  endtask

  initial begin
    logic [7:0] e [$];
    int a0;
    for (int i = 0; i < 16; i++) hk[i] = 8'(8'h20 + i);
    for (int p = 0; p < 4; p++) for (int l = 0; l < 2; l++) for (int b = 0; b < 256; b++)
      hmem[p][l][b] = 24'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;

    put(8'b0001_0100); expect_out('{8'h14, 8'h11}, "cGetId");
    a0 = nact;
    put(8'b0111_0000); expect_out('{8'h70, 8'hA5, 8'h5A}, "cClearIrq");
    checks++; if (nact != a0 + 1 || last_act.op != OP_CLEARIRQ) begin failures++; $display("cClearIrq action"); end
    put(8'b1001_0100); expect_out('{8'h94, 8'h3C}, "cStatPDFE");
    put(8'b1101_0001); expect_out('{8'hD1, 8'h12, 8'h34}, "cReadTimer");
    put(8'b1101_0010); expect_out('{8'hD2, 8'hCA, 8'hFE, 8'hBE, 8'hEF}, "cReadDate");
    put(8'b0100_0010); expect_out('{8'h42, 8'h28, 8'h29, 8'h2A, 8'h2B}, "cGetHK 2");
    put(8'b0100_1101); expect_out('{8'h4D, 8'h45, 8'h67, 8'h89}, "cGetSingle");
    checks++; if (last_act.op != OP_GETSINGLE || last_act.cmd != 8'h4D) begin failures++; $display("cGetSingle action"); end
    a0 = nact;
    put(8'h00); expect_out('{R_UNKNOWN}, "unknown 00");
    put(8'b1100_1111 & 8'hCF); expect_out('{R_UNKNOWN}, "unknown CF");
    checks++; if (nact != a0) begin failures++; $display("unknown command issued an action"); end
    // arguments, the last one just inside the time-out
    put(8'b1101_0000, 2); put(8'h0E, TO - 10); put(8'hA6);
    expect_out('{8'hD0}, "cSetTimer");
    checks++;
    if (last_act.op != OP_SETTIMER || last_act.args[23:8] != 16'h0EA6) begin failures++; $display("cSetTimer args %h", last_act.args); end
    put(8'b1001_0001); put(8'hC3); put(8'h81); put(8'h7F);
    expect_out('{8'h91}, "cConfPDFE");
    checks++;
    if (last_act.op != OP_CONFPDFE || last_act.args != 24'hC3817F) begin failures++; $display("cConfPDFE args %h", last_act.args); end
    // time-out: second argument too late
    a0 = nact;
    put(8'b1001_0010); put(8'hC3, TO + 10);
    expect_out('{R_TIMEOUT}, "time-out");
    checks++; if (nact != a0) begin failures++; $display("timed-out command issued an action"); end
    // streamed read of PDFE 2, 32 logarithmic bins
    e = '{8'hB2};
    for (int b = 0; b < 32; b++) begin e.push_back(hmem[2][0][b][23:16]); e.push_back(hmem[2][0][b][15:8]); e.push_back(hmem[2][0][b][7:0]); end
    nclr = 0;
    put(8'b1011_0010); expect_out(e, "cRead32 PDFE 2");
    checks++; if (nclr != 32 || hmem[2][0][31] != 0 || hmem[2][0][32] == 0) begin failures++; $display("%0d clears", nclr); end
    // linear read of PDFE 1 with a command arriving in the middle of it
    e = '{8'hB5};
    for (int b = 0; b < 256; b++) begin e.push_back(hmem[1][1][b][23:16]); e.push_back(hmem[1][1][b][15:8]); e.push_back(hmem[1][1][b][7:0]); end
    e.push_back(8'h14); e.push_back(8'h11);
    put(8'b1011_0101, 50); put(8'b0001_0100);
    expect_out(e, "cRead256 PDFE 1 then held cGetId");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
