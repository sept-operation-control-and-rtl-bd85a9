// Testbench of histogram (32 bins, 6-bit counters to reach saturation
// quickly): random events against a reference array, read-and-clear of
// single bins, an event colliding with the clear of its bin, saturation at
// full scale with its one-cycle flag, and clear-all.
`timescale 1ns/1ps
module tb_histogram;
  localparam int NB = 32, CW = 6;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic inc = 0, clr_bin = 0, clr_all = 0, sat;
  logic [4:0] inc_bin = 0, rd_bin = 0;
  logic [CW-1:0] rd_data;
  int checks = 0, failures = 0, nsat = 0;
  int ref_cnt [NB];

  histogram #(.NBINS(NB), .CW(CW)) dut (.clk, .rst_n, .inc, .inc_bin, .rd_bin, .rd_data,
                                         .clr_bin, .clr_all, .sat);
  always #5 clk = ~clk;
  always @(posedge clk) if (sat) nsat++;

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_all(input string what);
    for (int b = 0; b < NB; b++) begin
      rd_bin = 5'(b); #1;
      checks++;
      if (rd_data != CW'(ref_cnt[b])) begin
        failures++; $display("%s: bin %0d = %0d, expected %0d", what, b, rd_data, ref_cnt[b]);
      end
    end
  endtask

  initial begin
    foreach (ref_cnt[b]) ref_cnt[b] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    check_all("after reset");
    // random events, some cycles idle
    for (int n = 0; n < 1200; n++) begin
      @(negedge clk);
      inc = ($urandom % 4) != 0;
      inc_bin = 5'($urandom % 8);           // crowd 8 bins so some saturate
      @(posedge clk); #1;
      if (inc && ref_cnt[inc_bin] < 63) begin
        ref_cnt[inc_bin]++;
      end
    end
    @(negedge clk); inc = 0;
    check_all("random events");
    checks++;
    if (nsat == 0) begin failures++; $display("no saturation flag seen"); end
    begin
      int full = 0;
      foreach (ref_cnt[b]) if (ref_cnt[b] == 63) full++;
      checks++;
      if (nsat != full) begin failures++; $display("%0d saturation flags for %0d full bins", nsat, full); end
    end
    // read and clear bin 3, with an event on bin 3 in the same cycle
    @(negedge clk); rd_bin = 3; clr_bin = 1; inc = 1; inc_bin = 3;
    @(negedge clk); clr_bin = 0; inc = 0; ref_cnt[3] = 1;
    // read and clear bin 5 alone
    @(negedge clk); rd_bin = 5; clr_bin = 1;
    @(negedge clk); clr_bin = 0; ref_cnt[5] = 0;
    check_all("read-and-clear");
    // clear all
    @(negedge clk); clr_all = 1;
    @(negedge clk); clr_all = 0;
    foreach (ref_cnt[b]) ref_cnt[b] = 0;
    check_all("clear all");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
