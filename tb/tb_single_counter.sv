// Testbench of single_counter: random hits on all eight channels; every
// selection is counted only while count_en is high, a selection load returns
// the count to zero and switches the channel; saturation checked with a
// 4-bit counter.
`timescale 1ns/1ps
module tb_single_counter;
  logic clk = 0, rst_n = 1, count_en = 0, sel_load = 0;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic [3:0] hit_main = 0, hit_gr = 0;
  logic [2:0] sel_new = 0, sel;
  logic [22:0] count;
  logic [3:0] count4;
  logic [2:0] sel4;
  int checks = 0, failures = 0;

  single_counter #(.SW(23)) dut (.clk, .rst_n, .count_en, .hit_main, .hit_gr, .sel_load, .sel_new, .sel, .count);
  single_counter #(.SW(4)) dut4 (.clk, .rst_n, .count_en, .hit_main, .hit_gr, .sel_load, .sel_new, .sel(sel4), .count(count4));
  always #5 clk = ~clk;

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int expect_n;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 8; s++) begin
      @(negedge clk); sel_load = 1; sel_new = 3'(s);
      @(negedge clk); sel_load = 0;
      checks++;
      if (sel != 3'(s) || count != 0) begin failures++; $display("load %0d: sel %0d count %0d", s, sel, count); end
      expect_n = 0;
      for (int n = 0; n < 100; n++) begin
        hit_main = 4'($urandom); hit_gr = 4'($urandom);
        count_en = (n % 10) != 9;
        if (count_en && (s[2] ? hit_gr[s % 4] : hit_main[s % 4])) expect_n++;
        @(negedge clk);
      end
      hit_main = 0; hit_gr = 0;
      checks++;
      if (count != 23'(expect_n)) begin failures++; $display("sel %0d: count %0d expected %0d", s, count, expect_n); end
    end
    // saturation of the 4-bit instance (selection 7 still loaded)
    hit_gr = 4'b1000; count_en = 1;
    repeat (30) @(negedge clk);
    checks++;
    if (count4 != 4'hF) begin failures++; $display("4-bit count %0d not saturated", count4); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
