// Testbench of beacon_summer: random counters, sums recomputed from the
// window definition with the electron and the ion bin edges of the beacon
// table, plus the invalid flag for a full-scale counter and for a bad status.
`timescale 1ns/1ps
module tb_beacon_summer;
  logic [31:0][23:0] counts;
  logic [4:0][4:0] edges;
  logic status_bad;
  logic [3:0][28:0] sum;
  logic [3:0] invalid;
  int checks = 0, failures = 0;

  beacon_summer dut (.counts, .edges, .status_bad, .sum, .invalid);

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int e1, e2, e3, e4, e5);
    int lo [4], hi [4];
    longint s;
    edges = {5'(e5), 5'(e4), 5'(e3), 5'(e2), 5'(e1)};
    lo = '{e1, e2, e3, e4};
    hi = '{e2 - 1, e3 - 1, e4 - 1, e5};
    for (int n = 0; n < 20; n++) begin
      logic bad_win [4];
      for (int i = 0; i < 32; i++) counts[i] = 24'($urandom);
      if (n == 5) counts[e2] = '1;
      status_bad = (n == 7);
      #1;
      for (int k = 0; k < 4; k++) begin
        s = 0;
        bad_win[k] = status_bad;
        for (int i = lo[k]; i <= hi[k]; i++) begin
          s += longint'(counts[i]);
          if (counts[i] == 24'hFFFFFF) bad_win[k] = 1;
        end
        checks++;
        if (longint'(sum[k]) != s || invalid[k] != bad_win[k]) begin
          failures++; $display("window %0d: %0d/%b, expected %0d/%b", k, sum[k], invalid[k], s, bad_win[k]);
        end
      end
    end
  endtask

  initial begin
    run(1, 5, 8, 13, 17);    // electrons
    run(1, 8, 20, 30, 31);   // ions
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
