// End-to-end testbench of the SEPT FPGA at its default parameters
// (18 MHz input clock, 57.7 kbaud link, 1.8 ms argument time-out, 1 ms timer
// unit). It plays the SEP processor on the serial line and the four PDFEs
// on the event inputs, and checks every response byte against values it
// works out itself:
//   1. initialisation, PDFE power-on and the nominal configuration sequence;
//   2. a 20 ms accumulation with random events on all four PDFEs under the
//      nominal anticoincidence filter, ended by the timer interrupt (BREAK
//      and interrupt line), then cClearIrq, cRead32 of all PDFEs, cRead256,
//      cGetHK, cGetSingle and cReadTimer, and a second cRead32 that must
//      find the counters cleared;
//   3. the read-out fed to the SEP-side beacon summation and compression;
//   4. an accumulation in calibration (coincidence) mode;
//   5. an accumulation in which one counter reaches 2^24-1 (saturation
//      interrupt and its dating);
//   6. an accumulation with a configuration error and a latch-up (switch-off
//      of the telescope, interrupt bits, dating), then cStatPDFE with a
//      configuration error held on PDFE 2;
//   7. an unknown command, an argument time-out, cConfCal and cStopRun.
// Each mechanism is counted, and one that never happened counts a failure.
`timescale 1ns/1ps
module tb_sept_fpga;
  localparam int CPB = 78;
  localparam int ACC1 = 20;          // ms
  localparam logic [7:0] ID = 8'h11;

  logic clk_ext = 0, rst_n = 1, rxd = 1, txd, irq, pdfe_clk;

  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  logic [3:0] ev_valid = 0, ev_gr = 0, pdfe_cfg_err = 0;
  logic [3:0][7:0] ev_energy = '0;
  logic [1:0] latchup_a = 0, latchup_d = 0;
  logic [15:0][7:0] hk;
  logic [1:0] pwr, drv, en, ctl;
  logic [3:0][23:0] cfg;
  logic [3:0] cfg_wr;
  logic [23:0] tg_cfg;
  logic tg_cfg_wr, tg_done = 0;
  logic [23:0] cmp_value = 0;
  logic [11:0] cmp_code;
  logic [31:0][23:0] bcn_counts = '0;
  logic [4:0][4:0] bcn_edges = '0;
  logic bcn_bad = 0;
  logic [3:0][28:0] bcn_sum;
  logic [3:0] bcn_invalid;

  sept_fpga dut (
    .clk_ext, .rst_n, .rxd, .txd, .irq, .pdfe_clk, .ev_valid, .ev_energy, .ev_gr,
    .pdfe_cfg_err, .latchup_a, .latchup_d, .hk, .pdfe_pwr(pwr), .pdfe_drv(drv),
    .pdfe_en(en), .pdfe_ctrl_o(ctl), .pdfe_cfg(cfg), .pdfe_cfg_wr(cfg_wr), .tg_cfg,
    .tg_cfg_wr, .tg_done, .sep_cmp_value(cmp_value), .sep_cmp_code(cmp_code),
    .sep_bcn_counts(bcn_counts), .sep_bcn_edges(bcn_edges), .sep_bcn_bad(bcn_bad),
    .sep_bcn_sum(bcn_sum), .sep_bcn_invalid(bcn_invalid));

  always #28 clk_ext = ~clk_ext;   // 17.9 MHz

  int checks = 0, failures = 0;
  // mechanism counters
  int n_break = 0, n_timer_irq = 0, n_sat = 0, n_latchup = 0, n_cfgerr = 0, n_unknown = 0,
      n_timeout = 0, n_readclear = 0, n_coinc = 0, n_anti = 0, n_stoprun = 0, n_date = 0,
      n_stat = 0;

  task automatic fail(input string msg);
    failures++; $display("FAIL: %s", msg);
  endtask
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) fail(msg);
  endtask

  initial begin
    repeat (120_000_000) @(posedge clk_ext);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- serial line -------------------------------------------
  int rxq [$];     // received bytes; 'h100 marks a BREAK

  task automatic send(input logic [7:0] b);
    @(negedge pdfe_clk);
    rxd = 0; repeat (CPB) @(negedge pdfe_clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(negedge pdfe_clk); end
    rxd = 1; repeat (2 * CPB) @(negedge pdfe_clk);
  endtask

  initial begin : monitor
    logic [8:0] s;
    forever begin
      @(negedge txd);
      repeat (CPB / 2) @(posedge pdfe_clk);
      for (int i = 0; i < 9; i++) begin
        repeat (CPB) @(posedge pdfe_clk);
        s[i] = txd;                       // D0..D7, first stop bit
      end
      if (s == 9'd0) begin
        while (!txd) @(posedge pdfe_clk);
        rxq.push_back('h100);
        n_break++;
      end else begin
        rxq.push_back(int'(s[7:0]));
      end
    end
  end

  // wait for n bytes (BREAKs are removed from the stream and counted)
  task automatic recv(input int n, output int q [$]);
    int t = 0;
    q.delete();
    while (q.size() < n && t < 2_000_000) begin
      @(posedge pdfe_clk); t++;
      while (rxq.size() > 0) begin
        int v = rxq.pop_front();
        if (v != 'h100) q.push_back(v);
      end
    end
    if (q.size() < n) fail($sformatf("timed out waiting for %0d bytes, got %0d", n, q.size()));
  endtask

  // send a command with arguments; check the echo; return the data bytes
  task automatic command(input logic [7:0] c, input logic [7:0] a [$], input int ndata,
                         output int d [$]);
    int q [$];
    send(c);
    foreach (a[i]) send(a[i]);
    recv(1 + ndata, q);
    check(q.size() > 0 && q[0] == int'(c), $sformatf("echo of %b: %p", c, q.size() ? q[0] : -1));
    d = q;
    if (d.size() > 0) void'(d.pop_front());
  endtask

  task automatic cmd0(input logic [7:0] c);
    int d [$];
    command(c, '{}, 0, d);
  endtask

  function automatic int word(input int d [$], input int at, input int n);
    int v = 0;
    for (int i = 0; i < n; i++) v = (v << 8) | d[at + i];
    return v;
  endfunction

  // ---------------- PDFE side ---------------------------------------------
  int ref_log [4][32], ref_lin [4][256];
  int single_ref;

  function automatic int log_bin(input int code);
    real e = code * 2200.0 / 255.0;
    real bnd [31] = '{17.2549, 25.88235, 34.5098, 43.13726, 51.76471, 60.39216, 77.64706,
      94.90196, 112.1569, 129.4118, 155.2941, 181.1765, 207.0588, 241.5686, 276.0784, 310.5882,
      353.7255, 405.4902, 457.2549, 517.6471, 586.6667, 664.3137, 741.9608, 836.8627, 949.0196,
      1069.804, 1199.216, 1354.51, 1518.431, 1708.235, 1915.294};
    int b = 0;
    for (int i = 0; i < 31; i++) if (e >= bnd[i] - 0.001) b = i + 1;
    return b;
  endfunction

  function automatic void clear_ref();
    foreach (ref_log[p, b]) ref_log[p][b] = 0;
    foreach (ref_lin[p, b]) ref_lin[p][b] = 0;
  endfunction

  // random events for ncyc cycles; coincidence = filter mode 11, else 10
  task automatic drive_events(input int ncyc, input bit coincidence, input logic [3:0] alive);
    for (int n = 0; n < ncyc; n++) begin
      @(negedge pdfe_clk);
      for (int p = 0; p < 4; p++) begin
        ev_valid[p]  = ($urandom % 6) == 0;
        ev_gr[p]     = ($urandom % 4) == 0;
        ev_energy[p] = 8'($urandom);
      end
      for (int p = 0; p < 4; p++) begin
        bit partner = ev_valid[p ^ 1];
        bit acc = ev_valid[p] && !ev_gr[p] && (coincidence ? partner : !partner) && alive[p / 2 * 2];
        if (acc) begin
          ref_log[p][log_bin(ev_energy[p])]++;
          ref_lin[p][ev_energy[p]]++;
          if (coincidence) n_coinc++; else n_anti++;
        end
      end
      if (ev_valid[0] && alive[0]) single_ref++;
    end
    @(negedge pdfe_clk);
    ev_valid = 0; ev_gr = 0;
  endtask

  task automatic wait_break(input int max_cycles, output bit got);
    int t = 0;
    got = 0;
    while (t < max_cycles) begin
      @(posedge pdfe_clk); t++;
      foreach (rxq[i]) if (rxq[i] == 'h100) got = 1;
      if (got) break;
    end
    rxq = rxq.find(x) with (x != 'h100);
  endtask

  task automatic read32_check(input int p, input string what, output int vals [32]);
    int d [$];
    command(8'b1011_0000 | 8'(p), '{}, 96, d);
    for (int b = 0; b < 32; b++) begin
      vals[b] = (d.size() == 96) ? word(d, 3 * b, 3) : -1;
    end
    checks++;
    if (d.size() != 96) fail($sformatf("%s: PDFE %0d read %0d bytes", what, p, d.size()));
    foreach (vals[b]) if (vals[b] != ref_log[p][b]) begin
      fail($sformatf("%s: PDFE %0d bin %0d = %0d, expected %0d", what, p, b, vals[b], ref_log[p][b]));
      break;
    end
  endtask

  // ---------------- scenario -----------------------------------------------
  initial begin
    int d [$];
    int vals [32];
    bit got;
    for (int i = 0; i < 16; i++) hk[i] = 8'(8'h40 + 3 * i);
    clear_ref();
    single_ref = 0;
    repeat (10) @(posedge clk_ext);
    rst_n = 1;
    repeat (20) @(posedge pdfe_clk);

    // 1. initialisation and power-on
    cmd0(8'b0001_0010);                       // cRstComm
    cmd0(8'b0001_0001);                       // cRstFPGA
    command(8'b0001_0100, '{}, 1, d);         // cGetId
    check(d.size() == 1 && d[0] == ID, "part identification");
    cmd0(8'b1000_0011); cmd0(8'b1000_0111);   // power, drive
    cmd0(8'b1000_1011); cmd0(8'b1000_1111);   // enable, control
    check(pwr == 2'b11 && drv == 2'b11 && en == 2'b11 && ctl == 2'b11, "PDFE lines after power-on");
    // nominal configuration
    for (int u = 0; u < 4; u++) begin
      command(8'b1001_0000 | 8'(u), '{8'b1000_0000 | 8'(u + 9), 8'(8'h30 + u), 8'(8'h50 + u)}, 0, d);
      check(cfg[u] == {8'b1000_0000 | 8'(u + 9), 8'(8'h30 + u), 8'(8'h50 + u)}, $sformatf("configuration of PDFE %0d", u));
      cmd0(8'b0011_0010 | 8'(u << 2));        // cConfFiltr, anticoincidence
      cmd0(8'b1010_1000 | 8'(u));             // cInitCntr
    end
    command(8'b1101_0000, '{8'(ACC1 >> 8), 8'(ACC1)}, 0, d);   // cSetTimer
    command(8'b0100_1000, '{}, 3, d);         // cGetSingle: select PDFE 0 main
    check(d.size() == 3 && word(d, 0, 3) == 0, "single counter before any run");

    // 2. nominal accumulation
    cmd0(8'b0110_0100);                       // cStartRun
    drive_events(60_000, 0, 4'b1111);
    wait_break(ACC1 * 4500, got);
    check(got, "BREAK at the end of the accumulation");
    check(irq == 1'b1, "interrupt line at the end of the accumulation");
    command(8'b0111_0000, '{}, 2, d);         // cClearIrq
    check(d.size() == 2 && word(d, 0, 2) == 16'h0007, $sformatf("interrupt register %h", word(d, 0, 2)));
    if (d.size() == 2 && d[1][2]) n_timer_irq++;
    repeat (5) @(posedge pdfe_clk);
    check(irq == 1'b0, "interrupt line cleared");
    for (int p = 0; p < 4; p++) begin
      read32_check(p, "nominal", vals);
      if (p == 0) for (int b = 0; b < 32; b++) bcn_counts[b] = 24'(vals[b]);
    end
    command(8'b1011_0110, '{}, 768, d);       // cRead256 PDFE 2
    begin
      bit ok;
      ok = d.size() == 768;
      for (int b = 0; b < 256 && ok; b++) if (word(d, 3 * b, 3) != ref_lin[2][b]) begin
        ok = 0;
        $display("linear bin %0d: %0d, expected %0d", b, word(d, 3 * b, 3), ref_lin[2][b]);
      end
      check(ok, "linear histogram of PDFE 2");
    end
    command(8'b0100_0000, '{}, 4, d);         // cGetHK 0
    check(d.size() == 4 && d[0] == 'h40 && d[1] == 'h43 && d[2] == 'h46 && d[3] == 'h49, "housekeeping group 0");
    command(8'b0100_0001, '{}, 4, d);         // cGetHK 1
    check(d.size() == 4 && d[0] == 'h4C && d[3] == 'h55, "housekeeping group 1");
    command(8'b0100_1100, '{}, 3, d);         // cGetSingle: returns PDFE 0 main
    check(d.size() == 3 && word(d, 0, 3) == single_ref, $sformatf("single counter %0d, expected %0d", word(d, 0, 3), single_ref));
    command(8'b1101_0001, '{}, 2, d);         // cReadTimer
    check(d.size() == 2 && word(d, 0, 2) == ACC1, "timer at the end of the accumulation");
    // read-and-clear: counters now empty
    clear_ref();
    read32_check(1, "after read-and-clear", vals);
    read32_check(3, "after read-and-clear", vals);
    n_readclear++;

    // 3. SEP-side processing of the PDFE 0 read-out
    bcn_edges = {5'd17, 5'd13, 5'd8, 5'd5, 5'd1};
    #1;
    begin
      int s0, s3;
      s0 = 0; s3 = 0;
      for (int b = 1; b <= 4; b++) s0 += int'(bcn_counts[b]);
      for (int b = 13; b <= 17; b++) s3 += int'(bcn_counts[b]);
      check(bcn_sum[0] == 29'(s0) && bcn_sum[3] == 29'(s3) && bcn_invalid == 0, "beacon electron windows");
    end
    cmp_value = 24'd70000;                    // 1 0001 0001 0111 0000: leading one at 16
    #1;
    check(cmp_code == {4'd9, 8'h11}, $sformatf("compressed 70000 = %h", cmp_code));

    // 4. calibration mode: coincidence of the two centre segments
    for (int u = 0; u < 4; u++) cmd0(8'b0011_0011 | 8'(u << 2));
    single_ref = 0;
    cmd0(8'b0110_0100);
    drive_events(60_000, 1, 4'b1111);
    wait_break(ACC1 * 4500, got);
    check(got, "BREAK after the calibration accumulation");
    command(8'b0111_0000, '{}, 2, d);
    check(d.size() == 2 && word(d, 0, 2) == 16'h0007, "interrupt register after calibration run");
    for (int p = 0; p < 4; p++) read32_check(p, "calibration", vals);
    clear_ref();
    for (int u = 0; u < 4; u++) cmd0(8'b0011_0010 | 8'(u << 2));

    // 5. saturation: PDFE 3, one bin, 2^24 events
    command(8'b1101_0000, '{8'd14, 8'd150}, 0, d);     // ACC_TIME = 3734 ms
    cmd0(8'b0110_0100);
    @(negedge pdfe_clk);
    ev_valid = 4'b1000; ev_energy[3] = 8'd100;
    #(((1 << 24) + 50) * 224);                // one event per internal clock (224 ns)
    @(negedge pdfe_clk); ev_valid = 0;
    wait_break(10 * 4500, got);               // saturation already signalled
    command(8'b0111_0000, '{}, 2, d);
    check(d.size() == 2 && word(d, 0, 2) == 16'h0013, $sformatf("saturation interrupt register %h", word(d, 0, 2)));
    if (d.size() == 2 && d[1][4]) n_sat++;
    command(8'b1101_0010, '{}, 4, d);         // cReadDate
    check(d.size() == 4 && word(d, 0, 2) == 0 && word(d, 2, 2) == 3728,
          $sformatf("saturation dated at %0d ms (telescope B)", word(d, 2, 2)));
    if (d.size() == 4 && word(d, 2, 2) != 0) n_date++;
    wait_break(20 * 4500, got);               // end of accumulation
    command(8'b0111_0000, '{}, 2, d);
    check(d.size() == 2 && word(d, 0, 2) == 16'h0007, "timer interrupt after saturation run");
    ref_log[3][log_bin(100)] = 24'hFFFFFF;
    read32_check(3, "saturated", vals);
    ref_log[3][log_bin(100)] = 0;
    command(8'b1011_0111, '{}, 768, d);       // clear the linear bank of PDFE 3 too

    // 6. configuration error on PDFE 1 and latch-up on telescope B
    command(8'b1101_0000, '{8'd0, 8'd10}, 0, d);
    cmd0(8'b0110_0100);
    repeat (2 * 4500 + 100) @(negedge pdfe_clk);
    pdfe_cfg_err[1] = 1; @(negedge pdfe_clk); pdfe_cfg_err[1] = 0;
    wait_break(4500, got);
    check(got, "BREAK on configuration error");
    repeat (3 * 4500) @(negedge pdfe_clk);
    latchup_d[1] = 1; @(negedge pdfe_clk); latchup_d[1] = 0;
    repeat (10) @(negedge pdfe_clk);
    check(pwr == 2'b01 && drv == 2'b01, "telescope B switched off by latch-up");
    if (pwr == 2'b01) n_latchup++;
    wait_break(4500, got);
    check(got, "BREAK on latch-up");
    command(8'b1101_0010, '{}, 4, d);
    check(d.size() == 4 && word(d, 0, 2) == 2 && word(d, 2, 2) == 5, $sformatf("dates %0d %0d", word(d, 0, 2), word(d, 2, 2)));
    if (d.size() == 4 && word(d, 0, 2) == 2) n_date++;
    wait_break(10 * 4500, got);
    command(8'b0111_0000, '{}, 2, d);
    // bit 0 (A operational), 2 timer, 6 A error, 7 B error, 9 PDFE 1 config error, 15 B digital latch-up
    check(d.size() == 2 && word(d, 0, 2) == 16'h82C5, $sformatf("interrupt register %h", word(d, 0, 2)));
    if (d.size() == 2 && d[0][1]) n_cfgerr++;
    cmd0(8'b1000_0011); cmd0(8'b1000_0111);   // ground command: power B back
    check(pwr == 2'b11, "telescope B powered again by command");
    // live status: a held configuration error on PDFE 2 shows in cStatPDFE,
    // and its latched copy (bit 10) in the interrupt register
    pdfe_cfg_err[2] = 1;
    wait_break(4500, got);
    check(got, "BREAK on configuration error outside an accumulation");
    command(8'b1001_0100, '{}, 1, d);
    check(d.size() == 1 && d[0] == 8'b0000_0100, $sformatf("cStatPDFE %p", d));
    if (d.size() == 1 && d[0] == 4) n_stat++;
    pdfe_cfg_err[2] = 0;
    command(8'b0111_0000, '{}, 2, d);
    check(d.size() == 2 && d[0][2], $sformatf("latched bit 10 %p", d));

    // 7. protocol errors, test generator configuration, stop
    send(8'b0000_0000);
    recv(1, d);
    check(d.size() == 1 && d[0] == 8'b0000_0011, "rUnknown");
    if (d.size() == 1 && d[0] == 3) n_unknown++;
    send(8'b1001_0001); send(8'h81);          // cConfPDFE with two of its three bytes
    recv(1, d);
    check(d.size() == 1 && d[0] == 8'b0000_1111, "rTimeOut");
    if (d.size() == 1 && d[0] == 15) n_timeout++;
    command(8'b1110_0000, '{8'h12, 8'h34, 8'h56}, 0, d);
    check(tg_cfg == 24'h123456, "cConfCal bytes to the test generator");
    command(8'b1101_0000, '{8'd0, 8'd50}, 0, d);
    cmd0(8'b0110_0100);
    repeat (4500 * 3) @(negedge pdfe_clk);
    cmd0(8'b0110_1000);                        // cStopRun
    repeat (4500 * 60) @(negedge pdfe_clk);
    check(irq == 0 && rxq.size() == 0, "no timer interrupt after cStopRun");
    command(8'b1101_0001, '{}, 2, d);
    check(d.size() == 2 && word(d, 0, 2) >= 3 && word(d, 0, 2) < 10, "timer stopped by cStopRun");
    if (irq == 0) n_stoprun++;

    $display("mechanisms: break %0d timer-irq %0d anticoincidence %0d coincidence %0d saturation %0d dating %0d",
             n_break, n_timer_irq, n_anti, n_coinc, n_sat, n_date);
    $display("            config-error %0d latch-up %0d unknown %0d time-out %0d read-clear %0d stop %0d",
             n_cfgerr, n_latchup, n_unknown, n_timeout, n_readclear, n_stoprun);
    check(n_break > 0, "BREAK never seen");
    check(n_timer_irq > 0, "timer interrupt never seen");
    check(n_anti > 0 && n_coinc > 0, "a filter mode never exercised");
    check(n_sat > 0, "saturation never seen");
    check(n_date > 0, "dating never seen");
    check(n_stat > 0, "live PDFE status never read");
    check(n_cfgerr > 0 && n_latchup > 0, "error / latch-up never seen");
    check(n_unknown > 0 && n_timeout > 0, "protocol error never seen");
    check(n_readclear > 0 && n_stoprun > 0, "read-and-clear or stop never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
