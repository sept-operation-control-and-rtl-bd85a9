// Testbench of log_binner: for all 256 energy codes, the expected bin is
// computed from the energy boundaries in keV (bin i spans boundary i-1 to
// boundary i, the ADC covering 2200 keV in 255 codes) and compared.
`timescale 1ns/1ps
module tb_log_binner;
  logic [7:0] energy;
  logic [4:0] bin;
  int checks = 0, failures = 0;
  // upper boundary of bins 0..30 in keV; bin 31 is open-ended
  real ebound [31] = '{17.2549, 25.88235, 34.5098, 43.13726, 51.76471, 60.39216,
    77.64706, 94.90196, 112.1569, 129.4118, 155.2941, 181.1765, 207.0588, 241.5686,
    276.0784, 310.5882, 353.7255, 405.4902, 457.2549, 517.6471, 586.6667, 664.3137,
    741.9608, 836.8627, 949.0196, 1069.804, 1199.216, 1354.51, 1518.431, 1708.235,
    1915.294};

  log_binner dut (.energy, .bin);

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      real e;
      int expect_bin;
      energy = 8'(c);
      #1;
      e = c * 2200.0 / 255.0;
      expect_bin = 0;
      for (int i = 0; i < 31; i++) if (e >= ebound[i] - 0.001) expect_bin = i + 1;
      checks++;
      if (bin != 5'(expect_bin)) begin
        failures++; $display("code %0d (%.1f keV): bin %0d, expected %0d", c, e, bin, expect_bin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
