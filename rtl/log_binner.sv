// Logarithmic energy binning: maps the 8-bit energy code of an event to one
// of 32 bins whose widths grow with energy (17 keV wide at the bottom,
// roughly 200 keV at the top of the 0..2.2 MeV range).
//
// The code is compared with the lower edges of bins 1..31 (sept_pkg::LOG_EDGE)
// in parallel; the bin index is the number of edges at or below the code.
// Bin 0 collects codes 0..1 (0..17.25 keV), bin 31 everything from code 222
// (1915 keV) up. The edges are the instrument's 32-bin table converted to ADC
// codes at 2200/255 keV per code. Purely combinational.
module log_binner
  import sept_pkg::*;
(
  input  logic [7:0] energy,
  output logic [4:0] bin
);
  always_comb begin
    bin = '0;
    for (int i = 1; i < 32; i++)
      if (energy >= LOG_EDGE[i]) bin = bin + 5'd1;
  end
endmodule
