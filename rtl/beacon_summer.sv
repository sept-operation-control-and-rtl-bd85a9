// Beacon channel summation for one PDFE: adds the 32 logarithmic-bin counters
// over four energy windows to build the low-rate beacon channels.
//
// The windows are given by five bin indices b1..b5 (the beacon part of the
// settings table: 1, 5, 8, 13, 17 for electrons, 1, 8, 20, 30, 31 for ions):
//   window 0 = bins b1 .. b2-1     window 1 = bins b2 .. b3-1
//   window 2 = bins b3 .. b4-1     window 3 = bins b4 .. b5
// Each window sum is kept at full width (29 bits cannot overflow for 32
// counters of 24 bits). Its status flag is set when a counter in the window
// is at full scale (it may have saturated) or when status_bad marks the
// accumulation as non-nominal. Summing the four directions of the "summed"
// channels and the final 16-bit channel format are left to the consumer.
// Purely combinational.
module beacon_summer #(
  parameter int CW = 24,
  parameter int NB = 32,
  localparam int SW = CW + $clog2(NB)
) (
  input  logic [NB-1:0][CW-1:0] counts,
  input  logic [4:0][4:0]       edges,      // edges[0] = b1 ... edges[4] = b5
  input  logic                  status_bad,
  output logic [3:0][SW-1:0]    sum,
  output logic [3:0]            invalid
);
  logic [3:0][4:0] lo, hi;

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      lo[k] = edges[k];
      hi[k] = (k == 3) ? edges[4] : edges[k+1] - 5'd1;
    end
    sum     = '0;
    invalid = {4{status_bad}};
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < NB; i++)
        if (5'(i) >= lo[k] && 5'(i) <= hi[k]) begin
          sum[k] = sum[k] + SW'(counts[i]);
          if (counts[i] == '1) invalid[k] = 1'b1;
        end
  end
endmodule
