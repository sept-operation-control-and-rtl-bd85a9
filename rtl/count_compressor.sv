// Counter compression for telemetry: turns a 24-bit counter value into a
// 12-bit code of a 4-bit exponent and an 8-bit mantissa whose leading one is
// not stored ("hidden leading one").
//
//   exponent 0      value = mantissa                  (values 0..255, exact)
//   exponent e>0    value = (256 + mantissa) << (e-1)  (mantissa truncated)
//
// The largest code, exponent 15 and mantissa 255, stands for 511 << 14 =
// 8 372 224; larger values (above 2^23 - 1 counts) saturate to it. The
// relative error is below 1/256. The 4+8 bit split with a hidden one is the
// instrument's requirement; the exact exponent offset, truncation and
// saturation are this design's choices. Purely combinational.
module count_compressor (
  input  logic [23:0] value,
  output logic [11:0] code
);
  logic [4:0] msb;   // position of the leading one

  always_comb begin
    msb = '0;
    for (int i = 0; i < 24; i++)
      if (value[i]) msb = 5'(i);
    if (value < 24'd256) begin
      code = {4'd0, value[7:0]};
    end else if (msb > 5'd22) begin
      code = 12'hFFF;
    end else begin
      // leading one at msb: exponent msb-7, mantissa the 8 bits below it
      code = {4'(msb - 5'd7), 8'(value >> (msb - 5'd8))};
    end
  end
endmodule
