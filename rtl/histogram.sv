// Bank of NBINS event counters of CW bits, one per energy bin, for one PDFE.
//
// Each accepted event increments the counter of its bin (inc / inc_bin).
// Counters saturate at full scale instead of wrapping; the cycle a counter
// reaches full scale, sat pulses (the FPGA turns this into the saturation
// interrupt of the telescope). The read port is combinational (rd_bin to
// rd_data) so the command interpreter can stream a counter out byte by byte;
// clr_bin clears that counter after it has been read (read-and-clear), and
// clr_all clears the whole bank. An event arriving in the very cycle its
// counter is cleared is not lost: the counter restarts at 1.
//
// NBINS = 32 gives the logarithmic histogram, NBINS = 256 the linear one,
// both with 24-bit counters as the instrument specifies. Saturating rather
// than wrapping is this design's choice.
module histogram #(
  parameter int NBINS = 32,
  parameter int CW    = 24,
  localparam int AW   = $clog2(NBINS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc,
  input  logic [AW-1:0] inc_bin,
  input  logic [AW-1:0] rd_bin,
  output logic [CW-1:0] rd_data,
  input  logic          clr_bin,
  input  logic          clr_all,
  output logic          sat
);
  localparam logic [CW-1:0] FULL = '1;

  logic [CW-1:0] cnt [NBINS];

  assign rd_data = cnt[rd_bin];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NBINS; i++) cnt[i] <= '0;
      sat <= 1'b0;
    end else begin
      sat <= 1'b0;
      if (clr_all) begin
        for (int i = 0; i < NBINS; i++) cnt[i] <= '0;
        if (inc) cnt[inc_bin] <= CW'(1);
      end else begin
        if (clr_bin) cnt[rd_bin] <= '0;
        if (inc) begin
          if (clr_bin && inc_bin == rd_bin) cnt[inc_bin] <= CW'(1);
          else if (cnt[inc_bin] != FULL) begin
            cnt[inc_bin] <= cnt[inc_bin] + 1'b1;
            if (cnt[inc_bin] == FULL - 1'b1) sat <= 1'b1;
          end
        end
      end
    end
  end
endmodule
