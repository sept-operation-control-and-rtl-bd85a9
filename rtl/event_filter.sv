// Coincidence / anticoincidence filter of one PDFE's events.
//
// An event on the centre segment (main channel) of a detector is counted or
// rejected according to two configuration bits set by cConfFiltr:
//   mode[1]  anticoincidence enabled: reject the event when the detector's
//            guard ring fired with it; and, unless mode[0] is set, also when
//            the other centre segment of the telescope fired (the full
//            anticoincidence of nominal mode, mode = 10);
//   mode[0]  coincidence enabled: accept the event only when the other centre
//            segment of the telescope fired in the same cycle (calibration
//            mode, mode = 11, counts only particles that cross both
//            detectors).
// With mode = 00 every event passes. The two settings used in operation
// (10 for nominal, 11 for calibration) are the instrument's; the meaning of
// each bit and the same-cycle coincidence window are this design's reading.
// Purely combinational.
module event_filter (
  input  logic       ev_valid,
  input  logic       ev_gr,
  input  logic       partner_valid,
  input  logic [1:0] mode,
  output logic       accept
);
  always_comb begin
    accept = ev_valid;
    if (mode[1] && ev_gr) accept = 1'b0;
    if (mode[0]) begin
      if (!partner_valid) accept = 1'b0;
    end else if (mode[1] && partner_valid) begin
      accept = 1'b0;
    end
  end
endmodule
