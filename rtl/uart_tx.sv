// Asynchronous serial transmitter for responses and the BREAK code.
//
// A byte is sent as one low start bit, eight data bits least significant
// first and two high stop bits, each bit lasting CLKS_PER_BIT clocks
// (78 clocks of 4.5 MHz = 57 692 baud). The BREAK code that signals an
// interrupt is the same frame with every bit low plus one extra low bit:
// twelve low bit periods, which no valid byte can produce. A BREAK request
// waits only for the byte being sent; it goes ahead of any byte that is
// waiting on the byte interface.
//
// Interface: a byte is taken when valid && ready (ready is high only when the
// transmitter is idle and no BREAK is pending). brk is a level request that
// stays high until brk_ack, a one-cycle strobe given when the BREAK starts.
// Frame format, bit rate and the BREAK pattern follow the instrument
// specification; the handshakes are this design's choice.
module uart_tx #(
  parameter int CLKS_PER_BIT = 78
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  input  logic       brk,
  output logic       brk_ack,
  output logic       txd
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  logic          busy;
  logic [11:0]   frame;   // bits still to send, LSB first
  logic [3:0]    left;    // bit periods still to send
  logic [CW-1:0] tick;

  assign ready = !busy && !brk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      frame   <= '1;
      left    <= '0;
      tick    <= '0;
      txd     <= 1'b1;
      brk_ack <= 1'b0;
    end else begin
      brk_ack <= 1'b0;
      if (!busy) begin
        txd <= 1'b1;
        if (brk) begin
          busy    <= 1'b1;
          brk_ack <= 1'b1;
          frame   <= '0;                         // 12 low bits
          left    <= 4'd12;
          tick    <= CW'(CLKS_PER_BIT - 1);
          txd     <= 1'b0;
        end else if (valid) begin
          busy  <= 1'b1;
          frame <= {1'b1, 2'b11, data, 1'b0} >> 1;  // start bit goes out now
          left  <= 4'd11;
          tick  <= CW'(CLKS_PER_BIT - 1);
          txd   <= 1'b0;
        end
      end else if (tick != '0) begin
        tick <= tick - 1'b1;
      end else if (left == 4'd1) begin
        busy <= 1'b0;
        txd  <= 1'b1;
      end else begin
        txd   <= frame[0];
        frame <= {1'b1, frame[11:1]};
        left  <= left - 1'b1;
        tick  <= CW'(CLKS_PER_BIT - 1);
      end
    end
  end
endmodule
