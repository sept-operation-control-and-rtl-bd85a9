// Asynchronous serial receiver for the command link from the SEP processor.
//
// Frame: one low start bit, eight data bits least significant first
// (positive logic), then stop bits. The line is passed through a two-flop
// synchroniser; a falling edge starts a frame, the start bit is re-checked
// half a bit later, and each following bit is sampled in its middle, every
// CLKS_PER_BIT clocks. After the first stop bit has been sampled the receiver
// is ready for the next start bit, so frames with one or two stop bits are
// both accepted. A low stop bit is reported on frame_err and the byte is
// dropped.
//
// Interface: valid is a one-cycle strobe with the byte on data, issued at the
// middle of the stop bit. CLKS_PER_BIT = 78 gives 57 692 baud from the
// 4.5 MHz clock, as the instrument specifies; the mid-bit sampling scheme is
// this design's choice.
module uart_rx #(
  parameter int CLKS_PER_BIT = 78
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  localparam int CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;
  state_e        state;
  logic [1:0]    sync;
  logic [CW-1:0] tick;
  logic [2:0]    bitn;
  logic [7:0]    shreg;

  wire rx_s = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync      <= 2'b11;
      state     <= S_IDLE;
      tick      <= '0;
      bitn      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      case (state)
        S_IDLE: if (!rx_s) begin
          state <= S_START;
          tick  <= CW'(CLKS_PER_BIT / 2 - 1);
        end
        S_START: if (tick == '0) begin
          if (rx_s) state <= S_IDLE;            // glitch, not a start bit
          else begin
            state <= S_DATA;
            tick  <= CW'(CLKS_PER_BIT - 1);
            bitn  <= '0;
          end
        end else tick <= tick - 1'b1;
        S_DATA: if (tick == '0) begin
          shreg <= {rx_s, shreg[7:1]};
          tick  <= CW'(CLKS_PER_BIT - 1);
          if (bitn == 3'd7) state <= S_STOP;
          bitn <= bitn + 1'b1;
        end else tick <= tick - 1'b1;
        S_STOP: if (tick == '0) begin
          state <= S_IDLE;
          if (rx_s) begin
            data  <= shreg;
            valid <= 1'b1;
          end else frame_err <= 1'b1;
        end else tick <= tick - 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
