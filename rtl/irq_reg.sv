// Interrupt register, interrupt line and BREAK request.
//
// The 16-bit register gives the instrument status:
//   bit 0/1    event propagation enabled, telescope A (PDFE 0,1) / B (PDFE 2,3)
//   bit 2      time alarm                                    (latched)
//   bit 3/4    counter saturation, telescope A / B            (latched)
//   bit 5      test generator sequence completed              (latched)
//   bit 6/7    PDFE error or latch-up during measurement, A/B (latched)
//   bit 8..11  configuration error of PDFE 0..3               (latched)
//   bit 12/13  analogue / digital latch-up, telescope A       (latched)
//   bit 14/15  analogue / digital latch-up, telescope B       (latched)
// Bits 0 and 1 follow their inputs; the others are set by their source
// (a pulse or a level) and stay set until clear (cClearIrq, which reads the
// register first). A source still active when clear arrives sets its bit
// again at once.
//
// irq_line, the direct interrupt line to the SEP processor, is high while any
// latched bit is set. brk_req rises whenever a latched bit goes from 0 to 1 and
// stays high until the serial transmitter acknowledges it (brk_ack) by
// starting the BREAK; several interrupts before that give one BREAK. The bit map is the
// instrument's; latching bits 6 and 7 and the line staying high until the
// register is cleared are this design's choices.
module irq_reg (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  prop_en,
  input  logic        alarm,
  input  logic [1:0]  sat,
  input  logic        cal_done,
  input  logic [1:0]  meas_err,
  input  logic [3:0]  cfg_err,
  input  logic [1:0]  latchup_a,
  input  logic [1:0]  latchup_d,
  input  logic        clear,
  output logic [15:0] irq_word,
  output logic        irq_line,
  output logic        brk_req,
  input  logic        brk_ack
);
  logic [15:2] latched, set_now, next;

  always_comb begin
    set_now = {latchup_d[1], latchup_a[1], latchup_d[0], latchup_a[0],
               cfg_err, meas_err, cal_done, sat, alarm};
    next    = (clear ? '0 : latched) | set_now;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latched <= '0;
      brk_req <= 1'b0;
    end else begin
      latched <= next;
      brk_req <= (brk_req && !brk_ack) || |(next & ~latched);
    end
  end

  assign irq_word = {latched, prop_en};
  assign irq_line = |latched;
endmodule
