// Accumulation timer and interrupt dating.
//
// start (cStartRun) clears the timer and opens an accumulation; the timer then
// advances by one every TICK_DIV clocks. When it reaches acc_time (ACC_TIME,
// loaded by cSetTimer) the accumulation ends and alarm pulses for one cycle:
// this is the timer interrupt that tells the SEP processor the counters are
// ready. stop (cStopRun) ends an accumulation without an alarm. The timer
// holds its value after the end, so cReadTimer can read it.
//
// Dating: for each telescope (index 0 = A, PDFE 0/1; index 1 = B, PDFE 2/3)
// the timer value at the first dating event of the accumulation (counter
// saturation, configuration error or latch-up) is captured in date[t]; later
// events leave it unchanged until the next start, which clears both dates.
//
// The 16-bit ACC_TIME, the alarm ending the accumulation and the first-event
// dating follow the instrument; the timer unit (TICK_DIV = 4500 clocks of
// 4.5 MHz = 1 ms, so ACC_TIME up to 65.5 s covers the 60 s cycle) is this
// design's choice.
module acc_timer #(
  parameter int TICK_DIV = 4500
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              stop,
  input  logic              set,
  input  logic [15:0]       set_val,
  output logic [15:0]       acc_time,
  input  logic [1:0]        ev_tel,
  output logic              running,
  output logic              alarm,
  output logic [15:0]       timer,
  output logic [1:0][15:0]  date
);
  localparam int PW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;

  logic [PW-1:0] pre;
  logic [1:0]    dated;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre     <= '0;
      running <= 1'b0;
      alarm   <= 1'b0;
      acc_time <= '0;
      timer   <= '0;
      date    <= '0;
      dated   <= '0;
    end else begin
      alarm <= 1'b0;
      if (set) acc_time <= set_val;
      if (start) begin
        pre     <= '0;
        timer   <= '0;
        running <= 1'b1;
        date    <= '0;
        dated   <= '0;
      end else if (stop) begin
        running <= 1'b0;
      end else if (running) begin
        for (int t = 0; t < 2; t++)
          if (ev_tel[t] && !dated[t]) begin
            dated[t] <= 1'b1;
            date[t]  <= timer;
          end
        if (timer == acc_time) begin
          running <= 1'b0;
          alarm   <= 1'b1;
        end else if (pre == PW'(TICK_DIV - 1)) begin
          pre   <= '0;
          timer <= timer + 1'b1;
        end else begin
          pre <= pre + 1'b1;
        end
      end
    end
  end
endmodule
