// SEPT FPGA: low-level control and event counting of one SEPT electronics
// unit (four solid-state detectors, each read by a PDFE front-end ASIC,
// grouped in two telescopes: A = PDFE 0/1, B = PDFE 2/3).
//
// The SEP processor drives the unit with one-byte commands over a
// 57.6 kbaud serial link (rxd/txd). cmd_ctrl decodes them, echoes them and
// sends their data; the decoded action goes to
//   pdfe_ctrl    power/drive/enable/control lines, PDFE configuration words,
//                event filter modes, latch-up switch-off;
//   acc_timer    accumulation start/stop, ACC_TIME, end-of-accumulation
//                alarm and the dating of the first anomaly per telescope;
//   irq_reg      interrupt register (read and cleared by cClearIrq), the
//                interrupt line (irq) and the BREAK on the serial line;
//   histograms   per PDFE, a 32-bin logarithmic and a 256-bin linear bank of
//                24-bit counters (cRead32 / cRead256 read and clear them,
//                cInitCntr clears them);
//   single_counter  raw count of one selected channel (cGetSingle).
// During an accumulation each PDFE event (ev_valid, 8-bit ev_energy, ev_gr =
// guard ring hit in the same cycle) of a telescope whose event propagation is
// enabled passes the coincidence filter and is counted in its energy bin.
//
// The 18 MHz clk_ext is divided to the 4.5 MHz internal clock, which also
// leaves on pdfe_clk: all PDFE inputs are taken as synchronous to it.
// cRstFPGA resets everything except the serial link and the command
// interpreter, which finish echoing it.
//
// Side by side, and not connected to the FPGA, are two data-processing units
// of the SEP processor: the 24-to-12-bit counter compressor (sep_cmp_*) and
// the beacon window summation of one PDFE's 32 counters (sep_bcn_*).
//
// What follows the instrument: the command set and response rules, the
// interrupt register, the bit rate and frame, the binning, the counter sizes,
// the latch-up switch-off. This design's own choices: the PDFE event and
// configuration interfaces (the ASIC's digital interface is not given), the
// housekeeping inputs as 16 ready bytes (four per cGetHK), the timer unit,
// the filter bit meaning, and that cConfCntr is accepted and echoed without
// effect (its mode and page fields are not defined).
module sept_fpga
  import sept_pkg::*;
#(
  parameter int CLKS_PER_BIT = 78,
  parameter int ARG_TIMEOUT  = 8100,
  parameter int TICK_DIV     = 4500
) (
  input  logic              clk_ext,
  input  logic              rst_n,
  // serial link and interrupt line to the SEP processor
  input  logic              rxd,
  output logic              txd,
  output logic              irq,
  // PDFE interface
  output logic              pdfe_clk,
  input  logic [3:0]        ev_valid,
  input  logic [3:0][7:0]   ev_energy,
  input  logic [3:0]        ev_gr,
  input  logic [3:0]        pdfe_cfg_err,
  input  logic [1:0]        latchup_a,     // index 0 = telescope A
  input  logic [1:0]        latchup_d,
  input  logic [15:0][7:0]  hk,
  output logic [1:0]        pdfe_pwr,
  output logic [1:0]        pdfe_drv,
  output logic [1:0]        pdfe_en,
  output logic [1:0]        pdfe_ctrl_o,
  output logic [3:0][23:0]  pdfe_cfg,
  output logic [3:0]        pdfe_cfg_wr,
  // test generator (its sequence is not defined)
  output logic [23:0]       tg_cfg,
  output logic              tg_cfg_wr,
  input  logic              tg_done,
  // SEP-side data processing
  input  logic [23:0]       sep_cmp_value,
  output logic [11:0]       sep_cmp_code,
  input  logic [31:0][23:0] sep_bcn_counts,
  input  logic [4:0][4:0]   sep_bcn_edges,
  input  logic              sep_bcn_bad,
  output logic [3:0][28:0]  sep_bcn_sum,
  output logic [3:0]        sep_bcn_invalid
);
  logic clk;
  clk_div #(.DIV(4)) u_clk (.clk_ext, .rst_n, .clk_int(clk));
  assign pdfe_clk = clk;

  // ---- serial link and command interpreter ----------------------------
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, rx_ferr, tx_valid, tx_ready, brk_req, brk_ack;
  action_t    act;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd, .data(rx_data), .valid(rx_valid), .frame_err(rx_ferr));
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_data), .valid(tx_valid), .ready(tx_ready),
    .brk(brk_req), .brk_ack, .txd);

  // soft reset of the instrument logic on cRstFPGA
  logic soft_rst, core_rst_n;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) soft_rst <= 1'b0;
    else        soft_rst <= act.valid && act.op == OP_RSTFPGA;
  assign core_rst_n = rst_n && !soft_rst;

  logic [15:0]       irq_word, timer, acc_time;
  logic [1:0][15:0]  date;
  logic [22:0]       single;
  logic [2:0]        single_sel;
  logic [7:0]        stat_pdfe;
  logic [1:0]        hist_pdfe;
  logic              hist_lin, hist_clr;
  logic [7:0]        hist_bin;
  logic [23:0]       hist_data;

  cmd_ctrl #(.ARG_TIMEOUT(ARG_TIMEOUT)) u_cmd (
    .clk, .rst_n, .rx_data, .rx_valid, .tx_data, .tx_valid, .tx_ready, .act,
    .irq_word, .stat_pdfe, .timer, .date, .single, .hk,
    .hist_pdfe, .hist_lin, .hist_bin, .hist_clr, .hist_data);

  // ---- PDFE control, timer, interrupts ---------------------------------
  logic [3:0][1:0] filt;
  logic [1:0]      prop_en, running2, sat_tel, cfg_err_tel, anomaly;
  logic            running, alarm;

  pdfe_ctrl u_pdfe (
    .clk, .rst_n(core_rst_n), .act, .latchup_a, .latchup_d,
    .pwr(pdfe_pwr), .drv(pdfe_drv), .en(pdfe_en), .ctrl(pdfe_ctrl_o),
    .cfg(pdfe_cfg), .cfg_wr(pdfe_cfg_wr), .filt, .prop_en);

  assign cfg_err_tel = {pdfe_cfg_err[3] | pdfe_cfg_err[2], pdfe_cfg_err[1] | pdfe_cfg_err[0]};
  assign anomaly     = cfg_err_tel | latchup_a | latchup_d;

  acc_timer #(.TICK_DIV(TICK_DIV)) u_timer (
    .clk, .rst_n(core_rst_n),
    .start(act.valid && act.op == OP_STARTRUN),
    .stop(act.valid && act.op == OP_STOPRUN),
    .set(act.valid && act.op == OP_SETTIMER), .set_val(act.args[23:8]),
    .acc_time, .ev_tel(sat_tel | anomaly),
    .running, .alarm, .timer, .date);

  assign running2 = {2{running}};

  irq_reg u_irq (
    .clk, .rst_n(core_rst_n), .prop_en, .alarm, .sat(sat_tel), .cal_done(tg_done),
    .meas_err(anomaly & running2), .cfg_err(pdfe_cfg_err), .latchup_a, .latchup_d,
    .clear(act.valid && act.op == OP_CLEARIRQ),
    .irq_word, .irq_line(irq), .brk_req, .brk_ack);

  assign stat_pdfe = {latchup_d[1], latchup_a[1], latchup_d[0], latchup_a[0], pdfe_cfg_err};

  // ---- event path ------------------------------------------------------
  logic [3:0]        accept, sat_log, sat_lin, hit_main;
  logic [3:0][4:0]   log_bin;
  logic [3:0][23:0]  rd_log, rd_lin;

  for (genvar i = 0; i < 4; i++) begin : g_pdfe
    localparam int TEL = i / 2;
    logic acc_raw;

    event_filter u_filt (
      .ev_valid(ev_valid[i]), .ev_gr(ev_gr[i]), .partner_valid(ev_valid[i ^ 1]),
      .mode(filt[i]), .accept(acc_raw));
    assign accept[i]   = acc_raw && running && prop_en[TEL];
    assign hit_main[i] = ev_valid[i] && prop_en[TEL];

    log_binner u_bin (.energy(ev_energy[i]), .bin(log_bin[i]));

    histogram #(.NBINS(32), .CW(24)) u_log (
      .clk, .rst_n(core_rst_n), .inc(accept[i]), .inc_bin(log_bin[i]),
      .rd_bin(hist_bin[4:0]), .rd_data(rd_log[i]),
      .clr_bin(hist_clr && !hist_lin && hist_pdfe == 2'(i)),
      .clr_all(act.valid && act.op == OP_INITCNTR && act.cmd[1:0] == 2'(i)),
      .sat(sat_log[i]));

    histogram #(.NBINS(256), .CW(24)) u_lin (
      .clk, .rst_n(core_rst_n), .inc(accept[i]), .inc_bin(ev_energy[i]),
      .rd_bin(hist_bin), .rd_data(rd_lin[i]),
      .clr_bin(hist_clr && hist_lin && hist_pdfe == 2'(i)),
      .clr_all(act.valid && act.op == OP_INITCNTR && act.cmd[1:0] == 2'(i)),
      .sat(sat_lin[i]));
  end

  assign sat_tel   = {sat_log[3] | sat_log[2] | sat_lin[3] | sat_lin[2],
                      sat_log[1] | sat_log[0] | sat_lin[1] | sat_lin[0]};
  assign hist_data = hist_lin ? rd_lin[hist_pdfe] : rd_log[hist_pdfe];

  single_counter #(.SW(23)) u_single (
    .clk, .rst_n(core_rst_n), .count_en(running),
    .hit_main, .hit_gr(ev_gr & {{2{prop_en[1]}}, {2{prop_en[0]}}}),
    .sel_load(act.valid && act.op == OP_GETSINGLE), .sel_new(act.cmd[2:0]),
    .sel(single_sel), .count(single));

  // ---- test generator configuration (cConfCal) -------------------------
  always_ff @(posedge clk or negedge core_rst_n)
    if (!core_rst_n) begin
      tg_cfg    <= '0;
      tg_cfg_wr <= 1'b0;
    end else begin
      tg_cfg_wr <= act.valid && act.op == OP_CONFCAL;
      if (act.valid && act.op == OP_CONFCAL) tg_cfg <= act.args;
    end

  // ---- SEP-side data processing ---------------------------------------
  count_compressor u_cmp (.value(sep_cmp_value), .code(sep_cmp_code));

  beacon_summer #(.CW(24), .NB(32)) u_bcn (
    .counts(sep_bcn_counts), .edges(sep_bcn_edges), .status_bad(sep_bcn_bad),
    .sum(sep_bcn_sum), .invalid(sep_bcn_invalid));
endmodule
