// PDFE control: power, output drive, enable and mode lines of the two
// telescopes, configuration words of the four PDFEs, event filter modes, and
// the automatic switch-off on latch-up.
//
// cPwrPDFE, cDrvPDFE, cEnPDFE and cCtrlPDFE carry a telescope field PP in
// their two low bits (10 = telescope A, 01 = telescope B, 11 = both,
// 00 = none); each command writes its line of both telescopes from PP, so
// 100000PP with PP = 00 powers the PDFEs off. Index 0 of the outputs is
// telescope A (PDFE 0/1), index 1 telescope B (PDFE 2/3). cConfPDFE writes its
// three argument bytes to the PDFE named by UU and pulses cfg_wr for it, so
// the serial configuration port of that PDFE can load them. cConfFiltr sets
// the two filter bits of PDFE UU.
//
// A latch-up on either supply of a telescope removes its power and output
// drive at once; only a new cPwrPDFE/cDrvPDFE turns it back on. Event
// propagation of a telescope (prop_en) is enabled when its power, drive,
// enable and control lines are all on. rst_soft (cRstFPGA) returns everything
// to the reset state. The commands and the latch-up switch-off are the
// instrument's; the line encoding and the prop_en condition are this design's.
module pdfe_ctrl
  import sept_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  action_t           act,
  input  logic [1:0]        latchup_a,
  input  logic [1:0]        latchup_d,
  output logic [1:0]        pwr,
  output logic [1:0]        drv,
  output logic [1:0]        en,
  output logic [1:0]        ctrl,
  output logic [3:0][23:0]  cfg,
  output logic [3:0]        cfg_wr,
  output logic [3:0][1:0]   filt,
  output logic [1:0]        prop_en
);
  logic [1:0] pp;   // telescope field, index 0 = A
  assign pp = {act.cmd[0], act.cmd[1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwr    <= '0;
      drv    <= '0;
      en     <= '0;
      ctrl   <= '0;
      cfg    <= '0;
      cfg_wr <= '0;
      filt   <= '0;
    end else begin
      cfg_wr <= '0;
      if (act.valid) begin
        case (act.op)
          OP_PWRPDFE:   pwr  <= pp;
          OP_DRVPDFE:   drv  <= pp;
          OP_ENPDFE:    en   <= pp;
          OP_CTRLPDFE:  ctrl <= pp;
          OP_CONFPDFE: begin
            cfg[act.cmd[1:0]]    <= act.args;
            cfg_wr[act.cmd[1:0]] <= 1'b1;
          end
          OP_CONFFILTR: filt[act.cmd[3:2]] <= act.cmd[1:0];
          default: ;
        endcase
      end
      for (int t = 0; t < 2; t++)
        if (latchup_a[t] || latchup_d[t]) begin
          pwr[t] <= 1'b0;
          drv[t] <= 1'b0;
        end
    end
  end

  assign prop_en = pwr & drv & en & ctrl;
endmodule
