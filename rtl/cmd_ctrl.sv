// Command interpreter of the SEPT FPGA.
//
// Bytes from the serial receiver are taken as commands. The command byte is
// decoded (sept_pkg::decode_op); if the command has arguments, they are
// collected, and if any argument byte is more than ARG_TIMEOUT clocks
// (1.8 ms at 4.5 MHz) after the previous byte the command is dropped and the
// single byte rTimeOut (00001111) is sent. An unknown command is answered by
// the single byte rUnknown (00000011). A complete command is
//   1. issued to the rest of the FPGA as a one-cycle action (act), and
//   2. answered by echoing the command byte, followed by its data bytes.
// Data of short responses (interrupt register, status, timer, dates,
// housekeeping, single counter, part identification) is captured in the
// cycle the action is issued, before the action changes anything, so
// cClearIrq returns the register as it was before it cleared it and
// cGetSingle returns the count of the previous selection. cRead32 and
// cRead256 stream the counters of the addressed PDFE from the histogram read
// port, three bytes per counter, and clear each counter once its last byte
// has been handed to the transmitter. Multi-byte values are sent most
// significant byte first.
//
// The SEP processor waits for the echo before it sends the next command; a
// byte that still arrives while a response is being sent is held (one byte
// deep) and handled afterwards. cRstComm drops such a held byte.
//
// The command set, echo, rUnknown/rTimeOut and the 1.8 ms argument time-out
// are the instrument's; byte order, response lengths and the holding byte
// are this design's choices.
module cmd_ctrl
  import sept_pkg::*;
#(
  parameter int         ARG_TIMEOUT = 8100,
  parameter logic [7:0] PART_ID     = 8'h11
) (
  input  logic              clk,
  input  logic              rst_n,
  // serial receiver
  input  logic [7:0]        rx_data,
  input  logic              rx_valid,
  // serial transmitter
  output logic [7:0]        tx_data,
  output logic              tx_valid,
  input  logic              tx_ready,
  // decoded command
  output action_t           act,
  // response sources
  input  logic [15:0]       irq_word,
  input  logic [7:0]        stat_pdfe,
  input  logic [15:0]       timer,
  input  logic [1:0][15:0]  date,
  input  logic [22:0]       single,
  input  logic [15:0][7:0]  hk,
  // histogram read port
  output logic [1:0]        hist_pdfe,
  output logic              hist_lin,
  output logic [7:0]        hist_bin,
  output logic              hist_clr,
  input  logic [23:0]       hist_data
);
  localparam int TW = $clog2(ARG_TIMEOUT + 1);

  typedef enum logic [1:0] {S_IDLE, S_ARGS, S_RESP} state_e;

  state_e        state;
  logic [7:0]    cmd;
  op_e           op;
  logic [23:0]   args;
  logic [1:0]    argn;       // argument bytes still expected
  logic [TW-1:0] to_cnt;
  logic [7:0]    first;      // echo, or rUnknown / rTimeOut
  logic          first_sent;
  logic [9:0]    left;       // data bytes still to send
  logic [31:0]   snap;
  logic          stream;     // response comes from the histogram
  logic [7:0]    bin_cnt;
  logic [1:0]    byte_cnt;
  logic          pend_valid;
  logic [7:0]    pend_data;

  // byte offered to the command decoder this cycle
  logic       in_valid;
  logic [7:0] in_data;
  assign in_valid = (state == S_IDLE) ? (pend_valid || rx_valid) : rx_valid;
  assign in_data  = (state == S_IDLE && pend_valid) ? pend_data : rx_data;

  op_e new_op;
  assign new_op = decode_op(in_data);

  // response data captured when the action is issued
  function automatic logic [31:0] snapshot(input op_e o, input logic [7:0] c);
    logic [31:0] s;
    s = '0;
    case (o)
      OP_GETID:     s = {PART_ID, 24'd0};
      OP_CLEARIRQ:  s = {irq_word, 16'd0};
      OP_STATPDFE:  s = {stat_pdfe, 24'd0};
      OP_READTIMER: s = {timer, 16'd0};
      OP_READDATE:  s = {date[0], date[1]};
      OP_GETHK:     s = {hk[{c[1:0], 2'd0}], hk[{c[1:0], 2'd1}],
                         hk[{c[1:0], 2'd2}], hk[{c[1:0], 2'd3}]};
      OP_GETSINGLE: s = {1'b0, single, 8'd0};
      default:      s = '0;
    endcase
    return s;
  endfunction

  // byte to transmit
  always_comb begin
    tx_valid = (state == S_RESP);
    if (!first_sent)   tx_data = first;
    else if (stream)   tx_data = (byte_cnt == 2'd0) ? hist_data[23:16] :
                                 (byte_cnt == 2'd1) ? hist_data[15:8] : hist_data[7:0];
    else               tx_data = snap[31:24];
  end

  assign hist_pdfe = cmd[1:0];
  assign hist_lin  = (op == OP_READ256);
  assign hist_bin  = bin_cnt;
  assign hist_clr  = (state == S_RESP) && first_sent && stream && tx_ready && byte_cnt == 2'd2;

  // completion of a command (do_issue) or of an error reply (do_err)
  logic        do_issue, do_err;
  logic [23:0] iss_args;
  logic [7:0]  iss_cmd, err_code;
  op_e         iss_op;

  always_comb begin
    do_issue = 1'b0;
    do_err   = 1'b0;
    iss_args = '0;
    iss_cmd  = cmd;
    iss_op   = op;
    err_code = R_UNKNOWN;
    case (state)
      S_IDLE: if (in_valid) begin
        iss_cmd = in_data;
        iss_op  = new_op;
        if (new_op == OP_UNKNOWN)        do_err   = 1'b1;
        else if (n_args(new_op) == 2'd0) do_issue = 1'b1;
      end
      S_ARGS: if (rx_valid) begin
        if (argn == 2'd1) begin
          do_issue = 1'b1;
          if (n_args(op) == 2'd3) iss_args = {args[23:8], rx_data};
          else                    iss_args = {args[23:16], rx_data, 8'd0};
        end
      end else if (to_cnt == TW'(ARG_TIMEOUT)) begin
        do_err   = 1'b1;
        err_code = R_TIMEOUT;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cmd        <= '0;
      op         <= OP_UNKNOWN;
      args       <= '0;
      argn       <= '0;
      to_cnt     <= '0;
      first      <= '0;
      first_sent <= 1'b0;
      left       <= '0;
      snap       <= '0;
      stream     <= 1'b0;
      bin_cnt    <= '0;
      byte_cnt   <= '0;
      pend_valid <= 1'b0;
      pend_data  <= '0;
      act        <= '0;
    end else begin
      act <= '0;
      case (state)
        S_IDLE: if (in_valid) begin
          if (pend_valid) pend_valid <= 1'b0;
          if (pend_valid && rx_valid) begin   // keep the newer byte
            pend_valid <= 1'b1;
            pend_data  <= rx_data;
          end
          cmd  <= in_data;
          op   <= new_op;
          args <= '0;

          if (new_op != OP_UNKNOWN && n_args(new_op) != 2'd0) begin
            argn   <= n_args(new_op);
            to_cnt <= '0;
            state  <= S_ARGS;
          end
        end
        S_ARGS: begin
          if (rx_valid) begin
            to_cnt <= '0;
            argn   <= argn - 1'b1;
            // arguments fill from bit 23 down, first byte highest
            if (argn != 2'd1) begin
              case (n_args(op) - argn)
                2'd0:    args[23:16] <= rx_data;
                default: args[15:8]  <= rx_data;
              endcase
            end
          end else if (to_cnt != TW'(ARG_TIMEOUT)) begin
            to_cnt <= to_cnt + 1'b1;
          end
        end
        S_RESP: begin
          if (rx_valid) begin
            pend_valid <= 1'b1;
            pend_data  <= rx_data;
          end
          if (tx_ready) begin
            if (!first_sent) begin
              first_sent <= 1'b1;
              if (left == '0) state <= S_IDLE;
            end else begin
              left <= left - 1'b1;
              if (left == 10'd1) state <= S_IDLE;
              if (stream) begin
                if (byte_cnt == 2'd2) begin
                  byte_cnt <= '0;
                  bin_cnt  <= bin_cnt + 1'b1;
                end else byte_cnt <= byte_cnt + 1'b1;
              end else snap <= {snap[23:0], 8'd0};
            end
          end
          if (act.valid && act.op == OP_RSTCOMM) pend_valid <= 1'b0;
        end
        default: state <= S_IDLE;
      endcase
      if (do_issue) begin
        act        <= '{valid: 1'b1, op: iss_op, cmd: iss_cmd, args: iss_args};
        snap       <= snapshot(iss_op, iss_cmd);
        first      <= iss_cmd;
        first_sent <= 1'b0;
        left       <= n_resp(iss_op);
        stream     <= (iss_op == OP_READ32 || iss_op == OP_READ256);
        bin_cnt    <= '0;
        byte_cnt   <= '0;
        state      <= S_RESP;
      end else if (do_err) begin
        first      <= err_code;
        first_sent <= 1'b0;
        left       <= '0;
        stream     <= 1'b0;
        state      <= S_RESP;
      end
    end
  end

  // a complete command is issued exactly once, in the cycle its response starts
  a_act_starts_resp: assert property (@(posedge clk) disable iff (!rst_n)
    act.valid |-> state == S_RESP && !first_sent);
endmodule
