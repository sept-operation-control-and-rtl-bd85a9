// Shared types and constants of the SEPT instrument FPGA.
//
// The SEPT FPGA is driven by one-byte commands received on a 57.6 kbaud
// serial link. This package holds the command set (opcode decoding, the
// number of argument bytes and the length of each response), the decoded
// action that the command interpreter hands to the rest of the FPGA, and the
// lower edges of the 32 logarithmic energy bins.
//
// Command bit patterns, the rUnknown/rTimeOut codes and the bin edges follow
// the instrument's command list; the argument count of cSetTimer (two bytes,
// the 16-bit accumulation time) and the part identification byte are this
// design's choice.
package sept_pkg;

  // Response codes for communication errors.
  localparam logic [7:0] R_UNKNOWN = 8'b0000_0011;
  localparam logic [7:0] R_TIMEOUT = 8'b0000_1111;

  typedef enum logic [4:0] {
    OP_UNKNOWN,
    OP_GETID,      // 00010100
    OP_RSTCOMM,    // 00010010
    OP_RSTFPGA,    // 00010001
    OP_CONFFILTR,  // 0011UU--
    OP_GETHK,      // 010000UU
    OP_GETSINGLE,  // 01001-UU
    OP_STARTRUN,   // 01100---
    OP_STOPRUN,    // 01101000
    OP_CLEARIRQ,   // 01110000
    OP_PWRPDFE,    // 100000PP
    OP_DRVPDFE,    // 100001PP
    OP_ENPDFE,     // 100010PP
    OP_CTRLPDFE,   // 100011PP
    OP_CONFPDFE,   // 100100UU + 3 bytes
    OP_STATPDFE,   // 10010100
    OP_CONFCNTR,   // 101000-- + 2 bytes
    OP_INITCNTR,   // 10101-UU
    OP_READ32,     // 101100UU
    OP_READ256,    // 101101UU
    OP_SETTIMER,   // 11010000 + 2 bytes
    OP_READTIMER,  // 11010001
    OP_READDATE,   // 11010010
    OP_CONFCAL     // 111----- + 3 bytes
  } op_e;

  // One decoded command, valid for one clock cycle.
  typedef struct packed {
    logic        valid;
    op_e         op;
    logic [7:0]  cmd;   // the command byte itself (holds the parameters)
    logic [23:0] args;  // argument bytes, first received in bits 23:16
  } action_t;

  function automatic op_e decode_op(input logic [7:0] c);
    op_e o;
    o = OP_UNKNOWN;
    if      (c == 8'b0001_0100)  o = OP_GETID;
    else if (c == 8'b0001_0010)  o = OP_RSTCOMM;
    else if (c == 8'b0001_0001)  o = OP_RSTFPGA;
    else if (c[7:4] == 4'b0011)  o = OP_CONFFILTR;
    else if (c[7:2] == 6'b010000) o = OP_GETHK;
    else if (c[7:3] == 5'b01001) o = OP_GETSINGLE;
    else if (c[7:3] == 5'b01100) o = OP_STARTRUN;
    else if (c == 8'b0110_1000)  o = OP_STOPRUN;
    else if (c == 8'b0111_0000)  o = OP_CLEARIRQ;
    else if (c[7:2] == 6'b100000) o = OP_PWRPDFE;
    else if (c[7:2] == 6'b100001) o = OP_DRVPDFE;
    else if (c[7:2] == 6'b100010) o = OP_ENPDFE;
    else if (c[7:2] == 6'b100011) o = OP_CTRLPDFE;
    else if (c[7:2] == 6'b100100) o = OP_CONFPDFE;
    else if (c == 8'b1001_0100)  o = OP_STATPDFE;
    else if (c[7:2] == 6'b101000) o = OP_CONFCNTR;
    else if (c[7:3] == 5'b10101) o = OP_INITCNTR;
    else if (c[7:2] == 6'b101100) o = OP_READ32;
    else if (c[7:2] == 6'b101101) o = OP_READ256;
    else if (c == 8'b1101_0000)  o = OP_SETTIMER;
    else if (c == 8'b1101_0001)  o = OP_READTIMER;
    else if (c == 8'b1101_0010)  o = OP_READDATE;
    else if (c[7:5] == 3'b111)   o = OP_CONFCAL;
    return o;
  endfunction

  // Number of argument bytes that follow the command byte.
  function automatic logic [1:0] n_args(input op_e o);
    case (o)
      OP_CONFPDFE, OP_CONFCAL:  return 2'd3;
      OP_CONFCNTR, OP_SETTIMER: return 2'd2;
      default:                  return 2'd0;
    endcase
  endfunction

  // Number of data bytes sent after the echoed command byte.
  function automatic logic [9:0] n_resp(input op_e o);
    case (o)
      OP_GETID, OP_STATPDFE:               return 10'd1;
      OP_CLEARIRQ, OP_READTIMER:           return 10'd2;
      OP_GETSINGLE:                        return 10'd3;
      OP_READDATE, OP_GETHK:               return 10'd4;
      OP_READ32:                           return 10'd96;   // 32 x 3 bytes
      OP_READ256:                          return 10'd768;  // 256 x 3 bytes
      default:                             return 10'd0;
    endcase
  endfunction

  // Lower edge, as an 8-bit ADC code, of each of the 32 logarithmic bins.
  // The ADC spans 0..2200 keV in 255 steps (8.627 keV per code); bin i
  // collects codes from LOG_EDGE[i] up to LOG_EDGE[i+1]-1, bin 31 everything
  // from 222 (1915.3 keV) up. Edge i = E(i-1) * 255 / 2200 with E the energy
  // boundary in keV (17.25, 25.88, ... 1915.29 keV).
  localparam logic [7:0] LOG_EDGE [32] = '{
    8'd0,   8'd2,   8'd3,   8'd4,   8'd5,   8'd6,   8'd7,   8'd9,
    8'd11,  8'd13,  8'd15,  8'd18,  8'd21,  8'd24,  8'd28,  8'd32,
    8'd36,  8'd41,  8'd47,  8'd53,  8'd60,  8'd68,  8'd77,  8'd86,
    8'd97,  8'd110, 8'd124, 8'd139, 8'd157, 8'd176, 8'd198, 8'd222
  };

endpackage
