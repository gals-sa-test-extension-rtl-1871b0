// galssa_pkg: widths, command codes, frame status codes and frame-length
// tables shared by the serial test infrastructure of the GALS-SA platform.
//
// A command frame is addr, cmd, then command-specific data, sent MSB first
// while serTxEn is high. A response frame is a 2-bit frame status followed by
// command status/data, sent MSB first while serRxEn is high. The frame layout
// (addr | cmd | data, status | data) and the three error cases (invalid frame,
// non-existent module, operation not implemented) follow the document; every
// width, code and length below is this design's own choice.
package galssa_pkg;

  localparam int unsigned ADDR_W  = 4;   // module address field
  localparam int unsigned CMD_W   = 4;   // command field
  localparam int unsigned HDR_W   = ADDR_W + CMD_W;
  localparam int unsigned DMAX    = 16;  // longest command-specific data field
  localparam int unsigned RMAX    = 24;  // longest response data field
  localparam int unsigned CH_W    = 8;   // asynchronous channel data width
  localparam int unsigned STAT_W  = 2;   // frame status field
  localparam int unsigned CAL_W   = 8;   // local clock calibration code
  localparam int unsigned SIG_W   = 16;  // receiver signature register

  // Command codes. MSB set = extended command, served by the test extension.
  typedef enum logic [CMD_W-1:0] {
    CMD_STATUS   = 4'h0,  // no operation, status only
    CMD_CLK_CFG  = 4'h1,  // data[7:0] calibration code for the local clock
    CMD_RX_ARM   = 4'h2,  // data[7:0] seed; receiver enters functional test mode
    CMD_FUNC_TX  = 4'h3,  // data[15:8] seed, data[7:0] count; send PRBS patterns
    CMD_RX_CHECK = 4'h4,  // read pass flag and received count; leave test mode
    CMD_LAT_TEST = 4'h5,  // measure channel latency (req to ack) in local cycles
    CMD_EXT_PATTERN = 4'h8, // extension: data[7:0] user pattern sent on the channel
    CMD_EXT_SIGREAD = 4'h9  // extension: read receiver signature and last word
  } cmd_e;

  typedef enum logic [STAT_W-1:0] {
    ST_OK       = 2'd0,
    ST_BAD_ADDR = 2'd1,   // frame addressed to a non-existent module
    ST_BAD_CMD  = 2'd2,   // operation not implemented
    ST_BAD_LEN  = 2'd3    // frame length does not fit the command
  } stat_e;

  function automatic logic is_ext_cmd(logic [CMD_W-1:0] c);
    return c[CMD_W-1];
  endfunction

  // Intrinsic command: is it implemented, and its data length in bits.
  function automatic logic intr_known(logic [CMD_W-1:0] c);
    return c inside {CMD_STATUS, CMD_CLK_CFG, CMD_RX_ARM, CMD_FUNC_TX,
                     CMD_RX_CHECK, CMD_LAT_TEST};
  endfunction

  function automatic int unsigned intr_len(logic [CMD_W-1:0] c);
    case (c)
      CMD_CLK_CFG, CMD_RX_ARM: return 8;
      CMD_FUNC_TX:             return 16;
      default:                 return 0;
    endcase
  endfunction

  // Response data length of an intrinsic command (without the status bits).
  function automatic int unsigned intr_rlen(logic [CMD_W-1:0] c);
    case (c)
      CMD_FUNC_TX:  return 8;   // patterns acknowledged
      CMD_RX_CHECK: return 9;   // pass flag, received count
      CMD_LAT_TEST: return 8;   // latency in local clock cycles
      default:      return 0;
    endcase
  endfunction

  // Extended commands: data length, used by the main serial extension and by
  // the serial control extension.
  function automatic logic ext_known(logic [CMD_W-1:0] c);
    return c inside {CMD_EXT_PATTERN, CMD_EXT_SIGREAD};
  endfunction

  function automatic int unsigned ext_dlen(logic [CMD_W-1:0] c);
    return (c == CMD_EXT_PATTERN) ? 8 : 0;
  endfunction

  // Pattern generator of the functional test: 8-bit maximal-length Galois
  // LFSR, x^8 + x^6 + x^5 + x^4 + 1. A zero seed is replaced by 1.
  function automatic logic [CH_W-1:0] lfsr_next(logic [CH_W-1:0] s);
    logic [CH_W-1:0] n;
    n = {1'b0, s[CH_W-1:1]};
    if (s[0]) n ^= 8'hB8;
    return n;
  endfunction

  // Receiver signature: 16-bit MISR, CRC-16-CCITT style feedback (x^16 + x^12
  // + x^5 + 1) with the received word folded into the low byte.
  function automatic logic [SIG_W-1:0] misr_next(logic [SIG_W-1:0] s,
                                                 logic [CH_W-1:0]  d);
    logic [SIG_W-1:0] n;
    n = {s[SIG_W-2:0], 1'b0};
    if (s[SIG_W-1]) n ^= 16'h1021;
    n[CH_W-1:0] ^= d;
    return n;
  endfunction

endpackage
