// parser_pkg: types and constants shared by the protocol parser and the
// HDLC reception machine built around it.
//
// The parallel activation of a field is a set of up to three one-clock
// pulse lines (first segment, following segments, last segment of a field
// spanning three or more W-segments). HDLC constants follow the usual
// HDLC/X.25 conventions: flag 01111110 and the CRC-CCITT frame check
// sequence, transmitted least significant bit first.
package parser_pkg;

  // Parallel activation line numbers inside a field's pulse set.
  localparam int unsigned PA_FIRST = 0;  // first W-segment of the field
  localparam int unsigned PA_NEXT  = 1;  // later segments (second pulse of a ty4 field)
  localparam int unsigned PA_LAST  = 2;  // closing segment of a ty5 field
  localparam int unsigned PA_LINES = 3;

  // HDLC
  localparam logic [7:0]  HDLC_FLAG     = 8'b0111_1110;
  localparam logic [7:0]  HDLC_ALL_STAT = 8'hFF;       // all-stations address
  localparam logic [15:0] CRC_PRESET    = 16'hFFFF;
  localparam logic [15:0] CRC_POLY_REV  = 16'h8408;    // x^16+x^12+x^5+1, bit-reversed
  localparam logic [15:0] CRC_GOOD      = 16'hF0B8;    // remainder of an error-free frame

  typedef enum logic [1:0] {
    FMT_I = 2'b00,  // information
    FMT_S = 2'b01,  // supervision
    FMT_U = 2'b11   // unnumbered (non-sequential)
  } hdlc_fmt_e;

  // Decoded HDLC command field (figure of the command formats: bits 1..8).
  typedef struct packed {
    hdlc_fmt_e  fmt;
    logic [2:0] ns;      // N(S), I format
    logic [2:0] nr;      // N(R), I and S formats
    logic       pf;      // poll/final bit
    logic [1:0] s_code;  // S bits, S format
    logic [4:0] m_code;  // M bits, U format
  } hdlc_cmd_t;

  // Status of one received frame, kept by the general control part.
  typedef struct packed {
    logic        crc_ok;       // FCS detected: frame ended correctly
    logic        len_error;    // skeleton exhausted without FCS detection
    logic        addr_match;   // address recognised
    logic        overflow;     // FIFO lost a word during the frame
    logic [15:0] info_bytes;   // information bytes validated
  } frame_status_t;

endpackage
