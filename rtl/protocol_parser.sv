// protocol_parser: static protocol parser for the reception machine.
//
// Parses a serial frame whose skeleton - the increasing sequence of bit
// positions b_1..b_n where its fields end - is fixed at generation time and
// held in a layer-organised ROM with one stage per skeleton (index chooses
// the stage when the frame starts, and again in mid-frame with reload, when
// a skeleton function-code unit has recognised the code that fixes the
// rest of the frame). Structure, following the generic parser
// architecture:
//   serial_controller      sequences the fields of the frame;
//   field_limits           bit up-counter, ROM address register, skeleton
//                          ROM and comparator;
//   serial_field_supply    serial activation + line derivation per field;
//   deserializer           W-bit serial-to-parallel register, data bus;
//   parallel_controller    parallel activation pulse sets (field types
//                          ty1..ty5 with respect to the W-segments);
//   parallel_field_supply  registered pulses and per-field masked words.
//
// Interface and timing: start (one cycle) begins a frame, whose first bit is
// offered on din with din_valid in a later cycle; one bit is taken per cycle
// with din_valid high. sr_act/sr_data follow din combinationally. The bit
// that completes a W-segment is followed, one cycle later, by data_valid
// with the word on data_bus, the pulses on pr_act and the masked words on
// pf_data. stop ends the frame at once (end of processing signalled by a
// processing unit); without it the frame ends after the last skeleton term
// (skel_end pulse, one cycle after the last bit). A segment still open at
// frame end is closed in that cycle (own choice). Widths of the counter and
// the ROM contents are this design's own; W=8 and three fields are the
// HDLC case.
module protocol_parser
  import parser_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned NF    = 3,
  parameter int unsigned NSKEL = 2,
  parameter int unsigned CNT_W = 16,
  parameter int unsigned IW    = (NSKEL > 1) ? $clog2(NSKEL) : 1,
  parameter int unsigned FW    = $clog2(NF + 1),
  parameter logic [CNT_W-1:0] TERMS [NSKEL*NF] = '{16'd8, 16'd16, 16'd2080,
                                                  16'd8, 16'd16, 16'd32}
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [IW-1:0]                index,
  input  logic                         reload,
  input  logic                         din,
  input  logic                         din_valid,
  input  logic                         stop,
  output logic [NF-1:0]                sr_act,
  output logic [NF-1:0]                sr_data,
  output logic [NF-1:0][PA_LINES-1:0]  pr_act,
  output logic [NF-1:0][W-1:0]         pf_data,
  output logic [W-1:0]                 data_bus,
  output logic                         data_valid,
  output logic                         busy,
  output logic                         skel_end,
  output logic                         frame_bit,
  output logic [FW-1:0]                field_idx,
  output logic [CNT_W-1:0]             bit_count
);

  localparam int unsigned PW = (W > 1) ? $clog2(W) : 1;

  logic             in_field, active, advance, flush, match, term_zero;
  logic [CNT_W-1:0] term;
  logic [PW-1:0]    pos;
  logic [W-1:0]     word_next;
  logic             seg_close;
  logic [NF-1:0][PA_LINES-1:0] act_next;
  logic [NF-1:0][W-1:0]        mask_next;

  serial_controller #(.NF(NF), .FW(FW)) u_sctl (
    .clk, .rst_n, .start, .stop, .din_valid, .match, .term_zero,
    .in_field, .active, .field_idx, .advance, .busy, .skel_end, .flush
  );

  field_limits #(.NSKEL(NSKEL), .NF(NF), .CNT_W(CNT_W), .IW(IW), .FW(FW), .TERMS(TERMS)) u_limits (
    .clk, .rst_n, .start, .index, .reload, .field_idx, .bit_en(active), .advance,
    .term, .term_zero, .match, .bit_count
  );

  serial_field_supply #(.NF(NF), .FW(FW)) u_sfs (
    .in_field, .field_idx, .din, .sr_act, .sr_data
  );

  deserializer #(.W(W), .PW(PW)) u_deser (
    .clk, .rst_n, .start, .bit_en(active), .din, .flush,
    .pos, .word_next, .seg_close, .data_bus, .data_valid
  );

  parallel_controller #(.NF(NF), .W(W), .FW(FW), .PW(PW)) u_pctl (
    .clk, .rst_n, .start, .bit_en(active), .field_idx, .match, .pos, .seg_close,
    .act_next, .mask_next
  );

  parallel_field_supply #(.NF(NF), .W(W)) u_pfs (
    .clk, .rst_n, .seg_close, .act_next, .mask_next, .word_next, .pr_act, .pf_data
  );

  assign frame_bit = active;

endmodule
