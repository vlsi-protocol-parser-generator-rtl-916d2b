// serial_controller: serial control part of the protocol parser.
//
// Sequences the analysis of one frame. start (the start-of-message field
// has been recognised) puts it in the parsing state at field 0; the bit
// presented in the next cycle is the first frame bit. While parsing, each
// accepted bit is counted by the field-limits block; when the comparator
// reports that the bit closes the current field, the field number and the
// skeleton ROM address advance together. The frame ends when the next term
// is empty or all NF fields are done (skel_end), or when a processing unit
// requests the end of processing (stop, e.g. CRC detection). stop takes
// priority over a bit offered in the same cycle.
//
// Outputs: in_field is a level, high while the parser is inside a field;
// active marks a bit accepted this cycle (in_field and din_valid); flush
// and skel_end are one-cycle pulses in the cycle after the last frame bit
// (or in the stop cycle). The two-state controller is this design's own.
module serial_controller #(
  parameter int unsigned NF = 3,
  parameter int unsigned FW = $clog2(NF + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          stop,
  input  logic          din_valid,
  input  logic          match,
  input  logic          term_zero,
  output logic          in_field,
  output logic          active,
  output logic [FW-1:0] field_idx,
  output logic          advance,
  output logic          busy,
  output logic          skel_end,
  output logic          flush
);

  logic ended;

  assign ended    = busy && (term_zero || field_idx == FW'(NF));
  assign in_field = busy && !stop && !ended;
  assign active   = in_field && din_valid;
  assign advance  = active && match;
  assign skel_end = busy && !stop && ended;
  assign flush    = busy && (stop || ended);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      field_idx <= '0;
    end else if (start) begin
      busy      <= 1'b1;
      field_idx <= '0;
    end else if (flush) begin
      busy      <= 1'b0;
    end else if (advance) begin
      field_idx <= field_idx + FW'(1);
    end
  end

endmodule
