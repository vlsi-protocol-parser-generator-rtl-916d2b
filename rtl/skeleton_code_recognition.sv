// skeleton_code_recognition: skeleton function-code recognition unit for
// the HDLC reception machine.
//
// In HDLC the first bits of the command field decide whether an
// information field follows: bit 1 = 0 marks an I frame (information
// always present), bits 2..1 = 01 an S frame (never an information field),
// bits 2..1 = 11 a U frame, where the 5 modifier bits decide. This unit
// reads the command byte on its parallel activation pulse (act, with the
// field word on data, first received bit in data[0]) and works out the
// stage on index: DATA_STAGE for frames that may carry information,
// SHORT_STAGE for frames that end after the FCS. Every frame starts in
// DATA_STAGE (stage, cleared by start); when the code asks for another
// stage, reload is raised in that same cycle so that the parser re-selects
// its skeleton. The choice for the current frame is held in stage until the
// next start.
//
// The recognition of format bits as skeleton function codes follows the
// HDLC description; which U commands carry information (U_INFO_CODES,
// indexed by the modifier value {data[7:5], data[3:2]}: UI 0, FRMR 17,
// XID 23, TEST 28) is taken from the HDLC standard and is this design's
// own choice, as are the stage numbers.
module skeleton_code_recognition #(
  parameter int unsigned IW          = 1,
  parameter logic [IW-1:0] DATA_STAGE  = IW'(0),
  parameter logic [IW-1:0] SHORT_STAGE = IW'(1),
  parameter logic [31:0] U_INFO_CODES  = 32'h1082_0001
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          act,
  input  logic [7:0]    data,
  output logic          reload,
  output logic [IW-1:0] index,
  output logic [IW-1:0] stage
);

  logic has_info;

  always_comb begin
    if (!data[0])      has_info = 1'b1;                                   // I
    else if (!data[1]) has_info = 1'b0;                                   // S
    else               has_info = U_INFO_CODES[{data[7:5], data[3:2]}];   // U
  end

  assign index  = has_info ? DATA_STAGE : SHORT_STAGE;
  assign reload = act && (index != stage);

  always_ff @(posedge clk) begin
    if (!rst_n)      stage <= DATA_STAGE;
    else if (start)  stage <= DATA_STAGE;
    else if (act)    stage <= index;
  end

endmodule
