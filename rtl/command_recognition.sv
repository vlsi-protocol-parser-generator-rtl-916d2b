// command_recognition: HDLC command field function-code recognition unit.
//
// Takes the command field (one byte, bit 1 = first bit received = data[0])
// at its parallel activation pulse and decodes the function codes it holds:
// bit 1 = 0 is an information frame (N(S) in bits 2-4, P/F in bit 5, N(R) in
// bits 6-8); bits 1-2 = 1,0 a supervision frame (S bits 3-4, P/F, N(R));
// bits 1-2 = 1,1 a non-sequential frame (M bits 3,4,6,7,8 and P/F). The bit
// layout follows the HDLC command formats; reading each subfield with its
// lowest-numbered bit as least significant is HDLC practice. Subfields that
// do not exist in the decoded format read 0. The decoded command is
// registered: cmd and cmd_valid change in the cycle after the pulse; start
// clears cmd_valid.
module command_recognition
  import parser_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       act,
  input  logic [7:0] data,
  output hdlc_cmd_t  cmd,
  output logic       cmd_valid
);

  hdlc_cmd_t dec;

  always_comb begin
    dec = '0;
    dec.pf = data[4];
    if (!data[0]) begin
      dec.fmt = FMT_I;
      dec.ns  = data[3:1];
      dec.nr  = data[7:5];
    end else if (!data[1]) begin
      dec.fmt    = FMT_S;
      dec.s_code = data[3:2];
      dec.nr     = data[7:5];
    end else begin
      dec.fmt    = FMT_U;
      dec.m_code = {data[7:5], data[3:2]};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cmd       <= '0;
      cmd_valid <= 1'b0;
    end else if (start) begin
      cmd_valid <= 1'b0;
    end else if (act) begin
      cmd       <= dec;
      cmd_valid <= 1'b1;
    end
  end

endmodule
