// som_detector: start-of-message (flag) detection unit.
//
// Watches the serial line for the HDLC flag 01111110 through an 8-bit shift
// register. flag is combinational: it is high in the cycle in which the
// eighth flag bit is offered (din_valid), so the parser can be started at
// that clock edge and take the next bit as the first bit of the frame. At
// least eight bits must have been taken since the last clear. clear (end of
// a frame) empties the register but keeps a bit offered in the same cycle,
// so a closing flag that follows the frame directly can open the next one.
// The unit itself is named by the reception architecture; its shift
// register form is this design's own.
module som_detector
  import parser_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic clear,
  input  logic din,
  input  logic din_valid,
  output logic flag
);

  logic [6:0] sr;
  logic [2:0] fill;   // bits held in sr, saturating at 7
  logic [7:0] window;

  assign window = {sr, din};
  assign flag   = enable && din_valid && (fill == 3'd7) && (window == HDLC_FLAG);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr   <= '0;
      fill <= '0;
    end else if (clear) begin
      sr   <= {6'b0, din};
      fill <= din_valid ? 3'd1 : 3'd0;
    end else if (din_valid) begin
      sr   <= window[6:0];
      if (fill != 3'd7) fill <= fill + 3'd1;
    end
  end

endmodule
