// crc_unit: serial CRC processing unit of the HDLC reception machine.
//
// A 16-bit serial CRC register (x^16 + x^12 + x^5 + 1, preset to ones, bits
// taken least significant first) runs over every frame bit after the opening
// flag, the frame check sequence included. For an error-free frame the
// register then holds the fixed remainder 0xF0B8; since the length of the
// data field is not known in advance, reaching that remainder at a byte
// boundary, at least MIN_BITS bits into the frame, is the detection that
// marks the end of the FCS field (crc_ok). This polynomial reproduces the
// FCS of the reference HDLC frame; it and MIN_BITS (address, command and
// FCS) are this design's choices.
//
// Timing: crc_ok is combinational from the register, high in the cycle
// after the last FCS bit. start presets the register.
module crc_unit
  import parser_pkg::*;
#(
  parameter int unsigned MIN_BITS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        bit_en,
  input  logic        din,
  output logic [15:0] crc,
  output logic        crc_ok
);

  logic [15:0] nbits;

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      crc   <= CRC_PRESET;
      nbits <= '0;
    end else if (bit_en) begin
      crc   <= (crc >> 1) ^ ((crc[0] ^ din) ? CRC_POLY_REV : 16'h0000);
      if (nbits != 16'hFFFF) nbits <= nbits + 16'd1;
    end
  end

  assign crc_ok = (crc == CRC_GOOD) && (nbits >= 16'(MIN_BITS)) && (nbits[2:0] == 3'd0);

endmodule
