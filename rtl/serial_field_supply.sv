// serial_field_supply: serial field supplying block of the protocol parser.
//
// Decodes the current field number into one serial activation signal per
// field, high for as long as the frame line carries that field, and derives
// the frame line onto the serial data output of that field only. Where the
// parser architecture places a three-state gate per field, this two-state
// version uses an AND gate, so an inactive field's derivation reads 0.
// Purely combinational.
module serial_field_supply #(
  parameter int unsigned NF = 3,
  parameter int unsigned FW = $clog2(NF + 1)
) (
  input  logic          in_field,
  input  logic [FW-1:0] field_idx,
  input  logic          din,
  output logic [NF-1:0] sr_act,
  output logic [NF-1:0] sr_data
);

  always_comb begin
    for (int i = 0; i < NF; i++) begin
      sr_act[i]  = in_field && (field_idx == FW'(i));
      sr_data[i] = sr_act[i] && din;
    end
  end

endmodule
