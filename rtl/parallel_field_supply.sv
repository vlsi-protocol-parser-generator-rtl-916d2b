// parallel_field_supply: parallel field supplying block of the protocol
// parser.
//
// At each W-division instant it registers the parallel activation pulses
// chosen by the parallel control part and, for every field, the word of the
// internal bus masked to the bits that belong to that field, so a unit whose
// field shares a segment with others reads only its own bits. Pulses last
// one cycle and appear in the cycle after the bit that closed the segment,
// together with the new word on the deserializer's data bus. Masking is this
// design's reading of delivering parallel data to the concerned units.
module parallel_field_supply
  import parser_pkg::*;
#(
  parameter int unsigned NF = 3,
  parameter int unsigned W  = 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         seg_close,
  input  logic [NF-1:0][PA_LINES-1:0]  act_next,
  input  logic [NF-1:0][W-1:0]         mask_next,
  input  logic [W-1:0]                 word_next,
  output logic [NF-1:0][PA_LINES-1:0]  pr_act,
  output logic [NF-1:0][W-1:0]         pf_data
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pr_act  <= '0;
      pf_data <= '0;
    end else begin
      pr_act <= act_next;
      if (seg_close)
        for (int i = 0; i < NF; i++) pf_data[i] <= word_next & mask_next[i];
    end
  end

endmodule
