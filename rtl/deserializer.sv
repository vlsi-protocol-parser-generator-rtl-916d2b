// deserializer: serial-to-parallel interface of the protocol parser.
//
// A W-bit shift register filled from the frame line. W-division instants are
// counted from the first frame bit: bit k of a segment is stored in bit k of
// the word, so the first received bit appears on data_bus[0]. When an
// accepted bit completes a segment (seg_close), the word goes to the
// internal data bus, with data_valid high for one cycle after that edge. A
// segment left incomplete at frame end is closed by flush (own choice), its
// missing bits reading 0.
//
// word_next is the segment contents including the bit accepted this cycle
// (combinational); pos is the position that bit takes.
module deserializer #(
  parameter int unsigned W  = 8,
  parameter int unsigned PW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          bit_en,
  input  logic          din,
  input  logic          flush,
  output logic [PW-1:0] pos,
  output logic [W-1:0]  word_next,
  output logic          seg_close,
  output logic [W-1:0]  data_bus,
  output logic          data_valid
);

  logic [W-1:0] shreg;

  always_comb begin
    word_next = shreg;
    if (bit_en) word_next[pos] = din;
  end

  assign seg_close = (bit_en && pos == PW'(W - 1)) || (flush && !bit_en && pos != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg      <= '0;
      pos        <= '0;
      data_bus   <= '0;
      data_valid <= 1'b0;
    end else if (start) begin
      shreg      <= '0;
      pos        <= '0;
      data_valid <= 1'b0;
    end else begin
      data_valid <= seg_close;
      if (seg_close) begin
        data_bus <= word_next;
        shreg    <= '0;
        pos      <= '0;
      end else if (bit_en) begin
        shreg    <= word_next;
        pos      <= pos + PW'(1);
      end
    end
  end

endmodule
