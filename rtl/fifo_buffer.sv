// fifo_buffer: FIFO queue between the parser's internal bus and the DMA.
//
// Synchronous first-in first-out memory of DEPTH words of W bits. It lets
// the reception side write at the bit-clock rate while the DMA empties it at
// the pace of the shared-memory bus. rd_data shows the oldest word whenever
// empty is low (first-word fall-through); rd_en removes it at the clock
// edge. A write while full is dropped and overflow is high in that cycle
// (combinational), since the serial line cannot be held back. The depth is
// this design's choice (16 words). Reading and writing in the same cycle is
// allowed, also when full.
module fifo_buffer #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full,
  output logic         overflow,
  output logic [AW:0]  count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign empty    = (count == '0);
  assign full     = (count == (AW+1)'(DEPTH));
  assign do_rd    = rd_en && !empty;
  assign do_wr    = wr_en && (!full || do_rd);
  assign overflow = wr_en && !do_wr;
  assign rd_data  = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= next_ptr(wptr);
      if (do_rd) rptr <= next_ptr(rptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

endmodule
