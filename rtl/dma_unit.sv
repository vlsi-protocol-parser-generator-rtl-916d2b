// dma_unit: direct memory access module of the reception machine.
//
// Moves the received words from the FIFO to consecutive addresses of the
// host's shared memory. The write port uses a request/grant handshake of
// this design's own: mem_req rises with mem_addr and mem_wdata, which stay
// stable until mem_gnt is seen high at a clock edge; a new word can be
// taken from the FIFO in that same cycle, so one word per cycle moves when
// the memory grants every cycle. base_load sets the next address to base.
module dma_unit #(
  parameter int unsigned W      = 8,
  parameter int unsigned MEM_AW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [MEM_AW-1:0] base,
  input  logic              base_load,
  input  logic              fifo_empty,
  input  logic [W-1:0]      fifo_data,
  output logic              fifo_rd,
  output logic              mem_req,
  output logic [MEM_AW-1:0] mem_addr,
  output logic [W-1:0]      mem_wdata,
  input  logic              mem_gnt
);

  logic done;  // the pending word is written at this edge

  assign done    = mem_req && mem_gnt;
  assign fifo_rd = !fifo_empty && (!mem_req || done) && !base_load;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem_req   <= 1'b0;
      mem_addr  <= '0;
      mem_wdata <= '0;
    end else begin
      if (base_load)  mem_addr <= base;
      else if (done)  mem_addr <= mem_addr + MEM_AW'(1);
      if (fifo_rd) begin
        mem_req   <= 1'b1;
        mem_wdata <= fifo_data;
      end else if (done) begin
        mem_req   <= 1'b0;
      end
    end
  end

  // A request keeps its address and data until it is granted.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      mem_req && !mem_gnt && !base_load |=> mem_req && $stable(mem_addr) && $stable(mem_wdata);
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
