// field_limits: delimiting-field recognition of the static protocol parser.
//
// Holds the frame bit up-counter, the skeleton ROM with its address
// register, and the comparator. On start the address register is loaded
// with the first word of the stage chosen by index (index*NF) and the
// counter is cleared; on advance the address goes to the next term. match
// is high when the bit being counted this cycle is the last bit of the
// current field, i.e. bit_count+1 equals the current term. The up-counter,
// ROM, index/+1 address multiplexer and comparator are the parser's own
// structure; the widths are this design's choice.
//
// reload re-selects the stage in the middle of a frame, as a skeleton
// function-code recognition unit does once it has read the code that
// fixes the rest of the frame: the address register moves to the same
// field (field_idx, plus one if that field ends in the same cycle) of the
// stage given by index, while the bit counter runs on. The new term of the
// current field must still lie ahead of the bit counter. Re-selection in
// mid-frame is this design's reading of how the index signal is used.
//
// Timing: start, reload, bit_en and advance act at the clock edge (start
// first, then reload); term and match are combinational from the registers
// and bit_en.
module field_limits #(
  parameter int unsigned NSKEL = 2,
  parameter int unsigned NF    = 3,
  parameter int unsigned CNT_W = 16,
  parameter int unsigned IW    = (NSKEL > 1) ? $clog2(NSKEL) : 1,
  parameter int unsigned AW    = (NSKEL*NF > 1) ? $clog2(NSKEL*NF) : 1,
  parameter int unsigned FW    = $clog2(NF + 1),
  parameter logic [CNT_W-1:0] TERMS [NSKEL*NF] = '{16'd8, 16'd16, 16'd2080,
                                                  16'd8, 16'd16, 16'd32}
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [IW-1:0]    index,
  input  logic             reload,
  input  logic [FW-1:0]    field_idx,
  input  logic             bit_en,
  input  logic             advance,
  output logic [CNT_W-1:0] term,
  output logic             term_zero,
  output logic             match,
  output logic [CNT_W-1:0] bit_count
);

  logic [AW-1:0] rom_addr;

  // address register with its load (index, index + field) / increment (+1)
  // multiplexer
  always_ff @(posedge clk) begin
    if (!rst_n)        rom_addr <= '0;
    else if (start)    rom_addr <= AW'(int'(index) * NF);
    else if (reload)   rom_addr <= AW'(int'(index) * NF + int'(field_idx) + int'(advance));
    else if (advance)  rom_addr <= rom_addr + AW'(1);
  end

  // frame bit up-counter
  always_ff @(posedge clk) begin
    if (!rst_n)       bit_count <= '0;
    else if (start)   bit_count <= '0;
    else if (bit_en)  bit_count <= bit_count + CNT_W'(1);
  end

  skeleton_rom #(.NSKEL(NSKEL), .NF(NF), .TW(CNT_W), .AW(AW), .TERMS(TERMS)) u_rom (
    .addr (rom_addr),
    .term (term)
  );

  // comparator
  assign term_zero = (term == '0);
  assign match     = bit_en && !term_zero && (bit_count + CNT_W'(1) == term);

endmodule
