// skeleton_rom: layer-organised ROM of frame skeleton terms.
//
// Stage s (one per frame skeleton) holds NF words at addresses s*NF ..
// s*NF+NF-1: the terms b_1..b_n of the skeleton, b_i being the bit position
// (counted from 0 at the first frame bit) where field i ends. A term of 0
// marks the end of a skeleton with fewer than NF fields (real terms are all
// positive). Storing several skeletons, selected by an index, follows the
// parser architecture; the content is fixed at elaboration by TERMS.
//
// Read is asynchronous: term follows addr in the same cycle.
//
// Default content (this design's choice of sizes): stage 0 is the HDLC data
// frame - address (8 bits), command (8 bits), then a data field sized for
// the largest allowed frame, 256 information bytes plus the 16-bit FCS; stage
// 1 is a frame without information field - address, command, FCS.
module skeleton_rom #(
  parameter int unsigned NSKEL = 2,
  parameter int unsigned NF    = 3,
  parameter int unsigned TW    = 16,
  parameter int unsigned AW    = (NSKEL*NF > 1) ? $clog2(NSKEL*NF) : 1,
  parameter logic [TW-1:0] TERMS [NSKEL*NF] = '{16'd8, 16'd16, 16'd2080,
                                               16'd8, 16'd16, 16'd32}
) (
  input  logic [AW-1:0] addr,
  output logic [TW-1:0] term
);

  logic [TW-1:0] rom [NSKEL*NF];

  always_comb begin
    for (int i = 0; i < NSKEL*NF; i++) rom[i] = TERMS[i];
  end

  always_comb begin
    if (int'(addr) < NSKEL*NF) term = rom[addr];
    else                       term = '0;
  end

endmodule
