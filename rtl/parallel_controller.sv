// parallel_controller: parallel control part of the protocol parser.
//
// Turns the serial activations into parallel activation pulse sets. For
// every field it records which bits of the current W-segment belong to the
// field (mask), how many segments of the field have already been closed
// (0, 1, 2 or more) and whether the field has ended. At each W-division
// instant (seg_close) every field holding bits of the closing segment gets
// one pulse, on the line chosen by the field-type rules:
//   - first segment of the field                     -> line PA_FIRST
//     (the only pulse of ty1, ty2 and ty3 fields);
//   - any later segment, while the field goes on, and
//     the second and final segment of a ty4 field    -> line PA_NEXT;
//   - final segment of a field spanning three or
//     more segments (ty5)                            -> line PA_LAST.
// The type is worked out while the frame runs, from these counts, rather
// than being stored per field; this is this design's own choice. A field cut
// short by stop never gets its PA_LAST pulse.
//
// act_next and mask_next are combinational and valid in the seg_close
// cycle; the parallel field supplying block registers them.
module parallel_controller
  import parser_pkg::*;
#(
  parameter int unsigned NF = 3,
  parameter int unsigned W  = 8,
  parameter int unsigned FW = $clog2(NF + 1),
  parameter int unsigned PW = (W > 1) ? $clog2(W) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic                         bit_en,
  input  logic [FW-1:0]                field_idx,
  input  logic                         match,
  input  logic [PW-1:0]                pos,
  input  logic                         seg_close,
  output logic [NF-1:0][PA_LINES-1:0]  act_next,
  output logic [NF-1:0][W-1:0]         mask_next
);

  logic [NF-1:0][W-1:0] mask_q;
  logic [NF-1:0][1:0]   segs_q;
  logic [NF-1:0]        done_q, done_n;

  always_comb begin
    for (int i = 0; i < NF; i++) begin
      logic cur;
      cur          = bit_en && (field_idx == FW'(i));
      mask_next[i] = mask_q[i];
      if (cur) mask_next[i][pos] = 1'b1;
      done_n[i]    = done_q[i] || (cur && match);
      act_next[i]  = '0;
      if (seg_close && mask_next[i] != '0) begin
        act_next[i][PA_FIRST] = (segs_q[i] == 2'd0);
        act_next[i][PA_NEXT]  = (segs_q[i] != 2'd0) && (!done_n[i] || segs_q[i] == 2'd1);
        act_next[i][PA_LAST]  = (segs_q[i] == 2'd2) && done_n[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      mask_q <= '0;
      segs_q <= '0;
      done_q <= '0;
    end else begin
      done_q <= done_n;
      for (int i = 0; i < NF; i++) begin
        if (seg_close) begin
          mask_q[i] <= '0;
          if (mask_next[i] != '0 && segs_q[i] != 2'd2) segs_q[i] <= segs_q[i] + 2'd1;
        end else begin
          mask_q[i] <= mask_next[i];
        end
      end
    end
  end

endmodule
