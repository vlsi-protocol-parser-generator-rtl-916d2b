// tb_parallel_controller: feeds the parallel control part the bit stream of
// the skeleton {5, 8, 10, 14, 20, 45} (fields of type ty1, ty2, ty1, ty3,
// ty4, ty5 for W = 8), with gaps and a final partial segment, and checks at
// every W-division instant the pulse line chosen for each field and its bit
// mask against values worked out from the terms.
`timescale 1ns/1ps
module tb_parallel_controller;
  import parser_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, bit_en = 0, match = 0, seg_close = 0;
  logic [2:0] field_idx = 0;
  logic [2:0] pos = 0;
  logic [5:0][PA_LINES-1:0] act_next;
  logic [5:0][7:0] mask_next;

  parallel_controller #(.NF(6), .W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  int B [7] = '{0, 5, 8, 10, 14, 20, 45};
  int n_line [3] = '{0, 0, 0};

  task automatic check_seg(input int seg);
    for (int f = 0; f < 6; f++) begin
      int lo = B[f], hi = B[f+1] - 1, l = -1;
      logic [PA_LINES-1:0] e = '0;
      logic [7:0] m;
      if (seg >= lo / 8 && seg <= hi / 8) begin
        if (seg == lo / 8) l = PA_FIRST;
        else if (seg == hi / 8 && hi / 8 - lo / 8 >= 2) l = PA_LAST;
        else l = PA_NEXT;
        e[l] = 1'b1; n_line[l]++;
      end
      check(act_next[f] == e, $sformatf("field %0d seg %0d line got %b exp %b", f, seg, act_next[f], e));
      for (int b = 0; b < 8; b++) m[b] = (seg*8 + b >= B[f]) && (seg*8 + b <= hi);
      if (l >= 0) check(mask_next[f] == m, $sformatf("field %0d seg %0d mask", f, seg));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int k = 0; k < 45; k++) begin
        int f;
        f = 0;
        while (k >= B[f+1]) f++;
        if ($urandom_range(3) == 0) begin
          bit_en = 0; match = 0; seg_close = 0; #1;
          check(act_next == '0, "no pulse in gap");
          @(negedge clk);
        end
        bit_en = 1; field_idx = 3'(f); pos = 3'(k % 8);
        match = (k + 1 == B[f+1]); seg_close = (k % 8 == 7); #1;
        if (seg_close) check_seg(k / 8);
        else check(act_next == '0, "no pulse inside segment");
        @(negedge clk);
      end
      // flush of the partial last segment
      bit_en = 0; match = 0; seg_close = 1; field_idx = 3'd6; #1;
      check_seg(5);
      @(negedge clk); seg_close = 0;
    end
    check(n_line[0] > 0 && n_line[1] > 0 && n_line[2] > 0, "all lines used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
