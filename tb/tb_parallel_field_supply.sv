// tb_parallel_field_supply: random pulses, masks and words; checks that the
// pulses are registered for exactly one cycle and that each field's data is
// the word masked to its bits, taken only at a W-division instant.
`timescale 1ns/1ps
module tb_parallel_field_supply;
  import parser_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, seg_close = 0;
  logic [3:0][PA_LINES-1:0] act_next = '0;
  logic [3:0][7:0] mask_next = '0;
  logic [7:0] word_next = '0;
  logic [3:0][PA_LINES-1:0] pr_act;
  logic [3:0][7:0] pf_data;

  parallel_field_supply #(.NF(4), .W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  initial begin
    logic [3:0][7:0] held = '0;
    logic [3:0][PA_LINES-1:0] a;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      seg_close = ($urandom_range(1) == 1);
      a = seg_close ? 12'($urandom) : '0;
      act_next = a;
      mask_next = 32'($urandom);
      word_next = 8'($urandom);
      if (seg_close) for (int i = 0; i < 4; i++) held[i] = word_next & mask_next[i];
      @(posedge clk); #1;
      check(pr_act == a, "pulses registered");
      check(pf_data == held, "masked field data");
      @(negedge clk);
    end
    act_next = '0; seg_close = 0;
    @(posedge clk); #1;
    check(pr_act == '0, "pulse lasts one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
