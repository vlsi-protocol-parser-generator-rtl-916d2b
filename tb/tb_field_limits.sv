// tb_field_limits: drives the delimiting-field block through both default
// skeleton stages with random bit gaps and checks, bit by bit, the bit
// counter, the current term and the comparator match, worked out from the
// skeleton terms. Some frames re-select the stage in mid-frame (reload),
// once in the same cycle as a field end, and then follow the new stage.
`timescale 1ns/1ps
module tb_field_limits;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, bit_en = 0, advance = 0;
  logic [0:0] index = 0;
  logic reload = 0;
  logic [1:0] field_idx = 0;
  logic [15:0] term, bit_count;
  logic term_zero, match;

  field_limits dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  int T [2][3] = '{'{8, 16, 2080}, '{8, 16, 32}};

  task automatic run(input int s, input int nbits, input int rl_at = -1, input int s2 = 0);
    int f = 0;
    @(negedge clk); index = 1'(s); start = 1;
    @(negedge clk); start = 0;
    for (int k = 0; k < nbits; k++) begin
      while ($urandom_range(3) == 0) begin
        bit_en = 0; advance = 0; #1;
        check(match == 0, "no match without bit");
        @(negedge clk);
      end
      bit_en = 1; #1;
      check(bit_count == 16'(k), "bit_count");
      check(term == 16'(T[s][f]), "term");
      check(match == (k + 1 == T[s][f]), $sformatf("match bit %0d", k));
      advance = match;
      if (k == rl_at) begin
        reload = 1; index = 1'(s2); field_idx = 2'(f);
      end
      @(negedge clk);
      if (advance) f++;
      if (reload) s = s2;
      advance = 0; reload = 0;
    end
    bit_en = 0; #1;
    check(term_zero == 0 || f == 3, "term_zero");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(1, 32);
    run(0, 40);
    run(0, 2080);
    run(1, 20);
    run(0, 32, 20, 1);    // data frame turns out short
    run(0, 32, 15, 1);    // re-selected in the cycle the command field ends
    run(1, 100, 10, 0);   // short frame turns out to carry data
    run(0, 30, 3, 0);     // same stage again
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
