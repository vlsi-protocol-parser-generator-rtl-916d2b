// tb_som_detector: random line with inserted flags; checks that flag rises
// exactly on the eighth bit of each flag, never without eight bits since
// the last clear, not when disabled, and that a bit offered with clear is
// kept.
`timescale 1ns/1ps
module tb_som_detector;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, enable = 1, clear = 0, din = 0, din_valid = 0, flag;

  som_detector dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  logic [7:0] hist = '0;
  int fill = 0, nflags = 0;

  task automatic bitx(input logic b, input logic clr);
    if ($urandom_range(3) == 0) begin
      din_valid = 0; clear = 0; #1; check(!flag, "no flag without bit"); @(negedge clk);
    end
    din = b; din_valid = 1; clear = clr; #1;
    hist = {hist[6:0], b};
    check(flag == (enable && fill >= 7 && hist == 8'h7E), "flag");
    if (flag) nflags++;
    if (clr) fill = 1; else fill++;
    @(negedge clk); clear = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      enable = (r % 10 != 9);
      if (r % 3 == 0) for (int i = 0; i < 8; i++) bitx(i != 0 && i != 7, 1'b0);
      else if (r % 7 == 1) bitx(1'($urandom_range(1)), 1'b1);
      else bitx(1'($urandom_range(1)), 1'b0);
    end
    // a flag right after a clear, first bit offered with the clear
    enable = 1;
    bitx(1'b0, 1'b1);
    for (int i = 1; i < 8; i++) bitx(i != 7, 1'b0);
    check(flag == 0 && nflags > 50, "flags seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
