// tb_command_recognition: all 256 command bytes; the expected decode is
// built field by field from the bit numbering of the HDLC command formats
// (bit 1 received first).
`timescale 1ns/1ps
module tb_command_recognition;
  import parser_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, act = 0;
  logic [7:0] data = 0;
  hdlc_cmd_t cmd;
  logic cmd_valid;

  command_recognition dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  // bit n (1..8) of the command field
  function automatic logic bt(logic [7:0] v, int n);
    return v[n-1];
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 256; v++) begin
      start = 1; @(negedge clk); start = 0; #1;
      check(!cmd_valid, "cleared");
      data = 8'(v); act = 1; @(negedge clk); act = 0; #1;
      check(cmd_valid, "valid");
      check(cmd.pf == bt(data, 5), "P/F");
      if (bt(data, 1) == 0) begin
        check(cmd.fmt == FMT_I, "I format");
        check(cmd.ns == {bt(data, 4), bt(data, 3), bt(data, 2)}, "N(S)");
        check(cmd.nr == {bt(data, 8), bt(data, 7), bt(data, 6)}, "N(R)");
        check(cmd.s_code == 0 && cmd.m_code == 0, "unused I");
      end else if (bt(data, 2) == 0) begin
        check(cmd.fmt == FMT_S, "S format");
        check(cmd.s_code == {bt(data, 4), bt(data, 3)}, "S bits");
        check(cmd.nr == {bt(data, 8), bt(data, 7), bt(data, 6)}, "N(R) S");
        check(cmd.ns == 0 && cmd.m_code == 0, "unused S");
      end else begin
        check(cmd.fmt == FMT_U, "U format");
        check(cmd.m_code == {bt(data, 8), bt(data, 7), bt(data, 6), bt(data, 4), bt(data, 3)}, "M bits");
        check(cmd.ns == 0 && cmd.nr == 0 && cmd.s_code == 0, "unused U");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
