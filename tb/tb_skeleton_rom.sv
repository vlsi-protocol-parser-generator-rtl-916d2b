// tb_skeleton_rom: checks every address of the skeleton ROM, default
// content and an overridden table, including addresses past the table,
// which must read 0 (no field).
`timescale 1ns/1ps
module tb_skeleton_rom;
  int checks = 0, failures = 0;
  logic [2:0] addr;
  logic [15:0] term;
  logic [3:0] addr2;
  logic [11:0] term2;
  localparam logic [11:0] T2 [9] = '{12'd3, 12'd7, 12'd100, 12'd9, 12'd0, 12'd0, 12'd1, 12'd2, 12'd4095};

  skeleton_rom dut (.addr, .term);
  skeleton_rom #(.NSKEL(3), .NF(3), .TW(12), .TERMS(T2)) dut2 (.addr(addr2), .term(term2));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    int exp [6] = '{8, 16, 2080, 8, 16, 32};
    for (int a = 0; a < 8; a++) begin
      addr = 3'(a); #1;
      check(term == 16'(a < 6 ? exp[a] : 0), $sformatf("default addr %0d", a));
    end
    for (int a = 0; a < 16; a++) begin
      addr2 = 4'(a); #1;
      check(term2 == (a < 9 ? T2[a] : 12'd0), $sformatf("table addr %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
