// tb_serial_field_supply: exhaustive check of the serial activation decoder
// and line derivations for every field number, line value and in_field.
`timescale 1ns/1ps
module tb_serial_field_supply;
  int checks = 0, failures = 0;
  logic in_field, din;
  logic [2:0] field_idx;
  logic [4:0] sr_act, sr_data;

  serial_field_supply #(.NF(5)) dut (.*);

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    for (int v = 0; v < 2; v++)
      for (int d = 0; d < 2; d++)
        for (int f = 0; f < 8; f++) begin
          in_field = 1'(v); din = 1'(d); field_idx = 3'(f); #1;
          for (int i = 0; i < 5; i++) begin
            check(sr_act[i] == (v == 1 && f == i), "sr_act");
            check(sr_data[i] == (v == 1 && f == i && d == 1), "sr_data");
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
