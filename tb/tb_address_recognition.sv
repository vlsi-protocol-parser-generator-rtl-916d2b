// tb_address_recognition: random, own and all-stations addresses; checks
// the registered match result one cycle after the pulse, that it holds
// without a pulse and that start clears it.
`timescale 1ns/1ps
module tb_address_recognition;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, act = 0;
  logic [7:0] data = 0, station_addr = 8'h3C;
  logic addr_match, addr_valid;

  address_recognition dut (.*);
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
    logic em;
    int nm = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      station_addr = 8'($urandom);
      start = 1; @(negedge clk); start = 0; #1;
      check(!addr_valid && !addr_match, "cleared by start");
      case (r % 3)
        0: data = station_addr;
        1: data = 8'hFF;
        default: data = 8'($urandom);
      endcase
      em = (data == station_addr) || (data == 8'hFF);
      nm += em;
      act = 1; @(negedge clk); act = 0;
      data = 8'($urandom); #1;
      check(addr_valid && addr_match == em, "match result");
      @(negedge clk); #1;
      check(addr_valid && addr_match == em, "result held");
    end
    check(nm > 0 && nm < 300, "both outcomes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
