// tb_deserializer: shifts random bits with random gaps through the
// serial-to-parallel register (W = 8) and checks each word (first
// bit in bit 0), the W-division instants, data_valid one cycle after the
// closing bit, and the flush of a partial word.
`timescale 1ns/1ps
module tb_deserializer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, bit_en = 0, din = 0, flush = 0;
  logic [2:0] pos;
  logic [7:0] word_next, data_bus;
  logic seg_close, data_valid;

  deserializer #(.W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  initial begin
    logic [7:0] w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 5; r++) begin
      int nb;
      nb = 8 * r + 3 + r;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      w = '0;
      for (int k = 0; k < nb; k++) begin
        while ($urandom_range(2) == 0) begin
          bit_en = 0; #1; check(!seg_close, "no close in gap");
          @(posedge clk); #1; check(!data_valid, "no word in gap");
          @(negedge clk);
        end
        bit_en = 1; din = 1'($urandom_range(1)); w[k % 8] = din; #1;
        check(pos == 3'(k % 8), "pos");
        check(seg_close == (k % 8 == 7), "seg_close");
        @(posedge clk); #1;
        check(data_valid == (k % 8 == 7), "data_valid");
        if (k % 8 == 7) begin check(data_bus == w, "word"); w = '0; end
        @(negedge clk);
      end
      bit_en = 0; flush = 1; #1;
      check(seg_close == (nb % 8 != 0), "flush closes partial word");
      @(posedge clk); #1;
      if (nb % 8 != 0) check(data_valid && data_bus == w, "flushed word");
      @(negedge clk); flush = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
