// tb_fifo_buffer: random reads and writes against a queue model, with
// bursts that fill the FIFO and overflow it; checks data order, empty,
// full, count and the overflow indication.
`timescale 1ns/1ps
module tb_fifo_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [7:0] wr_data = 0, rd_data;
  logic empty, full, overflow;
  logic [4:0] count;

  fifo_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  initial begin
    byte unsigned q[$];
    int novf = 0, nfull = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3000; r++) begin
      int phase;   // 0 balanced, 1 fill, 2 drain
      phase = (r / 200) % 3;
      wr_en = (phase == 1) ? ($urandom_range(9) != 0) : (phase == 0) ? $urandom_range(1) : ($urandom_range(9) == 0);
      rd_en = (phase == 2) ? ($urandom_range(9) != 0) : (phase == 0) ? $urandom_range(1) : ($urandom_range(9) == 0);
      wr_data = 8'($urandom);
      #1;
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == 16), "full");
      check(count == 5'(q.size()), "count");
      if (q.size() > 0) check(rd_data == q[0], "read data");
      check(overflow == (wr_en && q.size() == 16 && !(rd_en && q.size() > 0)), "overflow");
      if (overflow) novf++;
      if (full) nfull++;
      @(posedge clk);
      if (rd_en && q.size() > 0) void'(q.pop_front());
      if (wr_en && (q.size() < 16)) q.push_back(wr_data);
      @(negedge clk);
    end
    check(novf > 0 && nfull > 0, "filled and overflowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
