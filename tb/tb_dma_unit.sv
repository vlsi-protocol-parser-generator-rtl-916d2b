// tb_dma_unit: a FIFO model with random arrivals feeds the DMA while the
// memory grants at random; checks that every word arrives once, in order,
// at consecutive addresses from the loaded base, that a request holds its
// address and data until granted, and that back-to-back grants move one
// word per cycle.
`timescale 1ns/1ps
module tb_dma_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, base_load = 0, mem_gnt = 0;
  logic [15:0] base = 16'h2000, mem_addr;
  logic fifo_empty, fifo_rd, mem_req;
  logic [7:0] fifo_data, mem_wdata;

  dma_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  byte unsigned src[$], sent[$];
  // FIFO model outputs, refreshed whenever the queue changes
  task automatic upd();
    fifo_empty = (src.size() == 0);
    fifo_data  = fifo_empty ? 8'h00 : src[0];
  endtask

  int burst = 0, max_burst = 0;
  logic [15:0] exp_addr;
  initial begin
    logic [15:0] a_hold, a_now; logic [7:0] d_hold, d_now; bit pend = 0, wr, rd;
    upd();
    repeat (2) @(negedge clk);
    rst_n = 1;
    base_load = 1; @(negedge clk); base_load = 0;
    exp_addr = base;
    for (int r = 0; r < 2000; r++) begin
      int phase;
      phase = (r / 250) % 2;
      if ($urandom_range(2) == 0 || phase == 1) begin
        byte unsigned v;
        v = 8'($urandom);
        src.push_back(v); sent.push_back(v); upd();
      end
      mem_gnt = (phase == 1) ? 1'b1 : ($urandom_range(1) == 1);
      #1;
      if (pend) check(mem_req && mem_addr == a_hold && mem_wdata == d_hold, "request held");
      wr = mem_req && mem_gnt; rd = fifo_rd; a_now = mem_addr; d_now = mem_wdata;
      pend = mem_req && !mem_gnt; a_hold = mem_addr; d_hold = mem_wdata;
      @(posedge clk); #1;
      if (wr) begin
        check(a_now == exp_addr, "address");
        check(sent.size() > 0 && d_now == sent[0], "data order");
        if (sent.size() > 0) void'(sent.pop_front());
        exp_addr++;
        burst++; if (burst > max_burst) max_burst = burst;
      end else burst = 0;
      if (rd) begin
        check(src.size() > 0, "no read when empty");
        begin void'(src.pop_front()); upd(); end
      end
      @(negedge clk);
    end
    mem_gnt = 1;
    repeat (40) begin
      #1;
      wr = mem_req && mem_gnt; rd = fifo_rd; d_now = mem_wdata;
      @(posedge clk); #1;
      if (wr) begin
        check(d_now == sent[0], "drain order"); void'(sent.pop_front()); exp_addr++;
      end
      if (rd) begin void'(src.pop_front()); upd(); end
      @(negedge clk);
    end
    check(sent.size() == 0, "all words written");
    check(max_burst >= 20, "one word per cycle under continuous grant");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
