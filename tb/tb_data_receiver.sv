// tb_data_receiver: random data fields of 2 to 40 bytes, pulses on random
// lines of the set, random enable; checks that exactly the bytes before the
// last two are written, in order, one cycle after their successor's
// successor arrived, and that the count is right, also when the last pulse
// and frame_end share a cycle.
`timescale 1ns/1ps
module tb_data_receiver;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, enable = 1, frame_end = 0;
  logic [2:0] act = 0;
  logic [7:0] data = 0, wr_data;
  logic wr_en;
  logic [15:0] info_count;

  data_receiver dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  byte unsigned got[$];
  always @(negedge clk) if (wr_en) got.push_back(wr_data);   // mid-cycle sample

  initial begin
    byte unsigned fr[$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 60; r++) begin
      int n;
      bit same;
      n = 2 + $urandom_range(38);
      same = (r % 2);
      enable = (r % 5 != 4);
      fr = {}; got = {};
      start = 1; @(negedge clk); start = 0;
      for (int k = 0; k < n; k++) begin
        repeat ($urandom_range(3)) @(negedge clk);
        fr.push_back(8'($urandom));
        data = fr[k]; act = 3'b001 << $urandom_range(2);
        frame_end = same && (k == n - 1);
        @(negedge clk); act = 0; frame_end = 0;
      end
      if (!same) begin frame_end = 1; @(negedge clk); frame_end = 0; end
      repeat (2) @(negedge clk);
      check(info_count == 16'(n - 2), "count");
      check(got.size() == (enable ? n - 2 : 0), "bytes written");
      for (int k = 0; k < got.size(); k++) check(got[k] == fr[k], "byte order");
      // a new frame must not see held bytes of the old one
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
