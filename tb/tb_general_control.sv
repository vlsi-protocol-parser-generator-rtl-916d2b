// tb_general_control: drives flag, crc_ok, skel_end and the unit results
// directly; checks start only when idle or inside the address field, stop
// and frame_end in the CRC cycle, the length-error path, the REPORT cycle
// and the status word, and the frame_done timing: high in the second cycle
// after the frame_end cycle, for one cycle.
`timescale 1ns/1ps
module tb_general_control;
  import parser_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, flag = 0, crc_ok = 0, skel_end = 0, in_addr_field = 0;
  logic addr_match = 0, fifo_overflow = 0;
  logic [15:0] info_count = 0;
  logic som_enable, start, stop, frame_end, frame_done;
  frame_status_t status;

  general_control dut (.*);
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
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 40; r++) begin
      bit good, am, ov;
      int len;
      good = (r % 3 != 2); am = 1'($urandom_range(1)); ov = (r % 4 == 1);
      len = $urandom_range(100);
      crc_ok = 1; skel_end = 0; #1;          // stale CRC result while idle
      check(som_enable && !stop && !frame_end, "idle ignores crc");
      flag = 1; #1;
      check(start, "start on flag when idle");
      @(negedge clk); flag = 0; crc_ok = 0; in_addr_field = 1;
      // a second flag inside the address field restarts
      flag = 1; #1; check(start && som_enable, "restart in address field");
      @(negedge clk); flag = 0;
      repeat (5) @(negedge clk);
      in_addr_field = 0;
      flag = 1; #1; check(!start && !som_enable, "flag ignored past address");
      @(negedge clk); flag = 0;
      addr_match = am;
      fifo_overflow = ov; @(negedge clk); fifo_overflow = 0;
      repeat (3) @(negedge clk);
      if (good) crc_ok = 1; else skel_end = 1;
      #1;
      check(frame_end && stop == good, "frame end");
      @(negedge clk); crc_ok = 0; skel_end = 0; info_count = 16'(len); #1;
      check(!frame_end && !som_enable && !frame_done, "report cycle");
      @(negedge clk); #1;
      check(frame_done, "frame_done");
      check(status.crc_ok == good && status.len_error == !good, "status end cause");
      check(status.addr_match == am && status.overflow == ov, "status match/overflow");
      check(status.info_bytes == 16'(len), "status count");
      check(som_enable, "idle again");
      @(negedge clk); #1;
      check(!frame_done, "frame_done one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
