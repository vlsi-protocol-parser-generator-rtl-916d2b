// tb_serial_controller: runs the serial control part against a small
// behavioural field-limits model (terms 3, 5, 12) and checks the field
// number, activity, advance, skel_end and flush pulses, the priority of
// stop over a bit, and that it stays idle until start.
`timescale 1ns/1ps
module tb_serial_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, din_valid = 0;
  logic match, term_zero;
  logic in_field, active, advance, busy, skel_end, flush;
  logic [1:0] field_idx;
  int cnt;
  int TERMS [4] = '{3, 5, 12, 0};

  serial_controller dut (.*);
  always #5 clk = ~clk;

  // model of the field limits: counter and comparator
  assign term_zero = (TERMS[field_idx] == 0);
  assign match = active && (cnt + 1 == TERMS[field_idx]);
  always @(posedge clk) if (start) cnt <= 0; else if (active) cnt <= cnt + 1;

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  int fexp;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    din_valid = 1; #1;
    check(!busy && !active, "idle before start");
    for (int r = 0; r < 4; r++) begin
      int stop_at;
      stop_at = (r % 2) ? 7 : -1;
      @(negedge clk); din_valid = 0; start = 1;
      @(negedge clk); start = 0;
      for (int k = 0; k < 12; k++) begin
        fexp = (k < 3) ? 0 : (k < 5) ? 1 : 2;
        din_valid = ($urandom_range(2) != 0);
        if (k == stop_at) begin
          stop = 1; din_valid = 1; #1;
          check(!active && flush && !skel_end, "stop wins over bit");
          @(negedge clk); stop = 0; #1;
          check(!busy, "idle after stop");
          break;
        end
        #1;
        check(busy && in_field, "in field");
        check(field_idx == 2'(fexp), $sformatf("field_idx bit %0d", k));
        check(active == din_valid, "active");
        check(advance == (din_valid && (k == 2 || k == 4 || k == 11)), "advance");
        check(!flush && !skel_end, "no end inside frame");
        @(negedge clk);
        if (!din_valid) k--;
      end
      if (stop_at < 0) begin
        din_valid = 1; #1;
        check(skel_end && flush && !active && !in_field, "skel_end after last field");
        @(negedge clk); #1;
        check(!busy && !skel_end, "idle after frame");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
