// tb_skeleton_code_recognition: checks the HDLC skeleton function-code unit
// for all 256 command bytes, in random order, with random idle cycles and
// frame starts in between. The expected stage is worked out from the
// command byte itself: I frames (bit 1 = 0) and the U commands that carry
// an information field, listed by their control-byte values with and
// without the P/F bit (UI 03, FRMR 87, XID AF, TEST E3), select stage 0;
// every other command selects stage 1. Also checks that reload comes with
// act, in the same cycle, exactly when the stage changes, and that stage
// holds the choice until the next start. Some command bytes arrive twice
// in a frame, so that the stage is already the one asked for.
`timescale 1ns/1ps
module tb_skeleton_code_recognition;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, act = 0;
  logic [7:0] data = 0;
  logic reload;
  logic [0:0] index, stage;

  skeleton_code_recognition dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200_000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  function automatic logic exp_index(logic [7:0] c);
    logic [7:0] nopf;
    nopf = c & 8'hEF;                 // P/F bit does not matter
    if (!c[0]) return 1'b0;           // information frame
    if (nopf == 8'h03 || nopf == 8'h87 || nopf == 8'hAF || nopf == 8'hE3) return 1'b0;
    return 1'b1;
  endfunction

  int order [256];
  int n_data = 0, n_short = 0, n_reload = 0, n_same = 0;
  logic exp_stage = 0;

  initial begin
    for (int i = 0; i < 256; i++) order[i] = i;
    order.shuffle();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(stage == 1'b0, "stage after reset");
    foreach (order[i]) begin
      logic [7:0] c;
      c = 8'(order[i]);
      // a frame start clears the choice
      if ($urandom_range(1) == 1) begin
        start = 1;
        @(negedge clk);
        start = 0;
        exp_stage = 0;
        check(stage == 1'b0, "stage cleared by start");
      end
      // command byte on the bus without its pulse: no reload
      data = c; act = 0; #1;
      check(reload == 0, "no reload without act");
      @(negedge clk);
      check(stage == exp_stage, "stage held without act");
      act = 1; #1;
      check(reload == (exp_index(c) != exp_stage), "reload when the stage changes");
      if (reload) n_reload++;
      check(index == exp_index(c), $sformatf("index for command %02h", c));
      if (exp_index(c)) n_short++; else n_data++;
      @(negedge clk);
      act = 0;
      exp_stage = exp_index(c);
      check(stage == exp_stage, $sformatf("stage for command %02h", c));
      // same code again in this frame: no reload
      if ($urandom_range(3) == 0) begin
        act = 1; #1;
        check(reload == 0, "no reload for the stage in use");
        check(index == exp_stage, "index unchanged");
        n_same++;
        @(negedge clk);
        act = 0;
        check(stage == exp_stage, "stage after repeated code");
      end
      repeat ($urandom_range(2)) begin
        data = 8'($urandom);
        @(negedge clk);
        check(stage == exp_stage, "stage held");
      end
    end
    check(n_data == 128 + 8 && n_short == 256 - 136, "command classes");
    check(n_reload > 0 && n_same > 0, "reload and repeated code exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
