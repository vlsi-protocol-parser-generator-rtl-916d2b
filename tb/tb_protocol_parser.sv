// tb_protocol_parser: self-checking testbench of the protocol parser.
//
// Uses a six-field skeleton laid out like the field-type example (W = 8):
// F1 [0,5) ty1, F2 [5,8) ty2, F3 [8,10) ty1, F4 [10,14) ty3, F5 [14,20) ty4,
// F6 [20,45) ty5 ending inside a segment, and a second stage
// {8, 16, 40} (ty1, ty1, ty5) that is also cut short by stop. Some frames
// start in the first stage and re-select the second in mid-frame (reload),
// once during a field and once in the cycle a field ends; the reference then
// follows the mixed skeleton {5, 16, 40}. Random bits
// with random gaps in din_valid. A reference model worked out from the
// skeleton terms alone predicts, cycle by cycle, the serial activations and
// derivations, the parallel activation line of every field at every
// W-division instant (one cycle after the closing bit), the masked field
// words and the data bus.
`timescale 1ns/1ps
module tb_protocol_parser;
  import parser_pkg::*;

  localparam int W = 8, NF = 6, NSKEL = 2, CNT_W = 16;
  localparam logic [CNT_W-1:0] TERMS [NSKEL*NF] =
    '{16'd5, 16'd8, 16'd10, 16'd14, 16'd20, 16'd45,
      16'd8, 16'd16, 16'd40, 16'd0, 16'd0, 16'd0};

  logic clk = 0, rst_n = 0, start = 0, din = 0, din_valid = 0, stop = 0, reload = 0;
  logic [0:0] index = 0;
  logic [NF-1:0] sr_act, sr_data;
  logic [NF-1:0][PA_LINES-1:0] pr_act;
  logic [NF-1:0][W-1:0] pf_data;
  logic [W-1:0] data_bus;
  logic data_valid, busy, skel_end, frame_bit;
  logic [$clog2(NF+1)-1:0] field_idx;
  logic [CNT_W-1:0] bit_count;

  int checks = 0, failures = 0;
  int n_first = 0, n_next = 0, n_last = 0, n_flush = 0, n_stop = 0;

  protocol_parser #(.W(W), .NF(NF), .NSKEL(NSKEL), .CNT_W(CNT_W), .TERMS(TERMS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // bterm[s][0] = 0, bterm[s][i] = b_i; entry NSKEL is the mixed skeleton
  // of a frame re-selected from stage 0 to stage 1 in its second field
  int bterm [NSKEL+1][NF+1];
  int nfields [NSKEL+1];
  int n_reload = 0;

  function automatic int field_of(int s, int k);
    for (int i = 1; i <= nfields[s]; i++) if (k < bterm[s][i]) return i - 1;
    return -1;
  endfunction

  // expected line of field f when segment seg closes, -1 if no pulse
  function automatic int line_of(int s, int f, int seg);
    int lo, hi, j, ktot;
    lo = bterm[s][f]; hi = bterm[s][f+1] - 1;
    if (seg < lo / W || seg > hi / W) return -1;
    j = seg - lo / W;
    ktot = hi / W - lo / W + 1;
    if (j == 0) return PA_FIRST;
    if (seg == hi / W && ktot >= 3) return PA_LAST;
    return PA_NEXT;
  endfunction

  logic fbits [2048];

  // compare registered outputs after a segment closed (or not)
  task automatic check_par(input int s, input bit closed, input int seg, input int nbits_seen);
    logic [W-1:0] word, mask;
    for (int b = 0; b < W; b++) word[b] = (seg*W + b < nbits_seen) ? fbits[seg*W + b] : 1'b0;
    check(data_valid == closed, "data_valid");
    if (closed) check(data_bus == word, "data_bus");
    for (int f = 0; f < NF; f++) begin
      logic [PA_LINES-1:0] exp;
      int l;
      exp = '0;
      l = (closed && f < nfields[s]) ? line_of(s, f, seg) : -1;
      if (l >= 0) exp[l] = 1'b1;
      check(pr_act[f] == exp, $sformatf("pr_act field %0d seg %0d", f, seg));
      if (l == PA_FIRST) n_first++;
      if (l == PA_NEXT)  n_next++;
      if (l == PA_LAST)  n_last++;
      if (l >= 0) begin
        for (int b = 0; b < W; b++)
          mask[b] = (seg*W + b >= bterm[s][f]) && (seg*W + b < bterm[s][f+1]);
        check(pf_data[f] == (word & mask), $sformatf("pf_data field %0d seg %0d", f, seg));
      end
    end
  endtask

  // send a frame of stage s; stop_after > 0 ends it with stop after that many bits
  // rl_at >= 0: reload to stage 1 with that bit; the reference is then the
  // mixed skeleton
  task automatic run_frame(input int s, input int stop_after, input int rl_at = -1);
    int nb, k;
    @(negedge clk);
    index = 1'(s); start = 1;
    @(negedge clk);
    start = 0;
    if (rl_at >= 0) s = NSKEL;
    nb = (stop_after > 0) ? stop_after : bterm[s][nfields[s]];
    k = 0;
    while (k < nb) begin
      // random idle cycles
      while ($urandom_range(3) == 0) begin
        din_valid = 0; #1;
        check(frame_bit == 0, "no bit taken in gap");
        @(posedge clk); #1;
        check_par(s, 0, 0, 0);
        @(negedge clk);
      end
      din = 1'($urandom_range(1)); din_valid = 1; fbits[k] = din;
      if (k == rl_at) begin reload = 1; index = 1'b1; n_reload++; end
      #1;
      check(frame_bit == 1, "bit taken");
      for (int f = 0; f < NF; f++) begin
        check(sr_act[f] == (f == field_of(s, k)), $sformatf("sr_act %0d bit %0d", f, k));
        check(sr_data[f] == (sr_act[f] & din), "sr_data");
      end
      check(bit_count == CNT_W'(k), "bit_count");
      @(posedge clk); #1;
      reload = 0;
      check_par(s, (k % W) == W - 1, k / W, k + 1);
      k++;
      @(negedge clk);
    end
    din_valid = 0;
    if (stop_after > 0) begin
      stop = 1; #1;
      check(sr_act == '0, "no activation under stop");
      check(skel_end == 0, "no skel_end under stop");
      @(posedge clk); #1;
      stop = 0;
      check_par(s, (nb % W) != 0, nb / W, nb);
      n_stop++;
    end else begin
      #1;
      check(skel_end == 1, "skel_end after last term");
      check(sr_act == '0, "no activation after frame");
      @(posedge clk); #1;
      check_par(s, (nb % W) != 0, nb / W, nb);
      if ((nb % W) != 0) n_flush++;
    end
    check(busy == 0, "idle after frame");
    @(posedge clk);
    #1 check(pr_act == '0, "pulses one cycle");
    @(negedge clk);
  endtask

  initial begin
    for (int s = 0; s < NSKEL; s++) begin
      bterm[s][0] = 0; nfields[s] = 0;
      for (int i = 0; i < NF; i++) begin
        bterm[s][i+1] = int'(TERMS[s*NF + i]);
        if (TERMS[s*NF + i] != 0 && nfields[s] == i) nfields[s] = i + 1;
      end
    end
    bterm[NSKEL] = '{0, 5, 16, 40, 0, 0, 0};
    nfields[NSKEL] = 3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 6; r++) begin
      run_frame(0, 0);
      run_frame(1, 0);
      run_frame(1, 32);
      run_frame(0, 0);
      run_frame(0, 0, 6);    // during field 1
      run_frame(0, 0, 4);    // with the last bit of field 0
      run_frame(0, 30, 6);   // and stopped
    end
    check(n_first > 0 && n_next > 0 && n_last > 0, "all pulse lines used");
    check(n_flush > 0 && n_stop > 0, "flush and stop exercised");
    check(n_reload > 0, "stage re-selected in mid-frame");
    $display("pulses first=%0d next=%0d last=%0d flush=%0d stop=%0d", n_first, n_next, n_last, n_flush, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
