// tb_reception_machine: end-to-end test of the HDLC reception machine at its
// default parameters (256-byte information field, 16-word FIFO).
//
// Sends a stream of HDLC frames, one bit per cycle with random gaps: first
// the reference frame (address 10101010, command 00001000, two data bytes,
// FCS 1110010010011011 as transmitted), then random frames - to this
// station, to all stations, to another station, with and without an
// information field (the command selects skeleton stage 1 for S frames and
// for U frames without information), back to back on a shared flag, two
// with a corrupted FCS that run to the end of their skeleton (length error;
// a data frame at 2080 bits, an S frame at 32 bits), and one sent while the
// shared memory refuses all writes (FIFO overflow).
// The FCS and every expected result (frame status, decoded command, the
// bytes written to memory and their addresses, the frame-done latency) are
// computed here from the frame contents, as is the use of the last-segment
// pulse of the data field (only when a frame fills the data skeleton, never
// on a frame ended earlier by CRC detection). Counts how often each mechanism
// occurred and fails for any that never did.
`timescale 1ns/1ps
module tb_reception_machine;
  import parser_pkg::*;

  localparam int W = 8, MEM_AW = 16, MAXI = 256;

  logic clk = 0, rst_n = 0, line_in = 1, line_valid = 0;
  logic [0:0] stage;
  logic [W-1:0] station_addr = 8'h55;
  logic [MEM_AW-1:0] dma_base = 16'h0100;
  logic dma_base_load = 0;
  logic mem_req, mem_gnt;
  logic [MEM_AW-1:0] mem_addr;
  logic [W-1:0] mem_wdata, pr_data;
  logic [2:0] sr_act, sr_data;
  logic [2:0][PA_LINES-1:0] pr_act;
  logic pr_valid, cmd_valid, addr_match, frame_done;
  hdlc_cmd_t cmd;
  frame_status_t frame_status;

  reception_machine dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    #20_000_000;
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

  // ---------------- mechanisms seen
  int m_crc_end = 0, m_len_err = 0, m_match = 0, m_nomatch = 0, m_bcast = 0;
  int m_i = 0, m_s = 0, m_u = 0, m_idx1 = 0, m_ovf = 0, m_stall = 0, m_shared = 0;
  int m_len_short = 0, m_u_info = 0;
  int m_gap = 0, m_first = 0, m_next = 0, m_last = 0;

  always @(negedge clk) begin   // mid-cycle sample
    if (mem_req && !mem_gnt) m_stall++;
    for (int f = 0; f < 3; f++) begin
      if (pr_act[f][PA_FIRST]) m_first++;
      if (pr_act[f][PA_NEXT])  m_next++;
      if (pr_act[f][PA_LAST])  m_last++;
    end
  end

  // ---------------- shared memory model
  bit gnt_mode = 1;       // 1: random grants, 0: no grant
  logic [MEM_AW-1:0] exp_addr = 16'h0100;
  byte unsigned mem_q[$];
  // grant drawn at the falling edge; a write seen then is committed at the
  // next rising edge
  always @(negedge clk) begin
    mem_gnt = gnt_mode && ($urandom_range(1) == 1);
    #1;
    if (rst_n && mem_req && mem_gnt) begin
    checks++;
    if (mem_addr != exp_addr) begin
      failures++;
      $display("FAIL memory address %h expected %h", mem_addr, exp_addr);
    end
    exp_addr++;
    mem_q.push_back(mem_wdata);
    end
  end

  // ---------------- frame done monitor
  int done_cnt = 0;
  frame_status_t st_q;
  hdlc_cmd_t cmd_q;
  logic [0:0] stage_q;
  always @(negedge clk) if (frame_done) begin   // mid-cycle sample
    done_cnt++; st_q = frame_status; cmd_q = cmd; stage_q = stage;
  end

  // ---------------- line driver
  task automatic send_bit(input logic b);
    @(negedge clk);
    while ($urandom_range(7) == 0) begin
      line_valid = 0; m_gap++;
      @(negedge clk);
    end
    line_in = b; line_valid = 1;
    @(posedge clk);
    @(negedge clk);
    line_valid = 0;
  endtask
  task automatic send_byte(input byte unsigned v);
    for (int i = 0; i < 8; i++) send_bit(v[i]);   // least significant bit first
  endtask

  // ---------------- reference CRC (LSB-first CRC-CCITT, FCS = ones' complement)
  function automatic logic [15:0] crc_step(logic [15:0] c, logic b);
    logic fb;
    fb = c[0] ^ b;
    c = {1'b0, c[15:1]};
    if (fb) c = c ^ 16'h8408;
    return c;
  endfunction

  // frame contents after the opening flag, as bytes
  byte unsigned fr[$];

  function automatic void add_fcs();
    logic [15:0] c = 16'hFFFF;
    foreach (fr[k]) for (int i = 0; i < 8; i++) c = crc_step(c, fr[k][i]);
    c = ~c;
    fr.push_back(c[7:0]);
    fr.push_back(c[15:8]);
  endfunction

  // first byte boundary (in bytes, >= 4) where the receiver's CRC shows
  // the good remainder; 0 if none
  function automatic int crc_end_bytes();
    logic [15:0] c = 16'hFFFF;
    foreach (fr[k]) begin
      for (int i = 0; i < 8; i++) c = crc_step(c, fr[k][i]);
      if (k + 1 >= 4 && c == 16'hF0B8) return k + 1;
    end
    return 0;
  endfunction

  byte unsigned exp_mem[$];
  function automatic bit short_frame(int r);
    return r % 5 == 4;
  endfunction

  // skeleton stage a command selects: 1 for S frames and for U commands
  // other than UI (03), FRMR (87), XID (AF) and TEST (E3), P/F bit ignored
  function automatic int stage_of(byte unsigned c);
    byte unsigned u;
    u = c & 8'hEF;
    if (!c[0]) return 0;
    if (u == 8'h03 || u == 8'h87 || u == 8'hAF || u == 8'hE3) return 0;
    return 1;
  endfunction

  task automatic expect_frame(input int idx, input bit open_flag, input bit corrupt,
                              input bit overflow_test);
    int nb, ninfo, endb, d0;
    logic am;
    byte unsigned a, c;
    hdlc_cmd_t ec;
    int last0;
    a = fr[0]; c = fr[1];
    last0 = m_last;
    check(stage_of(c) == idx, "test frame uses the intended stage");
    am = (a == station_addr) || (a == 8'hFF);
    if (open_flag) send_byte(8'h7E); else m_shared++;
    foreach (fr[k]) send_byte(fr[k]);
    if (corrupt && idx == 1) nb = 4;
    else if (corrupt) begin
      // fill the rest of the largest data field with ones
      for (int k = fr.size(); k < 2 + MAXI + 2; k++) send_byte(8'hFF);
      nb = 2 + MAXI + 2;
    end else nb = fr.size();
    d0 = done_cnt;
    // closing flag, and meanwhile the latency: frame_done is high after the
    // second clock edge following the edge that took the last frame bit
    fork
      send_byte(8'h7E);
      begin
        int e = 0;
        do begin @(posedge clk); #1; e++; end while (!frame_done && e < 20);
        check(e == 2, $sformatf("frame_done latency %0d", e));
      end
    join
    check(done_cnt == d0 + 1, "one frame_done per frame");
    // the data field's last-segment pulse only comes when the frame fills
    // the data skeleton; a frame ended earlier by CRC detection never uses it
    check(m_last - last0 == ((idx == 0 && nb == 2 + MAXI + 2) ? 1 : 0), "PA_LAST use");
    ninfo = nb - 4;
    if (idx == 1) ninfo = 0;
    check(st_q.crc_ok == !corrupt, "status crc_ok");
    check(st_q.len_error == corrupt, "status len_error");
    check(st_q.addr_match == am, "status addr_match");
    check(st_q.info_bytes == 16'((corrupt && idx == 0) ? MAXI : ninfo), "status info_bytes");
    check(stage_q == 1'(idx), "skeleton stage selected by the command");
    check(st_q.overflow == overflow_test, "status overflow");
    if (corrupt) m_len_err++; else m_crc_end++;
    if (am) m_match++; else m_nomatch++;
    if (a == 8'hFF) m_bcast++;
    if (st_q.overflow) m_ovf++;
    if (idx == 1) m_idx1++;
    if (idx == 1 && corrupt) m_len_short++;
    if (idx == 0 && c[1:0] == 2'b11) m_u_info++;
    // command decode
    ec = '0; ec.pf = c[4];
    if (!c[0]) begin ec.fmt = FMT_I; ec.ns = c[3:1]; ec.nr = c[7:5]; m_i++; end
    else if (!c[1]) begin ec.fmt = FMT_S; ec.s_code = c[3:2]; ec.nr = c[7:5]; m_s++; end
    else begin ec.fmt = FMT_U; ec.m_code = {c[7:5], c[3:2]}; m_u++; end
    check(cmd_q == ec, "decoded command");
    if (am && !corrupt)
      for (int k = 0; k < ninfo; k++)
        if (!overflow_test || k < 17) exp_mem.push_back(fr[2 + k]);
  endtask

  task automatic make_frame(input byte unsigned a, input byte unsigned c, input int ninfo);
    do begin
      fr = {};
      fr.push_back(a); fr.push_back(c);
      for (int k = 0; k < ninfo; k++) fr.push_back(8'($urandom));
      add_fcs();
    end while (crc_end_bytes() != fr.size());
  endtask

  // inter-frame time fill: repeated flags (after zero elimination a run of
  // ones cannot be told from data)
  task automatic idle(input int n);
    repeat ((n + 7) / 8) send_byte(8'h7E);
  endtask

  initial begin
    logic [15:0] c;
    int n;
    repeat (4) @(negedge clk);
    rst_n = 1;
    dma_base_load = 1;
    @(negedge clk);
    dma_base_load = 0;
    repeat (20) send_bit(1'b1);   // line idle before the first flag
    idle(20);

    // reference frame: bytes from the printed bit strings (first bit = LSB)
    fr = {8'h55, 8'h10, 8'hC3, 8'h3C};
    add_fcs();
    // printed FCS 1110010010011011, first bit sent first
    check({fr[5], fr[4]} == 16'b1101_1001_0010_0111, "reference FCS");
    expect_frame(0, 1, 0, 0);

    for (int r = 0; r < 24; r++) begin
      byte unsigned a, cm;
      case (r % 4)
        0: a = station_addr;
        1: a = 8'hFF;
        2: a = station_addr;
        default: begin
          // another station; 0x7E would read as a flag on a line without stuffing
          do a = 8'($urandom_range(254)); while (a == station_addr || a == 8'h7E);
        end
      endcase
      cm = 8'($urandom);
      if (short_frame(r)) begin
        // S or U frame without information field
        while (stage_of(cm) != 1) cm = 8'($urandom);
        make_frame(a, cm, 0);
        expect_frame(1, (r % 3) != 0, 0, 0);
      end else begin
        // mostly I frames, sometimes a U frame that carries information
        if (r % 7 == 3) begin
          case ($urandom_range(3))
            0: cm = 8'h03; 1: cm = 8'h87; 2: cm = 8'hAF; default: cm = 8'hE3;
          endcase
          cm[4] = 1'($urandom_range(1));
        end else cm[0] = 0;
        n = (r == 6) ? MAXI : $urandom_range(40);
        make_frame(a, cm, n);
        expect_frame(0, (r % 3) != 0, 0, 0);
      end
    end

    // corrupted FCS: runs to the end of the skeleton
    idle(10);
    do begin
      fr = {8'h23, 8'h00};
      for (int k = 0; k < 30; k++) fr.push_back(8'($urandom));
      add_fcs();
      fr[fr.size()-1] ^= 8'h01;
      for (int k = fr.size(); k < 2 + MAXI + 2; k++) fr.push_back(8'hFF);
    end while (crc_end_bytes() != 0);
    fr = fr[0:33];
    expect_frame(0, 1, 1, 0);

    // corrupted FCS of a supervisory frame: ends with its short skeleton
    idle(10);
    fr = {station_addr, 8'h29};       // RR, P/F = 0, N(R) = 1
    add_fcs();
    fr[3] ^= 8'h40;
    expect_frame(1, 1, 1, 0);

    // memory refuses writes: FIFO overflows
    idle(60);
    gnt_mode = 0;
    make_frame(station_addr, 8'h00, 40);
    expect_frame(0, 1, 0, 1);
    idle(10);
    gnt_mode = 1;
    idle(60);
    make_frame(station_addr, 8'h22, 5);
    expect_frame(0, 1, 0, 0);
    idle(80);

    // memory contents
    check(mem_q.size() == exp_mem.size(), $sformatf("bytes written %0d expected %0d", mem_q.size(), exp_mem.size()));
    for (int k = 0; k < exp_mem.size() && k < mem_q.size(); k++)
      check(mem_q[k] == exp_mem[k], $sformatf("memory byte %0d", k));

    check(m_crc_end > 0, "CRC end detection");
    check(m_len_err > 0, "length error");
    check(m_match > 0 && m_nomatch > 0 && m_bcast > 0, "address match, mismatch, broadcast");
    check(m_i > 0 && m_s + m_u > 0, "command formats");
    check(m_idx1 > 0, "skeleton stage 1 selected by the command");
    check(m_len_short > 0, "length error in the short skeleton");
    check(m_u_info > 0, "U frame with information");
    check(m_ovf > 0, "FIFO overflow");
    check(m_stall > 0, "DMA stall");
    check(m_shared > 0, "shared flag");
    check(m_gap > 0, "line gaps");
    check(m_first > 0 && m_next > 0 && m_last > 0, "parallel activation lines");
    $display("mechanisms: crc_end=%0d len_err=%0d match=%0d nomatch=%0d bcast=%0d I=%0d S=%0d U=%0d idx1=%0d len_short=%0d u_info=%0d ovf=%0d stall=%0d shared=%0d gaps=%0d first=%0d next=%0d last=%0d",
             m_crc_end, m_len_err, m_match, m_nomatch, m_bcast, m_i, m_s, m_u, m_idx1, m_len_short, m_u_info, m_ovf, m_stall, m_shared, m_gap, m_first, m_next, m_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
