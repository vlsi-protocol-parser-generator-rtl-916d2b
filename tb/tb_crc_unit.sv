// tb_crc_unit: sends the reference frame (FCS 1110010010011011 as printed,
// first bit first) and random frames with a byte-wise computed FCS, bit by
// bit with gaps; crc_ok must rise exactly after the last FCS bit (or where
// the byte-wise model finds the remainder earlier) and never before 32 bits;
// a corrupted frame must never show it.
`timescale 1ns/1ps
module tb_crc_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, bit_en = 0, din = 0;
  logic [15:0] crc;
  logic crc_ok;

  crc_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  function automatic logic [15:0] crc_byte(logic [15:0] c, byte unsigned v);
    c ^= 16'(v);
    repeat (8) c = c[0] ? ((c >> 1) ^ 16'h8408) : (c >> 1);
    return c;
  endfunction

  byte unsigned fr[$];

  task automatic send(input bit corrupt);
    logic [15:0] c = 16'hFFFF;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    foreach (fr[k]) begin
      c = crc_byte(c, fr[k]);
      for (int i = 0; i < 8; i++) begin
        if ($urandom_range(3) == 0) begin bit_en = 0; @(negedge clk); end
        din = fr[k][i]; bit_en = 1;
        @(negedge clk); bit_en = 0; #1;
        if (i < 7) check(!crc_ok, "only at byte boundaries");
      end
      check(crc_ok == (k >= 3 && c == 16'hF0B8), $sformatf("crc_ok after byte %0d", k));
      if (k == fr.size() - 1) check(crc_ok == !corrupt, "end of FCS detected");
    end
  endtask

  task automatic add_fcs();
    logic [15:0] c = 16'hFFFF;
    foreach (fr[k]) c = crc_byte(c, fr[k]);
    c = ~c;
    fr.push_back(c[7:0]); fr.push_back(c[15:8]);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // reference frame, bytes from the printed bit strings (first bit = bit 0)
    fr = {8'h55, 8'h10, 8'hC3, 8'h3C, 8'h27, 8'hD9};
    send(0);
    for (int r = 0; r < 40; r++) begin
      fr = {};
      repeat ($urandom_range(20)) fr.push_back(8'($urandom));
      repeat (2) fr.push_back(8'($urandom));
      add_fcs();
      if (r % 4 == 3) begin fr[fr.size()-2] ^= 8'h10; send(1); end
      else send(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
