// tb_cae_bitstream_buffer: random run writes (first bit, then its
// complement) into both banks against a bit-array model, bank clear, and
// 16-bit word reads of every word, including the partial last word.
`timescale 1ns/1ps
module tb_cae_bitstream_buffer;
  import cae_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic clr, clr_bank, wr_en, wr_bank, wr_bit, rd_bank;
  logic [BS_AW-1:0] wr_pos;
  logic [8:0] wr_len;
  logic [4:0] rd_addr;
  logic [15:0] rd_word;
  cae_bitstream_buffer dut (.*);
  int checks = 0, failures = 0;
  bit model [2][BS_BITS];
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic readback();
    for (int b = 0; b < 2; b++)
      for (int w = 0; w < 19; w++) begin
        logic [15:0] e;
        rd_bank = 1'(b); rd_addr = 5'(w); #1;
        for (int k = 0; k < 16; k++) e[15 - k] = (w * 16 + k < BS_BITS) ? model[b][w * 16 + k] : 1'b0;
        checks++;
        if (rd_word != e) begin failures++; $display("FAIL bank %0d word %0d: %h exp %h", b, w, rd_word, e); end
      end
  endtask
  initial begin
    clr = 0; clr_bank = 0; wr_en = 0; wr_bank = 0; wr_bit = 0; wr_pos = 0; wr_len = 0; rd_bank = 0; rd_addr = 0;
    for (int b = 0; b < 2; b++) begin
      clr = 1; clr_bank = 1'(b); @(posedge clk); #1;
      for (int i = 0; i < BS_BITS; i++) model[b][i] = 0;
    end
    clr = 0;
    for (int it = 0; it < 400; it++) begin
      int p, l, bk;
      bit v;
      bk = $urandom % 2; p = $urandom % BS_BITS; l = 1 + $urandom % 20; v = 1'($urandom);
      wr_en = 1; wr_bank = 1'(bk); wr_pos = BS_AW'(p); wr_len = 9'(l); wr_bit = v;
      @(posedge clk); #1;
      wr_en = 0;
      for (int i = p; i < p + l && i < BS_BITS; i++) model[bk][i] = (i == p) ? v : !v;
      if (it % 50 == 49) readback();
      if (it == 200) begin
        clr = 1; clr_bank = 1; @(posedge clk); #1; clr = 0;
        for (int i = 0; i < BS_BITS; i++) model[1][i] = 0;
        readback();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
