// tb_cae_bitstream_gen: offers random {bit, bits_to_follow} entries through
// a FIFO stand-in and checks each run write (position, length, bit), the
// running length, and the clipping and overflow flag at 298 bits.
`timescale 1ns/1ps
module tb_cae_bitstream_gen;
  import cae_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, fifo_empty, fifo_pop, wr_en, wr_bit, overflow;
  rn_entry_t fifo_dout;
  logic [BS_AW-1:0] wr_pos, length;
  logic [8:0] wr_len;
  cae_bitstream_gen dut (.*);
  int checks = 0, failures = 0, novf = 0;
  rn_entry_t q [$];
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always_comb begin
    fifo_empty = (q.size() == 0);
    fifo_dout = fifo_empty ? '0 : q[0];
  end
  initial begin
    int exp_len;
    bit exp_ovf;
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 40; p++) begin
      start = 1; @(posedge clk); #1 start = 0;
      exp_len = 0; exp_ovf = 0;
      for (int k = 0; k < 60; k++) begin
        rn_entry_t e;
        e.bit_val = 1'($urandom);
        e.btf = 8'(($urandom % 4 == 0) ? $urandom % 40 : $urandom % 3);
        if ($urandom % 3 == 0) begin
          @(negedge clk); checks++; if (fifo_pop || wr_en) failures++;
          @(posedge clk); #1;
        end
        q.push_back(e);
        @(negedge clk);
        checks++;
        if (!(fifo_pop && wr_en && wr_pos == BS_AW'(exp_len) && wr_len == 9'(e.btf) + 1 && wr_bit == e.bit_val)) begin
          failures++; $display("FAIL write pos=%0d len=%0d", wr_pos, wr_len);
        end
        @(posedge clk); #1;
        void'(q.pop_front());
        exp_len += int'(e.btf) + 1;
        if (exp_len > BS_BITS) begin exp_len = BS_BITS; exp_ovf = 1; end
        checks++;
        if (length != BS_AW'(exp_len) || overflow != exp_ovf) begin
          failures++; $display("FAIL length %0d exp %0d", length, exp_len);
        end
      end
      if (exp_ovf) novf++;
    end
    checks++;
    if (novf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
