// tb_cae_prob_table: fills both tables with random probabilities through
// the write port and reads every INTRA and INTER entry back by context,
// checking that the INTRA and INTER tables are distinct and fully indexed.
`timescale 1ns/1ps
module tb_cae_prob_table;
  import cae_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en;
  cae_mode_e wr_mode, mode;
  logic [9:0] wr_addr, ctx;
  logic [15:0] wr_data, c0;
  cae_prob_table dut (.*);
  int checks = 0, failures = 0;
  logic [15:0] ra [1024];
  logic [15:0] re [512];
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    wr_en = 0; wr_mode = MODE_INTRA; wr_addr = 0; wr_data = 0; mode = MODE_INTRA; ctx = 0;
    for (int i = 0; i < 1024; i++) begin
      ra[i] = 16'($urandom);
      wr_en <= 1; wr_mode <= MODE_INTRA; wr_addr <= 10'(i); wr_data <= ra[i];
      @(posedge clk);
    end
    for (int i = 0; i < 512; i++) begin
      re[i] = 16'($urandom);
      wr_en <= 1; wr_mode <= MODE_INTER; wr_addr <= 10'(i); wr_data <= re[i];
      @(posedge clk);
    end
    wr_en <= 0;
    @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      mode = MODE_INTRA; ctx = 10'(i); #1;
      checks++; if (c0 != ra[i]) begin failures++; $display("FAIL intra %0d", i); end
    end
    for (int i = 0; i < 512; i++) begin
      mode = MODE_INTER; ctx = 10'(i); #1;
      checks++; if (c0 != re[i]) begin failures++; $display("FAIL inter %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
