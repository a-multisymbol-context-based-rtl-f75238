// tb_cae_bab_buffer: writes random bordered current (20x20) and MC (18x18)
// BABs and reads every line in horizontal scan (rows) and vertical scan
// (columns), comparing with the written picture; lines past the MC BAB
// must read as zero. Also checks the written-row flags behind line_ready:
// cleared by clear, set row by row, per row in horizontal scan and for the
// whole BAB (side+4 / side+2 rows) in vertical scan, MC rows only for INTER.
`timescale 1ns/1ps
module tb_cae_bab_buffer;
  import cae_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, need_mc, line_ready;
  logic [4:0] side;
  logic wr_en, wr_mc;
  logic [4:0] wr_row, rd_line;
  logic [CUR_W-1:0] wr_data, cur_line;
  logic [MC_W-1:0] mc_line;
  cae_scan_e scan;
  cae_bab_buffer dut (.*);
  int checks = 0, failures = 0;
  bit cur [20][20];
  bit mc [18][18];
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  bit cw [20];
  bit mw [18];
  task automatic check_ready();
    for (int sd = 0; sd < 3; sd++)
      for (int nm = 0; nm < 2; nm++)
        for (int s = 0; s < 2; s++)
          for (int k = 0; k < 20; k++) begin
            bit e;
            side = (sd == 0) ? 16 : (sd == 1 ? 8 : 4);
            need_mc = nm; scan = s ? SCAN_V : SCAN_H; rd_line = 5'(k); #1;
            if (!s) e = cw[k] && (!nm || k >= 18 || mw[k]);
            else begin
              e = 1;
              for (int j = 0; j < side + 4; j++) if (!cw[j]) e = 0;
              if (nm) for (int j = 0; j < side + 2; j++) if (!mw[j]) e = 0;
            end
            checks++;
            if (line_ready != e) begin failures++; $display("FAIL ready side=%0d mc=%0d scan=%0d line=%0d", side, nm, s, k); end
          end
  endtask
  initial begin
    wr_en = 0; wr_mc = 0; wr_row = 0; wr_data = 0; rd_line = 0; scan = SCAN_H;
    clear = 0; need_mc = 0; side = 16;
    @(posedge clk); #1 rst_n = 1;
    // written flags, rows arriving in random order
    for (int round = 0; round < 4; round++) begin
      clear = 1; @(posedge clk); #1 clear = 0;
      foreach (cw[i]) cw[i] = 0;
      foreach (mw[i]) mw[i] = 0;
      check_ready();
      for (int k = 0; k < 45; k++) begin
        int r; bit m;
        m = $urandom % 2; r = $urandom % (m ? 18 : 20);
        wr_en = 1; wr_mc = m; wr_row = 5'(r); wr_data = 20'($urandom);
        @(posedge clk); #1 wr_en = 0;
        if (m) mw[r] = 1; else cw[r] = 1;
        if (k % 5 == 4) check_ready();
      end
    end
    for (int pass = 0; pass < 3; pass++) begin
      for (int r = 0; r < 20; r++) begin
        for (int c = 0; c < 20; c++) begin cur[r][c] = 1'($urandom); wr_data[c] = cur[r][c]; end
        wr_en <= 1; wr_mc <= 0; wr_row <= 5'(r);
        @(posedge clk);
        #1;
      end
      for (int r = 0; r < 18; r++) begin
        wr_data = '0;
        for (int c = 0; c < 18; c++) begin mc[r][c] = 1'($urandom); wr_data[c] = mc[r][c]; end
        wr_en <= 1; wr_mc <= 1; wr_row <= 5'(r);
        @(posedge clk);
        #1;
      end
      wr_en <= 0;
      @(posedge clk);
      for (int s = 0; s < 2; s++) begin
        scan = s ? SCAN_V : SCAN_H;
        for (int k = 0; k < 20; k++) begin
          int bad;
          rd_line = 5'(k); #1;
          bad = 0;
          for (int j = 0; j < 20; j++) if (cur_line[j] != (s ? cur[j][k] : cur[k][j])) bad++;
          for (int j = 0; j < 18; j++)
            if (mc_line[j] != (k < 18 ? (s ? mc[j][k] : mc[k][j]) : 1'b0)) bad++;
          checks++;
          if (bad != 0) begin failures++; $display("FAIL scan=%0d line=%0d", s, k); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
