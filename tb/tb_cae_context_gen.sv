// tb_cae_context_gen: drives the context generator from bordered BAB
// pictures held in the testbench (lines served combinationally by line
// number, transposed for vertical scan), with random stalls and random
// two-position advances, and checks at every valid clock the contexts of X
// and X', their values and the line/position flags against the template
// definitions of cae_ref_pkg, for 16x16, 8x8 and 4x4 BABs. line_ready is
// dropped at random: valid must then stay low (except on the last line).
// Also checks the 3-clock start load, that all N*N positions are visited,
// that done follows the last line, and that stop in mid-BAB leaves the
// generator idle until the next start.
`timescale 1ns/1ps
module tb_cae_context_gen;
  import cae_pkg::*;
  import cae_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, advance, shift2;
  cae_mode_e mode;
  bab_size_e bab_size;
  logic x_second_last;
  logic [4:0] rd_line;
  logic [CUR_W-1:0] cur_line;
  logic [MC_W-1:0] mc_line;
  logic line_ready;
  logic stop = 1'b0;
  logic valid, sym_c, sym_r, x_last, last_line, done_o;
  logic [9:0] ctx_c, ctx_r;
  logic [3:0] x;
  cae_context_gen dut (.*);
  int checks = 0, failures = 0, n_wait = 0;
  cur_img_t cur;
  mc_img_t mc;
  bit vert;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always_comb begin
    cur_line = '0; mc_line = '0;
    for (int j = 0; j < 20; j++) if (rd_line < 20) cur_line[j] = vert ? cur[j][rd_line] : cur[rd_line][j];
    for (int j = 0; j < 18; j++) if (rd_line < 18) mc_line[j] = vert ? mc[j][rd_line] : mc[rd_line][j];
  end
  task automatic run(int seed, bit inter, bit v, int n);
    int ey, ex, visited, bad, lat;
    make_bab(seed, 20, cur, mc, n);
    bab_size = (n == 8) ? BAB_8 : (n == 4 ? BAB_4 : BAB_16);
    vert = v;
    mode = inter ? MODE_INTER : MODE_INTRA;
    line_ready = 1;
    start <= 1; @(posedge clk); start <= 0;
    lat = 0;
    while (!valid) begin @(negedge clk); lat++; end
    checks++; if (lat != 4) begin failures++; $display("FAIL start latency %0d", lat); end
    ey = 0; ex = 0; visited = 0; bad = 0;
    while (!done_o) begin
      @(negedge clk);
      line_ready = ($urandom % 8) != 0;
      #1;
      checks++;
      if (valid && !line_ready && ey != n - 1) begin failures++; $display("FAIL valid while line not ready"); end
      if (valid) begin
        int ec, er;
        ec = context_of(cur, mc, inter, v, ey, ex);
        er = (ex < n - 1) ? context_of(cur, mc, inter, v, ey, ex + 1) : 0;
        checks++;
        if (ctx_c != 10'(ec) || (ex < n - 1 && ctx_r != 10'(er)) || x != 4'(ex)
            || sym_c != cp(cur, v, ey + 2, ex + 2) || (ex < n - 1 && sym_r != cp(cur, v, ey + 2, ex + 3))
            || x_last != (ex == n - 1) || x_second_last != (ex == n - 2) || last_line != (ey == n - 1)) begin
          failures++;
          if (bad++ < 5) $display("FAIL y=%0d x=%0d ctx=%h exp %h", ey, ex, ctx_c, ec);
        end
        advance = ($urandom % 4) != 0;
        shift2  = (ex < n - 1) && ($urandom % 2);
        if (advance) begin
          visited += shift2 ? 2 : 1;
          ex += shift2 ? 2 : 1;
          if (ex >= n) begin ex = 0; ey++; end
        end
      end else begin
        advance = 0; shift2 = 0;
        if (!line_ready) n_wait++;
      end
    end
    checks++;
    if (visited != n * n || ey != n) begin failures++; $display("FAIL visited %0d", visited); end
  endtask
  initial begin
    start = 0; advance = 0; shift2 = 0; line_ready = 1; mode = MODE_INTRA; vert = 0; bab_size = BAB_16;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int s = 1; s <= 12; s++) run(s, s % 2, (s / 2) % 2, s <= 8 ? 16 : (s <= 10 ? 8 : 4));
    // stop in the middle of a BAB: the generator goes idle, then a new start works
    begin
      int quiet = 1;
      mode = MODE_INTRA; vert = 0; bab_size = BAB_16;
      start <= 1; @(posedge clk); start <= 0;
      repeat (30) begin @(negedge clk); advance = 1; shift2 = 0; end
      stop = 1; advance = 0;
      @(negedge clk); stop = 0;
      repeat (40) begin @(negedge clk); if (valid || done_o) quiet = 0; end
      checks++;
      if (!quiet) begin failures++; $display("FAIL generator active after stop"); end
      run(13, 0, 0, 16);
    end
    checks++;
    if (n_wait == 0) begin failures++; $display("FAIL line-not-ready stall never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
