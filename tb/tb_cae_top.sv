// tb_cae_top: end-to-end test of the two-symbol CAE encoder at its default
// (full) size.
//
// Loads the probability tables and a series of BABs (smooth blobs, where
// two-symbol pairs are common, and noisy ones, which give long bitstreams),
// runs INTRA and INTER coding processes in both scan directions with and
// without two-symbol processing, and compares with cae_ref_pkg:
//   - every code bit and the bitstream length (clipped to 298 bits), and
//     that each bitstream that fits decodes back to the BAB,
//   - the counts of pairs, split pairs and renormalisation iterations,
//   - the clock count of the coding process:
//       cycles = LAT + (N*N - pairs) + splits + renorm_iterations + 2
//     (one clock per single symbol or pair, one per renormalisation
//     iteration, one for the second symbol of a split pair, two for the
//     termination bits; LAT = 7 is the fixed start-up and drain latency:
//     start register, 3 line loads, PL register, two clocks of
//     output drain and done),
//   - that two-symbol processing never costs clocks and saves one per pair
//     that is not split,
//   - the best-bitstream bank selection across the processes of a BAB,
//   - 8x8 and 4x4 (subsampled) BABs,
//   - coding that starts while the BAB is still being written (line waits),
//   - redundant operation elimination (processes stopped once too long).
// Each mechanism (pair, split pair, renormalisation after a pair,
// renormalisation, bank switch to a shorter process, bitstream overflow,
// both modes and scans) must occur at least once.
`timescale 1ns/1ps
module tb_cae_top;
  import cae_pkg::*;
  import cae_ref_pkg::*;

  localparam int LAT = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               bab_clear, bab_wr_en, bab_wr_mc;
  logic [4:0]         bab_wr_row;
  logic [CUR_W-1:0]   bab_wr_data;
  logic               plt_wr_en;
  cae_mode_e          plt_wr_mode;
  logic [9:0]         plt_wr_addr;
  logic [15:0]        plt_wr_data;
  logic               start, new_bab, ms_en, roe_en, last_aborted;
  cae_mode_e          mode;
  cae_scan_e          scan;
  bab_size_e          bab_size;
  logic               busy, done, last_bank, last_overflow, best_bank;
  logic [BS_AW-1:0]   last_len, best_len;
  logic [15:0]        cycles, stat_pairs, stat_splits, stat_rn;
  logic               bs_rd_bank;
  logic [4:0]         bs_rd_addr;
  logic [15:0]        bs_rd_word;

  cae_top dut (.*);

  int checks = 0, failures = 0;
  int n_pairs = 0, n_splits = 0, n_pair_rn = 0, n_rn = 0, n_switch = 0, n_ovf = 0;
  int n_inter = 0, n_vert = 0, n_small = 0, n_wait = 0, n_abort = 0, n_decoded = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_tables();
    for (int i = 0; i < 1024; i++) begin
      plt_wr_en <= 1; plt_wr_mode <= MODE_INTRA; plt_wr_addr <= 10'(i);
      plt_wr_data <= 16'(table_c0(0, i));
      @(posedge clk);
    end
    for (int i = 0; i < 512; i++) begin
      plt_wr_en <= 1; plt_wr_mode <= MODE_INTER; plt_wr_addr <= 10'(i);
      plt_wr_data <= 16'(table_c0(1, i));
      @(posedge clk);
    end
    plt_wr_en <= 0;
  endtask

  // Load a BAB; gap idle clocks after each row (a slow host)
  task automatic load_bab(const ref cur_img_t cur, const ref mc_img_t mc, input int gap = 0);
    bab_clear <= 1;
    @(posedge clk);
    bab_clear <= 0;
    for (int r = 0; r < 20; r++) begin
      logic [CUR_W-1:0] row;
      for (int c = 0; c < 20; c++) row[c] = cur[r][c];
      bab_wr_en <= 1; bab_wr_mc <= 0; bab_wr_row <= 5'(r); bab_wr_data <= row;
      @(posedge clk);
      if (gap > 0) begin
        bab_wr_en <= 0;
        repeat (gap) @(posedge clk);
      end
    end
    for (int r = 0; r < 18; r++) begin
      logic [CUR_W-1:0] row;
      row = '0;
      for (int c = 0; c < 18; c++) row[c] = mc[r][c];
      bab_wr_en <= 1; bab_wr_mc <= 1; bab_wr_row <= 5'(r); bab_wr_data <= row;
      @(posedge clk);
      if (gap > 0) begin
        bab_wr_en <= 0;
        repeat (gap) @(posedge clk);
      end
    end
    bab_wr_en <= 0;
  endtask

  // Expected best selection, kept by the testbench
  int exp_best_len;
  bit exp_best_bank, exp_best_valid;

  task automatic run_cp(const ref cur_img_t cur, const ref mc_img_t mc,
                        input bit inter, input bit vert, input bit ms, input bit first,
                        input int n = 16, input bit slow = 0, input bit roe = 0);
    enc_result_t res;
    int exp_len, exp_cycles;
    bit exp_bank;
    encode(cur, mc, inter, vert, ms, res, n);
    exp_len = (res.nbits > BS_BITS) ? BS_BITS : res.nbits;
    exp_bank = (first || !exp_best_valid) ? 1'b0 : !exp_best_bank;
    exp_cycles = LAT + (n * n - res.pairs) + res.splits + res.rn + 2;

    mode <= inter ? MODE_INTER : MODE_INTRA;
    scan <= vert ? SCAN_V : SCAN_H;
    bab_size <= (n == 8) ? BAB_8 : (n == 4 ? BAB_4 : BAB_16);
    ms_en <= ms; roe_en <= roe; new_bab <= first; start <= 1;
    @(posedge clk);
    start <= 0; new_bab <= 0;
    @(posedge clk iff done);

    if (last_aborted) begin
      // redundant operation elimination: only a process that ends longer
      // than the best may be stopped, it ends early and the best stays
      check(roe && !first && exp_best_valid && exp_len > exp_best_len, "process stopped only when it cannot win");
      check(last_len > BS_AW'(exp_best_len), "stopped once longer than the best");
      check(cycles < 16'(exp_cycles), "a stopped process ends early");
      check(best_bank == exp_best_bank && best_len == BS_AW'(exp_best_len), "best kept after a stopped process");
      n_abort++;
      return;
    end
    check(!(roe && exp_best_valid && !first && exp_len > exp_best_len + 2),
          "a process well past the best length is stopped");

    check(last_len == BS_AW'(exp_len), $sformatf("length %0d expected %0d (inter=%0d vert=%0d ms=%0d)",
          last_len, exp_len, inter, vert, ms));
    check(last_overflow == (res.nbits > BS_BITS), "overflow flag");
    check(last_bank == exp_bank, "bank written");
    check(stat_pairs == 16'(res.pairs), $sformatf("pairs %0d expected %0d", stat_pairs, res.pairs));
    check(stat_splits == 16'(res.splits), $sformatf("splits %0d expected %0d", stat_splits, res.splits));
    check(stat_rn == 16'(res.rn), $sformatf("renorm iterations %0d expected %0d", stat_rn, res.rn));
    if (slow) begin
      check(cycles > 16'(exp_cycles), "a BAB written while coding runs costs wait clocks");
      if (cycles > 16'(exp_cycles)) n_wait++;
    end else
    check(cycles == 16'(exp_cycles), $sformatf("cycles %0d expected %0d (pairs %0d splits %0d rn %0d)",
          cycles, exp_cycles, res.pairs, res.splits, res.rn));
    // compare bits
    begin
      int bad = 0;
      @(negedge clk);
      for (int w = 0; w * 16 < exp_len; w++) begin
        bs_rd_bank = last_bank; bs_rd_addr = 5'(w);
        #1;
        for (int b = 0; b < 16; b++)
          if (w * 16 + b < exp_len && bs_rd_word[15 - b] != res.bits[w * 16 + b]) bad++;
      end
      check(bad == 0, $sformatf("%0d code bits differ", bad));
    end
    // decode the bitstream read from the bank back into the BAB
    if (res.nbits <= BS_BITS) begin
      enc_result_t rd;
      int derr;
      rd.nbits = int'(last_len);
      for (int w = 0; w * 16 < rd.nbits; w++) begin
        bs_rd_bank = last_bank; bs_rd_addr = 5'(w);
        #1;
        for (int b = 0; b < 16; b++) if (w * 16 + b < rd.nbits) rd.bits[w * 16 + b] = bs_rd_word[15 - b];
      end
      derr = decode_errors(cur, mc, inter, vert, rd, n);
      check(derr == 0, $sformatf("bitstream decodes with %0d wrong pixels", derr));
      n_decoded++;
    end
    // best selection
    if (first || !exp_best_valid || exp_len < exp_best_len) begin
      if (!first && exp_best_valid) n_switch++;
      exp_best_len = exp_len; exp_best_bank = exp_bank;
    end
    exp_best_valid = 1;
    check(best_bank == exp_best_bank && best_len == BS_AW'(exp_best_len), "best bitstream selection");

    n_pairs += res.pairs; n_splits += res.splits; n_pair_rn += res.pair_rn; n_rn += res.rn;
    if (res.nbits > BS_BITS) n_ovf++;
    if (inter) n_inter++;
    if (vert) n_vert++;
    if (n != 16) n_small++;
  endtask

  initial begin
    cur_img_t cur;
    mc_img_t  mc;
    int c_single, c_two;
    roe_en = 0; bab_clear = 0; bab_wr_en = 0; bab_wr_mc = 0; bab_wr_row = 0; bab_wr_data = 0;
    plt_wr_en = 0; plt_wr_mode = MODE_INTRA; plt_wr_addr = 0; plt_wr_data = 0;
    start = 0; new_bab = 0; ms_en = 0; mode = MODE_INTRA; scan = SCAN_H; bab_size = BAB_16;
    bs_rd_bank = 0; bs_rd_addr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_tables();

    for (int seed = 1; seed <= 12; seed++) begin
      int noise;
      noise = (seed % 4 == 0) ? 60 : (seed % 3 == 0 ? 4 : 0);
      make_bab(seed, noise, cur, mc);
      load_bab(cur, mc);
      // interframe BAB: four coding processes, two-symbol processing on
      run_cp(cur, mc, 0, 0, 1, 1);
      run_cp(cur, mc, 0, 1, 1, 0);
      run_cp(cur, mc, 1, 0, 1, 0);
      run_cp(cur, mc, 1, 1, 1, 0);
      // single-symbol processing against two-symbol processing
      run_cp(cur, mc, 0, 0, 0, 1);
      c_single = cycles;
      run_cp(cur, mc, 0, 0, 1, 1);
      c_two = cycles;
      check(c_two <= c_single, "two-symbol processing is never slower");
      check(c_single - c_two == stat_pairs - stat_splits, "one clock saved per unsplit pair");
    end
    // coding starts while the host is still writing the BAB: the pipeline
    // waits for each line (INTRA horizontal, then INTER vertical)
    for (int seed = 30; seed <= 31; seed++) begin
      make_bab(seed, 0, cur, mc);
      fork
        load_bab(cur, mc, 6);
        run_cp(cur, mc, seed % 2, seed % 2, 1, 1, 16, 1);
      join
    end
    // redundant operation elimination: the four coding processes of an
    // INTER BAB; the best bank must then hold the shortest reference bitstream
    for (int seed = 40; seed <= 47; seed++) begin
      enc_result_t r4 [4];
      int best_i, bad;
      make_bab(seed, (seed % 2) ? 8 : 0, cur, mc);
      load_bab(cur, mc);
      best_i = 0;
      for (int p = 0; p < 4; p++) begin
        encode(cur, mc, p / 2, p % 2, 1, r4[p]);
        if (r4[p].nbits < r4[best_i].nbits) best_i = p;
        run_cp(cur, mc, p / 2, p % 2, 1, p == 0, 16, 0, 1);
      end
      check(best_len == BS_AW'(r4[best_i].nbits > BS_BITS ? BS_BITS : r4[best_i].nbits), "shortest bitstream kept with elimination");
      bad = 0;
      @(negedge clk);
      for (int w = 0; w * 16 < int'(best_len); w++) begin
        bs_rd_bank = best_bank; bs_rd_addr = 5'(w);
        #1;
        for (int b = 0; b < 16; b++)
          if (w * 16 + b < int'(best_len) && bs_rd_word[15 - b] != r4[best_i].bits[w * 16 + b]) bad++;
      end
      check(bad == 0, "best bank bits after elimination");
    end
    // subsampled BABs (8x8 and 4x4), all four coding processes
    for (int seed = 20; seed <= 27; seed++) begin
      int n;
      n = (seed % 2) ? 4 : 8;
      make_bab(seed, (seed % 3 == 0) ? 10 : 0, cur, mc, n);
      load_bab(cur, mc);
      run_cp(cur, mc, 0, 0, 1, 1, n);
      run_cp(cur, mc, 0, 1, 1, 0, n);
      run_cp(cur, mc, 1, 0, 1, 0, n);
      run_cp(cur, mc, 1, 1, 0, 0, n);
    end

    $display("mechanisms: pairs=%0d split_pairs=%0d renorm_after_pair=%0d renorm_iters=%0d best_switch=%0d overflow=%0d inter=%0d vertical=%0d subsampled=%0d line_waits=%0d stopped=%0d decoded=%0d",
             n_pairs, n_splits, n_pair_rn, n_rn, n_switch, n_ovf, n_inter, n_vert, n_small, n_wait, n_abort, n_decoded);
    check(n_pairs > 0, "pair coded by RU2 occurred");
    check(n_splits > 0, "pair split by renormalisation occurred");
    check(n_pair_rn > 0, "renormalisation after a pair occurred");
    check(n_rn > 0, "renormalisation occurred");
    check(n_switch > 0, "best bank switched to a shorter process");
    check(n_ovf > 0, "bitstream overflow occurred");
    check(n_inter > 0 && n_vert > 0, "INTER mode and vertical scan exercised");
    check(n_small > 0, "subsampled BAB sizes exercised");
    check(n_wait > 0, "wait for BAB lines not yet written occurred");
    check(n_abort > 0, "redundant operation elimination stopped a process");
    check(n_decoded > 0, "bitstreams decoded back to the BAB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
