// tb_cae_workload: average clocks per coding process of the encoder on a
// short synthetic shape sequence, in the three configurations that matter
// for throughput: single-symbol processing, two-symbol processing, and
// two-symbol processing with redundant operation elimination.
//
// The sequence is a smooth object (an ellipse with a bump) moving across an
// 80x80 area, 5x5 BABs, over four frames. As in shape coding, only boundary
// BABs (neither all 0 nor all 1) are arithmetic-coded. Each boundary BAB is
// coded as an inter-frame BAB: the four coding processes INTRA/INTER x
// horizontal/vertical, the MC BAB taken from the previous frame at the same
// place (zero motion vector). Borders come from the neighbouring pixels of
// the frame, zero outside it.
//
// Checked: every code bit and length of every process that runs to the end
// against cae_ref_pkg, and that the bitstream decodes back to the BAB; the
// clock-count law; that the same shortest bitstream
// is kept in all three configurations; that two-symbol processing costs no
// more clocks than single-symbol and elimination no more than without it.
// The averages are printed for comparison with the cycle counts quoted for
// the architecture; the numbers differ because the probability tables here
// are test tables and the shapes are synthetic.
`timescale 1ns/1ps
module tb_cae_workload;
  import cae_pkg::*;
  import cae_ref_pkg::*;

  localparam int LAT    = 7;
  localparam int FRAMES = 4;
  localparam int NB     = 5;           // BABs per side
  localparam int W      = NB * 16;

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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Object of frame f: ellipse plus a bump, moving 3 right and 2 down per frame
  function automatic bit obj(int f, int r, int c);
    int cr, cc, dr, dc, br, bc;
    if (r < 0 || c < 0 || r >= W || c >= W) return 1'b0;
    cr = 36 + 2 * f; cc = 34 + 3 * f;
    dr = r - cr; dc = c - cc;
    br = r - (cr - 18); bc = c - (cc + 10);
    return (dr * dr * 4 + dc * dc * 9 <= 26 * 26 * 4) || (br * br + bc * bc <= 64);
  endfunction

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

  task automatic load_bab(const ref cur_img_t cur, const ref mc_img_t mc);
    bab_clear <= 1;
    @(posedge clk);
    bab_clear <= 0;
    for (int r = 0; r < 20; r++) begin
      logic [CUR_W-1:0] row;
      for (int c = 0; c < 20; c++) row[c] = cur[r][c];
      bab_wr_en <= 1; bab_wr_mc <= 0; bab_wr_row <= 5'(r); bab_wr_data <= row;
      @(posedge clk);
    end
    for (int r = 0; r < 18; r++) begin
      logic [CUR_W-1:0] row;
      row = '0;
      for (int c = 0; c < 18; c++) row[c] = mc[r][c];
      bab_wr_en <= 1; bab_wr_mc <= 1; bab_wr_row <= 5'(r); bab_wr_data <= row;
      @(posedge clk);
    end
    bab_wr_en <= 0;
  endtask

  // Compare a bank with a reference bitstream; returns the number of wrong bits
  task automatic bank_diff(input bit bank, input int len, input enc_result_t res, output int bad);
    bad = 0;
    @(negedge clk);
    for (int w = 0; w * 16 < len; w++) begin
      bs_rd_bank = bank; bs_rd_addr = 5'(w);
      #1;
      for (int b = 0; b < 16; b++)
        if (w * 16 + b < len && bs_rd_word[15 - b] != res.bits[w * 16 + b]) bad++;
    end
  endtask

  longint sum_cyc [3];
  int n_proc = 0, n_bab = 0, n_abort = 0, n_pairs = 0;

  initial begin
    cur_img_t cur;
    mc_img_t  mc;
    bab_clear = 0; bab_wr_en = 0; bab_wr_mc = 0; bab_wr_row = 0; bab_wr_data = 0;
    plt_wr_en = 0; plt_wr_mode = MODE_INTRA; plt_wr_addr = 0; plt_wr_data = 0;
    start = 0; new_bab = 0; ms_en = 0; roe_en = 0; mode = MODE_INTRA; scan = SCAN_H;
    bab_size = BAB_16; bs_rd_bank = 0; bs_rd_addr = 0;
    foreach (sum_cyc[i]) sum_cyc[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_tables();

    for (int f = 1; f <= FRAMES; f++)
      for (int bi = 0; bi < NB; bi++)
        for (int bj = 0; bj < NB; bj++) begin
          int ones;
          enc_result_t res [4];
          int best_len_cfg [3];
          ones = 0;
          for (int r = 0; r < 16; r++)
            for (int c = 0; c < 16; c++) ones += obj(f, bi * 16 + r, bj * 16 + c);
          if (ones == 0 || ones == 256) continue;   // not a boundary BAB
          for (int r = 0; r < 20; r++)
            for (int c = 0; c < 20; c++) cur[r][c] = obj(f, bi * 16 + r - 2, bj * 16 + c - 2);
          for (int r = 0; r < 18; r++)
            for (int c = 0; c < 18; c++) mc[r][c] = obj(f - 1, bi * 16 + r - 1, bj * 16 + c - 1);
          load_bab(cur, mc);
          n_bab++;
          for (int cfg = 0; cfg < 3; cfg++) begin
            for (int p = 0; p < 4; p++) begin
              int exp_len;
              encode(cur, mc, p / 2, p % 2, cfg != 0, res[p]);
              exp_len = (res[p].nbits > BS_BITS) ? BS_BITS : res[p].nbits;
              mode <= (p / 2) ? MODE_INTER : MODE_INTRA;
              scan <= (p % 2) ? SCAN_V : SCAN_H;
              ms_en <= (cfg != 0); roe_en <= (cfg == 2); new_bab <= (p == 0); start <= 1;
              @(posedge clk);
              start <= 0; new_bab <= 0;
              @(posedge clk iff done);
              sum_cyc[cfg] += cycles;
              if (cfg == 0) n_proc++;
              if (cfg == 1) n_pairs += res[p].pairs;
              if (last_aborted) begin
                check(cfg == 2 && p != 0, "only elimination stops a process");
                check(cycles < 16'(LAT + 256 - res[p].pairs + res[p].splits + res[p].rn + 2),
                      "a stopped process ends early");
                n_abort++;
              end else begin
                int bad;
                check(last_len == BS_AW'(exp_len), $sformatf("length %0d expected %0d", last_len, exp_len));
                check(cycles == 16'(LAT + 256 - res[p].pairs + res[p].splits + res[p].rn + 2), "clock-count law");
                bank_diff(last_bank, exp_len, res[p], bad);
                check(bad == 0, $sformatf("%0d code bits differ", bad));
                if (res[p].nbits <= BS_BITS)
                  check(decode_errors(cur, mc, p / 2, p % 2, res[p]) == 0, "bitstream decodes back to the BAB");
              end
            end
            best_len_cfg[cfg] = best_len;
          end
          check(best_len_cfg[0] == best_len_cfg[1] && best_len_cfg[1] == best_len_cfg[2],
                "the same shortest bitstream in all configurations");
          begin
            int bi_min, bad;
            bi_min = 0;
            for (int p = 1; p < 4; p++) if (res[p].nbits < res[bi_min].nbits) bi_min = p;
            bank_diff(best_bank, int'(best_len), res[bi_min], bad);
            check(bad == 0, "best bank holds the shortest bitstream after elimination");
          end
        end

    check(n_bab > 0 && n_pairs > 0, "boundary BABs with pairs coded");
    check(sum_cyc[1] <= sum_cyc[0], "two-symbol processing takes no more clocks than single-symbol");
    check(sum_cyc[2] <= sum_cyc[1], "elimination takes no more clocks");
    check(n_abort > 0, "elimination stopped at least one process");
    $display("workload: %0d boundary BABs, %0d coding processes per configuration", n_bab, n_proc);
    $display("workload: average clocks per coding process x100: single=%0d two-symbol=%0d two-symbol+elimination=%0d (stopped %0d)",
             sum_cyc[0] * 100 / n_proc, sum_cyc[1] * 100 / n_proc, sum_cyc[2] * 100 / n_proc, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
