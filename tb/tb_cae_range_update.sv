// tb_cae_range_update: feeds the range update stage the symbol stream of
// whole BABs (c0 from the test tables, pairs chosen by the two-symbol rule)
// through a valid/ready source that sometimes idles, with a renormalisation
// buffer stand-in that sometimes reports full. The entries pushed are
// expanded into code bits and compared bit for bit with cae_ref_pkg, as are
// the pair, split and renormalisation counts. Also checks that in_ready is
// low while renormalisation runs, and that done comes after the flush.
// A second phase sends random streams dense in pairs (single symbols with
// random probabilities between them), so that pairs whose first symbol
// needs renormalisation, and must be split, occur many times. Finally stop
// is pulsed in mid-stream: the unit must fall silent until the next start,
// and a full BAB coded after it must still be bit-exact.
`timescale 1ns/1ps
module tb_cae_range_update;
  import cae_pkg::*;
  import cae_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, in_valid, in_sym, in_sym_r, in_pair, in_clps_sel, in_last, in_ready;
  logic [15:0] in_c0;
  cae_mode_e mode;
  logic fifo_full, fifo_push, done;
  rn_entry_t fifo_data;
  logic [15:0] cnt_pairs, cnt_splits, cnt_rn;
  logic stop = 1'b0;
  cae_range_update dut (.*);
  int checks = 0, failures = 0, n_full_waits = 0;
  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  typedef struct { bit s; bit s2; int unsigned c0; bit pair; bit sel; bit last; } item_t;
  bit got [$];
  always @(posedge clk) if (fifo_push) begin
    got.push_back(fifo_data.bit_val);
    for (int i = 0; i < int'(fifo_data.btf); i++) got.push_back(!fifo_data.bit_val);
  end
  always @(posedge clk) if (dut.rn_act && (dut.rn_out0 || dut.rn_out1) && fifo_full) n_full_waits++;
  always @(negedge clk) begin
    fifo_full = ($urandom % 5) == 0;
    if (rst_n && dut.rn_act) begin
      checks++;
      if (in_ready) begin failures++; $display("FAIL ready during renormalisation"); end
    end
  end
  task automatic run(int seed, bit inter, bit vert, bit ms);
    cur_img_t cur; mc_img_t mc;
    enc_result_t res;
    item_t items [$];
    int x, nb, bad;
    make_bab(seed, (seed % 3 == 0) ? 30 : 0, cur, mc);
    encode(cur, mc, inter, vert, ms, res);
    nb = inter ? 9 : 10;
    for (int y = 0; y < 16; y++) begin
      x = 0;
      while (x < 16) begin
        item_t it;
        int ctx, ctx2;
        ctx = context_of(cur, mc, inter, vert, y, x);
        it.s = cp(cur, vert, y + 2, x + 2);
        it.c0 = table_c0(inter, ctx);
        it.pair = 0; it.sel = (ctx == (1 << nb) - 1); it.s2 = 0;
        if (ms && x < 15 && (ctx == 0 || ctx == (1 << nb) - 1)) begin
          ctx2 = context_of(cur, mc, inter, vert, y, x + 1);
          it.s2 = cp(cur, vert, y + 2, x + 3);
          it.pair = (ctx2 == ctx) && (it.s2 == it.sel);
        end
        x += it.pair ? 2 : 1;
        it.last = (y == 15 && x == 16);
        items.push_back(it);
      end
    end
    got.delete();
    mode = inter ? MODE_INTER : MODE_INTRA;
    start <= 1; @(posedge clk); start <= 0;
    foreach (items[i]) begin
      @(negedge clk);
      while ($urandom % 6 == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_sym = items[i].s; in_sym_r = items[i].s2; in_c0 = 16'(items[i].c0);
      in_pair = items[i].pair; in_clps_sel = items[i].sel; in_last = items[i].last;
      @(posedge clk iff in_ready);
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk iff done);
    @(negedge clk);
    bad = (got.size() != res.nbits);
    for (int i = 0; i < got.size() && i < res.nbits && i < 1024; i++) if (got[i] != res.bits[i]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL bits: %0d got, %0d expected, %0d bad", got.size(), res.nbits, bad); end
    checks++;
    if (cnt_pairs != 16'(res.pairs) || cnt_splits != 16'(res.splits) || cnt_rn != 16'(res.rn)) begin
      failures++; $display("FAIL counts %0d %0d %0d exp %0d %0d %0d", cnt_pairs, cnt_splits, cnt_rn,
                           res.pairs, res.splits, res.rn);
    end
  endtask
  task automatic run_random(bit inter, int n);
    enc_result_t res;
    item_t items [$];
    longint unsigned R, L;
    int btf, bad, rn;
    bit bq, bq2;
    res.pairs = 0; res.splits = 0; res.pair_rn = 0; res.rn = 0; res.nbits = 0;
    R = 64'h7FFF_FFFF; L = 0; btf = 0; rn = 0;
    for (int i = 0; i < n; i++) begin
      item_t it;
      it.last = (i == n - 1);
      if ($urandom % 2) begin
        it.pair = 1; it.sel = 1'($urandom); it.s = it.sel; it.s2 = it.sel;
        it.c0 = table_c0(inter, it.sel ? (inter ? 511 : 1023) : 0);
        res.pairs++;
        rn += code_symbol(res, R, L, btf, it.s, it.c0, bq);
        rn += code_symbol(res, R, L, btf, it.s2, it.c0, bq2);
        if (bq) res.splits++;
      end else begin
        it.pair = 0; it.sel = 0; it.s2 = 0; it.s = 1'($urandom);
        it.c0 = 1 + $urandom % 65535;
        rn += code_symbol(res, R, L, btf, it.s, it.c0, bq);
      end
      items.push_back(it);
    end
    res.rn = rn;
    terminate(res, L, btf);
    n_rand_splits += res.splits;
    got.delete();
    mode = inter ? MODE_INTER : MODE_INTRA;
    start <= 1; @(posedge clk); start <= 0;
    foreach (items[i]) begin
      @(negedge clk);
      in_valid = 1; in_sym = items[i].s; in_sym_r = items[i].s2; in_c0 = 16'(items[i].c0);
      in_pair = items[i].pair; in_clps_sel = items[i].sel; in_last = items[i].last;
      @(posedge clk iff in_ready);
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk iff done);
    @(negedge clk);
    bad = (got.size() != res.nbits);
    for (int i = 0; i < got.size() && i < res.nbits && i < 1024; i++) if (got[i] != res.bits[i]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL random stream bits: %0d got, %0d expected, %0d bad", got.size(), res.nbits, bad); end
    checks++;
    if (cnt_pairs != 16'(res.pairs) || cnt_splits != 16'(res.splits) || cnt_rn != 16'(res.rn)) begin
      failures++; $display("FAIL random stream counts %0d %0d %0d exp %0d %0d %0d", cnt_pairs, cnt_splits, cnt_rn,
                           res.pairs, res.splits, res.rn);
    end
  endtask
  // stop in the middle of a stream: the unit must fall silent (no pushes,
  // no done, not ready) until the next start
  task automatic run_stop(int k);
    int quiet;
    mode = MODE_INTRA;
    start <= 1; @(posedge clk); start <= 0;
    for (int i = 0; i < 10 + k; i++) begin
      @(negedge clk);
      in_valid = 1; in_sym = $urandom % 2; in_sym_r = 0; in_c0 = 16'(1 + $urandom % 65535);
      in_pair = 0; in_clps_sel = 0; in_last = 0;
      @(posedge clk iff in_ready);
    end
    @(negedge clk); in_valid = 0; stop = 1;
    @(negedge clk); stop = 0;
    quiet = 1;
    repeat (40) begin
      @(negedge clk);
      if (fifo_push || done || in_ready) quiet = 0;
    end
    checks++;
    if (!quiet) begin failures++; $display("FAIL unit active after stop"); end
  endtask
  int n_rand_splits = 0;
  initial begin
    start = 0; in_valid = 0; in_sym = 0; in_sym_r = 0; in_pair = 0; in_clps_sel = 0; in_last = 0;
    in_c0 = 0; mode = MODE_INTRA; fifo_full = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 1; s <= 16; s++) run(s, s % 2, (s / 2) % 2, (s % 4) != 3);
    for (int k = 0; k < 60; k++) run_random(k % 2, 200);
    for (int k = 0; k < 4; k++) begin
      run_stop(k);
      run(k + 1, k % 2, 0, 1);   // a full process after a stopped one
    end
    checks++;
    if (n_rand_splits == 0) begin failures++; $display("FAIL no split pair in the random streams"); end
    checks++;
    if (n_full_waits == 0) begin failures++; $display("FAIL buffer-full wait never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
