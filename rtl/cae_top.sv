// cae_top: pipelined two-symbol context-based arithmetic encoder for one
// binary alpha block (BAB) of MPEG-4 shape coding.
//
// Pipeline (one symbol or one pair per clock when no renormalisation runs):
//   CG  cae_context_gen  : line buffers and counter; contexts of X and X'
//   PL  cae_prob_table + cae_ru2_ctrl, registered here: c0 of X, the symbols,
//       enable_ru2 (pair), cLPS_sel and the last-symbol flag
//   RU  cae_range_update : RU / RU2 / RN on R, L, bits_to_follow
//   then cae_rn_buffer -> cae_bitstream_gen -> cae_bitstream_buffer.
// A pair of successive symbols is coded in one clock when both share an
// all-0 or all-1 context and the second is that context's more probable
// symbol; the CG counter then advances by two. Any renormalisation stalls
// CG and PL (valid/ready between PL and RU).
//
// Use: write the bordered BABs (bab_clear, then bab_wr_*; coding may start
// before all rows are in, it waits for missing lines) and the probability tables
// (plt_wr_*), then pulse start with mode (INTRA/INTER), scan (H/V), bab_size
// (16x16, or 8x8 / 4x4 for subsampled BABs) and ms_en (two-symbol
// processing on). new_bab with start forgets the previous best
// bitstream. done pulses when the coding process has been written out;
// last_len and last_bank give its size and bank. The two banks of the
// bitstream buffer keep the shortest bitstream of the BAB so far
// (best_bank/best_len) while the next coding process writes the other bank,
// so after the two (intra) or four (inter) coding processes best_bank holds
// the one to send. cycles counts the clocks from start to done. Statistics:
// pairs coded by RU2, pairs split by renormalisation, renormalisation
// iterations.
//
// Redundant operation elimination (roe_en): while a coding process runs, its
// bitstream length so far is compared with the best length of the BAB. Once
// it is larger the process cannot win, so it is stopped at once: the context
// generator and the range update unit go idle, the pipeline and the
// renormalisation buffer are emptied, done pulses with last_aborted set and
// the best bitstream stays as it was. The next start begins the next coding
// process.
//
// Block structure and pipeline follow the paper; the host interface, the
// best-bitstream bank policy and the coder termination are this design's;
// the elimination follows the paper's description (one comparator and the
// control to end the process).
module cae_top
  import cae_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // BAB buffer load
  input  logic               bab_clear,    // a new BAB follows: forget written rows
  input  logic               bab_wr_en,
  input  logic               bab_wr_mc,
  input  logic [4:0]         bab_wr_row,
  input  logic [CUR_W-1:0]   bab_wr_data,
  // probability table load
  input  logic               plt_wr_en,
  input  cae_mode_e          plt_wr_mode,
  input  logic [9:0]         plt_wr_addr,
  input  logic [15:0]        plt_wr_data,
  // coding process control
  input  logic               start,
  input  logic               new_bab,
  input  cae_mode_e          mode,
  input  cae_scan_e          scan,
  input  bab_size_e          bab_size,
  input  logic               ms_en,
  input  logic               roe_en,       // stop a process once it is longer than the best
  output logic               busy,
  output logic               done,
  output logic [BS_AW-1:0]   last_len,
  output logic               last_bank,
  output logic               last_overflow,
  output logic               last_aborted, // the last process was stopped early
  output logic               best_bank,
  output logic [BS_AW-1:0]   best_len,
  output logic [15:0]        cycles,
  output logic [15:0]        stat_pairs,
  output logic [15:0]        stat_splits,
  output logic [15:0]        stat_rn,
  // bitstream read
  input  logic               bs_rd_bank,
  input  logic [4:0]         bs_rd_addr,
  output logic [15:0]        bs_rd_word
);
  // ---------------- control and status ----------------
  cae_mode_e mode_q;
  bab_size_e size_q;
  cae_scan_e scan_q;
  logic      ms_en_q, roe_en_q, best_valid, cur_bank, ru_done, gen_done_wait;
  logic      start_q;   // start registered: clears the bank and the pipeline
  logic             fifo_empty, gen_ovf;
  logic [BS_AW-1:0] gen_len;
  logic             finish, abort;

  // finish: the range update unit has terminated and the buffer is drained.
  // abort: redundant operation elimination; gen_len only grows, so once it
  // passes best_len this process can no longer become the best.
  assign finish = busy && (ru_done || gen_done_wait) && fifo_empty;
  assign abort  = busy && !start_q && !finish && roe_en_q && best_valid && (gen_len > best_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= MODE_INTRA; size_q <= BAB_16; scan_q <= SCAN_H; ms_en_q <= 1'b0; roe_en_q <= 1'b0;
      last_aborted <= 1'b0;
      best_valid <= 1'b0; best_bank <= 1'b0; best_len <= '0; cur_bank <= 1'b0;
      busy <= 1'b0; done <= 1'b0; last_len <= '0; last_bank <= 1'b0;
      last_overflow <= 1'b0; cycles <= '0; start_q <= 1'b0; gen_done_wait <= 1'b0;
    end else begin
      done    <= 1'b0;
      start_q <= 1'b0;
      if (start && !busy) begin
        mode_q <= mode; size_q <= bab_size; scan_q <= scan; ms_en_q <= ms_en; roe_en_q <= roe_en;
        busy <= 1'b1; cycles <= '0; start_q <= 1'b1; gen_done_wait <= 1'b0;
        if (new_bab || !best_valid) begin
          best_valid <= !new_bab && best_valid;
          cur_bank   <= (new_bab || !best_valid) ? 1'b0 : ~best_bank;
        end else begin
          cur_bank <= ~best_bank;
        end
      end else if (busy) begin
        cycles <= cycles + 16'd1;
        if (ru_done) gen_done_wait <= 1'b1;
        if (abort) begin
          busy <= 1'b0; done <= 1'b1; last_aborted <= 1'b1;
          last_len <= gen_len; last_bank <= cur_bank; last_overflow <= gen_ovf;
        end else if (finish) begin
          busy <= 1'b0; done <= 1'b1; last_aborted <= 1'b0;
          last_len <= gen_len; last_bank <= cur_bank; last_overflow <= gen_ovf;
          if (!best_valid || gen_len < best_len) begin
            best_bank <= cur_bank; best_len <= gen_len;
          end
          best_valid <= 1'b1;
        end
      end
    end
  end

  // ---------------- BAB buffer ----------------
  logic [4:0]       rd_line;
  logic [CUR_W-1:0] cur_line;
  logic [MC_W-1:0]  mc_line;
  logic             line_ready;
  cae_bab_buffer u_bab (
    .clk, .rst_n, .clear(bab_clear), .wr_en(bab_wr_en), .wr_mc(bab_wr_mc), .wr_row(bab_wr_row), .wr_data(bab_wr_data),
    .scan(scan_q), .rd_line, .cur_line, .mc_line,
    .need_mc(mode_q == MODE_INTER), .side(bab_side(size_q)), .line_ready);

  // ---------------- CG stage ----------------
  logic       cg_valid, cg_sym_c, cg_sym_r, cg_x_last, cg_x_last2, cg_last_line;
  logic [9:0] cg_ctx_c, cg_ctx_r;
  logic       pl_load, pair;
  logic       clps_sel;
  cae_context_gen u_cg (
    .clk, .rst_n, .start(start_q), .stop(abort), .mode(mode_q), .bab_size(size_q), .advance(pl_load), .shift2(pair),
    .rd_line, .cur_line, .mc_line, .line_ready,
    .valid(cg_valid), .ctx_c(cg_ctx_c), .ctx_r(cg_ctx_r), .sym_c(cg_sym_c), .sym_r(cg_sym_r),
    .x(), .x_last(cg_x_last), .x_second_last(cg_x_last2), .last_line(cg_last_line), .done_o());

  // ---------------- PL stage: probability lookup and RU2 control ----------------
  logic [15:0] plt_c0;
  cae_prob_table u_plt (
    .clk, .wr_en(plt_wr_en), .wr_mode(plt_wr_mode), .wr_addr(plt_wr_addr), .wr_data(plt_wr_data),
    .mode(mode_q), .ctx(cg_ctx_c), .c0(plt_c0));

  cae_ru2_ctrl u_ru2c (
    .ms_en(ms_en_q), .mode(mode_q), .x_last(cg_x_last), .ctx_c(cg_ctx_c), .ctx_r(cg_ctx_r),
    .sym_r(cg_sym_r), .enable_ru2(pair), .clps_sel);

  logic        pl_valid, pl_sym, pl_sym_r, pl_pair, pl_clps_sel, pl_last;
  logic [15:0] pl_c0;
  logic        ru_ready;
  logic        cg_last;
  // The symbol(s) taken now end the BAB: last line and X (or the pair's X') is the last
  assign cg_last = cg_last_line && (cg_x_last || (pair && cg_x_last2));
  assign pl_load = cg_valid && (!pl_valid || ru_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pl_valid <= 1'b0; pl_sym <= 1'b0; pl_sym_r <= 1'b0; pl_pair <= 1'b0;
      pl_clps_sel <= 1'b0; pl_last <= 1'b0; pl_c0 <= '0;
    end else if (start_q || abort) begin
      pl_valid <= 1'b0;
    end else if (pl_load) begin
      pl_valid <= 1'b1; pl_sym <= cg_sym_c; pl_sym_r <= cg_sym_r; pl_pair <= pair;
      pl_clps_sel <= clps_sel; pl_last <= cg_last; pl_c0 <= plt_c0;
    end else if (ru_ready) begin
      pl_valid <= 1'b0;
    end
  end

  // ---------------- RU stage ----------------
  logic      fifo_full, fifo_push, fifo_pop;
  rn_entry_t fifo_din, fifo_dout;
  cae_range_update u_ru (
    .clk, .rst_n, .start(start_q), .stop(abort), .mode(mode_q),
    .in_valid(pl_valid), .in_sym(pl_sym), .in_sym_r(pl_sym_r), .in_c0(pl_c0),
    .in_pair(pl_pair), .in_clps_sel(pl_clps_sel), .in_last(pl_last), .in_ready(ru_ready),
    .fifo_full, .fifo_push, .fifo_data(fifo_din),
    .done(ru_done), .cnt_pairs(stat_pairs), .cnt_splits(stat_splits), .cnt_rn(stat_rn));

  // ---------------- output side ----------------
  cae_rn_buffer u_rnbuf (
    .clk, .rst_n, .clear(start_q || abort), .push(fifo_push), .din(fifo_din), .pop(fifo_pop),
    .dout(fifo_dout), .full(fifo_full), .empty(fifo_empty));

  logic             bs_wr_en, bs_wr_bit;
  logic [BS_AW-1:0] bs_wr_pos;
  logic [8:0]       bs_wr_len;
  cae_bitstream_gen u_gen (
    .clk, .rst_n, .start(start_q), .fifo_empty, .fifo_dout, .fifo_pop,
    .wr_en(bs_wr_en), .wr_pos(bs_wr_pos), .wr_len(bs_wr_len), .wr_bit(bs_wr_bit),
    .length(gen_len), .overflow(gen_ovf));

  cae_bitstream_buffer u_bsbuf (
    .clk, .clr(start_q), .clr_bank(cur_bank), .wr_en(bs_wr_en), .wr_bank(cur_bank),
    .wr_pos(bs_wr_pos), .wr_len(bs_wr_len), .wr_bit(bs_wr_bit),
    .rd_bank(bs_rd_bank), .rd_addr(bs_rd_addr), .rd_word(bs_rd_word));

endmodule
