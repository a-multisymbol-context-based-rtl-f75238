// cae_range_update: range update stage (RU, RU2, RN and the range update
// control) with the coder state registers R, L and bits_to_follow.
//
// Each clock the stage does exactly one of the following, in this priority:
//   1. RN  : one renormalisation iteration while a previous update left
//            R < QUARTER. An emitted code bit is pushed, with its
//            bits_to_follow, into the renormalisation buffer; if that buffer
//            is full the iteration waits.
//   2. S2  : code the stored second symbol of a split pair with RU.
//   3. FLUSH: after the last symbol of the BAB, two clocks terminate the
//            coder (see below), then done pulses.
//   4. take the symbol(s) offered by the PL stage: a single symbol with RU,
//            or an S_T0+(2) pair with RU2. If the first symbol of the pair
//            already brings R below QUARTER, only it is applied, the second
//            is stored, renormalisation runs, and the second is coded by RU
//            afterwards (the paper's "case 3").
// in_ready is high only in case 4; the PL stage and the context generator
// stall whenever it is low, which is the paper's pipeline stall on
// renormalisation. The unit therefore spends one clock per single symbol or
// pair, one per renormalisation iteration and one per split pair.
//
// Start sets L = 0, R = 0x7FFFFFFF and bits_to_follow = 0 (MPEG-4 coder
// initialisation). Termination is this design's own: the coder emits the two
// most significant bits of V = L rounded up to a multiple of QUARTER, a value
// inside [L, L+R) since R >= QUARTER after renormalisation, as two buffer
// entries {V[31], bits_to_follow} and {V[30], 0}. The MPEG-4 termination and
// its start-code emulation stuffing are not reproduced.
// stop abandons the coding process: the unit returns to its idle state
// without terminating the coder and without pulsing done (used when the
// process is cut short because its bitstream is already too long).
module cae_range_update
  import cae_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             stop,
  input  cae_mode_e        mode,
  // from the PL stage
  input  logic             in_valid,
  input  logic             in_sym,
  input  logic             in_sym_r,
  input  logic [15:0]      in_c0,
  input  logic             in_pair,
  input  logic             in_clps_sel,
  input  logic             in_last,
  output logic             in_ready,
  // to the renormalisation buffer
  input  logic             fifo_full,
  output logic             fifo_push,
  output rn_entry_t        fifo_data,
  // status
  output logic             done,
  output logic [15:0]      cnt_pairs,
  output logic [15:0]      cnt_splits,
  output logic [15:0]      cnt_rn
);
  logic [31:0]      r_q, l_q;
  logic [BTF_W-1:0] btf_q;
  logic             rn_act, pend, pend_sym, last_seen, done_q;
  logic [15:0]      pend_c0;
  logic [1:0]       flush_st;    // 0: not started, 1: second bit pending, 2: finished
  logic             v30_q;

  // RU operand select: the stored second symbol or the PL-stage symbol
  logic        ru_sym;
  logic [15:0] ru_c0;
  logic [31:0] ru_r, ru_l;
  logic        ru_rn;
  assign ru_sym = pend ? pend_sym : in_sym;
  assign ru_c0  = pend ? pend_c0  : in_c0;

  cae_ru u_ru (.r_in(r_q), .l_in(l_q), .c0(ru_c0), .symbol(ru_sym),
               .r_out(ru_r), .l_out(ru_l), .rn_need(ru_rn));

  logic [31:0] ru2_one, ru2_two;
  logic        ru2_split, ru2_rn;
  cae_ru2 u_ru2 (.r_in(r_q), .pred_type(mode), .clps_sel(in_clps_sel),
                 .r_one(ru2_one), .r_two(ru2_two), .split(ru2_split), .rn_need(ru2_rn));

  logic [31:0]      rn_r, rn_l;
  logic [BTF_W-1:0] rn_btf;
  logic             rn_out0, rn_out1, rn_more;
  cae_rn u_rn (.r_in(r_q), .l_in(l_q), .btf_in(btf_q), .r_out(rn_r), .l_out(rn_l),
               .btf_out(rn_btf), .out0(rn_out0), .out1(rn_out1), .rn_more(rn_more));

  // Termination value: L rounded up to a multiple of QUARTER
  logic [1:0] v_top;
  assign v_top = l_q[31:30] + 2'(l_q[29:0] != '0);

  logic flushing;
  assign flushing = last_seen && !rn_act && !pend && flush_st != 2'd2;

  always_comb begin
    in_ready  = !rn_act && !pend && !last_seen && !done_q;
    fifo_push = 1'b0;
    fifo_data = '0;
    if (rn_act) begin
      fifo_push = (rn_out0 || rn_out1) && !fifo_full;
      fifo_data = '{bit_val: rn_out1, btf: btf_q};
    end else if (flushing && !pend) begin
      fifo_push = !fifo_full;
      if (flush_st == 2'd0) fifo_data = '{bit_val: v_top[1], btf: btf_q};
      else                  fifo_data = '{bit_val: v30_q, btf: '0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q <= R_INIT; l_q <= '0; btf_q <= '0;
      rn_act <= 1'b0; pend <= 1'b0; pend_sym <= 1'b0; pend_c0 <= '0;
      last_seen <= 1'b0; flush_st <= 2'd2; v30_q <= 1'b0; done_q <= 1'b1;
      done <= 1'b0; cnt_pairs <= '0; cnt_splits <= '0; cnt_rn <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        r_q <= R_INIT; l_q <= '0; btf_q <= '0;
        rn_act <= 1'b0; pend <= 1'b0; last_seen <= 1'b0; flush_st <= 2'd0;
        done_q <= 1'b0; cnt_pairs <= '0; cnt_splits <= '0; cnt_rn <= '0;
      end else if (stop) begin
        rn_act <= 1'b0; pend <= 1'b0; last_seen <= 1'b0; flush_st <= 2'd2;
        done_q <= 1'b1;
      end else if (rn_act) begin
        if (!((rn_out0 || rn_out1) && fifo_full)) begin
          r_q <= rn_r; l_q <= rn_l; btf_q <= rn_btf;
          rn_act <= rn_more;
          cnt_rn <= cnt_rn + 16'd1;
        end
      end else if (pend) begin
        r_q <= ru_r; l_q <= ru_l;
        rn_act <= ru_rn;
        pend <= 1'b0;
      end else if (flushing) begin
        if (!fifo_full) begin
          if (flush_st == 2'd0) begin
            v30_q <= v_top[0];
            btf_q <= '0;
            flush_st <= 2'd1;
          end else begin
            flush_st <= 2'd2;
            done_q <= 1'b1;
            done <= 1'b1;
          end
        end
      end else if (in_valid && in_ready) begin
        if (in_last) last_seen <= 1'b1;
        if (in_pair) begin
          cnt_pairs <= cnt_pairs + 16'd1;
          if (ru2_split) begin
            r_q <= ru2_one;
            pend <= 1'b1; pend_sym <= in_sym_r; pend_c0 <= in_c0;
            rn_act <= 1'b1;
            cnt_splits <= cnt_splits + 16'd1;
          end else begin
            r_q <= ru2_two;
            rn_act <= ru2_rn;
          end
        end else begin
          r_q <= ru_r; l_q <= ru_l;
          rn_act <= ru_rn;
        end
      end
    end
  end

  // A pair is only offered for an all-0/all-1 context whose MPS is the second symbol
  a_pair_mps: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready && in_pair) |-> (in_sym_r == in_clps_sel));
endmodule
