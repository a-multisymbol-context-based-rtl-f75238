// cae_ru2_ctrl: RU2 control (the paper's MSRUC), combinational.
//
// Looks at the context of the current symbol X, the context of the
// look-ahead symbol X' (one position to the right) and the value of X'.
// The pair {X, X'} goes to RU2 (enable_ru2, which also makes the context
// generator advance by two) when:
//   - two-symbol processing is enabled (ms_en),
//   - X is not the last symbol of its line, so X' exists,
//   - the context of X has all bits 0 or all bits 1 (10 bits INTRA, 9 INTER),
//   - X' has the same context, and
//   - X' is the more probable symbol of that context (0 for all-0, 1 for
//     all-1).
// X itself is then the MPS too, because it is bit c0 of the context of X'.
// clps_sel tells RU2 which constant to use (1: all-1 context). The paper
// gives the same-context rule; requiring X' to be the MPS follows from RU2
// implementing only the MPS update.
module cae_ru2_ctrl
  import cae_pkg::*;
(
  input  logic        ms_en,
  input  cae_mode_e   mode,
  input  logic        x_last,     // X is the last symbol of the line
  input  logic [9:0]  ctx_c,
  input  logic [9:0]  ctx_r,
  input  logic        sym_r,
  output logic        enable_ru2,
  output logic        clps_sel
);
  logic [9:0] mask;
  logic       all0, all1;
  always_comb begin
    mask       = (mode == MODE_INTRA) ? 10'h3FF : 10'h1FF;
    all0       = ((ctx_c & mask) == 10'h000);
    all1       = ((ctx_c & mask) == mask);
    clps_sel   = all1;
    enable_ru2 = ms_en && !x_last && (all0 || all1)
                 && ((ctx_r & mask) == (ctx_c & mask)) && (sym_r == all1);
  end
endmodule
