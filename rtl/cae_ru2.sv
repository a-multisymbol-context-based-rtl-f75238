// cae_ru2: two-symbol range update (RU2, the paper's MSRU for n = 2),
// combinational.
//
// RU2 only handles a pair of successive more-probable symbols that share an
// all-0 or all-1 context. Such an MPS leaves L unchanged and sets
// R <- R - R[31:16]*cLPS, where cLPS is one of four constants. Two chained
// rows of constant units (cae_cu: intra1, intra0, inter0, inter1) apply the
// update twice; pred_type (INTRA/INTER) and clps_sel (all-0 or all-1)
// choose which column's result is used.
//   r_one    : range after the first symbol of the pair
//   r_two    : range after both symbols (R_RU2)
//   split    : r_one is already below QUARTER: the pair must be split and
//              the second symbol coded later by RU (case 3 of the pipeline)
//   rn_need  : renormalisation is needed after this update (RN_enable2)
// Structure and constants follow the paper; the split output is how this
// design exposes the case where the first symbol alone triggers
// renormalisation.
module cae_ru2
  import cae_pkg::*;
(
  input  logic [31:0] r_in,
  input  cae_mode_e   pred_type,
  input  logic        clps_sel,     // 0: all-0 context, 1: all-1 context
  output logic [31:0] r_one,
  output logic [31:0] r_two,
  output logic        split,
  output logic        rn_need
);
  logic [31:0] s1 [4];
  logic [31:0] s2 [4];

  for (genvar k = 0; k < 4; k++) begin : g_cu
    cae_cu #(.CU_TYPE(2'(k))) u_cu1 (.r_in(r_in),  .r_out(s1[k]));
    cae_cu #(.CU_TYPE(2'(k))) u_cu2 (.r_in(s1[k]), .r_out(s2[k]));
  end

  logic [1:0] sel;
  always_comb begin
    sel     = {pred_type == MODE_INTER, clps_sel};
    r_one   = s1[sel];
    r_two   = s2[sel];
    split   = (r_one < QUARTER);
    rn_need = split || (r_two < QUARTER);
  end
endmodule
