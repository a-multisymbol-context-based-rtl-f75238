// cae_ru: single-symbol range update (RU) of the multiplicative arithmetic
// coder, combinational.
//
// From c0 (probability of a 0, 16 bits) the unit forms c1 = 2^16 - c0 and
// picks the less probable symbol: LPS = 1 when c0 > HALF of the 16-bit scale,
// cLPS = min(c0, c1). rLPS = R[31:16] * cLPS, rMPS = R - rLPS. An LPS moves L
// up by rMPS and sets R to rLPS; an MPS sets R to rMPS and leaves L alone.
// rn_need tells that the new range is below QUARTER so the renormaliser must
// run before the next symbol (the RN_enable1 decision of the paper's RU; the
// gating by the stall state lives in cae_range_update).
// All of this follows the paper's RU datapath; the module is purely
// combinational and is registered by cae_range_update.
module cae_ru
  import cae_pkg::*;
(
  input  logic [31:0] r_in,
  input  logic [31:0] l_in,
  input  logic [15:0] c0,
  input  logic        symbol,
  output logic [31:0] r_out,
  output logic [31:0] l_out,
  output logic        rn_need
);
  logic [15:0] c1, clps;
  logic        lps;
  logic [31:0] rlps, rmps;

  always_comb begin
    c1    = ~c0 + 16'd1;
    lps   = (c0 > 16'h8000);
    clps  = lps ? c1 : c0;
    rlps  = r_in[31:16] * clps;
    rmps  = r_in - rlps;
    if (symbol == lps) begin
      r_out = rlps;
      l_out = l_in + rmps;
    end else begin
      r_out = rmps;
      l_out = l_in;
    end
    rn_need = (r_out < QUARTER);
  end
endmodule
