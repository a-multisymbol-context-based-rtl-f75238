// cae_rn: one iteration of renormalisation (RN), combinational.
//
// Applied while R < QUARTER. Three situations:
//   L >= HALF          : emit code bit 1 (out1) with the pending
//                        bits_to_follow, L <- L - HALF
//   L + R <= HALF      : emit code bit 0 (out0) with bits_to_follow
//   otherwise          : bits_to_follow + 1, L <- L - QUARTER
// then L and R are doubled. An emitted bit clears bits_to_follow; the pair
// {bit, old bits_to_follow} goes to the renormalisation buffer. rn_more
// (RN_enable3) says another iteration is needed. One iteration per clock, as
// in the paper; the comparisons and updates are the paper's Fig. 17.
module cae_rn
  import cae_pkg::*;
(
  input  logic [31:0]      r_in,
  input  logic [31:0]      l_in,
  input  logic [BTF_W-1:0] btf_in,
  output logic [31:0]      r_out,
  output logic [31:0]      l_out,
  output logic [BTF_W-1:0] btf_out,
  output logic             out0,
  output logic             out1,
  output logic             rn_more
);
  logic [32:0] lr_sum;
  logic [31:0] l_mid;
  always_comb begin
    lr_sum = {1'b0, l_in} + {1'b0, r_in};
    out1 = 1'b0;
    out0 = 1'b0;
    btf_out = btf_in;
    if (l_in >= HALF) begin
      out1  = 1'b1;
      l_mid = l_in - HALF;
      btf_out = '0;
    end else if (lr_sum <= {1'b0, HALF}) begin
      out0  = 1'b1;
      l_mid = l_in;
      btf_out = '0;
    end else begin
      l_mid = l_in - QUARTER;
      btf_out = btf_in + 1'b1;
    end
    l_out   = l_mid << 1;
    r_out   = r_in << 1;
    rn_more = (r_out < QUARTER);
  end
endmodule
