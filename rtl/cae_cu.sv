// cae_cu: one hardwired constant-multiplier update unit (CU) of RU2.
//
// Computes R - R[31:16] * cLPS for one of the four constants allowed on the
// two-symbol path, with the multiplication written as shifts and adds or
// subtracts of R[31:16] (binary or signed-digit form of the constant):
//   INTRA, all-0 context: 269 = 256 + 8 + 4 + 1
//   INTRA, all-1 context: 235 = 256 - 16 - 4 - 1
//   INTER, all-0 context:   4
//   INTER, all-1 context:  14 = 16 - 2
// The constants are the paper's; the paper builds the CUs as carry-save
// adders, here the sum is written as plain additions and the synthesiser
// picks the adder structure. Combinational.
module cae_cu
  import cae_pkg::*;
#(
  parameter logic [1:0] CU_TYPE = 2'd0   // {inter, all_one}
) (
  input  logic [31:0] r_in,
  output logic [31:0] r_out
);
  logic [31:0] h, prod;
  always_comb begin
    h = {16'd0, r_in[31:16]};
    unique case (CU_TYPE)
      2'b00:   prod = (h << 8) + (h << 3) + (h << 2) + h;   // intra0, 269
      2'b01:   prod = (h << 8) - (h << 4) - (h << 2) - h;   // intra1, 235
      2'b10:   prod = (h << 2);                             // inter0, 4
      default: prod = (h << 4) - (h << 1);                  // inter1, 14
    endcase
    r_out = r_in - prod;
  end
endmodule
