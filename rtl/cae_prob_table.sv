// cae_prob_table: probability lookup table (PLT).
//
// Two tables of 16-bit probabilities that the coded pixel is 0: 1024 entries
// indexed by the 10-bit INTRA context and 512 entries indexed by the 9-bit
// INTER context. The lookup is combinational (the paper synthesises its
// tables as logic) and is registered in the pipeline's PL stage. The table
// contents are the fixed tables of the MPEG-4 shape coding standard; they are
// loaded through the write port so that the same block serves any table.
// Entries 0 and 1023 (INTRA) and 0 and 511 (INTER) must hold 2^16 - 269,
// 235, 2^16 - 4 and 14, the values hardwired in the two-symbol path.
module cae_prob_table
  import cae_pkg::*;
#(
  parameter int unsigned INTRA_N = 1024,
  parameter int unsigned INTER_N = 512
) (
  input  logic        clk,
  input  logic        wr_en,
  input  cae_mode_e   wr_mode,
  input  logic [9:0]  wr_addr,
  input  logic [15:0] wr_data,
  input  cae_mode_e   mode,
  input  logic [9:0]  ctx,
  output logic [15:0] c0
);
  logic [15:0] intra_tab [INTRA_N];
  logic [15:0] inter_tab [INTER_N];

  always_ff @(posedge clk) begin
    if (wr_en && wr_mode == MODE_INTRA) intra_tab[wr_addr] <= wr_data;
    if (wr_en && wr_mode == MODE_INTER) inter_tab[wr_addr[8:0]] <= wr_data;
  end

  always_comb begin
    if (mode == MODE_INTRA) c0 = intra_tab[ctx];
    else                    c0 = inter_tab[ctx[8:0]];
  end
endmodule
