// cae_bitstream_buffer: two banks of 298 code bits (the paper's 2 x 298).
//
// A coding process writes one bank while the other keeps the shortest
// bitstream found so far for the BAB. Writes are runs: wr_len bits from
// position wr_pos, the first equal to wr_bit and the rest its complement,
// clipped at the end of the bank. clr zeroes a bank. The host reads 16-bit
// words: word k of a bank holds bits 16k..16k+15, the earliest bit in the
// MSB; bits past the end read as 0. The run-write and word-read ports are
// this design's choice.
module cae_bitstream_buffer
  import cae_pkg::*;
(
  input  logic             clk,
  input  logic             clr,
  input  logic             clr_bank,
  input  logic             wr_en,
  input  logic             wr_bank,
  input  logic [BS_AW-1:0] wr_pos,
  input  logic [8:0]       wr_len,
  input  logic             wr_bit,
  input  logic             rd_bank,
  input  logic [4:0]       rd_addr,
  output logic [15:0]      rd_word
);
  logic [BS_BITS-1:0] bank [2];

  always_ff @(posedge clk) begin
    if (clr) bank[clr_bank] <= '0;
    else if (wr_en) begin
      for (int i = 0; i < BS_BITS; i++) begin
        if (i >= int'(wr_pos) && i < int'(wr_pos) + int'(wr_len))
          bank[wr_bank][i] <= (i == int'(wr_pos)) ? wr_bit : !wr_bit;
      end
    end
  end

  always_comb begin
    for (int b = 0; b < 16; b++) begin
      int idx;
      idx = int'(rd_addr) * 16 + b;
      rd_word[15-b] = (idx < BS_BITS) ? bank[rd_bank][idx] : 1'b0;
    end
  end
endmodule
