// cae_bitstream_gen: bitstream generator.
//
// Takes one {bit, bits_to_follow} entry per clock from the renormalisation
// buffer and writes the corresponding bits_to_follow+1 code bits into the
// bitstream buffer in one clock: the first bit equals the entry's bit, the
// following bits_to_follow bits are its complement (e.g. bit 1 with
// bits_to_follow 4 gives 10000). It keeps the bit count of the coding
// process in length; bits beyond the bank size are dropped and set
// overflow. start clears the count. The expansion rule is the coder's; the
// one-entry-per-clock run write is this design's choice.
module cae_bitstream_gen
  import cae_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  // renormalisation buffer side
  input  logic             fifo_empty,
  input  rn_entry_t        fifo_dout,
  output logic             fifo_pop,
  // bitstream buffer write port
  output logic             wr_en,
  output logic [BS_AW-1:0] wr_pos,
  output logic [8:0]       wr_len,
  output logic             wr_bit,
  // status
  output logic [BS_AW-1:0] length,
  output logic             overflow
);
  logic [9:0] end_pos;
  always_comb begin
    fifo_pop = !fifo_empty && !start;
    wr_en    = fifo_pop;
    wr_pos   = length;
    wr_len   = 9'(fifo_dout.btf) + 9'd1;
    wr_bit   = fifo_dout.bit_val;
    end_pos  = 10'(length) + 10'(wr_len);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      length <= '0; overflow <= 1'b0;
    end else if (start) begin
      length <= '0; overflow <= 1'b0;
    end else if (fifo_pop) begin
      if (end_pos > 10'(BS_BITS)) begin
        length   <= BS_AW'(BS_BITS);
        overflow <= 1'b1;
      end else begin
        length <= BS_AW'(end_pos);
      end
    end
  end
endmodule
