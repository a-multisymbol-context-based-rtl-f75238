// cae_rn_buffer: renormalisation buffer, a FIFO of {code bit, bits_to_follow}
// entries (8 entries of 9 bits by default, the paper's size) between the
// renormaliser and the bitstream generator.
//
// push writes din at the tail, pop removes the head; dout always shows the
// head. full and empty are registered-pointer flags; a push while full or a
// pop while empty is ignored. A simultaneous push and pop on a full buffer
// keeps the push out (the writer must look at full). Start of a coding
// process clears the buffer. Being a FIFO of registers follows the paper;
// the pointer scheme is this design's.
module cae_rn_buffer
  import cae_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      push,
  input  rn_entry_t din,
  input  logic      pop,
  output rn_entry_t dout,
  output logic      full,
  output logic      empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  rn_entry_t       mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;
  logic [AW:0]     count;
  logic            do_push, do_pop;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0; wr_ptr <= '0; count <= '0;
    end else if (clear) begin
      rd_ptr <= '0; wr_ptr <= '0; count <= '0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
endmodule
