// cae_context_gen: context generator (CG stage).
//
// Holds three lines of the bordered current BAB (lb3: two lines above the
// coded line, lb2: one line above, lb1: the coded line) and three lines of
// the bordered MC BAB (the lines above, at and below the coded line), plus
// a counter x for the position of the coded symbol X in its line and y for
// the line. From them it forms, every clock, the INTRA or INTER context of X
// and of the look-ahead symbol X' = x+1, and the values of X and X'.
//
// Templates (c0 is the LSB of the context):
//   INTRA: c0,c1 = 1,2 left of X; c6..c2 = x-2..x+2 one line up;
//          c9..c7 = x-1..x+1 two lines up.
//   INTER: c0 = left of X; c3,c2,c1 = x-1,x,x+1 one line up (current BAB);
//          MC BAB: c8 = one line up, c7,c6,c5 = x-1,x,x+1, c4 = one line down.
//
// Operation: start loads bordered lines 0, 1 and 2 of both BABs, one per
// clock (3 cycles, valid low), then the generator runs. Each clock with
// advance high the counter moves by one, or by two when shift2 is high.
// When it passes the end of the line the line registers move up one line
// and the next bordered line (y+3) is read into the coded-line register in
// the same clock, so no cycle is lost at line ends. A line that the host has
// not written yet (line_ready low) stops the start load, and while the next
// line is not ready valid stays low so the pipeline behind waits (the
// paper's stall when the BAB line buffers are not ready). After line 15 valid
// drops and done_o rises. In vertical scan the buffer delivers columns, so
// the same logic codes the transposed BAB. bab_size selects a 16x16, 8x8 or
// 4x4 (subsampled) BAB: the bordered BAB then occupies the first N+4 (MC:
// N+2) lines and bits of each line, and the counters wrap at N. stop returns
// the generator to idle (a coding process cut short).
//
// The line-buffer arrangement, one/two-position advance, counter and
// parallel start load follow the paper. The paper moves the data through
// four shift-register chains with border registers handled separately and
// changes which registers act as the line end for 4x4 and 8x8 BABs; this
// design keeps whole bordered lines and selects the template position with
// the counter, which gives the same contexts.
module cae_context_gen
  import cae_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              stop,       // abandon the BAB, go idle
  input  cae_mode_e         mode,
  input  bab_size_e         bab_size,   // sampled at start
  input  logic              advance,
  input  logic              shift2,
  // line read from the BAB buffer
  output logic [4:0]        rd_line,
  input  logic [CUR_W-1:0]  cur_line,
  input  logic [MC_W-1:0]   mc_line,
  input  logic              line_ready, // the line read holds written data
  // to the PL stage
  output logic              valid,
  output logic [9:0]        ctx_c,
  output logic [9:0]        ctx_r,
  output logic              sym_c,
  output logic              sym_r,
  output logic [3:0]        x,
  output logic              x_last,     // X is the last symbol of its line
  output logic              x_second_last,
  output logic              last_line,  // the coded line is line 15
  output logic              done_o
);
  typedef enum logic [1:0] { S_IDLE, S_LOAD, S_RUN, S_DONE } state_e;
  state_e st;
  logic [1:0]       ld_cnt;
  logic [3:0]       y;
  logic [3:0]       last_pos;   // N - 1
  bab_size_e        size_q;
  logic [CUR_W-1:0] lb1, lb2, lb3;
  logic [MC_W-1:0]  mb1, mb2, mb3;   // mb3: line above, mb2: coded line, mb1: line below

  // Lines padded with zeros so that X' at position 16 never indexes out of range
  logic [23:0] p1, p2, p3, q1, q2, q3;
  assign p1 = 24'(lb1);
  assign p2 = 24'(lb2);
  assign p3 = 24'(lb3);
  assign q1 = 24'(mb1);
  assign q2 = 24'(mb2);
  assign q3 = 24'(mb3);

  function automatic logic [9:0] context_at(input cae_mode_e m, input logic [4:0] px);
    logic [4:0] bc, mc;
    logic [9:0] c;
    bc = px + 5'd2;   // column in the bordered current BAB
    mc = px + 5'd1;   // column in the bordered MC BAB
    c  = '0;
    if (m == MODE_INTRA) begin
      c[0] = p1[bc-1]; c[1] = p1[bc-2];
      c[2] = p2[bc+2]; c[3] = p2[bc+1]; c[4] = p2[bc]; c[5] = p2[bc-1]; c[6] = p2[bc-2];
      c[7] = p3[bc+1]; c[8] = p3[bc];   c[9] = p3[bc-1];
    end else begin
      c[0] = p1[bc-1];
      c[1] = p2[bc+1]; c[2] = p2[bc]; c[3] = p2[bc-1];
      c[4] = q1[mc];
      c[5] = q2[mc+1]; c[6] = q2[mc]; c[7] = q2[mc-1];
      c[8] = q3[mc];
    end
    return c;
  endfunction

  logic [4:0] x_next;
  always_comb begin
    ctx_c     = context_at(mode, {1'b0, x});
    ctx_r     = context_at(mode, {1'b0, x} + 5'd1);
    sym_c     = p1[{1'b0, x} + 5'd2];
    sym_r     = p1[{1'b0, x} + 5'd3];
    last_pos  = 4'(bab_side(size_q) - 5'd1);
    x_last    = (x == last_pos);
    x_second_last = (x == last_pos - 4'd1);
    last_line = (y == last_pos);
    valid     = (st == S_RUN) && (line_ready || last_line);
    done_o    = (st == S_DONE);
    rd_line   = (st == S_LOAD) ? {3'd0, ld_cnt} : 5'({1'b0, y} + 5'd3);
    x_next    = {1'b0, x} + (shift2 ? 5'd2 : 5'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ld_cnt <= '0; x <= '0; y <= '0; size_q <= BAB_16;
      lb1 <= '0; lb2 <= '0; lb3 <= '0; mb1 <= '0; mb2 <= '0; mb3 <= '0;
    end else if (start) begin
      st <= S_LOAD; ld_cnt <= '0; x <= '0; y <= '0; size_q <= bab_size;
    end else if (stop) begin
      st <= S_IDLE;
    end else begin
      unique case (st)
        S_LOAD: if (line_ready) begin
          lb3 <= lb2; lb2 <= lb1; lb1 <= cur_line;
          mb3 <= mb2; mb2 <= mb1; mb1 <= mc_line;
          ld_cnt <= ld_cnt + 2'd1;
          if (ld_cnt == 2'd2) st <= S_RUN;
        end
        S_RUN: if (advance && valid) begin
          if (x_next > {1'b0, last_pos}) begin
            x <= '0;
            if (last_line) st <= S_DONE;
            else begin
              y <= y + 4'd1;
              lb3 <= lb2; lb2 <= lb1; lb1 <= cur_line;
              mb3 <= mb2; mb2 <= mb1; mb1 <= mc_line;
            end
          end else begin
            x <= x_next[3:0];
          end
        end
        default: ;
      endcase
    end
  end
endmodule
