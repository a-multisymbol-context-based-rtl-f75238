// cae_bab_buffer: bordered BAB buffer for the current BAB (20x20 pixels,
// 2-pixel border) and the motion-compensated BAB (18x18, 1-pixel border).
//
// The host writes one bordered row per clock (wr_mc selects the MC BAB).
// The context generator reads one line per clock: in horizontal scan a line
// is a row, in vertical scan it is a column, which makes the vertical scan a
// transposed horizontal scan. Bit j of a line is the pixel at position j
// along it (row or column index 0 = top/left border). Reads are
// combinational from the register array, as the paper builds its buffers
// from registers. Rows beyond the MC BAB read as zero.
//
// Every row has a written flag, cleared by clear (a new BAB) and set when
// the row is written, so coding may start while the host is still filling
// the buffer. line_ready tells the context generator that the line it reads
// holds data: in horizontal scan the current row (and the MC row for INTER
// coding) must have been written; in vertical scan every column needs all
// rows, so all side+4 current rows (and side+2 MC rows for INTER) must be.
// Host access, the flags and the line-per-read organisation are this
// design's choices; the sizes and the stall on lines that are not ready are
// the paper's.
module cae_bab_buffer
  import cae_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // host write port
  input  logic                clear,
  input  logic                wr_en,
  input  logic                wr_mc,
  input  logic [4:0]          wr_row,
  input  logic [CUR_W-1:0]    wr_data,     // MC rows use bits [17:0]
  // line read port
  input  cae_scan_e           scan,
  input  logic [4:0]          rd_line,
  output logic [CUR_W-1:0]    cur_line,
  output logic [MC_W-1:0]     mc_line,
  // readiness of the line being read
  input  logic                need_mc,
  input  logic [4:0]          side,      // BAB side N: 16, 8 or 4
  output logic                line_ready
);
  logic [CUR_W-1:0] cur_mem [CUR_W];
  logic [MC_W-1:0]  mc_mem  [MC_W];

  always_ff @(posedge clk) begin
    if (wr_en && !wr_mc && wr_row < 5'(CUR_W)) cur_mem[wr_row] <= wr_data;
    if (wr_en &&  wr_mc && wr_row < 5'(MC_W))  mc_mem[wr_row]  <= wr_data[MC_W-1:0];
  end

  logic [CUR_W-1:0] cur_ok;
  logic [MC_W-1:0]  mc_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_ok <= '0; mc_ok <= '0;
    end else if (clear) begin
      cur_ok <= '0; mc_ok <= '0;
    end else if (wr_en) begin
      if (!wr_mc && wr_row < 5'(CUR_W)) cur_ok[wr_row] <= 1'b1;
      if ( wr_mc && wr_row < 5'(MC_W))  mc_ok[wr_row]  <= 1'b1;
    end
  end

  logic all_cur, all_mc;
  always_comb begin
    all_cur = 1'b1;
    all_mc  = 1'b1;
    for (int j = 0; j < CUR_W; j++) if (5'(j) < side + 5'd4 && !cur_ok[j]) all_cur = 1'b0;
    for (int j = 0; j < MC_W; j++)  if (5'(j) < side + 5'd2 && !mc_ok[j])  all_mc  = 1'b0;
    if (scan == SCAN_H)
      line_ready = (rd_line < 5'(CUR_W)) && cur_ok[rd_line]
                   && (!need_mc || rd_line >= 5'(MC_W) || mc_ok[rd_line]);
    else
      line_ready = all_cur && (!need_mc || all_mc);
  end

  always_comb begin
    cur_line = '0;
    mc_line  = '0;
    if (scan == SCAN_H) begin
      if (rd_line < 5'(CUR_W)) cur_line = cur_mem[rd_line];
      if (rd_line < 5'(MC_W))  mc_line  = mc_mem[rd_line];
    end else begin
      for (int j = 0; j < CUR_W; j++)
        if (rd_line < 5'(CUR_W)) cur_line[j] = cur_mem[j][rd_line];
      for (int j = 0; j < MC_W; j++)
        if (rd_line < 5'(MC_W)) mc_line[j] = mc_mem[j][rd_line];
    end
  end
endmodule
