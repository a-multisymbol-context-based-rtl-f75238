// cae_pkg: constants and types shared by the blocks of the two-symbol
// context-based arithmetic encoder (CAE) for MPEG-4 binary shape.
//
// The coder works on 32-bit fixed-point registers L (low end of the interval)
// and R (range). HALF and QUARTER are the renormalisation thresholds. The
// probability table holds c0, the 16-bit probability that a pixel is 0.
// The four cLPS constants are those of the contexts whose bits are all 0 or
// all 1 (INTRA: 10-bit context, INTER: 9-bit context); only these contexts
// are allowed on the two-symbol path.
package cae_pkg;

  localparam logic [31:0] HALF    = 32'h8000_0000;
  localparam logic [31:0] QUARTER = 32'h4000_0000;
  // Initial range at the start of every coding process (just under HALF).
  localparam logic [31:0] R_INIT  = 32'h7FFF_FFFF;

  // cLPS of the all-0 / all-1 contexts, as 16-bit values
  localparam logic [15:0] CLPS_INTRA0 = 16'd269;  // 9'b1_0000_1101
  localparam logic [15:0] CLPS_INTRA1 = 16'd235;  // 256 - 16 - 4 - 1 (signed digits)
  localparam logic [15:0] CLPS_INTER0 = 16'd4;    // 4'b0100
  localparam logic [15:0] CLPS_INTER1 = 16'd14;   // 16 - 2 (signed digits)

  // Bordered BAB geometry
  localparam int unsigned BAB     = 16;   // BAB side in pixels
  localparam int unsigned CUR_W   = 20;   // bordered current BAB side (2-pixel border)
  localparam int unsigned MC_W    = 18;   // bordered MC BAB side (1-pixel border)

  // Renormalisation buffer entry: the code bit and the bits_to_follow count
  localparam int unsigned BTF_W   = 8;
  typedef struct packed {
    logic             bit_val;
    logic [BTF_W-1:0] btf;
  } rn_entry_t;

  typedef enum logic { MODE_INTRA = 1'b0, MODE_INTER = 1'b1 } cae_mode_e;
  typedef enum logic { SCAN_H = 1'b0, SCAN_V = 1'b1 } cae_scan_e;

  // Size of the coded (possibly subsampled) BAB: 16x16, 8x8 or 4x4 pixels.
  // A smaller BAB keeps the same border widths and sits in the top-left
  // corner of the BAB buffer.
  typedef enum logic [1:0] { BAB_16 = 2'd0, BAB_8 = 2'd1, BAB_4 = 2'd2 } bab_size_e;

  function automatic logic [4:0] bab_side(bab_size_e sz);
    unique case (sz)
      BAB_8:   return 5'd8;
      BAB_4:   return 5'd4;
      default: return 5'd16;
    endcase
  endfunction

  // Output bits of one coding process held per bitstream buffer bank
  localparam int unsigned BS_BITS = 298;
  localparam int unsigned BS_AW   = $clog2(BS_BITS + 1);

endpackage
