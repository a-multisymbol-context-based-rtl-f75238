// tb_cae_ru2_ctrl: checks the pair decision of the RU2 control for random
// contexts biased towards all-0 / all-1 patterns, in both modes, against
// the rule: two-symbol processing on, X not last in its line, context of X
// all 0 or all 1 (10 or 9 bits), same context for X', X' equal to the MPS.
`timescale 1ns/1ps
module tb_cae_ru2_ctrl;
  import cae_pkg::*;
  logic ms_en, x_last, sym_r, enable_ru2, clps_sel;
  cae_mode_e mode;
  logic [9:0] ctx_c, ctx_r;
  cae_ru2_ctrl dut (.*);
  int checks = 0, failures = 0, npair = 0;
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [9:0] pick(int sel, bit inter);
    case (sel % 4)
      0: return 10'h000;
      1: return inter ? 10'h1FF : 10'h3FF;
      2: return inter ? 10'h3FF : 10'h000 | 10'(1 << ($urandom % 10));
      default: return 10'($urandom);
    endcase
  endfunction
  initial begin
    for (int i = 0; i < 20000; i++) begin
      bit inter, exp_pair, a0, a1;
      int nb;
      logic [9:0] m;
      inter = $urandom % 2;
      mode = inter ? MODE_INTER : MODE_INTRA;
      ms_en = ($urandom % 8) != 0;
      x_last = ($urandom % 8) == 0;
      ctx_c = pick($urandom, inter);
      ctx_r = ($urandom % 4 != 0) ? ctx_c : pick($urandom, inter);
      sym_r = $urandom % 2;
      #1;
      nb = inter ? 9 : 10;
      m = 10'((1 << nb) - 1);
      a0 = (ctx_c & m) == 0;
      a1 = (ctx_c & m) == m;
      exp_pair = ms_en && !x_last && (a0 || a1) && ((ctx_r & m) == (ctx_c & m)) && (sym_r == a1);
      npair += exp_pair;
      checks++;
      if (enable_ru2 != exp_pair || (exp_pair && clps_sel != a1)) begin
        failures++;
        $display("FAIL inter=%0d ctx=%h ctx_r=%h sym_r=%0d: pair=%0d sel=%0d", inter, ctx_c, ctx_r,
                 sym_r, enable_ru2, clps_sel);
      end
    end
    checks++;
    if (npair == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
