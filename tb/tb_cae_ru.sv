// tb_cae_ru: checks the single-symbol range update against the coder
// equations computed in 64-bit arithmetic: LPS choice from c0, rLPS =
// R[31:16]*cLPS, the LPS/MPS updates of R and L and the renormalisation
// request, for random and corner-case operands.
`timescale 1ns/1ps
module tb_cae_ru;
  import cae_pkg::*;
  logic [31:0] r_in, l_in, r_out, l_out;
  logic [15:0] c0;
  logic symbol, rn_need;
  cae_ru dut (.*);
  int checks = 0, failures = 0;
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic one(logic [31:0] r, logic [31:0] l, logic [15:0] c, logic s);
    longint unsigned c1, clps, rlps, er, el;
    bit lps;
    r_in = r; l_in = l; c0 = c; symbol = s;
    #1;
    c1 = 65536 - c; lps = (c > c1); clps = lps ? c1 : c;
    rlps = (r >> 16) * clps;
    if (s == lps) begin er = rlps; el = (l + r - rlps) & 32'hFFFF_FFFF; end
    else begin er = r - rlps; el = l; end
    checks++;
    if (r_out != 32'(er) || l_out != 32'(el) || rn_need != (er < 64'h4000_0000)) begin
      failures++;
      $display("FAIL r=%h l=%h c0=%0d s=%0d: got R=%h L=%h rn=%0d exp R=%h L=%h", r, l, c, s,
               r_out, l_out, rn_need, er, el);
    end
  endtask
  initial begin
    one(32'h7FFF_FFFF, 0, 16'd65267, 1);
    one(32'h7FFF_FFFF, 0, 16'd65267, 0);
    one(32'h4000_0000, 32'h1234_5678, 16'd32768, 0);
    one(32'h4000_0000, 32'h1234_5678, 16'd32768, 1);
    one(32'h4000_0000, 32'h0, 16'd32769, 1);
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] r, l;
      r = 32'h4000_0000 + ($urandom % 32'h4000_0000);
      l = $urandom;
      if (32'(l + r) < l) l = l - r;   // keep L + R within the unit interval
      one(r, l, 16'(1 + $urandom % 65535), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
