// tb_cae_rn: checks one renormalisation iteration against the three
// situations (L >= HALF: bit 1; L + R <= HALF: bit 0; otherwise
// bits_to_follow + 1 and L - QUARTER), the doubling of L and R, and the
// request for another iteration.
`timescale 1ns/1ps
module tb_cae_rn;
  import cae_pkg::*;
  logic [31:0] r_in, l_in, r_out, l_out;
  logic [BTF_W-1:0] btf_in, btf_out;
  logic out0, out1, rn_more;
  cae_rn dut (.*);
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 20000; i++) begin
      longint unsigned r, l, el, er;
      int unsigned b, eb;
      bit e0, e1;
      r = 1 + ($urandom % 32'h3FFF_FFFF);
      case (i % 3)
        0: l = 64'h8000_0000 + ($urandom % (64'h8000_0000 - r));
        1: l = $urandom % (64'h8000_0000 - r + 1);
        default: l = 64'h8000_0000 - r + 1 + ($urandom % r);
      endcase
      if (l + r > 64'h1_0000_0000) l = 64'h1_0000_0000 - r;
      b = $urandom % 200;
      r_in = 32'(r); l_in = 32'(l); btf_in = 8'(b);
      e0 = 0; e1 = 0; eb = b;
      if (l >= 64'h8000_0000) begin e1 = 1; eb = 0; l = l - 64'h8000_0000; seen[0]++; end
      else if (l + r <= 64'h8000_0000) begin e0 = 1; eb = 0; seen[1]++; end
      else begin eb = b + 1; l = l - 64'h4000_0000; seen[2]++; end
      el = (l << 1) & 64'hFFFF_FFFF; er = r << 1;
      #1;
      checks++;
      if (r_out != 32'(er) || l_out != 32'(el) || btf_out != 8'(eb) || out0 != e0 || out1 != e1
          || rn_more != (er < 64'h4000_0000)) begin
        failures++;
        $display("FAIL R=%h L=%h: got R=%h L=%h btf=%0d o0=%0d o1=%0d", r_in, l_in, r_out, l_out,
                 btf_out, out0, out1);
      end
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
