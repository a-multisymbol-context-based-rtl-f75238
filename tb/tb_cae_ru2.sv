// tb_cae_ru2: checks the two-symbol range update against
// R1 = R - R[31:16]*cLPS, R2 = R1 - R1[31:16]*cLPS with cLPS = 269, 235, 4, 14
// for the four (mode, all-0/all-1) selections, plus the split and
// renormalisation flags, for random ranges near and above QUARTER.
`timescale 1ns/1ps
module tb_cae_ru2;
  import cae_pkg::*;
  logic [31:0] r_in, r_one, r_two;
  cae_mode_e pred_type;
  logic clps_sel, split, rn_need;
  cae_ru2 dut (.*);
  int checks = 0, failures = 0;
  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int unsigned clps_tab [4] = '{269, 235, 4, 14};
    for (int i = 0; i < 20000; i++) begin
      longint unsigned r, r1, r2, c;
      int k;
      k = i % 4;
      if (i % 3 == 0) r = 32'h4000_0000 + ($urandom % 32'h0010_0000);   // close to QUARTER
      else            r = 32'h4000_0000 + ($urandom % 32'h4000_0000);
      c = clps_tab[k];
      r1 = r - (r >> 16) * c;
      r2 = r1 - (r1 >> 16) * c;
      r_in = 32'(r); pred_type = k[1] ? MODE_INTER : MODE_INTRA; clps_sel = k[0];
      #1;
      checks++;
      if (r_one != 32'(r1) || r_two != 32'(r2) || split != (r1 < 64'h4000_0000)
          || rn_need != (r1 < 64'h4000_0000 || r2 < 64'h4000_0000)) begin
        failures++;
        $display("FAIL k=%0d R=%h: got %h %h split=%0d rn=%0d exp %h %h", k, r, r_one, r_two,
                 split, rn_need, r1, r2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
