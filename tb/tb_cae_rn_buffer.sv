// tb_cae_rn_buffer: random pushes and pops against a queue model of an
// 8-entry FIFO: head value, full and empty flags, ignored pop when empty,
// clear, and that the buffer really holds 8 entries.
`timescale 1ns/1ps
module tb_cae_rn_buffer;
  import cae_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, push, pop, full, empty;
  rn_entry_t din, dout;
  cae_rn_buffer dut (.*);
  int checks = 0, failures = 0, nfull = 0;
  rn_entry_t model [$];
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    clear = 0; push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      checks++;
      if (full != (model.size() == 8) || empty != (model.size() == 0)
          || (model.size() > 0 && dout != model[0])) begin
        failures++;
        if (failures < 5) $display("FAIL size=%0d full=%0d empty=%0d", model.size(), full, empty);
      end
      if (full) nfull++;
      clear = (i % 5000) == 4999;
      // phases: mostly filling, then mostly draining
      push = !full && (($urandom % 100) < (((i / 200) % 2) ? 30 : 70));
      pop  = ($urandom % 100) < (((i / 200) % 2) ? 70 : 30);
      din  = rn_entry_t'(9'($urandom));
      @(posedge clk);
      if (clear) model.delete();
      else begin
        if (pop && model.size() > 0) void'(model.pop_front());
        if (push) model.push_back(din);
      end
    end
    checks++;
    if (nfull == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
