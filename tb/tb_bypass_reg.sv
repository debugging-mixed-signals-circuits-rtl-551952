// Self-checking testbench of the bypass register: a random bit stream comes
// out one TCK later, and Capture-DR loads 0.
`timescale 1ns/1ps
module tb_bypass_reg;
  import cdd_pkg::*;

  logic tck = 1'b0, trst_n = 1'b0, si = 0, so;
  dr_ctrl_t ctrl = '0;
  int checks = 0, failures = 0;

  bypass_reg dut (.*);

  always #5 tck = ~tck;

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    #12 trst_n = 1'b1;
    @(negedge tck); si = 1; ctrl.shift = 1;
    @(negedge tck); ctrl.shift = 0; ctrl.capture = 1;
    @(negedge tck); ctrl.capture = 0;
    checks++; if (so !== 1'b0) begin failures++; $display("FAIL capture 0"); end
    ctrl.shift = 1; prev = so;
    for (int k = 0; k < 200; k++) begin
      si = 1'($urandom);
      prev = si;
      @(negedge tck);
      checks++;
      if (so !== prev) begin failures++; $display("FAIL bit %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
