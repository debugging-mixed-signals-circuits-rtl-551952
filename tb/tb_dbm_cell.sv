// Self-checking testbench of the digital boundary module dbm_cell: capture
// of the pin, shift, update on the falling TCK edge, and the output
// multiplexer in normal and test mode, with random data.
`timescale 1ns/1ps
module tb_dbm_cell;
  import cdd_pkg::*;

  logic tck = 1'b0, trst_n = 1'b0;
  dr_ctrl_t ctrl = '0;
  logic mode = 0, si = 0, so, pi = 0, po;
  int checks = 0, failures = 0;

  dbm_cell dut (.*);

  always #5 tck = ~tck;

  initial begin
    #200000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic u_exp;
    #12 trst_n = 1'b1;
    u_exp = 1'b0;
    for (int k = 0; k < 100; k++) begin
      logic p, s;
      p = 1'($urandom); s = 1'($urandom);
      pi = p;
      @(negedge tck); ctrl.capture = 1;
      @(negedge tck); ctrl.capture = 0;
      chk("capture", so, p);
      mode = 1; #1 chk("po = U (held)", po, u_exp);
      mode = 0; #1 chk("po = PI", po, p);
      ctrl.shift = 1; si = s;
      @(negedge tck); ctrl.shift = 0;
      chk("shift", so, s);
      if (k % 2 == 0) begin
        @(posedge tck); ctrl.update = 1;
        @(negedge tck); #1 u_exp = s;
        ctrl.update = 0;
      end
      mode = 1; #1 chk("po = U", po, u_exp);
      mode = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
