// Self-checking testbench of the Detection Configuration Register
// det_cfg_reg: shifts configuration vectors in (C2D first on the TDI side,
// VS0 last), checks that outputs change only at the update, that the field
// split into digital/analog condition types and VCO selection is right, and
// that a capture reads the active vector back out of TDO.
`timescale 1ns/1ps
module tb_det_cfg_reg;
  import cdd_pkg::*;

  logic tck = 1'b0, trst_n = 1'b0;
  dr_ctrl_t ctrl = '0;
  logic si = 0, so;
  cond_op_t op_dig, op_ana;
  logic [1:0] vs;
  int checks = 0, failures = 0;

  det_cfg_reg dut (.*);

  always #5 tck = ~tck;

  initial begin
    #200000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // vector written (C2D,...,VS0): VS0 (bit 0) is shifted first
  task automatic scan(logic [7:0] v, output logic [7:0] out);
    for (int b = 0; b < 8; b++) begin
      @(negedge tck); ctrl.shift = 1; si = v[b];
      @(posedge tck); out[b] = so;
    end
    @(negedge tck); ctrl.shift = 0;
  endtask

  initial begin
    logic [7:0] got, v;
    #12 trst_n = 1'b1;
    chk("reset", {op_dig, op_ana, vs}, 8'h00);

    // the case-study vector: <A digital, >A analog, OR
    scan(8'h6A, got);
    chk("no change before update", {op_dig, op_ana, vs}, 8'h00);
    @(negedge tck); ctrl.update = 1; @(negedge tck); ctrl.update = 0;
    chk("op_dig", op_dig, OP_LT);
    chk("op_ana", op_ana, OP_GT);
    chk("vs", vs, 2'b10);

    for (int t = 0; t < 30; t++) begin
      logic [7:0] prev;
      prev = {op_dig, op_ana, vs};
      v = 8'($urandom);
      @(negedge tck); ctrl.capture = 1; @(negedge tck); ctrl.capture = 0;
      scan(v, got);
      chk("read back", got, prev);
      @(negedge tck); ctrl.update = 1; @(negedge tck); ctrl.update = 0;
      chk("fields", {op_dig, op_ana, vs}, v);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
