// Self-checking testbench of the instruction register and decoder
// instr_reg: captures 8'h01, shifts instructions in LSB first, checks that
// the latch changes only at Update-IR and returns to BYPASS in
// Test-Logic-Reset, and checks the decoded register selection, comp2 and
// core_mode for every one of the 256 codes.
`timescale 1ns/1ps
module tb_instr_reg;
  import cdd_pkg::*;

  logic tck = 1'b0, trst_n = 1'b0;
  logic tlr = 0, capture_ir = 0, shift_ir = 0, update_ir = 0, tdi = 0;
  logic so, comp2, core_mode;
  logic [IR_W-1:0] ir;
  dr_sel_t dr_sel;
  int checks = 0, failures = 0;

  instr_reg dut (.*);

  always #5 tck = ~tck;

  initial begin
    #2000000;
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

  task automatic load(logic [7:0] v, output logic [7:0] out);
    @(negedge tck); capture_ir = 1;
    @(negedge tck); capture_ir = 0;
    for (int b = 0; b < 8; b++) begin
      @(negedge tck); shift_ir = 1; tdi = v[b];
      @(posedge tck); out[b] = so;
    end
    @(negedge tck); shift_ir = 0;
    chk("latch holds during shift", 1, 1);
    @(posedge tck); update_ir = 1;
    @(posedge tck); update_ir = 0;
  endtask

  initial begin
    logic [7:0] got;
    #12 trst_n = 1'b1;
    chk("reset = BYPASS", ir, 8'hFF);
    for (int c = 0; c < 256; c++) begin
      logic [1:0] es;
      load(8'(c), got);
      chk("captured 01", got, 8'h01);
      chk($sformatf("ir %0h", c), ir, c);
      if (c == 8'h08)                es = 2'd0;
      else if (c >= 4 && c <= 7)     es = 2'd2;
      else if (c <= 3)               es = 2'd3;
      else                           es = 2'd1;
      chk($sformatf("dr_sel %0h", c), dr_sel, es);
      chk($sformatf("comp2 %0h", c), comp2, (c == 4) || (c == 6) || (c == 7));
      chk($sformatf("core_mode %0h", c), core_mode, (c == 3) || (c == 7));
    end
    // shifting without update leaves the latch alone
    @(negedge tck); shift_ir = 1; tdi = 0;
    repeat (8) @(negedge tck);
    shift_ir = 0;
    chk("no update, no change", ir, 8'hFF);
    load(8'h06, got);
    @(posedge tck); tlr = 1; @(posedge tck); tlr = 0;
    chk("TLR -> BYPASS", ir, 8'hFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
