// Self-checking testbench of the TAP controller tap_ctrl: a random TMS walk
// compared step by step with a reference next-state table written as a
// constant array (IEEE 1149.1 state diagram), plus the rule that five TMS=1
// clocks reach Test-Logic-Reset from any state, and the state decodes.
`timescale 1ns/1ps
module tb_tap_ctrl;
  import cdd_pkg::*;

  logic tck = 1'b0, trst_n = 1'b0, tms = 1'b1;
  tap_state_t state;
  logic tlr, rti, capture_dr, shift_dr, update_dr, capture_ir, shift_ir, update_ir;
  int checks = 0, failures = 0;

  tap_ctrl dut (.*);

  always #5 tck = ~tck;

  initial begin
    #500000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // next state for tms = 0 / tms = 1, indexed by the 4-bit state code
  logic [3:0] nxt0 [16] = '{4'h2, 4'h3, 4'h2, 4'h3, 4'hE, 4'hC, 4'h2, 4'h6,
                            4'hA, 4'hB, 4'hA, 4'hB, 4'hC, 4'hC, 4'hA, 4'hC};
  logic [3:0] nxt1 [16] = '{4'h5, 4'h5, 4'h1, 4'h0, 4'hF, 4'h7, 4'h1, 4'h4,
                            4'hD, 4'hD, 4'h9, 4'h8, 4'h7, 4'h7, 4'h9, 4'hF};

  task automatic chk(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    logic [3:0] exp;
    #12 trst_n = 1'b1;
    chk("reset state", state, 4'hF);
    exp = 4'hF;
    for (int k = 0; k < 3000; k++) begin
      @(negedge tck);
      tms = ($urandom_range(0, 99) < 40);
      exp = tms ? nxt1[exp] : nxt0[exp];
      @(posedge tck); #1;
      chk($sformatf("step %0d", k), state, exp);
      chk("decodes", {tlr, rti, capture_dr, shift_dr, update_dr, capture_ir, shift_ir, update_ir},
          {exp == 4'hF, exp == 4'hC, exp == 4'h6, exp == 4'h2, exp == 4'h5,
           exp == 4'hE, exp == 4'hA, exp == 4'hD});
      if (k % 500 == 250) begin
        repeat (5) begin @(negedge tck); tms = 1; end
        @(posedge tck); #1;
        chk("five TMS=1 reach TLR", state, 4'hF);
        exp = 4'hF;
      end
    end
    // asynchronous reset
    @(negedge tck); tms = 0; @(negedge tck); #2 trst_n = 0; #1;
    chk("trst_n", state, 4'hF);
    trst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
