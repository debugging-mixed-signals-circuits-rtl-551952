// Self-checking testbench of the breakpoint clock stop bp_clk_stop: with vco
// low the processor clock toggles on each rising edge of the generator clock;
// raising vco forces it low at once and holds it low; lowering vco lets it
// run again.
`timescale 1ns/1ps
module tb_bp_clk_stop;
  logic ext_clk = 1'b0, vco = 1'b1, mission_clk;
  int checks = 0, failures = 0;

  bp_clk_stop dut (.*);

  always #5 ext_clk = ~ext_clk;

  initial begin
    #100000;
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
    logic exp;
    #12;
    chk("held low by vco", mission_clk, 1'b0);
    for (int r = 0; r < 5; r++) begin
      @(negedge ext_clk); vco = 0; exp = 0;
      for (int k = 0; k < 10 + r; k++) begin
        @(posedge ext_clk); #1 exp = ~exp;
        chk("toggles", mission_clk, exp);
      end
      #2 vco = 1; #1;
      chk("forced low", mission_clk, 1'b0);
      repeat (4) begin @(posedge ext_clk); #1 chk("stays low", mission_clk, 1'b0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
