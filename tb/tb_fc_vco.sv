// Self-checking testbench of block FC (fc_vco): all 64 input combinations
// against the VCO truth table of the design.
`timescale 1ns/1ps
module tb_fc_vco;
  logic rti, comp2, dvc, avc, vco;
  logic [1:0] vs;
  int checks = 0, failures = 0;

  fc_vco dut (.*);

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      logic e;
      {rti, comp2, vs, dvc, avc} = 6'(k);
      #1;
      if (!rti || !comp2)   e = 1'b0;
      else if (vs == 2'b00) e = dvc;
      else if (vs == 2'b01) e = avc;
      else if (vs == 2'b10) e = dvc || avc;
      else                  e = dvc && avc;
      checks++;
      if (vco !== e) begin
        failures++;
        $display("FAIL rti=%b comp2=%b vs=%b dvc=%b avc=%b vco=%b", rti, comp2, vs, dvc, avc, vco);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
