// Block FC: drives the Valid Condition Output (VCO) pin. The pin is low
// unless the TAP controller is in Run-Test/Idle and a detection instruction
// (EXTEST2, PROBE2 or INTEST2, flagged by comp2) is active; then (VS1,VS0)
// selects DVC (00), AVC (01), DVC OR AVC (10) or DVC AND AVC (11), as in the
// VCO truth table of the design. Purely combinational.
module fc_vco (
  input  logic       rti,     // TAP controller in Run-Test/Idle
  input  logic       comp2,   // EXTEST2, PROBE2 or INTEST2 in the IR
  input  logic [1:0] vs,      // (VS1,VS0)
  input  logic       dvc,     // digital detector result
  input  logic       avc,     // analog detector result
  output logic       vco
);
  logic sel;
  always_comb begin
    unique case (vs)
      2'b00:   sel = dvc;
      2'b01:   sel = avc;
      2'b10:   sel = dvc | avc;
      default: sel = dvc & avc;
    endcase
    vco = rti & comp2 & sel;
  end
endmodule
