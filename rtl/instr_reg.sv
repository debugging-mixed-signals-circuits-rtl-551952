// Instruction register and instruction decoder.
//
// An 8-bit shift stage (TDI enters at bit 7, bit 0 drives TDO) captures
// 8'b0000_0001 in Capture-IR, shifts on the rising TCK edge in Shift-IR and is
// copied to the instruction latch on the falling TCK edge in Update-IR. The
// latch returns to BYPASS (8'hFF) in Test-Logic-Reset and on trst_n.
//
// The decoder maps the instruction onto the test data register multiplexer:
// SELCON selects the Detection Configuration Register (input 0); BYPASS and
// every unused code the bypass register (1); EXTEST2, SAMPLE/PRELOAD2, PROBE2
// and INTEST2 the BSR followed by the Analog Condition Detector Register (2);
// EXTEST, SAMPLE/PRELOAD, PROBE and INTEST the BSR alone (3). comp2 flags
// EXTEST2, PROBE2 and INTEST2: it enables the VCO pin and blocks the update
// stage of both Condition Detector Registers so that a scan under these
// instructions can set mask/limit B without overwriting limit A. core_mode
// makes the boundary cells drive the core from their update stages (INTEST,
// INTEST2). All decoder outputs are combinational from the latch.
module instr_reg
  import cdd_pkg::*;
(
  input  logic            tck,
  input  logic            trst_n,
  input  logic            tlr,
  input  logic            capture_ir,
  input  logic            shift_ir,
  input  logic            update_ir,
  input  logic            tdi,
  output logic            so,
  output logic [IR_W-1:0] ir,
  output dr_sel_t         dr_sel,
  output logic            comp2,
  output logic            core_mode
);

  logic [IR_W-1:0] sh_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)         sh_q <= '0;
    else if (shift_ir)   sh_q <= {tdi, sh_q[IR_W-1:1]};
    else if (capture_ir) sh_q <= IR_W'(1);
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)        ir <= INS_BYPASS;
    else if (tlr)       ir <= INS_BYPASS;
    else if (update_ir) ir <= sh_q;
  end

  assign so = sh_q[0];

  always_comb begin
    unique case (ir)
      INS_SELCON:                                   dr_sel = DR_DCR;
      INS_EXTEST2, INS_SAMPLE2, INS_PROBE2, INS_INTEST2: dr_sel = DR_BSR2;
      INS_EXTEST, INS_SAMPLE, INS_PROBE, INS_INTEST:     dr_sel = DR_BSR;
      default:                                      dr_sel = DR_BYPASS;
    endcase
    comp2     = (ir == INS_EXTEST2) || (ir == INS_PROBE2) || (ir == INS_INTEST2);
    core_mode = (ir == INS_INTEST)  || (ir == INS_INTEST2);
  end

endmodule
