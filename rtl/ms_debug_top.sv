// IEEE 1149.4 digital test access logic extended with a built-in
// mixed-signal condition detector, arranged as in the case-study circuit: an
// analog 4:1 multiplexer whose enable/select pins (EN,S1,S0) have boundary
// cells, a mission ADC (ADC1) whose output word passes through the Digital
// Condition Detector Register on its way to the digital mission circuit, and
// a test ADC (ADC2) on analog bus AB2 feeding the Analog Condition Detector
// Register. The analog parts (multiplexer, ADCs, analog boundary modules,
// TBIC) are outside this module; their digital signals are ports.
//
// Scan paths (TDI side first):
//   BSR (EXTEST, SAMPLE/PRELOAD, PROBE, INTEST):
//       DBM(EN) DBM(S1) DBM(S0) DCDR[ND-1] .. DCDR[0]
//   BSR + ACDR (EXTEST2, SAMPLE/PRELOAD2, PROBE2, INTEST2):
//       the BSR above, then ACDR[NA-1] .. ACDR[0]
//   Detection Configuration Register (SELCON): C2D C1D C0D C2A C1A C0A VS1 VS0
//   Bypass (BYPASS and unused codes)
// Under EXTEST2/PROBE2/INTEST2 the update stages of both Condition Detector
// Registers are frozen, so the scan leaves mask/limit B in their capture/shift
// stages and keeps limit A (loaded with SAMPLE/PRELOAD2) in the update stages.
// The VCO pin goes high while the TAP controller is in Run-Test/Idle, one of
// those three instructions is loaded and the selected combination of the
// digital (DVC) and analog (AVC) valid-condition signals holds. A board-level
// flip-flop (bp_clk_stop) turns VCO into a stopped processor clock.
//
// Timing: everything in the TCK domain changes on the rising edge except the
// update stages, the instruction latch and TDO, which change on the falling
// edge. VCO, AVC and DVC are combinational from the ADC words.
module ms_debug_top
  import cdd_pkg::*;
#(
  parameter int unsigned ND = 12,   // bits of the Digital Condition Detector Register (ADC1)
  parameter int unsigned NA = 12    // bits of the Analog Condition Detector Register (ADC2)
)(
  // test access port
  input  logic          tck,
  input  logic          tms,
  input  logic          tdi,
  input  logic          trst_n,
  output logic          tdo,
  output logic          tdo_en,
  // digital input pins EN,S1,S0 of the analog multiplexer, and its control
  input  logic [2:0]    mux_pins,     // {EN,S1,S0} at the pins
  output logic [2:0]    mux_ctl,      // {EN,S1,S0} to the multiplexer
  // mission ADC (ADC1) word and the digital mission circuit input
  input  logic [ND-1:0] adc1_code,
  output logic [ND-1:0] mission_din,
  // test ADC (ADC2) word, converted from analog bus AB2
  input  logic [NA-1:0] adc2_code,
  // detector outputs
  output logic          vco,
  output logic          avc,
  output logic          dvc,
  output tap_state_t    tap_state,
  output logic [IR_W-1:0] ir,
  // breakpoint clock stop
  input  logic          ext_clk,
  output logic          mission_clk
);

  // ---------------- TAP controller and instruction register -------------
  logic tlr, rti, capture_dr, shift_dr, update_dr, capture_ir, shift_ir, update_ir;
  logic ir_so, comp2, core_mode;
  dr_sel_t dr_sel;

  tap_ctrl u_tap (
    .tck, .trst_n, .tms, .state(tap_state), .tlr, .rti,
    .capture_dr, .shift_dr, .update_dr, .capture_ir, .shift_ir, .update_ir
  );

  instr_reg u_ir (
    .tck, .trst_n, .tlr, .capture_ir, .shift_ir, .update_ir, .tdi,
    .so(ir_so), .ir, .dr_sel, .comp2, .core_mode
  );

  // ---------------- per-register data register controls ----------------
  logic sel_bsr, sel_acdr;
  dr_ctrl_t c_bsr, c_cdr_d, c_acdr, c_dcr, c_byp;

  assign sel_bsr  = (dr_sel == DR_BSR) || (dr_sel == DR_BSR2);
  assign sel_acdr = (dr_sel == DR_BSR2);

  function automatic dr_ctrl_t gate(logic sel, logic upd_en);
    dr_ctrl_t c;
    c.capture = sel & capture_dr;
    c.shift   = sel & shift_dr;
    c.update  = sel & update_dr & upd_en;
    return c;
  endfunction

  assign c_bsr   = gate(sel_bsr, 1'b1);
  assign c_cdr_d = gate(sel_bsr, !comp2);
  assign c_acdr  = gate(sel_acdr, !comp2);
  assign c_dcr   = gate(dr_sel == DR_DCR, 1'b1);
  assign c_byp   = gate(dr_sel == DR_BYPASS, 1'b1);

  // ---------------- boundary scan register ------------------------------
  logic [3:0] bsr_chain;        // bsr_chain[3] = TDI, bsr_chain[0] into the DCDR
  assign bsr_chain[3] = tdi;

  for (genvar k = 2; k >= 0; k--) begin : g_pin
    dbm_cell u_dbm (
      .tck, .trst_n, .ctrl(c_bsr), .mode(core_mode),
      .si(bsr_chain[k+1]), .so(bsr_chain[k]),
      .pi(mux_pins[k]), .po(mux_ctl[k])
    );
  end

  cond_op_t op_dig, op_ana;
  logic [1:0] vs;
  logic bsr_so, acdr_so, dcr_so, byp_so;
  logic [NA-1:0] acdr_po_unused;

  cond_det_reg #(.N(ND)) u_dcdr (
    .tck, .trst_n, .ctrl(c_cdr_d), .mode(core_mode),
    .si(bsr_chain[0]), .so(bsr_so),
    .pi(adc1_code), .po(mission_din), .op(op_dig), .vc(dvc)
  );

  // ---------------- analog condition detector register ------------------
  cond_det_reg #(.N(NA)) u_acdr (
    .tck, .trst_n, .ctrl(c_acdr), .mode(1'b0),
    .si(bsr_so), .so(acdr_so),
    .pi(adc2_code), .po(acdr_po_unused), .op(op_ana), .vc(avc)
  );

  // ---------------- detection configuration and bypass ------------------
  det_cfg_reg u_dcr (
    .tck, .trst_n, .ctrl(c_dcr), .si(tdi), .so(dcr_so),
    .op_dig, .op_ana, .vs
  );

  bypass_reg u_byp (.tck, .trst_n, .ctrl(c_byp), .si(tdi), .so(byp_so));

  // ---------------- FC and VCO -----------------------------------------
  fc_vco u_fc (.rti, .comp2, .vs, .dvc, .avc, .vco);

  // ---------------- TDO multiplexers -----------------------------------
  logic dr_so;
  always_comb begin
    unique case (dr_sel)
      DR_DCR:    dr_so = dcr_so;
      DR_BYPASS: dr_so = byp_so;
      DR_BSR2:   dr_so = acdr_so;
      default:   dr_so = bsr_so;
    endcase
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_en <= 1'b0;
    end else begin
      tdo    <= shift_ir ? ir_so : dr_so;
      tdo_en <= shift_ir | shift_dr;
    end
  end

  // ---------------- rules of the detector ----------------------------
  // VCO may only be high in Run-Test/Idle under a detection instruction, and
  // those instructions must never let Update-DR reach the detector registers.
  always_comb begin
    if (trst_n) begin
      a_vco_gated:    assert (!vco || (rti && comp2));
      a_upd_frozen_d: assert (!(comp2 && c_cdr_d.update));
      a_upd_frozen_a: assert (!(comp2 && c_acdr.update));
    end
  end

  // ---------------- breakpoint clock stop (board level) ----------------
  bp_clk_stop u_clk (.ext_clk, .vco, .mission_clk);

endmodule
