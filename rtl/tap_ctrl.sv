// IEEE 1149.1 TAP controller: the 16-state machine advanced by TMS on the
// rising TCK edge, with the conventional 4-bit state codes (Test-Logic-Reset
// = F, Run-Test/Idle = C, Shift-DR = 2, Update-DR = 5, ...), which are also
// the codes seen in the design's simulation traces. trst_n is an asynchronous
// reset to Test-Logic-Reset. The outputs decode the current state for the
// instruction register, the test data registers and block FC; all are
// combinational from the state register.
module tap_ctrl
  import cdd_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_t state,
  output logic       tlr,          // Test-Logic-Reset
  output logic       rti,          // Run-Test/Idle
  output logic       capture_dr,
  output logic       shift_dr,
  output logic       update_dr,
  output logic       capture_ir,
  output logic       shift_ir,
  output logic       update_ir
);

  tap_state_t nxt;

  always_comb begin
    unique case (state)
      ST_TLR:        nxt = tms ? ST_TLR       : ST_RTI;
      ST_RTI:        nxt = tms ? ST_SEL_DR    : ST_RTI;
      ST_SEL_DR:     nxt = tms ? ST_SEL_IR    : ST_CAPTURE_DR;
      ST_CAPTURE_DR: nxt = tms ? ST_EXIT1_DR  : ST_SHIFT_DR;
      ST_SHIFT_DR:   nxt = tms ? ST_EXIT1_DR  : ST_SHIFT_DR;
      ST_EXIT1_DR:   nxt = tms ? ST_UPDATE_DR : ST_PAUSE_DR;
      ST_PAUSE_DR:   nxt = tms ? ST_EXIT2_DR  : ST_PAUSE_DR;
      ST_EXIT2_DR:   nxt = tms ? ST_UPDATE_DR : ST_SHIFT_DR;
      ST_UPDATE_DR:  nxt = tms ? ST_SEL_DR    : ST_RTI;
      ST_SEL_IR:     nxt = tms ? ST_TLR       : ST_CAPTURE_IR;
      ST_CAPTURE_IR: nxt = tms ? ST_EXIT1_IR  : ST_SHIFT_IR;
      ST_SHIFT_IR:   nxt = tms ? ST_EXIT1_IR  : ST_SHIFT_IR;
      ST_EXIT1_IR:   nxt = tms ? ST_UPDATE_IR : ST_PAUSE_IR;
      ST_PAUSE_IR:   nxt = tms ? ST_EXIT2_IR  : ST_PAUSE_IR;
      ST_EXIT2_IR:   nxt = tms ? ST_UPDATE_IR : ST_SHIFT_IR;
      default:       nxt = tms ? ST_SEL_DR    : ST_RTI;      // ST_UPDATE_IR
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= ST_TLR;
    else         state <= nxt;
  end

  assign tlr        = (state == ST_TLR);
  assign rti        = (state == ST_RTI);
  assign capture_dr = (state == ST_CAPTURE_DR);
  assign shift_dr   = (state == ST_SHIFT_DR);
  assign update_dr  = (state == ST_UPDATE_DR);
  assign capture_ir = (state == ST_CAPTURE_IR);
  assign shift_ir   = (state == ST_SHIFT_IR);
  assign update_ir  = (state == ST_UPDATE_IR);

endmodule
