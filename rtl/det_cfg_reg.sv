// Detection Configuration Register: an 8-bit test data register placed in
// the TDI-TDO path by the SELCON instruction. Bit order from TDI to TDO is
// C2D C1D C0D C2A C1A C0A VS1 VS0, so the configuration vector written
// MSB-first as (C2D..VS0) is shifted in LSB (VS0) first. A shift stage takes
// TDI on the rising TCK edge in Shift-DR; the parallel (update) stage is
// loaded on the falling TCK edge in Update-DR and drives the condition types
// of the digital and analog detectors and the VCO selection. Capture-DR loads
// the shift stage with the current parallel contents, so a scan reads back the
// active configuration (this read-back is this design's choice).
module det_cfg_reg
  import cdd_pkg::*;
(
  input  logic     tck,
  input  logic     trst_n,
  input  dr_ctrl_t ctrl,
  input  logic     si,
  output logic     so,
  output cond_op_t op_dig,    // (C2D,C1D,C0D)
  output cond_op_t op_ana,    // (C2A,C1A,C0A)
  output logic [1:0] vs       // (VS1,VS0)
);

  logic [7:0] sh_q, upd_q;    // bit 7 = C2D (TDI side), bit 0 = VS0 (TDO side)

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)           sh_q <= '0;
    else if (ctrl.shift)   sh_q <= {si, sh_q[7:1]};
    else if (ctrl.capture) sh_q <= upd_q;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)          upd_q <= '0;
    else if (ctrl.update) upd_q <= sh_q;
  end

  assign so     = sh_q[0];
  assign op_dig = cond_op_t'(upd_q[7:5]);
  assign op_ana = cond_op_t'(upd_q[4:2]);
  assign vs     = upd_q[1:0];

endmodule
