// Bypass register: a single shift stage that captures 0 in Capture-DR and
// passes TDI to TDO with one TCK of delay in Shift-DR (rising TCK edge).
module bypass_reg
  import cdd_pkg::*;
(
  input  logic     tck,
  input  logic     trst_n,
  input  dr_ctrl_t ctrl,
  input  logic     si,
  output logic     so
);
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)           so <= 1'b0;
    else if (ctrl.shift)   so <= si;
    else if (ctrl.capture) so <= 1'b0;
  end
endmodule
