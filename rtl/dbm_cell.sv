// Digital boundary module (boundary-scan cell) for a digital input pin: input
// multiplexer, capture/shift flip-flop, update flip-flop and output
// multiplexer. Capture-DR samples the pin (pi) and Shift-DR shifts si, both on
// the rising TCK edge; Update-DR copies the shift stage to the update stage on
// the falling TCK edge. po follows the pin in normal operation and the update
// stage when mode is high.
module dbm_cell
  import cdd_pkg::*;
(
  input  logic     tck,
  input  logic     trst_n,
  input  dr_ctrl_t ctrl,
  input  logic     mode,
  input  logic     si,
  output logic     so,
  input  logic     pi,
  output logic     po
);
  logic u_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)           so <= 1'b0;
    else if (ctrl.shift)   so <= si;
    else if (ctrl.capture) so <= pi;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)          u_q <= 1'b0;
    else if (ctrl.update) u_q <= so;
  end

  assign po = mode ? u_q : pi;
endmodule
