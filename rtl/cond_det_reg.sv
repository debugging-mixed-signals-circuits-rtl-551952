// Condition Detector Register: an N-bit word comparator built from N
// cascaded one-bit comparators (cdr_cell), with FA providing the start code
// and FB decoding the final code into the Valid Condition output vc.
//
// The same module serves as the Analog Condition Detector Register (pi fed by
// the test ADC, po unused) and as the Digital Condition Detector Register
// (pi/po sit between a digital source and the digital mission circuit and
// replace the boundary cells that would otherwise be there).
//
// Bit order: cell N-1 is the most significant bit. It is next to FA and to
// the serial input, so comparison ripples from MSB to LSB and a word shifted
// in LSB first ends with its LSB in cell 0, next to the serial output. After
// a scan, the capture/shift stages hold the mask or limit B and, after an
// enabled update, the update stages hold limit A.
//
// Timing: shifting and capture on the rising TCK edge, update on the falling
// edge; vc is combinational from pi, the stored limits and op.
module cond_det_reg
  import cdd_pkg::*;
#(
  parameter int unsigned N = 12          // word width (ADC resolution)
)(
  input  logic         tck,
  input  logic         trst_n,
  input  dr_ctrl_t     ctrl,
  input  logic         mode,
  input  logic         si,
  output logic         so,
  input  logic [N-1:0] pi,
  output logic [N-1:0] po,
  input  cond_op_t     op,
  output logic         vc
);

  cmp_code_t code [N+1];       // code[N] from FA, code[0] into FB
  logic      sin  [N+1];       // sin[N] = si, sin[0] = so

  assign sin[N] = si;

  cdr_fa u_fa (.op(op), .i_code(code[N]));

  for (genvar b = N - 1; b >= 0; b--) begin : g_bit
    cdr_cell u_cell (
      .tck     (tck),
      .trst_n  (trst_n),
      .capture (ctrl.capture),
      .shift   (ctrl.shift),
      .update  (ctrl.update),
      .mode    (mode),
      .si      (sin[b+1]),
      .so      (sin[b]),
      .pi      (pi[b]),
      .po      (po[b]),
      .op      (op),
      .i_code  (code[b+1]),
      .q_code  (code[b])
    );
  end

  assign so = sin[0];

  cdr_fb u_fb (.op(op), .q_code(code[0]), .vc(vc));

endmodule
