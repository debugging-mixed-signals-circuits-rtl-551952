// One-bit comparator of a Condition Detector Register.
//
// A digital boundary module (DBM) -- input multiplexer, capture/shift (C/S)
// flip-flop, update (U) flip-flop and output multiplexer -- whose stored bits
// double as comparison limits, plus the combinational block F. The C/S stage
// holds the mask (for =A, /=A) or limit B (for the range operations); the U
// stage holds limit A. F compares the parallel input bit PI against them and
// turns the partial result of the more significant neighbour (i_code) into the
// partial result handed to the less significant one (q_code).
//
// Partial result codes (cdd_pkg::cmp_code_t): for =A and /=A the chain starts
// at TRUE and stays TRUE while every unmasked bit equals A (the truth table of
// the design for =A); for the magnitude operations it starts at EQ and moves
// to TRUE or FALSE at the first bit that differs from A; for the range
// operations EQ means "equal to A and to B", GTA "already above A, still equal
// to B" and LTB "already below B, still equal to A". The transition rules for
// the operations other than =A are this design's own; the design only gives
// the =A table and the list of result values.
//
// Timing: C/S captures PI (capture) or shifts SI (shift) on the rising TCK
// edge; U loads C/S on the falling TCK edge while update is high (the
// instruction decoder withholds update for EXTEST2/PROBE2/INTEST2). F is
// purely combinational. po = U when mode is high, PI otherwise.
module cdr_cell
  import cdd_pkg::*;
(
  input  logic      tck,
  input  logic      trst_n,
  input  logic      capture,
  input  logic      shift,
  input  logic      update,
  input  logic      mode,
  input  logic      si,
  output logic      so,
  input  logic      pi,
  output logic      po,
  input  cond_op_t  op,
  input  cmp_code_t i_code,
  output cmp_code_t q_code
);

  logic cs_q, u_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)      cs_q <= 1'b0;
    else if (shift)   cs_q <= si;
    else if (capture) cs_q <= pi;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n)     u_q <= 1'b0;
    else if (update) u_q <= cs_q;
  end

  assign so = cs_q;
  assign po = mode ? u_q : pi;

  // Block F
  always_comb begin
    q_code = Q_FALSE;
    unique case (op)
      OP_EQ, OP_NE: begin
        // cs_q is the mask: 0 = do not care
        if (i_code == Q_TRUE) q_code = (!cs_q || (pi == u_q)) ? Q_TRUE : Q_FALSE;
      end
      OP_GT, OP_GE: begin
        unique case (i_code)
          Q_EQ:    q_code = (pi == u_q) ? Q_EQ : (pi ? Q_TRUE : Q_FALSE);
          Q_TRUE:  q_code = Q_TRUE;
          default: q_code = Q_FALSE;
        endcase
      end
      OP_LT, OP_LE: begin
        unique case (i_code)
          Q_EQ:    q_code = (pi == u_q) ? Q_EQ : (pi ? Q_FALSE : Q_TRUE);
          Q_TRUE:  q_code = Q_TRUE;
          default: q_code = Q_FALSE;
        endcase
      end
      default: begin  // OP_IN, OP_OUT: A = u_q, B = cs_q
        unique case (i_code)
          Q_EQ: begin
            if (!pi && u_q)                    q_code = Q_FALSE;  // below A
            else if (pi && !cs_q)              q_code = Q_FALSE;  // above B
            else if (pi == u_q && pi == cs_q)  q_code = Q_EQ;
            else if (pi)                       q_code = Q_GTA;    // above A, equal B
            else                               q_code = Q_LTB;    // equal A, below B
          end
          Q_GTA:   q_code = (pi == cs_q) ? Q_GTA : (pi ? Q_FALSE : Q_TRUE);
          Q_LTB:   q_code = (pi == u_q)  ? Q_LTB : (pi ? Q_TRUE : Q_FALSE);
          Q_TRUE:  q_code = Q_TRUE;
          default: q_code = Q_FALSE;
        endcase
      end
    endcase
  end

endmodule
