// Block FB of a Condition Detector Register: decodes the partial result
// (Q2,Q1,Q0) of the least significant one-bit comparator into the Valid
// Condition output. EQ at the end means the word equals A (and B), so it
// makes >=A, <=A and the inclusive range true; /=A and "not in [A,B]" are the
// complements of =A and "in [A,B]". Purely combinational.
module cdr_fb
  import cdd_pkg::*;
(
  input  cond_op_t  op,
  input  cmp_code_t q_code,
  output logic      vc
);
  always_comb begin
    unique case (op)
      OP_EQ:        vc = (q_code == Q_TRUE);
      OP_NE:        vc = (q_code != Q_TRUE);
      OP_GT, OP_LT: vc = (q_code == Q_TRUE);
      OP_GE, OP_LE: vc = (q_code == Q_TRUE) || (q_code == Q_EQ);
      OP_IN:        vc = (q_code != Q_FALSE);
      default:      vc = (q_code == Q_FALSE);   // OP_OUT
    endcase
  end
endmodule
