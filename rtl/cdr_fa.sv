// Block FA of a Condition Detector Register: supplies the partial result
// (I2,I1,I0) that enters the most significant one-bit comparator. The
// equality operations start from TRUE (every bit still has to match), all
// magnitude and range operations from EQ (nothing decided yet). Purely
// combinational. The start codes are this design's choice.
module cdr_fa
  import cdd_pkg::*;
(
  input  cond_op_t  op,
  output cmp_code_t i_code
);
  always_comb begin
    unique case (op)
      OP_EQ, OP_NE: i_code = Q_TRUE;
      default:      i_code = Q_EQ;
    endcase
  end
endmodule
