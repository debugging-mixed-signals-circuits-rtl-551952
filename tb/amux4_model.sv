// Behavioural model of the analog 4:1 multiplexer of the mission circuit
// (not synthesizable): with en high, out follows the input chosen by
// {s1,s0}; with en low the output is 0 V.
module amux4_model (
  input  real  in0,
  input  real  in1,
  input  real  in2,
  input  real  in3,
  input  logic en,
  input  logic s1,
  input  logic s0,
  output real  out
);
  always_comb begin
    if (!en)             out = 0.0;
    else case ({s1, s0})
      2'b00:   out = in0;
      2'b01:   out = in1;
      2'b10:   out = in2;
      default: out = in3;
    endcase
  end
endmodule
