// Behavioural model of an N-bit analog-to-digital converter (not
// synthesizable): an ideal, instantaneous converter with input range
// [VMIN, VMAX) volts. code = floor((vin - VMIN) / (VMAX - VMIN) * 2**N),
// clipped to 0 .. 2**N - 1. Used for both the mission ADC and the test ADC on
// analog bus AB2.
module adc_model #(
  parameter int  N    = 12,
  parameter real VMIN = -10.0,
  parameter real VMAX = 10.0
)(
  input  real          vin,
  output logic [N-1:0] code
);
  always_comb begin
    real x;
    x = (vin - VMIN) / (VMAX - VMIN) * (2.0 ** N);
    if (x < 0.0)               code = '0;
    else if (x >= 2.0 ** N)    code = '1;
    else                       code = N'($rtoi(x));
  end
endmodule
