// Breakpoint clock stop: the board-level flip-flop that sits between an
// external clock generator and the clock input of the circuit under debug.
// While vco is low it toggles on every rising edge of ext_clk, so the
// microprocessor clock runs at half the generator frequency; while vco is high
// it is held in reset and the clock stays low, freezing the processor at the
// breakpoint. vco acts as an asynchronous reset. The toggle connection is this
// design's choice; the design states only that a high VCO forces the clock low.
module bp_clk_stop (
  input  logic ext_clk,
  input  logic vco,
  output logic mission_clk
);
  always_ff @(posedge ext_clk or posedge vco) begin
    if (vco) mission_clk <= 1'b0;
    else     mission_clk <= ~mission_clk;
  end
endmodule
