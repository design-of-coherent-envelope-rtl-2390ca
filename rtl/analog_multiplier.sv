`timescale 1ns / 1ps
// analog_multiplier: behavioural model of an analog four-quadrant multiplier.
//
// y = K * a * b, with no bandwidth limit, offset or saturation. It models the
// two multipliers of the measurement chain: MUL1 (input wave times DDS1
// output) and MUL2 (reference-frequency signal times DDS2 output). The gain
// K is a parameter; its default of 1 is this design's choice.
module analog_multiplier #(
  parameter real K = 1.0
) (
  input  real a,
  input  real b,
  output real y
);
  always_comb y = K * a * b;
endmodule
