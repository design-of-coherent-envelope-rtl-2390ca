`timescale 1ns / 1ps
// comparator: behavioural model of the analog input comparator.
//
// Turns the input wave into the logic signal CLK: high while the input is
// above the threshold VTH, low otherwise. Each rising and falling edge of
// CLK clocks both DDS units, so CLK runs at the input frequency F_I and the
// DDS units see 2*F_I active edges per second. This is an analog part; the
// model is ideal (no offset, delay or hysteresis). Threshold 0 V is this
// design's choice for a zero-mean input wave.
module comparator #(
  parameter real VTH = 0.0
) (
  input  real  vin,
  output logic clk_out
);
  always_comb clk_out = (vin > VTH);
endmodule
