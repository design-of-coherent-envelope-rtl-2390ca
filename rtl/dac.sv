`timescale 1ns / 1ps
// dac: behavioural model of the D/A converter after each DDS unit.
//
// Converts a DW-bit two's-complement sample to a proportional voltage,
//   vout = VFS * code / 2^(DW-1),
// so full-scale positive code gives just under VFS volts. The output follows
// the code at once, i.e. the DAC holds each sample until the next DDS clock
// edge (zero-order hold). Full-scale voltage and width are this design's
// choices.
module dac #(
  parameter int unsigned DW  = dds_pkg::SAMPLE_W,
  parameter real         VFS = 1.0
) (
  input  logic signed [DW-1:0] code,
  output real                  vout
);
  always_comb vout = VFS * real'(code) / real'(64'd1 << (DW - 1));
endmodule
