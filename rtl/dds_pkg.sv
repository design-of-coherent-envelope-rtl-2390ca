`timescale 1ns / 1ps
// dds_pkg: constants shared by the coherent envelope measurement circuit.
//
// The phase accumulator size (16 bits) is the design's documented value.
// The waveform memory size (1024 half-wave entries) and sample width
// (12 bits, two's complement) are this design's own choices: the original
// design does not state them.
package dds_pkg;
  // Phase accumulator width N.
  localparam int unsigned PHASE_W = 16;
  // Address bits of the half-wave sine memory.
  localparam int unsigned ROM_AW  = 10;
  // Width of a signed sine sample.
  localparam int unsigned SAMPLE_W = 12;

  typedef logic [PHASE_W-1:0] phase_t;
endpackage
