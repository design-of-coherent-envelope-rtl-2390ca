`timescale 1ns / 1ps
// phase_accumulator: double-triggered phase accumulator with offset phase.
//
// The comparator output CLK clocks the DDS on both of its edges, so the
// phase advances by FCW every half period of the input wave:
//   phase(k) = Phi_IN + k * FCW  (mod 2^N), k = number of active edges.
// The update only happens while Enable = 1. The result of the offset adder
// is split ("bits processing") into PA_15, the phase MSB that selects the
// half period, and PA, the remaining N-1 bits.
//
// Implementation: a flip-flop cannot be clocked by both edges, so two
// ordinary registers are used, one updated on the rising edge and one on the
// falling edge, each adding FCW when enabled. Their sum advances by FCW on
// every edge, which is exactly the double-triggered accumulator. The adder
// tree (acc_rise + acc_fall + phi_in) is combinational; PA_15/PA settle one
// adder delay after each CLK edge. Phi IN is added after the accumulator,
// as in the reference block diagram, so changing it shifts the phase at once.
// The asynchronous active-low reset (this design's choice; none is
// documented) clears both registers, so after reset the phase equals Phi IN.
module phase_accumulator #(
  parameter int unsigned N = dds_pkg::PHASE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic [N-1:0] fcw,
  input  logic [N-1:0] phi_in,
  output logic         pa_15,
  output logic [N-2:0] pa
);
  logic [N-1:0] acc_rise, acc_fall, phase;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      acc_rise <= '0;
    else if (enable) acc_rise <= acc_rise + fcw;

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n)      acc_fall <= '0;
    else if (enable) acc_fall <= acc_fall + fcw;

  always_comb begin
    phase = acc_rise + acc_fall + phi_in;
    pa_15 = phase[N-1];
    pa    = phase[N-2:0];
  end
endmodule
