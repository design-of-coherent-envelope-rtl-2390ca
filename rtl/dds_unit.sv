`timescale 1ns / 1ps
// dds_unit: digital core of one direct digital synthesizer.
//
// A double-triggered phase accumulator (FCW added on both edges of the
// comparator clock while Enable = 1, Phi IN added as offset) addresses the
// sine waveform memory. With the comparator toggling at the input frequency
// F_I, the output frequency is f = 2 * FCW / 2^N * F_I.
// The output sample is combinational from the phase registers and changes
// right after every CLK edge; the D/A converter and reconstruction filter
// that follow it in the analog path are separate models.
module dds_unit #(
  parameter int unsigned N      = dds_pkg::PHASE_W,
  parameter int unsigned ROM_AW = dds_pkg::ROM_AW,
  parameter int unsigned DW     = dds_pkg::SAMPLE_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic [N-1:0]         fcw,
  input  logic [N-1:0]         phi_in,
  output logic signed [DW-1:0] sample
);
  logic         pa_15;
  logic [N-2:0] pa;

  phase_accumulator #(.N(N)) u_pa (
    .clk, .rst_n, .enable, .fcw, .phi_in, .pa_15, .pa
  );

  waveform_rom #(.N(N), .ROM_AW(ROM_AW), .DW(DW)) u_rom (
    .pa_15, .pa, .sample
  );
endmodule
