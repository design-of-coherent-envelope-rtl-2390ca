`timescale 1ns / 1ps
// coherent_dds_pair: the digital part of the measurement circuit, DDS1 and
// DDS2 clocked by the comparator output.
//
// Both units advance on every rising and falling edge of CLK (the squared-up
// input wave), so with the input at F_I they step at 2 F_I:
//   DDS1 runs FCW            -> f_s1 = 2 FCW / 2^N * F_I
//   DDS2 runs 2^(N-1) - FCW  -> f_s2 = F_I - f_s1 = F0
// Both share Enable and the offset phase Phi IN. Because the step rate is
// tied to the input, f_s1 and F0 stay fixed fractions of F_I when the input
// frequency moves. The samples are combinational from the phase registers
// and change right after each CLK edge. This is the synthesizable core; it
// feeds the D/A converters of the analog measurement chain.
module coherent_dds_pair #(
  parameter int unsigned N      = dds_pkg::PHASE_W,
  parameter int unsigned ROM_AW = dds_pkg::ROM_AW,
  parameter int unsigned DW     = dds_pkg::SAMPLE_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  input  logic [N-1:0]         fcw,
  input  logic [N-1:0]         phi_in,
  output logic signed [DW-1:0] sample1,
  output logic signed [DW-1:0] sample2
);
  logic [N-1:0] fcw2;

  fcw_complement #(.N(N)) u_cmpl (.fcw, .fcw2);

  dds_unit #(.N(N), .ROM_AW(ROM_AW), .DW(DW)) u_dds1 (
    .clk, .rst_n, .enable, .fcw, .phi_in, .sample(sample1)
  );
  dds_unit #(.N(N), .ROM_AW(ROM_AW), .DW(DW)) u_dds2 (
    .clk, .rst_n, .enable, .fcw(fcw2), .phi_in, .sample(sample2)
  );
endmodule
