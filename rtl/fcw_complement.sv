`timescale 1ns / 1ps
// fcw_complement: frequency control word of the second DDS.
//
// DDS2 must run at f_s2 = F0 = F_I - f_s1, which for a phase accumulator
// stepped twice per input period means FCW2 = 2^(N-1) - FCW (the
// "1st complement (N-1)" block; for N = 16 the constant is 32768). The
// result is taken modulo 2^N, so FCW > 2^(N-1) gives the two's-complement
// (negative) step, i.e. the same frequency with inverted phase rotation.
// Purely combinational, no clock.
module fcw_complement #(
  parameter int unsigned N = dds_pkg::PHASE_W
) (
  input  logic [N-1:0] fcw,
  output logic [N-1:0] fcw2
);
  localparam logic [N-1:0] HALF = N'(1) << (N - 1);

  always_comb fcw2 = HALF - fcw;
endmodule
