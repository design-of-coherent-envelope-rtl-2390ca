`timescale 1ns / 1ps
// envelope_meter_top: coherent envelope measurement circuit built around two DDS units.
//
// The input wave v_I(t) = V_I (1 + m(t)) sin(2 pi F_I t) is squared up by a
// comparator whose output CLK clocks two direct digital synthesizers on both
// edges. Because the DDS clock is derived from the input itself, every
// synthesized frequency is a fixed fraction of F_I and follows it when F_I
// drifts (coherent operation):
//   DDS1: FCW1 = fcw,             f_s1 = 2 FCW / 2^N * F_I
//   DDS2: FCW2 = 2^(N-1) - fcw,   f_s2 = F_I - f_s1 = F0
// Reference path: MUL1 multiplies the input wave by DDS1's output and LPF1
// (500 kHz) keeps the difference frequency F0 = (1 - FCW/2^(N-1)) F_I, a
// low-frequency wave carrying the input envelope (synch_out).
// Detection path: MUL2 multiplies synch_out by DDS2's output, also at F0,
// and LPF2 (10 kHz) keeps the DC term, proportional to V_I (1 + m(t)) times
// sin(phase difference); phi_in shifts both DDS phases and so sets that
// phase difference (env_out).
// Each DDS output passes a D/A converter and a reconstruction low-pass
// filter before it reaches a multiplier.
//
// The DDS units, phase accumulator, FCW complement and waveform memory are
// synthesizable. The comparator, D/A converters, multipliers and filters
// are analog in the real circuit and are behavioural models here (real
// valued, filters stepped every TS_NS), so this top as a whole is a
// simulation model of the mixed-signal circuit.
// Documented values: N = 16, FCW2 = 32768 - FCW, 8th-order 0.1 dB
// Chebyshev filters of 500 kHz and 10 kHz. This design's choices: the
// asynchronous reset, memory size and sample width, DAC full scale,
// multiplier gains, and the 1 MHz reconstruction filters (the Nyquist
// band of the 2 F_I edge rate at F_I = 1 MHz).
module envelope_meter_top #(
  parameter int unsigned N             = dds_pkg::PHASE_W,
  parameter int unsigned ROM_AW        = dds_pkg::ROM_AW,
  parameter int unsigned DW            = dds_pkg::SAMPLE_W,
  parameter real         VFS           = 1.0,
  parameter real         K1            = 1.0,
  parameter real         K2            = 1.0,
  parameter real         DDS_LPF_BW_HZ = 1.0e6,
  parameter real         LPF1_BW_HZ    = 500.0e3,
  parameter real         LPF2_BW_HZ    = 10.0e3,
  parameter int unsigned LPF_ORDER     = 8,
  parameter real         LPF_RIPPLE_DB = 0.1,
  parameter real         TS_NS         = 2.0
) (
  input  logic         rst_n,
  input  real          v_in,
  input  logic         enable,
  input  logic [N-1:0] fcw,
  input  logic [N-1:0] phi_in,
  output logic         comp_out,
  output real          synch_out,
  output real          env_out,
  output real          dds_out1,
  output real          dds_out2
);
  logic signed [DW-1:0] s1, s2;
  real                  v_dac1, v_dac2, v_m1, v_m2;

  comparator u_comp (.vin(v_in), .clk_out(comp_out));

  // DDS1 (FCW) and DDS2 (2^(N-1) - FCW), both clocked on each CLK edge.
  coherent_dds_pair #(.N(N), .ROM_AW(ROM_AW), .DW(DW)) u_dds (
    .clk(comp_out), .rst_n, .enable, .fcw, .phi_in, .sample1(s1), .sample2(s2)
  );

  dac #(.DW(DW), .VFS(VFS)) u_dac1 (.code(s1), .vout(v_dac1));
  dac #(.DW(DW), .VFS(VFS)) u_dac2 (.code(s2), .vout(v_dac2));

  chebyshev_lpf #(.ORDER(LPF_ORDER), .RIPPLE_DB(LPF_RIPPLE_DB), .BW_HZ(DDS_LPF_BW_HZ), .TS_NS(TS_NS))
    u_rlpf1 (.vin(v_dac1), .vout(dds_out1));
  chebyshev_lpf #(.ORDER(LPF_ORDER), .RIPPLE_DB(LPF_RIPPLE_DB), .BW_HZ(DDS_LPF_BW_HZ), .TS_NS(TS_NS))
    u_rlpf2 (.vin(v_dac2), .vout(dds_out2));

  // Reference block: MUL1 + LPF1.
  analog_multiplier #(.K(K1)) u_mul1 (.a(v_in), .b(dds_out1), .y(v_m1));
  chebyshev_lpf #(.ORDER(LPF_ORDER), .RIPPLE_DB(LPF_RIPPLE_DB), .BW_HZ(LPF1_BW_HZ), .TS_NS(TS_NS))
    u_lpf1 (.vin(v_m1), .vout(synch_out));

  // Detection block: MUL2 + LPF2.
  analog_multiplier #(.K(K2)) u_mul2 (.a(synch_out), .b(dds_out2), .y(v_m2));
  chebyshev_lpf #(.ORDER(LPF_ORDER), .RIPPLE_DB(LPF_RIPPLE_DB), .BW_HZ(LPF2_BW_HZ), .TS_NS(TS_NS))
    u_lpf2 (.vin(v_m2), .vout(env_out));
endmodule
