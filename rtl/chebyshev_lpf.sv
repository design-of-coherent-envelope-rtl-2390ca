`timescale 1ns / 1ps
// chebyshev_lpf: behavioural model of an analog Chebyshev type-I low-pass filter.
//
// The filters of the measurement chain are 8th-order Chebyshev low-pass
// filters with 0.1 dB pass-band ripple: 500 kHz after the first multiplier
// and 10 kHz after the second. This model reproduces such a filter in
// discrete time: the analog prototype poles
//   p_k = wc * (-sinh(mu) sin(t_k) + j cosh(mu) cos(t_k)),
//   t_k = (2k-1) pi / (2 ORDER),  mu = asinh(1/eps) / ORDER,
//   eps = sqrt(10^(RIPPLE_DB/10) - 1),  wc = 2 pi BW_HZ,
// are grouped into conjugate pairs, each pair becomes a second-order section
// by the bilinear transform pre-warped at wc, and the sections are run in
// cascade every TS_NS nanoseconds (transposed direct form II, double
// precision). BW_HZ is the ripple band edge; as for any even-order
// Chebyshev filter the DC gain is 10^(-RIPPLE_DB/20). Only even orders are
// supported. TS_NS must be far below 1/BW_HZ; the default of 2 ns
// comfortably oversamples signals around 1 MHz.
module chebyshev_lpf #(
  parameter int unsigned ORDER     = 8,
  parameter real         RIPPLE_DB = 0.1,
  parameter real         BW_HZ     = 500.0e3,
  parameter real         TS_NS     = 2.0
) (
  input  real vin,
  output real vout
);
  localparam int unsigned NSEC = ORDER / 2;
  localparam real PI = 3.14159265358979324;

  real b0 [NSEC];
  real a1 [NSEC];
  real a2 [NSEC];
  real s1 [NSEC];
  real s2 [NSEC];
  real gain;

  initial begin
    real eps, mu, wc, k, th, sg, om, w2, d0;
    if (ORDER == 0 || ORDER % 2 != 0)
      $fatal(1, "chebyshev_lpf: ORDER must be even and non-zero");
    eps  = $sqrt($pow(10.0, RIPPLE_DB / 10.0) - 1.0);
    mu   = $asinh(1.0 / eps) / real'(ORDER);
    wc   = 2.0 * PI * BW_HZ;
    k    = wc / $tan(wc * TS_NS * 1.0e-9 / 2.0);
    gain = $pow(10.0, -RIPPLE_DB / 20.0);
    for (int i = 0; i < int'(NSEC); i++) begin
      th    = real'(2 * i + 1) * PI / real'(2 * ORDER);
      sg    = wc * $sinh(mu) * $sin(th);
      om    = wc * $cosh(mu) * $cos(th);
      w2    = sg * sg + om * om;
      d0    = k * k + 2.0 * sg * k + w2;
      b0[i] = w2 / d0;
      a1[i] = (2.0 * w2 - 2.0 * k * k) / d0;
      a2[i] = (k * k - 2.0 * sg * k + w2) / d0;
      s1[i] = 0.0;
      s2[i] = 0.0;
    end
    vout = 0.0;
  end

  // One step of the cascade: each section y = b0 (x + 2x' + x'') - a1 y' - a2 y''.
  always #(TS_NS) begin
    real x, y;
    x = vin;
    for (int i = 0; i < int'(NSEC); i++) begin
      y     = b0[i] * x + s1[i];
      s1[i] = 2.0 * b0[i] * x - a1[i] * y + s2[i];
      s2[i] = b0[i] * x - a2[i] * y;
      x     = y;
    end
    vout = gain * x;
  end
endmodule
