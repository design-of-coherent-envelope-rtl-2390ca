`timescale 1ns / 1ps
// tb_chebyshev_lpf: measures the gain of the 8th-order, 0.1 dB, 500 kHz
// filter at DC and for sine inputs across pass band and stop band, and
// compares it with the Chebyshev magnitude 1 / sqrt(1 + eps^2 T8(f/fc)^2),
// T8(x) = cos(8 acos x) for x <= 1 and cosh(8 acosh x) above.
module tb_chebyshev_lpf;
  localparam real PI = 3.14159265358979324;
  real vin = 0.0, vout;
  real ph = 0.0, freq = 0.0, amp = 0.0, peak;
  int checks = 0, failures = 0;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  chebyshev_lpf dut (.vin, .vout);

  always #1 begin
    ph  = ph + 2.0 * PI * freq * 1.0e-9;
    vin = (freq == 0.0) ? amp : amp * $sin(ph);
  end

  function automatic real cheb_mag(input real x);
    real eps, t;
    eps = $sqrt($pow(10.0, 0.01) - 1.0);
    t = (x <= 1.0) ? $cos(8.0 * $acos(x)) : $cosh(8.0 * $acosh(x));
    return 1.0 / $sqrt(1.0 + eps * eps * t * t);
  endfunction

  task automatic measure(input real f);
    real e;
    freq = f;
    amp  = 1.0;
    #60000;
    peak = 0.0;
    repeat (20000) begin
      #1;
      if (fabs(vout) > peak) peak = fabs(vout);
    end
    e = cheb_mag(f / 500.0e3);
    checks++;
    if (fabs(peak - e) > 0.01 * e + 2.0e-4) begin
      failures++;
      $display("FAIL f=%f gain=%f exp=%f", f, peak, e);
    end else
      $display("f=%0.0f gain=%f exp=%f", f, peak, e);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // DC gain.
    amp = 1.0;
    #60000;
    checks++;
    if (fabs(vout - $pow(10.0, -0.005)) > 1.0e-3) begin
      failures++;
      $display("FAIL dc gain=%f", vout);
    end
    measure(100.0e3);
    measure(350.0e3);
    measure(480.0e3);
    measure(500.0e3);
    measure(600.0e3);
    measure(1000.0e3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
