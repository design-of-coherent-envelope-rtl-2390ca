`timescale 1ns / 1ps
// tb_workload_envelope_chirp: the reference simulation of the circuit at
// default parameters. Carrier 1 MHz, FCW = 30000 (reference frequency
// F0 = 84.473 kHz), envelope 2 V + 1 V sin(phi(t)) whose frequency sweeps
// linearly from 0 Hz to 100 Hz over 100 ms.
// The envelope gain g (env_out per input volt) is first calibrated with an
// unmodulated 2 V carrier. During the sweep env_out must follow
// g * envelope(t) passed through a 10 kHz 8th-order Chebyshev filter (the
// same delay and ripple as the circuit's LPF2), within 2 % of the 2 V level,
// and its extremes must reach 3 g and 1 g.
module tb_workload_envelope_chirp;
  localparam real PI = 3.14159265358979324;

  logic        rst_n = 1, enable = 1;
  logic [15:0] fcw = 16'd30000, phi_in = 16'd0;
  real         v_in = 0.0, ph = 0.0, env_in = 2.0, ref_in = 0.0, ref_out;
  real         t_sweep = 0.0, g = 0.0;
  bit          sweeping = 0;
  logic        comp_out;
  real         synch_out, env_out, dds_out1, dds_out2;
  int checks = 0, failures = 0;

  envelope_meter_top dut (
    .rst_n, .v_in, .enable, .fcw, .phi_in,
    .comp_out, .synch_out, .env_out, .dds_out1, .dds_out2
  );

  // Reference path for the expected envelope output.
  chebyshev_lpf #(.BW_HZ(10.0e3)) u_ref (.vin(ref_in), .vout(ref_out));

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  always #1 begin
    ph = ph + 2.0 * PI * 1.0e6 * 1.0e-9;
    if (ph > 2.0 * PI) ph = ph - 2.0 * PI;
    if (sweeping) begin
      t_sweep = t_sweep + 1.0e-9;
      // Instantaneous frequency 1000 Hz/s * t: phase = pi * 1000 * t^2.
      env_in = 2.0 + $sin(PI * 1000.0 * t_sweep * t_sweep);
    end
    v_in   = env_in * $sin(ph);
    ref_in = g * env_in;
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real acc, err, maxerr, emax, emin;
    #1 rst_n = 0;
    #200 rst_n = 1;
    // Calibration at a constant 2 V envelope.
    #1500000;
    acc = 0.0;
    repeat (1000) begin
      #100;
      acc += env_out;
    end
    g = acc / 1000.0 / 2.0;
    $display("envelope gain g = %f per volt", g);
    checks++;
    if (fabs(g) < 0.02) begin
      failures++;
      $display("FAIL envelope gain too small");
    end
    // Let the reference filter settle on the calibrated level.
    #1000000;
    sweeping = 1;
    maxerr = 0.0;
    emax = -1.0e9;
    emin = 1.0e9;
    repeat (10000) begin
      #10000;
      err = fabs(env_out - ref_out);
      if (err > maxerr) maxerr = err;
      if (env_out / g > emax) emax = env_out / g;
      if (env_out / g < emin) emin = env_out / g;
    end
    $display("max deviation %f V-equivalent, envelope range %f .. %f V", maxerr / fabs(g), emin, emax);
    checks++;
    if (maxerr > 0.02 * 2.0 * fabs(g)) begin
      failures++;
      $display("FAIL envelope tracking error %f", maxerr / fabs(g));
    end
    checks++;
    if (fabs(emax - 3.0) > 0.05 || fabs(emin - 1.0) > 0.05) begin
      failures++;
      $display("FAIL envelope extremes %f %f", emin, emax);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
