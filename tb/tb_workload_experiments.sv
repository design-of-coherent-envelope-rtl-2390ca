`timescale 1ns / 1ps
// tb_workload_experiments: the bench measurements of the reference block
// (MUL1 + LPF1) at default parameters, input 1 Vpp.
//  a) F_I = 1 MHz, FCW = 32604: DDS1 at 2 FCW/2^16 F_I = 994.995 kHz,
//     synch_out at F0 = 5.005 kHz (nominally a 995 kHz reference, 5 kHz).
//  b) F_I = 1 MHz, FCW = 32735: DDS1 at 998.993 kHz, F0 = 1.007 kHz
//     (nominally 999 kHz and 1 kHz).
//  c) FCW = 32735 and F_I swept linearly from 1 MHz to 1.001 MHz over
//     10 ms: every period of synch_out must match (1 - FCW/2^15) F_I(t), so
//     F0 stays near 1 kHz. A fixed 998.993 kHz reference would instead give
//     a difference frequency rising to about 2 kHz.
// Frequencies are taken from the times of positive-going zero crossings
// (with hysteresis) of synch_out; each must be within 0.5 %.
module tb_workload_experiments;
  localparam real PI = 3.14159265358979324;

  logic        rst_n = 1, enable = 1;
  logic [15:0] fcw = 16'd32604, phi_in = 16'd0;
  real         v_in = 0.0, ph = 0.0, f_in = 1.0e6, df = 0.0;
  logic        comp_out;
  real         synch_out, env_out, dds_out1, dds_out2;
  int checks = 0, failures = 0;

  envelope_meter_top dut (
    .rst_n, .v_in, .enable, .fcw, .phi_in,
    .comp_out, .synch_out, .env_out, .dds_out1, .dds_out2
  );

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  always #1 begin
    f_in = f_in + df;
    ph = ph + 2.0 * PI * f_in * 1.0e-9;
    if (ph > 2.0 * PI) ph = ph - 2.0 * PI;
    v_in = 0.5 * $sin(ph);
  end

  // Time of the next positive-going zero crossing of synch_out.
  task automatic next_crossing(output real t);
    while (synch_out > -0.005) #1;
    while (synch_out < 0.0) #1;
    t = $realtime;
  endtask

  task automatic check_f(input string what, input real got, input real exp);
    checks++;
    if (fabs(got - exp) > 0.005 * exp) begin
      failures++;
      $display("FAIL %s: %f Hz, expected %f Hz", what, got, exp);
    end else
      $display("ok   %s: %f Hz (expected %f Hz)", what, got, exp);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t0, t1, f_mid, f0, last_f0;
    int periods;
    #1 rst_n = 0;
    #200 rst_n = 1;

    // a) 5 kHz reference frequency.
    #300000;
    next_crossing(t0);
    repeat (10) next_crossing(t1);
    check_f("a) F0 with FCW=32604", 10.0 / ((t1 - t0) * 1.0e-9), (1.0 - 32604.0 / 32768.0) * 1.0e6);
    check_f("a) F0 against the nominal 5 kHz", 10.0 / ((t1 - t0) * 1.0e-9), 5.0e3);

    // b) 1 kHz reference frequency.
    fcw = 16'd32735;
    #1000000;
    next_crossing(t0);
    repeat (3) next_crossing(t1);
    check_f("b) F0 with FCW=32735", 3.0 / ((t1 - t0) * 1.0e-9), (1.0 - 32735.0 / 32768.0) * 1.0e6);

    // c) Input swept 1 MHz -> 1.001 MHz over 10 ms: F0 follows F_I.
    df = 1.0e3 / 10.0e6;
    periods = 0;
    last_f0 = 0.0;
    next_crossing(t0);
    while (f_in < 1.001e6) begin
      next_crossing(t1);
      f0 = 1.0 / ((t1 - t0) * 1.0e-9);
      // Input frequency at the middle of this period.
      f_mid = f_in - df * (t1 - t0) / 2.0;
      check_f("c) F0 during sweep", f0, (1.0 - 32735.0 / 32768.0) * f_mid);
      last_f0 = f0;
      periods++;
      t0 = t1;
    end
    df = 0.0;
    checks++;
    if (periods < 8 || last_f0 > 1.02e3) begin
      failures++;
      $display("FAIL sweep: %0d periods, last F0 %f Hz", periods, last_f0);
    end else
      $display("sweep: %0d periods, F0 at 1.001 MHz input %f Hz", periods, last_f0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
