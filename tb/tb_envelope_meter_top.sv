`timescale 1ns / 1ps
// tb_envelope_meter_top: end-to-end run of the coherent envelope measurement
// circuit at its default parameters (16-bit DDS, 500 kHz and 10 kHz
// filters).
//
// Input: v_in = A (1 + m(t)) sin(2 pi F_I t), generated every 1 ns with a
// continuous phase so that F_I can be changed on the fly. FCW = 30000.
// Phases of the run and what is checked:
//  1. Reference frequency: with F_I = 1 MHz, the synchronized output
//     synch_out must oscillate at F0 = (1 - FCW/2^15) F_I = 84.473 kHz
//     (zero crossings timed over 150 us, 0.5 % tolerance).
//  2. Phase correction: the envelope output is proportional to
//     sin(2 phi + const), so moving phi_in by 2^14 must negate it.
//  3. Linearity: halving the input amplitude halves the envelope output.
//  4. Coherent tracking: with F_I = 1.001 MHz, F0 must scale to
//     84.557 kHz and the envelope output must stay the same.
//  5. Envelope modulation: m(t) = 0.5 sin(2 pi 1 kHz t) must appear on
//     env_out with its maximum and minimum at 1.5 and 0.5 times the
//     unmodulated value.
//  6. Enable low: both DDS outputs freeze while CLK keeps toggling.
// Each mechanism (rising-edge and falling-edge DDS updates, phase offset
// change, frequency change, enable stall, envelope modulation) is counted
// and must occur at least once.
module tb_envelope_meter_top;
  localparam real PI = 3.14159265358979324;

  logic        rst_n = 1, enable = 1;
  logic [15:0] fcw = 16'd30000, phi_in = 16'd0;
  real         v_in = 0.0, ph = 0.0, f_in = 1.0e6, amp = 1.0, mdepth = 0.0, mph = 0.0;
  logic        comp_out;
  real         synch_out, env_out, dds_out1, dds_out2;
  int checks = 0, failures = 0;
  int n_rise_upd = 0, n_fall_upd = 0, n_phi = 0, n_freq = 0, n_stall = 0, n_mod = 0;

  envelope_meter_top dut (
    .rst_n, .v_in, .enable, .fcw, .phi_in,
    .comp_out, .synch_out, .env_out, .dds_out1, .dds_out2
  );

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  always #1 begin
    ph  = ph + 2.0 * PI * f_in * 1.0e-9;
    if (ph > 2.0 * PI) ph = ph - 2.0 * PI;
    mph = mph + 2.0 * PI * 1.0e3 * 1.0e-9;
    if (mph > 2.0 * PI) mph = mph - 2.0 * PI;
    v_in = amp * (1.0 + mdepth * $sin(mph)) * $sin(ph);
  end

  // DDS updates on both comparator edges.
  logic signed [11:0] s1_prev;
  always @(posedge comp_out) begin
    s1_prev = dut.u_dds.u_dds1.sample;
    #5 if (enable && dut.u_dds.u_dds1.sample != s1_prev) n_rise_upd++;
  end
  always @(negedge comp_out) begin
    s1_prev = dut.u_dds.u_dds1.sample;
    #5 if (enable && dut.u_dds.u_dds1.sample != s1_prev) n_fall_upd++;
  end

  task automatic check_close(input string what, input real got, input real exp, input real tol);
    checks++;
    if (fabs(got - exp) > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f (tol %f)", what, got, exp, tol);
    end else
      $display("ok   %s: %f (expected %f)", what, got, exp);
  endtask

  // Frequency of synch_out from its positive-going zero crossings.
  task automatic measure_f0(output real f);
    real t_first, t_last, prev;
    int n;
    n = 0;
    t_first = 0.0;
    t_last = 0.0;
    prev = synch_out;
    repeat (150000) begin
      #1;
      if (prev < 0.0 && synch_out >= 0.0) begin
        if (n == 0) t_first = $realtime;
        t_last = $realtime;
        n++;
      end
      prev = synch_out;
    end
    f = (n > 1) ? real'(n - 1) / ((t_last - t_first) * 1.0e-9) : 0.0;
  endtask

  // Envelope output averaged over 100 us (one period of the ringing of the
  // 10 kHz filter) after settling.
  task automatic measure_env(input int settle_ns, output real e);
    real acc;
    #(settle_ns);
    acc = 0.0;
    repeat (1000) begin
      #100;
      acc += env_out;
    end
    e = acc / 1000.0;
  endtask

  initial begin
    #80000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real f0, e_a, e_b, e_half, e_trk, emax, emin, tol_f;
    real s1_hold, s2_hold;
    #1 rst_n = 0;
    #200 rst_n = 1;

    // 1. Reference frequency at F_I = 1 MHz.
    #100000;
    measure_f0(f0);
    tol_f = 0.005 * 84.473e3;
    check_close("F0 at F_I = 1 MHz (Hz)", f0, (1.0 - 30000.0 / 32768.0) * 1.0e6, tol_f);

    // 2. Phase correction by phi_in.
    measure_env(1000000, e_a);
    phi_in = 16'd16384;
    n_phi++;
    measure_env(1000000, e_b);
    check_close("env(phi + 2^14) = -env(phi)", e_b, -e_a, 0.02 * fabs(e_a));
    checks++;
    if (fabs(e_a) < 0.05) begin
      failures++;
      $display("FAIL envelope output too small: %f", e_a);
    end

    // 3. Linearity in the input amplitude.
    amp = 0.5;
    measure_env(1000000, e_half);
    check_close("env(A/2) / env(A)", e_half / e_b, 0.5, 0.01);
    amp = 1.0;

    // 4. Coherent tracking of a new input frequency.
    f_in = 1.001e6;
    n_freq++;
    #100000;
    measure_f0(f0);
    check_close("F0 at F_I = 1.001 MHz (Hz)", f0, (1.0 - 30000.0 / 32768.0) * 1.001e6, tol_f);
    measure_env(1000000, e_trk);
    check_close("env unchanged after F_I step", e_trk / e_b, 1.0, 0.02);

    // 5. Envelope modulation m(t) = 0.5 sin(2 pi 1 kHz t).
    mdepth = 0.5;
    n_mod++;
    #1000000;
    emax = -1.0e9;
    emin = 1.0e9;
    repeat (2000) begin
      #1000;
      if (env_out > emax) emax = env_out;
      if (env_out < emin) emin = env_out;
    end
    if (e_b < 0.0) begin
      real t;
      t = emax;
      emax = -emin;
      emin = -t;
    end
    check_close("env max / unmodulated", emax / fabs(e_b), 1.5, 0.04);
    check_close("env min / unmodulated", emin / fabs(e_b), 0.5, 0.04);
    mdepth = 0.0;

    // 6. Enable low: DDS outputs freeze.
    enable = 0;
    n_stall++;
    #20000;
    s1_hold = real'(dut.u_dds.u_dds1.sample);
    s2_hold = real'(dut.u_dds.u_dds2.sample);
    #20000;
    check_close("DDS1 sample frozen while disabled", real'(dut.u_dds.u_dds1.sample), s1_hold, 0.0);
    check_close("DDS2 sample frozen while disabled", real'(dut.u_dds.u_dds2.sample), s2_hold, 0.0);
    enable = 1;

    $display("mechanisms: rise_upd=%0d fall_upd=%0d phi=%0d freq=%0d stall=%0d mod=%0d",
             n_rise_upd, n_fall_upd, n_phi, n_freq, n_stall, n_mod);
    checks++;
    if (n_rise_upd == 0 || n_fall_upd == 0 || n_phi == 0 || n_freq == 0 || n_stall == 0 || n_mod == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
