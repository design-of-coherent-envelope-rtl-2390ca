`timescale 1ns / 1ps
// tb_waveform_rom: sweeps the whole 16-bit phase (in steps of 32, one memory
// word) and compares each sample with 2047 * sin(2 pi phase / 2^16) taken at
// the middle of the word's phase interval, within 1 LSB. Also checks odd
// symmetry, the peak value and that zero is never output.
module tb_waveform_rom;
  logic              pa_15;
  logic [14:0]       pa;
  logic signed [11:0] sample;
  int checks = 0, failures = 0;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  waveform_rom dut (.pa_15, .pa, .sample);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int maxv = -5000, minv = 5000;
    for (int p = 0; p < 65536; p += 32) begin
      real ph, e;
      int pos;
      {pa_15, pa} = 16'(p + $urandom_range(0, 31));
      #1;
      ph = 2.0 * 3.14159265358979 * (real'(p) + 16.0) / 65536.0;
      e = 2047.0 * $sin(ph);
      checks++;
      if (fabs(real'(sample) - e) > 1.0) begin
        failures++;
        if (failures < 10) $display("FAIL phase=%0d sample=%0d exp=%f", p, sample, e);
      end
      checks++;
      if (sample == 0) failures++;
      if (int'(sample) > maxv) maxv = int'(sample);
      if (int'(sample) < minv) minv = int'(sample);
      // Odd symmetry: phase + 2^15 gives the negated sample.
      pos = int'(sample);
      pa_15 = ~pa_15;
      #1;
      checks++;
      if (int'(sample) != -pos) failures++;
    end
    checks++;
    if (maxv != 2047 || minv != -2047) begin
      failures++;
      $display("FAIL peak %0d %0d", maxv, minv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
