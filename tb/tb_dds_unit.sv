`timescale 1ns / 1ps
// tb_dds_unit: runs one DDS unit clocked by a 1 MHz square wave (both edges
// active) with FCW = 30000 and a phase offset. After edge k the sample must
// be 2047 * sin(2 pi (Phi_IN + k FCW) / 2^16) within the phase-truncation
// error of the 1024-word half-wave memory (4 LSB). The number of
// positive-going zero crossings over 4096 edges must match the output
// frequency 2 FCW / 2^16 * F_CLK, i.e. 4096 * FCW / 2^16 cycles.
module tb_dds_unit;
  logic               clk = 0, rst_n = 1, enable = 1;
  logic [15:0]        fcw = 16'd30000, phi_in = 16'd5000;
  logic signed [11:0] sample, prev;
  int checks = 0, failures = 0, crossings = 0;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  dds_unit dut (.clk, .rst_n, .enable, .fcw, .phi_in, .sample);

  task automatic compare(input int k);
    real e;
    logic [15:0] ph;
    ph = 16'(int'(phi_in) + k * int'(fcw));
    e = 2047.0 * $sin(2.0 * 3.14159265358979 * real'(ph) / 65536.0);
    checks++;
    if (fabs(real'(sample) - e) > 4.0) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d sample=%0d exp=%f", k, sample, e);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expc;
    #1 rst_n = 0;
    #10 compare(0);
    rst_n = 1;
    prev = sample;
    for (int k = 1; k <= 4096; k++) begin
      #500 clk = ~clk;
      #1 compare(k);
      if (prev < 0 && sample >= 0) crossings++;
      prev = sample;
    end
    expc = (4096 * 30000) / 65536;
    checks++;
    if (crossings < expc - 1 || crossings > expc + 1) begin
      failures++;
      $display("FAIL crossings=%0d exp=%0d", crossings, expc);
    end
    // Enable low: the sample must hold over several edges.
    enable = 0;
    prev = sample;
    for (int k = 0; k < 8; k++) begin
      #500 clk = ~clk;
      #1;
      checks++;
      if (sample != prev) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
