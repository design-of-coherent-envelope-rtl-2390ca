`timescale 1ns / 1ps
// tb_phase_accumulator: checks the double-triggered accumulator.
// A reference counter adds FCW on every enabled rising and falling edge of
// CLK; after each edge {PA_15, PA} must equal Phi_IN + that sum (mod 2^16).
// Enable, FCW and Phi IN change at random; reset must return the phase to
// Phi IN. Rate check: exactly one FCW step per edge, two per CLK period.
module tb_phase_accumulator;
  logic        clk = 0, rst_n = 1, enable = 0;
  logic [15:0] fcw = 0, phi_in = 0;
  logic        pa_15;
  logic [14:0] pa;
  logic [15:0] ref_acc = 0;
  int checks = 0, failures = 0, edges = 0;

  phase_accumulator dut (.clk, .rst_n, .enable, .fcw, .phi_in, .pa_15, .pa);

  task automatic compare(input string what);
    logic [15:0] exp;
    exp = ref_acc + phi_in;
    checks++;
    if ({pa_15, pa} != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: phase=%0d exp=%0d", what, {pa_15, pa}, exp);
    end
  endtask

  task automatic toggle();
    #250 clk = ~clk;
    if (enable) ref_acc += fcw;
    edges++;
    #1 compare("edge");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phi_in = 16'd1234;
    #1 rst_n = 0;
    #10 compare("reset");
    rst_n = 1;
    fcw = 16'd30000;
    enable = 1;
    // Rate: one CLK period advances the phase by 2 * FCW.
    for (int i = 0; i < 2; i++) toggle();
    checks++;
    if ({pa_15, pa} != 16'(1234 + 2 * 30000)) failures++;
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 9) == 0) enable = ~enable;
      if ($urandom_range(0, 49) == 0) fcw = 16'($urandom);
      if ($urandom_range(0, 49) == 0) begin
        phi_in = 16'($urandom);
        #1 compare("phi");
      end
      toggle();
    end
    // Reset in the middle of operation.
    rst_n = 0;
    ref_acc = 0;
    #5 compare("reset2");
    rst_n = 1;
    $display("edges=%0d", edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
