`timescale 1ns / 1ps
// tb_comparator: the output must be high exactly when the input is above 0 V,
// and a sine input must give one rising and one falling edge per period.
module tb_comparator;
  real  vin = 0.0;
  logic clk_out;
  int checks = 0, failures = 0, rises = 0, falls = 0;

  comparator dut (.vin, .clk_out);

  always @(posedge clk_out) rises++;
  always @(negedge clk_out) falls++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static real vals [9] = '{-1.0, -1.0e-6, 0.0, 1.0e-6, 0.05, 0.1, 0.19, 0.5, -2.0};
    foreach (vals[i]) begin
      vin = vals[i];
      #1;
      checks++;
      if (clk_out != (vals[i] > 0.0)) begin
        failures++;
        $display("FAIL vin=%f out=%0b", vals[i], clk_out);
      end
    end
    vin = $sin(0.1);
    #1;
    rises = 0;
    falls = 0;
    // 10 periods of a 1 MHz sine sampled every 10 ns.
    for (int t = 1; t <= 1000; t++) begin
      vin = $sin(2.0 * 3.14159265358979 * real'(t) / 100.0 + 0.1);
      #10;
    end
    checks++;
    if (rises != 10 || falls != 10) begin
      failures++;
      $display("FAIL rises=%0d falls=%0d", rises, falls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
