`timescale 1ns / 1ps
// tb_analog_multiplier: y must equal K * a * b for random inputs, with
// K = 0.4 (1 / 2.5 V, a usual scale for analog multiplier ICs).
module tb_analog_multiplier;
  real a = 0.0, b = 0.0, y;
  int checks = 0, failures = 0;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  analog_multiplier #(.K(0.4)) dut (.a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      real e;
      a = (real'($urandom_range(0, 20000)) - 10000.0) / 1000.0;
      b = (real'($urandom_range(0, 20000)) - 10000.0) / 1000.0;
      #1;
      e = a * b / 2.5;
      checks++;
      if (fabs(y - e) > 1.0e-9) begin
        failures++;
        if (failures < 10) $display("FAIL a=%f b=%f y=%f exp=%f", a, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
