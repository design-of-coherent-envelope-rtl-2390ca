`timescale 1ns / 1ps
// tb_dac: the output voltage must be VFS * code / 2048 for every 12-bit code;
// VFS is set to 2 V to check the scale.
module tb_dac;
  logic signed [11:0] code;
  real vout;
  int checks = 0, failures = 0;

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  dac #(.VFS(2.0)) dut (.code, .vout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = -2048; c < 2048; c++) begin
      code = 12'(c);
      #1;
      checks++;
      if (fabs(vout - 2.0 * real'(c) / 2048.0) > 1.0e-12) begin
        failures++;
        if (failures < 10) $display("FAIL code=%0d vout=%f", c, vout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
