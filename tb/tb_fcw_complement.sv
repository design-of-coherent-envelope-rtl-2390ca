`timescale 1ns / 1ps
// tb_fcw_complement: checks FCW2 = 2^(N-1) - FCW (mod 2^N) for N = 16.
// Edge values and random words are compared with integer arithmetic, and
// FCW + FCW2 must equal 2^(N-1), i.e. f_s1 + f_s2 = F_I.
module tb_fcw_complement;
  logic [15:0] fcw, fcw2;
  int checks = 0, failures = 0;

  fcw_complement dut (.fcw, .fcw2);

  task automatic check(input logic [15:0] w);
    int exp;
    fcw = w;
    #1;
    exp = (32768 - int'(w)) & 16'hFFFF;
    checks++;
    if (int'(fcw2) != exp) begin
      failures++;
      $display("FAIL fcw=%0d fcw2=%0d exp=%0d", w, fcw2, exp);
    end
    checks++;
    if (16'(fcw + fcw2) != 16'd32768) failures++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'd0); check(16'd1); check(16'd30000); check(16'd32604); check(16'd32735);
    check(16'd32767); check(16'd32768); check(16'd65535);
    for (int i = 0; i < 2000; i++) check(16'($urandom));
    if (fcw2 == fcw2) begin
      fcw = 16'd30000; #1;
      checks++;
      if (fcw2 != 16'd2768) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
