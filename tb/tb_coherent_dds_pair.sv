`timescale 1ns / 1ps
// tb_coherent_dds_pair: both DDS units clocked on both edges of a square
// wave. After edge k, sample1 must be 2047 sin(2 pi (Phi_IN + k FCW) / 2^16)
// and sample2 2047 sin(2 pi (Phi_IN + k (2^15 - FCW)) / 2^16), within the
// 4 LSB phase-truncation error, for several FCW values. Over 8192 edges
// (4096 CLK periods) the zero-crossing counts of the two outputs must add up
// to 4096: f_s1 + f_s2 = F_CLK, the relation the measurement relies on.
module tb_coherent_dds_pair;
  logic               clk = 0, rst_n = 1, enable = 1;
  logic [15:0]        fcw = 16'd30000, phi_in = 16'd777;
  logic signed [11:0] sample1, sample2;
  int checks = 0, failures = 0;

  coherent_dds_pair dut (.clk, .rst_n, .enable, .fcw, .phi_in, .sample1, .sample2);

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real expect_sample(input int step, input int k);
    logic [15:0] ph;
    ph = 16'(int'(phi_in) + k * step);
    return 2047.0 * $sin(2.0 * 3.14159265358979 * real'(ph) / 65536.0);
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [15:0] words [4] = '{16'd30000, 16'd32604, 16'd32735, 16'd8192};
    foreach (words[w]) begin
      int c1, c2;
      logic signed [11:0] p1, p2;
      fcw = words[w];
      rst_n = 0;
      #10 rst_n = 1;
      c1 = 0;
      c2 = 0;
      p1 = sample1;
      p2 = sample2;
      for (int k = 1; k <= 8192; k++) begin
        #500 clk = ~clk;
        #1;
        checks += 2;
        if (fabs(real'(sample1) - expect_sample(int'(fcw), k)) > 4.0) begin
          failures++;
          if (failures < 10) $display("FAIL dds1 fcw=%0d k=%0d got %0d", fcw, k, sample1);
        end
        if (fabs(real'(sample2) - expect_sample(32768 - int'(fcw), k)) > 4.0) begin
          failures++;
          if (failures < 10) $display("FAIL dds2 fcw=%0d k=%0d got %0d", fcw, k, sample2);
        end
        if (p1 < 0 && sample1 >= 0) c1++;
        if (p2 < 0 && sample2 >= 0) c2++;
        p1 = sample1;
        p2 = sample2;
      end
      checks++;
      if (c1 + c2 < 4094 || c1 + c2 > 4098) begin
        failures++;
        $display("FAIL fcw=%0d crossings %0d + %0d != 4096", fcw, c1, c2);
      end else
        $display("fcw=%0d crossings %0d + %0d", fcw, c1, c2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
