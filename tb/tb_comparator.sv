// tb_comparator: drives the comparator with a sampled sinusoid around a
// 0.5 V threshold and checks the output level at every sample and that
// the output has a 50 % duty cycle.
`timescale 1ns/1ps
module tb_comparator;
  real vin, vth;
  logic out;
  int checks = 0, failures = 0, n_high = 0;

  comparator dut (.vin, .vth, .out);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vth = 0.5;
    for (int i = 0; i < 200; i++) begin
      vin = 0.5 + 0.3 * $sin(6.283185307179586 * (real'(i) + 0.5) / 20.0);
      #0.01;
      checks++;
      if (out !== (vin > vth)) begin failures++; $display("FAIL: vin=%f out=%b", vin, out); end
      if (out) n_high++;
    end
    checks++;
    if (n_high != 100) begin failures++; $display("FAIL: duty %0d/200", n_high); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
