// tb_pulse_gen: checks that every rising input edge gives one output pulse
// 30 ps wide starting at the edge, that falling edges give none, and
// that en low suppresses the pulses.
`timescale 1ns/1ps
module tb_pulse_gen;
  logic in = 1'b0, en = 1'b1, out;
  int checks = 0, failures = 0, n_pulse = 0;
  realtime t_rise, w;

  pulse_gen dut (.in, .en, .out);

  always @(posedge out) begin n_pulse++; t_rise = $realtime; end
  always @(negedge out) w = $realtime - t_rise;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int i = 0; i < 10; i++) begin
      realtime te;
      in = 1'b1; te = $realtime;
      #0.8;
      checks++;
      if (t_rise != te || w < 0.029 || w > 0.031) begin
        failures++;
        $display("FAIL: pulse at %.3f width %.3f", t_rise - te, w);
      end
      in = 1'b0; #0.8;
    end
    checks++;
    if (n_pulse != 10) begin failures++; $display("FAIL: %0d pulses for 10 edges", n_pulse); end
    en = 1'b0;
    repeat (5) begin in = 1'b1; #0.8; in = 1'b0; #0.8; end
    checks++;
    if (n_pulse != 10) begin failures++; $display("FAIL: pulses while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
