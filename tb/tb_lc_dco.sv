// tb_lc_dco: tests the LC oscillator model squared by the comparator.
// For 5 and 9 elements on it measures the average period over 50 cycles
// from comparator rising edges and compares it with the two measured
// frequencies the model is fitted to (636.9 MHz and 581.4 MHz, within
// 0.3 %); it checks that all 32 elements give 415 MHz +-1 %, that the
// frequency falls monotonically as elements are added, and that an
// injection pulse moves the next output edge towards the pulse.
`timescale 1ns/1ps
module tb_lc_dco;
  import adpll_pkg::*;
  logic [THERM_W-1:0] ctrl;
  logic inj = 1'b0, clk;
  real v_osc, period_ns;
  int checks = 0, failures = 0;

  lc_dco     dut (.ctrl, .inj, .v_osc, .period_ns);
  comparator cmp (.vin(v_osc), .vth(0.5), .out(clk));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [THERM_W-1:0] ones(input int n);
    return (n >= 32) ? '1 : ((32'h1 << n) - 32'h1);
  endfunction

  task automatic measure(input int n, output real f_mhz);
    realtime t0;
    ctrl = ones(n);
    repeat (3) @(posedge clk);
    t0 = $realtime;
    repeat (50) @(posedge clk);
    f_mhz = 50.0 * 1000.0 / ($realtime - t0);
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real f, fprev;
    realtime te, tp;
    ctrl = ones(5);
    measure(5, f);
    $display("5 ones: %.1f MHz", f);
    check(f > 636.9 * 0.997 && f < 636.9 * 1.003, "5 elements: 636.9 MHz");
    measure(9, f);
    $display("9 ones: %.1f MHz", f);
    check(f > 581.4 * 0.997 && f < 581.4 * 1.003, "9 elements: 581.4 MHz");
    measure(32, f);
    $display("32 ones: %.1f MHz", f);
    check(f > 415.0 * 0.99 && f < 415.0 * 1.01, "32 elements: 415 MHz");
    fprev = 1.0e9;
    for (int n = 1; n <= 32; n += 4) begin
      measure(n, f);
      check(f < fprev, $sformatf("monotonic at %0d elements", n));
      fprev = f;
    end
    // an injection pulse three quarters of a period after an edge pulls
    // the next edge earlier (phase -0.25 -> -0.125: 1/8 period sooner),
    // one a quarter period after an edge pulls it later by 1/8 period
    ctrl = ones(5);
    @(posedge clk); te = $realtime;
    #(period_ns * 0.75); inj = 1'b1; #0.03; inj = 1'b0;
    @(posedge clk); tp = $realtime - te;
    $display("period with early injection %.3f ns, free-running %.3f ns", tp, period_ns);
    check(tp < period_ns * 0.885 && tp > period_ns * 0.865, "injection advances the next edge by 1/8 period");
    @(posedge clk); te = $realtime;
    #(period_ns * 0.25); inj = 1'b1; #0.03; inj = 1'b0;
    @(posedge clk); tp = $realtime - te;
    $display("period with late injection %.3f ns", tp);
    check(tp > period_ns * 1.115 && tp < period_ns * 1.135, "injection delays the next edge by 1/8 period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
