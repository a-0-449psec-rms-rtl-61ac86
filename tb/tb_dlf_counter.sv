// tb_dlf_counter: tests the loop-filter counter against a reference
// model: asynchronous load of the 10000 preset (taking effect without a
// clock edge, and holding the counter while pl_n is low even with clocks
// running), then 2000 random inc/dec cycles including runs to both ends to
// check saturation at 0 and 31, and one step per clock edge.
`timescale 1ns/1ps
module tb_dlf_counter;
  import adpll_pkg::*;
  logic clk = 1'b0, pl_n = 1'b1, inc = 1'b0, dec = 1'b0;
  logic [CODE_W-1:0] p, q;
  int model;
  int checks = 0, failures = 0, n_sat_hi = 0, n_sat_lo = 0;

  dlf_counter dut (.clk, .pl_n, .p, .inc, .dec, .q);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (q=%0d model=%0d)", what, q, model); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p = CODE_PRESET;
    #2 pl_n = 1'b0;
    #1 check(q == 5'b10000, "asynchronous preset without clock edge");
    inc = 1'b1;
    repeat (3) @(posedge clk);
    #1 check(q == 5'b10000, "counter held while pl_n low");
    @(negedge clk); pl_n = 1'b1; model = 16;
    for (int i = 0; i < 2000; i++) begin
      int r;
      // bias the direction in long runs so both limits are reached
      r = $urandom_range(0, 99);
      if ((i / 200) % 2 == 0) begin inc = (r < 70); dec = (r >= 50); end
      else                     begin inc = (r >= 70); dec = (r < 50); end
      @(posedge clk);
      if (inc && !dec) begin if (model == 31) n_sat_hi++; else model++; end
      else if (dec && !inc) begin if (model == 0) n_sat_lo++; else model--; end
      #1 check(int'(q) == model, "count step");
      @(negedge clk);
    end
    // reload in the middle of operation
    p = 5'b00111;
    pl_n = 1'b0; #1 check(q == 5'b00111, "reload of another preset");
    pl_n = 1'b1;
    check(n_sat_hi > 0 && n_sat_lo > 0, "both saturation limits exercised");
    $display("saturated high %0d times, low %0d times", n_sat_hi, n_sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
