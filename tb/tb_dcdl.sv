// tb_dcdl: measures the delay of the delay-line model for several select
// words and compares it with 2 ns + sel * 44 ps (to 1 ps), checks the
// 2 ns and 4.772 ns ends of the range, and that a reference clock with a
// period shorter than the delay comes through with every edge kept.
`timescale 1ns/1ps
module tb_dcdl;
  import adpll_pkg::*;
  logic in = 1'b0, out;
  logic [DCDL_W-1:0] sel;
  real delay_ns;
  int checks = 0, failures = 0;

  dcdl dut (.in, .sel, .out, .delay_ns);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sels [5] = '{0, 1, 27, 40, 63};
    foreach (sels[k]) begin
      realtime t0, d, expd;
      sel = DCDL_W'(sels[k]);
      #10;
      in = 1'b1; t0 = $realtime;
      @(posedge out); d = $realtime - t0;
      expd = 2.0 + 0.044 * sels[k];
      checks++;
      if (d < expd - 0.001 || d > expd + 0.001) begin
        failures++;
        $display("FAIL: sel=%0d delay %.3f ns expected %.3f", sels[k], d, expd);
      end
      #10 in = 1'b0;
      #10;
    end
    // 1.6 ns clock through a 3.188 ns delay: 20 rising edges in, 20 out
    begin
      int n_out;
      n_out = 0;
      sel = 6'd27;
      fork
        repeat (20) begin in = 1'b1; #0.8; in = 1'b0; #0.8; end
        begin
          repeat (20) begin @(posedge out); n_out++; end
        end
      join
      checks++;
      if (n_out != 20) begin failures++; $display("FAIL: edges lost"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
