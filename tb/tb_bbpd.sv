// tb_bbpd: tests the bang-bang detector with a DCO clock shifted against
// the reference by a set of offsets. An offset within the half period
// before the reference edge (DCO early) must give lead = 1 after that
// edge, one within the half period after it (DCO late) lead = 0; reset
// clears lead.
`timescale 1ns/1ps
module tb_bbpd;
  logic rst_n = 1'b0, ref_clk = 1'b0, dco_clk = 1'b0, lead;
  int checks = 0, failures = 0;
  localparam real T = 1.6;

  bbpd dut (.rst_n, .ref_clk, .dco_clk, .lead);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real offs [8] = '{-0.7, -0.4, -0.1, -0.02, 0.02, 0.1, 0.4, 0.7};
    #1;
    checks++; if (lead !== 1'b0) failures++;
    rst_n = 1'b1;
    foreach (offs[k]) begin
      // DCO rising edge at t0 + offs[k], reference rising edge at t0 = now + 2
      fork
        begin #(2.0 + offs[k]); dco_clk = 1'b1; #(T / 2); dco_clk = 1'b0; end
        begin #2.0; ref_clk = 1'b1; #(T / 2); ref_clk = 1'b0; end
      join
      checks++;
      if (lead !== (offs[k] < 0.0)) begin
        failures++;
        $display("FAIL: offset %.2f ns gave lead=%b", offs[k], lead);
      end
      #2;
    end
    rst_n = 1'b0; #0.1;
    checks++; if (lead !== 1'b0) begin failures++; $display("FAIL: reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
