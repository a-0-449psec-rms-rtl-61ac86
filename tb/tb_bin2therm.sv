// tb_bin2therm: exhaustive test of the binary-to-thermometer decoder.
// For every 5-bit input v it checks that bit 31 is set, that bits 0..30
// hold exactly v ones, and that they are the v lowest bits (no bubbles),
// against an expected word built here by shifting.
`timescale 1ns/1ps
module tb_bin2therm;
  import adpll_pkg::*;
  logic [CODE_W-1:0]  bin;
  logic [THERM_W-1:0] therm, expct;
  int checks = 0, failures = 0;

  bin2therm dut (.bin, .therm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      bin = CODE_W'(v);
      #1;
      expct = (32'h1 << 31) | ((32'h1 << v) - 32'h1);
      checks++;
      if (therm !== expct || $countones(therm) != v + 1) begin
        failures++;
        $display("FAIL: bin=%0d therm=%b expected %b", v, therm, expct);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
