// tb_mode_ctrl: checks the phase sequencer with short phases (5 PFD
// cycles, 3 BBPD cycles): the mode must move to BBPD exactly on the 5th
// reference edge after reset, to injection on the 8th, stay there, and
// drive pfd_en / inj_en accordingly; reset returns it to the PFD phase.
`timescale 1ns/1ps
module tb_mode_ctrl;
  import adpll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, pfd_en, inj_en;
  loop_mode_e mode, expm;
  int checks = 0, failures = 0;

  mode_ctrl #(.PFD_CYCLES(5), .BBPD_CYCLES(3)) dut (.clk, .rst_n, .mode, .pfd_en, .inj_en);

  always #5 clk = !clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1'b1;
    for (int e = 1; e <= 20; e++) begin
      @(posedge clk); #1;
      expm = (e < 5) ? MODE_PFD : (e < 8) ? MODE_BBPD : MODE_INJ;
      checks++;
      if (mode != expm || pfd_en != (expm == MODE_PFD) || inj_en != (expm == MODE_INJ)) begin
        failures++;
        $display("FAIL: edge %0d mode=%s expected %s", e, mode.name(), expm.name());
      end
    end
    rst_n = 1'b0; #1;
    checks++; if (mode != MODE_PFD || !pfd_en) begin failures++; $display("FAIL: reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
