// tb_loop_mux: exhaustive test of the detector-select multiplexer over
// all three modes and all detector inputs, against the intended table:
// PFD mode counts on single slips only, BBPD modes count every cycle in
// the direction of the bang-bang decision.
`timescale 1ns/1ps
module tb_loop_mux;
  import adpll_pkg::*;
  loop_mode_e mode;
  logic slip_fast, slip_slow, bb_lead, inc, dec;
  int checks = 0, failures = 0;

  loop_mux dut (.mode, .slip_fast, .slip_slow, .bb_lead, .inc, .dec);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    loop_mode_e modes [3] = '{MODE_PFD, MODE_BBPD, MODE_INJ};
    foreach (modes[m]) begin
      for (int v = 0; v < 8; v++) begin
        logic ei, ed;
        mode = modes[m];
        {slip_fast, slip_slow, bb_lead} = 3'(v);
        #1;
        if (mode == MODE_PFD) begin ei = slip_fast & ~slip_slow; ed = slip_slow & ~slip_fast; end
        else                  begin ei = bb_lead;                ed = ~bb_lead; end
        checks++;
        if (inc !== ei || dec !== ed) begin
          failures++;
          $display("FAIL: mode=%s in=%b inc=%b dec=%b", mode.name(), 3'(v), inc, dec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
