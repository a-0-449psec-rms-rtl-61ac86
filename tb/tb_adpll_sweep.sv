// tb_adpll_sweep: runs the ADPLL (default parameters) at each reference
// frequency used in the design's own evaluation: 625, 715, 500, 422.2,
// 736 and 525 MHz. Every run starts from reset and goes through all three
// loop phases. For a reference the oscillator can reach, it checks that
// the PFD phase ends within one code of the code whose period is nearest
// the reference (from the oscillator's T^2 = T0^2 + n*K law), that the
// code stays within three codes of it with injection on (code steps are
// finer in frequency at the low end, so the hunt spans more codes there),
// and that the DCO frequency counted over 100 reference cycles is within
// 3 % of the reference. For a reference above the oscillator's top
// frequency (about 712 MHz with one element on: 715 and 736 MHz) it checks
// that the code is held at 0 and that the DCO runs between its top
// frequency and the reference (injection can pull it up to the reference).
`timescale 1ns/1ps
module tb_adpll_sweep;
  import adpll_pkg::*;

  localparam int N_RUNS = 6;
  localparam real REFS_MHZ [N_RUNS] = '{625.0, 715.0, 500.0, 422.2, 736.0, 525.0};

  real  t_ref = 1.6;
  logic ref_clk = 1'b0, rst_n = 1'b0;
  logic [DCDL_W-1:0] dcdl_sel;
  logic dco_clk, pfd_up, pfd_dn, bb_lead, inj_pulse;
  logic [CODE_W-1:0] code;
  loop_mode_e mode;
  real dco_period_ns, dcdl_delay_ns;

  adpll_top dut (.*);

  int checks = 0, failures = 0, n_dco_edges = 0, n_in_range = 0, n_out_range = 0;

  always #(t_ref / 2.0) ref_clk = !ref_clk;
  always @(posedge dco_clk) n_dco_edges++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real period_of(input int n);
    return $sqrt(1.848830 + n * 0.123280);
  endfunction

  function automatic int best_ones(input real t);
    real best = 1.0e9; int bn = 0;
    for (int n = 1; n <= 32; n++) begin
      real e = period_of(n) > t ? period_of(n) - t : t - period_of(n);
      if (e < best) begin best = e; bn = n; end
    end
    return bn;
  endfunction

  initial begin
    #40000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (REFS_MHZ[r]) begin
      int nb, e0, lo, hi, c_pfd; real f_meas, sel_r; bit reachable;
      t_ref = 1000.0 / REFS_MHZ[r];
      sel_r = $ceil((2.0 * t_ref - 2.0) / 0.044);
      dcdl_sel = sel_r > 63.0 ? 6'd63 : DCDL_W'(int'(sel_r));
      nb = best_ones(t_ref);
      reachable = t_ref >= period_of(1);
      rst_n = 1'b0;
      repeat (3) @(posedge ref_clk);
      @(negedge ref_clk); rst_n = 1'b1;
      wait (mode == MODE_BBPD);
      c_pfd = int'(code);
      wait (mode == MODE_INJ);
      repeat (100) @(posedge ref_clk);
      e0 = n_dco_edges; lo = 31; hi = 0;
      repeat (100) begin
        @(posedge ref_clk);
        if (int'(code) < lo) lo = int'(code);
        if (int'(code) > hi) hi = int'(code);
      end
      f_meas = real'(n_dco_edges - e0) * REFS_MHZ[r] / 100.0;
      $display("ref %6.1f MHz: sel=%0d best code=%0d, PFD end code=%0d, injection codes %0d..%0d, DCO %.1f MHz",
               REFS_MHZ[r], dcdl_sel, nb - 1, c_pfd, lo, hi, f_meas);
      if (reachable) begin
        n_in_range++;
        check(c_pfd + 1 >= nb - 1 && c_pfd + 1 <= nb + 1, "PFD phase ends within one code");
        check(lo + 1 >= nb - 3 && hi + 1 <= nb + 3, "injection phase within three codes");
        check(f_meas > REFS_MHZ[r] * 0.97 && f_meas < REFS_MHZ[r] * 1.03, "DCO frequency within 3 %");
      end else begin
        n_out_range++;
        check(c_pfd == 0 && hi == 0, "out of range: code held at 0");
        check(f_meas > 712.1 * 0.99 && f_meas < REFS_MHZ[r] * 1.01,
              "out of range: DCO between its top frequency and the reference");
      end
    end
    check(n_in_range == 4 && n_out_range == 2, "four references in range, two above it");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
