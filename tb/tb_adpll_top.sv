// tb_adpll_top: end-to-end test of the ADPLL at its default parameters.
// A reference clock (default 625 MHz) drives the loop from reset through
// the PFD, BBPD and injection phases. The testbench checks that the
// counter starts from the 10000 preset, that the PFD phase ends within
// one code of the code whose period is nearest the reference (worked out
// here from the oscillator's T^2 = T0^2 + n*K law), that this code is first
// reached within 300 ns, that in the injection phase the code stays within
// two codes of it and the DCO edge count over 100 reference cycles gives a
// frequency within 3 % of the reference; a second acquisition from reset
// at 422.2 MHz must climb to within one code of 30; and it
// counts every mechanism: PFD UP and DN pulses, cycle slips of both kinds, counter steps up and down,
// both mode switches, BBPD early and late decisions and injection pulses.
`timescale 1ns/1ps
module tb_adpll_top;
  import adpll_pkg::*;

  localparam real REF_MHZ   = 625.0;
  localparam real T_REF     = 1000.0 / REF_MHZ;
  localparam real REF2_MHZ  = 422.2;          // second acquisition, below the preset
  real t_half = T_REF / 2.0;
  localparam int  N_CYCLES  = 600;            // reference cycles simulated

  logic ref_clk = 1'b0, rst_n = 1'b0;
  logic [DCDL_W-1:0] dcdl_sel;
  logic dco_clk, pfd_up, pfd_dn, bb_lead, inj_pulse;
  logic [CODE_W-1:0] code;
  loop_mode_e mode;
  real dco_period_ns, dcdl_delay_ns;

  adpll_top dut (.*);

  int checks = 0, failures = 0;
  int n_up = 0, n_dn = 0, n_inc = 0, n_dec = 0, n_to_bbpd = 0, n_to_inj = 0;
  int n_lead = 0, n_lag = 0, n_inj = 0, n_dco_edges = 0;
  int lock_cycle = -1, n_slip_slow = 0, n_slip_fast = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Independent expectation: ones needed so that T(n) is closest to T_REF
  function automatic int best_ones();
    real best = 1.0e9; int bn = 0;
    for (int n = 1; n <= 32; n++) begin
      real t = $sqrt(1.848830 + n * 0.123280);
      if ((t > T_REF ? t - T_REF : T_REF - t) < best) begin
        best = (t > T_REF ? t - T_REF : T_REF - t); bn = n;
      end
    end
    return bn;
  endfunction

  always #(t_half) ref_clk = !ref_clk;

  always @(posedge pfd_up) n_up++;
  always @(posedge pfd_dn) n_dn++;
  always @(posedge inj_pulse) n_inj++;
  always @(posedge dco_clk) n_dco_edges++;

  logic [CODE_W-1:0] code_q;
  loop_mode_e mode_q;
  int cyc = 0;
  always @(posedge ref_clk) begin
    cyc++;
    if (rst_n) begin
      if (code > code_q) n_inc++;
      if (code < code_q) n_dec++;
      if (mode_q == MODE_PFD  && mode == MODE_BBPD) n_to_bbpd++;
      if (mode_q == MODE_BBPD && mode == MODE_INJ)  n_to_inj++;
      if (dut.slip_slow) n_slip_slow++;
      if (dut.slip_fast) n_slip_fast++;
      if (mode != MODE_PFD) begin
        if (bb_lead) n_lead++; else n_lag++;
      end
      if (lock_cycle < 0 && int'(code) + 1 >= best_ones() - 1 && int'(code) + 1 <= best_ones() + 1)
        lock_cycle = cyc;
    end
    code_q = code;
    mode_q = mode;
  end

  initial begin
    #(T_REF * (N_CYCLES + 200) + 1000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int e0, lo, hi; real f_meas; int nb;
    // injection two reference periods after the edge, rounded up to a cell
    dcdl_sel = 6'($ceil((2.0 * T_REF - 2.0) / 0.044));
    nb = best_ones();
    #(T_REF * 3.3);
    check(code == CODE_PRESET, "counter preset to 10000 during reset");
    @(negedge ref_clk); rst_n = 1'b1;
    // PFD phase
    wait (mode == MODE_BBPD);
    $display("end of PFD phase: code=%0d period=%.4f ns (ref %.4f), best ones=%0d, lock cycle %0d",
             code, dco_period_ns, T_REF, nb, lock_cycle);
    check(int'(code) + 1 >= nb - 1 && int'(code) + 1 <= nb + 1, "PFD phase ends within one code of lock");
    check(lock_cycle > 0 && lock_cycle * T_REF < 300.0, "lock code reached within 300 ns");
    wait (mode == MODE_INJ);
    $display("end of BBPD phase: code=%0d", code);
    check(n_lead + n_lag > 0, "BBPD decisions made before injection");
    repeat (100) @(posedge ref_clk);
    e0 = n_dco_edges;
    lo = 31; hi = 0;
    repeat (100) begin
      @(posedge ref_clk);
      if (code < lo) lo = int'(code);
      if (code > hi) hi = int'(code);
    end
    f_meas = real'(n_dco_edges - e0) * REF_MHZ / 100.0;
    $display("injection phase: code=%0d, measured DCO %.1f MHz over 100 cycles", code, f_meas);
    $display("injection phase code range %0d..%0d", lo, hi);
    check(lo + 1 >= nb - 2 && hi + 1 <= nb + 2, "injection phase holds within two codes of lock");
    check(f_meas > REF_MHZ * 0.97 && f_meas < REF_MHZ * 1.03, "average DCO frequency within 3 %");
    $display("mechanisms: up=%0d dn=%0d inc=%0d dec=%0d to_bbpd=%0d to_inj=%0d lead=%0d lag=%0d inj=%0d",
             n_up, n_dn, n_inc, n_dec, n_to_bbpd, n_to_inj, n_lead, n_lag, n_inj);
    // second acquisition from reset at a reference below the preset
    // frequency: the DCO starts fast and the counter must climb
    t_half = 1000.0 / REF2_MHZ / 2.0;
    @(negedge ref_clk); rst_n = 1'b0;
    repeat (2) @(posedge ref_clk);
    @(negedge ref_clk); rst_n = 1'b1;
    wait (mode == MODE_BBPD);
    $display("acquisition at %.1f MHz: code=%0d period=%.4f ns", REF2_MHZ, code, dco_period_ns);
    check(code >= 5'd29, "second acquisition climbs to code 29..31 (nearest 30)");
    $display("cycle slips: slow=%0d fast=%0d", n_slip_slow, n_slip_fast);
    check(n_slip_slow > 0 && n_slip_fast > 0, "PFD cycle slips of both kinds seen");
    check(n_up > 0, "PFD UP pulses seen");
    check(n_dn > 0, "PFD DN pulses seen");
    check(n_inc > 0, "counter stepped up");
    check(n_dec > 0, "counter stepped down");
    check(n_to_bbpd == 1, "switch PFD -> BBPD once");
    check(n_to_inj == 1, "switch BBPD -> injection once");
    check(n_lead > 0 && n_lag > 0, "BBPD gave both decisions");
    check(n_inj > 0, "injection pulses reached the DCO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
