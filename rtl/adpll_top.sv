// adpll_top: dividerless all-digital PLL with sub-harmonic injection.
// The LC DCO output, squared by the comparator, is compared directly with
// the reference (no feedback divider). A 5-bit up/down counter is the
// loop filter; its code goes through a binary-to-thermometer decoder to
// the DCO capacitor arrays (more ones = more capacitance = lower
// frequency). The loop runs in three phases chosen by mode_ctrl:
//   MODE_PFD  - the three-state PFD acquires frequency and phase;
//   MODE_BBPD - the PFD is stopped and the multiplexer hands the counter
//               to the bang-bang detector for fine phase tracking;
//   MODE_INJ  - in addition the reference, delayed by the DCDL and turned
//               into a narrow pulse, is injected into the DCO.
// The counter is clocked on the falling edge of the reference, half a
// reference period after the detectors act on the rising edge, and is
// preset to 10000 while rst_n is low. All of this structure follows the
// design description; the half-cycle sampling point, the fixed phase
// lengths and the dcdl_sel input (the delay word is not said to come from
// anywhere) are this design's own choices. The DCO, comparator, delay line
// and pulse generator are behavioural models, so this top is for
// simulation (with timing) rather than synthesis.
`timescale 1ns/1ps
module adpll_top
  import adpll_pkg::*;
#(
  parameter int unsigned PFD_CYCLES  = 256,  // reference cycles of PFD phase
  parameter int unsigned BBPD_CYCLES = 16    // BBPD-only cycles before injection
) (
  input  logic              ref_clk,    // reference clock, 415 MHz - 1 GHz
  input  logic              rst_n,      // asynchronous reset / counter preset
  input  logic [DCDL_W-1:0] dcdl_sel,   // injection delay word
  output logic              dco_clk,    // ADPLL output clock
  output logic [CODE_W-1:0] code,       // loop filter code
  output loop_mode_e        mode,       // current loop phase
  output logic              pfd_up,
  output logic              pfd_dn,
  output logic              bb_lead,
  output logic              inj_pulse,
  output real               dco_period_ns,  // DCO period the code sets
  output real               dcdl_delay_ns   // injection delay selected
);
  logic               pfd_en, inj_en, slip_fast, slip_slow, inc, dec, dlf_clk, ref_dly;
  logic [THERM_W-1:0] therm;
  real                v_osc;

  mode_ctrl #(.PFD_CYCLES(PFD_CYCLES), .BBPD_CYCLES(BBPD_CYCLES)) u_mode (
    .clk(ref_clk), .rst_n, .mode, .pfd_en, .inj_en);

  pfd u_pfd (.rst_n, .en(pfd_en), .a(ref_clk), .b(dco_clk), .up(pfd_up), .dn(pfd_dn));

  bbpd u_bbpd (.rst_n, .ref_clk, .dco_clk, .lead(bb_lead));

  pfd_slip u_slip (.rst_n, .a(ref_clk), .b(dco_clk), .up(pfd_up), .dn(pfd_dn),
                   .slow(slip_slow), .fast(slip_fast));

  loop_mux u_mux (.mode, .slip_fast, .slip_slow, .bb_lead, .inc, .dec);

  assign dlf_clk = !ref_clk;

  dlf_counter u_dlf (.clk(dlf_clk), .pl_n(rst_n), .p(CODE_PRESET), .inc, .dec, .q(code));

  bin2therm u_dec (.bin(code), .therm);

  lc_dco u_dco (.ctrl(therm), .inj(inj_pulse), .v_osc, .period_ns(dco_period_ns));

  comparator u_cmp (.vin(v_osc), .vth(0.5), .out(dco_clk));

  dcdl u_dcdl (.in(ref_clk), .sel(dcdl_sel), .out(ref_dly), .delay_ns(dcdl_delay_ns));

  pulse_gen u_pg (.in(ref_dly), .en(inj_en), .out(inj_pulse));
endmodule
