// lc_dco: behavioural model (not synthesizable) of the LC digitally
// controlled oscillator. The tank capacitance is set by two identical
// 32-element switched-capacitor arrays, both driven by the same
// thermometer word ctrl; every element switched on adds a fixed amount of
// capacitance, so more ones give a lower frequency. The model uses
// f = 1/(2*pi*sqrt(L*C)) in the form T^2 = T0SQ_NS2 + n*KSQ_NS2, n being
// the number of ones in ctrl. The two constants are fitted to the two
// measured points of the design (5 ones: 636.9 MHz, 9 ones: 581.4 MHz);
// the same fit gives 415 MHz with all 32 elements on, the bottom of the
// stated 415 MHz - 1 GHz range, and about 712 MHz with one element on.
// The output v_osc is the tank sinusoid (volts, centred on VCM), stepped
// every STEP_NS. A rising edge on inj (sub-harmonic injection pulse)
// pulls the oscillator phase towards the rising zero crossing by the
// fraction INJ_PULL. period_ns reports the period the current ctrl sets.
`timescale 1ns/1ps
module lc_dco
  import adpll_pkg::*;
#(
  parameter real T0SQ_NS2 = 1.848830,  // T^2 with no element on, ns^2
  parameter real KSQ_NS2  = 0.123280,  // T^2 added per element, ns^2
  parameter real STEP_NS  = 0.01,      // time step of the model
  parameter real VCM      = 0.5,       // common-mode level, V
  parameter real AMP      = 0.3,       // tank amplitude, V
  parameter real INJ_PULL = 0.5        // phase pull per injection pulse
) (
  input  logic [THERM_W-1:0] ctrl,     // thermometer word for both arrays
  input  logic               inj,      // injection pulse
  output real                v_osc,    // tank voltage
  output real                period_ns // period set by ctrl
);
  localparam real TWO_PI = 6.283185307179586;

  int unsigned inj_seen;   // injection pulses received
  int unsigned inj_used;   // injection pulses applied to the phase
  real         phase;      // cycles, kept in [0,1)

  always_comb period_ns = $sqrt(T0SQ_NS2 + real'($countones(ctrl)) * KSQ_NS2);

  always @(posedge inj) inj_seen <= inj_seen + 1;

  initial begin
    inj_seen = 0;
    inj_used = 0;
    phase    = 0.25;
    v_osc    = VCM + AMP;
    forever begin
      #(STEP_NS);
      phase = phase + STEP_NS / period_ns;
      if (inj_used != inj_seen) begin
        inj_used = inj_seen;
        // wrap to (-0.5, 0.5] and pull towards zero
        if (phase > 0.5) phase = phase - 1.0;
        phase = phase * (1.0 - INJ_PULL);
      end
      if (phase >= 1.0) phase = phase - 1.0;
      if (phase < 0.0)  phase = phase + 1.0;
      v_osc = VCM + AMP * $sin(TWO_PI * phase);
    end
  end
endmodule
