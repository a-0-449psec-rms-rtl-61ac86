// loop_mux: the detector-select multiplexer in front of the loop filter.
// In MODE_PFD the count direction comes from the cycle slips seen on the
// PFD state: a DCO that gained a cycle (fast) makes the counter count up,
// i.e. add capacitance and slow the DCO; one that lost a cycle (slow)
// makes it count down. In the BBPD
// modes the bang-bang decision drives the counter every cycle: lead counts
// up, not-lead counts down. Combinational.
`timescale 1ns/1ps
module loop_mux
  import adpll_pkg::*;
(
  input  loop_mode_e mode,
  input  logic       slip_fast,
  input  logic       slip_slow,
  input  logic       bb_lead,
  output logic       inc,
  output logic       dec
);
  always_comb begin
    if (mode == MODE_PFD) begin
      inc = slip_fast && !slip_slow;
      dec = slip_slow && !slip_fast;
    end else begin
      inc = bb_lead;
      dec = !bb_lead;
    end
  end
endmodule
