// dlf_counter: digital loop filter, a 5-bit synchronous up/down counter
// with an asynchronous parallel load. While pl_n is low the counter holds
// the preset inputs p (the loop starts from 10000, mid-range, to shorten
// lock); once pl_n returns high it counts on each rising clk edge: up when
// inc is set, down when dec is set, holding when neither or both are set.
// The structure is the classic synchronous counter with look-ahead
// carry: every bit is a toggle flip-flop, and bit i toggles when all lower
// bits are 1 (counting up) or all are 0 (counting down), formed by an
// i-input AND gate per bit (a 0-input gate, i.e. always, for bit 0).
// Unlike a 74-series counter, which wraps, this one saturates at 0 and 31:
// a step past either end is suppressed, so a full-scale excursion cannot
// jump the oscillator from one end of its range to the other.
// Output q is the registered code, valid one clk edge after a step.
`timescale 1ns/1ps
module dlf_counter
  import adpll_pkg::*;
(
  input  logic              clk,    // loop-filter update clock
  input  logic              pl_n,   // asynchronous parallel load, active low
  input  logic [CODE_W-1:0] p,      // preset value
  input  logic              inc,    // count up (lower DCO frequency)
  input  logic              dec,    // count down (higher DCO frequency)
  output logic [CODE_W-1:0] q
);
  logic              up, step;
  logic [CODE_W-1:0] t_up, t_dn, tog;

  // look-ahead AND chain: t_up[i] = &q[i-1:0], t_dn[i] = &~q[i-1:0]
  // (carry_up / carry_dn leave as &q and &~q: the carry out of bit 4)
  logic carry_up, carry_dn;
  always_comb begin
    carry_up = 1'b1;
    carry_dn = 1'b1;
    for (int i = 0; i < CODE_W; i++) begin
      t_up[i]  = carry_up;
      t_dn[i]  = carry_dn;
      carry_up = carry_up & q[i];
      carry_dn = carry_dn & !q[i];
    end
  end

  // a carry/borrow out of the top bit would wrap: suppress it
  assign up   = inc && !dec;
  assign step = up ? !carry_up : (dec && !inc && !carry_dn);
  assign tog  = step ? (up ? t_up : t_dn) : '0;

  always_ff @(posedge clk or negedge pl_n) begin
    if (!pl_n) q <= p;
    else       q <= q ^ tog;
  end

  // the code moves by at most one step per clock and never wraps
  a_one_step: assert property (@(posedge clk) disable iff (!pl_n)
      (q == $past(q)) || (q == $past(q) + 1'b1 && $past(q) != '1)
                      || (q == $past(q) - 1'b1 && $past(q) != '0));
endmodule
