// pfd: three-state phase and frequency detector. States (UP,DN) = 00, 10,
// 01. A rising edge on a (reference) sets UP, a rising edge on b (DCO
// output) sets DN; as soon as both are set the common asynchronous reset
// clears them, so the flag of the later input lasts only the reset path
// delay (zero in RTL). The UP (DN) pulse width therefore equals the time
// by which a leads (lags) b, and a frequency difference shows as a
// majority of UP or DN pulses. The linear range spans -2*pi..2*pi.
// en low (from the mode controller) holds both flags cleared: this is how
// the PFD is stopped once the bang-bang detector takes over.
// Two clock domains: up is timed by a, dn by b; rst_n is asynchronous.
`timescale 1ns/1ps
module pfd (
  input  logic rst_n,   // asynchronous reset, active low
  input  logic en,      // detector enabled
  input  logic a,       // reference clock
  input  logic b,       // DCO clock
  output logic up,      // a leads b: raise DCO frequency
  output logic dn       // b leads a: lower DCO frequency
);
  logic clr;
  assign clr = !rst_n || !en || (up && dn);

  always_ff @(posedge a or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge b or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end
endmodule
