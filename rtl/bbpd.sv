// bbpd: bang-bang phase detector. A flip-flop clocked by the reference
// samples the squared DCO output. If the DCO is already high at the
// reference rising edge its edge came first (DCO early, lead = 1);
// otherwise the DCO is late (lead = 0). Only the sign of the phase error
// is produced, never its size. lead is registered on the reference rising
// edge and cleared by the asynchronous reset.
`timescale 1ns/1ps
module bbpd (
  input  logic rst_n,   // asynchronous reset, active low
  input  logic ref_clk, // reference clock
  input  logic dco_clk, // comparator output (squared DCO)
  output logic lead     // 1: DCO edge leads the reference edge
);
  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) lead <= 1'b0;
    else        lead <= dco_clk;
  end
endmodule
