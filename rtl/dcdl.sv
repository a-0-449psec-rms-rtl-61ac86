// dcdl: behavioural model (not synthesizable) of the multiplexer-based
// digitally controlled delay line. 64 delay cells of T_CELL_NS (44 ps)
// are tapped by a 64-input multiplexer under the 6-bit word sel; the
// multiplexer and a fixed front cell give the minimum delay T_MIN_NS
// (2 ns), so the delay is T_MIN_NS + sel*T_CELL_NS, 2 ns to 4.77 ns.
// Every edge of in is reproduced at out after that delay (transport
// delay: edges closer together than the delay are all kept).
`timescale 1ns/1ps
module dcdl
  import adpll_pkg::*;
#(
  parameter real T_MIN_NS  = 2.0,
  parameter real T_CELL_NS = 0.044
) (
  input  logic              in,
  input  logic [DCDL_W-1:0] sel,
  output logic              out,
  output real               delay_ns   // delay currently selected
);
  always_comb delay_ns = T_MIN_NS + real'(sel) * T_CELL_NS;

  // each edge spawns its own delayed update, so pending edges are not lost
  initial out = 1'b0;
  always @(in) begin
    automatic logic v = in;
    automatic real  d = delay_ns;
    fork
      begin
        #(d);
        out <= v;
      end
    join_none
  end
endmodule
