// pfd_slip: cycle-slip detector on the PFD state, used as the frequency
// information for the loop filter during acquisition. In the PFD state
// diagram the UP state loops on itself when a second reference edge
// arrives before the DCO edge, and the DN state loops on itself when a
// second DCO edge arrives before the reference edge; each such self-loop
// means one whole cycle gained or lost, so their rate is the frequency
// error. A self-loop in the UP state is seen directly on the reference
// edge (up already set). A self-loop in the DN state happens in the DCO
// clock domain, so it toggles a flag there that a two-flop synchroniser
// brings into the reference domain. Outputs are one reference cycle wide,
// registered on the reference rising edge; the DN slip arrives two to
// three reference cycles late.
`timescale 1ns/1ps
module pfd_slip (
  input  logic rst_n,
  input  logic a,        // reference clock
  input  logic b,        // DCO clock
  input  logic up,       // PFD flags
  input  logic dn,
  output logic slow,     // DCO lost a cycle (UP self-loop)
  output logic fast      // DCO gained a cycle (DN self-loop)
);
  logic       fast_tog;
  logic [2:0] fast_sync;

  always_ff @(posedge b or negedge rst_n) begin
    if (!rst_n)  fast_tog <= 1'b0;
    else if (dn) fast_tog <= !fast_tog;
  end

  always_ff @(posedge a or negedge rst_n) begin
    if (!rst_n) begin
      slow      <= 1'b0;
      fast_sync <= '0;
    end else begin
      slow      <= up;
      fast_sync <= {fast_sync[1:0], fast_tog};
    end
  end

  assign fast = fast_sync[2] ^ fast_sync[1];
endmodule
