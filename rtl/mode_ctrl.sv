// mode_ctrl: sequences the loop through its three phases, counted in
// reference cycles after reset: PFD_CYCLES of PFD acquisition, then
// BBPD_CYCLES with the bang-bang detector alone, then the bang-bang loop
// with the delay-line injection path switched on, which it keeps.
// The order of the phases follows the design description; timing them
// with fixed cycle counts is this design's own choice. Outputs are
// registered on the reference clock: mode, pfd_en (low stops the PFD) and
// inj_en (gates the injection pulse). Asynchronous active-low reset.
`timescale 1ns/1ps
module mode_ctrl
  import adpll_pkg::*;
#(
  parameter int unsigned PFD_CYCLES  = 256,
  parameter int unsigned BBPD_CYCLES = 16
) (
  input  logic       clk,      // reference clock
  input  logic       rst_n,
  output loop_mode_e mode,
  output logic       pfd_en,
  output logic       inj_en
);
  localparam int unsigned CNT_W = $clog2(PFD_CYCLES + BBPD_CYCLES + 1) + 1;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      mode <= MODE_PFD;
    end else begin
      unique case (mode)
        MODE_PFD: begin
          if (cnt == CNT_W'(PFD_CYCLES - 1)) begin
            cnt  <= '0;
            mode <= MODE_BBPD;
          end else cnt <= cnt + 1'b1;
        end
        MODE_BBPD: begin
          if (cnt == CNT_W'(BBPD_CYCLES - 1)) begin
            cnt  <= '0;
            mode <= MODE_INJ;
          end else cnt <= cnt + 1'b1;
        end
        default: mode <= MODE_INJ;
      endcase
    end
  end

  // the phases only move forward, and the injection phase is kept
  a_inj_kept: assert property (@(posedge clk) disable iff (!rst_n)
      $past(mode) == MODE_INJ |-> mode == MODE_INJ);

  assign pfd_en = (mode == MODE_PFD);
  assign inj_en = (mode == MODE_INJ);
endmodule
