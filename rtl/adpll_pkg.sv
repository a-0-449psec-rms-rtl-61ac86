// adpll_pkg: widths, preset value and loop-mode encoding shared by the
// ADPLL blocks. The 5-bit loop-filter code, the 32-element capacitor array,
// the 10000 preset and the 6-bit delay-line select follow the design
// description; the mode encoding is this design's own.
`timescale 1ns/1ps
package adpll_pkg;
  localparam int CODE_W    = 5;                 // loop filter / decoder input
  localparam int THERM_W   = 32;                // capacitor elements per array
  localparam int DCDL_W    = 6;                 // delay-line select (64 cells)
  localparam logic [CODE_W-1:0] CODE_PRESET = 5'b10000;  // mid-range start

  // Loop phases: PFD acquisition, BBPD tracking, BBPD tracking + injection.
  typedef enum logic [1:0] {
    MODE_PFD  = 2'd0,
    MODE_BBPD = 2'd1,
    MODE_INJ  = 2'd2
  } loop_mode_e;
endpackage
