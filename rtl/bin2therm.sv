// bin2therm: binary-to-thermometer decoder for the DCO capacitor arrays.
// A 5-bit code v turns on the v lowest of the 31 decoded outputs; output
// bit 31 (the 32nd element) is tied high, so v+1 elements are always on.
// Structure follows the transistor design it models: a minterm array
// (NAND gates on true and inverted inputs) selects exactly one of 32 rows,
// one row per input value, and a 32 x 31 switch matrix lets the selected
// row drive every column: high where the column index is below the row's
// value, low elsewhere. Row masks are computed, not tabulated:
// row r drives column c high when c < r. Purely combinational.
`timescale 1ns/1ps
module bin2therm
  import adpll_pkg::*;
(
  input  logic [CODE_W-1:0]  bin,    // binary code from the loop filter
  output logic [THERM_W-1:0] therm   // thermometer code, therm[31] = 1
);
  localparam int ROWS = 1 << CODE_W;

  logic [ROWS-1:0] row;   // one-hot minterm select

  // minterm array: row r is active when bin equals r
  always_comb begin
    for (int r = 0; r < ROWS; r++)
      row[r] = (bin == CODE_W'(r));
  end

  // switch matrix: column c is pulled high by any active row above it
  always_comb begin
    for (int c = 0; c < THERM_W - 1; c++) begin
      therm[c] = 1'b0;
      for (int r = c + 1; r < ROWS; r++)
        therm[c] = therm[c] | row[r];
    end
    therm[THERM_W-1] = 1'b1;
  end
endmodule
