// pulse_gen: behavioural model (not synthesizable) of the injection pulse
// generator. In silicon the input is ANDed with an inverted, delayed copy
// of itself, so each rising edge of in yields a pulse whose width is the
// delay of the inverter path; the model produces that pulse directly:
// out rises with in and falls T_INV_NS later. en, sampled at the rising
// edge of in, gates the pulse (injection enable).
`timescale 1ns/1ps
module pulse_gen #(
  parameter real T_INV_NS = 0.03
) (
  input  logic in,
  input  logic en,
  output logic out
);
  // rising edge of in: out high for one inverter delay
  initial out = 1'b0;
  always @(posedge in) begin
    if (en) begin
      fork
        begin
          out <= 1'b1;
          #(T_INV_NS);
          out <= 1'b0;
        end
      join_none
    end
  end
endmodule
