// comparator: behavioural model (not synthesizable) of the comparator that
// squares the LC tank sinusoid. In silicon it is a differential pair
// followed by a buffer; here the output is high whenever vin is above the
// threshold vth and low otherwise, with no hysteresis and no delay.
`timescale 1ns/1ps
module comparator (
  input  real  vin,   // tank voltage
  input  real  vth,   // switching threshold (the tank common mode)
  output logic out    // rail-to-rail clock
);
  always_comb out = (vin > vth);
endmodule
