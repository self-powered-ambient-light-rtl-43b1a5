// reference_model: behavioural model (not synthesizable) of the current and
// voltage reference generator.
//
// The supply can be as low as about 1.2 V, too low for a bandgap, so both
// references are derived from the supply itself and move with the light level;
// the wide light range makes that acceptable. The model scales the supply:
// vref = K_V * vdd (the ADC full scale) and iref = vdd / R_EQ (a bias current in
// amperes). Supply-derived references follow the document; K_V and R_EQ are
// assumed values. Interface: supply in volts in, vref and iref out.
`timescale 1ns/1ps
module reference_model #(
  parameter real K_V  = 0.4,
  parameter real R_EQ = 1.0e9     // ohms: about 1.2 nA at 1.2 V
) (
  input  real vdd,
  output real vref,
  output real iref
);

  assign vref = K_V * vdd;
  assign iref = vdd / R_EQ;

endmodule
