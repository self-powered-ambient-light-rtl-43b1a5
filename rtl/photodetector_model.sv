// photodetector_model: behavioural model (not synthesizable) of the forward-biased
// sensing photodiode.
//
// Operated in forward bias (open circuit), the photodiode gives a voltage that
// grows with the logarithm of the light level, which widens the sensing range
// and lets the ADC take it directly, with no buffer and no sample-and-hold.
// The model is V = V_AT_MIN + N_VT * ln(E / E_MIN), clamped below E_MIN. The
// logarithmic behaviour follows the document; V_AT_MIN and N_VT are assumed
// values chosen to keep the voltage inside the ADC range over the light range.
// Interface: irradiance in W/m^2 in, photodiode voltage in volts out.
`timescale 1ns/1ps
module photodetector_model #(
  parameter real V_AT_MIN = 0.25,   // V at E_MIN
  parameter real N_VT     = 0.035,  // V per e-fold of irradiance
  parameter real E_MIN    = 0.33    // W/m^2
) (
  input  real irradiance,
  output real vpd
);

  assign vpd = V_AT_MIN + N_VT * $ln(((irradiance < E_MIN) ? E_MIN : irradiance) / E_MIN);

endmodule
