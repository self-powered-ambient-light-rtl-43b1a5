// pv_array_model: behavioural model (not synthesizable) of the energy-harvesting
// photovoltaic cells that supply the chip.
//
// Three trench-isolated PV cells in series give the supply with no charge pump.
// Each cell's voltage rises with the logarithm of irradiance: 0.413 V at the
// minimum irradiance of 0.33 W/m^2 and 0.627 V at the maximum of 250 W/m^2 (the
// document's figures). Between those points the model interpolates in log(E);
// outside them it clamps. The series count and the two end points follow the
// document; the log interpolation is this model's choice.
// Interface: irradiance in W/m^2 in, supply voltage in volts out, continuous.
`timescale 1ns/1ps
module pv_array_model #(
  parameter int  N_CELLS = 3,
  parameter real V_MIN   = 0.413,   // V per cell at E_MIN
  parameter real V_MAX   = 0.627,   // V per cell at E_MAX
  parameter real E_MIN   = 0.33,    // W/m^2
  parameter real E_MAX   = 250.0    // W/m^2
) (
  input  real irradiance,
  output real vdd
);

  function automatic real cell_v(input real e);
    real ec;
    ec = (e < E_MIN) ? E_MIN : (e > E_MAX) ? E_MAX : e;
    return V_MIN + (V_MAX - V_MIN) * $ln(ec / E_MIN) / $ln(E_MAX / E_MIN);
  endfunction

  assign vdd = N_CELLS * cell_v(irradiance);

endmodule
