// osc_model: behavioural model (not synthesizable) of the on-chip clock generator.
//
// The on-chip clock runs slowly to save power and, powered by the harvesting
// cells, slows down as the light and so the supply fall. The model runs at
// F_MAX_HZ at the supply of full light and F_MIN_HZ at the supply of minimum
// light, linear in between and clamped outside, and stops (low) while en is
// low. With the 10-clock ADC conversion this gives the document's 36 samples/s
// at full light and 18 samples/s at minimum light; the frequencies are derived
// from those rates, the linear law is this model's choice.
// Interface: supply in volts and enable in, clock out.
`timescale 1ns/1ps
module osc_model #(
  parameter real F_MIN_HZ = 180.0,
  parameter real F_MAX_HZ = 360.0,
  parameter real V_LO     = 1.239,   // 3 x 0.413 V
  parameter real V_HI     = 1.881    // 3 x 0.627 V
) (
  input  real  vdd,
  input  logic en,
  output logic clk
);

  function automatic real freq(input real v);
    real vc;
    vc = (v < V_LO) ? V_LO : (v > V_HI) ? V_HI : v;
    return F_MIN_HZ + (F_MAX_HZ - F_MIN_HZ) * (vc - V_LO) / (V_HI - V_LO);
  endfunction

  initial clk = 1'b0;

  always begin
    #(0.5e9 / freq(vdd));
    clk = en ? ~clk : 1'b0;
  end

endmodule
