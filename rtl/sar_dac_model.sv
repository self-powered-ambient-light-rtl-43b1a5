// sar_dac_model: behavioural model (not synthesizable) of the SAR ADC's DAC.
//
// Turns the trial code of the successive-approximation register into the
// voltage the comparator weighs the photodiode against: an ideal binary DAC,
// vdac = vref * code / 2^N_BITS. A SAR ADC needs one; its circuit is not given,
// so the ideal transfer curve is this model's choice.
// Interface: reference voltage and code in, DAC voltage out, continuous.
`timescale 1ns/1ps
module sar_dac_model #(
  parameter int N_BITS = 8
) (
  input  real              vref,
  input  logic [N_BITS-1:0] code,
  output real              vdac
);

  assign vdac = vref * real'(code) / real'(2 ** N_BITS);

endmodule
