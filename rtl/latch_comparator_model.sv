// latch_comparator_model: behavioural model (not synthesizable) of the dynamic
// latch comparator of the SAR ADC.
//
// A dynamic latch has no static bias: it draws current only when strobed, and
// otherwise holds its last decision. The model resolves on the falling edge of
// clk when en is high (out = vinp > vinn) and keeps its output otherwise, so the
// SAR logic reads a settled decision on the next rising edge. It also counts
// strobes, the only moments the real latch consumes energy.
// The dynamic latch follows the document; the strobe edge is this design's.
`timescale 1ns/1ps
module latch_comparator_model (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  real         vinp,
  input  real         vinn,
  output logic        out,
  output logic [31:0] strobes
);

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out     <= 1'b0;
      strobes <= '0;
    end else if (en) begin
      out     <= (vinp > vinn);
      strobes <= strobes + 1;
    end
  end

endmodule
