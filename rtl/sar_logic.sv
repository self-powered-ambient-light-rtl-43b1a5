// sar_logic: successive-approximation register and sequencer of the light ADC.
//
// The photodetector voltage goes straight to the comparator (no buffer, no
// sample-and-hold), so a conversion is just a binary search: the sequencer sets
// the trial code 100..0 on the DAC, and on each following rising edge keeps or
// clears the bit under trial according to the comparator and sets the next
// lower bit. The comparator is a dynamic latch that draws power only when it is
// strobed; cmp_en_o is high only while a conversion runs, and the latch is
// expected to resolve on the falling edge so that cmp_i is ready at the next
// rising edge. cmp_i = 1 means the input is above the DAC voltage.
//
// Timing: conversions repeat every CONV_CYCLES clocks. One edge starts a
// conversion and N_BITS edges decide the bits; valid_o pulses for one cycle
// with the code on result_o (held until the next result). The sample rate is
// f_clk / CONV_CYCLES: with the default 10 cycles a 360 Hz on-chip clock gives
// the 36 samples/s maximum of the design, and a clock slowed to 180 Hz at the
// lowest light gives 18 samples/s.
// Resolution, SAR architecture and sample rates follow the document; the cycle
// count per conversion and the clock frequency it implies are assumptions.
`timescale 1ns/1ps
module sar_logic #(
  parameter int unsigned N_BITS      = 8,
  parameter int unsigned CONV_CYCLES = 10   // >= N_BITS + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmp_i,
  output logic              cmp_en_o,
  output logic [N_BITS-1:0] dac_code_o,
  output logic [N_BITS-1:0] result_o,
  output logic              valid_o
);

  localparam int unsigned CW = $clog2(CONV_CYCLES);
  localparam int unsigned BW = $clog2(N_BITS);

  logic [CW-1:0]     cyc_q;
  logic [BW-1:0]     bit_q;
  logic              busy_q;
  logic [N_BITS-1:0] sar_q, decided;

  // trial code with the bit under test resolved by the comparator
  always_comb begin
    decided = sar_q;
    decided[bit_q] = cmp_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_q    <= '0;
      bit_q    <= '0;
      busy_q   <= 1'b0;
      sar_q    <= '0;
      result_o <= '0;
      valid_o  <= 1'b0;
    end else begin
      valid_o <= 1'b0;
      cyc_q   <= (cyc_q == CW'(CONV_CYCLES - 1)) ? '0 : cyc_q + 1'b1;
      if (cyc_q == '0) begin
        sar_q  <= {1'b1, {(N_BITS-1){1'b0}}};
        bit_q  <= BW'(N_BITS - 1);
        busy_q <= 1'b1;
      end else if (busy_q) begin
        if (bit_q == '0) begin
          sar_q    <= decided;
          result_o <= decided;
          valid_o  <= 1'b1;
          busy_q   <= 1'b0;
        end else begin
          sar_q            <= decided;
          sar_q[bit_q - 1] <= 1'b1;
          bit_q            <= bit_q - 1'b1;
        end
      end
    end
  end

  assign dac_code_o = sar_q;
  assign cmp_en_o   = busy_q;

  initial assert (CONV_CYCLES >= N_BITS + 1) else $error("CONV_CYCLES too small");

endmodule
