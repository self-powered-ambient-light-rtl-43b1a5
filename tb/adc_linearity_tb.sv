// adc_linearity_tb: static linearity of the light ADC assembled from sar_logic,
// the DAC model and the dynamic latch comparator model.
//
// The input is ramped in 1/16 LSB steps over the full range, one conversion per
// step. From the input at which each code first appears the test computes the
// differential and integral non-linearity (DNL, INL) and checks for missing
// codes. With ideal analogue models the result must be far inside the bounds
// the design was characterised to (DNL 1.05 LSB, INL 1.37 LSB, no missing
// codes); the check here is |DNL| and |INL| below 0.1 LSB.
`timescale 1ns/1ps
module adc_linearity_tb;
  localparam int N = 8;
  localparam int STEPS = 16;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, cmp, cmp_en, valid;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous resets act
  logic [N-1:0] dac_code, code;
  logic [31:0]  strobes;
  real vref = 0.6, vin = 0.0, vdac;

  always #5 clk = ~clk;

  sar_logic #(.N_BITS(N)) u_sar (.clk(clk), .rst_n(rst_n), .cmp_i(cmp), .cmp_en_o(cmp_en),
    .dac_code_o(dac_code), .result_o(code), .valid_o(valid));
  sar_dac_model #(.N_BITS(N)) u_dac (.vref(vref), .code(dac_code), .vdac(vdac));
  latch_comparator_model u_cmp (.clk(clk), .rst_n(rst_n), .en(cmp_en), .vinp(vin),
    .vinn(vdac), .out(cmp), .strobes(strobes));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real first_in [2**N];
  bit  seen [2**N];
  real lsb, dnl, inl, max_dnl, max_inl;
  int  missing;

  initial begin
    lsb = vref / real'(2**N);
    #22 rst_n = 1;
    @(posedge clk iff valid);      // discard the conversion in progress
    for (int s = 0; s < (2**N) * STEPS; s++) begin
      @(negedge clk);
      vin = (real'(s) + 0.5) * lsb / STEPS;
      @(posedge clk iff valid);
      #1;
      if (!seen[code]) begin
        seen[code] = 1;
        first_in[code] = vin;
      end
    end
    missing = 0;
    max_dnl = 0.0;
    max_inl = 0.0;
    for (int c = 0; c < 2**N; c++) if (!seen[c]) missing++;
    for (int c = 1; c < 2**N - 1; c++) begin
      dnl = (first_in[c + 1] - first_in[c]) / lsb - 1.0;
      if ((dnl < 0 ? -dnl : dnl) > max_dnl) max_dnl = (dnl < 0 ? -dnl : dnl);
    end
    for (int c = 1; c < 2**N; c++) begin
      inl = (first_in[c] - real'(c) * lsb) / lsb;
      if ((inl < 0 ? -inl : inl) > max_inl) max_inl = (inl < 0 ? -inl : inl);
    end
    $display("missing codes %0d, max |DNL| %f LSB, max |INL| %f LSB", missing, max_dnl, max_inl);
    checks++; if (missing != 0)   failures++;
    checks++; if (max_dnl > 0.1)  failures++;
    checks++; if (max_inl > 0.1)  failures++;
    checks++; if (strobes != 32'(N * ((2**N) * STEPS + 1)) && strobes != 32'(N * ((2**N) * STEPS + 2))) begin
      failures++;
      $display("FAIL strobes %0d", strobes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
