// sar_logic_tb: self-checking test of the SAR sequencer.
//
// An ideal comparator in the testbench compares a real input (in LSBs) with
// the DAC code on the falling edge while cmp_en_o is high, as the dynamic
// latch does. Each conversion must give floor(input), clamped to 255; results
// must come every CONV_CYCLES clocks, and the comparator must be strobed
// exactly N_BITS times per conversion and never between conversions.
`timescale 1ns/1ps
module sar_logic_tb;
  localparam int N = 8, CC = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, cmp = 0, cmp_en, valid;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous resets act
  logic [N-1:0] dac, result;
  real vin = 0.0;
  int strobes = 0, cyc = 0, last_valid = -1;

  sar_logic #(.N_BITS(N), .CONV_CYCLES(CC)) dut (.clk(clk), .rst_n(rst_n), .cmp_i(cmp),
    .cmp_en_o(cmp_en), .dac_code_o(dac), .result_o(result), .valid_o(valid));

  always #5 clk = ~clk;
  always @(negedge clk) if (cmp_en) begin
    cmp <= (vin >= real'(dac));
    strobes++;
  end
  always @(posedge clk) cyc++;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_code, s0;
    #22 rst_n = 1;
    // first conversion starts at the first edge after reset
    for (int k = 0; k < 300; k++) begin
      real x;
      if (k < 3)       x = (k == 0) ? 0.2 : (k == 1) ? 255.7 : 127.999;
      else             x = real'($urandom_range(0, 25599)) / 100.0;
      @(negedge clk);
      vin = x;
      s0 = strobes;
      exp_code = int'($floor(x));
      @(posedge clk iff valid);
      #1;
      check("code", int'(result), exp_code);
      check("strobes per conversion", strobes - s0, N);
      if (last_valid >= 0) check("conversion period", cyc - last_valid, CC);
      last_valid = cyc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
