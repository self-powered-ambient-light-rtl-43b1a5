// sar_dac_model_tb: checks the ideal DAC, vdac = vref * code / 256, for every
// code and two reference voltages.
`timescale 1ns/1ps
module sar_dac_model_tb;
  real vref, vdac;
  logic [7:0] code;
  sar_dac_model #(.N_BITS(8)) dut (.vref(vref), .code(code), .vdac(vdac));
  int checks = 0, failures = 0;

  task automatic checkr(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++) begin
      vref = (r == 0) ? 0.4956 : 0.7524;
      for (int c = 0; c < 256; c++) begin
        code = 8'(c);
        #1 checkr("vdac", vdac, vref * c / 256.0, 1e-12);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
