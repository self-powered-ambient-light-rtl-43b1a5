// reference_model_tb: checks that both references follow the supply:
// vref = 0.4 * vdd and iref = vdd / 1 Gohm, across the harvested supply range.
`timescale 1ns/1ps
module reference_model_tb;
  real vdd, vref, iref;
  reference_model dut (.vdd(vdd), .vref(vref), .iref(iref));
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
    for (int k = 0; k <= 10; k++) begin
      vdd = 1.239 + 0.0642 * k;
      #1;
      checkr("vref", vref, 0.4 * vdd, 1e-12);
      checkr("iref", iref, vdd * 1e-9, 1e-18);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
