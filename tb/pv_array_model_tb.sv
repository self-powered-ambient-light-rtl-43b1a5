// pv_array_model_tb: checks the supply of the PV cell model: 3 x 0.413 V at the
// minimum irradiance, 3 x 0.627 V at the maximum, clamping outside that range,
// the log-linear law at the geometric mean, and that the supply rises with light.
`timescale 1ns/1ps
module pv_array_model_tb;
  real e, v;
  pv_array_model dut (.irradiance(e), .vdd(v));
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
    real prev;
    e = 0.33;  #1 checkr("vdd at min light", v, 1.239, 1e-6);
    e = 250.0; #1 checkr("vdd at max light", v, 1.881, 1e-6);
    e = 0.01;  #1 checkr("clamp below", v, 1.239, 1e-6);
    e = 1e4;   #1 checkr("clamp above", v, 1.881, 1e-6);
    e = $sqrt(0.33 * 250.0); #1 checkr("geometric mean", v, 1.56, 1e-6);
    prev = 0.0;
    for (int k = 0; k < 30; k++) begin
      e = 0.33 * (1.25 ** k);
      #1;
      checkr("monotonic", (v > prev) ? 1.0 : 0.0, 1.0, 0.0);
      prev = v;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
