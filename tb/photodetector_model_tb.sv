// photodetector_model_tb: checks that the forward-biased photodiode model gives
// V_AT_MIN at the minimum irradiance, adds N_VT*ln(10) per decade of light,
// and clamps below the minimum irradiance.
`timescale 1ns/1ps
module photodetector_model_tb;
  real e, v;
  photodetector_model dut (.irradiance(e), .vpd(v));
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
    real v0;
    e = 0.33; #1 checkr("vpd at min light", v, 0.25, 1e-9);
    e = 0.1;  #1 checkr("clamped", v, 0.25, 1e-9);
    for (int k = 0; k < 4; k++) begin
      e = 0.33 * (10.0 ** k);
      #1 v0 = v;
      e = e * 10.0;
      #1 checkr("per decade", v - v0, 0.035 * $ln(10.0), 1e-9);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
