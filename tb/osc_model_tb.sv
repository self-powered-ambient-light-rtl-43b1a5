// osc_model_tb: checks the on-chip clock model: 180 Hz at the minimum-light
// supply, 360 Hz at the full-light supply, 270 Hz half way, and no edges while
// disabled. Periods are measured between rising edges.
`timescale 1ns/1ps
module osc_model_tb;
  real vdd;
  logic en, clk;
  osc_model dut (.vdd(vdd), .en(en), .clk(clk));
  int checks = 0, failures = 0;

  task automatic checkr(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    #1_000_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input real v, input real f_exp);
    realtime t0, t1;
    vdd = v;
    repeat (2) @(posedge clk);
    t0 = $realtime;
    repeat (4) @(posedge clk);
    t1 = $realtime;
    checkr("frequency", 4.0e9 / (t1 - t0), f_exp, 0.01);
  endtask

  initial begin
    int edges;
    en = 1;
    measure(1.239, 180.0);
    measure(1.881, 360.0);
    measure(1.56, 270.0);
    measure(1.0, 180.0);
    en = 0;
    #20_000_000;
    edges = 0;
    fork
      begin repeat (100) @(posedge clk) edges++; end
      #100_000_000;
    join_any
    disable fork;
    checkr("stopped when disabled", real'(edges), 0.0, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
