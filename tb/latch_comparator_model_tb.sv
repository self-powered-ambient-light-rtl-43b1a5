// latch_comparator_model_tb: checks the dynamic latch model: it decides
// vinp > vinn on the falling clock edge only while enabled, holds its decision
// while disabled, and counts exactly the enabled strobes.
`timescale 1ns/1ps
module latch_comparator_model_tb;
  logic clk = 0, rst_n = 1, en = 0, out;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous resets act
  logic [31:0] strobes;
  real vp, vn;
  latch_comparator_model dut (.clk(clk), .rst_n(rst_n), .en(en), .vinp(vp), .vinn(vn),
                              .out(out), .strobes(strobes));
  always #5 clk = ~clk;
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
    int n = 0;
    logic exp_out = 0;
    vp = 0.0; vn = 0.0;
    #12 rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      @(posedge clk);
      vp = real'($urandom_range(0, 1000)) / 1000.0;
      vn = real'($urandom_range(0, 1000)) / 1000.0;
      en = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (en) begin
        exp_out = vp > vn;
        n++;
      end
      #1;
      checkr("decision", real'(out), real'(exp_out), 0.0);
      checkr("strobes", real'(strobes), real'(n), 0.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
