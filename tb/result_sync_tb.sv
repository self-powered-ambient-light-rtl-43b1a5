// result_sync_tb: self-checking test of the ADC-to-bus clock-domain crossing.
//
// The source clock is slow and the destination clock is gated, as the bus
// clock is between messages. For a series of random codes the test checks
// that each appears on code_o exactly at the fourth destination edge after its
// toggle, that new_o pulses once per code, that hold_i freezes the output
// until it drops, and that the newest of any number of codes written while the destination clock is
// stopped appears once the clock runs again.
`timescale 1ns/1ps
module result_sync_tb;
  int checks = 0, failures = 0;
  logic src_clk = 0, dst_clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous resets act
  logic src_valid = 0, hold = 0, new_o;
  logic [7:0] src_code = 0, code_o;
  int news = 0;

  result_sync #(.W(8)) dut (.src_clk(src_clk), .rst_n(rst_n), .src_valid(src_valid),
    .src_code(src_code), .dst_clk(dst_clk), .hold_i(hold), .code_o(code_o), .new_o(new_o));

  always #50 src_clk = ~src_clk;
  always @(posedge dst_clk) if (new_o) news++;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic dpulse(input int n);
    repeat (n) begin
      #7 dst_clk = 1;
      #7 dst_clk = 0;
    end
  endtask

  task automatic produce(input logic [7:0] c);
    @(negedge src_clk);
    src_code = c; src_valid = 1;
    @(negedge src_clk);
    src_valid = 0;
    src_code = ~c;     // the hold register must not follow the input
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #120 rst_n = 1;
    check("reset code", code_o, 0);
    for (int k = 0; k < 20; k++) begin
      logic [7:0] c, prev;
      int n0;
      c = 8'($urandom);
      prev = code_o;
      n0 = news;
      produce(c);
      dpulse(3);
      check("not yet after 3 edges", code_o, prev);
      dpulse(1);
      check("visible after 4 edges", code_o, c);
      dpulse(5);
      check("one new pulse", news - n0, 1);
    end
    // hold freezes the copy
    hold = 1;
    produce(8'h3D);
    dpulse(6);
    check("held", code_o == 8'h3D, 0);
    hold = 0;
    dpulse(1);
    check("released", code_o, 8'h3D);
    // several codes while the destination clock is stopped: the last one wins
    for (int n = 2; n <= 17; n++) begin
      for (int k = 0; k < n; k++) produce(8'(n * 13 + k));
      dpulse(4);
      check("latest after clock gap", code_o, 32'((n * 13 + n - 1) % 256));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
