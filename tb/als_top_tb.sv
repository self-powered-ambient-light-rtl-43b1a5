// als_top_tb: end-to-end test of the sensor chip at its default parameters.
//
// Light is applied as irradiance; a behavioural main device talks to the chip
// over the open-drain bus (the testbench resolves the line as a wired AND).
// Expected light codes are computed here from the analogue models' equations:
//   vdd  = 3 * (0.413 + 0.214 * ln(E/0.33) / ln(250/0.33))
//   vpd  = 0.25 + 0.035 * ln(E/0.33)
//   code = floor(256 * vpd / (0.4 * vdd))
// The test covers: conversion rate at full and minimum light (36 and 18
// samples/s), the one-control-bit 8-bit read and its 11-clock length,
// addressing reads and writes, re-mapping a field-length table, a message to
// another device, an over-long control run and a bit collision (both counted in
// the error register), and a slow message during which a new code arrives and
// must not disturb the payload. Each of these is counted, and one that never
// happened is a failure.
`timescale 1ns/1ps
module als_top_tb;
  import als_pkg::*;

  int checks = 0, failures = 0;
  int n_conv = 0, n_rate = 0, n_na = 0, n_ard = 0, n_awr = 0, n_remap = 0;
  int n_skip = 0, n_overlong = 0, n_collide = 0, n_freeze = 0, n_light = 0;

  real  irr;
  logic rst_n, zpc_clk, main_pd, sda_pd, line, dbg_clk;
  real  dbg_vdd;
  logic [7:0] dbg_code;
  assign line = ~(main_pd | sda_pd);

  als_top dut (.irradiance(irr), .rst_n(rst_n), .zpc_clk(zpc_clk), .sda_i(line),
               .sda_pd_o(sda_pd), .dbg_vdd(dbg_vdd), .dbg_clk(dbg_clk), .dbg_code(dbg_code));

  zpc_main_model u_main (.zpc_clk(zpc_clk), .pd(main_pd), .line(line));

  // monitors
  always @(posedge dbg_clk) if (dut.u_sar.valid_o) n_conv++;
  always @(posedge zpc_clk) if (dut.u_sync.hold_i && dut.u_sync.s1_q != dut.u_sync.seen_q
                                && dut.u_sync.s1_q == dut.u_sync.s3_q) n_freeze++;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic happened(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  function automatic int exp_code(input real e);
    real ec, vdd, vpd, c;
    ec  = (e < 0.33) ? 0.33 : (e > 250.0) ? 250.0 : e;
    vdd = 3.0 * (0.413 + 0.214 * $ln(ec / 0.33) / $ln(250.0 / 0.33));
    vpd = 0.25 + 0.035 * $ln(((e < 0.33) ? 0.33 : e) / 0.33);
    c   = 256.0 * vpd / (0.4 * vdd);
    return (c >= 255.0) ? 255 : int'($floor(c));
  endfunction

  // wait for conversions and check their period
  task automatic conv_period(input real f_sample);
    realtime t0, t1;
    repeat (2) @(posedge dbg_clk iff dut.u_sar.valid_o);
    t0 = $realtime;
    repeat (3) @(posedge dbg_clk iff dut.u_sar.valid_o);
    t1 = $realtime;
    checks++;
    if ((t1 - t0) / 3.0 > 1.001e9 / f_sample || (t1 - t0) / 3.0 < 0.999e9 / f_sample) begin
      failures++;
      $display("FAIL sample period %f ns, expected %f", (t1 - t0) / 3.0, 1.0e9 / f_sample);
    end else n_rate++;
  endtask

  initial begin
    #(3.0e9);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] v;
  int unsigned c0;
  int code_full, code_min, code_mid;

  initial begin
    irr = 250.0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;   // a falling edge, so the asynchronous resets act
    #1_000_000 rst_n = 1'b1;
    code_full = exp_code(250.0);
    code_min  = exp_code(0.33);
    code_mid  = exp_code(10.0);
    $display("expected codes: full %0d, 10 W/m2 %0d, min %0d", code_full, code_mid, code_min);

    // full light: 36 samples/s, one control bit reads the 8-bit code in 11 clocks
    conv_period(36.0);
    u_main.idle(4);
    c0 = u_main.clocks;
    u_main.read_na(1, 8, v);
    check("full-light code", v, code_full);
    check("one-control-bit read length", u_main.clocks - c0, 11);
    n_na++;

    // addressing read of the code register (device 101 + read, register 00)
    u_main.read_a(1, 1, 1, 32'b1011, 4, 32'h0, 2, 8, v);
    check("addressing read of code", v, code_full);
    n_ard++;

    // minimum light: 18 samples/s and a new code
    irr = 0.33;
    n_light++;
    repeat (2) @(posedge dbg_clk iff dut.u_sar.valid_o);
    conv_period(18.0);
    u_main.idle(4);
    u_main.read_na(1, 8, v);
    check("min-light code", v, code_min);
    n_na++;

    irr = 10.0;
    n_light++;
    repeat (2) @(posedge dbg_clk iff dut.u_sar.valid_o);
    u_main.idle(4);
    u_main.read_na(1, 8, v);
    check("mid-light code", v, code_mid);
    n_na++;

    // re-map: a single control bit now selects a 4-bit payload
    u_main.write_a(1, 1, 3, 32'b1010, 4, 32'h04, 8, 32'h04, 8);
    n_awr++;
    u_main.idle(1);
    u_main.read_na(1, 4, v);
    check("re-mapped 4-bit read", v, code_mid & 15);
    n_remap++;
    u_main.write_a(2, 1, 3, 32'b1010, 4, 32'h04, 8, 32'h08, 4);   // 4-bit payload (run 2) restores 8
    n_awr++;
    u_main.read_a(1, 1, 3, 32'b1011, 4, 32'h04, 8, 8, v);
    check("table entry restored", v, 8);
    n_ard++;

    // message for device 011: no answer, no write
    u_main.read_a(1, 1, 1, 32'b0111, 4, 32'h0, 2, 8, v);
    check("other device silent", v, 32'hFF);
    u_main.write_a(1, 1, 3, 32'b0110, 4, 32'h05, 8, 32'h1F, 8);
    u_main.read_a(1, 1, 3, 32'b1011, 4, 32'h05, 8, 8, v);
    check("other device did not write", v, 4);
    n_skip++;

    // over-long run, then a collision; the error register counts both
    u_main.ctrl_run(6);
    u_main.idle(1);
    n_overlong++;
    u_main.read_a(1, 1, 3, 32'b1011, 4, 32'h01, 8, 8, v);
    check("error count after over-long run", v, 1);
    begin
      int jam;
      jam = -1;
      for (int b = 7; b >= 0; b--) if (code_mid[b] && jam < 0) jam = b;
      u_main.read_na(1, 8, v, jam);
      n_collide++;
    end
    u_main.read_a(1, 1, 3, 32'b1011, 4, 32'h01, 8, 8, v);
    check("error count after collision", v, 2);

    // slow bus (about 170 Hz, 114 ms per message): the light drops just after
    // the message starts, a new code arrives in mid-message and must not
    // change the payload
    irr = 250.0;
    n_light++;
    repeat (3) @(posedge dbg_clk iff dut.u_sar.valid_o);
    u_main.idle(4);
    u_main.half_ns = 3.0e6;
    fork
      u_main.read_na(4, 16, v);
      begin
        #1_000_000 irr = 0.33;
      end
    join
    check("payload frozen during slow message", v, code_full);
    u_main.half_ns = 10000.0;
    @(posedge dbg_clk iff dut.u_sar.valid_o);
    u_main.idle(4);
    u_main.read_na(1, 8, v);
    check("new code after slow message", v, code_min);

    $display("mechanisms:");
    happened("ADC conversions", n_conv);
    happened("sample-rate checks", n_rate);
    happened("light-level changes", n_light);
    happened("non-addressing reads", n_na);
    happened("addressing reads", n_ard);
    happened("addressing writes", n_awr);
    happened("field-length re-maps", n_remap);
    happened("other-device messages", n_skip);
    happened("over-long control runs", n_overlong);
    happened("collisions", n_collide);
    happened("code held during message", n_freeze);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
