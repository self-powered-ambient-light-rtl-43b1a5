// zpc_regfile_tb: self-checking test of the bus register file.
//
// Checks the reset contents of the three field-length tables, writes and reads
// back every table entry, the light-code and error-count registers (including
// saturation at 255), that read-only and unmapped addresses ignore writes and
// that unmapped addresses read 0. Expected values come from a model kept in
// the testbench.
`timescale 1ns/1ps
module zpc_regfile_tb;
  import als_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge, so the asynchronous resets act
  logic [ADDR_W-1:0] addr;
  logic [REG_W-1:0]  rdata, wdata, als;
  logic              we, err;
  len_table_t        len_p, len_d, len_r;

  zpc_regfile dut (.zpc_clk(clk), .rst_n(rst_n), .addr(addr), .rdata(rdata), .we(we),
                   .wdata(wdata), .err_i(err), .als_code(als),
                   .len_p(len_p), .len_d(len_d), .len_r(len_r));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk);
    addr = a; wdata = d; we = 1'b1;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic rdc(input string what, input logic [7:0] a, input logic [31:0] exp);
    addr = a;
    #1;
    check(what, 32'(rdata), exp);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [4:0] model [16];

  initial begin
    we = 0; err = 0; addr = 0; wdata = 0; als = 8'h5A;
    #12 rst_n = 1;
    // reset tables: payload 8,4,1,16; device 4,8,2,1; register 2,4,8,1
    rdc("pay run1", 8'h04, 8); rdc("pay run2", 8'h05, 4);
    rdc("pay run3", 8'h06, 1); rdc("pay run4", 8'h07, 16);
    rdc("dev run1", 8'h08, 4); rdc("dev run2", 8'h09, 8);
    rdc("dev run3", 8'h0A, 2); rdc("dev run4", 8'h0B, 1);
    rdc("reg run1", 8'h0C, 2); rdc("reg run2", 8'h0D, 4);
    rdc("reg run3", 8'h0E, 8); rdc("reg run4", 8'h0F, 1);
    check("table port p", len_p[0], 8);
    rdc("als", 8'h00, 8'h5A);
    rdc("errcnt reset", 8'h01, 0);
    for (int a = 4; a < 16; a++) begin
      model[a] = 5'($urandom);
      wr(8'(a), {3'b111, model[a]});
    end
    for (int a = 4; a < 16; a++) rdc("table rw", 8'(a), 32'(model[a]));
    check("table port d", len_d[2], 32'(model[10]));
    check("table port r", len_r[3], 32'(model[15]));
    wr(8'h00, 8'hFF);
    rdc("als read-only", 8'h00, 8'h5A);
    wr(8'h40, 8'h12);
    rdc("unmapped reads 0", 8'h40, 0);
    rdc("unmapped 0x02", 8'h02, 0);
    // error counter
    @(negedge clk); err = 1;
    repeat (3) @(negedge clk);
    err = 0;
    rdc("errcnt 3", 8'h01, 3);
    @(negedge clk); err = 1;
    repeat (300) @(negedge clk);
    err = 0;
    rdc("errcnt saturates", 8'h01, 255);
    als = 8'hC3;
    rdc("als follows input", 8'h00, 8'hC3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
