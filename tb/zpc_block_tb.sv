// zpc_block_tb: self-checking test of the Zero Power Communication block.
//
// A behavioural main device sends messages; the testbench resolves the
// open-drain line (low if either side pulls it down) and stands in for the
// register file with a plain 256-byte array and three field-length tables of
// its own, so every expected value is computed here, independently of the block.
// Covered: the one-control-bit 8-bit light read and its bit count, other
// payload lengths, addressing-mode reads and writes, a message to another
// device (silent, no write), an empty register run, re-mapped length tables,
// an over-long control run (error and resynchronisation) and a collision on a
// bit being sent (error, line released), then random register reads.
`timescale 1ns/1ps
module zpc_block_tb;
  import als_pkg::*;

  int checks = 0, failures = 0;
  int errs = 0, writes = 0;

  logic zpc_clk, main_pd, line, rst_n;
  logic sda_pd;
  assign line = ~(main_pd | sda_pd);

  logic [ADDR_W-1:0] reg_addr;
  logic [REG_W-1:0]  reg_rdata, reg_wdata;
  logic              reg_we, busy, err, done, amode;
  len_table_t        len_p, len_d, len_r;
  logic [7:0]        mem [256];

  zpc_main_model u_main (.zpc_clk(zpc_clk), .pd(main_pd), .line(line));

  zpc_block #(.DEV_ADDR(32'h5)) dut (
    .zpc_clk(zpc_clk), .rst_n(rst_n), .sda_i(line), .sda_pd_o(sda_pd),
    .reg_addr(reg_addr), .reg_rdata(reg_rdata), .reg_we(reg_we), .reg_wdata(reg_wdata),
    .len_p(len_p), .len_d(len_d), .len_r(len_r),
    .busy_o(busy), .err_o(err), .msg_done_o(done), .addr_mode_o(amode));

  assign reg_rdata = mem[reg_addr];
  always @(posedge zpc_clk) begin
    if (err) errs++;
    if (reg_we) begin
      mem[reg_addr] <= reg_wdata;
      writes++;
    end
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] v;
  int unsigned c0, e0, w0;

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = 8'($urandom);
    mem[0]  = 8'hA7;
    len_p = '{5'd16, 5'd1, 5'd4, 5'd8};
    len_d = '{5'd1,  5'd2, 5'd8, 5'd4};
    len_r = '{5'd1,  5'd8, 5'd4, 5'd2};
    rst_n = 1'b1;
    #1 rst_n = 1'b0;   // a falling edge, so the asynchronous resets act
    #1000 rst_n = 1'b1;
    u_main.idle(3);

    // 1. one control bit reads the 8-bit light code: 1 + 1 + 1 + 8 = 11 clocks
    c0 = u_main.clocks;
    u_main.read_na(1, 8, v);
    check("non-addressing 8-bit read", v, 32'hA7);
    check("non-addressing read clocks", u_main.clocks - c0, 11);
    check("busy cleared", busy, 0);

    // 2. two control bits: 4-bit payload = low nibble
    u_main.read_na(2, 4, v);
    check("4-bit read", v, 32'h7);
    u_main.read_na(4, 16, v);
    check("16-bit read", v, 32'h00A7);

    // 3. addressing read: run 1 -> 8-bit payload, run 1 -> 4-bit device field
    //    (address 101, read flag 1), run 2 -> 4-bit register address 6
    u_main.read_a(1, 1, 2, 32'b1011, 4, 32'h6, 4, 8, v);
    check("addressing read reg 6", v, 32'(mem[6]));

    // 4. addressing write to register 0x20 (8-bit register field, run 3)
    w0 = writes;
    u_main.write_a(1, 1, 3, 32'b1010, 4, 32'h20, 8, 32'h3C, 8);
    u_main.idle(1);
    check("write strobe", writes - w0, 1);
    check("written value", 32'(mem[8'h20]), 32'h3C);
    u_main.read_a(1, 2, 3, 32'h0B, 8, 32'h20, 8, 8, v);   // 8-bit device field: 0000101 + 1
    check("read back written reg", v, 32'h3C);

    // 5. another device: address 011 -> silent and no write
    u_main.read_a(1, 1, 2, 32'b0111, 4, 32'h6, 4, 8, v);
    check("other device stays silent", v, 32'hFF);
    w0 = writes;
    u_main.write_a(1, 1, 3, 32'b0110, 4, 32'h21, 8, 32'h55, 8);
    check("other device not written", writes - w0, 0);

    // 6. empty register run: device field then payload of register 0
    u_main.read_a(1, 1, 0, 32'b1011, 4, 0, 0, 8, v);
    check("empty register run reads reg 0", v, 32'hA7);

    // 7. over-long run of control bits: error, then normal operation
    e0 = errs;
    u_main.ctrl_run(7);
    u_main.idle(2);
    check("over-long run flagged", errs - e0, 1);
    check("idle after over-long run", busy, 0);
    u_main.read_na(1, 8, v);
    check("read after resync", v, 32'hA7);

    // 8. collision: main device holds bit 5 (a 1 in A7) low
    e0 = errs;
    u_main.read_na(1, 8, v, 5);
    check("collision flagged", errs - e0, 1);
    check("line released after collision", v, 32'h9F);   // 1, 0, jammed 0, then released 1s

    // 9. re-mapped table: one control bit now means a 4-bit payload
    len_p[0] = 5'd4;
    u_main.read_na(1, 4, v);
    check("re-mapped payload length", v, 32'h7);
    len_p[0] = 5'd8;

    // 10. random addressing reads with random register fields
    for (int k = 0; k < 40; k++) begin
      int unsigned a;
      a = $urandom_range(0, 255);
      u_main.read_a(1, 1, 3, 32'b1011, 4, a, 8, 8, v);
      check("random register read", v, 32'(mem[a]));
      u_main.idle($urandom_range(0, 3));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
