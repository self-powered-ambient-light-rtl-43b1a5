// zpc_ber_tb: long random traffic on the Zero Power Communication bus, to show
// a bit error rate below 1e-6 in simulation (more than 1,000,000 payload bits
// without a single wrong bit).
//
// The bus block and its real register file are driven by the behavioural main
// device. Messages are random: non-addressing light reads and addressing-mode
// reads and writes, random run lengths 1..4, field-length tables rewritten at
// random over the bus, messages for another device, and a bus clock whose speed
// changes between messages (5 kHz to 1 MHz). The testbench keeps its own copy
// of the tables and registers and checks every payload bit. The light code
// changes between messages. Each kind of message is counted and must occur.
`timescale 1ns/1ps
module zpc_ber_tb;
  import als_pkg::*;

  localparam longint TARGET_BITS = 1_100_000;

  int checks = 0, failures = 0;
  longint bits = 0, bit_errors = 0;
  int n_na = 0, n_rd = 0, n_wr = 0, n_other = 0, n_speed = 0;

  logic zpc_clk, main_pd, sda_pd, line, rst_n;
  assign line = ~(main_pd | sda_pd);

  logic [ADDR_W-1:0] reg_addr;
  logic [REG_W-1:0]  reg_rdata, reg_wdata, als;
  logic              reg_we, busy, err, done, amode;
  len_table_t        len_p, len_d, len_r;

  zpc_main_model u_main (.zpc_clk(zpc_clk), .pd(main_pd), .line(line));

  zpc_block #(.DEV_ADDR(32'h5)) u_zpc (
    .zpc_clk(zpc_clk), .rst_n(rst_n), .sda_i(line), .sda_pd_o(sda_pd),
    .reg_addr(reg_addr), .reg_rdata(reg_rdata), .reg_we(reg_we), .reg_wdata(reg_wdata),
    .len_p(len_p), .len_d(len_d), .len_r(len_r),
    .busy_o(busy), .err_o(err), .msg_done_o(done), .addr_mode_o(amode));

  zpc_regfile u_regs (
    .zpc_clk(zpc_clk), .rst_n(rst_n), .addr(reg_addr), .rdata(reg_rdata),
    .we(reg_we), .wdata(reg_wdata), .err_i(err), .als_code(als),
    .len_p(len_p), .len_d(len_d), .len_r(len_r));

  // testbench copy of the tables: [0] payload, [1] device, [2] register
  int tbl [3][4];

  initial begin
    #(1.0e13);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] model_reg(input int a);
    if (a == 0)               return als;
    if (a == 1)               return 8'h00;        // no protocol errors expected
    if (a >= 4 && a < 16)     return 8'(tbl[(a - 4) / 4][a % 4]);
    return 8'h00;
  endfunction

  // compare n received bits with the expected value, bit by bit
  task automatic score(input logic [31:0] got, input logic [31:0] exp, input int n);
    for (int i = 0; i < n; i++) begin
      bits++;
      if (got[i] !== exp[i]) bit_errors++;
    end
  endtask

  function automatic logic [31:0] dev_field(input int dl, input logic rd, input logic other);
    logic [31:0] a;
    a = 32'h5 ^ (other ? 32'h1 : 32'h0);
    if (dl <= 1) return 32'(rd);
    return ((a & ((32'd1 << (dl - 1)) - 1)) << 1) | 32'(rd);
  endfunction

  initial begin
    logic [31:0] v, exp;
    int pr, dr, rr, pl, dl, rl, a, kind;
    logic other;
    tbl[0] = '{8, 4, 1, 16};
    tbl[1] = '{4, 8, 2, 1};
    tbl[2] = '{2, 4, 8, 1};
    als = 8'h5A;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    u_main.idle(2);

    while (bits < TARGET_BITS) begin
      // bus speed changes now and then
      if ($urandom_range(0, 49) == 0) begin
        u_main.half_ns = real'($urandom_range(500, 100000));
        n_speed++;
      end
      als = 8'($urandom);
      pr = $urandom_range(1, 4);
      pl = tbl[0][pr - 1];
      kind = $urandom_range(0, 9);
      if (kind < 4) begin
        u_main.read_na(pr, pl, v);
        score(v, 32'(als), pl);
        n_na++;
      end else begin
        // addressing: need a register field of at least 4 bits to reach 0x0F
        dr = $urandom_range(1, 4);
        dl = tbl[1][dr - 1];
        rr = 0;
        for (int k = 1; k <= 4; k++) if (tbl[2][k - 1] >= 4 && rr == 0) rr = k;
        rl = tbl[2][rr - 1];
        a  = (kind < 8) ? $urandom_range(0, 15) : $urandom_range(4, 15);
        other = (dl >= 3) && ($urandom_range(0, 7) == 0);
        if (kind < 8) begin
          u_main.read_a(pr, dr, rr, dev_field(dl, 1'b1, other), dl, 32'(a), rl, pl, v);
          exp = other ? ((pl >= 32) ? '1 : ((32'd1 << pl) - 1)) : 32'(model_reg(a));
          score(v, exp, pl);
          if (other) n_other++; else n_rd++;
        end else begin
          // write a table entry; keep every table usable (payload 1..16,
          // device 1..8, register 4..8 for at least entry 0)
          int val;
          int t, e;
          t = (a - 4) / 4;
          e = a % 4;
          val = (t == 0) ? $urandom_range(1, 16) : (t == 1) ? $urandom_range(1, 8)
                                                              : $urandom_range(4, 8);
          if (pl >= 5) begin
            u_main.write_a(pr, dr, rr, dev_field(dl, 1'b0, other), dl, 32'(a), rl, 32'(val), pl);
            if (!other) tbl[t][e] = val;
            if (other) n_other++; else n_wr++;
            // read it back
            u_main.idle(1);
            pr = 1;
            for (int k = 1; k <= 4; k++) if (tbl[0][k - 1] >= 5 && pr == 1 && tbl[0][0] < 5) pr = k;
            pl = tbl[0][pr - 1];
            for (int k = 1; k <= 4; k++) if (tbl[2][k - 1] >= 4) rr = k;
            rl = tbl[2][rr - 1];
            dl = tbl[1][0];
            u_main.read_a(pr, 1, rr, dev_field(dl, 1'b1, 1'b0), dl, 32'(a), rl, pl, v);
            score(v, 32'(model_reg(a)), pl);
            n_rd++;
          end
        end
      end
      u_main.idle($urandom_range(0, 2));
    end

    checks++;
    if (bit_errors != 0) failures++;
    checks++;
    if (u_regs.errcnt_q != 0) begin
      failures++;
      $display("FAIL protocol errors flagged: %0d", u_regs.errcnt_q);
    end
    $display("payload bits %0d, bit errors %0d (BER < %e)", bits, bit_errors, 1.0 / real'(bits));
    begin
      int n[5];
      string s[5];
      n = '{n_na, n_rd, n_wr, n_other, n_speed};
      s = '{"non-addressing reads", "addressing reads", "table writes",
                      "other-device messages", "bus speed changes"};
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (n[i] == 0) begin
          failures++;
          $display("FAIL never happened: %s", s[i]);
        end else $display("  %-24s %0d", s[i], n[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
