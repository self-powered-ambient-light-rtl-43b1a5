// zpc_block: secondary (sensor-side) end of the Zero Power Communication bus.
//
// The bus has two wires. The main device drives a push-pull clock (zpc_clk) and
// keeps the data line high through its own pull-up. This block never charges the
// line: it only pulls it low (sda_pd_o = 1) to send a 0 and leaves it alone to
// send a 1. Everything here runs on the external clock, so no on-chip clock is
// needed to talk; the line is sampled on every rising edge and driven on
// falling edges.
//
// A bit that is low at a rising edge while this block is not sending is a
// control bit. A message opens with runs of control bits, each run closed by
// one high bit; the length of a run (1..4) indexes a field-length table:
//
//   non-addressing:  C^p 1 1 <payload read, len_p[p]>
//   addressing:      C^p 1 C^d 1 C^r 1 <device address> <register address> <payload>
//                    (C^d 1 1 instead of C^d 1 C^r 1 means an empty register run)
//
// The first run sets the payload length, the second the device-address length,
// the third the register-address length. After the payload-run separator a high
// bit selects non-addressing mode (the payload is the light code, register 0);
// a control bit starts the device run and so selects addressing mode. The last
// bit of the device-address field is a read(1)/write(0) flag; the rest is
// compared with the low bits of DEV_ADDR, so short address fields address this
// device by its low address bits, and a 1-bit field (flag only) is a broadcast.
// A message to another device is followed to its end in silence.
// Fields and payload are sent most significant bit first. A register read
// sends bits [len-1:0] of the zero-extended 8-bit register; a write keeps the
// last 8 bits received.
//
// Errors: a run longer than the table (5 or more control bits) and a read bit
// where this block left the line high but found it low both raise err_o for one
// cycle and return the block to idle. A long run of control bits therefore
// always resynchronises the block.
//
// Register port: reg_addr is registered; reg_rdata must be combinational from
// it and stable while busy_o is high. reg_we/reg_wdata are valid in the cycle
// before the rising edge that writes.
//
// The control-bit rule, the three runs and their order, the two modes and the
// one-control-bit light read follow the protocol description. The run
// separators, the mode bit, the read/write flag, the address comparison,
// bit order and error handling are this design's choices. A write payload
// shorter than 8 bits writes zeros into the upper bits.
`timescale 1ns/1ps
module zpc_block
  import als_pkg::*;
#(
  parameter logic [31:0] DEV_ADDR = 32'h5
) (
  input  logic              zpc_clk,
  input  logic              rst_n,
  input  logic              sda_i,
  output logic              sda_pd_o,
  // register file
  output logic [ADDR_W-1:0] reg_addr,
  input  logic [REG_W-1:0]  reg_rdata,
  output logic              reg_we,
  output logic [REG_W-1:0]  reg_wdata,
  input  len_table_t        len_p,
  input  len_table_t        len_d,
  input  len_table_t        len_r,
  // status
  output logic              busy_o,
  output logic              err_o,
  output logic              msg_done_o,   // one cycle at the last payload bit
  output logic              addr_mode_o   // current message uses addressing mode
);

  zpc_state_t        state_q, state_d;
  logic [RUN_W-1:0]  run_q, run_d;
  len_t              plen_q, plen_d, dlen_q, dlen_d, rlen_q, rlen_d;
  len_t              cnt_q, cnt_d;          // bits left in the current field
  logic [31:0]       dev_q, dev_d;          // device-address field shift register
  logic [ADDR_W-1:0] reg_q, reg_d;          // register-address shift register
  logic [REG_W-1:0]  pay_q, pay_d;          // write payload shift register
  logic              amode_q, amode_d;
  logic              err, done;
  logic              dev_hit_q;             // device field matched (kept for the register field)

  // Length for a run, or error if the run is longer than the table.
  function automatic logic run_ok(input logic [RUN_W-1:0] run);
    return run >= 1 && run <= RUN_W'(LEN_CODES);
  endfunction

  function automatic len_t lookup(input len_table_t tbl, input logic [RUN_W-1:0] run);
    return tbl[2'(run - 1'b1)];
  endfunction

  function automatic logic [RUN_W-1:0] run_inc(input logic [RUN_W-1:0] run);
    return (run == '1) ? run : run + 1'b1;
  endfunction

  // Next state when the payload begins.
  function automatic zpc_state_t pay_state(input len_t plen, input logic rd, input logic hit);
    if (plen == '0)  return ZS_IDLE;
    if (!hit)        return ZS_SKIP;
    return rd ? ZS_PAY_RD : ZS_PAY_WR;
  endfunction

  logic        dev_rd, dev_hit;
  logic [31:0] dev_full, dev_mask;
  logic [31:0] rd_value;

  always_comb begin
    // device field as it stands after this bit: flag in bit 0, address above it
    dev_full = {dev_q[30:0], sda_i};
    dev_rd   = dev_full[0];
    dev_mask = (dlen_q > 5'd1) ? ((32'd1 << (dlen_q - 5'd1)) - 32'd1) : 32'd0;
    dev_hit  = ((dev_full >> 1) & dev_mask) == (DEV_ADDR & dev_mask);
    rd_value = 32'(reg_rdata);
  end

  always_comb begin
    state_d = state_q;
    run_d   = run_q;
    plen_d  = plen_q;
    dlen_d  = dlen_q;
    rlen_d  = rlen_q;
    cnt_d   = cnt_q;
    dev_d   = dev_q;
    reg_d   = reg_q;
    pay_d   = pay_q;
    amode_d = amode_q;
    err     = 1'b0;
    done    = 1'b0;
    reg_we  = 1'b0;
    reg_wdata = {pay_q[REG_W-2:0], sda_i};

    unique case (state_q)
      ZS_IDLE: if (!sda_i) begin
        state_d = ZS_RUN_P;
        run_d   = 1;
        amode_d = 1'b0;
        dev_d   = '0;
        reg_d   = '0;
        pay_d   = '0;
      end

      ZS_RUN_P: if (!sda_i) run_d = run_inc(run_q);
      else if (!run_ok(run_q)) begin
        err = 1'b1;
        state_d = ZS_IDLE;
      end else begin
        plen_d  = lookup(len_p, run_q);
        state_d = ZS_MODE;
      end

      ZS_MODE: if (!sda_i) begin
        amode_d = 1'b1;
        run_d   = 1;
        state_d = ZS_RUN_D;
      end else begin
        // non-addressing: read the light code
        reg_d   = REG_ALS;
        cnt_d   = plen_q;
        state_d = pay_state(plen_q, 1'b1, 1'b1);
      end

      ZS_RUN_D: if (!sda_i) run_d = run_inc(run_q);
      else if (!run_ok(run_q)) begin
        err = 1'b1;
        state_d = ZS_IDLE;
      end else begin
        dlen_d  = lookup(len_d, run_q);
        state_d = ZS_RUN_R0;
      end

      ZS_RUN_R0, ZS_RUN_R: begin
        if (!sda_i) begin
          run_d   = (state_q == ZS_RUN_R0) ? RUN_W'(1) : run_inc(run_q);
          state_d = ZS_RUN_R;
        end else if (state_q == ZS_RUN_R && !run_ok(run_q)) begin
          err = 1'b1;
          state_d = ZS_IDLE;
        end else begin
          // header complete: go to the first non-empty field
          rlen_d = (state_q == ZS_RUN_R0) ? len_t'(0) : lookup(len_r, run_q);
          if (dlen_q != '0) begin
            state_d = ZS_DEV;
            cnt_d   = dlen_q;
          end else if (rlen_d != '0) begin
            state_d = ZS_REG;
            cnt_d   = rlen_d;
          end else begin
            // no address fields at all: a broadcast read of register 0
            cnt_d   = plen_q;
            state_d = pay_state(plen_q, 1'b1, 1'b1);
          end
        end
      end

      ZS_DEV: begin
        dev_d = dev_full;
        cnt_d = cnt_q - 1'b1;
        if (cnt_q == 5'd1) begin
          if (rlen_q != '0) begin
            state_d = ZS_REG;
            cnt_d   = rlen_q;
          end else begin
            cnt_d   = plen_q;
            state_d = pay_state(plen_q, dev_rd, dev_hit);
          end
        end
      end

      ZS_REG: begin
        reg_d = {reg_q[ADDR_W-2:0], sda_i};
        cnt_d = cnt_q - 1'b1;
        if (cnt_q == 5'd1) begin
          cnt_d   = plen_q;
          state_d = pay_state(plen_q, dev_q[0] | (dlen_q == '0),
                              (dlen_q == '0) ? 1'b1 : dev_hit_q);
        end
      end

      ZS_PAY_RD: begin
        cnt_d = cnt_q - 1'b1;
        if (rd_value[5'(cnt_q - 1'b1)] && !sda_i) begin
          // line held low against a 1 being sent: give up the message
          err     = 1'b1;
          state_d = ZS_IDLE;
        end else if (cnt_q == 5'd1) begin
          done    = 1'b1;
          state_d = ZS_IDLE;
        end
      end

      ZS_PAY_WR: begin
        pay_d = {pay_q[REG_W-2:0], sda_i};
        cnt_d = cnt_q - 1'b1;
        if (cnt_q == 5'd1) begin
          reg_we  = 1'b1;
          done    = 1'b1;
          state_d = ZS_IDLE;
        end
      end

      ZS_SKIP: begin
        cnt_d = cnt_q - 1'b1;
        if (cnt_q == 5'd1) begin
          done    = 1'b1;
          state_d = ZS_IDLE;
        end
      end

      default: state_d = ZS_IDLE;
    endcase
  end

  always_ff @(posedge zpc_clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= ZS_IDLE;
      run_q     <= '0;
      plen_q    <= '0;
      dlen_q    <= '0;
      rlen_q    <= '0;
      cnt_q     <= '0;
      dev_q     <= '0;
      reg_q     <= '0;
      pay_q     <= '0;
      amode_q   <= 1'b0;
      dev_hit_q <= 1'b0;
    end else begin
      state_q <= state_d;
      run_q   <= run_d;
      plen_q  <= plen_d;
      dlen_q  <= dlen_d;
      rlen_q  <= rlen_d;
      cnt_q   <= cnt_d;
      dev_q   <= dev_d;
      reg_q   <= reg_d;
      pay_q   <= pay_d;
      amode_q <= amode_d;
      if (state_q == ZS_DEV && cnt_q == 5'd1) dev_hit_q <= dev_hit;
    end
  end

  // Drive the next payload bit on the falling edge, so it is settled at the
  // rising edge where the main device samples it.
  always_ff @(negedge zpc_clk or negedge rst_n) begin
    if (!rst_n) sda_pd_o <= 1'b0;
    else        sda_pd_o <= (state_q == ZS_PAY_RD) && !rd_value[5'(cnt_q - 1'b1)];
  end

  // The line is only ever pulled low while a payload is being sent, and the
  // block never pulls it low against a control bit run.
  a_drive_only_in_payload: assert property (
    @(posedge zpc_clk) disable iff (!rst_n) sda_pd_o |-> state_q == ZS_PAY_RD)
    else $error("zpc_block drives the data line outside a read payload");

  assign reg_addr    = reg_q;
  assign busy_o      = (state_q != ZS_IDLE);
  assign err_o       = err;
  assign msg_done_o  = done;
  assign addr_mode_o = amode_q;

endmodule
