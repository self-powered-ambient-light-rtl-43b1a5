// zpc_regfile: registers reached over the Zero Power Communication bus.
//
// Holds the three field-length tables that give each run of control bits its
// meaning, so a system can re-map run lengths to field lengths at run time and
// keep its common messages short. Also returns the latest light code and a
// count of protocol errors seen by the bus block.
//
// Map (8-bit registers, 8-bit addresses):
//   0x00       RO  light code from the ADC
//   0x01       RO  protocol error count, saturates at 255
//   0x04-0x07  RW  payload length for a run of 1..4 control bits (5 bits used)
//   0x08-0x0B  RW  device-address length for a run of 1..4
//   0x0C-0x0F  RW  register-address length for a run of 1..4
//   others     read 0, writes ignored
// Reads are combinational from rd/wr address; writes and the error counter
// update on the rising edge of the bus clock. Reset loads the tables with the
// defaults in als_pkg (one control bit selects an 8-bit payload).
// That the field lengths can be re-mapped is from the protocol description;
// the map, widths and reset values are this design's choices.
`timescale 1ns/1ps
module zpc_regfile
  import als_pkg::*;
(
  input  logic              zpc_clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] addr,
  output logic [REG_W-1:0]  rdata,
  input  logic              we,
  input  logic [REG_W-1:0]  wdata,
  input  logic              err_i,
  input  logic [REG_W-1:0]  als_code,
  output len_table_t        len_p,
  output len_table_t        len_d,
  output len_table_t        len_r
);

  logic [REG_W-1:0] errcnt_q;

  always_ff @(posedge zpc_clk or negedge rst_n) begin
    if (!rst_n) begin
      len_p    <= PAY_LEN_RST;
      len_d    <= DEV_LEN_RST;
      len_r    <= REG_LEN_RST;
      errcnt_q <= '0;
    end else begin
      if (err_i && errcnt_q != '1) errcnt_q <= errcnt_q + 1'b1;
      if (we) begin
        unique case (addr[ADDR_W-1:2])
          6'(REG_PAY_LEN >> 2): len_p[addr[1:0]] <= wdata[LEN_W-1:0];
          6'(REG_DEV_LEN >> 2): len_d[addr[1:0]] <= wdata[LEN_W-1:0];
          6'(REG_REG_LEN >> 2): len_r[addr[1:0]] <= wdata[LEN_W-1:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (addr[ADDR_W-1:2])
      6'(REG_ALS >> 2):     rdata = (addr[1:0] == REG_ALS[1:0])    ? als_code :
                                    (addr[1:0] == REG_ERRCNT[1:0]) ? errcnt_q : '0;
      6'(REG_PAY_LEN >> 2): rdata = REG_W'(len_p[addr[1:0]]);
      6'(REG_DEV_LEN >> 2): rdata = REG_W'(len_d[addr[1:0]]);
      6'(REG_REG_LEN >> 2): rdata = REG_W'(len_r[addr[1:0]]);
      default:              rdata = '0;
    endcase
  end

endmodule
