// als_pkg: constants and types shared by the ambient-light-sensor digital logic.
//
// The sensor digitises a light-dependent voltage with an 8-bit SAR ADC and
// returns the code over the Zero Power Communication (ZPC) bus. This package
// holds the widths of that data path, the field-length table format of the ZPC
// protocol, the register map the ZPC block exposes, and the protocol states.
// The 8-bit resolution follows the sensor description; the table depth, the
// length-entry width, the register map and the reset table contents are this
// design's own choices.
`timescale 1ns/1ps
package als_pkg;

  // ADC resolution: 8-bit ambient light code.
  localparam int unsigned ADC_BITS = 8;

  // Register data and register-address widths of the ZPC register file.
  localparam int unsigned REG_W  = 8;
  localparam int unsigned ADDR_W = 8;

  // Each field-length table maps a run of 1..LEN_CODES control bits to a field
  // length of 0..31 bits. A longer run is a protocol error.
  localparam int unsigned LEN_CODES = 4;
  localparam int unsigned LEN_W     = 5;
  localparam int unsigned RUN_W     = 4;   // run counter, saturates at 15

  typedef logic [LEN_W-1:0] len_t;
  typedef len_t [LEN_CODES-1:0] len_table_t;   // entry k holds the length for a run of k+1

  // Reset contents of the three tables. A single control bit selects an 8-bit
  // payload, so one control bit reads back the whole light code.
  localparam len_table_t PAY_LEN_RST = '{5'd16, 5'd1, 5'd4, 5'd8};  // runs 4,3,2,1
  localparam len_table_t DEV_LEN_RST = '{5'd1,  5'd2, 5'd8, 5'd4};  // runs 4,3,2,1
  localparam len_table_t REG_LEN_RST = '{5'd1,  5'd8, 5'd4, 5'd2};  // runs 4,3,2,1

  // Register map.
  localparam logic [ADDR_W-1:0] REG_ALS     = 8'h00;  // RO: latest light code
  localparam logic [ADDR_W-1:0] REG_ERRCNT  = 8'h01;  // RO: protocol error count (saturating)
  localparam logic [ADDR_W-1:0] REG_PAY_LEN = 8'h04;  // RW: 0x04..0x07 payload length table
  localparam logic [ADDR_W-1:0] REG_DEV_LEN = 8'h08;  // RW: 0x08..0x0B device-address length table
  localparam logic [ADDR_W-1:0] REG_REG_LEN = 8'h0C;  // RW: 0x0C..0x0F register-address length table

  // Receiver states of the ZPC block.
  typedef enum logic [3:0] {
    ZS_IDLE,     // waiting for the first control bit of a message
    ZS_RUN_P,    // counting the payload-length run
    ZS_MODE,     // bit after the payload run: control = addressing, high = non-addressing
    ZS_RUN_D,    // counting the device-address-length run
    ZS_RUN_R0,   // first bit of the register-address-length run (high = empty run)
    ZS_RUN_R,    // counting the register-address-length run
    ZS_DEV,      // receiving the device-address field (last bit is read/write)
    ZS_REG,      // receiving the register-address field
    ZS_PAY_RD,   // sending the payload
    ZS_PAY_WR,   // receiving the payload
    ZS_SKIP      // payload of a message for another device: stay silent, keep count
  } zpc_state_t;

endpackage
