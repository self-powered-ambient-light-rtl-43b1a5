// als_top: self-powered ambient light sensor chip.
//
// A 2 mm x 2 mm array of photovoltaic cells powers the chip from the light it
// measures; three cells in series give 1.2-1.9 V. A small forward-biased
// photodiode gives a voltage logarithmic in the light, which an 8-bit SAR ADC
// (sar_logic with a DAC and a dynamic latch comparator) converts 18-36 times a
// second, paced by a slow on-chip oscillator. The code crosses into the clock
// domain of the Zero Power Communication bus (result_sync), where zpc_block
// returns it to a main device that supplies the bus clock and pulls the data
// line up; the chip only ever pulls the line down.
//
// The analogue parts (PV array, photodiode, references, oscillator, DAC,
// comparator) are behavioural models with real-valued signals; sar_logic,
// result_sync, zpc_block and zpc_regfile are synthesizable.
// Ports: irradiance in W/m^2 (one value for the harvesting cells and the
// sensing cell), a power-on reset, the two bus wires (data as level in plus
// pull-down enable out), and debug outputs for the supply, the on-chip clock
// and the latest code. The block split follows the chip block diagram; the
// bus protocol details, register map, reset and debug signals are this
// design's choices.
`timescale 1ns/1ps
module als_top
  import als_pkg::*;
#(
  parameter logic [31:0] DEV_ADDR    = 32'h5,
  parameter int unsigned CONV_CYCLES = 10
) (
  input  real                 irradiance,
  input  logic                rst_n,
  // Zero Power Communication bus
  input  logic                zpc_clk,
  input  logic                sda_i,
  output logic                sda_pd_o,
  // debug
  output real                 dbg_vdd,
  output logic                dbg_clk,
  output logic [ADC_BITS-1:0] dbg_code
);

  real vdd, vref, iref, vpd, vdac;
  logic clk_osc;

  pv_array_model      u_pv  (.irradiance(irradiance), .vdd(vdd));
  reference_model     u_ref (.vdd(vdd), .vref(vref), .iref(iref));
  photodetector_model u_pd  (.irradiance(irradiance), .vpd(vpd));
  osc_model           u_osc (.vdd(vdd), .en(rst_n), .clk(clk_osc));

  // ADC
  logic                cmp, cmp_en, adc_valid;
  logic [ADC_BITS-1:0] dac_code, adc_code;
  logic [31:0]         cmp_strobes;

  sar_logic #(.N_BITS(ADC_BITS), .CONV_CYCLES(CONV_CYCLES)) u_sar (
    .clk(clk_osc), .rst_n(rst_n), .cmp_i(cmp), .cmp_en_o(cmp_en),
    .dac_code_o(dac_code), .result_o(adc_code), .valid_o(adc_valid));

  sar_dac_model #(.N_BITS(ADC_BITS)) u_dac (.vref(vref), .code(dac_code), .vdac(vdac));

  latch_comparator_model u_cmp (
    .clk(clk_osc), .rst_n(rst_n), .en(cmp_en), .vinp(vpd), .vinn(vdac),
    .out(cmp), .strobes(cmp_strobes));

  // Clock-domain crossing into the bus clock
  logic [ADC_BITS-1:0] als_code;
  logic                zpc_busy, als_new;

  result_sync #(.W(ADC_BITS)) u_sync (
    .src_clk(clk_osc), .rst_n(rst_n), .src_valid(adc_valid), .src_code(adc_code),
    .dst_clk(zpc_clk), .hold_i(zpc_busy), .code_o(als_code), .new_o(als_new));

  // Bus block and its registers
  logic [ADDR_W-1:0] reg_addr;
  logic [REG_W-1:0]  reg_rdata, reg_wdata;
  logic              reg_we, zpc_err, zpc_done, zpc_amode;
  len_table_t        len_p, len_d, len_r;

  zpc_block #(.DEV_ADDR(DEV_ADDR)) u_zpc (
    .zpc_clk(zpc_clk), .rst_n(rst_n), .sda_i(sda_i), .sda_pd_o(sda_pd_o),
    .reg_addr(reg_addr), .reg_rdata(reg_rdata), .reg_we(reg_we), .reg_wdata(reg_wdata),
    .len_p(len_p), .len_d(len_d), .len_r(len_r),
    .busy_o(zpc_busy), .err_o(zpc_err), .msg_done_o(zpc_done), .addr_mode_o(zpc_amode));

  zpc_regfile u_regs (
    .zpc_clk(zpc_clk), .rst_n(rst_n), .addr(reg_addr), .rdata(reg_rdata),
    .we(reg_we), .wdata(reg_wdata), .err_i(zpc_err), .als_code(als_code),
    .len_p(len_p), .len_d(len_d), .len_r(len_r));

  assign dbg_vdd  = vdd;
  assign dbg_clk  = clk_osc;
  assign dbg_code = adc_code;

endmodule
