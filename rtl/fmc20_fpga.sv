// fmc20_fpga: logic of the FMC carrier that drives the piezo-driver RTM.
//
// Link words from the backplane transceiver are checked by link_rx; the last
// good actuator value drives DAC channel 0, the laser's piezo stretcher.
// Channels 1..3 carry static values for further piezos. fmc20_regs holds the
// software-programmable spans, the enabled channels and the static values and
// reports the link state; piezo_dac_ctrl writes spans and codes to the four
// span DACs of the RTM. On the real carrier a bridge FPGA holds the
// transceiver and the PCIe interface and a second FPGA the RTM interface;
// here both are one module sharing one clock. That the carrier receives the
// controller output over the backplane and drives the span DACs follows the
// source; the split of functions is this design's own.
module fmc20_fpga
  import llrf_pkg::*;
#(
  parameter int unsigned UPDATE_DIV = 163
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        rx_valid,
  input  logic [31:0] rx_word,
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  reg_addr_t   bus_addr,
  input  reg_data_t   bus_wdata,
  output reg_data_t   bus_rdata,
  output logic        bus_rvalid,
  output logic        sclk,
  output logic        cs_n,
  output logic        sdi,
  output logic        frame_done,
  output logic        span_frame
);
  logic        value_valid, linked;   // value_valid unused: the DAC takes the held value
  sample_t     value;
  logic [15:0] crc_errs, seq_errs;
  link_rx u_rx (.clk, .rst, .rx_valid, .rx_word, .value_valid, .value, .linked, .crc_errs, .seq_errs);

  logic [3:0] ch_enable;
  logic [1:0] span [4];
  sample_t    aux_code [1:3];
  fmc20_regs u_regs (
    .clk, .rst, .wr(bus_wr), .rd(bus_rd), .addr(bus_addr), .wdata(bus_wdata),
    .rdata(bus_rdata), .rvalid(bus_rvalid), .ch_enable, .span, .aux_code,
    .linked, .crc_errs, .seq_errs, .pzt_value(value));

  sample_t code [4];
  always_comb begin
    code[0] = value;
    for (int c = 1; c < 4; c++) code[c] = aux_code[c];
  end

  piezo_dac_ctrl #(.NCH(4), .UPDATE_DIV(UPDATE_DIV)) u_dac (
    .clk, .rst, .ch_enable, .span, .code, .sclk, .cs_n, .sdi, .frame_done, .span_frame);
endmodule
