// laser_sync_top: digital part of the optical-laser-to-RF synchronisation.
//
// The laser's pulse train is converted to RF, mixed with the 1.3 GHz
// reference to an IF and sampled by the digitizer; sis8300_fpga measures the
// laser's phase against the reference and computes the piezo correction,
// which it sends as link words to the FMC carrier; fmc20_fpga writes it to
// the piezo driver's span DACs, closing the loop through the laser's piezo
// fiber stretcher. clk_prescaler models the /16 divider that makes the
// 81.25 MHz sampling clock from the reference; it is brought out as adc_clk,
// and the FPGA logic runs on clk, the sampling clock as returned by the ADC.
// The transceivers and the backplane between the two boards are outside:
// link_tx_* leaves and link_rx_* enters, so a harness can add latency or
// errors. Each board has its own host register bus (bus_* for the
// digitizer, fmc_bus_* for the carrier), standing for their PCIe endpoints.
// The system structure follows the source; everything inside the
// blocks is detailed in their own headers.
module laser_sync_top
  import llrf_pkg::*;
#(
  parameter int unsigned FF_DEPTH       = 1024,
  parameter int unsigned DAQ_DEPTH      = 16384,
  parameter int unsigned DAC_UPDATE_DIV = 163
) (
  input  logic        ref_clk,
  output logic        adc_clk,
  input  logic        clk,
  input  logic        rst,
  input  sample_t     adc_fine,
  input  sample_t     adc_coarse,
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  reg_addr_t   bus_addr,
  input  reg_data_t   bus_wdata,
  output reg_data_t   bus_rdata,
  output logic        bus_rvalid,
  output logic [15:0] mon_dac0,
  output logic [15:0] mon_dac1,
  output logic        link_tx_valid,
  output logic [31:0] link_tx_word,
  input  logic        link_rx_valid,
  input  logic [31:0] link_rx_word,
  input  logic        fmc_bus_wr,
  input  logic        fmc_bus_rd,
  input  reg_addr_t   fmc_bus_addr,
  input  reg_data_t   fmc_bus_wdata,
  output reg_data_t   fmc_bus_rdata,
  output logic        fmc_bus_rvalid,
  output logic        pzt_sclk,
  output logic        pzt_cs_n,
  output logic        pzt_sdi,
  output logic        pzt_frame_done,
  output logic        pzt_span_frame
);
  clk_prescaler #(.DIV(16)) u_prescaler (.ref_clk, .clk_out(adc_clk));

  sis8300_fpga #(.FF_DEPTH(FF_DEPTH), .DAQ_DEPTH(DAQ_DEPTH)) u_sis8300 (
    .clk, .rst, .adc_fine, .adc_coarse,
    .bus_wr, .bus_rd, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
    .mon_dac0, .mon_dac1, .tx_valid(link_tx_valid), .tx_word(link_tx_word));

  fmc20_fpga #(.UPDATE_DIV(DAC_UPDATE_DIV)) u_fmc20 (
    .clk, .rst, .rx_valid(link_rx_valid), .rx_word(link_rx_word),
    .bus_wr(fmc_bus_wr), .bus_rd(fmc_bus_rd), .bus_addr(fmc_bus_addr), .bus_wdata(fmc_bus_wdata),
    .bus_rdata(fmc_bus_rdata), .bus_rvalid(fmc_bus_rvalid),
    .sclk(pzt_sclk), .cs_n(pzt_cs_n), .sdi(pzt_sdi), .frame_done(pzt_frame_done),
    .span_frame(pzt_span_frame));
endmodule
