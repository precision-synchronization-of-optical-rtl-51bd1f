// fmc20_regs: host registers of the FMC carrier that set up the piezo DACs.
//
// The span of each piezo-driver DAC is programmable from software; these
// registers hold the requested spans, the set of DAC channels that are
// written, and static values for the channels the loop does not drive. They
// also report the link state. Bus protocol as in reg_bank: a write takes
// effect at the clock edge where wr is high; rdata and rvalid follow one
// clock after rd. Map in llrf_pkg (F_*). Software-programmable spans follow
// the source; the map and reset values (channel 0 only, +-10 V) are this
// design's own.
module fmc20_regs
  import llrf_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        wr,
  input  logic        rd,
  input  reg_addr_t   addr,
  input  reg_data_t   wdata,
  output reg_data_t   rdata,
  output logic        rvalid,
  output logic [3:0]  ch_enable,
  output logic [1:0]  span [4],
  output sample_t     aux_code [1:3],
  input  logic        linked,
  input  logic [15:0] crc_errs,
  input  logic [15:0] seq_errs,
  input  sample_t     pzt_value
);
  always_ff @(posedge clk) begin
    if (rst) begin
      ch_enable <= 4'b0001;
      for (int c = 0; c < 4; c++) span[c] <= 2'd3;
      for (int c = 1; c < 4; c++) aux_code[c] <= '0;
    end else if (wr) begin
      unique case (addr)
        F_CH_ENABLE: ch_enable <= wdata[3:0];
        F_SPAN:      for (int c = 0; c < 4; c++) span[c] <= wdata[2*c +: 2];
        F_AUX1:      aux_code[1] <= wdata[15:0];
        F_AUX2:      aux_code[2] <= wdata[15:0];
        F_AUX3:      aux_code[3] <= wdata[15:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rvalid <= 1'b0;
      rdata  <= '0;
    end else begin
      rvalid <= rd;
      if (rd) begin
        unique case (addr)
          F_ID:        rdata <= FMC_ID;
          F_CH_ENABLE: rdata <= {28'd0, ch_enable};
          F_SPAN:      rdata <= {24'd0, span[3], span[2], span[1], span[0]};
          F_AUX1:      rdata <= {16'd0, aux_code[1]};
          F_AUX2:      rdata <= {16'd0, aux_code[2]};
          F_AUX3:      rdata <= {16'd0, aux_code[3]};
          F_LINK:      rdata <= {31'd0, linked};
          F_LINK_ERRS: rdata <= {seq_errs, crc_errs};
          F_PZT_VALUE: rdata <= {16'd0, pzt_value};
          default:     rdata <= '0;
        endcase
      end
    end
  end
endmodule
