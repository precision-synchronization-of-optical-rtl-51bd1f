// reg_bank: host-visible control and status registers of the loop.
//
// The host reaches these registers through the PCIe endpoint (not part of
// this RTL) over a simple word bus: a write takes effect at the clock edge
// where wr is high; for a read, rdata and rvalid appear one clock after rd.
// The map is in llrf_pkg. R_CTRL bit 3 (DAQ arm) and writes to R_FF_WDATA
// produce one-clock pulses; a table write also advances the write address so
// a whole table can be streamed by repeated writes. That the host controls
// and monitors the loop through FPGA registers follows the source; the map
// and bus are this design's own.
module reg_bank
  import llrf_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // host bus
  input  logic        wr,
  input  logic        rd,
  input  reg_addr_t   addr,
  input  reg_data_t   wdata,
  output reg_data_t   rdata,
  output logic        rvalid,
  // control
  output logic        loop_en,
  output logic        notch_bypass,
  output logic        ff_en,
  output logic        loop_coarse,
  output logic        daq_arm,
  output sample_t     setpoint,
  output sample_t     kp,
  output sample_t     ki,
  output logic [4:0]  shift,
  output sample_t     lim_lo,
  output sample_t     lim_hi,
  output logic signed [17:0] nb0, nb1, nb2, na1, na2,
  output logic [15:0] decim,
  output logic [15:0] ff_len,
  output logic        ff_wr,
  output logic [15:0] ff_waddr,
  output sample_t     ff_wdata,
  output mon_sel_e    mon_sel0,
  output mon_sel_e    mon_sel1,
  output logic [15:0] daq_addr,
  // status
  input  logic [63:0] daq_data,
  input  sample_t     st_i, st_q, st_amp, st_phase,
  input  sample_t     st_co_amp, st_co_phase,
  input  sample_t     st_err, st_act,
  input  logic        st_sat, st_daq_busy, st_daq_done
);
  always_ff @(posedge clk) begin
    if (rst) begin
      loop_en      <= 1'b0;
      notch_bypass <= 1'b1;
      ff_en        <= 1'b0;
      loop_coarse  <= 1'b0;
      daq_arm      <= 1'b0;
      setpoint     <= '0;
      kp           <= '0;
      ki           <= '0;
      shift        <= '0;
      lim_lo       <= 16'sh8001;
      lim_hi       <= 16'sh7FFF;
      nb0          <= 18'sd65536;
      nb1          <= '0;
      nb2          <= '0;
      na1          <= '0;
      na2          <= '0;
      decim        <= '0;
      ff_len       <= '0;
      ff_wr        <= 1'b0;
      ff_waddr     <= '0;
      ff_wdata     <= '0;
      mon_sel0     <= MON_ACT;
      mon_sel1     <= MON_PHASE;
      daq_addr     <= '0;
    end else begin
      daq_arm <= 1'b0;
      ff_wr   <= 1'b0;
      if (ff_wr) ff_waddr <= ff_waddr + 1'b1;
      if (wr) begin
        unique case (addr)
          R_CTRL: begin
            loop_en      <= wdata[0];
            notch_bypass <= wdata[1];
            ff_en        <= wdata[2];
            daq_arm      <= wdata[3];
            loop_coarse  <= wdata[4];
          end
          R_SETPOINT: setpoint <= wdata[15:0];
          R_KP:       kp       <= wdata[15:0];
          R_KI:       ki       <= wdata[15:0];
          R_SHIFT:    shift    <= wdata[4:0];
          R_LIMITS: begin
            lim_lo <= wdata[15:0];
            lim_hi <= wdata[31:16];
          end
          R_NOTCH_B0: nb0 <= wdata[17:0];
          R_NOTCH_B1: nb1 <= wdata[17:0];
          R_NOTCH_B2: nb2 <= wdata[17:0];
          R_NOTCH_A1: na1 <= wdata[17:0];
          R_NOTCH_A2: na2 <= wdata[17:0];
          R_DECIM:    decim  <= wdata[15:0];
          R_FF_LEN:   ff_len <= wdata[15:0];
          R_FF_WADDR: ff_waddr <= wdata[15:0];
          R_FF_WDATA: begin
            ff_wdata <= wdata[15:0];
            ff_wr    <= 1'b1;
          end
          R_MON_SEL: begin
            mon_sel0 <= mon_sel_e'(wdata[2:0]);
            mon_sel1 <= mon_sel_e'(wdata[6:4]);
          end
          R_DAQ_ADDR: daq_addr <= wdata[15:0];
          default: ;
        endcase
      end
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
          R_ID:       rdata <= DESIGN_ID;
          R_CTRL:     rdata <= {27'd0, loop_coarse, 1'b0, ff_en, notch_bypass, loop_en};
          R_SETPOINT: rdata <= {16'd0, setpoint};
          R_KP:       rdata <= {16'd0, kp};
          R_KI:       rdata <= {16'd0, ki};
          R_SHIFT:    rdata <= {27'd0, shift};
          R_LIMITS:   rdata <= {lim_hi, lim_lo};
          R_NOTCH_B0: rdata <= 32'(nb0);
          R_NOTCH_B1: rdata <= 32'(nb1);
          R_NOTCH_B2: rdata <= 32'(nb2);
          R_NOTCH_A1: rdata <= 32'(na1);
          R_NOTCH_A2: rdata <= 32'(na2);
          R_DECIM:    rdata <= {16'd0, decim};
          R_FF_LEN:   rdata <= {16'd0, ff_len};
          R_FF_WADDR: rdata <= {16'd0, ff_waddr};
          R_MON_SEL:  rdata <= {25'd0, mon_sel1, 1'b0, mon_sel0};
          R_DAQ_ADDR: rdata <= {16'd0, daq_addr};
          R_DAQ_IQ:   rdata <= daq_data[31:0];
          R_DAQ_AP:   rdata <= daq_data[63:32];
          R_STAT_IQ:  rdata <= {st_q, st_i};
          R_STAT_AP:  rdata <= {st_phase, st_amp};
          R_STAT_CO:  rdata <= {st_co_phase, st_co_amp};
          R_STAT_OUT: rdata <= {st_act, st_err};
          R_STATUS:   rdata <= {29'd0, st_daq_done, st_daq_busy, st_sat};
          default:    rdata <= '0;
        endcase
      end
    end
  end
endmodule
