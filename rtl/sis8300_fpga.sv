// sis8300_fpga: signal processing of the digitizer board that closes the
// laser lock.
//
// Two IF channels are demodulated: the fine channel (the laser's 25th
// harmonic mixed down to the IF, high phase sensitivity) and the coarse
// channel (the 54 MHz fundamental, unambiguous). Each goes through an I/Q
// detector and a CORDIC to amplitude and phase. The phase of the selected
// channel (fine by default) feeds the PI controller; the controller output,
// taken every DECIM+1 samples, passes the notch filter and has the
// feed-forward value added. The resulting actuator value goes to the link
// transmitter for the piezo-driver carrier and, with other signals, to the
// two monitoring DACs. A DAQ buffer records I, Q, amplitude and phase of the
// fine channel, and the register bank gives the host access to all of it.
// The chain (I/Q, amplitude/phase, controller, notch, feed-forward, DAC and
// link outputs) follows the source; order, rates and widths are this
// design's own.
//
// Latency from an ADC sample to tx_word: 2 (I/Q) + 18 (CORDIC) + 2
// (controller) + 1 (strobe) + 1 (notch) + 1 (adder) + 1 (link) = 26 clocks.
module sis8300_fpga
  import llrf_pkg::*;
#(
  parameter int unsigned FF_DEPTH  = 1024,
  parameter int unsigned DAQ_DEPTH = 16384
) (
  input  logic        clk,
  input  logic        rst,
  input  sample_t     adc_fine,
  input  sample_t     adc_coarse,
  // host register bus
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  reg_addr_t   bus_addr,
  input  reg_data_t   bus_wdata,
  output reg_data_t   bus_rdata,
  output logic        bus_rvalid,
  // monitoring DACs (offset binary)
  output logic [15:0] mon_dac0,
  output logic [15:0] mon_dac1,
  // link to the transceiver
  output logic        tx_valid,
  output logic [31:0] tx_word
);
  localparam int unsigned CORDIC_STAGES = 16;
  localparam int unsigned CORDIC_LAT    = CORDIC_STAGES + 2;
  localparam int unsigned FF_AW  = $clog2(FF_DEPTH);
  localparam int unsigned DAQ_AW = $clog2(DAQ_DEPTH);

  // register bank outputs
  logic        loop_en, notch_bypass, ff_en, loop_coarse, daq_arm, ff_wr;
  sample_t     setpoint, kp, ki, lim_lo, lim_hi, ff_wdata;
  logic [4:0]  shift;
  logic signed [17:0] nb0, nb1, nb2, na1, na2;
  logic [15:0] decim, ff_len, ff_waddr, daq_addr;
  mon_sel_e    mon_sel0, mon_sel1;

  // ---- detection -------------------------------------------------------
  logic    fi_valid, co_valid;
  sample_t fi_i, fi_q, co_i, co_q;
  iq_detector u_iq_fine (
    .clk, .rst, .in_valid(1'b1), .adc(adc_fine),
    .out_valid(fi_valid), .i_out(fi_i), .q_out(fi_q));
  iq_detector u_iq_coarse (
    .clk, .rst, .in_valid(1'b1), .adc(adc_coarse),
    .out_valid(co_valid), .i_out(co_i), .q_out(co_q));

  logic        fi_pvalid, co_pvalid;
  logic [15:0] fi_amp, co_amp;
  sample_t     fi_phase, co_phase;
  cordic_vec #(.STAGES(CORDIC_STAGES)) u_cordic_fine (
    .clk, .rst, .in_valid(fi_valid), .i_in(fi_i), .q_in(fi_q),
    .out_valid(fi_pvalid), .amp(fi_amp), .phase(fi_phase));
  cordic_vec #(.STAGES(CORDIC_STAGES)) u_cordic_coarse (
    .clk, .rst, .in_valid(co_valid), .i_in(co_i), .q_in(co_q),
    .out_valid(co_pvalid), .amp(co_amp), .phase(co_phase));

  // I/Q delayed to line up with the CORDIC outputs for monitoring
  sample_t i_dly [CORDIC_LAT];
  sample_t q_dly [CORDIC_LAT];
  always_ff @(posedge clk) begin
    i_dly[0] <= fi_i;
    q_dly[0] <= fi_q;
    for (int k = 1; k < CORDIC_LAT; k++) begin
      i_dly[k] <= i_dly[k-1];
      q_dly[k] <= q_dly[k-1];
    end
  end
  sample_t mon_i, mon_q;
  assign mon_i = i_dly[CORDIC_LAT-1];
  assign mon_q = q_dly[CORDIC_LAT-1];

  // ---- feedback --------------------------------------------------------
  logic    loop_valid;
  sample_t loop_phase;
  assign loop_valid = loop_coarse ? co_pvalid : fi_pvalid;
  assign loop_phase = loop_coarse ? co_phase  : fi_phase;

  logic    err_valid, ctrl_valid, ctrl_sat;
  sample_t err, ctrl_out;
  pi_controller u_pi (
    .clk, .rst, .enable(loop_en), .in_valid(loop_valid), .phase(loop_phase),
    .setpoint, .kp, .ki, .shift, .lim_lo, .lim_hi,
    .err_valid, .err, .out_valid(ctrl_valid), .out(ctrl_out), .sat(ctrl_sat));

  // actuator strobe: every decim+1 controller outputs
  logic [15:0] dec_cnt;
  logic        step;
  sample_t     step_val;
  always_ff @(posedge clk) begin
    if (rst) begin
      dec_cnt  <= '0;
      step     <= 1'b0;
      step_val <= '0;
    end else begin
      step <= 1'b0;
      if (ctrl_valid) begin
        if (dec_cnt >= decim) begin
          dec_cnt  <= '0;
          step     <= 1'b1;
          step_val <= ctrl_out;
        end else begin
          dec_cnt <= dec_cnt + 1'b1;
        end
      end
    end
  end

  logic    notch_valid;
  sample_t notch_out;
  notch_filter u_notch (
    .clk, .rst, .bypass(notch_bypass), .in_valid(step), .x_in(step_val),
    .b0(nb0), .b1(nb1), .b2(nb2), .a1(na1), .a2(na2),
    .out_valid(notch_valid), .y_out(notch_out));

  logic [FF_AW-1:0] ff_rd_addr;
  sample_t          ff_out;
  ff_table #(.DEPTH(FF_DEPTH)) u_ff (
    .clk, .rst, .enable(ff_en), .step, .len(FF_AW'(ff_len)),
    .wr_en(ff_wr), .wr_addr(FF_AW'(ff_waddr)), .wr_data(ff_wdata),
    .rd_addr(ff_rd_addr), .ff_out);

  logic    act_valid;
  sample_t act;
  always_ff @(posedge clk) begin
    if (rst) begin
      act_valid <= 1'b0;
      act       <= '0;
    end else begin
      act_valid <= notch_valid;
      if (notch_valid) act <= sat16(64'(notch_out) + 64'(ff_out));
    end
  end

  link_tx u_link_tx (.clk, .rst, .in_valid(act_valid), .value(act), .tx_valid, .tx_word);

  // ---- monitoring ------------------------------------------------------
  monitor_mux u_mon (
    .clk, .rst, .sel0(mon_sel0), .sel1(mon_sel1), .act, .i_val(mon_i), .q_val(mon_q),
    .amp(sample_t'(fi_amp)), .phase(fi_phase), .err, .ctrl(ctrl_out),
    .dac0(mon_dac0), .dac1(mon_dac1));

  logic        daq_busy, daq_done;
  logic [63:0] daq_data;
  daq_buffer #(.DEPTH(DAQ_DEPTH)) u_daq (
    .clk, .rst, .arm(daq_arm), .in_valid(fi_pvalid), .i_val(mon_i), .q_val(mon_q),
    .amp(sample_t'(fi_amp)), .phase(fi_phase), .busy(daq_busy), .done(daq_done),
    .rd_addr(DAQ_AW'(daq_addr)), .rd_data(daq_data));

  reg_bank u_regs (
    .clk, .rst, .wr(bus_wr), .rd(bus_rd), .addr(bus_addr), .wdata(bus_wdata),
    .rdata(bus_rdata), .rvalid(bus_rvalid),
    .loop_en, .notch_bypass, .ff_en, .loop_coarse, .daq_arm, .setpoint, .kp, .ki, .shift,
    .lim_lo, .lim_hi, .nb0, .nb1, .nb2, .na1, .na2, .decim, .ff_len, .ff_wr, .ff_waddr,
    .ff_wdata, .mon_sel0, .mon_sel1, .daq_addr,
    .daq_data, .st_i(fi_i), .st_q(fi_q), .st_amp(sample_t'(fi_amp)), .st_phase(fi_phase),
    .st_co_amp(sample_t'(co_amp)), .st_co_phase(co_phase), .st_err(err), .st_act(act),
    .st_sat(ctrl_sat), .st_daq_busy(daq_busy), .st_daq_done(daq_done));
endmodule
