// tb_lock_disturbance: disturbance rejection of the closed loop, the digital
// counterpart of a phase-noise measurement on the locked laser.
//
// The whole system runs at its default sizes with the laser model of
// tb_laser_sync_top (free-running offset 30/65536 turn per sample, piezo
// slope 10 per volt, +-10 V span). Once locked, the laser frequency is
// modulated sinusoidally at FDIST = 500 Hz with an amplitude of 2/65536 turn
// per sample (a mechanical disturbance such as crate fans). Free running,
// that would swing the phase by 2*fs/(2*pi*FDIST) = 51700/65536 turn. Over
// two disturbance periods the phase error read from the digitizer registers
// must stay below 1/20 of that swing, and the rms error is reported.
`timescale 1ps/1ps
module tb_lock_disturbance;
  import llrf_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam real FS = 1300.0e6 / 16.0;
  localparam real FDIST = 500.0;
  localparam real DAMP = 2.0;

  logic ref_clk = 0, adc_clk, clk, rst = 1;
  sample_t adc_fine = 0, adc_coarse = 0;
  logic bus_wr = 0, bus_rd = 0, bus_rvalid;
  reg_addr_t bus_addr = 0;
  reg_data_t bus_wdata = 0, bus_rdata;
  logic [15:0] mon_dac0, mon_dac1;
  logic link_tx_valid, link_rx_valid;
  logic [31:0] link_tx_word, link_rx_word;
  logic fmc_bus_wr = 0, fmc_bus_rd = 0, fmc_bus_rvalid;
  reg_addr_t fmc_bus_addr = 0;
  reg_data_t fmc_bus_wdata = 0, fmc_bus_rdata;
  logic pzt_sclk, pzt_cs_n, pzt_sdi, pzt_frame_done, pzt_span_frame;
  int checks = 0, failures = 0;

  laser_sync_top dut (.*);
  always #385 ref_clk = ~ref_clk;
  assign clk = adc_clk;

  // ideal backplane link with two clocks of delay
  logic [32:0] l0 = '0, l1 = '0;
  always @(posedge clk) begin l0 <= {link_tx_valid, link_tx_word}; l1 <= l0; end
  assign link_rx_valid = l1[32];
  assign link_rx_word  = l1[31:0];

  // piezo DAC model, +-10 V span on channel 0
  logic [23:0] dsh;
  real volt = 0.0;
  always @(posedge pzt_sclk) if (!pzt_cs_n) dsh = {dsh[22:0], pzt_sdi};
  always @(posedge pzt_cs_n) if (dsh[23:20] == 4'h3 && dsh[19:16] == 4'd0)
    volt = 10.0 * (real'(dsh[15:0]) - 32768.0) / 32768.0;

  // laser model
  real phi = 0.0, dist_on = 0.0;
  longint n = 0, nd = 0;
  always @(posedge clk) begin
    real pr;
    phi = phi + 30.0 + 10.0 * volt + dist_on * DAMP * $sin(2.0 * PI * FDIST * real'(nd) / FS);
    if (dist_on != 0.0) nd++;
    if (phi > 25.0 * 65536.0) phi -= 25.0 * 65536.0;
    if (phi < 0.0) phi += 25.0 * 65536.0;
    pr = 2.0 * PI * phi / 65536.0;
    adc_fine   <= 16'(int'($floor(8000.0 * $cos(4.0 * PI * real'(n) / 3.0 + pr) + 0.5)) + int'($urandom_range(0, 8)) - 4);
    adc_coarse <= 16'(int'($floor(6000.0 * $cos(4.0 * PI * real'(n) / 3.0 + pr / 25.0) + 0.5)));
    n++;
  end

  task automatic wr(input reg_addr_t a, input reg_data_t d);
    @(posedge clk); bus_wr <= 1; bus_addr <= a; bus_wdata <= d; @(posedge clk); bus_wr <= 0;
  endtask
  task automatic rd(input reg_addr_t a, output reg_data_t d);
    @(posedge clk); bus_rd <= 1; bus_addr <= a; @(posedge clk); bus_rd <= 0;
    @(negedge clk); d = bus_rdata;
  endtask

  initial begin
    reg_data_t d;
    int good, worst, nsamp, e;
    real sumsq, swing;
    repeat (20) @(posedge ref_clk);
    repeat (4) @(posedge clk);
    rst <= 0;
    wr(R_KP, 32'd8192); wr(R_KI, 32'd2); wr(R_SHIFT, 32'd14);
    wr(R_LIMITS, {16'sd32000, -16'sd32000});
    wr(R_CTRL, 32'h3);
    good = 0;
    for (int t = 0; t < 100000 && good < 4000; t += 3) begin
      rd(R_STAT_OUT, d);
      if (int'($signed(d[15:0])) < 300 && int'($signed(d[15:0])) > -300) good += 3; else good = 0;
    end
    checks++;
    if (good < 4000) begin failures++; $display("no lock"); end
    dist_on = 1.0;
    swing = DAMP * FS / (2.0 * PI * FDIST);
    worst = 0; sumsq = 0.0; nsamp = 0;
    while (real'(nd) < 2.0 * FS / FDIST) begin
      rd(R_STAT_OUT, d);
      e = int'($signed(d[15:0]));
      if (e > worst) worst = e;
      if (-e > worst) worst = -e;
      sumsq += real'(e) * real'(e);
      nsamp++;
    end
    $display("500 Hz disturbance: free-running swing %0.0f, locked peak error %0d, rms %0.1f (1/65536 turn)",
             swing, worst, $sqrt(sumsq / real'(nsamp)));
    checks++;
    if (real'(worst) > swing / 20.0) begin failures++; $display("suppression below 20"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #30_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
