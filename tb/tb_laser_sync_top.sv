// tb_laser_sync_top: closed-loop test of the whole system at its default
// sizes (16384-sample DAQ buffer, 1024-entry feed-forward table, 163-clock
// DAC update period).
//
// Harness models:
//  * 1.3 GHz reference (769 ps period); the prescaled adc_clk is fed back as
//    the FPGA clock, as the ADC returns it.
//  * Laser: its phase at the fine channel advances every sample by
//    F0 + KV * V, in 1/65536 turn; F0 is the free-running offset
//    (30/sample, a beat period of about 2200 samples), V the piezo DAC
//    voltage decoded from the serial frames for channel 0 and KV = 10 per
//    volt. The fine ADC sees A*cos(2*pi*2*n/3 + phi), the coarse ADC the
//    fundamental, whose phase is phi/25, both with +-4 LSB noise.
//  * Backplane link: a 4-clock delay line that can corrupt or drop a word.
//  * Host: the two register buses; the carrier's registers set the DAC span
//    and report link errors.
//
// Sequence and the mechanism each step must show (each is counted and a
// count of zero is a failure): DAQ capture of the free-running beat
// (amplitude constant, phase covering the turn); lock acquisition on the fine
// channel (|error| < 300 for 4000 samples); controller saturation with
// narrow limits, and re-lock; notch filter in the path while locked;
// feed-forward table in the path while locked; laser frequency step and
// re-lock; CRC error and lost word on the link, with lock kept; span change
// of the piezo DAC and re-lock; lock on the coarse channel; DAQ capture of
// the locked state (I and Q constant).
`timescale 1ps/1ps
module tb_laser_sync_top;
  import llrf_pkg::*;
  localparam real PI = 3.14159265358979323846;

  logic ref_clk = 0, adc_clk, clk, rst = 1;
  sample_t adc_fine = 0, adc_coarse = 0;
  logic bus_wr = 0, bus_rd = 0, bus_rvalid;
  reg_addr_t bus_addr = 0;
  reg_data_t bus_wdata = 0, bus_rdata;
  logic [15:0] mon_dac0, mon_dac1;
  logic link_tx_valid, link_rx_valid = 0;
  logic [31:0] link_tx_word, link_rx_word = 0;
  logic fmc_bus_wr = 0, fmc_bus_rd = 0, fmc_bus_rvalid;
  reg_addr_t fmc_bus_addr = 0;
  reg_data_t fmc_bus_wdata = 0, fmc_bus_rdata;
  logic pzt_sclk, pzt_cs_n, pzt_sdi, pzt_frame_done, pzt_span_frame;
  int checks = 0, failures = 0;

  laser_sync_top dut (.*);

  always #385 ref_clk = ~ref_clk;
  assign clk = adc_clk;

  // ---------------- backplane link model ----------------
  logic [32:0] lpipe [4];
  bit corrupt_next = 0, drop_next = 0;
  always @(posedge clk) begin
    logic [32:0] w;
    w = {link_tx_valid, link_tx_word};
    if (link_tx_valid && corrupt_next) begin w[20] = ~w[20]; corrupt_next = 0; end
    if (link_tx_valid && drop_next) begin w[32] = 1'b0; drop_next = 0; end
    lpipe[0] <= w;
    for (int k = 1; k < 4; k++) lpipe[k] <= lpipe[k-1];
    link_rx_valid <= lpipe[3][32];
    link_rx_word  <= lpipe[3][31:0];
  end

  // ---------------- piezo DAC model ----------------
  logic [23:0] dsh;
  int dbits = 0;
  logic [1:0] dac_span = 2'd0;
  logic [15:0] dac_code = 16'h8000;
  real volt = 0.0;
  int n_span_frames = 0, n_code_frames = 0;
  always @(posedge pzt_sclk) if (!pzt_cs_n) begin dsh = {dsh[22:0], pzt_sdi}; dbits++; end
  always @(negedge pzt_cs_n) dbits = 0;
  always @(posedge pzt_cs_n) if (dbits == 24 && dsh[19:16] == 4'd0) begin
    if (dsh[23:20] == 4'h6) begin dac_span = dsh[1:0]; n_span_frames++; end
    if (dsh[23:20] == 4'h3) begin dac_code = dsh[15:0]; n_code_frames++; end
    case (dac_span)
      2'd0: volt = 5.0 * real'(dac_code) / 65536.0;
      2'd1: volt = 10.0 * real'(dac_code) / 65536.0;
      2'd2: volt = 5.0 * (real'(dac_code) - 32768.0) / 32768.0;
      default: volt = 10.0 * (real'(dac_code) - 32768.0) / 32768.0;
    endcase
  end

  // ---------------- laser model ----------------
  real F0 = 30.0, KV = 10.0;
  real phi = 0.0;              // fine-channel phase, 1/65536 turn
  longint n = 0;
  always @(posedge clk) begin
    real pr, pc;
    phi = phi + F0 + KV * volt;
    if (phi > 25.0 * 65536.0) phi -= 25.0 * 65536.0;   // coarse phase wraps every 25 fine turns
    if (phi < 0.0) phi += 25.0 * 65536.0;
    pr = 2.0 * PI * phi / 65536.0;
    pc = pr / 25.0 + 0.7;
    adc_fine   <= 16'(int'($floor(8000.0 * $cos(4.0 * PI * real'(n) / 3.0 + pr) + 0.5)) + int'($urandom_range(0, 8)) - 4);
    adc_coarse <= 16'(int'($floor(6000.0 * $cos(4.0 * PI * real'(n) / 3.0 + pc) + 0.5)) + int'($urandom_range(0, 8)) - 4);
    n++;
  end

  // ---------------- bus helpers ----------------
  task automatic wr(input reg_addr_t a, input reg_data_t d);
    @(posedge clk); bus_wr <= 1; bus_addr <= a; bus_wdata <= d; @(posedge clk); bus_wr <= 0;
  endtask
  task automatic rd(input reg_addr_t a, output reg_data_t d);
    @(posedge clk); bus_rd <= 1; bus_addr <= a; @(posedge clk); bus_rd <= 0;
    @(negedge clk); d = bus_rdata;
  endtask

  task automatic fwr(input reg_addr_t a, input reg_data_t d);
    @(posedge clk); fmc_bus_wr <= 1; fmc_bus_addr <= a; fmc_bus_wdata <= d; @(posedge clk); fmc_bus_wr <= 0;
  endtask
  task automatic frd(input reg_addr_t a, output reg_data_t d);
    @(posedge clk); fmc_bus_rd <= 1; fmc_bus_addr <= a; @(posedge clk); fmc_bus_rd <= 0;
    @(negedge clk); d = fmc_bus_rdata;
  endtask

  // error and saturation monitor through the status registers
  int n_sat = 0;
  task automatic wait_lock(input string what, input int max_samples, output bit ok);
    reg_data_t d;
    int good, t;
    good = 0; t = 0; ok = 0;
    while (t < max_samples) begin
      rd(R_STAT_OUT, d);
      t += 3;
      if (int'($signed(d[15:0])) < 300 && int'($signed(d[15:0])) > -300) good += 3; else good = 0;
      rd(R_STATUS, d);
      t += 3;
      if (d[0]) n_sat++;
      if (good >= 4000) begin ok = 1; break; end
    end
    checks++;
    if (!ok) begin failures++; $display("%s: no lock within %0d samples", what, max_samples); end
    else $display("%s: locked after %0d samples", what, t);
  endtask

  task automatic hold_lock(input string what, input int samples, output bit ok);
    reg_data_t d;
    int t, worst;
    t = 0; ok = 1; worst = 0;
    while (t < samples) begin
      rd(R_STAT_OUT, d);
      t += 3;
      if (int'($signed(d[15:0])) > worst) worst = int'($signed(d[15:0]));
      if (-int'($signed(d[15:0])) > worst) worst = -int'($signed(d[15:0]));
    end
    if (worst >= 1000) ok = 0;
    checks++;
    if (!ok) begin failures++; $display("%s: lock lost, worst error %0d", what, worst); end
  endtask

  function automatic int wrapd(input int d);
    d = d & 16'hFFFF; return (d > 32767) ? d - 65536 : d;
  endfunction

  // DAQ: capture and check; locked = I/Q constant, else phase covers the turn
  int n_daq = 0;
  task automatic daq_check(input bit locked);
    reg_data_t d;
    int amin, amax, pmin, pmax, i0, q0, ok;
    wr(R_CTRL, {27'd0, 1'b0, 1'b1, 3'b000} | ctrl_shadow);
    do rd(R_STATUS, d); while (!d[2]);
    amin = 65535; amax = 0; pmin = 32767; pmax = -32768; ok = 1;
    for (int a = 0; a < 16384; a += 97) begin
      wr(R_DAQ_ADDR, 32'(a));
      rd(R_DAQ_AP, d);
      if (int'(d[15:0]) < amin) amin = int'(d[15:0]);
      if (int'(d[15:0]) > amax) amax = int'(d[15:0]);
      if (int'($signed(d[31:16])) < pmin) pmin = int'($signed(d[31:16]));
      if (int'($signed(d[31:16])) > pmax) pmax = int'($signed(d[31:16]));
      rd(R_DAQ_IQ, d);
      if (a == 0) begin i0 = int'($signed(d[15:0])); q0 = int'($signed(d[31:16])); end
      else if (locked && (wrapd(int'(d[15:0]) - i0) > 300 || wrapd(int'(d[15:0]) - i0) < -300 ||
                          wrapd(int'(d[31:16]) - q0) > 300 || wrapd(int'(d[31:16]) - q0) < -300)) ok = 0;
    end
    checks += 2;
    if (amin < 7950 || amax > 8050) begin failures++; $display("daq amplitude %0d..%0d", amin, amax); end
    if (locked ? !ok : (pmax - pmin < 60000)) begin failures++; $display("daq locked=%0d phase %0d..%0d", locked, pmin, pmax); end
    else n_daq++;
  endtask

  logic [31:0] ctrl_shadow = 0;
  task automatic ctrl(input logic [31:0] v);
    ctrl_shadow = v; wr(R_CTRL, v);
  endtask

  int n_lock = 0, n_notch = 0, n_ff = 0, n_fstep = 0, n_crc = 0, n_seq = 0, n_span = 0, n_coarse = 0, n_satrec = 0;

  initial begin
    bit ok;
    reg_data_t d;
    foreach (lpipe[k]) lpipe[k] = '0;
    repeat (20) @(posedge ref_clk);
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (10) @(posedge clk);
    rst <= 0;
    n = 0;
    rd(R_ID, d);
    checks++;
    if (d != DESIGN_ID) begin failures++; $display("id %h", d); end
    frd(F_ID, d);
    checks++;
    if (d != FMC_ID) begin failures++; $display("carrier id %h", d); end
    // controller: kp/2^14 = 0.5, ki = 2
    wr(R_KP, 32'd8192); wr(R_KI, 32'd2); wr(R_SHIFT, 32'd14);
    wr(R_LIMITS, {16'sd32000, -16'sd32000}); wr(R_SETPOINT, 32'h0000);
    ctrl(32'h2);                                   // loop open, notch bypassed
    // 1. free-running beat
    daq_check(0);
    // 2. lock
    ctrl(32'h3);
    wait_lock("fine lock", 60000, ok); if (ok) n_lock++;
    // 3. saturation: limits too narrow to hold the offset, then restored
    wr(R_LIMITS, {16'sd4000, -16'sd4000});
    repeat (6000) @(posedge clk);
    rd(R_STATUS, d); if (d[0]) n_sat++;
    checks++;
    if (!d[0]) begin failures++; $display("no saturation with narrow limits"); end
    wr(R_LIMITS, {16'sd32000, -16'sd32000});
    wait_lock("after saturation", 60000, ok); if (ok) n_satrec++;
    // 4. notch at fs/4 (r = 0.9, unity DC gain) in the path
    wr(R_NOTCH_B0, 32'd59310); wr(R_NOTCH_B1, 0); wr(R_NOTCH_B2, 32'd59310);
    wr(R_NOTCH_A1, 0); wr(R_NOTCH_A2, 32'd53084);
    ctrl(32'h1);
    hold_lock("notch", 20000, ok); if (ok) n_notch++;
    // 5. feed-forward: a 64-entry triangle of +-240 played every sample
    wr(R_FF_WADDR, 0);
    for (int k = 0; k < 64; k++) wr(R_FF_WDATA, 32'((k < 32) ? (k * 15 - 240) : (720 - k * 15)));
    wr(R_FF_LEN, 32'd63);
    ctrl(32'h5);
    repeat (3000) @(posedge clk);
    wait_lock("feed-forward", 60000, ok); if (ok) n_ff++;
    ctrl(32'h1);
    // 6. laser frequency step
    F0 = 40.0;
    wait_lock("frequency step", 60000, ok); if (ok) n_fstep++;
    // 7. link errors
    corrupt_next = 1; repeat (100) @(posedge clk);
    drop_next = 1; repeat (100) @(posedge clk);
    frd(F_LINK_ERRS, d);
    checks++;
    if (d[15:0] != 1 || d[31:16] != 2) begin
      failures++; $display("link errors crc %0d seq %0d", d[15:0], d[31:16]);
    end else begin n_crc++; n_seq++; end
    hold_lock("link errors", 5000, ok);
    // 8. piezo DAC span change to +-5 V: half the loop gain
    begin
      int s0;
      s0 = n_span_frames;
      fwr(F_SPAN, 32'b11_11_11_10);
      repeat (2000) @(posedge clk);
      checks++;
      if (n_span_frames != s0 + 1 || dac_span != 2'd2) begin failures++; $display("span change not written"); end
      else n_span++;
    end
    wait_lock("span +-5 V", 60000, ok);
    // 9. coarse channel: open the loop, rescale for 25x lower phase slope
    ctrl(32'h0);
    wr(R_KP, 32'd25600); wr(R_KI, 32'd6); wr(R_SHIFT, 32'd10);
    ctrl(32'h11);
    wait_lock("coarse lock", 100000, ok); if (ok) n_coarse++;
    // 10. back to fine, DAQ of the locked state
    ctrl(32'h0);
    wr(R_KP, 32'd8192); wr(R_KI, 32'd2); wr(R_SHIFT, 32'd14);
    ctrl(32'h1);
    wait_lock("fine relock", 60000, ok); if (ok) n_lock++;
    daq_check(1);

    $display("mechanisms: lock %0d sat %0d sat-recovery %0d notch %0d ff %0d fstep %0d crc %0d seq %0d span %0d coarse %0d daq %0d",
             n_lock, n_sat, n_satrec, n_notch, n_ff, n_fstep, n_crc, n_seq, n_span, n_coarse, n_daq);
    if (n_lock == 0)   begin failures++; $display("never: lock"); end
    if (n_sat == 0)    begin failures++; $display("never: saturation"); end
    if (n_satrec == 0) begin failures++; $display("never: recovery from saturation"); end
    if (n_notch == 0)  begin failures++; $display("never: notch"); end
    if (n_ff == 0)     begin failures++; $display("never: feed-forward"); end
    if (n_fstep == 0)  begin failures++; $display("never: frequency step"); end
    if (n_crc == 0)    begin failures++; $display("never: crc error"); end
    if (n_seq == 0)    begin failures++; $display("never: sequence error"); end
    if (n_span == 0)   begin failures++; $display("never: span change"); end
    if (n_coarse == 0) begin failures++; $display("never: coarse lock"); end
    if (n_daq < 2)     begin failures++; $display("never: daq capture"); end
    checks += 11;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20_000_000_000;   // 20 ms of simulated time, 1.6 M samples
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
