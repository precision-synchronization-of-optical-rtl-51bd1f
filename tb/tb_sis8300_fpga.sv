// tb_sis8300_fpga: open-loop test of the digitizer processing (DAQ depth 256,
// table depth 64 to keep it short). The fine and coarse ADC inputs carry
// A*cos(2*pi*2*n/3 + phi) signals. Checks, through the register bus and the
// link output: measured amplitude and phase of both channels; error =
// setpoint - phase; actuator = (kp*err) >>> shift on the link words with
// valid CRC; the latency from a phase step at the ADC to the link output
// (26 clocks in the FPGA, plus one for the ADC register of this harness and
// one for observing tx_valid);
// one link word per DECIM+1 samples; notch gain; feed-forward play-out; the
// monitoring DAC; a DAQ capture; the coarse channel driving the loop.
module tb_sis8300_fpga;
  import llrf_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1;
  sample_t adc_fine = 0, adc_coarse = 0;
  logic bus_wr = 0, bus_rd = 0, bus_rvalid, tx_valid;
  reg_addr_t bus_addr = 0;
  reg_data_t bus_wdata = 0, bus_rdata;
  logic [15:0] mon_dac0, mon_dac1;
  logic [31:0] tx_word;
  int checks = 0, failures = 0;
  sis8300_fpga #(.FF_DEPTH(64), .DAQ_DEPTH(256)) dut (.clk, .rst, .adc_fine, .adc_coarse, .bus_wr, .bus_rd,
    .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid, .mon_dac0, .mon_dac1, .tx_valid, .tx_word);
  always #5 clk = ~clk;

  real ph_f = 1.0, ph_c = -2.0, amp_f = 10000.0, amp_c = 6000.0;
  longint n = 0;
  int cyc = 0;
  always @(posedge clk) begin
    if (rst) n = 0;      // sample 0 is the first one the detectors see
    adc_fine   <= 16'(int'($floor(amp_f * $cos(4.0 * PI * real'(n) / 3.0 + ph_f) + 0.5)));
    adc_coarse <= 16'(int'($floor(amp_c * $cos(4.0 * PI * real'(n) / 3.0 + ph_c) + 0.5)));
    n++;
    cyc++;
  end

  // link monitor
  sample_t last_tx = 0;
  int n_tx = 0, t_tx = 0;
  always @(posedge clk) if (tx_valid) begin
    checks++;
    if (tx_word[31:28] != 4'hA || tx_word[7:0] != crc8_20(tx_word[27:8])) begin failures++; $display("bad frame"); end
    last_tx <= sample_t'(tx_word[23:8]);
    n_tx++;
    t_tx <= cyc;
  end

  task automatic wr(input reg_addr_t a, input reg_data_t d);
    @(posedge clk); bus_wr <= 1; bus_addr <= a; bus_wdata <= d; @(posedge clk); bus_wr <= 0;
  endtask
  task automatic rd(input reg_addr_t a, output reg_data_t d);
    @(posedge clk); bus_rd <= 1; bus_addr <= a; @(posedge clk); bus_rd <= 0; #1; d = bus_rdata;
  endtask
  function automatic int ph2lsb(input real p);
    return int'($floor(p / (2.0 * PI) * 65536.0 + 0.5));
  endfunction
  function automatic int wrapd(input int d);
    d = d & 16'hFFFF; return (d > 32767) ? d - 65536 : d;
  endfunction
  task automatic near(input string what, input int got, input int exp, input int tol);
    checks++;
    if (wrapd(got - exp) > tol || wrapd(got - exp) < -tol) begin failures++; $display("%s: %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    reg_data_t d;
    int ph_meas, err_r, act_r, t0, lat, cnt0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (40) @(posedge clk);
    rd(R_STAT_AP, d);
    near("fine amp", int'(d[15:0]), 10000, 4); near("fine phase", int'($signed(d[31:16])), ph2lsb(1.0), 4);
    rd(R_STAT_CO, d);
    near("coarse amp", int'(d[15:0]), 6000, 4); near("coarse phase", int'($signed(d[31:16])), ph2lsb(-2.0), 4);
    ph_meas = int'($signed(d[31:16]));
    // proportional loop, open
    wr(R_SETPOINT, 32'h1000); wr(R_KP, 32'd60); wr(R_KI, 0); wr(R_SHIFT, 32'd6);
    wr(R_CTRL, 32'h3);   // enable, notch bypass
    repeat (40) @(posedge clk);
    rd(R_STAT_OUT, d);
    err_r = int'($signed(d[15:0])); act_r = int'($signed(d[31:16]));
    near("error", err_r, 16'h1000 - ph2lsb(1.0), 4);
    checks++;
    if (act_r != int'(sat16(64'((longint'(err_r) * 60) >>> 6)))) begin failures++; $display("act %0d err %0d", act_r, err_r); end
    checks++;
    if (last_tx != 16'(act_r)) begin failures++; $display("link value %0d act %0d", last_tx, act_r); end
    // latency of a phase step to the link output
    @(posedge clk); #1; ph_f = 1.5; t0 = cyc;
    while (last_tx == 16'(act_r) && cyc < t0 + 100) @(posedge clk);
    lat = t_tx - t0;
    checks++;
    if (lat != 28) begin failures++; $display("latency %0d", lat); end
    // decimation: one word per 4 samples
    wr(R_DECIM, 32'd3); repeat (10) @(posedge clk);
    cnt0 = n_tx; repeat (400) @(posedge clk);
    checks++;
    if (n_tx - cnt0 != 100) begin failures++; $display("words in 400 clocks: %0d", n_tx - cnt0); end
    wr(R_DECIM, 0);
    // notch with b0 = 0.5 and nothing else: gain 1/2
    wr(R_NOTCH_B0, 32'd32768); wr(R_CTRL, 32'h1);
    repeat (40) @(posedge clk);
    rd(R_STAT_OUT, d);
    err_r = int'($signed(d[15:0])); act_r = int'($signed(d[31:16]));
    near("notch half gain", act_r, int'(sat16(64'((longint'(err_r) * 60) >>> 6))) / 2, 2);
    // monitor DAC shows the actuator
    checks++;
    if (mon_dac0 != (16'(act_r) ^ 16'h8000)) begin failures++; $display("mon dac %h", mon_dac0); end
    // feed-forward: kp = 0, table 0,100,200,... length 8
    wr(R_KP, 0); wr(R_NOTCH_B0, 32'd65536);
    wr(R_FF_WADDR, 0);
    for (int k = 0; k < 8; k++) wr(R_FF_WDATA, 32'(100 * k));
    wr(R_FF_LEN, 32'd7); wr(R_DECIM, 32'd49);
    wr(R_CTRL, 32'h7);
    begin
      int seen [8];
      int m;
      foreach (seen[k]) seen[k] = 0;
      repeat (2000) begin
        @(posedge clk);
        if (tx_valid) begin
          m = int'($signed(tx_word[23:8]));
          if (m % 100 == 0 && m >= 0 && m < 800) seen[m / 100]++;
          else begin failures++; $display("ff value %0d", m); end
        end
      end
      foreach (seen[k]) begin
        checks++;
        if (seen[k] < 4 || seen[k] > 7) begin failures++; $display("ff entry %0d seen %0d", k, seen[k]); end
      end
    end
    wr(R_CTRL, 32'h3); wr(R_DECIM, 0);
    // DAQ capture
    wr(R_CTRL, 32'hB);
    repeat (300) @(posedge clk);
    rd(R_STATUS, d);
    checks++;
    if (d[2:1] != 2'b10) begin failures++; $display("daq status %b", d[2:1]); end
    for (int a = 0; a < 256; a += 37) begin
      wr(R_DAQ_ADDR, 32'(a));
      rd(R_DAQ_AP, d);
      near("daq amp", int'(d[15:0]), 10000, 4); near("daq phase", int'($signed(d[31:16])), ph2lsb(1.5), 4);
      rd(R_DAQ_IQ, d);
      near("daq I", int'($signed(d[15:0])), int'(10000.0 * $cos(1.5)), 4);
      near("daq Q", int'($signed(d[31:16])), int'(10000.0 * $sin(1.5)), 4);
    end
    // coarse channel drives the loop
    wr(R_KP, 32'd64); wr(R_CTRL, 32'h13);
    repeat (40) @(posedge clk);
    rd(R_STAT_OUT, d);
    near("coarse error", int'($signed(d[15:0])), 16'h1000 - ph2lsb(-2.0), 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
