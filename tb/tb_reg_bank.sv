// tb_reg_bank: writes every control register and reads it back, checks the
// decoded control outputs, the self-clearing DAQ arm pulse, the table-write
// pulse with address auto-increment, the reset values, and that status
// inputs appear at their read addresses one clock after rd.
module tb_reg_bank;
  import llrf_pkg::*;
  logic clk = 0, rst = 1, wr = 0, rd = 0;
  reg_addr_t addr = 0;
  reg_data_t wdata = 0, rdata;
  logic rvalid;
  logic loop_en, notch_bypass, ff_en, loop_coarse, daq_arm, ff_wr;
  sample_t setpoint, kp, ki, lim_lo, lim_hi, ff_wdata;
  logic [4:0] shift;
  logic signed [17:0] nb0, nb1, nb2, na1, na2;
  logic [15:0] decim, ff_len, ff_waddr, daq_addr;
  mon_sel_e mon_sel0, mon_sel1;
  logic [63:0] daq_data = 64'h1111_2222_3333_4444;
  sample_t st [8];
  int checks = 0, failures = 0;
  reg_bank dut (.clk, .rst, .wr, .rd, .addr, .wdata, .rdata, .rvalid, .loop_en, .notch_bypass, .ff_en,
    .loop_coarse, .daq_arm, .setpoint, .kp, .ki, .shift, .lim_lo, .lim_hi, .nb0, .nb1, .nb2, .na1, .na2,
    .decim, .ff_len, .ff_wr, .ff_waddr, .ff_wdata, .mon_sel0, .mon_sel1, .daq_addr, .daq_data,
    .st_i(st[0]), .st_q(st[1]), .st_amp(st[2]), .st_phase(st[3]), .st_co_amp(st[4]), .st_co_phase(st[5]),
    .st_err(st[6]), .st_act(st[7]), .st_sat(1'b1), .st_daq_busy(1'b0), .st_daq_done(1'b1));
  always #5 clk = ~clk;

  task automatic bus_write(input reg_addr_t a, input reg_data_t d);
    wr <= 1; addr <= a; wdata <= d; @(posedge clk); wr <= 0;
  endtask
  task automatic bus_read(input reg_addr_t a, output reg_data_t d);
    rd <= 1; addr <= a; @(posedge clk); rd <= 0; #1;
    checks++;
    if (!rvalid) begin failures++; $display("no rvalid"); end
    d = rdata;
  endtask
  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    reg_data_t d;
    foreach (st[k]) st[k] = 16'($urandom);
    repeat (3) @(posedge clk);
    rst <= 0;
    expect_eq("reset bypass", notch_bypass, 1);
    expect_eq("reset b0", nb0, 65536);
    bus_read(R_ID, d); expect_eq("id", d, DESIGN_ID);
    bus_write(R_SETPOINT, 32'h0000_1234); bus_write(R_KP, 32'h0000_0456); bus_write(R_KI, 32'h0000_0078);
    bus_write(R_SHIFT, 32'd9); bus_write(R_LIMITS, 32'h7000_9000);
    bus_write(R_NOTCH_B0, 32'h0001_0001); bus_write(R_NOTCH_A2, 32'h0003_FFFF);
    bus_write(R_DECIM, 32'd7); bus_write(R_FF_LEN, 32'd99); bus_write(R_MON_SEL, 32'h0000_0052);
    @(posedge clk);
    expect_eq("setpoint", setpoint, 16'h1234); expect_eq("kp", kp, 16'h456); expect_eq("ki", ki, 16'h78);
    expect_eq("shift", shift, 9); expect_eq("lim_lo", lim_lo, 16'sh9000); expect_eq("lim_hi", lim_hi, 16'sh7000);
    expect_eq("nb0", nb0, 18'h10001); expect_eq("na2", na2, -1); expect_eq("decim", decim, 7);
    expect_eq("ff_len", ff_len, 99); expect_eq("mon0", mon_sel0, MON_Q); expect_eq("mon1", mon_sel1, MON_ERR);
    bus_read(R_SETPOINT, d); expect_eq("rd setpoint", d, 32'h1234);
    bus_read(R_LIMITS, d); expect_eq("rd limits", d, 32'h7000_9000);
    bus_read(R_MON_SEL, d); expect_eq("rd mon", d, 32'h52);
    // control bits and arm pulse
    bus_write(R_CTRL, 32'h1D); #1;
    expect_eq("arm pulse", daq_arm, 1);
    expect_eq("ctrl", {loop_coarse, ff_en, notch_bypass, loop_en}, 4'b1101);
    @(posedge clk); #1;
    expect_eq("arm cleared", daq_arm, 0);
    bus_read(R_CTRL, d); expect_eq("rd ctrl", d, 32'h15);
    // table writes
    bus_write(R_FF_WADDR, 32'd5);
    bus_write(R_FF_WDATA, 32'hAAAA); #1;
    expect_eq("ff_wr", ff_wr, 1); expect_eq("ff_waddr", ff_waddr, 5); expect_eq("ff_wdata", ff_wdata, 16'shAAAA);
    bus_write(R_FF_WDATA, 32'hBBBB); #1;
    expect_eq("ff_waddr inc", ff_waddr, 6);
    // status
    bus_read(R_STAT_IQ, d);  expect_eq("stat iq", d, {st[1], st[0]});
    bus_read(R_STAT_AP, d);  expect_eq("stat ap", d, {st[3], st[2]});
    bus_read(R_STAT_CO, d);  expect_eq("stat co", d, {st[5], st[4]});
    bus_read(R_STAT_OUT, d); expect_eq("stat out", d, {st[7], st[6]});
    bus_read(R_STATUS, d);   expect_eq("status", d, 32'h5);
    bus_read(R_DAQ_IQ, d);   expect_eq("daq iq", d, 32'h3333_4444);
    bus_read(R_DAQ_AP, d);   expect_eq("daq ap", d, 32'h1111_2222);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
