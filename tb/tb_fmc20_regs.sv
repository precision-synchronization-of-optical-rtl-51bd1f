// tb_fmc20_regs: reset values (channel 0 only, all spans +-10 V), write and
// read-back of every control register, decoding of the span word into the
// four channels, status inputs at their read addresses one clock after rd.
module tb_fmc20_regs;
  import llrf_pkg::*;
  logic clk = 0, rst = 1, wr = 0, rd = 0, rvalid;
  reg_addr_t addr = 0;
  reg_data_t wdata = 0, rdata;
  logic [3:0] ch_enable;
  logic [1:0] span [4];
  sample_t aux_code [1:3];
  logic linked = 1;
  logic [15:0] crc_errs = 16'h1234, seq_errs = 16'h5678;
  sample_t pzt_value = -16'sd77;
  int checks = 0, failures = 0;
  fmc20_regs dut (.clk, .rst, .wr, .rd, .addr, .wdata, .rdata, .rvalid, .ch_enable, .span, .aux_code,
                  .linked, .crc_errs, .seq_errs, .pzt_value);
  always #5 clk = ~clk;

  task automatic bus_write(input reg_addr_t a, input reg_data_t d);
    wr <= 1; addr <= a; wdata <= d; @(posedge clk); wr <= 0;
  endtask
  task automatic bus_read(input reg_addr_t a, input reg_data_t exp);
    rd <= 1; addr <= a; @(posedge clk); rd <= 0; #1;
    checks++;
    if (!rvalid || rdata != exp) begin failures++; $display("read %h: %h exp %h", a, rdata, exp); end
  endtask
  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    expect_eq("reset enable", ch_enable, 1);
    for (int c = 0; c < 4; c++) expect_eq("reset span", span[c], 3);
    bus_read(F_ID, FMC_ID);
    bus_write(F_CH_ENABLE, 32'hA);
    bus_write(F_SPAN, 32'b00_01_10_11);
    bus_write(F_AUX1, 32'hFFFF_8001); bus_write(F_AUX2, 32'd2); bus_write(F_AUX3, 32'd3);
    @(posedge clk);
    expect_eq("enable", ch_enable, 4'hA);
    expect_eq("span0", span[0], 3); expect_eq("span1", span[1], 2);
    expect_eq("span2", span[2], 1); expect_eq("span3", span[3], 0);
    expect_eq("aux1", aux_code[1], -16'sd32767); expect_eq("aux3", aux_code[3], 3);
    bus_read(F_CH_ENABLE, 32'hA);
    bus_read(F_SPAN, 32'b00_01_10_11);
    bus_read(F_AUX1, 32'h8001); bus_read(F_AUX2, 32'd2); bus_read(F_AUX3, 32'd3);
    bus_read(F_LINK, 32'd1);
    bus_read(F_LINK_ERRS, 32'h5678_1234);
    bus_read(F_PZT_VALUE, 32'h0000_FFB3);
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
