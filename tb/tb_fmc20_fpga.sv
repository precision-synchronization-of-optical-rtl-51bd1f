// tb_fmc20_fpga: sends link words built by the testbench (sync, sequence,
// value, CRC-8) and decodes the DAC frames. After reset only channel 0 is
// enabled at +-10 V; the test then enables channel 1 and sets spans and its
// static value over the register bus. Checks: span frames as programmed,
// channel 0 carries the last good link value in offset binary, channel 1 its
// static value, a corrupted word is counted and ignored, a lost word counts
// a sequence error, and the link state read over the bus.
module tb_fmc20_fpga;
  import llrf_pkg::*;
  logic clk = 0, rst = 1, rx_valid = 0;
  logic [31:0] rx_word = 0;
  logic bus_wr = 0, bus_rd = 0, bus_rvalid;
  reg_addr_t bus_addr = 0;
  reg_data_t bus_wdata = 0, bus_rdata;
  logic sclk, cs_n, sdi, frame_done, span_frame;
  int checks = 0, failures = 0;
  fmc20_fpga dut (.clk, .rst, .rx_valid, .rx_word, .bus_wr, .bus_rd, .bus_addr, .bus_wdata, .bus_rdata,
                  .bus_rvalid, .sclk, .cs_n, .sdi, .frame_done, .span_frame);

  task automatic wr(input reg_addr_t a, input reg_data_t d);
    @(posedge clk); bus_wr <= 1; bus_addr <= a; bus_wdata <= d; @(posedge clk); bus_wr <= 0;
  endtask
  task automatic rd(input reg_addr_t a, output reg_data_t d);
    @(posedge clk); bus_rd <= 1; bus_addr <= a; @(posedge clk); bus_rd <= 0; #1; d = bus_rdata;
  endtask
  always #5 clk = ~clk;

  logic [23:0] sh;
  logic [23:0] frames [$];
  always @(posedge sclk) if (!cs_n) sh <= {sh[22:0], sdi};
  always @(posedge cs_n) if (!rst) frames.push_back(sh);

  task automatic send(input logic [3:0] seq, input sample_t v, input bit corrupt);
    logic [31:0] w;
    w = {4'hA, seq, v, crc8_20({seq, v})};
    if (corrupt) w[3] = ~w[3];
    @(posedge clk); rx_valid <= 1; rx_word <= w; @(posedge clk); rx_valid <= 0;
  endtask

  task automatic expect_code(input int ch, input sample_t v);
    logic [23:0] f;
    frames.delete();
    for (int k = 0; k < 4; k++) begin
      wait (frames.size() > 0);
      f = frames.pop_front();
      if (f[19:16] == 4'(ch)) break;
    end
    checks++;
    if (f != {4'h3, 4'(ch), v ^ 16'h8000}) begin failures++; $display("ch%0d frame %h exp value %h", ch, f, v); end
  endtask

  initial begin
    logic [23:0] f;
    reg_data_t d;
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (frames.size() == 1);
    f = frames.pop_front(); checks++;
    if (f != {4'h6, 4'd0, 14'd0, 2'd3}) begin failures++; $display("reset span frame %h", f); end
    wr(F_AUX1, 32'd1000); wr(F_SPAN, 32'b11_11_10_11); wr(F_CH_ENABLE, 32'b0011);
    rd(F_SPAN, d); checks++;
    if (d != 32'b11_11_10_11) begin failures++; $display("span reg %h", d); end
    frames.delete();
    while (1) begin
      wait (frames.size() > 0);
      f = frames.pop_front();
      if (f[23:20] == 4'h6) break;
    end
    checks++;
    if (f != {4'h6, 4'd1, 14'd0, 2'd2}) begin failures++; $display("span frame %h", f); end
    send(4'd0, 16'sd1234, 0);
    expect_code(0, 16'sd1234);
    expect_code(1, 16'sd1000);
    send(4'd1, -16'sd20000, 0);
    expect_code(0, -16'sd20000);
    send(4'd2, 16'sd555, 1);
    expect_code(0, -16'sd20000);
    rd(F_LINK, d); checks++;
    if (d != 1) begin failures++; $display("not linked"); end
    rd(F_LINK_ERRS, d); checks++;
    if (d[15:0] != 1) begin failures++; $display("crc_errs %0d", d[15:0]); end
    send(4'd3, 16'sd7, 0);
    expect_code(0, 16'sd7);
    rd(F_LINK_ERRS, d); checks++;
    if (d[31:16] != 1) begin failures++; $display("seq_errs %0d", d[31:16]); end
    rd(F_PZT_VALUE, d); checks++;
    if (d[15:0] != 16'd7) begin failures++; $display("pzt value %0d", d[15:0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
