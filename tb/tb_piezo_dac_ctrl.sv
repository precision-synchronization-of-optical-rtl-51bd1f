// tb_piezo_dac_ctrl: a model of the DAC's serial port decodes every frame
// (bits taken at rising SCLK while cs_n is low). Checks: after reset one span
// frame per enabled channel with the requested span; then code frames in
// round robin over the enabled channels, data = value in offset binary;
// frame starts exactly UPDATE_DIV clocks apart (the update rate); a span
// change produces a new span frame; disabled channels are never written.
module tb_piezo_dac_ctrl;
  import llrf_pkg::*;
  localparam int UPDATE_DIV = 163;
  logic clk = 0, rst = 1;
  logic [3:0] ch_enable = 4'b0101;
  logic [1:0] span [4];
  sample_t code [4];
  logic sclk, cs_n, sdi, frame_done, span_frame;
  int checks = 0, failures = 0;
  piezo_dac_ctrl #(.UPDATE_DIV(UPDATE_DIV)) dut (.clk, .rst, .ch_enable, .span, .code, .sclk, .cs_n, .sdi, .frame_done, .span_frame);
  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [23:0] sh; int nbits = 0;
  logic [23:0] frames [$];
  int starts [$];
  always @(posedge sclk) if (!cs_n) begin sh <= {sh[22:0], sdi}; nbits <= nbits + 1; end
  always @(negedge cs_n) begin nbits = 0; starts.push_back(cyc); end
  always @(posedge cs_n) if (!rst) begin
    checks++;
    if (nbits != 24) begin failures++; $display("frame with %0d bits", nbits); end
    frames.push_back(sh);
  end

  initial begin
    logic [23:0] f;
    int last_ch, ncode;
    span = '{2'd0, 2'd1, 2'd3, 2'd2};
    code = '{16'sd0, 16'sd0, 16'sd0, 16'sd0};
    repeat (3) @(posedge clk);
    rst <= 0;
    wait (frames.size() == 2);
    f = frames.pop_front(); checks++;
    if (f != {4'h6, 4'd0, 14'd0, 2'd0}) begin failures++; $display("span0 frame %h", f); end
    f = frames.pop_front(); checks++;
    if (f != {4'h6, 4'd2, 14'd0, 2'd3}) begin failures++; $display("span2 frame %h", f); end
    last_ch = -1; ncode = 0;
    for (int n = 0; n < 40; n++) begin
      code[0] = 16'($urandom); code[2] = 16'($urandom);
      wait (frames.size() == 1);
      f = frames.pop_front();
      checks++;
      if (f[23:20] != 4'h3 || (f[19:16] != 0 && f[19:16] != 2) || f[19:16] == 4'(last_ch)) begin
        failures++; $display("code frame %h", f);
      end
      last_ch = int'(f[19:16]);
      ncode++;
    end
    // value check: hold codes constant and compare
    code[0] = -16'sd1234; code[2] = 16'sd20000;
    repeat (3) begin wait (frames.size() == 1); void'(frames.pop_front()); end
    for (int n = 0; n < 4; n++) begin
      wait (frames.size() == 1);
      f = frames.pop_front();
      checks++;
      if (f[15:0] != (code[f[17:16]] ^ 16'h8000)) begin failures++; $display("data %h for ch %0d", f[15:0], f[19:16]); end
    end
    // span change
    span[2] = 2'd1;
    repeat (2) begin
      wait (frames.size() == 1);
      f = frames.pop_front();
      if (f[23:20] == 4'h6) break;
    end
    checks++;
    if (f != {4'h6, 4'd2, 14'd0, 2'd1}) begin failures++; $display("span change frame %h", f); end
    // spacing of frame starts
    for (int k = 1; k < starts.size(); k++) begin
      checks++;
      if (starts[k] - starts[k-1] != UPDATE_DIV) begin failures++; $display("spacing %0d", starts[k] - starts[k-1]); end
    end
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
