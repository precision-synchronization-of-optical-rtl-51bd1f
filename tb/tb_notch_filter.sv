// tb_notch_filter: (1) random input against a direct-form-I reference with
// 64-bit integer arithmetic in the testbench; (2) a notch at fs/4 with pole
// radius 0.9 (b0 = b2 = 0.905, b1 = a1 = 0, a2 = 0.81): a sine at fs/4 must be
// attenuated below 2 % after the transient while a constant passes with
// gain 1 (+-1 %); (3) bypass passes the input unchanged after one clock.
module tb_notch_filter;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1, bypass = 0, in_valid = 0;
  logic signed [15:0] x_in = 0, y_out;
  logic signed [17:0] b0 = 0, b1 = 0, b2 = 0, a1 = 0, a2 = 0;
  logic out_valid;
  int checks = 0, failures = 0;
  notch_filter dut (.clk, .rst, .bypass, .in_valid, .x_in, .b0, .b1, .b2, .a1, .a2, .out_valid, .y_out);
  always #5 clk = ~clk;

  longint xm1 = 0, xm2 = 0, ym1 = 0, ym2 = 0;
  function automatic longint ref_step(input longint x);
    longint acc, y;
    acc = x * b0 + xm1 * b1 + xm2 * b2 - ym1 * a1 - ym2 * a2;
    y = (acc + 32768) >>> 16;
    if (y > 32767) y = 32767;
    if (y < -32768) y = -32768;
    xm2 = xm1; xm1 = x; ym2 = ym1; ym1 = y;
    return y;
  endfunction

  task automatic push(input int x, output int y);
    x_in <= 16'(x); in_valid <= 1;
    @(posedge clk); in_valid <= 0;
    #1; y = int'(y_out);
    checks++;
    if (!out_valid) begin failures++; $display("no out_valid"); end
  endtask

  initial begin
    int y, ye, peak;
    repeat (3) @(posedge clk);
    rst <= 0;
    // (1) random coefficients of a stable section, random data
    b0 <= 18'sd30000; b1 <= -18'sd20000; b2 <= 18'sd10000; a1 <= -18'sd60000; a2 <= 18'sd30000;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      int x;
      x = int'($urandom_range(0, 20000)) - 10000;
      push(x, y);
      ye = int'(ref_step(longint'(x)));
      checks++;
      if (y != ye) begin failures++; $display("n=%0d y=%0d exp %0d", n, y, ye); end
    end
    // (2) notch at fs/4
    rst <= 1; @(posedge clk); rst <= 0;
    b0 <= 18'sd59310; b1 <= 0; b2 <= 18'sd59310; a1 <= 0; a2 <= 18'sd53084;
    @(posedge clk);
    peak = 0;
    for (int n = 0; n < 400; n++) begin
      push(int'(10000.0 * $sin(PI / 2.0 * real'(n) + 0.3)), y);
      if (n > 200 && (y > peak || -y > peak)) peak = (y > 0) ? y : -y;
    end
    checks++;
    if (peak > 200) begin failures++; $display("notch residual %0d", peak); end
    for (int n = 0; n < 200; n++) push(8000, y);
    checks++;
    if (y < 7920 || y > 8080) begin failures++; $display("dc gain: %0d", y); end
    // (3) bypass
    bypass <= 1;
    for (int n = 0; n < 50; n++) begin
      int x;
      x = int'($urandom_range(0, 60000)) - 30000;
      push(x, y);
      checks++;
      if (y != x) begin failures++; $display("bypass %0d != %0d", y, x); end
    end
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
