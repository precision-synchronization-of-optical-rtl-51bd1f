// tb_iq_detector: feeds A*cos(2*pi*2*n/3 + phi) for several amplitudes and
// phases and checks I = A*cos(phi), Q = A*sin(phi) within 3 LSB once the
// window is full; checks the two-clock latency of out_valid; then feeds an
// IF offset by a small beat frequency and checks that I/Q rotate at that
// beat (the unlocked case).
module tb_iq_detector;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [15:0] adc = 0, i_out, q_out;
  logic out_valid;
  int checks = 0, failures = 0;
  iq_detector dut (.clk, .rst, .in_valid, .adc, .out_valid, .i_out, .q_out);
  always #5 clk = ~clk;

  function automatic int near(input real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  longint n = 0;
  initial begin
    real amps [3] = '{3700.0, 20000.0, 100.0};
    real phs  [5] = '{0.0, 0.5, 2.0, -1.2, 3.1};
    int lat;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    // latency
    in_valid <= 1; adc <= 0;
    lat = 0;
    @(posedge clk); n++;
    while (!out_valid) begin @(posedge clk); lat++; n++; end
    checks++;
    if (lat != 2) begin failures++; $display("latency %0d", lat); end
    foreach (amps[a]) foreach (phs[p]) begin
      for (int k = 0; k < 12; k++) begin
        adc <= 16'(near(amps[a] * $cos(2.0 * PI * 2.0 * real'(n) / 3.0 + phs[p])));
        @(posedge clk); n++;
        #1;
        if (k >= 5) begin
          checks++;
          if ((int'(i_out) - near(amps[a] * $cos(phs[p]))) > 3 || (int'(i_out) - near(amps[a] * $cos(phs[p]))) < -3 ||
              (int'(q_out) - near(amps[a] * $sin(phs[p]))) > 3 || (int'(q_out) - near(amps[a] * $sin(phs[p]))) < -3) begin
            failures++;
            $display("A=%f phi=%f: I=%0d Q=%0d", amps[a], phs[p], i_out, q_out);
          end
        end
      end
    end
    // beat note: phase advances 2*pi/1000 per sample
    for (int k = 0; k < 3000; k++) begin
      real ph;
      ph = 2.0 * PI * real'(k) / 1000.0;
      adc <= 16'(near(3000.0 * $cos(2.0 * PI * 2.0 * real'(n) / 3.0 + ph)));
      @(posedge clk); n++;
      #1;
      if (k >= 10 && k % 100 == 0) begin
        real ex_ph;
        ex_ph = 2.0 * PI * real'(k - 3) / 1000.0;   // centre of the window lags ~2 samples
        checks++;
        if ((int'(i_out) - near(3000.0 * $cos(ex_ph))) > 40 || (int'(i_out) - near(3000.0 * $cos(ex_ph))) < -40 ||
            (int'(q_out) - near(3000.0 * $sin(ex_ph))) > 40 || (int'(q_out) - near(3000.0 * $sin(ex_ph))) < -40) begin
          failures++;
          $display("beat k=%0d: I=%0d Q=%0d exp %f %f", k, i_out, q_out, 3000.0*$cos(ex_ph), 3000.0*$sin(ex_ph));
        end
      end
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
