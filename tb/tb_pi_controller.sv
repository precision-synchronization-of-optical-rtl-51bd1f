// tb_pi_controller: random phases, setpoints and gains against a reference
// PI model written with 64-bit integers in the testbench (wrapped error,
// integrator, shift, clamp, anti-windup). Checks err after one clock and
// out after two clocks, that sat is raised at the limits, and that disabling
// clears the integrator.
module tb_pi_controller;
  logic clk = 0, rst = 1, enable = 0, in_valid = 0;
  logic signed [15:0] phase = 0, setpoint = 0, kp = 0, ki = 0, lim_lo = -16'sd32767, lim_hi = 16'sd32767;
  logic [4:0] shift = 0;
  logic err_valid, out_valid, sat;
  logic signed [15:0] err, out;
  int checks = 0, failures = 0, n_sat = 0;
  pi_controller dut (.clk, .rst, .enable, .in_valid, .phase, .setpoint, .kp, .ki, .shift,
                     .lim_lo, .lim_hi, .err_valid, .err, .out_valid, .out, .sat);
  always #5 clk = ~clk;

  longint acc = 0;
  int e_m, o_m; bit s_m;
  // reference: called with the values present at the input sample
  task automatic model(input int ph, input int sp);
    longint p, inc, nxt, sc;
    e_m = int'(16'(sp - ph)); if (e_m > 32767) e_m -= 65536;
    e_m = int'($signed(16'(sp - ph)));
    p   = longint'(e_m) * longint'(kp);
    inc = longint'(e_m) * longint'(ki);
    nxt = acc + inc;
    sc  = (p + nxt) >>> shift;
    if (sc >= lim_hi) begin o_m = lim_hi; s_m = 1; if (inc < 0) acc = nxt; end
    else if (sc <= lim_lo) begin o_m = lim_lo; s_m = 1; if (inc > 0) acc = nxt; end
    else begin o_m = int'(sc); s_m = 0; acc = nxt; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    enable <= 1;
    for (int blk = 0; blk < 20; blk++) begin
      kp <= 16'($urandom_range(0, 4000)); ki <= 16'($urandom_range(0, 300));
      shift <= 5'($urandom_range(4, 12));
      lim_lo <= -16'($urandom_range(1000, 32767)); lim_hi <= 16'($urandom_range(1000, 32767));
      setpoint <= 16'($urandom);
      @(posedge clk);
      for (int n = 0; n < 200; n++) begin
        int ph;
        ph = int'($urandom_range(0, 65535));
        if (blk % 4 == 0) ph = int'(setpoint) + int'($urandom_range(0, 200)) - 100;
        phase <= 16'(ph); in_valid <= 1;
        @(posedge clk); in_valid <= 0;
        model(ph, int'(setpoint));
        #1; checks++;
        if (!err_valid || err != 16'(e_m)) begin failures++; $display("err %0d exp %0d", err, e_m); end
        @(posedge clk); #1; checks++;
        if (!out_valid || int'(out) != o_m || sat != s_m) begin
          failures++; $display("out %0d exp %0d sat %0d exp %0d", out, o_m, sat, s_m);
        end
        if (sat) n_sat++;
      end
    end
    // disable clears
    enable <= 0; @(posedge clk); enable <= 1; acc = 0; @(posedge clk);
    phase <= 0; setpoint <= 100; kp <= 0; ki <= 16'd10; shift <= 0;
    lim_lo <= -16'sd30000; lim_hi <= 16'sd30000; in_valid <= 1; @(posedge clk); in_valid <= 0;
    @(posedge clk); #1; checks++;
    if (out != 16'sd1000) begin failures++; $display("after clear out %0d exp 1000", out); end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never hit"); end
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
