// tb_cordic_vec: random and corner-case vectors; amplitude is compared with
// sqrt(I^2+Q^2) (4 LSB tolerance) and phase with atan2(Q, I) scaled to
// 65536 per turn (4 LSB tolerance, modulo one turn). Checks the STAGES+2
// clock latency with one vector per clock streaming through.
module tb_cordic_vec;
  localparam real PI = 3.14159265358979323846;
  localparam int LAT = 18;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [15:0] i_in = 0, q_in = 0;
  logic out_valid;
  logic [15:0] amp;
  logic signed [15:0] phase;
  int checks = 0, failures = 0;
  cordic_vec dut (.clk, .rst, .in_valid, .i_in, .q_in, .out_valid, .amp, .phase);
  always #5 clk = ~clk;

  int qi [$], qq [$];
  int cyc = 0, t_in [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst && out_valid) begin
      int i, q, t, ea, ep, dp;
      real m;
      i = qi.pop_front(); q = qq.pop_front(); t = t_in.pop_front();
      m  = $sqrt(real'(i) * real'(i) + real'(q) * real'(q));
      ea = int'(m);
      ep = int'($atan2(real'(q), real'(i)) / (2.0 * PI) * 65536.0);
      dp = (int'(phase) - ep) & 16'hFFFF;
      if (dp > 32767) dp -= 65536;
      checks += 2;
      if (cyc - t != LAT) begin failures++; $display("latency %0d", cyc - t); end
      if (int'(amp) - ea > 4 || int'(amp) - ea < -4 || ((i != 0 || q != 0) && m > 64.0 && (dp > 4 || dp < -4))) begin
        failures++;
        $display("I=%0d Q=%0d amp=%0d exp %0d phase=%0d exp %0d", i, q, amp, ea, phase, ep);
      end
    end
  end

  task automatic drive(input int i, input int q);
    in_valid <= 1; i_in <= 16'(i); q_in <= 16'(q);
    qi.push_back(i); qq.push_back(q); t_in.push_back(cyc + 1);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    drive(3000, 0); drive(0, 3000); drive(-3000, 0); drive(0, -3000);
    drive(-3000, -1); drive(-3000, 1); drive(32767, 32767); drive(-32768, -32768);
    drive(-32768, 32767); drive(1000, -1000);
    for (int n = 0; n < 3000; n++) drive(int'($urandom_range(0, 65535)) - 32768, int'($urandom_range(0, 65535)) - 32768);
    in_valid <= 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (qi.size() != 0) begin failures++; $display("missing outputs %0d", qi.size()); end
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
