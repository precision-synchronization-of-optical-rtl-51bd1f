// tb_daq_buffer: with DEPTH = 64, arms a capture, feeds samples with gaps in
// in_valid, checks busy/done timing (done after exactly DEPTH valid samples),
// that samples after the capture are not stored, and reads every entry back.
module tb_daq_buffer;
  import llrf_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst = 1, arm = 0, in_valid = 0, busy, done;
  sample_t i_val = 0, q_val = 0, amp = 0, phase = 0;
  logic [5:0] rd_addr = 0;
  logic [63:0] rd_data;
  int checks = 0, failures = 0;
  daq_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst, .arm, .in_valid, .i_val, .q_val, .amp, .phase, .busy, .done, .rd_addr, .rd_data);
  always #5 clk = ~clk;
  logic [63:0] exp_d [DEPTH];

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int pass = 0; pass < 2; pass++) begin
      arm <= 1; @(posedge clk); arm <= 0; #1;
      checks++;
      if (!busy || done) begin failures++; $display("arm"); end
      n = 0;
      while (n < DEPTH + 10) begin
        in_valid <= ($urandom_range(0, 3) != 0);
        i_val <= 16'($urandom); q_val <= 16'($urandom); amp <= 16'($urandom); phase <= 16'($urandom);
        @(posedge clk); #1;
        if (in_valid) begin
          if (n < DEPTH) exp_d[n] = {phase, amp, q_val, i_val};
          n++;
          checks++;
          if ((n >= DEPTH) != done || (n < DEPTH) != busy) begin failures++; $display("n=%0d busy %0d done %0d", n, busy, done); end
        end
      end
      in_valid <= 0;
      for (int a = 0; a < DEPTH; a++) begin
        rd_addr <= 6'(a); @(posedge clk); #1;
        checks++;
        if (rd_data != exp_d[a]) begin failures++; $display("addr %0d: %h exp %h", a, rd_data, exp_d[a]); end
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
