// tb_monitor_mux: for every pair of sources and random signal values, each
// DAC must show the selected signal in offset binary one clock later.
module tb_monitor_mux;
  import llrf_pkg::*;
  logic clk = 0, rst = 1;
  mon_sel_e sel0 = MON_ACT, sel1 = MON_ACT;
  sample_t sig [7];
  logic [15:0] dac0, dac1;
  int checks = 0, failures = 0;
  monitor_mux dut (.clk, .rst, .sel0, .sel1, .act(sig[0]), .i_val(sig[1]), .q_val(sig[2]), .amp(sig[3]),
                   .phase(sig[4]), .err(sig[5]), .ctrl(sig[6]), .dac0, .dac1);
  always #5 clk = ~clk;
  initial begin
    foreach (sig[k]) sig[k] = '0;
    repeat (2) @(posedge clk);
    #1; checks++;
    if (dac0 != 16'h8000 || dac1 != 16'h8000) begin failures++; $display("reset value"); end
    rst <= 0;
    for (int a = 0; a < 7; a++) for (int b = 0; b < 7; b++) begin
      foreach (sig[k]) sig[k] = 16'($urandom);
      sel0 = mon_sel_e'(a); sel1 = mon_sel_e'(b);
      @(posedge clk); #1;
      checks++;
      if (dac0 != (sig[a] ^ 16'h8000) || dac1 != (sig[b] ^ 16'h8000)) begin
        failures++; $display("sel %0d %0d: %h %h", a, b, dac0, dac1);
      end
    end
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
