// tb_clk_prescaler: runs a 1.3 GHz reference (769 ps period) and measures
// the output: 16 reference rising edges per output period, 50 % duty cycle.
`timescale 1ps/1ps
module tb_clk_prescaler;
  logic ref_clk = 0, rst = 1, clk_out;
  int checks = 0, failures = 0;
  clk_prescaler dut (.ref_clk, .clk_out);
  always #385 ref_clk = ~ref_clk;

  int edges_hi, edges_lo;
  initial begin
    repeat (4) @(posedge ref_clk);
    rst <= 0;
    @(posedge clk_out);
    for (int p = 0; p < 20; p++) begin
      edges_hi = 0; edges_lo = 0;
      while (clk_out) begin @(posedge ref_clk); #1; edges_hi++; end
      while (!clk_out) begin @(posedge ref_clk); #1; edges_lo++; end
      checks++;
      if (edges_hi != 8 || edges_lo != 8) begin
        failures++;
        $display("period %0d: high %0d low %0d", p, edges_hi, edges_lo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
