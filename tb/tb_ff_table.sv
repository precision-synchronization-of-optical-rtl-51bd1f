// tb_ff_table: loads random values, plays them out with irregular step
// strobes and checks the sequence, the wrap after entry len, the one-clock
// read latency and that disabling gives 0 and restarts at address 0.
module tb_ff_table;
  localparam int DEPTH = 64;
  logic clk = 0, rst = 1, enable = 0, step = 0, wr_en = 0;
  logic [5:0] len = 0, wr_addr = 0, rd_addr;
  logic signed [15:0] wr_data = 0, ff_out;
  int checks = 0, failures = 0;
  ff_table #(.DEPTH(DEPTH)) dut (.clk, .rst, .enable, .step, .len, .wr_en, .wr_addr, .wr_data, .rd_addr, .ff_out);
  always #5 clk = ~clk;
  logic signed [15:0] tab [DEPTH];

  initial begin
    int exp_a;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int a = 0; a < DEPTH; a++) begin
      tab[a] = 16'($urandom);
      wr_en <= 1; wr_addr <= 6'(a); wr_data <= tab[a];
      @(posedge clk);
    end
    wr_en <= 0;
    len <= 6'd20;
    enable <= 1;
    @(posedge clk);
    exp_a = 0;
    for (int n = 0; n < 200; n++) begin
      step <= 1; @(posedge clk); step <= 0; #1;
      checks++;
      if (ff_out != tab[exp_a]) begin failures++; $display("n=%0d out %0d exp %0d", n, ff_out, tab[exp_a]); end
      exp_a = (exp_a >= 20) ? 0 : exp_a + 1;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      checks++;
      if (ff_out != tab[(exp_a == 0) ? 20 : exp_a - 1]) begin failures++; $display("output moved without step"); end
    end
    enable <= 0; @(posedge clk); #1;
    checks++;
    if (ff_out != 0 || rd_addr != 0) begin failures++; $display("disable: out %0d addr %0d", ff_out, rd_addr); end
    enable <= 1; step <= 1; @(posedge clk); step <= 0; #1;
    checks++;
    if (ff_out != tab[0]) begin failures++; $display("restart"); end
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
