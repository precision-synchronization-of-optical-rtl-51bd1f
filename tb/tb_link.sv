// tb_link: link_tx feeding link_rx through a model of the transceiver path
// (a delay line). Checks that every value arrives, that the frame fields are
// as specified (sync nibble, counting sequence, CRC-8 over sequence and
// value), that a corrupted word is dropped with crc_errs counted and the
// previous value held, and that a lost word (dropped or corrupted) is seen
// as a sequence error at the next good word.
module tb_link;
  import llrf_pkg::*;
  logic clk = 0, rst = 1, in_valid = 0, tx_valid;
  sample_t value = 0, rx_value;
  logic [31:0] tx_word;
  logic rx_valid = 0;
  logic [31:0] rx_word = 0;
  logic value_valid, linked;
  logic [15:0] crc_errs, seq_errs;
  int checks = 0, failures = 0;
  link_tx u_tx (.clk, .rst, .in_valid, .value, .tx_valid, .tx_word);
  link_rx u_rx (.clk, .rst, .rx_valid, .rx_word, .value_valid, .value(rx_value), .linked, .crc_errs, .seq_errs);
  always #5 clk = ~clk;

  // channel model: 3-cycle delay, optional corruption / drop of chosen words
  logic [32:0] pipe [3];
  int word_no = 0, corrupt_at = -1, drop_at = -1;
  always @(posedge clk) begin
    logic [32:0] w;
    w = {tx_valid, tx_word};
    if (tx_valid) begin
      if (word_no == corrupt_at) w[12] = ~w[12];
      if (word_no == drop_at) w[32] = 1'b0;
      word_no <= word_no + 1;
    end
    pipe[0] <= w; pipe[1] <= pipe[0]; pipe[2] <= pipe[1];
    rx_valid <= pipe[2][32]; rx_word <= pipe[2][31:0];
  end

  sample_t sent [$];
  int exp_seq = 0;
  always @(posedge clk) if (tx_valid) begin
    checks++;
    if (tx_word[31:28] != 4'hA || tx_word[27:24] != 4'(exp_seq) || tx_word[7:0] != crc8_20(tx_word[27:8])) begin
      failures++; $display("frame %h", tx_word);
    end
    exp_seq++;
  end

  initial begin
    sample_t last;
    foreach (pipe[k]) pipe[k] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    corrupt_at = 10; drop_at = 20;
    for (int n = 0; n < 40; n++) begin
      value <= 16'($urandom); in_valid <= 1;
      @(posedge clk); in_valid <= 0;
      sent.push_back(value);
      repeat (6) @(posedge clk);   // word has passed the channel and the receiver
      #1;
      if (n == corrupt_at || n == drop_at) begin
        checks++;
        if (rx_value != last) begin failures++; $display("n=%0d value not held", n); end
      end else begin
        checks++;
        if (rx_value != value) begin failures++; $display("n=%0d got %h exp %h", n, rx_value, value); end
        last = value;
      end
      checks++;
      if (crc_errs != 16'(n >= corrupt_at) || seq_errs != 16'((n > corrupt_at) + (n > drop_at))) begin
        failures++; $display("n=%0d crc_errs %0d seq_errs %0d", n, crc_errs, seq_errs);
      end
    end
    checks++;
    if (!linked) failures++;
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
