// link_rx: checking receiver for the low-latency link frames.
//
// Accepts the 32-bit words from the transceiver (format in link_tx). A word
// whose sync nibble or CRC-8 is wrong is dropped and counted in crc_errs; the
// last good value stays on value so the piezo holds its position. A good word
// whose sequence number is not the one expected counts a seq_errs event and
// resynchronises. The 16-bit counters saturate. The frame checks are this
// design's own choice.
//
// Timing: value and value_valid one clock after rx_valid.
module link_rx
  import llrf_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        rx_valid,
  input  logic [31:0] rx_word,
  output logic        value_valid,
  output sample_t     value,
  output logic        linked,       // at least one good frame since reset
  output logic [15:0] crc_errs,
  output logic [15:0] seq_errs
);
  logic [3:0] exp_seq;
  logic       good;

  assign good = (rx_word[31:28] == 4'hA) && (crc8_20(rx_word[27:8]) == rx_word[7:0]);

  always_ff @(posedge clk) begin
    if (rst) begin
      exp_seq     <= '0;
      value_valid <= 1'b0;
      value       <= '0;
      linked      <= 1'b0;
      crc_errs    <= '0;
      seq_errs    <= '0;
    end else begin
      value_valid <= 1'b0;
      if (rx_valid) begin
        if (good) begin
          value_valid <= 1'b1;
          value       <= sample_t'(rx_word[23:8]);
          linked      <= 1'b1;
          exp_seq     <= rx_word[27:24] + 1'b1;
          if (linked && rx_word[27:24] != exp_seq && seq_errs != 16'hFFFF)
            seq_errs <= seq_errs + 1'b1;
        end else if (crc_errs != 16'hFFFF) begin
          crc_errs <= crc_errs + 1'b1;
        end
      end
    end
  end
endmodule
