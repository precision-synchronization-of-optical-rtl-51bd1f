// link_tx: framing of actuator values for the low-latency backplane link.
//
// The digitizer ships each new actuator value to the piezo-driver carrier
// over a multi-gigabit transceiver on the backplane. This block forms the
// 32-bit word handed to the transceiver's parallel interface:
//   [31:28] sync nibble 4'hA, [27:24] sequence number, [23:8] value,
//   [7:0] CRC-8 (polynomial 0x07) over sequence number and value.
// The sequence number counts frames modulo 16 so the receiver can see lost
// words. That the controller output travels over the backplane link follows
// the source; the frame format is this design's own.
//
// Timing: tx_valid and tx_word one clock after in_valid.
module link_tx
  import llrf_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  sample_t     value,
  output logic        tx_valid,
  output logic [31:0] tx_word
);
  logic [3:0] seq;

  always_ff @(posedge clk) begin
    if (rst) begin
      seq      <= '0;
      tx_valid <= 1'b0;
      tx_word  <= '0;
    end else begin
      tx_valid <= in_valid;
      if (in_valid) begin
        tx_word <= {4'hA, seq, value, crc8_20({seq, value})};
        seq     <= seq + 1'b1;
      end
    end
  end
endmodule
