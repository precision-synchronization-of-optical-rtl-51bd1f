// daq_buffer: one-shot capture of I, Q, amplitude and phase for read-out.
//
// A pulse on arm starts a capture: the next DEPTH valid samples of the four
// monitored signals are written to a RAM, after which done is set and busy
// cleared. The host then reads any entry by address; a new arm restarts the
// capture. This gives the long records of detected I/Q (unlocked beat note,
// locked constant) used to commission the loop. That intermediate signals can
// be recorded follows the source; the one-shot scheme, depth and read port
// are this design's own.
//
// Timing: rd_data is valid one clock after rd_addr is applied.
module daq_buffer
  import llrf_pkg::*;
#(
  parameter int unsigned DEPTH = 16384,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          arm,
  input  logic          in_valid,
  input  sample_t       i_val,
  input  sample_t       q_val,
  input  sample_t       amp,
  input  sample_t       phase,
  output logic          busy,
  output logic          done,
  input  logic [AW-1:0] rd_addr,
  output logic [63:0]   rd_data     // {phase, amp, q, i}
);
  logic [63:0]   mem [DEPTH];
  logic [AW-1:0] wr_addr;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      wr_addr <= '0;
    end else if (arm) begin
      busy    <= 1'b1;
      done    <= 1'b0;
      wr_addr <= '0;
    end else if (busy && in_valid) begin
      wr_addr <= wr_addr + 1'b1;
      if (wr_addr == AW'(DEPTH - 1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (busy && in_valid && !arm) mem[wr_addr] <= {phase, amp, q_val, i_val};
  end

  always_ff @(posedge clk) begin
    rd_data <= mem[rd_addr];
  end
endmodule
