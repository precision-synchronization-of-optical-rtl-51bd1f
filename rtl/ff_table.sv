// ff_table: feed-forward table added to the feedback output.
//
// A RAM of DEPTH signed words is loaded from the register bus (wr_en,
// wr_addr, wr_data). When enabled it is played out one entry per step
// strobe: the read address advances by one and wraps after entry `len`, so a
// repetitive disturbance of known shape can be cancelled ahead of the
// feedback. When disabled the output is 0 and the read address returns to 0.
// The table itself follows the source; its addressing and play-out are this
// design's own.
//
// Timing: ff_out changes one clock after a step strobe (registered RAM read).
module ff_table #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned DW    = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 enable,
  input  logic                 step,
  input  logic [AW-1:0]        len,      // last address played
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic signed [DW-1:0] wr_data,
  output logic [AW-1:0]        rd_addr,
  output logic signed [DW-1:0] ff_out
);
  logic signed [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      rd_addr <= '0;
      ff_out  <= '0;
    end else if (step) begin
      ff_out  <= mem[rd_addr];
      rd_addr <= (rd_addr >= len) ? '0 : rd_addr + 1'b1;
    end
  end
endmodule
