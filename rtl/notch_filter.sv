// notch_filter: programmable second-order IIR section for the actuator path.
//
// Mechanical eigen-modes of the piezo stretcher would be excited by controller
// output at their frequencies; a biquad with zeros on those frequencies
// removes them. Direct form I:
//   y[n] = b0*x[n] + b1*x[n-1] + b2*x[n-2] - a1*y[n-1] - a2*y[n-2]
// with coefficients in signed Q2.16 (CW = 18 bits, CF = 16 fraction bits),
// rounded and saturated to DW bits. For a notch at normalised frequency w0
// with pole radius r: b0 = b2 = g, b1 = -2*g*cos(w0), a1 = -2*r*cos(w0),
// a2 = r^2, g = (1 + a1 + a2) / (2 - 2*cos(w0)) for unity DC gain. With bypass
// set, the input passes through with the same one-clock latency and the
// state is cleared. That a notch filter suppresses the piezo eigen-modes
// follows the source; the biquad form and number format are this design's own.
//
// Timing: one sample per in_valid, result one clock later with out_valid.
module notch_filter #(
  parameter int unsigned DW = 16,
  parameter int unsigned CW = 18,
  parameter int unsigned CF = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 bypass,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x_in,
  input  logic signed [CW-1:0] b0,
  input  logic signed [CW-1:0] b1,
  input  logic signed [CW-1:0] b2,
  input  logic signed [CW-1:0] a1,
  input  logic signed [CW-1:0] a2,
  output logic                 out_valid,
  output logic signed [DW-1:0] y_out
);
  localparam int unsigned AW = DW + CW + 4;
  logic signed [DW-1:0] x1, x2, y1, y2;
  logic signed [AW-1:0] acc, acc_r;
  logic signed [DW-1:0] y_new;

  always_comb begin
    acc = AW'(x_in) * AW'(b0) + AW'(x1) * AW'(b1) + AW'(x2) * AW'(b2)
        - AW'(y1) * AW'(a1) - AW'(y2) * AW'(a2);
    acc_r = (acc + (AW'(1) <<< (CF - 1))) >>> CF;
    y_new = llrf_pkg::sat16(64'(acc_r));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0;
      out_valid <= 1'b0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        if (bypass) begin
          y_out <= x_in;
          x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0;
        end else begin
          y_out <= y_new;
          x1 <= x_in;  x2 <= x1;
          y1 <= y_new; y2 <= y1;
        end
      end
    end
  end
endmodule
