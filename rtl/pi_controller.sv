// pi_controller: phase-error computation and proportional-integral feedback.
//
// The loop acts on the phase only. Each valid sample forms the error
// e = setpoint - phase, which wraps modulo one turn because phase is a 16-bit
// fraction of a turn. The output is (kp*e + acc) >>> shift, where acc sums
// ki*e, clamped to [lim_lo, lim_hi]. While the output sits at a limit the
// integrator only accepts errors that drive it back (anti-windup). With
// enable low the output is 0 and the integrator is cleared. That a feedback
// controller acts on the phase follows the source; the PI form, limits and
// anti-windup are this design's own.
//
// Timing: err is registered one clock after in_valid, out and out_valid two
// clocks after in_valid.
module pi_controller #(
  parameter int unsigned DW = 16,  // phase, error and output width
  parameter int unsigned GW = 16,  // gain width (signed)
  parameter int unsigned AW = 40   // integrator width
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 enable,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] phase,
  input  logic signed [DW-1:0] setpoint,
  input  logic signed [GW-1:0] kp,
  input  logic signed [GW-1:0] ki,
  input  logic        [4:0]    shift,
  input  logic signed [DW-1:0] lim_lo,
  input  logic signed [DW-1:0] lim_hi,
  output logic                 err_valid,
  output logic signed [DW-1:0] err,
  output logic                 out_valid,
  output logic signed [DW-1:0] out,
  output logic                 sat
);
  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] p_term, i_inc, acc_next, sum, scaled;
  logic                 hi_hit, lo_hit;

  // stage 1: wrapped phase error
  always_ff @(posedge clk) begin
    if (rst) begin
      err_valid <= 1'b0;
      err       <= '0;
    end else begin
      err_valid <= in_valid;
      if (in_valid) err <= setpoint - phase;
    end
  end

  always_comb begin
    p_term   = AW'(err) * AW'(kp);
    i_inc    = AW'(err) * AW'(ki);
    acc_next = acc + i_inc;
    sum      = p_term + acc_next;
    scaled   = sum >>> shift;
    hi_hit   = scaled >= AW'(lim_hi);
    lo_hit   = scaled <= AW'(lim_lo);
  end

  // stage 2: integrator and limited output
  always_ff @(posedge clk) begin
    if (rst || !enable) begin
      out_valid <= 1'b0;
      out       <= '0;
      acc       <= '0;
      sat       <= 1'b0;
    end else begin
      out_valid <= err_valid;
      if (err_valid) begin
        if (hi_hit) begin
          out <= lim_hi;
          sat <= 1'b1;
          if (i_inc < 0) acc <= acc_next;
        end else if (lo_hit) begin
          out <= lim_lo;
          sat <= 1'b1;
          if (i_inc > 0) acc <= acc_next;
        end else begin
          out <= DW'(scaled);
          sat <= 1'b0;
          acc <= acc_next;
        end
      end
    end
  end
endmodule
