// monitor_mux: source selection and coding for the two monitoring DACs.
//
// The digitizer's DAC outputs show loop signals on an oscilloscope. Each of
// the two channels picks one internal signal (llrf_pkg::mon_sel_e) and
// converts it from two's complement to offset binary, the usual coding of
// current-output DACs. Phase and amplitude are unsigned-like quantities but
// are passed the same way. That the controller output is routed to the DACs
// follows the source; the selectable sources and the coding are this
// design's own. Output registered: one clock latency.
module monitor_mux
  import llrf_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  mon_sel_e sel0,
  input  mon_sel_e sel1,
  input  sample_t  act,
  input  sample_t  i_val,
  input  sample_t  q_val,
  input  sample_t  amp,
  input  sample_t  phase,
  input  sample_t  err,
  input  sample_t  ctrl,
  output logic [SW-1:0] dac0,
  output logic [SW-1:0] dac1
);
  function automatic sample_t pick(input mon_sel_e s, input sample_t a, input sample_t i,
                                   input sample_t q, input sample_t m, input sample_t p,
                                   input sample_t e, input sample_t c);
    unique case (s)
      MON_ACT:   return a;
      MON_I:     return i;
      MON_Q:     return q;
      MON_AMP:   return m;
      MON_PHASE: return p;
      MON_ERR:   return e;
      MON_CTRL:  return c;
      default:   return '0;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      dac0 <= 16'h8000;
      dac1 <= 16'h8000;
    end else begin
      dac0 <= pick(sel0, act, i_val, q_val, amp, phase, err, ctrl) ^ 16'h8000;
      dac1 <= pick(sel1, act, i_val, q_val, amp, phase, err, ctrl) ^ 16'h8000;
    end
  end
endmodule
