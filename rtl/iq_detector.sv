// iq_detector: non-I/Q demodulation of a sampled intermediate frequency.
//
// The laser's 25th harmonic (about 1354 MHz) is mixed with the 1.3 GHz
// reference to an IF of about 54 MHz and sampled at 1.3 GHz / 16 = 81.25 MHz.
// With the repetition rate at 1300/24 MHz the IF completes exactly N = 2
// periods in M = 3 samples (this ratio is derived here from the printed
// frequencies; the source only gives the rounded values). Each sample is
// multiplied by 2/M*cos(2*pi*N*n/M) and -2/M*sin(2*pi*N*n/M), n being the
// absolute sample index modulo M, and the last M products are summed. For an
// input A*cos(2*pi*N*n/M + phi) this gives I = A*cos(phi), Q = A*sin(phi),
// constant for a locked laser, and a rotating vector (the beat note) when the
// laser is off frequency. That the design demodulates I and Q follows the
// source; the non-I/Q scheme, coefficient format (Q1.17) and saturation are
// this design's own.
//
// Interface: one sample per in_valid; out_valid, i_out, q_out follow two
// clocks later (one product register, one sum register). Reset clears the
// product window and the sample index.
module iq_detector #(
  parameter int unsigned M  = 3,   // samples per window
  parameter int unsigned N  = 2,   // IF periods per window
  parameter int unsigned DW = 16,  // sample width
  parameter int unsigned CW = 18   // coefficient width, CW-1 fraction bits
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] adc,
  output logic                 out_valid,
  output logic signed [DW-1:0] i_out,
  output logic signed [DW-1:0] q_out
);
  localparam int unsigned PW = DW + CW;            // product width
  localparam int unsigned SUMW = PW + $clog2(M) + 1;
  localparam real PI = 3.14159265358979323846;
  typedef logic signed [CW-1:0] coef_t;
  typedef coef_t coef_tab_t [M];

  function automatic coef_tab_t make_tab(input bit is_sin);
    coef_tab_t t;
    for (int n = 0; n < M; n++) begin
      real ang, v;
      ang = 2.0 * PI * real'(N) * real'(n) / real'(M);
      v   = is_sin ? -2.0 / real'(M) * $sin(ang) : 2.0 / real'(M) * $cos(ang);
      t[n] = coef_t'($rtoi(v * real'(1 << (CW - 1)) + (v >= 0.0 ? 0.5 : -0.5)));
    end
    return t;
  endfunction

  localparam coef_tab_t COS_TAB = make_tab(1'b0);
  localparam coef_tab_t SIN_TAB = make_tab(1'b1);

  logic [$clog2(M+1)-1:0] idx;
  logic signed [PW-1:0]   pi_win [M];
  logic signed [PW-1:0]   pq_win [M];
  logic                   win_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      idx       <= '0;
      win_valid <= 1'b0;
      for (int k = 0; k < M; k++) begin
        pi_win[k] <= '0;
        pq_win[k] <= '0;
      end
    end else begin
      win_valid <= in_valid;
      if (in_valid) begin
        pi_win[idx] <= PW'(adc) * PW'(COS_TAB[idx]);
        pq_win[idx] <= PW'(adc) * PW'(SIN_TAB[idx]);
        idx <= (idx == ($clog2(M+1))'(M - 1)) ? '0 : idx + 1'b1;
      end
    end
  end

  logic signed [SUMW-1:0] sum_i, sum_q;
  always_comb begin
    sum_i = '0;
    sum_q = '0;
    for (int k = 0; k < M; k++) begin
      sum_i = sum_i + SUMW'(pi_win[k]);
      sum_q = sum_q + SUMW'(pq_win[k]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      out_valid <= win_valid;
      if (win_valid) begin
        i_out <= DW'(llrf_pkg::sat16(64'(sum_i >>> (CW - 1))));
        q_out <= DW'(llrf_pkg::sat16(64'(sum_q >>> (CW - 1))));
      end
    end
  end
endmodule
