// cordic_vec: pipelined vectoring CORDIC, I/Q to amplitude and phase.
//
// The vector is first folded into the right half plane (a rotation by 180
// degrees when I < 0), then STAGES micro-rotations by +-atan(2^-k) drive Q to
// zero while the applied angles are accumulated. The remaining I is the
// magnitude times the CORDIC gain (about 1.6468), which a final multiply by
// 0.60725 removes. Four fraction guard bits keep the rounding error of the
// micro-rotations below one output LSB. Phase is a 16-bit fraction of a turn
// (0x4000 = 90 deg).
// The source names the CORDIC as the amplitude/phase transformation; the
// pipelined structure and all widths are this design's own.
//
// Timing: one vector per clock; out_valid follows in_valid by STAGES+2 clocks.
module cordic_vec #(
  parameter int unsigned DW     = 16,  // I/Q, amplitude and phase width
  parameter int unsigned STAGES = 16   // micro-rotations
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] i_in,
  input  logic signed [DW-1:0] q_in,
  output logic                 out_valid,
  output logic        [DW-1:0] amp,
  output logic signed [DW-1:0] phase
);
  localparam int unsigned FB = 4;               // fraction guard bits
  localparam int unsigned XW = DW + 3 + FB;     // guard bits for growth and rounding
  localparam int unsigned ZW = 24;              // internal angle width
  localparam real PI = 3.14159265358979323846;
  typedef logic signed [ZW-1:0] ang_t;
  typedef ang_t atan_tab_t [STAGES];

  function automatic atan_tab_t make_atan();
    atan_tab_t t;
    for (int k = 0; k < STAGES; k++)
      t[k] = ang_t'($rtoi($atan(1.0 / real'(64'(1) << k)) / (2.0 * PI) * real'(64'(1) << ZW) + 0.5));
    return t;
  endfunction
  localparam atan_tab_t ATAN = make_atan();
  // 1/gain in Q0.16
  localparam logic [16:0] INV_GAIN = 17'd39797;

  logic signed [XW-1:0] x [STAGES+1];
  logic signed [XW-1:0] y [STAGES+1];
  ang_t                 z [STAGES+1];
  logic [STAGES:0]      v;

  // Stage 0: fold into the right half plane.
  always_ff @(posedge clk) begin
    if (rst) begin
      v[0] <= 1'b0;
      x[0] <= '0;
      y[0] <= '0;
      z[0] <= '0;
    end else begin
      v[0] <= in_valid;
      if (i_in < 0) begin
        x[0] <= -(XW'(i_in) <<< FB);
        y[0] <= -(XW'(q_in) <<< FB);
        z[0] <= ang_t'(1) <<< (ZW - 1);          // 180 degrees
      end else begin
        x[0] <= XW'(i_in) <<< FB;
        y[0] <= XW'(q_in) <<< FB;
        z[0] <= '0;
      end
    end
  end

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    always_ff @(posedge clk) begin
      if (rst) begin
        v[k+1] <= 1'b0;
        x[k+1] <= '0;
        y[k+1] <= '0;
        z[k+1] <= '0;
      end else begin
        v[k+1] <= v[k];
        if (y[k] < 0) begin
          x[k+1] <= x[k] - (y[k] >>> k);
          y[k+1] <= y[k] + (x[k] >>> k);
          z[k+1] <= z[k] - ATAN[k];
        end else begin
          x[k+1] <= x[k] + (y[k] >>> k);
          y[k+1] <= y[k] - (x[k] >>> k);
          z[k+1] <= z[k] + ATAN[k];
        end
      end
    end
  end

  logic [XW+16:0] mag_scaled;
  logic [XW+16-16-FB:0] mag;
  assign mag_scaled = (XW+17)'(unsigned'(x[STAGES])) * (XW+17)'(INV_GAIN) + ((XW+17)'(1) << (15 + FB));
  assign mag        = mag_scaled[XW+16:16+FB];

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      amp       <= '0;
      phase     <= '0;
    end else begin
      out_valid <= v[STAGES];
      amp       <= (mag > ($bits(mag))'({DW{1'b1}})) ? {DW{1'b1}} : DW'(mag);
      // round the internal angle to DW bits
      phase     <= DW'((z[STAGES] + (ang_t'(1) <<< (ZW - DW - 1))) >>> (ZW - DW));
    end
  end
endmodule
