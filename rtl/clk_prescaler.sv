// clk_prescaler: behavioural model of the RF prescaler that derives the ADC
// sampling clock from the 1.3 GHz reference.
//
// Dividing by DIV = 16 gives 81.25 MHz, so the sample clock is locked to the
// reference the laser is locked to. The output toggles every DIV/2 input
// rising edges. Like the real part it has no reset: the counter free-runs
// from whatever state it powers up in, which only sets the phase of the
// output, so the sampling clock runs while the rest of the system is held in
// reset. The divider and its ratio follow
// the source; the part itself is analog RF hardware, modelled here only so
// that the clock tree of the system can be simulated.
module clk_prescaler #(
  parameter int unsigned DIV = 16   // even division ratio
) (
  input  logic ref_clk,
  output logic clk_out
);
  logic [$clog2(DIV)-1:0] cnt;

  always_ff @(posedge ref_clk) begin
    if (cnt == ($clog2(DIV))'(DIV / 2 - 1)) begin
      cnt     <= '0;
      clk_out <= ~clk_out;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end
endmodule
