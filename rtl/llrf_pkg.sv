// llrf_pkg: types, constants and helpers shared by the laser-lock firmware.
//
// The signal path carries 16-bit signed words, the width of the digitizer's
// ADCs. Phase is a 16-bit fraction of a turn (0x10000 = 360 degrees), so a
// phase difference wraps naturally in two's complement. The register map of
// the digitizer FPGA is defined here so that the register bank, the testbenches
// and any host software agree on it; the map is this design's own.
package llrf_pkg;

  localparam int unsigned SW = 16;          // signal word width
  typedef logic signed [SW-1:0] sample_t;

  // Register bus: 32-bit words, word addresses.
  localparam int unsigned RA = 8;           // register address width
  typedef logic [RA-1:0] reg_addr_t;
  typedef logic [31:0]   reg_data_t;

  // Register map (word addresses)
  localparam reg_addr_t R_ID        = 8'h00;  // RO: design identifier
  localparam reg_addr_t R_CTRL      = 8'h01;  // [0] loop enable [1] notch bypass [2] ff enable [3] daq arm (self-clearing) [4] loop input: 0 fine, 1 coarse
  localparam reg_addr_t R_SETPOINT  = 8'h02;  // [15:0] phase setpoint
  localparam reg_addr_t R_KP        = 8'h03;  // [15:0] proportional gain
  localparam reg_addr_t R_KI        = 8'h04;  // [15:0] integral gain
  localparam reg_addr_t R_SHIFT     = 8'h05;  // [4:0] controller output shift
  localparam reg_addr_t R_LIMITS    = 8'h06;  // [15:0] lower limit, [31:16] upper limit
  localparam reg_addr_t R_NOTCH_B0  = 8'h07;  // [17:0] notch coefficients, Q2.16
  localparam reg_addr_t R_NOTCH_B1  = 8'h08;
  localparam reg_addr_t R_NOTCH_B2  = 8'h09;
  localparam reg_addr_t R_NOTCH_A1  = 8'h0A;
  localparam reg_addr_t R_NOTCH_A2  = 8'h0B;
  localparam reg_addr_t R_DECIM     = 8'h0C;  // [15:0] notch / ff strobe divider minus one
  localparam reg_addr_t R_FF_LEN    = 8'h0D;  // [15:0] feed-forward table length minus one
  localparam reg_addr_t R_FF_WADDR  = 8'h0E;  // [15:0] feed-forward write address
  localparam reg_addr_t R_FF_WDATA  = 8'h0F;  // [15:0] WO: writes table[R_FF_WADDR], then address+1
  localparam reg_addr_t R_MON_SEL   = 8'h10;  // [2:0] DAC0 source [6:4] DAC1 source
  localparam reg_addr_t R_DAQ_ADDR  = 8'h11;  // [15:0] DAQ read address
  localparam reg_addr_t R_DAQ_IQ    = 8'h12;  // RO: [15:0] I [31:16] Q at R_DAQ_ADDR
  localparam reg_addr_t R_DAQ_AP    = 8'h13;  // RO: [15:0] amplitude [31:16] phase at R_DAQ_ADDR
  localparam reg_addr_t R_STAT_IQ   = 8'h14;  // RO: live I, Q of the fine channel
  localparam reg_addr_t R_STAT_AP   = 8'h15;  // RO: live amplitude, phase of the fine channel
  localparam reg_addr_t R_STAT_CO   = 8'h16;  // RO: live amplitude, phase of the coarse channel
  localparam reg_addr_t R_STAT_OUT  = 8'h17;  // RO: [15:0] phase error [31:16] actuator value
  localparam reg_addr_t R_STATUS    = 8'h18;  // RO: [0] controller saturated [1] daq busy [2] daq done

  localparam reg_data_t DESIGN_ID   = 32'h4C53_0001;

  // Register map of the FMC carrier (piezo side), same bus protocol
  localparam reg_addr_t F_ID        = 8'h00;  // RO: identifier
  localparam reg_addr_t F_CH_ENABLE = 8'h01;  // [3:0] DAC channels written (reset 4'b0001)
  localparam reg_addr_t F_SPAN      = 8'h02;  // [2c+1:2c] span of channel c (reset 3 = +-10 V)
  localparam reg_addr_t F_AUX1      = 8'h03;  // [15:0] static value of channel 1
  localparam reg_addr_t F_AUX2      = 8'h04;  // [15:0] static value of channel 2
  localparam reg_addr_t F_AUX3      = 8'h05;  // [15:0] static value of channel 3
  localparam reg_addr_t F_LINK      = 8'h06;  // RO: [0] linked
  localparam reg_addr_t F_LINK_ERRS = 8'h07;  // RO: [15:0] CRC errors [31:16] sequence errors
  localparam reg_addr_t F_PZT_VALUE = 8'h08;  // RO: [15:0] value driving channel 0

  localparam reg_data_t FMC_ID      = 32'h4C53_0002;

  // Monitoring DAC sources
  typedef enum logic [2:0] {
    MON_ACT   = 3'd0,  // actuator value (controller + ff)
    MON_I     = 3'd1,
    MON_Q     = 3'd2,
    MON_AMP   = 3'd3,
    MON_PHASE = 3'd4,
    MON_ERR   = 3'd5,
    MON_CTRL  = 3'd6   // controller output before notch and ff
  } mon_sel_e;

  // Saturate a wide signed value to SW bits.
  function automatic sample_t sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)       return sample_t'(16'sh7FFF);
    else if (v < -64'sd32768) return sample_t'(16'sh8000);
    else                      return sample_t'(v[SW-1:0]);
  endfunction

  // CRC-8, polynomial x^8+x^2+x+1 (0x07), initial value 0, over 20 bits MSB first.
  function automatic logic [7:0] crc8_20(input logic [19:0] d);
    logic [7:0] c;
    c = 8'h00;
    for (int k = 19; k >= 0; k--) begin
      logic fb;
      fb = c[7] ^ d[k];
      c  = {c[6:0], 1'b0};
      if (fb) c = c ^ 8'h07;
    end
    return c;
  endfunction

endpackage
