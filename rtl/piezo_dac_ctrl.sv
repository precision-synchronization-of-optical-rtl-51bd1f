// piezo_dac_ctrl: serial driver for the four span DACs of the piezo driver.
//
// The piezo-driver board has four power amplifiers (fixed gain 10 V/V), each
// fed by a DAC whose output span is programmable: 0..5 V, 0..10 V, +-5 V or
// +-10 V. Every UPDATE_DIV clocks (81.25 MHz / 163 = 498 kSPS, under the DAC's
// 500 kSPS) one 24-bit frame is shifted out:
//   {cmd[3:0], addr[3:0], data[15:0]}, MSB first,
//   cmd 4'h6 = write span of channel addr (data[1:0] = span code),
//   cmd 4'h3 = write and update code of channel addr.
// A span frame is sent for any enabled channel whose requested span differs
// from the one last written (all channels after reset); otherwise the code of
// the next enabled channel, round robin, is written. Codes are the signed
// channel values in offset binary, so 0 is mid-span. SDI changes on the
// falling SCLK edge and is stable at the rising edge; cs_n stays high at
// least SCLK_DIV clocks between frames. The four channels, the spans and the
// 500 kSPS rate follow the source; the frame format, span codes and update
// scheme are this design's own.
module piezo_dac_ctrl
  import llrf_pkg::*;
#(
  parameter int unsigned NCH        = 4,
  parameter int unsigned UPDATE_DIV = 163,  // clocks between frame starts
  parameter int unsigned SCLK_DIV   = 2     // clocks per SCLK half period
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [NCH-1:0] ch_enable,
  input  logic [1:0]     span [NCH],     // 0: 0..5V 1: 0..10V 2: +-5V 3: +-10V
  input  sample_t        code [NCH],
  output logic           sclk,
  output logic           cs_n,
  output logic           sdi,
  output logic           frame_done,     // pulse at the end of each frame
  output logic           span_frame      // the frame in flight writes a span
);
  localparam logic [3:0] CMD_SPAN = 4'h6;
  localparam logic [3:0] CMD_CODE = 4'h3;
  localparam int unsigned CH_W = (NCH > 1) ? $clog2(NCH) : 1;

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_GAP} state_e;
  state_e state;

  logic [$clog2(UPDATE_DIV)-1:0] tick_cnt;
  logic                          tick;
  logic [$clog2(SCLK_DIV)  :0]   half_cnt;
  logic [4:0]                    bit_cnt;
  logic [23:0]                   shreg;
  logic [1:0]                    span_wr [NCH];
  logic [NCH-1:0]                span_ok;
  logic [CH_W-1:0]               rr;

  always_ff @(posedge clk) begin
    if (rst) begin
      tick_cnt <= '0;
      tick     <= 1'b0;
    end else begin
      tick     <= (tick_cnt == '0);
      tick_cnt <= (tick_cnt == ($clog2(UPDATE_DIV))'(UPDATE_DIV - 1)) ? '0 : tick_cnt + 1'b1;
    end
  end

  // choose the next frame
  logic            have_span;
  logic [CH_W-1:0] span_ch;
  logic            have_code;
  logic [CH_W-1:0] code_ch;
  always_comb begin
    have_span = 1'b0;
    span_ch   = '0;
    for (int c = NCH - 1; c >= 0; c--)
      if (ch_enable[c] && (!span_ok[c] || span_wr[c] != span[c])) begin
        have_span = 1'b1;
        span_ch   = CH_W'(c);
      end
    have_code = 1'b0;
    code_ch   = '0;
    for (int k = NCH; k >= 1; k--) begin
      int c;
      c = (int'(rr) + k) % NCH;
      if (ch_enable[c]) begin
        have_code = 1'b1;
        code_ch   = CH_W'(c);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      sclk       <= 1'b0;
      cs_n       <= 1'b1;
      sdi        <= 1'b0;
      shreg      <= '0;
      half_cnt   <= '0;
      bit_cnt    <= '0;
      frame_done <= 1'b0;
      span_frame <= 1'b0;
      span_ok    <= '0;
      rr         <= CH_W'(NCH - 1);
      for (int c = 0; c < NCH; c++) span_wr[c] <= '0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (tick && (have_span || have_code)) begin
            logic [23:0] f;
            if (have_span) begin
              f = {CMD_SPAN, 4'(span_ch), 14'd0, span[span_ch]};
              span_wr[span_ch] <= span[span_ch];
              span_ok[span_ch] <= 1'b1;
              span_frame       <= 1'b1;
            end else begin
              f = {CMD_CODE, 4'(code_ch), code[code_ch] ^ 16'h8000};
              rr         <= code_ch;
              span_frame <= 1'b0;
            end
            cs_n     <= 1'b0;
            sdi      <= f[23];
            shreg    <= {f[22:0], 1'b0};
            bit_cnt  <= 5'd23;
            half_cnt <= '0;
            sclk     <= 1'b0;
            state    <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          if (half_cnt == ($clog2(SCLK_DIV)+1)'(SCLK_DIV - 1)) begin
            half_cnt <= '0;
            if (!sclk) begin
              sclk <= 1'b1;                     // rising edge: DAC samples sdi
            end else begin
              sclk <= 1'b0;                     // falling edge: next bit
              if (bit_cnt == 0) begin
                cs_n       <= 1'b1;
                frame_done <= 1'b1;
                state      <= S_GAP;
              end else begin
                sdi     <= shreg[23];
                shreg   <= {shreg[22:0], 1'b0};
                bit_cnt <= bit_cnt - 1'b1;
              end
            end
          end else begin
            half_cnt <= half_cnt + 1'b1;
          end
        end
        S_GAP: begin
          if (half_cnt == ($clog2(SCLK_DIV)+1)'(SCLK_DIV - 1)) begin
            half_cnt <= '0;
            state    <= S_IDLE;
          end else begin
            half_cnt <= half_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // serial-port rules: SCLK idles low outside a frame, a frame never starts
  // closer than UPDATE_DIV clocks to the previous one
  assert property (@(posedge clk) disable iff (rst) cs_n |-> !sclk);
  assert property (@(posedge clk) disable iff (rst) $fell(cs_n) |-> tick_cnt == ($clog2(UPDATE_DIV))'(2 % UPDATE_DIV));
endmodule
