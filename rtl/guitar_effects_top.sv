// guitar_effects_top: real-time guitar effects unit for an FPGA board with a WM8731
// audio codec.
//
// The guitar (through a line-level preamp) enters the codec's ADC; every sample of each
// channel passes through chorus, vibrato and distortion, each switched and tuned per
// channel by a control program, and leaves through the DAC. This top holds:
//   - the audio clock: a clock enable every AUDIO_DIV clk cycles; aud_xck, the codec's
//     master clock, toggles at the same rate (clk/AUDIO_DIV),
//   - effector_avalon: configuration registers plus the whole audio path,
//   - ps2_keyboard: the keyboard port the control program polls.
// The CPU that runs the control program is not part of this RTL: its bus accesses to the
// two peripherals come in on the eff_* and kbd_* Avalon-MM slave ports.
//
// Timing: all logic runs on clk (50 MHz on the original board). With AUDIO_DIV = 4 the
// audio clock is 12.5 MHz and the frame rate 12.5 MHz / 384 = 32.6 kHz; an 18.432 MHz
// audio clock would give the 48 kHz the codec is set up for.
//
// The structure and the clk/4 audio clock follow the original design; using a clock
// enable instead of a divided clock, and the split open-drain I2C data pins, are this
// design's choices.
module guitar_effects_top
  import effects_pkg::*;
#(
  parameter int AUDIO_DIV   = 4,
  parameter int LRCK_HALF   = 192,
  parameter int BCLK_DIV    = 12,
  parameter int DEPTH       = DELAY_DEPTH,
  parameter int TABLE_LEN   = SINE_LEN,
  parameter int I2C_QUARTER = 125
) (
  input  logic        clk,
  input  logic        rst_n,
  // CPU access to the effect registers (Avalon-MM slave, word addresses)
  input  logic [6:0]  eff_address,
  input  logic        eff_write,
  input  logic        eff_read,
  input  logic [15:0] eff_writedata,
  output logic [15:0] eff_readdata,
  // CPU access to the keyboard port
  input  logic        kbd_address,
  input  logic        kbd_read,
  output logic [7:0]  kbd_readdata,
  // PS/2 keyboard
  input  logic        ps2_clk,
  input  logic        ps2_dat,
  // audio codec
  output logic        aud_xck,
  output logic        aud_bclk,
  output logic        aud_adclrck,
  input  logic        aud_adcdat,
  output logic        aud_daclrck,
  output logic        aud_dacdat,
  output logic        i2c_sclk,
  output logic        i2c_sdat_oe,
  input  logic        i2c_sdat_i,
  output logic        i2c_busy,
  output logic        i2c_ack_error
);

  logic [$clog2(AUDIO_DIV)-1:0] div_cnt;
  logic audio_ce;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      aud_xck <= 1'b0;
    end else begin
      div_cnt <= (int'(div_cnt) == AUDIO_DIV - 1) ? '0 : div_cnt + 1'b1;
      aud_xck <= (int'(div_cnt) >= AUDIO_DIV / 2 - 1) && (int'(div_cnt) < AUDIO_DIV - 1);
    end
  end
  assign audio_ce = (int'(div_cnt) == AUDIO_DIV - 1);

  effector_avalon #(
    .LRCK_HALF(LRCK_HALF), .BCLK_DIV(BCLK_DIV), .DEPTH(DEPTH), .TABLE_LEN(TABLE_LEN),
    .I2C_QUARTER(I2C_QUARTER)
  ) u_effector (
    .clk, .rst_n, .audio_ce,
    .address(eff_address), .write(eff_write), .read(eff_read),
    .writedata(eff_writedata), .readdata(eff_readdata),
    .aud_bclk, .aud_adclrck, .aud_adcdat, .aud_daclrck, .aud_dacdat,
    .i2c_sclk, .i2c_sdat_oe, .i2c_sdat_i, .i2c_busy, .i2c_ack_error
  );

  ps2_keyboard u_kbd (
    .clk, .rst_n, .ps2_clk, .ps2_dat,
    .address(kbd_address), .read(kbd_read), .readdata(kbd_readdata)
  );

endmodule
