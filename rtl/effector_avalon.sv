// effector_avalon: the effects unit as a CPU peripheral.
//
// Joins the configuration registers (effector_regs, an Avalon-MM slave written by the
// control program) to the audio path (effector). Register settings reach the effects
// directly; volume writes are forwarded to the codec set-up as update pulses. See
// effector_regs for the register map and effector for the audio path and its timing.
//
// This pairing follows the original design's peripheral; the port set is this design's.
module effector_avalon
  import effects_pkg::*;
#(
  parameter int LRCK_HALF   = 192,
  parameter int BCLK_DIV    = 12,
  parameter int DEPTH       = DELAY_DEPTH,
  parameter int TABLE_LEN   = SINE_LEN,
  parameter int I2C_QUARTER = 125
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        audio_ce,
  // Avalon-MM slave
  input  logic [6:0]  address,
  input  logic        write,
  input  logic        read,
  input  logic [15:0] writedata,
  output logic [15:0] readdata,
  // codec pins
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

  effect_cfg_t [1:0] cfg;
  logic [1:0]        vol_valid;
  logic [1:0][6:0]   vol_data;

  effector_regs u_regs (
    .clk, .rst_n, .address, .write, .read, .writedata, .readdata,
    .cfg, .vol_valid, .vol_data
  );

  effector #(
    .LRCK_HALF(LRCK_HALF), .BCLK_DIV(BCLK_DIV), .DEPTH(DEPTH), .TABLE_LEN(TABLE_LEN),
    .I2C_QUARTER(I2C_QUARTER)
  ) u_effector (
    .clk, .rst_n, .audio_ce, .cfg, .vol_valid, .vol_data,
    .aud_bclk, .aud_adclrck, .aud_adcdat, .aud_daclrck, .aud_dacdat,
    .i2c_sclk, .i2c_sdat_oe, .i2c_sdat_i, .i2c_busy, .i2c_ack_error
  );

endmodule
