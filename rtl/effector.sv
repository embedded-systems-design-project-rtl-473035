// effector: the audio path of the effects unit, codec pins to codec pins.
//
// Data flow (one chain per channel, the two chains independent):
//   audio_in -> lr_buffer_in -> chorus -> vibrato -> distortion -> lr_buffer_out -> audio_out
// audio_in receives one 16-bit ADC word per LRCK half and requests its hand-over;
// lr_buffer_in sends it to the left or right chain as a one-cycle valid pulse; each
// effect passes the sample on with its own valid pulse (chorus 6 cycles, vibrato 5,
// distortion 1, or 1 cycle each when switched off); lr_buffer_out keeps the last result of
// each channel and gives audio_out the word it asks for. The effects run on every clk
// cycle, the codec blocks on the audio clock enable (ce), and one channel has
// 2*LRCK_HALF*AUDIO_DIV clk cycles per sample, far more than the 12 the chain needs.
// i2c_codec_config sets up the codec after reset and sends volume changes.
//
// Settings come in as one effect_cfg_t per channel (index 0 left, 1 right) and as volume
// updates for the codec's headphone amplifier, which is where the volume is applied.
//
// The blocks, their order and the per-channel duplication follow the original design;
// the DAC test tone is switched off here as it is there.
module effector
  import effects_pkg::*;
#(
  parameter int LRCK_HALF   = 192,
  parameter int BCLK_DIV    = 12,
  parameter int DEPTH       = DELAY_DEPTH,
  parameter int TABLE_LEN   = SINE_LEN,
  parameter int I2C_QUARTER = 125
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              audio_ce,
  input  effect_cfg_t [1:0] cfg,
  input  logic [1:0]        vol_valid,
  input  logic [1:0][6:0]   vol_data,
  // codec serial audio port
  output logic              aud_bclk,
  output logic              aud_adclrck,
  input  logic              aud_adcdat,
  output logic              aud_daclrck,
  output logic              aud_dacdat,
  // codec control port
  output logic              i2c_sclk,
  output logic              i2c_sdat_oe,
  input  logic              i2c_sdat_i,
  output logic              i2c_busy,
  output logic              i2c_ack_error
);

  sample_t   adc_word, dac_word;
  logic      adc_req, dac_req;

  logic    [1:0] in_valid, cho_valid, vib_valid, dis_valid;
  sample_t [1:0] in_data,  cho_data,  vib_data,  dis_data;

  audio_in #(.LRCK_HALF(LRCK_HALF), .BCLK_DIV(BCLK_DIV)) u_audio_in (
    .clk, .rst_n, .ce(audio_ce),
    .data_out(adc_word), .audio_req(adc_req),
    .lrck(aud_adclrck), .bclk(aud_bclk), .adcdat(aud_adcdat)
  );

  lr_buffer_in u_lr_in (
    .clk, .rst_n, .lrck(aud_adclrck), .audio_req(adc_req), .data_in(adc_word),
    .data_left(in_valid[0]), .data_right(in_valid[1]),
    .dataL_out(in_data[0]), .dataR_out(in_data[1])
  );

  for (genvar ch = 0; ch < 2; ch++) begin : g_chain
    chorus #(.DEPTH(DEPTH), .TABLE_LEN(TABLE_LEN)) u_chorus (
      .clk, .rst_n,
      .data_enable(in_valid[ch]), .chorus_enable(cfg[ch].cho_en),
      .delay_amp(cfg[ch].cho_amp), .delay_freq(cfg[ch].cho_freq), .mix_delay(cfg[ch].cho_mix),
      .data_in(in_data[ch]), .data_ready(cho_valid[ch]), .data_out(cho_data[ch])
    );
    vibrato #(.DEPTH(DEPTH), .TABLE_LEN(TABLE_LEN)) u_vibrato (
      .clk, .rst_n,
      .data_enable(cho_valid[ch]), .vibrato_enable(cfg[ch].vib_en),
      .delay_amp(cfg[ch].vib_amp), .delay_freq(cfg[ch].vib_freq),
      .data_in(cho_data[ch]), .data_ready(vib_valid[ch]), .data_out(vib_data[ch])
    );
    distortion u_distortion (
      .clk, .rst_n,
      .data_enable(vib_valid[ch]), .distortion_enable(cfg[ch].dis_en), .clip(cfg[ch].dis_clip),
      .data_in(vib_data[ch]), .data_out(dis_data[ch]), .data_ready(dis_valid[ch])
    );
  end

  lr_buffer_out u_lr_out (
    .clk, .rst_n, .lrck(aud_daclrck),
    .data_left(dis_valid[0]), .data_right(dis_valid[1]),
    .dataL_in(dis_data[0]), .dataR_in(dis_data[1]),
    .audio_req(dac_req), .data_out(dac_word)
  );

  audio_out #(.LRCK_HALF(LRCK_HALF), .BCLK_DIV(BCLK_DIV)) u_audio_out (
    .clk, .rst_n, .ce(audio_ce), .test_mode(1'b0), .data(dac_word),
    .audio_req(dac_req), .lrck(aud_daclrck), .dacdat(aud_dacdat)
  );

  logic i2c_init_done;
  i2c_codec_config #(.I2C_QUARTER(I2C_QUARTER)) u_i2c (
    .clk, .rst_n,
    .left_valid(vol_valid[0]), .left_data(vol_data[0]),
    .right_valid(vol_valid[1]), .right_data(vol_data[1]),
    .i2c_sclk, .i2c_sdat_oe, .i2c_sdat_i,
    .busy(i2c_busy), .init_done(i2c_init_done), .ack_error(i2c_ack_error)
  );

endmodule
