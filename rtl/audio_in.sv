// audio_in: serial receiver for the codec's ADC (left-justified, 16 bits, MSB first).
//
// A codec_clkgen makes LRCK and BCLK. On every BCLK rising edge the ADC data bit is
// shifted in; after 16 bits the word of one LRCK half is complete, and at the LRCK edge
// that ends the half it is copied to data_out. One audio tick later audio_req goes high
// for one audio tick (AUDIO_DIV clk cycles in the system) to say a new word is ready.
// The word received while LRCK was high is the left channel, while low the right; the
// consumer tells them apart by the LRCK level during audio_req (LRCK has already toggled,
// so LRCK high means the word is the right channel's).
//
// Interface: ce is the audio clock enable; lrck/bclk go to the codec's ADCLRCK/BCLK pins.
//
// Clock ratios, sampling edge, MSB-first order and the request pulse follow the original
// design; shifting instead of indexing bits is this design's own.
module audio_in
  import effects_pkg::*;
#(
  parameter int LRCK_HALF = 192,
  parameter int BCLK_DIV  = 12
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ce,
  output sample_t data_out,
  output logic    audio_req,
  output logic    lrck,
  output logic    bclk,
  input  logic    adcdat
);

  logic    lrck_edge, bclk_rise, bclk_fall, lrck_lat;
  sample_t shift_in;

  codec_clkgen #(.LRCK_HALF(LRCK_HALF), .BCLK_DIV(BCLK_DIV)) u_clk (
    .clk, .rst_n, .ce, .lrck, .bclk, .lrck_edge, .bclk_rise, .bclk_fall
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_in  <= '0;
      data_out  <= '0;
      lrck_lat  <= 1'b0;
      audio_req <= 1'b0;
    end else if (ce) begin
      if (bclk_rise) shift_in <= {shift_in[SAMPLE_W-2:0], adcdat};
      if (lrck_edge) data_out <= shift_in;
      lrck_lat  <= lrck;
      audio_req <= lrck_lat ^ lrck;
    end
  end

endmodule
