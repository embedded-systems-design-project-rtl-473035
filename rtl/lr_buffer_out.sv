// lr_buffer_out: joins the processed left and right samples into the DAC word stream.
//
// The latest left and right samples are kept as they arrive (data_left/data_right
// pulses). While audio_out requests a word, data_out takes the sample for the LRCK half
// that comes next: with LRCK low (right half in progress) the left sample, with LRCK high
// the right one. The DAC therefore sends left while LRCK is high, the same convention as
// the ADC side.
//
// Interface: data_out changes only during a request and holds until the next.
//
// Holding both channels and answering requests follow the original design; which sample
// answers which LRCK level is this design's choice, made so that left stays left.
module lr_buffer_out
  import effects_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    lrck,
  input  logic    data_left,
  input  logic    data_right,
  input  sample_t dataL_in,
  input  sample_t dataR_in,
  input  logic    audio_req,
  output sample_t data_out
);

  sample_t buffer_left, buffer_right;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buffer_left  <= '0;
      buffer_right <= '0;
      data_out     <= '0;
    end else begin
      if (data_left)  buffer_left  <= dataL_in;
      if (data_right) buffer_right <= dataR_in;
      if (audio_req)  data_out     <= lrck ? buffer_right : buffer_left;
    end
  end

endmodule
