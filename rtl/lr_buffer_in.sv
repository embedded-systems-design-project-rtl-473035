// lr_buffer_in: splits the codec's word stream into the left and right channels.
//
// On each request from audio_in, the word is handed to one channel with a one-cycle
// valid pulse: to the right channel if LRCK is high at the request (the word was received
// in the low LRCK half), otherwise to the left. A request lasts several clk cycles, so a
// flag makes sure it produces one pulse only; the flag clears when the request drops.
//
// Interface: data_left/data_right are one-cycle pulses; dataL_out/dataR_out hold the
// last word of each channel.
//
// The channel rule follows the original design; producing a single-cycle pulse per
// request (rather than a pulse as long as the request) is this design's choice.
module lr_buffer_in
  import effects_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    lrck,
  input  logic    audio_req,
  input  sample_t data_in,
  output logic    data_left,
  output logic    data_right,
  output sample_t dataL_out,
  output sample_t dataR_out
);

  logic taken;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      taken      <= 1'b0;
      data_left  <= 1'b0;
      data_right <= 1'b0;
      dataL_out  <= '0;
      dataR_out  <= '0;
    end else begin
      data_left  <= 1'b0;
      data_right <= 1'b0;
      if (!audio_req) begin
        taken <= 1'b0;
      end else if (!taken) begin
        taken <= 1'b1;
        if (lrck) begin
          data_right <= 1'b1;
          dataR_out  <= data_in;
        end else begin
          data_left  <= 1'b1;
          dataL_out  <= data_in;
        end
      end
    end
  end

endmodule
