// chorus: blend of the dry signal with a slowly modulated delayed copy.
//
// With chorus_enable high, each sample goes through the same sine-modulated delay as the
// vibrato (variable_delay). When the delayed sample is ready it is mixed with the dry
// sample it belongs to:
//     data_out = g*delayed + (1-g)*dry
// where the mix code m sets g = 2^-(8-m) for m = 0..7 and g = 1 - 2^-(m-6) for m = 8..15
// (m = 7 is an even 50/50 blend). Both weights are sums of arithmetic right shifts, so no
// multiplier is needed; the final sum wraps at 16 bits. data_ready pulses 6 cycles after
// data_enable. With chorus_enable low the sample passes through one cycle later.
//
// Interface: as vibrato, plus the 4-bit mix_delay code, sampled when the blend is made.
//
// The blend law and its shift-and-add weights follow the original design; sharing the
// delay core with the vibrato and the cycle count are this design's own.
module chorus
  import effects_pkg::*;
#(
  parameter int DEPTH     = DELAY_DEPTH,
  parameter int TABLE_LEN = SINE_LEN
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       data_enable,
  input  logic       chorus_enable,
  input  logic [2:0] delay_amp,
  input  logic [3:0] delay_freq,
  input  logic [3:0] mix_delay,
  input  sample_t    data_in,
  output logic       data_ready,
  output sample_t    data_out
);

  logic    vd_done, vd_busy;
  sample_t vd_delayed, vd_dry;

  variable_delay #(.DEPTH(DEPTH), .TABLE_LEN(TABLE_LEN)) u_delay (
    .clk, .rst_n,
    .start(data_enable && chorus_enable),
    .sample_in(data_in),
    .delay_amp, .delay_freq,
    .done(vd_done), .delayed(vd_delayed), .dry(vd_dry), .busy(vd_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_ready <= 1'b0;
      data_out   <= '0;
    end else begin
      data_ready <= 1'b0;
      if (vd_done) begin
        data_out   <= chorus_blend(vd_delayed, vd_dry, mix_delay);
        data_ready <= 1'b1;
      end else if (data_enable && !chorus_enable) begin
        data_out   <= data_in;
        data_ready <= 1'b1;
      end
    end
  end

endmodule
