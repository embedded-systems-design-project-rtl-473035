// distortion: hard clipping of the signal at a programmable level.
//
// When distortion_enable is high, a sample above +clip is replaced by +clip and a sample
// below -(clip+1) by -(clip+1); samples in between pass unchanged. The lower bound is the
// bitwise complement of the clip level (the sign bit of clip is ignored), so a clip level
// of 256 bounds the output to 256 and -257. When distortion_enable is low the sample
// passes unchanged.
//
// Interface: data_in is taken when data_enable is high; data_out is registered and
// data_ready pulses in the next cycle. data_out holds until the next sample.
//
// The compare-and-replace structure, the complemented lower bound and the one-cycle
// timing follow the original design. Its block diagram also shows a volume gain stage
// here; in this design volume is applied by the codec (see i2c_codec_config).
module distortion
  import effects_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        data_enable,
  input  logic        distortion_enable,
  input  logic [15:0] clip,
  input  sample_t     data_in,
  output sample_t     data_out,
  output logic        data_ready
);

  sample_t upper, lower, clipped;

  always_comb begin
    upper = sample_t'({1'b0, clip[14:0]});
    lower = ~upper;
    if (data_in > upper)      clipped = upper;
    else if (data_in < lower) clipped = lower;
    else                      clipped = data_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out   <= '0;
      data_ready <= 1'b0;
    end else begin
      data_ready <= data_enable;
      if (data_enable) data_out <= distortion_enable ? clipped : data_in;
    end
  end

endmodule
