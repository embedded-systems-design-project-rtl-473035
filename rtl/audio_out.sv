// audio_out: serial transmitter for the codec's DAC (left-justified, 16 bits, MSB first).
//
// A codec_clkgen makes LRCK and BCLK. At each LRCK edge the word on `data` (or, in test
// mode, the next step of a built-in test tone) is loaded into a shift register whose MSB
// drives DACDAT; it shifts left at every BCLK falling edge, so each bit is stable at the
// BCLK rising edge where the codec samples it. One audio tick after each LRCK edge
// audio_req is high for one tick: the request for the word of the next LRCK half.
//
// Test tone: 48 steps per period, one step per frame (on the falling LRCK edge), values
// floor(32767*sin(2*pi*k/48)) for k = 0..24 and the bitwise complement of the mirrored
// value for k = 25..47; computed when the design is elaborated.
//
// The clocking, request timing and test tone follow the original design.
module audio_out
  import effects_pkg::*;
#(
  parameter int LRCK_HALF  = 192,
  parameter int BCLK_DIV   = 12,
  parameter int TONE_STEPS = 48
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ce,
  input  logic    test_mode,
  input  sample_t data,
  output logic    audio_req,
  output logic    lrck,
  output logic    dacdat
);

  typedef sample_t tone_t [TONE_STEPS];

  function automatic sample_t tone_value(int k);
    real r;
    r = 32767.0 * $sin(2.0 * 3.14159265358979323846 * real'(k) / real'(TONE_STEPS));
    return sample_t'($rtoi($floor(r + 1.0e-9)));
  endfunction

  function automatic tone_t build_tone();
    tone_t t;
    for (int k = 0; k < TONE_STEPS; k++)
      t[k] = (k <= TONE_STEPS / 2) ? tone_value(k) : ~tone_value(TONE_STEPS - k);
    return t;
  endfunction

  localparam tone_t TONE = build_tone();

  logic    bclk, lrck_edge, bclk_rise, bclk_fall, lrck_lat;
  sample_t shift_out;
  logic [$clog2(TONE_STEPS)-1:0] tone_idx;

  codec_clkgen #(.LRCK_HALF(LRCK_HALF), .BCLK_DIV(BCLK_DIV)) u_clk (
    .clk, .rst_n, .ce, .lrck, .bclk, .lrck_edge, .bclk_rise, .bclk_fall
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_out <= '0;
      lrck_lat  <= 1'b0;
      audio_req <= 1'b0;
      tone_idx  <= '0;
    end else if (ce) begin
      if (lrck_edge) shift_out <= test_mode ? TONE[tone_idx] : data;
      else if (bclk_fall) shift_out <= {shift_out[SAMPLE_W-2:0], 1'b0};
      lrck_lat  <= lrck;
      audio_req <= lrck_lat ^ lrck;
      if (lrck_lat && !lrck)
        tone_idx <= (int'(tone_idx) == TONE_STEPS - 1) ? '0 : tone_idx + 1'b1;
    end
  end

  assign dacdat = shift_out[SAMPLE_W-1];

endmodule
