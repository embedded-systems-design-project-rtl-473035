// effects_pkg: types, constants and arithmetic shared by the guitar effects design.
//
// The design processes 16-bit two's-complement audio samples, one left and one right
// stream, through chorus, vibrato and distortion stages. This package holds the sample
// type, the per-channel settings record written by the CPU, the register map of the
// configuration window, and the two pieces of arithmetic that more than one block needs:
// the delay-line offset of the modulated delay and the shift-and-add blend of the chorus.
//
// The constants (1633-entry delay buffer, 1500-entry sine table, register order and
// reset values) are the original design's; packing them into this package is this
// design's own arrangement.
package effects_pkg;

  localparam int SAMPLE_W  = 16;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Circular sample buffer of the modulated delay (entries 0..1632).
  localparam int DELAY_DEPTH = 1633;
  localparam int DELAY_AW    = 11;
  // Low-frequency oscillator table: one full sine period in 1500 entries.
  localparam int SINE_LEN    = 1500;
  localparam int SINE_AW     = 11;
  localparam int SINE_W      = 12;
  typedef logic signed [SINE_W-1:0] sine_t;

  // Largest amplitude code the sine table scales for; larger codes act as this one.
  localparam logic [2:0] AMP_MAX = 3'd4;

  // Settings of one channel, as held in the configuration registers.
  typedef struct packed {
    logic        dis_en;
    logic [15:0] dis_clip;
    logic        vib_en;
    logic [2:0]  vib_amp;
    logic [3:0]  vib_freq;
    logic        cho_en;
    logic [2:0]  cho_amp;
    logic [3:0]  cho_freq;
    logic [3:0]  cho_mix;
  } effect_cfg_t;

  // Word addresses of the configuration registers (byte offset / 4).
  typedef enum logic [6:0] {
    REG_LVOL = 7'd0,  REG_RVOL = 7'd1,
    REG_LDIS_EN = 7'd2,  REG_LDIS_CLIP = 7'd3,
    REG_RDIS_EN = 7'd4,  REG_RDIS_CLIP = 7'd5,
    REG_LVIB_EN = 7'd6,  REG_LVIB_AMP = 7'd7,  REG_LVIB_FREQ = 7'd8,
    REG_RVIB_EN = 7'd9,  REG_RVIB_AMP = 7'd10, REG_RVIB_FREQ = 7'd11,
    REG_LCHO_EN = 7'd12, REG_LCHO_AMP = 7'd13, REG_LCHO_FREQ = 7'd14, REG_LCHO_MIX = 7'd15,
    REG_RCHO_EN = 7'd16, REG_RCHO_AMP = 7'd17, REG_RCHO_FREQ = 7'd18, REG_RCHO_MIX = 7'd19
  } reg_addr_e;

  // Reset values: the settings the control program loads at start-up.
  localparam logic [6:0] VOL_RESET = 7'd121;
  localparam effect_cfg_t CFG_RESET = '{
    dis_en: 1'b0, dis_clip: 16'd256,
    vib_en: 1'b0, vib_amp: 3'd4, vib_freq: 4'd0,
    cho_en: 1'b0, cho_amp: 3'd4, cho_freq: 4'd0, cho_mix: 4'd8
  };

  function automatic logic [2:0] clamp_amp(input logic [2:0] amp);
    return (amp > AMP_MAX) ? AMP_MAX : amp;
  endfunction

  // Centre term of the delay: 1633 - (2^(5+amp) - 1). The delay of a sample is this
  // plus the scaled sine value, which keeps it within 1..1632.
  function automatic logic [11:0] delay_base(input logic [2:0] amp);
    logic [11:0] span;
    span = (12'd1 << (5 + clamp_amp(amp))) - 12'd1;
    return 12'(DELAY_DEPTH) - span;
  endfunction

  // Sum of x>>>1 + x>>>2 + ... + x>>>n (arithmetic shifts, 16-bit wrap), n = 0..9.
  function automatic sample_t shift_sum(input sample_t x, input int unsigned n);
    sample_t acc;
    acc = '0;
    for (int unsigned k = 1; k <= 9; k++)
      if (k <= n) acc = acc + (x >>> k);
    return acc;
  endfunction

  // Chorus blend: g*delayed + (1-g)*dry with g picked by the 4-bit mix code.
  // m = 0..7: g = 2^-(8-m); m = 8..15: g = 1 - 2^-(m-6).
  function automatic sample_t chorus_blend(input sample_t delayed, input sample_t dry,
                                           input logic [3:0] mix);
    sample_t wet_part, dry_part;
    if (mix <= 4'd7) begin
      wet_part = delayed >>> (4'd8 - mix);
      dry_part = shift_sum(dry, 8 - int'(mix));
    end else begin
      wet_part = shift_sum(delayed, int'(mix) - 6);
      dry_part = dry >>> (mix - 4'd6);
    end
    return wet_part + dry_part;
  endfunction

endpackage
