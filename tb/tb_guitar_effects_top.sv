// tb_guitar_effects_top: end-to-end self-checking test of the whole effects unit at its
// real sizes and clock ratios (no parameter overrides).
//
// Around the top level sit models of everything outside the FPGA:
//   - codec ADC: sends a random 16-bit word per LRCK half, MSB first, left-justified
//     (left while LRCK is high), and hands each word, as it is latched, to a reference
//     model of the effect chain;
//   - codec DAC: collects the 16 bits after each LRCK edge at BCLK rising edges;
//   - codec control port: an I2C slave that acknowledges and records every write;
//   - PS/2 keyboard: sends one scan code frame;
//   - CPU: writes and reads the effect registers and polls the keyboard port.
// The reference model applies, per channel and per sample, chorus (modulated delay plus
// blend), vibrato (modulated delay) and distortion (clip) with its own delay histories
// and oscillators, using the settings that were written before the sample was latched
// (registers are only written 200 cycles after an LRCK edge, far from any sample being
// processed). Each channel's DAC stream must equal its reference stream shifted by a
// fixed number of words: 2 for left and 1 for right. Both mean the same latency, one
// frame: a word latched at an LRCK edge goes out in the same channel's half that starts
// one frame later. The counts differ only because the first right word in the reference
// is the empty word latched at the first LRCK edge after reset, and the first left DAC
// word is sent before any word has been processed.
//
// Mechanism counters (each must be non-zero): bypassed samples, samples changed by the
// chorus, by the vibrato, clipped high, clipped low, samples with different settings on
// the two channels, register read-backs, the ten codec set-up writes, volume writes sent
// to the codec, the keyboard code read back.
module tb_guitar_effects_top;
  import effects_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [6:0]  eff_address = '0;
  logic        eff_write = 0, eff_read = 0;
  logic [15:0] eff_writedata = '0, eff_readdata;
  logic        kbd_address = 0, kbd_read = 0;
  logic [7:0]  kbd_readdata;
  logic        ps2_clk = 1, ps2_dat = 1;
  logic aud_xck, aud_bclk, aud_adclrck, aud_adcdat, aud_daclrck, aud_dacdat;
  logic i2c_sclk, i2c_sdat_oe, i2c_sdat_i, i2c_busy, i2c_ack_error;
  int checks = 0, failures = 0;

  guitar_effects_top dut (.*);

  always #10 clk = ~clk;  // 50 MHz

  initial begin : watchdog
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- reference model
  effect_cfg_t mcfg[2];
  int hist[2][2][$];
  int lfo_idx[2][2], lfo_cnt[2][2];
  int ref_out[2][$];
  int ref_flags[2][$];
  localparam int F_BYPASS = 1, F_CHO = 2, F_VIB = 4, F_CLIPHI = 8, F_CLIPLO = 16, F_DIFF = 32;

  function automatic int sine_ref(int i);
    int v;
    v = $rtoi(256.0 * $sin(2.0 * 3.14159265358979323846 * i / 1500.0));
    if (v > 255) v = 255;
    if (v < -255) v = -255;
    return v;
  endfunction

  function automatic int vd_next(int ch, int e, int x, int amp, int freq);
    int a, s, d, n;
    a = (amp > 4) ? 4 : amp;
    s = sine_ref(lfo_idx[ch][e]) >>> (4 - a);
    d = 1633 - ((1 << (5 + a)) - 1) + s;
    if (lfo_cnt[ch][e] >= freq) begin
      lfo_cnt[ch][e] = 0;
      lfo_idx[ch][e] = (lfo_idx[ch][e] + 1) % 1500;
    end else lfo_cnt[ch][e]++;
    hist[ch][e].push_back(x);
    n = hist[ch][e].size() - 1;
    return (n - d >= 0) ? hist[ch][e][n - d] : 0;
  endfunction

  function automatic int shifts(int x, int n);
    int acc = 0;
    for (int k = 1; k <= n; k++) acc += (x >>> k);
    return acc;
  endfunction

  function automatic int wrap16(int v);
    return int'(sample_t'(v));
  endfunction

  function automatic int blend_ref(int d, int x, int m);
    if (m <= 7) return wrap16((d >>> (8 - m)) + shifts(x, 8 - m));
    return wrap16(shifts(d, m - 6) + (x >>> (m - 6)));
  endfunction

  task automatic model_sample(int ch, int x);
    effect_cfg_t c;
    int y, hi, lo, fl;
    c = mcfg[ch];
    fl = (mcfg[0] != mcfg[1]) ? F_DIFF : 0;
    y = x;
    if (c.cho_en) begin
      y = blend_ref(vd_next(ch, 0, y, int'(c.cho_amp), int'(c.cho_freq)), y, int'(c.cho_mix));
      if (y != x) fl |= F_CHO;
    end
    if (c.vib_en) begin
      int y0 = y;
      y = vd_next(ch, 1, y, int'(c.vib_amp), int'(c.vib_freq));
      if (y != y0) fl |= F_VIB;
    end
    if (c.dis_en) begin
      hi = int'(c.dis_clip[14:0]);
      lo = -hi - 1;
      if (y > hi) begin y = hi; fl |= F_CLIPHI; end
      if (y < lo) begin y = lo; fl |= F_CLIPLO; end
    end
    if (!c.cho_en && !c.vib_en && !c.dis_en) fl |= F_BYPASS;
    ref_out[ch].push_back(y);
    ref_flags[ch].push_back(fl);
  endtask

  // ---------------------------------------------------------------- codec ADC model
  logic [15:0] adc_cur = '0;
  int adc_bit = 0;
  logic a_lrck_q = 0, a_bclk_q = 0;
  always @(posedge clk) begin
    #1;
    if (!rst_n) begin
      adc_cur = '0; a_lrck_q = 0; a_bclk_q = 0; aud_adcdat = 0; adc_bit = 16;
    end else begin
      if (aud_adclrck !== a_lrck_q) begin
        // The word of the half that just ended is now latched: left if LRCK was high.
        model_sample(a_lrck_q ? 0 : 1, int'(sample_t'(adc_cur)));
        adc_cur = 16'($urandom);
        adc_bit = 0;
        aud_adcdat = adc_cur[15];
      end else if (a_bclk_q && !aud_bclk) begin
        adc_bit++;
        aud_adcdat = (adc_bit < 16) ? adc_cur[15 - adc_bit] : 1'b0;
      end
      a_lrck_q = aud_adclrck;
      a_bclk_q = aud_bclk;
    end
  end

  // ---------------------------------------------------------------- codec DAC model
  int dac_out[2][$];
  logic [15:0] dac_sr;
  int dac_n = 16;
  logic d_lrck_q = 0, d_bclk_q = 0;
  always @(posedge clk) begin
    #1;
    if (!rst_n) dac_n = 16;
    else if (aud_daclrck !== d_lrck_q) dac_n = 0;
    else if (!d_bclk_q && aud_bclk && dac_n < 16) begin
      dac_sr = {dac_sr[14:0], aud_dacdat};
      dac_n++;
      if (dac_n == 16) dac_out[aud_daclrck ? 0 : 1].push_back(int'(sample_t'(dac_sr)));
    end
    d_lrck_q = aud_daclrck;
    d_bclk_q = aud_bclk;
  end

  // ---------------------------------------------------------------- codec I2C slave
  logic slave_low = 0;
  assign i2c_sdat_i = !(i2c_sdat_oe || slave_low);
  logic scl_q = 1, sda_q = 1, in_frame = 0;
  int nb = 0;
  logic [7:0] byte_sr;
  logic [7:0] i2c_bytes[$];
  logic [23:0] i2c_frames[$];
  always @(posedge clk) begin
    #1;
    if (scl_q && i2c_sclk && sda_q && !i2c_sdat_i) begin
      in_frame = 1; nb = 0; i2c_bytes.delete();
    end else if (scl_q && i2c_sclk && !sda_q && i2c_sdat_i) begin
      if (in_frame && i2c_bytes.size() == 3)
        i2c_frames.push_back({i2c_bytes[0], i2c_bytes[1], i2c_bytes[2]});
      in_frame = 0;
    end else if (in_frame && !scl_q && i2c_sclk) begin
      if (nb % 9 < 8) byte_sr = {byte_sr[6:0], i2c_sdat_i};
      nb++;
      if (nb % 9 == 8) i2c_bytes.push_back(byte_sr);
    end
    if (in_frame && scl_q && !i2c_sclk) slave_low = (nb % 9 == 8);
    if (!in_frame) slave_low = 0;
    scl_q = i2c_sclk;
    sda_q = i2c_sdat_i;
  end

  // ---------------------------------------------------------------- CPU
  localparam int NREG = 20;
  int width[NREG] = '{7, 7, 1, 16, 1, 16, 1, 3, 4, 1, 3, 4, 1, 3, 4, 4, 1, 3, 4, 4};
  logic [15:0] shadow[NREG];
  int n_readback = 0;
  int vol_sent[$];  // {reg, value} of the volume writes expected on the codec bus

  function automatic effect_cfg_t cfg_of(int ch);
    effect_cfg_t c;
    c.dis_en   = shadow[2 + 2 * ch][0];
    c.dis_clip = shadow[3 + 2 * ch];
    c.vib_en   = shadow[6 + 3 * ch][0];
    c.vib_amp  = shadow[7 + 3 * ch][2:0];
    c.vib_freq = shadow[8 + 3 * ch][3:0];
    c.cho_en   = shadow[12 + 4 * ch][0];
    c.cho_amp  = shadow[13 + 4 * ch][2:0];
    c.cho_freq = shadow[14 + 4 * ch][3:0];
    c.cho_mix  = shadow[15 + 4 * ch][3:0];
    return c;
  endfunction

  task automatic reg_write(int a, int d);
    @(negedge clk);
    eff_address = 7'(a); eff_writedata = 16'(d); eff_write = 1;
    shadow[a] = 16'(d) & 16'((32'd1 << width[a]) - 1);
    if (a < 2) vol_sent.push_back(((a + 2) << 16) | (d & 'h7f));
    @(negedge clk);
    eff_write = 0;
  endtask

  task automatic reg_readback_all();
    for (int a = 0; a < NREG; a++) begin
      @(negedge clk);
      eff_address = 7'(a); eff_read = 1;
      #1;
      checks++;
      if (eff_readdata !== shadow[a]) begin
        failures++;
        $display("FAIL register %0d reads %h expected %h", a, eff_readdata, shadow[a]);
      end else n_readback++;
      @(negedge clk);
      eff_read = 0;
    end
  endtask

  // Writes happen 200 cycles after an ADC LRCK edge; the model takes the new settings
  // from the next latched sample on.
  typedef struct { int a; int d; } wr_t;
  task automatic set_regs(wr_t w[$]);
    @(aud_adclrck);
    repeat (200) @(negedge clk);
    foreach (w[i]) reg_write(w[i].a, w[i].d);
    mcfg[0] = cfg_of(0);
    mcfg[1] = cfg_of(1);
  endtask

  task automatic wait_frames(int n);
    repeat (n) @(posedge aud_adclrck);
  endtask

  // ---------------------------------------------------------------- keyboard
  int n_kbd = 0;
  task automatic ps2_send(logic [7:0] code);
    logic [10:0] f;
    f = {1'b1, ~^code, code, 1'b0};
    for (int b = 0; b < 11; b++) begin
      ps2_dat = f[b];
      repeat (1000) @(negedge clk);
      ps2_clk = 0;
      repeat (1000) @(negedge clk);
      ps2_clk = 1;
    end
    ps2_dat = 1;
  endtask

  task automatic kbd_poll(logic [7:0] code);
    @(negedge clk);
    kbd_address = 0; kbd_read = 1;
    #1;
    checks++;
    if (kbd_readdata !== 8'd1) begin failures++; $display("FAIL keyboard flag not set"); end
    @(negedge clk);
    kbd_address = 1;
    #1;
    checks++;
    if (kbd_readdata !== code) begin
      failures++; $display("FAIL keyboard code %h expected %h", kbd_readdata, code);
    end else n_kbd++;
    @(negedge clk);
    kbd_address = 0;
    #1;
    checks++;
    if (kbd_readdata !== 8'd0) begin failures++; $display("FAIL keyboard flag not cleared"); end
    @(negedge clk);
    kbd_read = 0;
  endtask

  // ---------------------------------------------------------------- stimulus
  initial begin
    logic [15:0] resetv[NREG] = '{121, 121, 0, 256, 0, 256, 0, 4, 0, 0, 4, 0, 0, 4, 0, 8,
                                  0, 4, 0, 8};
    wr_t w[$];
    for (int a = 0; a < NREG; a++) shadow[a] = resetv[a];
    mcfg[0] = cfg_of(0);
    mcfg[1] = cfg_of(1);
    repeat (5) @(posedge clk);
    rst_n = 1;

    // Reset values, then plain pass-through.
    reg_readback_all();
    wait_frames(150);

    // Left: chorus at the start-up settings. Right: vibrato, amplitude 2, frequency 5.
    w = '{'{12, 1}, '{9, 1}, '{10, 2}, '{11, 5}};
    set_regs(w);
    fork
      begin ps2_send(8'h1C); kbd_poll(8'h1C); end
      wait_frames(1700);
    join
    reg_readback_all();

    // Left: chorus + vibrato (amp 4, freq 1) + distortion at 256.
    // Right: chorus (amp 1, freq 2, mix 3) + vibrato + distortion at 1000.
    w = '{'{6, 1}, '{7, 4}, '{8, 1}, '{2, 1}, '{3, 256},
          '{16, 1}, '{17, 1}, '{18, 2}, '{19, 3}, '{4, 1}, '{5, 1000}};
    set_regs(w);
    wait_frames(600);

    // Volume writes are passed to the codec.
    w = '{'{0, 90}, '{1, 70}};
    set_regs(w);

    // Random settings, changed every 40 frames.
    for (int k = 0; k < 12; k++) begin
      w.delete();
      for (int j = 0; j < 6; j++) begin
        int a;
        a = $urandom_range(2, NREG - 1);
        w.push_back('{a, (a == 3 || a == 5) ? $urandom_range(0, 20000) : $urandom_range(0, 15)});
      end
      set_regs(w);
      wait_frames(40);
    end
    reg_readback_all();
    wait_frames(4);
    finish_checks();
  end

  // ---------------------------------------------------------------- final comparison
  task automatic finish_checks();
    int mech[6];
    int best_k[2];
    int n_init_ok, n_vol_ok;
    logic [23:0] fr;
    int init_d[10] = '{'h017, 'h017, 121, 121, 'h012, 'h000, 'h000, 'h001, 'h002, 'h001};
    foreach (mech[i]) mech[i] = 0;
    // Offset per channel: the one in 0..3 with the fewest mismatches, which must be the
    // expected one.
    for (int ch = 0; ch < 2; ch++) begin
      int best = -1, best_bad = 1 << 30;
      for (int k = 0; k <= 3; k++) begin
        int bad = 0;
        for (int m = k; m < dac_out[ch].size() && m - k < ref_out[ch].size(); m++)
          if (dac_out[ch][m] != ref_out[ch][m - k]) bad++;
        if (bad < best_bad) begin best_bad = bad; best = k; end
      end
      best_k[ch] = best;
    end
    checks++;
    if (best_k[0] != 2 || best_k[1] != 1) begin
      failures++; $display("FAIL channel offsets %0d %0d, expected 2 1", best_k[0], best_k[1]);
    end
    for (int ch = 0; ch < 2; ch++) begin
      int k = best_k[ch];
      int shown = 0;
      for (int m = k; m < dac_out[ch].size() && m - k < ref_out[ch].size(); m++) begin
        checks++;
        if (dac_out[ch][m] != ref_out[ch][m - k]) begin
          failures++;
          if (shown++ < 8)
            $display("FAIL ch %0d word %0d got %0d expected %0d", ch, m, dac_out[ch][m],
                     ref_out[ch][m - k]);
        end else begin
          int fl = ref_flags[ch][m - k];
          for (int b = 0; b < 6; b++) if (fl & (1 << b)) mech[b]++;
        end
      end
      $display("channel %0d: %0d words out, %0d in, offset %0d", ch, dac_out[ch].size(),
               ref_out[ch].size(), k);
    end
    // Codec control writes.
    n_init_ok = 0;
    for (int i = 0; i < 10; i++) begin
      checks++;
      fr = (i < i2c_frames.size()) ? i2c_frames[i] : 24'h0;
      if (fr !== {8'h34, 7'(i), 1'(init_d[i] >> 8), 8'(init_d[i])}) begin
        failures++; $display("FAIL set-up write %0d: %h", i, fr);
      end else n_init_ok++;
    end
    n_vol_ok = 0;
    foreach (vol_sent[i]) begin
      checks++;
      fr = (10 + i < i2c_frames.size()) ? i2c_frames[10 + i] : 24'h0;
      if (fr !== {8'h34, 7'(vol_sent[i] >> 16), 1'b0, 8'(vol_sent[i])}) begin
        failures++; $display("FAIL volume write %0d: %h", i, fr);
      end else n_vol_ok++;
    end
    checks++;
    if (i2c_ack_error) begin failures++; $display("FAIL codec acknowledge error"); end
    $display("mechanisms: bypass %0d chorus %0d vibrato %0d clip-high %0d clip-low %0d",
             mech[0], mech[1], mech[2], mech[3], mech[4]);
    $display("            L/R differ %0d readback %0d set-up %0d volume %0d keyboard %0d",
             mech[5], n_readback, n_init_ok, n_vol_ok, n_kbd);
    for (int b = 0; b < 6; b++) begin
      checks++;
      if (mech[b] == 0) begin failures++; $display("FAIL mechanism %0d never happened", b); end
    end
    checks++;
    if (n_readback == 0 || n_init_ok != 10 || n_vol_ok == 0 || n_kbd == 0) begin
      failures++; $display("FAIL a control mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
