// tb_chorus: self-checking test of the chorus effect.
//
// Uses the settings of the original timing diagram (amplitude code 2, frequency code 5,
// mix code 7) with a ramp input, then random samples with every mix code, and compares
// each output with a reference: the modulated delay model (as in tb_vibrato) followed by
// the blend g*delayed + (1-g)*dry written out term by term. Also checks two blends worked
// out by hand, the 6-cycle latency, and the 1-cycle bypass.
module tb_chorus;
  import effects_pkg::*;

  logic clk = 0, rst_n = 0;
  logic data_enable = 0, chorus_enable = 0;
  logic [3:0] mix_delay = 4'd7;
  logic [2:0] delay_amp = 3'd2;
  logic [3:0] delay_freq = 4'd5;
  sample_t data_in = '0, data_out;
  logic data_ready;
  int checks = 0, failures = 0;
  int n_bypass = 0, n_delay = 0;

  chorus dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist[$];
  int lfo_idx = 0, lfo_cnt = 0;

  function automatic int sine_ref(int i);
    int v;
    v = $rtoi(256.0 * $sin(2.0 * 3.14159265358979323846 * i / 1500.0));
    if (v > 255) v = 255;
    if (v < -255) v = -255;
    return v;
  endfunction

  function automatic int model_next(int x, int amp, int freq);
    int a, s, d, n;
    a = (amp > 4) ? 4 : amp;
    s = sine_ref(lfo_idx) >>> (4 - a);
    d = 1633 - ((1 << (5 + a)) - 1) + s;
    if (lfo_cnt >= freq) begin
      lfo_cnt = 0;
      lfo_idx = (lfo_idx + 1) % 1500;
    end else lfo_cnt++;
    hist.push_back(x);
    n = hist.size() - 1;
    return (n - d >= 0) ? hist[n - d] : 0;
  endfunction

  // Weighted sum of arithmetic right shifts: x>>>1 + ... + x>>>n, wrapped to 16 bits.
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

  task automatic send(sample_t x);
    int expected, lat, want_lat;
    @(negedge clk);
    data_in = x; data_enable = 1;
    if (chorus_enable) begin
      expected = blend_ref(model_next(int'(x), int'(delay_amp), int'(delay_freq)), int'(x),
                           int'(mix_delay));
      want_lat = 6; n_delay++;
    end else begin
      expected = int'(x);
      want_lat = 1; n_bypass++;
    end
    @(negedge clk);
    data_enable = 0;
    lat = 1;
    while (!data_ready && lat < 20) begin @(negedge clk); lat++; end
    checks++;
    if (lat != want_lat || int'(data_out) != expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL en=%0b out %0d expected %0d, latency %0d expected %0d",
                 chorus_enable, data_out, expected, lat, want_lat);
    end
    repeat ($urandom_range(1, 4)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    chorus_enable = 1;
    // Ramp input as in the timing diagram (amp 2, freq 5).
    for (int i = 0; i < 3300; i++) send(sample_t'(i));
    // Hand-worked blends: m = 7 is (d>>>1)+(x>>>1); m = 15 keeps 511/512 of d and x>>>9.
    checks++;
    if (blend_ref(1000, 3000, 7) != 2000 || blend_ref(-512, 1024, 15) != -509) begin
      failures++; $display("FAIL reference blend");
    end
    // Bypass, then random data with other settings.
    chorus_enable = 0;
    for (int i = 0; i < 200; i++) send(sample_t'($urandom));
    chorus_enable = 1;
    delay_amp = 3'd4; delay_freq = 4'd0;
    for (int i = 0; i < 3200; i++) begin
      mix_delay = 4'(i % 16);
      send(sample_t'($urandom));
    end
    delay_amp = 3'd0; delay_freq = 4'd15;
    for (int i = 0; i < 1000; i++) send(sample_t'($urandom));
    $display("delayed samples %0d, bypassed %0d", n_delay, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
