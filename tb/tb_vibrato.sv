// tb_vibrato: self-checking test of the vibrato effect.
//
// Uses the delay settings of the original timing diagram (amplitude code 2, frequency
// code 5) with a ramp input, then random samples with other settings, and compares each
// output with a reference model of the modulated delay (history of the samples that went
// through the effect, LFO stepping every freq+1 samples, delay
// 1633 - (2^(5+amp)-1) + scaled sine). Checks the 5-cycle latency with the effect on,
// the 1-cycle bypass with it off, and that bypassed samples do not enter the delay line.
module tb_vibrato;
  import effects_pkg::*;

  logic clk = 0, rst_n = 0;
  logic data_enable = 0, vibrato_enable = 0;
  logic [2:0] delay_amp = 3'd2;
  logic [3:0] delay_freq = 4'd5;
  sample_t data_in = '0, data_out;
  logic data_ready;
  int checks = 0, failures = 0;
  int n_bypass = 0, n_delay = 0;

  vibrato dut (.*);

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

  task automatic send(sample_t x);
    int expected, lat, want_lat;
    @(negedge clk);
    data_in = x; data_enable = 1;
    if (vibrato_enable) begin
      expected = model_next(int'(x), int'(delay_amp), int'(delay_freq));
      want_lat = 5; n_delay++;
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
                 vibrato_enable, data_out, expected, lat, want_lat);
    end
    repeat ($urandom_range(1, 4)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    vibrato_enable = 1;
    // Ramp input as in the timing diagram (amp 2, freq 5).
    for (int i = 0; i < 3300; i++) send(sample_t'(i));
    // Bypass, then random data with other settings.
    vibrato_enable = 0;
    for (int i = 0; i < 200; i++) send(sample_t'($urandom));
    vibrato_enable = 1;
    delay_amp = 3'd4; delay_freq = 4'd0;
    for (int i = 0; i < 2500; i++) send(sample_t'($urandom));
    delay_amp = 3'd0; delay_freq = 4'd15;
    for (int i = 0; i < 1000; i++) send(sample_t'($urandom));
    $display("delayed samples %0d, bypassed %0d", n_delay, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
