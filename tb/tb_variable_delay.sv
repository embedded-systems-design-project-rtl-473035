// tb_variable_delay: self-checking test of the sine-modulated delay line.
//
// Feeds 6000 random samples with changing amplitude and frequency codes and compares
// every delayed output with a reference model kept in the testbench: a full history of
// the inputs, an LFO index that steps every freq+1 samples, and the delay
// d = 1633 - (2^(5+amp)-1) + (trunc(256*sin(2*pi*k/1500)) limited to +/-255) >>> (4-amp).
// Locations never written read as zero. Also checks the 5-cycle latency, the dry output
// and the busy flag.
module tb_variable_delay;
  import effects_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  sample_t sample_in = '0, delayed, dry;
  logic [2:0] delay_amp = 3'd4;
  logic [3:0] delay_freq = 4'd0;
  logic done, busy;
  int checks = 0, failures = 0;

  variable_delay dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist[$];
  int lfo_idx = 0, lfo_cnt = 0;
  int min_d = 9999, max_d = 0;

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
    if (d < min_d) min_d = d;
    if (d > max_d) max_d = d;
    return (n - d >= 0) ? hist[n - d] : 0;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      int expected, lat;
      sample_t x;
      if (i % 1000 == 0) begin
        delay_amp  = 3'(i / 1000);  // codes 0..5 (5 acts as 4)
        delay_freq = 4'($urandom_range(0, 15));
      end
      x = sample_t'($urandom);
      @(negedge clk);
      sample_in = x; start = 1;
      expected = model_next(int'(x), int'(delay_amp), int'(delay_freq));
      @(negedge clk);
      start = 0;
      lat = 1;
      checks++;
      if (!busy) begin failures++; $display("FAIL busy not set"); end
      while (!done && lat < 20) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 5) begin failures++; $display("FAIL latency %0d, expected 5", lat); end
      checks++;
      if (int'(delayed) != expected || dry != x) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d: delayed %0d expected %0d", i, delayed, expected);
      end
      @(negedge clk);
      checks++;
      if (busy || done) begin failures++; $display("FAIL busy/done after completion"); end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    $display("delay range seen: %0d..%0d samples", min_d, max_d);
    checks++;
    if (min_d < 1 || max_d > 1632) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
