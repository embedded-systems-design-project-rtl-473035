// tb_distortion: self-checking test of the clipping stage.
//
// Replays the clip-256 trace of the original design's timing diagram (e.g. 16183 -> 256,
// -28891 -> -257, 35 -> 35), then random samples and clip levels against a reference
// written from the clipping rule, and the bypass with the effect off. Checks that
// data_ready comes exactly one cycle after data_enable.
module tb_distortion;
  import effects_pkg::*;

  logic clk = 0, rst_n = 0;
  logic data_enable = 0, distortion_enable = 0;
  logic [15:0] clip = 16'd256;
  sample_t data_in = '0, data_out;
  logic data_ready;
  int checks = 0, failures = 0;

  distortion dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sample_t ref_clip(sample_t x, logic [15:0] c, logic en);
    int hi, lo;
    hi = int'(c[14:0]);
    lo = -hi - 1;
    if (!en) return x;
    if (int'(x) > hi) return sample_t'(hi);
    if (int'(x) < lo) return sample_t'(lo);
    return x;
  endfunction

  task automatic apply(sample_t x, sample_t expected);
    @(negedge clk);
    data_in = x; data_enable = 1;
    @(negedge clk);
    data_enable = 0;
    checks++;
    if (!data_ready || data_out !== expected) begin
      failures++;
      $display("FAIL in=%0d clip=%0d en=%0b out=%0d ready=%0b expected %0d",
               x, clip, distortion_enable, data_out, data_ready, expected);
    end
    @(negedge clk);
    checks++;
    if (data_ready) begin failures++; $display("FAIL ready longer than one cycle"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Trace of the timing diagram: clip level 256, effect on.
    distortion_enable = 1; clip = 16'd256;
    apply(16'sd16183, 16'sd256);
    apply(16'sd35, 16'sd35);
    apply(16'sd10020, 16'sd256);
    apply(-16'sd28891, -16'sd257);
    apply(-16'sd238, -16'sd238);
    apply(16'sd12087, 16'sd256);
    apply(-16'sd28673, -16'sd257);
    // Random samples and clip levels.
    for (int i = 0; i < 2000; i++) begin
      sample_t x;
      x = sample_t'($urandom);
      clip = (i % 3 == 0) ? 16'($urandom) : 16'($urandom_range(0, 4096));
      distortion_enable = (i % 5 != 0);
      apply(x, ref_clip(x, clip, distortion_enable));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
