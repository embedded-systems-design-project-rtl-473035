// tb_lr_buffer_in: self-checking test of the channel splitter.
//
// Drives requests of random length (1..8 cycles) with random LRCK level and word, and
// checks that each request gives exactly one single-cycle valid pulse, on the right
// channel when LRCK is high and on the left when low, with the word on that channel's
// output and the other channel's output unchanged.
module tb_lr_buffer_in;
  import effects_pkg::*;

  logic clk = 0, rst_n = 0, lrck = 0, audio_req = 0;
  sample_t data_in = '0, dataL_out, dataR_out;
  logic data_left, data_right;
  int checks = 0, failures = 0;

  lr_buffer_in dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pulses_l = 0, pulses_r = 0;
  always @(posedge clk) begin
    if (data_left) pulses_l++;
    if (data_right) pulses_r++;
  end

  initial begin
    sample_t exp_l, exp_r;
    int len;
    exp_l = '0; exp_r = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int pl, pr;
      @(negedge clk);
      lrck = 1'($urandom);
      data_in = sample_t'($urandom);
      if (lrck) exp_r = data_in; else exp_l = data_in;
      pl = pulses_l; pr = pulses_r;
      len = $urandom_range(1, 8);
      audio_req = 1;
      repeat (len) @(negedge clk);
      audio_req = 0;
      data_in = sample_t'($urandom);  // word may change after the request
      repeat ($urandom_range(1, 4)) @(negedge clk);
      checks++;
      if ((pulses_l - pl) != (lrck ? 0 : 1) || (pulses_r - pr) != (lrck ? 1 : 0)) begin
        failures++;
        $display("FAIL req %0d lrck=%0b len=%0d pulses L %0d R %0d", i, lrck, len,
                 pulses_l - pl, pulses_r - pr);
      end
      checks++;
      if (dataL_out !== exp_l || dataR_out !== exp_r) begin
        failures++;
        $display("FAIL req %0d outputs L %0d R %0d expected %0d %0d", i, dataL_out,
                 dataR_out, exp_l, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
