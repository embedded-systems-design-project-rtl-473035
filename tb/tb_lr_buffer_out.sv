// tb_lr_buffer_out: self-checking test of the channel joiner.
//
// Sends random left and right samples at random times and random requests with random
// LRCK level. At each request the output must become the latest left sample when LRCK is
// low and the latest right sample when LRCK is high, and it must hold between requests.
module tb_lr_buffer_out;
  import effects_pkg::*;

  logic clk = 0, rst_n = 0, lrck = 0;
  logic data_left = 0, data_right = 0, audio_req = 0;
  sample_t dataL_in = '0, dataR_in = '0, data_out;
  int checks = 0, failures = 0;

  lr_buffer_out dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sample_t last_l, last_r, expected;
    last_l = '0; last_r = '0; expected = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      data_left  = ($urandom_range(0, 3) == 0);
      data_right = ($urandom_range(0, 3) == 0);
      dataL_in = sample_t'($urandom);
      dataR_in = sample_t'($urandom);
      audio_req = ($urandom_range(0, 5) == 0);
      lrck = 1'($urandom);
      // The request reads the buffers as they were before this cycle's updates.
      if (audio_req) expected = lrck ? last_r : last_l;
      if (data_left)  last_l = dataL_in;
      if (data_right) last_r = dataR_in;
      @(posedge clk); #1;
      checks++;
      if (data_out !== expected) begin
        failures++;
        $display("FAIL cycle %0d req=%0b lrck=%0b got %0d expected %0d", i, audio_req,
                 lrck, data_out, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
