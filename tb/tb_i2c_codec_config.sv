// tb_i2c_codec_config: self-checking test of the codec set-up master.
//
// A model of the codec's two-wire slave decodes START, STOP and the bits (sampled at
// SCLK rising edges) from the open-drain bus, and acknowledges every byte by pulling SDA
// low during the ninth bit. The quarter-period is shortened to 4 cycles to keep the run
// short; the sequence does not depend on it. Checks the ten set-up writes (device 0x34,
// registers 0..9 with the original set-up values, volume 100 on the left because it is
// written before step 2 is sent), then the queued volume writes to registers 2 and 3,
// that SDA only changes while SCLK is low except at START and STOP, and that ack_error
// stays low while the slave acknowledges and goes high when it stops acknowledging.
module tb_i2c_codec_config;

  logic clk = 0, rst_n = 0;
  logic left_valid = 0, right_valid = 0;
  logic [6:0] left_data = '0, right_data = '0;
  logic i2c_sclk, i2c_sdat_oe, i2c_sdat_i, busy, init_done, ack_error;
  int checks = 0, failures = 0;

  i2c_codec_config #(.I2C_QUARTER(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Open-drain bus and slave model.
  logic slave_low = 0, nack_mode = 0;
  assign i2c_sdat_i = !(i2c_sdat_oe || slave_low);

  logic scl_q = 1, sda_q = 1, in_frame = 0;
  int nb = 0;
  logic [7:0] byte_sr;
  logic [7:0] bytes[$];
  logic [23:0] frames[$];
  int bad_frames = 0, data_glitches = 0;

  always @(posedge clk) begin
    #1;
    if (scl_q && i2c_sclk && sda_q && !i2c_sdat_i) begin          // START
      in_frame = 1; nb = 0; bytes.delete();
    end else if (scl_q && i2c_sclk && !sda_q && i2c_sdat_i) begin // STOP
      if (in_frame) begin
        if (bytes.size() == 3) frames.push_back({bytes[0], bytes[1], bytes[2]});
        else bad_frames++;
      end
      in_frame = 0;
    end else if (in_frame && !scl_q && i2c_sclk) begin             // bit
      if (nb % 9 < 8) byte_sr = {byte_sr[6:0], i2c_sdat_i};
      nb++;
      if (nb % 9 == 8) bytes.push_back(byte_sr);
    end else if (in_frame && scl_q && i2c_sclk && sda_q != i2c_sdat_i) begin
      data_glitches++;
    end
    // Acknowledge: hold SDA low from the SCLK fall after bit 8 to the fall after bit 9.
    if (in_frame && scl_q && !i2c_sclk) slave_low = !nack_mode && (nb % 9 == 8);
    if (!in_frame) slave_low = 0;
    scl_q = i2c_sclk;
    sda_q = i2c_sdat_i;
  end

  function automatic logic [23:0] expect_frame(int r, int d);
    return {8'h34, 7'(r), 1'(d >> 8), 8'(d)};
  endfunction

  task automatic check_frame(int k, logic [23:0] e);
    checks++;
    if (frames.size() <= k || frames[k] !== e) begin
      failures++;
      $display("FAIL frame %0d got %h expected %h", k, frames.size() > k ? frames[k] : 24'hx, e);
    end
  endtask

  initial begin
    int init_d[10] = '{'h017, 'h017, 100, 121, 'h012, 'h000, 'h000, 'h001, 'h002, 'h001};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    @(negedge clk);
    left_valid = 1; left_data = 7'd100;
    @(negedge clk);
    left_valid = 0;
    wait (init_done && frames.size() == 11 && !busy);
    for (int k = 0; k < 10; k++) check_frame(k, expect_frame(k, init_d[k]));
    check_frame(10, expect_frame(2, 100));
    // Both volumes together: left first, then right.
    @(negedge clk);
    left_valid = 1; left_data = 7'd77; right_valid = 1; right_data = 7'd45;
    @(negedge clk);
    left_valid = 0; right_valid = 0;
    wait (frames.size() == 13);
    wait (!busy);
    check_frame(11, expect_frame(2, 77));
    check_frame(12, expect_frame(3, 45));
    // Two right writes in a row before the bus is free: the latest value is sent once.
    @(negedge clk);
    right_valid = 1; right_data = 7'd10;
    @(negedge clk);
    right_data = 7'd11;
    @(negedge clk);
    right_valid = 0;
    wait (frames.size() == 14);
    repeat (400) @(posedge clk);
    check_frame(13, expect_frame(3, 11));
    checks++;
    if (frames.size() != 14) begin failures++; $display("FAIL extra frames %0d", frames.size()); end
    checks++;
    if (ack_error) begin failures++; $display("FAIL ack_error with acknowledging slave"); end
    checks++;
    if (bad_frames != 0 || data_glitches != 0) begin
      failures++; $display("FAIL bad frames %0d, SDA changes with SCLK high %0d", bad_frames,
                           data_glitches);
    end
    // Slave stops acknowledging.
    nack_mode = 1;
    @(negedge clk);
    left_valid = 1; left_data = 7'd5;
    @(negedge clk);
    left_valid = 0;
    wait (frames.size() == 15);
    checks++;
    if (!ack_error) begin failures++; $display("FAIL ack_error not set without acknowledge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
