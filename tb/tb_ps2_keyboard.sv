// tb_ps2_keyboard: self-checking test of the PS/2 receiver and its polled port.
//
// A keyboard model sends 11-bit frames (start, 8 data bits LSB first, parity, stop) with
// a 40-cycle PS/2 clock; data changes while the PS/2 clock is high and the host reads on
// the falling edge. Random scan codes must appear on word 1 with the flag on word 0 set,
// and reading word 1 must clear the flag. Frames with wrong parity, start or stop bits
// must be dropped. A frame cut off after a few bits followed by a long idle time must be
// discarded by the time-out so that the next frame is received whole. Readdata is 0
// when read is low.
module tb_ps2_keyboard;

  logic clk = 0, rst_n = 0;
  logic ps2_clk = 1, ps2_dat = 1;
  logic address = 0, read = 0;
  logic [7:0] readdata;
  int checks = 0, failures = 0;

  ps2_keyboard dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send the first nbits bits of a frame; flip selects a start/parity/stop error.
  task automatic send(logic [7:0] code, int flip, int nbits = 11);
    logic [10:0] f;
    f = {1'b1, ~^code, code, 1'b0};
    if (flip == 1) f[0] = 1'b1;
    if (flip == 2) f[9] = ~f[9];
    if (flip == 3) f[10] = 1'b0;
    for (int b = 0; b < nbits; b++) begin
      ps2_dat = f[b];
      repeat (20) @(negedge clk);
      ps2_clk = 0;
      repeat (20) @(negedge clk);
      ps2_clk = 1;
    end
    ps2_dat = 1;
    repeat (60) @(negedge clk);
  endtask

  task automatic poll(logic [7:0] expected_flag, logic [7:0] expected_code, logic check_code);
    @(negedge clk);
    address = 0; read = 1;
    #1;
    checks++;
    if (readdata !== expected_flag) begin
      failures++; $display("FAIL flag %0d expected %0d", readdata, expected_flag);
    end
    if (check_code) begin
      @(negedge clk);
      address = 1;
      #1;
      checks++;
      if (readdata !== expected_code) begin
        failures++; $display("FAIL code %h expected %h", readdata, expected_code);
      end
    end
    @(negedge clk);
    read = 0;
    #1;
    checks++;
    if (readdata !== 8'h0) begin failures++; $display("FAIL readdata without read"); end
  endtask

  initial begin
    logic [7:0] c;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    poll(0, 0, 0);
    for (int i = 0; i < 300; i++) begin
      int kind;
      c = 8'($urandom);
      kind = $urandom_range(0, 5);
      if (kind <= 3) kind = 0;
      else kind = $urandom_range(1, 3);
      send(c, kind);
      if (kind == 0) begin
        poll(1, c, 1);
        poll(0, 0, 0);  // flag cleared by the code read
      end else begin
        poll(0, 0, 0);  // bad frame dropped
      end
    end
    // Cut-off frame, idle past the time-out, then a whole frame.
    send(8'hA5, 0, 4);
    repeat (70000) @(negedge clk);
    send(8'h1C, 0);
    poll(1, 8'h1C, 1);
    // Two codes before a read: the later one is held.
    send(8'h11, 0);
    send(8'h22, 0);
    poll(1, 8'h22, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
