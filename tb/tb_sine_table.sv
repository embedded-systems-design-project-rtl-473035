// tb_sine_table: self-checking test of the oscillator table.
//
// Checks entries against values printed in the original table listing (index 50 -> 53,
// 100 -> 104, 200 -> 190, 375 -> 255, 750 -> 0, 800 -> -53, 900 -> -150 ...), then every
// index at every amplitude code against trunc(256*sin(2*pi*i/1500)) limited to +/-255 and
// shifted right by 4-code, and the one-cycle lookup latency.
module tb_sine_table;
  import effects_pkg::*;

  logic clk = 0, rst_n = 0;
  logic data_request = 0;
  logic [2:0] amplitude = 3'd4;
  logic [10:0] addr = '0;
  sine_t data_out;
  int checks = 0, failures = 0;

  sine_table dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_entry(int i);
    real r;
    int v;
    r = 256.0 * $sin(2.0 * 3.14159265358979323846 * i / 1500.0);
    v = $rtoi(r);
    if (v > 255) v = 255;
    if (v < -255) v = -255;
    return v;
  endfunction

  task automatic look(int i, logic [2:0] a, int expected);
    @(negedge clk);
    addr = 11'(i); amplitude = a; data_request = 1;
    @(negedge clk);
    data_request = 0;
    checks++;
    if (int'(data_out) != expected) begin
      failures++;
      $display("FAIL idx=%0d amp=%0d got %0d expected %0d", i, a, data_out, expected);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Values printed in the original table.
    look(10, 4, 10);   look(19, 4, 20);   look(50, 4, 53);   look(100, 4, 104);
    look(150, 4, 150); look(200, 4, 190); look(250, 4, 221); look(375, 4, 255);
    look(500, 4, 221); look(600, 4, 150); look(749, 4, 1);   look(750, 4, 0);
    look(751, 4, -1);  look(760, 4, -10); look(800, 4, -53); look(900, 4, -150);
    // Whole table at every amplitude code; codes above 4 act as 4.
    for (int a = 0; a < 8; a++)
      for (int i = 0; i < 1500; i += (a == 4) ? 1 : 7) begin
        int sh;
        sh = 4 - ((a > 4) ? 4 : a);
        look(i, 3'(a), ref_entry(i) >>> sh);
      end
    // Output holds without a request.
    look(375, 4, 255);
    @(negedge clk); addr = 11'd1125;
    @(negedge clk);
    checks++;
    if (data_out != 12'sd255) begin failures++; $display("FAIL output changed without request"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
