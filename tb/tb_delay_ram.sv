// tb_delay_ram: self-checking test of the delay buffer RAM.
//
// Writes every location with a pattern and reads all back
// in a different order, checks the one-cycle read latency and that data_out holds while
// re is low.
module tb_delay_ram;
  logic clk = 0;
  logic we = 0, re = 0;
  logic [10:0] addr = '0;
  logic [15:0] data_in = '0, data_out;
  int checks = 0, failures = 0;

  delay_ram dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] pattern(int a);
    return 16'((a * 40503 + 12345) ^ (a << 5));
  endfunction

  task automatic rd(int a, logic [15:0] expected);
    @(negedge clk); addr = 11'(a); re = 1;
    @(negedge clk); re = 0;
    checks++;
    if (data_out !== expected) begin
      failures++;
      $display("FAIL addr=%0d got %h expected %h", a, data_out, expected);
    end
  endtask

  initial begin
    for (int a = 0; a < 1633; a++) begin
      @(negedge clk); addr = 11'(a); data_in = pattern(a); we = 1;
    end
    @(negedge clk); we = 0;
    for (int a = 1632; a >= 0; a -= 3) rd(a, pattern(a));
    for (int a = 0; a < 1633; a += 5) rd(a, pattern(a));
    // data_out holds while re is low.
    rd(100, pattern(100));
    @(negedge clk); addr = 11'd200;
    @(negedge clk);
    checks++;
    if (data_out !== pattern(100)) begin failures++; $display("FAIL output changed without read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
