// tb_codec_clkgen: self-checking test of the codec clock generator.
//
// With the clock enable high one cycle in three, checks that LRCK toggles every 192
// enabled ticks, that BCLK has a 12-tick period (high for ticks 6..11 of each period,
// counted from the LRCK edge), that there are 16 BCLK rising edges per LRCK half, and
// that the strobes lrck_edge, bclk_rise and bclk_fall are single enabled ticks that
// match the edges of the registered lrck and bclk outputs one cycle later.
module tb_codec_clkgen;
  logic clk = 0, rst_n = 0, ce = 0;
  logic lrck, bclk, lrck_edge, bclk_rise, bclk_fall;
  int checks = 0, failures = 0;

  codec_clkgen dut (.*);

  always #5 clk = ~clk;

  int ce_div = 0;
  always @(posedge clk) begin
    ce_div = (ce_div + 1) % 3;
    ce <= rst_n && (ce_div == 0);
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tick = 0, half_start = 0, rises = 0, halves = 0;
  logic lrck_q, bclk_q, le_q, br_q, bf_q;
  always @(posedge clk) begin
    if (rst_n) begin
      // The registered outputs change exactly where the strobes said.
      if (le_q || br_q || bf_q || lrck !== lrck_q || bclk !== bclk_q) begin
        checks++;
        if ((lrck !== lrck_q) != le_q || (bclk && !bclk_q) != br_q ||
            ((!bclk && bclk_q) && !bf_q && !le_q)) begin
          failures++;
          $display("FAIL tick %0d strobes %b%b%b lrck %b->%b bclk %b->%b", tick, le_q, br_q,
                   bf_q, lrck_q, lrck, bclk_q, bclk);
        end
      end
      if (ce) begin
        checks++;
        if (bclk_rise && int'((tick - half_start) % 12) != 5) begin
          failures++; $display("FAIL bclk_rise at tick %0d of the half", tick - half_start);
        end
        if (bclk_rise) rises++;
        if (lrck_edge) begin
          checks++;
          if (tick - half_start != 191 || (halves > 0 && rises != 16)) begin
            failures++;
            $display("FAIL lrck half of %0d ticks with %0d bclk rises", tick - half_start + 1,
                     rises);
          end
          halves++;
          half_start = tick + 1;
          rises = 0;
        end
        tick++;
      end else begin
        checks++;
        if (lrck_edge || bclk_rise || bclk_fall) begin
          failures++; $display("FAIL strobe without clock enable");
        end
      end
    end
    lrck_q = lrck; bclk_q = bclk;
    le_q = lrck_edge; br_q = bclk_rise; bf_q = bclk_fall;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (halves == 60);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
