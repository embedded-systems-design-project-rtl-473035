// codec_clkgen: left/right and bit clocks for the WM8731 serial audio port.
//
// The FPGA is the clock master of the codec. Counting audio clock ticks (clk cycles with
// ce high), LRCK toggles every LRCK_HALF ticks, so a stereo frame lasts 2*LRCK_HALF
// ticks. BCLK has a period of BCLK_DIV ticks, restarted at every LRCK edge: it rises when
// its counter reaches BCLK_DIV/2-1 and falls at BCLK_DIV-1 (and at an LRCK edge). With
// 192 and 12 there are exactly 16 BCLK periods per LRCK half, one per sample bit.
//
// Outputs: lrck and bclk levels, and one-tick strobes (already qualified with ce)
// lrck_edge (LRCK toggles at this tick), bclk_rise and bclk_fall. With an 18.432 MHz
// audio clock the frame rate is 48 kHz.
//
// The divider values and edge positions follow the original design; gathering them in
// one block shared by the ADC and DAC sides is this design's own.
module codec_clkgen #(
  parameter int LRCK_HALF = 192,
  parameter int BCLK_DIV  = 12
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  output logic lrck,
  output logic bclk,
  output logic lrck_edge,
  output logic bclk_rise,
  output logic bclk_fall
);

  logic [$clog2(LRCK_HALF)-1:0] lrck_cnt;
  logic [$clog2(BCLK_DIV)-1:0]  bclk_cnt;

  always_comb begin
    lrck_edge = ce && (int'(lrck_cnt) == LRCK_HALF - 1);
    bclk_rise = ce && (int'(bclk_cnt) == BCLK_DIV / 2 - 1) && !lrck_edge;
    bclk_fall = ce && (int'(bclk_cnt) == BCLK_DIV - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lrck_cnt <= '0;
      bclk_cnt <= '0;
      lrck     <= 1'b0;
      bclk     <= 1'b0;
    end else if (ce) begin
      lrck_cnt <= lrck_edge ? '0 : lrck_cnt + 1'b1;
      bclk_cnt <= (lrck_edge || int'(bclk_cnt) == BCLK_DIV - 1) ? '0 : bclk_cnt + 1'b1;
      if (lrck_edge) lrck <= ~lrck;
      if (lrck_edge || bclk_fall) bclk <= 1'b0;
      else if (bclk_rise) bclk <= 1'b1;
    end
  end

endmodule
