// tb_audio_in: self-checking test of the ADC serial receiver.
//
// A model of the codec's ADC watches the LRCK and BCLK the receiver generates and, like
// the codec in left-justified mode, puts a fresh random word on ADCDAT MSB first: the MSB
// right after each LRCK edge, the following bits after each BCLK falling edge. At each
// request the received word must equal the word sent during the LRCK half that just
// ended (LRCK high at the request = the word of the low half = right channel). Also
// checks the clock ratios (BCLK 12 ticks, LRCK half 192 ticks) and that each request
// lasts one audio tick and comes once per LRCK half.
module tb_audio_in;
  import effects_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0;
  sample_t data_out;
  logic audio_req, lrck, bclk, adcdat = 0;
  int checks = 0, failures = 0;
  int reqs = 0, req_len = 0;

  audio_in dut (.*);

  always #5 clk = ~clk;

  // Audio clock enable every second cycle, as a divided system clock would give.
  always @(posedge clk) ce <= rst_n ? ~ce : 1'b0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Codec ADC model.
  // Sampled once per clk edge (after the DUT's update) so that an LRCK edge and the BCLK
  // fall of the same tick are seen together: the LRCK edge restarts the word.
  logic [15:0] word_high = '0, word_low = '0, cur = '0;
  int bit_idx = 0;
  logic lrck_q = 0, bclk_q = 0;
  always @(posedge clk) begin
    #1;
    if (lrck !== lrck_q) begin
      cur = 16'($urandom);
      if (lrck) word_high = cur; else word_low = cur;
      bit_idx = 0;
      adcdat = cur[15];
    end else if (bclk_q && !bclk) begin
      bit_idx++;
      adcdat = (bit_idx < 16) ? cur[15 - bit_idx] : 1'b0;
    end
    lrck_q = lrck;
    bclk_q = bclk;
  end

  // Clock ratio checks (in audio ticks, ce every 2 cycles).
  int t_cyc = 0, last_bclk_rise = -1, last_lrck = -1;
  always @(posedge clk) t_cyc++;
  always @(posedge bclk) begin
    if (last_bclk_rise >= 0 && last_lrck < last_bclk_rise && reqs > 1) begin
      checks++;
      if (t_cyc - last_bclk_rise != 24) begin
        failures++; $display("FAIL bclk period %0d cycles", t_cyc - last_bclk_rise);
      end
    end
    last_bclk_rise = t_cyc;
  end
  int prev_lrck_t = -1;
  always @(lrck) begin
    if (prev_lrck_t >= 0 && reqs > 1) begin
      checks++;
      if (t_cyc - prev_lrck_t != 384) begin
        failures++; $display("FAIL lrck half %0d cycles", t_cyc - prev_lrck_t);
      end
    end
    prev_lrck_t = t_cyc;
    last_lrck = t_cyc;
  end

  // Request checks.
  always @(posedge clk) begin
    if (audio_req) req_len++;
    else if (req_len != 0) begin
      checks++;
      if (reqs > 1 && req_len != 2) begin failures++; $display("FAIL request %0d cycles", req_len); end
      req_len = 0;
    end
  end
  always @(posedge audio_req) begin
    reqs++;
    if (reqs > 1) begin  // the first half after reset was not a full word
      checks++;
      if (data_out !== (lrck ? word_low : word_high)) begin
        failures++;
        $display("FAIL req %0d lrck=%0b got %h expected %h", reqs, lrck, data_out,
                 lrck ? word_low : word_high);
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (reqs == 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
