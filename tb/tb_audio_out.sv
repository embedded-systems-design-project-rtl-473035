// tb_audio_out: self-checking test of the DAC serial transmitter.
//
// A model of the codec's DAC samples DACDAT at each BCLK rising edge and collects the 16
// bits that follow each LRCK edge. BCLK comes from a second clock generator run in step
// with the transmitter, as in the full design where the receiver's generator drives the
// BCLK pin. Phase 1 answers each request with a random word and checks it is the next
// word sent. Phase 2 turns on the test tone after a reset and checks the tone sequence:
// each step sent in both halves of a frame, values 0, 0x10b4, ..., 0x7fff, ..., 0xef4b.
module tb_audio_out;
  import effects_pkg::*;

  logic clk = 0, rst_n = 0, ce = 0, test_mode = 0;
  sample_t data = '0;
  logic audio_req, lrck, dacdat;
  logic bclk, lrck2, e1, e2, e3;
  int checks = 0, failures = 0;

  audio_out dut (.*);
  codec_clkgen u_bclk (.clk, .rst_n, .ce, .lrck(lrck2), .bclk, .lrck_edge(e1),
                       .bclk_rise(e2), .bclk_fall(e3));

  always #5 clk = ~clk;
  always @(posedge clk) ce <= rst_n ? ~ce : 1'b0;

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] tone_ref(int k);
    real r;
    if (k > 24) return ~tone_ref(48 - k);
    r = 32767.0 * $sin(2.0 * 3.14159265358979323846 * k / 48.0);
    return 16'($rtoi($floor(r + 1.0e-9)));
  endfunction

  // DAC model: collect bits after each LRCK edge.
  logic [15:0] rx;
  int nbits = 0, words = 0;
  logic [15:0] got_words[$];
  logic lrck_q = 0, bclk_q = 0;
  always @(posedge clk) begin
    #1;
    if (!rst_n) nbits = 16;  // idle until the first LRCK edge
    else if (lrck !== lrck_q) nbits = 0;
    else if (!bclk_q && bclk && nbits < 16) begin
      rx = {rx[14:0], dacdat};
      nbits++;
      if (nbits == 16) got_words.push_back(rx);
    end
    lrck_q = lrck;
    bclk_q = bclk;
  end

  // Phase 1 source: a new random word at each request.
  logic [15:0] sent[$];
  int reqs = 0;
  always @(posedge audio_req) begin
    reqs++;
    if (!test_mode) begin
      data = sample_t'($urandom);
      sent.push_back(data);
    end
  end

  initial begin
    logic [15:0] w, e;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // Phase 1.
    wait (got_words.size() == 200);
    // The first word was loaded before any request; drop it.
    void'(got_words.pop_front());
    while (got_words.size() > 0 && sent.size() > 0) begin
      w = got_words.pop_front();
      e = sent.pop_front();
      checks++;
      if (w !== e) begin failures++; $display("FAIL word got %h expected %h", w, e); end
    end
    // Phase 2: test tone from reset.
    @(negedge clk);
    rst_n = 0; test_mode = 1;
    repeat (4) @(posedge clk);
    got_words.delete();
    rst_n = 1;
    wait (got_words.size() == 2 * 100);
    for (int f = 0; f < 100; f++) begin
      for (int h = 0; h < 2; h++) begin
        w = got_words.pop_front();
        checks++;
        if (w !== tone_ref(f % 48)) begin
          failures++; $display("FAIL tone frame %0d half %0d got %h expected %h", f, h, w,
                               tone_ref(f % 48));
        end
      end
    end
    checks++;
    if (tone_ref(1) !== 16'h10b4 || tone_ref(12) !== 16'h7fff || tone_ref(47) !== 16'hef4b
        || tone_ref(36) !== 16'h8000 || tone_ref(24) !== 16'h0000) begin
      failures++; $display("FAIL tone reference spot values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
