// variable_delay: sine-modulated delay line, the common core of vibrato and chorus.
//
// Every input sample is written into a circular buffer of DEPTH entries and the sample
// written d[n] samples earlier is read back, where
//     d[n] = DEPTH - (2^(5+amp) - 1) + A*sin[k]
// and A*sin[k] is the sine table entry k scaled by the amplitude code amp (peak
// 255 >> (4-amp)). The sine index k advances by one every delay_freq+1 samples and wraps
// after the last table entry, so the delay swings around its centre at
// f_sample / (1500*(delay_freq+1)). d[n] always lies in 1..DEPTH-1. Until d[n] samples
// have been written, the entry read back was never written and delayed is 0 instead
// (a saturating count of written samples decides this), so start-up is silent whatever
// the RAM holds after power-up.
//
// Timing (clk cycles after the cycle in which start is high):
//   1  sample written at the write pointer, sine entry requested, LFO advanced
//   2  read address = write pointer - d[n] (+DEPTH when negative)
//   3  RAM read
//   5  done pulses for one cycle; delayed and dry hold their values until the next sample
// busy is high from the start cycle until done. start must not come while busy.
//
// The buffer size, the delay formula, the subtract-then-add-DEPTH wrap and the sine table
// are the original design's. The five-cycle sequence, using d[n] for the same sample
// (rather than the one computed a sample earlier), stepping the LFO only through its
// divider and the silent start-up are this design's choices.
module variable_delay
  import effects_pkg::*;
#(
  parameter int DEPTH     = DELAY_DEPTH,
  parameter int TABLE_LEN = SINE_LEN
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  sample_t    sample_in,
  input  logic [2:0] delay_amp,
  input  logic [3:0] delay_freq,
  output logic       done,
  output sample_t    delayed,
  output sample_t    dry,
  output logic       busy
);

  localparam int AW = $clog2(DEPTH);

  typedef enum logic [2:0] {S_IDLE, S_WRITE, S_ADDR, S_READ, S_OUT} state_e;
  state_e state;

  logic [AW-1:0]      wr_ptr;
  logic [AW-1:0]      rd_ptr;
  logic [SINE_AW-1:0] lfo_idx;
  logic [3:0]         lfo_cnt;
  logic [2:0]         amp_q;
  logic [AW-1:0]      fill_cnt;   // samples written so far, saturating at DEPTH-1
  logic               rd_blank;   // the entry d samples back was never written

  logic               ram_we, ram_re;
  logic [AW-1:0]      ram_addr;
  sample_t            ram_q;
  logic               sine_req;
  sine_t              sine_val;

  // Read address: wr_ptr - d, brought back into 0..DEPTH-1.
  logic signed [12:0] d_now;
  logic signed [13:0] rd_calc;
  always_comb begin
    d_now    = $signed({1'b0, delay_base(amp_q)}) + 13'(sine_val);
    rd_calc = $signed({3'b000, wr_ptr}) - 14'(d_now);
    if (rd_calc < 0) rd_calc = rd_calc + 14'(DEPTH);
  end

  always_comb begin
    ram_we   = (state == S_WRITE);
    ram_re   = (state == S_READ);
    ram_addr = (state == S_READ) ? rd_ptr : wr_ptr;
    sine_req = (state == S_WRITE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      lfo_idx <= '0;
      lfo_cnt <= '0;
      amp_q   <= '0;
      fill_cnt <= '0;
      rd_blank <= 1'b0;
      dry     <= '0;
      delayed <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          dry   <= sample_in;
          amp_q <= delay_amp;
          state <= S_WRITE;
        end
        S_WRITE: begin
          // The sine entry for this sample is looked up now; step the LFO for the next.
          if (lfo_cnt >= delay_freq) begin
            lfo_cnt <= '0;
            lfo_idx <= (int'(lfo_idx) == TABLE_LEN - 1) ? '0 : lfo_idx + 1'b1;
          end else begin
            lfo_cnt <= lfo_cnt + 1'b1;
          end
          state <= S_ADDR;
        end
        S_ADDR: begin
          rd_ptr   <= AW'(rd_calc);
          rd_blank <= (d_now > $signed({2'b00, fill_cnt}));
          state  <= S_READ;
        end
        S_READ: state <= S_OUT;
        S_OUT: begin
          delayed <= rd_blank ? '0 : ram_q;
          if (int'(fill_cnt) != DEPTH - 1) fill_cnt <= fill_cnt + 1'b1;
          done    <= 1'b1;
          wr_ptr  <= (int'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  sine_table #(.TABLE_LEN(TABLE_LEN)) u_sine (
    .clk, .rst_n,
    .data_request(sine_req),
    .amplitude(amp_q),
    .addr(lfo_idx),
    .data_out(sine_val)
  );

  delay_ram #(.DEPTH(DEPTH), .WIDTH(SAMPLE_W), .AW(AW)) u_ram (
    .clk,
    .we(ram_we), .re(ram_re), .addr(ram_addr),
    .data_in(dry), .data_out(ram_q)
  );

  // Handshake rule: a new sample may only start when the previous one is finished.
  always_ff @(posedge clk)
    if (busy)
      a_no_start_while_busy: assert (!start)
        else $error("variable_delay: new sample while the previous one is in progress");

endmodule
