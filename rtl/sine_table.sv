// sine_table: the low-frequency oscillator of the vibrato and chorus delays.
//
// A read-only table holds one full period of a sine in TABLE_LEN entries of 12 bits,
// value(i) = trunc(256*sin(2*pi*i/TABLE_LEN)) limited to +/-PEAK, computed when the design
// is elaborated. On a request the entry at addr is scaled by the delay-amplitude code:
// code 4 gives the entry itself, each lower code halves it (arithmetic shift right by
// 4-code). Codes 5..7 act as 4.
//
// Interface: data_request, addr and amplitude are sampled on a rising clk edge; data_out
// holds the scaled value from the next cycle on, until the next request.
//
// The table length, 12-bit width, peak of 255 and the shift scaling follow the original
// design. Indexing a whole period directly (no quarter-wave folding) follows its table
// listing; treating codes above 4 as 4 and the registered single-cycle lookup are this
// design's choices.
module sine_table
  import effects_pkg::*;
#(
  parameter int TABLE_LEN = SINE_LEN,
  parameter int PEAK      = 255
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               data_request,
  input  logic [2:0]         amplitude,
  input  logic [SINE_AW-1:0] addr,
  output sine_t              data_out
);

  typedef sine_t table_t [TABLE_LEN];

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < TABLE_LEN; i++) begin
      real r;
      int  v;
      r = 256.0 * $sin(2.0 * 3.14159265358979323846 * real'(i) / real'(TABLE_LEN));
      v = int'($rtoi(r));
      if (v > PEAK)  v = PEAK;
      if (v < -PEAK) v = -PEAK;
      t[i] = sine_t'(v);
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  sine_t entry;
  always_comb entry = (int'(addr) < TABLE_LEN) ? TABLE[addr] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data_out <= '0;
    else if (data_request) data_out <= entry >>> (3'd4 - clamp_amp(amplitude));
  end

endmodule
