// vibrato: periodic pitch wobble made by a sine-modulated delay.
//
// With vibrato_enable high, each sample (data_enable pulse) goes into a variable_delay
// core and data_out is the sample written d[n] samples earlier, d[n] swinging around
// 1633 - (2^(5+amp)-1) by +/- 255>>(4-amp) at a rate of f_sample/(1500*(delay_freq+1)).
// The changing delay is heard as a change of pitch. data_ready pulses 5 cycles after
// data_enable. With vibrato_enable low the sample is passed on unchanged one cycle after
// data_enable and the delay line is left alone.
//
// Interface: data_enable is a one-cycle pulse per sample; data_out is valid while
// data_ready pulses and holds until the next sample. Samples must be at least 6 cycles
// apart.
//
// The effect, its delay law and its bypass follow the original design; the cycle count
// is this design's own.
module vibrato
  import effects_pkg::*;
#(
  parameter int DEPTH     = DELAY_DEPTH,
  parameter int TABLE_LEN = SINE_LEN
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       data_enable,
  input  logic       vibrato_enable,
  input  logic [2:0] delay_amp,
  input  logic [3:0] delay_freq,
  input  sample_t    data_in,
  output logic       data_ready,
  output sample_t    data_out
);

  logic    vd_done, vd_busy;
  sample_t vd_delayed, vd_dry;
  logic    bypass_ready;
  sample_t bypass_data;

  variable_delay #(.DEPTH(DEPTH), .TABLE_LEN(TABLE_LEN)) u_delay (
    .clk, .rst_n,
    .start(data_enable && vibrato_enable),
    .sample_in(data_in),
    .delay_amp, .delay_freq,
    .done(vd_done), .delayed(vd_delayed), .dry(vd_dry), .busy(vd_busy)
  );

  // Bypass register: used when the effect is off.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bypass_ready <= 1'b0;
      bypass_data  <= '0;
    end else begin
      bypass_ready <= data_enable && !vibrato_enable;
      if (data_enable && !vibrato_enable) bypass_data <= data_in;
    end
  end

  // The output follows whichever path produced the last sample.
  logic use_delay;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) use_delay <= 1'b0;
    else if (vd_done) use_delay <= 1'b1;
    else if (bypass_ready) use_delay <= 1'b0;
  end

  assign data_ready = vd_done | bypass_ready;
  assign data_out   = vd_done ? vd_delayed : bypass_ready ? bypass_data
                    : (use_delay ? vd_delayed : bypass_data);

endmodule
