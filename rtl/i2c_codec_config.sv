// i2c_codec_config: sets up the WM8731 codec over I2C and keeps its volume current.
//
// After reset the controller writes the codec's ten set-up registers in order R0..R9:
// line inputs at 0 dB (R0, R1 = 0x017), headphone volume left/right (R2, R3 = the current
// volume, 121 = 0 dB after reset), analogue path DAC-selected with line input and
// microphone muted (R4 = 0x012), digital path plain (R5 = 0), everything powered
// (R6 = 0), slave mode with 16-bit left-justified words (R7 = 0x001), normal mode at
// 48 kHz from a 384 fs master clock (R8 = 0x002), and finally active (R9 = 0x001).
// Afterwards a left_valid or right_valid pulse stores the new 7-bit volume and queues a
// write of R2 or R3; queued writes go out one after another.
//
// Each write is one I2C transaction: START, device address 0x34 (write), then the two
// bytes {reg[6:0], data[8]} and data[7:0], each followed by an acknowledge bit, then
// STOP. A bit takes four quarter periods of I2C_QUARTER clk cycles (SCL low, data set;
// SCL high; SCL high, acknowledge sampled; SCL low). SDA is open drain: sdat_oe = 1 pulls
// it low. A missing acknowledge sets the sticky ack_error; the sequence continues.
//
// The need for this set-up (16-bit, 48 kHz, line input, low gain, slave mode,
// left-justified words) and the volume inputs follow the original design; the register
// values come from the codec's data sheet, and the I2C timing is this design's own.
module i2c_codec_config #(
  parameter int         I2C_QUARTER = 125,
  parameter logic [7:0] DEV_ADDR    = 8'h34
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       left_valid,
  input  logic [6:0] left_data,
  input  logic       right_valid,
  input  logic [6:0] right_data,
  output logic       i2c_sclk,
  output logic       i2c_sdat_oe,
  input  logic       i2c_sdat_i,
  output logic       busy,
  output logic       init_done,
  output logic       ack_error
);

  localparam int NUM_INIT = 10;
  localparam int NBITS    = 27;               // three bytes, each with its acknowledge

  typedef enum logic [1:0] {T_IDLE, T_START, T_BITS, T_STOP} tstate_e;
  tstate_e tstate;

  logic [6:0]  vol_l, vol_r;
  logic        pend_l, pend_r;
  logic [3:0]  init_idx;
  logic [$clog2(I2C_QUARTER)-1:0] qcnt;
  logic        qtick;
  logic [1:0]  phase;
  logic [4:0]  bit_idx;
  logic [NBITS-1:0] frame;
  logic        sda_out;

  // Register number and data of set-up step i.
  function automatic logic [15:0] init_word(input logic [3:0] i, input logic [6:0] vl,
                                            input logic [6:0] vr);
    logic [8:0] d;
    unique case (i)
      4'd0: d = 9'h017;
      4'd1: d = 9'h017;
      4'd2: d = {2'b00, vl};
      4'd3: d = {2'b00, vr};
      4'd4: d = 9'h012;
      4'd5: d = 9'h000;
      4'd6: d = 9'h000;
      4'd7: d = 9'h001;
      4'd8: d = 9'h002;
      default: d = 9'h001;
    endcase
    return {3'b000, i, d};
  endfunction

  function automatic logic [NBITS-1:0] make_frame(input logic [15:0] w);
    return {DEV_ADDR, 1'b1, w[15:8], 1'b1, w[7:0], 1'b1};
  endfunction

  assign qtick = (int'(qcnt) == I2C_QUARTER - 1);
  assign i2c_sdat_oe = !sda_out;
  assign busy = (tstate != T_IDLE);
  assign init_done = (int'(init_idx) == NUM_INIT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate    <= T_IDLE;
      vol_l     <= 7'd121;
      vol_r     <= 7'd121;
      pend_l    <= 1'b0;
      pend_r    <= 1'b0;
      init_idx  <= '0;
      qcnt      <= '0;
      phase     <= '0;
      bit_idx   <= '0;
      frame     <= '0;
      sda_out   <= 1'b1;
      i2c_sclk  <= 1'b1;
      ack_error <= 1'b0;
    end else begin
      if (left_valid)  begin vol_l <= left_data;  pend_l <= 1'b1; end
      if (right_valid) begin vol_r <= right_data; pend_r <= 1'b1; end
      qcnt <= qtick ? '0 : qcnt + 1'b1;

      if (qtick) begin
        unique case (tstate)
          T_IDLE: begin
            sda_out  <= 1'b1;
            i2c_sclk <= 1'b1;
            phase    <= '0;
            if (!init_done) begin
              frame    <= make_frame(init_word(init_idx, vol_l, vol_r));
              init_idx <= init_idx + 1'b1;
              tstate   <= T_START;
            end else if (pend_l && !left_valid) begin
              frame  <= make_frame({7'd2, 2'b00, vol_l});
              pend_l <= 1'b0;
              tstate <= T_START;
            end else if (pend_r && !right_valid) begin
              frame  <= make_frame({7'd3, 2'b00, vol_r});
              pend_r <= 1'b0;
              tstate <= T_START;
            end
          end
          T_START: begin
            // SDA falls while SCL is high, then SCL goes low.
            phase <= phase + 1'b1;
            unique case (phase)
              2'd0: sda_out  <= 1'b0;
              2'd1: i2c_sclk <= 1'b0;
              default: begin
                phase   <= '0;
                bit_idx <= '0;
                tstate  <= T_BITS;
              end
            endcase
          end
          T_BITS: begin
            phase <= phase + 1'b1;
            unique case (phase)
              2'd0: begin i2c_sclk <= 1'b0; sda_out <= frame[NBITS-1 - int'(bit_idx)]; end
              2'd1: i2c_sclk <= 1'b1;
              2'd2: if ((bit_idx % 9) == 5'd8 && i2c_sdat_i) ack_error <= 1'b1;
              default: begin
                i2c_sclk <= 1'b0;
                if (int'(bit_idx) == NBITS - 1) tstate <= T_STOP;
                else bit_idx <= bit_idx + 1'b1;
              end
            endcase
          end
          default: begin // T_STOP: SDA low, SCL up, then SDA rises while SCL is high.
            phase <= phase + 1'b1;
            unique case (phase)
              2'd0: sda_out  <= 1'b0;
              2'd1: i2c_sclk <= 1'b1;
              2'd2: sda_out  <= 1'b1;
              default: tstate <= T_IDLE;
            endcase
          end
        endcase
      end
    end
  end

endmodule
