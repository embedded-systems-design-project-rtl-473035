// ps2_keyboard: PS/2 keyboard receiver with a polled CPU register port.
//
// The keyboard's clock and data lines are brought into the clk domain through two
// flip-flops each. At every falling edge of the PS/2 clock one data bit is shifted in;
// after 11 bits (start 0, eight data bits LSB first, odd parity, stop 1) a frame whose
// start, parity and stop bits are right delivers its byte as the current scan code and
// raises the "code waiting" flag. Bad frames are dropped. If the PS/2 clock stays idle
// for TIMEOUT clk cycles in the middle of a frame, the partial frame is discarded.
//
// CPU port (Avalon-MM slave, no wait states, combinational readdata):
//   word 0  read: 1 when a scan code is waiting, else 0
//   word 1  read: the scan code; reading it clears the waiting flag
// One code is held; a new code overwrites one not yet read.
//
// The two-register polling interface follows the original control program; the frame
// checks, the single holding register and the time-out are this design's choices.
module ps2_keyboard #(
  parameter int TIMEOUT = 65536
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ps2_clk,
  input  logic       ps2_dat,
  input  logic       address,
  input  logic       read,
  output logic [7:0] readdata
);

  logic [1:0]  clk_sync, dat_sync;
  logic        clk_prev;
  logic        fall;
  logic [10:0] shreg;
  logic [3:0]  nbits;
  logic [$clog2(TIMEOUT)-1:0] idle_cnt;
  logic [7:0]  code;
  logic        waiting;
  logic [10:0] frame;
  logic        frame_ok;

  assign fall = clk_prev && !clk_sync[1];
  // The frame as it will stand once the current bit has been shifted in.
  assign frame = {dat_sync[1], shreg[10:1]};
  assign frame_ok = !frame[0] && frame[10] && (^frame[9:1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_sync <= 2'b11;
      dat_sync <= 2'b11;
      clk_prev <= 1'b1;
      shreg    <= '0;
      nbits    <= '0;
      idle_cnt <= '0;
      code     <= '0;
      waiting  <= 1'b0;
    end else begin
      clk_sync <= {clk_sync[0], ps2_clk};
      dat_sync <= {dat_sync[0], ps2_dat};
      clk_prev <= clk_sync[1];

      if (read && address) waiting <= 1'b0;

      if (fall) begin
        idle_cnt <= '0;
        shreg    <= frame;
        if (nbits == 4'd10) begin
          nbits <= '0;
          if (frame_ok) begin
            code    <= frame[8:1];
            waiting <= 1'b1;
          end
        end else begin
          nbits <= nbits + 1'b1;
        end
      end else if (nbits != 0) begin
        if (int'(idle_cnt) == TIMEOUT - 1) begin
          nbits    <= '0;
          idle_cnt <= '0;
        end else begin
          idle_cnt <= idle_cnt + 1'b1;
        end
      end
    end
  end

  always_comb begin
    readdata = '0;
    if (read) readdata = address ? code : {7'b0, waiting};
  end

endmodule
