// effector_regs: configuration registers of the effects, written by the CPU over Avalon.
//
// Twenty 16-bit registers at consecutive Avalon word addresses (byte offset = 4 x word):
//    0 LVOL   1 RVOL   2 LDIS_EN   3 LDIS_CLIP   4 RDIS_EN   5 RDIS_CLIP
//    6 LVIB_EN  7 LVIB_AMP  8 LVIB_FREQ   9 RVIB_EN 10 RVIB_AMP 11 RVIB_FREQ
//   12 LCHO_EN 13 LCHO_AMP 14 LCHO_FREQ 15 LCHO_MIX
//   16 RCHO_EN 17 RCHO_AMP 18 RCHO_FREQ 19 RCHO_MIX
// Each register keeps only the bits its user needs (enable 1, clip 16, amp 3, freq 4,
// mix 4, volume 7) and reads back zero-extended; other addresses read 0 and ignore
// writes. A write to LVOL or RVOL also pulses vol_valid for that channel, which makes
// the codec configuration send the new volume. Reset values: volume 121, clip 256, amp 4,
// freq 0, mix 8, every effect off.
//
// Interface: Avalon-MM slave, no wait states; writes take effect at the clock edge;
// readdata is combinational from address (read latency 0). Index 0 of cfg, vol_valid and
// vol_data is the left channel, index 1 the right.
//
// The register order and reset values follow the original control program; widths,
// read-back and the read timing are this design's choices.
module effector_regs
  import effects_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [6:0]            address,
  input  logic                  write,
  input  logic                  read,
  input  logic [15:0]           writedata,
  output logic [15:0]           readdata,
  output effect_cfg_t [1:0]     cfg,
  output logic [1:0]            vol_valid,
  output logic [1:0][6:0]       vol_data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg       <= {CFG_RESET, CFG_RESET};
      vol_data  <= {VOL_RESET, VOL_RESET};
      vol_valid <= '0;
    end else begin
      vol_valid <= '0;
      if (write) begin
        unique case (address)
          REG_LVOL:      begin vol_data[0] <= writedata[6:0]; vol_valid[0] <= 1'b1; end
          REG_RVOL:      begin vol_data[1] <= writedata[6:0]; vol_valid[1] <= 1'b1; end
          REG_LDIS_EN:   cfg[0].dis_en   <= writedata[0];
          REG_LDIS_CLIP: cfg[0].dis_clip <= writedata;
          REG_RDIS_EN:   cfg[1].dis_en   <= writedata[0];
          REG_RDIS_CLIP: cfg[1].dis_clip <= writedata;
          REG_LVIB_EN:   cfg[0].vib_en   <= writedata[0];
          REG_LVIB_AMP:  cfg[0].vib_amp  <= writedata[2:0];
          REG_LVIB_FREQ: cfg[0].vib_freq <= writedata[3:0];
          REG_RVIB_EN:   cfg[1].vib_en   <= writedata[0];
          REG_RVIB_AMP:  cfg[1].vib_amp  <= writedata[2:0];
          REG_RVIB_FREQ: cfg[1].vib_freq <= writedata[3:0];
          REG_LCHO_EN:   cfg[0].cho_en   <= writedata[0];
          REG_LCHO_AMP:  cfg[0].cho_amp  <= writedata[2:0];
          REG_LCHO_FREQ: cfg[0].cho_freq <= writedata[3:0];
          REG_LCHO_MIX:  cfg[0].cho_mix  <= writedata[3:0];
          REG_RCHO_EN:   cfg[1].cho_en   <= writedata[0];
          REG_RCHO_AMP:  cfg[1].cho_amp  <= writedata[2:0];
          REG_RCHO_FREQ: cfg[1].cho_freq <= writedata[3:0];
          REG_RCHO_MIX:  cfg[1].cho_mix  <= writedata[3:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    readdata = '0;
    if (read) begin
      unique case (address)
        REG_LVOL:      readdata = 16'(vol_data[0]);
        REG_RVOL:      readdata = 16'(vol_data[1]);
        REG_LDIS_EN:   readdata = 16'(cfg[0].dis_en);
        REG_LDIS_CLIP: readdata = cfg[0].dis_clip;
        REG_RDIS_EN:   readdata = 16'(cfg[1].dis_en);
        REG_RDIS_CLIP: readdata = cfg[1].dis_clip;
        REG_LVIB_EN:   readdata = 16'(cfg[0].vib_en);
        REG_LVIB_AMP:  readdata = 16'(cfg[0].vib_amp);
        REG_LVIB_FREQ: readdata = 16'(cfg[0].vib_freq);
        REG_RVIB_EN:   readdata = 16'(cfg[1].vib_en);
        REG_RVIB_AMP:  readdata = 16'(cfg[1].vib_amp);
        REG_RVIB_FREQ: readdata = 16'(cfg[1].vib_freq);
        REG_LCHO_EN:   readdata = 16'(cfg[0].cho_en);
        REG_LCHO_AMP:  readdata = 16'(cfg[0].cho_amp);
        REG_LCHO_FREQ: readdata = 16'(cfg[0].cho_freq);
        REG_LCHO_MIX:  readdata = 16'(cfg[0].cho_mix);
        REG_RCHO_EN:   readdata = 16'(cfg[1].cho_en);
        REG_RCHO_AMP:  readdata = 16'(cfg[1].cho_amp);
        REG_RCHO_FREQ: readdata = 16'(cfg[1].cho_freq);
        REG_RCHO_MIX:  readdata = 16'(cfg[1].cho_mix);
        default:       readdata = '0;
      endcase
    end
  end

endmodule
