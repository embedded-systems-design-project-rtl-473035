// tb_effector_regs: self-checking test of the configuration register file.
//
// Keeps a shadow copy of the 20 registers (with the width of each field: 7-bit volumes,
// 1-bit enables, 16-bit clip levels, 3-bit amplitudes, 4-bit frequency and mix codes).
// Checks the reset values by reading every register, then does random writes and reads
// over the whole address range (unused addresses read 0 and writes to them have no
// effect), checks readdata is 0 when read is low, that each settings field appears on
// the right channel's cfg output, and that a volume write gives a one-cycle vol_valid.
module tb_effector_regs;
  import effects_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [6:0] address = '0;
  logic write = 0, read = 0;
  logic [15:0] writedata = '0, readdata;
  effect_cfg_t [1:0] cfg;
  logic [1:0] vol_valid;
  logic [1:0][6:0] vol_data;
  int checks = 0, failures = 0;

  effector_regs dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NREG = 20;
  int width[NREG] = '{7, 7, 1, 16, 1, 16, 1, 3, 4, 1, 3, 4, 1, 3, 4, 4, 1, 3, 4, 4};
  logic [15:0] resetv[NREG] = '{121, 121, 0, 256, 0, 256, 0, 4, 0, 0, 4, 0, 0, 4, 0, 8,
                                0, 4, 0, 8};
  logic [15:0] shadow[NREG];

  function automatic logic [15:0] mask(int w);
    return 16'((32'd1 << w) - 1);
  endfunction

  // Value of register a as seen on the cfg / vol_data outputs.
  function automatic logic [15:0] from_outputs(int a);
    case (a)
      0: return 16'(vol_data[0]);      1: return 16'(vol_data[1]);
      2: return 16'(cfg[0].dis_en);    3: return cfg[0].dis_clip;
      4: return 16'(cfg[1].dis_en);    5: return cfg[1].dis_clip;
      6: return 16'(cfg[0].vib_en);    7: return 16'(cfg[0].vib_amp);
      8: return 16'(cfg[0].vib_freq);  9: return 16'(cfg[1].vib_en);
      10: return 16'(cfg[1].vib_amp);  11: return 16'(cfg[1].vib_freq);
      12: return 16'(cfg[0].cho_en);   13: return 16'(cfg[0].cho_amp);
      14: return 16'(cfg[0].cho_freq); 15: return 16'(cfg[0].cho_mix);
      16: return 16'(cfg[1].cho_en);   17: return 16'(cfg[1].cho_amp);
      18: return 16'(cfg[1].cho_freq); 19: return 16'(cfg[1].cho_mix);
      default: return 16'hxxxx;
    endcase
  endfunction

  task automatic check_read(logic [6:0] a);
    logic [15:0] e;
    @(negedge clk);
    address = a; read = 1;
    #1;
    e = (int'(a) < NREG) ? shadow[a] : 16'h0;
    checks++;
    if (readdata !== e) begin
      failures++; $display("FAIL read addr %0d got %h expected %h", a, readdata, e);
    end
    read = 0;
    #1;
    checks++;
    if (readdata !== 16'h0) begin failures++; $display("FAIL readdata without read"); end
  endtask

  task automatic do_write(logic [6:0] a, logic [15:0] d);
    @(negedge clk);
    address = a; writedata = d; write = 1;
    if (int'(a) < NREG) shadow[a] = d & mask(width[a]);
    @(negedge clk);
    write = 0;
    checks++;
    if (vol_valid !== {a == 7'd1, a == 7'd0}) begin
      failures++; $display("FAIL vol_valid %b after write to %0d", vol_valid, a);
    end
    @(negedge clk);
    checks++;
    if (vol_valid !== 2'b00) begin failures++; $display("FAIL vol_valid longer than one cycle"); end
  endtask

  initial begin
    for (int a = 0; a < NREG; a++) shadow[a] = resetv[a];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 128; a++) check_read(7'(a));
    for (int i = 0; i < 3000; i++) begin
      logic [6:0] a;
      a = ($urandom_range(0, 9) == 0) ? 7'($urandom) : 7'($urandom_range(0, NREG - 1));
      if ($urandom_range(0, 1)) do_write(a, 16'($urandom));
      else check_read(a);
      if (i % 50 == 0) begin
        for (int r = 0; r < NREG; r++) begin
          checks++;
          if (from_outputs(r) !== shadow[r]) begin
            failures++;
            $display("FAIL output of reg %0d is %h expected %h", r, from_outputs(r), shadow[r]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
