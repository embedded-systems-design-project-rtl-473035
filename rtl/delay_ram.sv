// delay_ram: sample history of one modulated-delay effect.
//
// A DEPTH x WIDTH single-port synchronous RAM. A write stores data_in at addr when we is
// high; a read (re high) returns the word at addr on data_out after the clock edge, and
// data_out holds it until the next read. Writing and reading in the same cycle is not
// used by the design. The contents after power-up are not relied on: the user of the RAM
// never returns an entry it has not written.
//
// Size and port set (we, re, 11-bit address, 16-bit data) are the original design's.
module delay_ram #(
  parameter int DEPTH = 1633,
  parameter int WIDTH = 16,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic             re,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && int'(addr) < DEPTH) mem[addr] <= data_in;
    if (re) data_out <= (int'(addr) < DEPTH) ? mem[addr] : '0;
  end

endmodule
