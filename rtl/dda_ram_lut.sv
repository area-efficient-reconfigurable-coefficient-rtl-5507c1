// dda_ram_lut: one writable partial-sum look-up table of the reconfigurable
// (dynamic distributed-arithmetic) filter.
//
// A 16-entry RAM with one write port and one read port. The read is
// synchronous: data shows entry addr one cycle later, and this output
// register is the first pipeline register level of the filter, as in the
// fixed-coefficient filter. Entry a is meant to hold the sum of the
// coefficients whose address bit is set (see lut_updater, which writes it).
// The memory itself is not reset; its contents are written by the updater
// after reset, before the filter reads it.
//
// A rewritable LUT follows the method; the RAM organisation (one write and
// one synchronous read port) is this design's choice.
module dda_ram_lut
  import fir_pkg::*;
#(
  parameter int unsigned LUT_W = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [LUT_IN-1:0]        waddr,
  input  logic signed [LUT_W-1:0]  wdata,
  input  logic [LUT_IN-1:0]        addr,
  output logic signed [LUT_W-1:0]  data
);

  localparam int unsigned DEPTH = 2 ** LUT_IN;

  logic signed [LUT_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data <= '0;
    else        data <= mem[addr];
  end

endmodule
