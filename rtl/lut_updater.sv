// lut_updater: rebuilds the partial-sum LUTs of the reconfigurable filter from
// the coefficient buffer.
//
// A start pulse (taken only when idle) begins a pass over the 16 LUT
// addresses, one per cycle: for address a it writes, into every LUT g at once,
// the sum of h[4g+j] over the set bits j of a, the same contents a constant
// table would hold. busy is high for the 16 write cycles, and done pulses in
// the cycle after the last write. The coefficients are read as they are in each
// write cycle; the filter holds them still by not starting while they change
// (a change during a pass marks the set as changed again and forces a new
// pass). NCOEF must be a multiple of four.
//
// Refreshing the LUTs from the coefficient buffer follows the method; how it is
// done (one address per cycle, all LUTs in parallel, adders only) is this
// design's own.
module lut_updater
  import fir_pkg::*;
#(
  parameter int unsigned NCOEF  = 20,
  parameter int unsigned COEF_W = 8,
  localparam int unsigned NLUT  = NCOEF / LUT_IN,
  localparam int unsigned LUT_W = COEF_W + 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [COEF_W-1:0] h [NCOEF],
  output logic                     busy,
  output logic                     done,
  output logic                     we,
  output logic [LUT_IN-1:0]        waddr,
  output logic signed [LUT_W-1:0]  wdata [NLUT]
);

  logic [LUT_IN-1:0] addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      addr_q <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          addr_q <= '0;
        end
      end else begin
        addr_q <= addr_q + 1'b1;
        if (addr_q == '1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  always_comb begin
    we    = busy;
    waddr = addr_q;
    for (int g = 0; g < NLUT; g++) begin
      wdata[g] = '0;
      for (int j = 0; j < LUT_IN; j++)
        if (addr_q[j]) wdata[g] = wdata[g] + LUT_W'(h[LUT_IN*g + j]);
    end
  end

endmodule
