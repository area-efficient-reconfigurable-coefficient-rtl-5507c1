// da_rom_lut: one constant partial-sum look-up table of the fixed-coefficient
// distributed-arithmetic filter.
//
// Its four address bits are bit b of four pre-added words; entry a holds
// h[0]*a[0] + h[1]*a[1] + h[2]*a[2] + h[3]*a[3], so entry 0 is 0, entry 1 is
// h[0] and entry 15 is h[0]+h[1]+h[2]+h[3]. The table is computed at
// elaboration from the coefficient parameter H. The output is registered: this
// register is the first of the filter's pipeline register levels, so data
// appears one cycle after its address. Entries are COEF_W+2 bits wide, enough
// for a sum of four COEF_W-bit signed coefficients.
//
// The table contents and the four-input division follow the method; the
// entry width and the reset of the output register are this design's choices.
module da_rom_lut
  import fir_pkg::*;
#(
  parameter int unsigned COEF_W = 12,
  parameter int          H [LUT_IN] = '{1, 2, 4, 8}
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [LUT_IN-1:0]         addr,
  output logic signed [COEF_W+1:0]  data
);

  localparam int unsigned DEPTH = 2 ** LUT_IN;

  function automatic logic signed [COEF_W+1:0] entry(int unsigned a);
    logic signed [COEF_W+1:0] s;
    logic signed [COEF_W-1:0] c;
    s = '0;
    for (int j = 0; j < LUT_IN; j++) begin
      c = COEF_W'(H[j]);
      if (a[j]) s = s + (COEF_W+2)'(c);
    end
    return s;
  endfunction

  logic signed [COEF_W+1:0] table_q [DEPTH];

  always_comb begin
    for (int a = 0; a < DEPTH; a++) table_q[a] = entry(a);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data <= '0;
    else        data <= table_q[addr];
  end

endmodule
