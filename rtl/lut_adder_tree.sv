// lut_adder_tree: pipelined adder tree that sums the outputs of the
// partial-sum LUTs.
//
// N signed inputs are added in pairs over LEVELS = ceil(log2 N) levels, with a
// register after every level (the pipeline registers between the adders of the
// fixed filter's structure). With the four LUTs of the fixed filter this is two
// adder levels, so the sum appears two cycles after its inputs; with five LUTs
// it is three levels and three cycles. An odd operand at a level is passed on
// with a zero partner. The output is IN_W + LEVELS bits, wide enough that no
// sum overflows. All registers reset to zero.
//
// The registered two-level tree for four LUTs follows the method; the
// generalisation to other LUT counts is this design's own.
module lut_adder_tree #(
  parameter int unsigned N    = 4,
  parameter int unsigned IN_W = 14,
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned OUT_W  = IN_W + LEVELS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  din [N],
  output logic signed [OUT_W-1:0] sum
);

  localparam int unsigned LEAVES = 2 ** LEVELS;

  // stage[l] holds the LEAVES >> l partial sums after level l
  // (stage[0] is the widened, zero-padded input).
  logic signed [OUT_W-1:0] stage [LEVELS+1][LEAVES];

  always_comb begin
    for (int i = 0; i < LEAVES; i++) begin
      if (i < N) stage[0][i] = OUT_W'(din[i]);
      else       stage[0][i] = '0;
    end
  end

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < LEAVES; i++) stage[l][i] <= '0;
      end else begin
        for (int i = 0; i < (LEAVES >> l); i++)
          stage[l][i] <= stage[l-1][2*i] + stage[l-1][2*i+1];
        for (int i = (LEAVES >> l); i < LEAVES; i++)
          stage[l][i] <= '0;
      end
    end
  end

  assign sum = stage[LEVELS][0];

endmodule
