// scaling_accumulator: the shift-and-add (+/-) accumulator that turns the
// per-bit partial sums of a distributed-arithmetic filter into one output.
//
// Bit positions arrive LSB first, one per cycle, each with its tag. For word
// bit b the partial sum s_b is added with weight 2^b, and for the sign bit
// (tag.last, b = W-1) it is subtracted, which is the two's-complement rule
// y = -2^(W-1) s_(W-1) + sum_(b<W-1) 2^b s_b. The weighting is done by shifting
// the accumulator right by one before each add and adding s_b at weight
// 2^(W-1): acc <= (acc >>> 1) +/- (s_b << (W-1)). This is exact, because
// every bit shifted out is zero. tag.first starts from zero instead of the old
// accumulator. On the cycle after the last bit, y holds the result (registered,
// the output register) and y_valid pulses for one cycle; y keeps its value
// until the next result.
//
// LSB-first accumulation with a subtracted sign-bit term follows the method;
// the right-shifting form and the separate output register are this design's
// choices.
module scaling_accumulator
  import fir_pkg::*;
#(
  parameter int unsigned IN_W = 16,
  parameter int unsigned W    = 13,
  localparam int unsigned OUT_W = IN_W + W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  s,
  input  bit_tag_t                tag,
  output logic signed [OUT_W-1:0] y,
  output logic                    y_valid
);

  localparam int unsigned ACC_W = OUT_W + 1;

  logic signed [ACC_W-1:0] acc, acc_base, term, acc_next;

  always_comb begin
    if (tag.first) acc_base = '0;
    else           acc_base = acc >>> 1;
    term = ACC_W'(s) <<< (W-1);
    if (tag.last) acc_next = acc_base - term;
    else          acc_next = acc_base + term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (tag.valid) begin
        acc <= acc_next;
        if (tag.last) begin
          y       <= OUT_W'(acc_next);
          y_valid <= 1'b1;
        end
      end
    end
  end

endmodule
