// symmetric_preadd: the pre-treatment stage of a symmetric FIR filter.
//
// With even-symmetric coefficients h[k] = h[TAPS-1-k], the two samples that
// share a coefficient are added first, y[i] = x[i] + x[TAPS-1-i] for
// i = 0 .. TAPS/2-1, which halves the number of words the distributed-arithmetic
// LUTs must see. Each sum is one bit wider than a sample (12 -> 13 bits in the
// fixed filter), so it cannot overflow. Purely combinational; TAPS must be
// even, as in both filters of this design.
//
// The pairing rule and the one-bit growth follow the method; keeping the
// stage combinational (the serializer registers it) is this design's choice.
module symmetric_preadd #(
  parameter int unsigned TAPS   = 32,
  parameter int unsigned DATA_W = 12
) (
  input  logic signed [DATA_W-1:0] x [TAPS],
  output logic signed [DATA_W:0]   y [TAPS/2]
);

  always_comb begin
    for (int i = 0; i < TAPS/2; i++)
      y[i] = (DATA_W+1)'(x[i]) + (DATA_W+1)'(x[TAPS-1-i]);
  end

endmodule
