// coef_buffer: coefficient buffer of the reconfigurable (DDA) filter.
//
// Holds the NCOEF distinct coefficients h[0] .. h[NCOEF-1] of a symmetric
// filter (h[TAPS-1-k] = h[k] is implied). Coefficients arrive as a stream like
// the samples: each cycle with coef_valid high, coef_in enters at
// h[NCOEF-1] and every h[k] moves to h[k-1], so after NCOEF writes the first
// value written sits in h[0]. changed is set whenever a write alters the
// stored set (a write that leaves every entry as it was does not set it) and is
// cleared by clear, the LUT updater taking the set; a change in the same cycle
// as clear wins, so no change is lost. After reset the buffer holds INIT and
// changed is set, so the LUTs are built from INIT before the first sample.
//
// A coefficient buffer that triggers a LUT refresh on change follows the
// method; the serial write, the change test and the reset contents are this
// design's own.
module coef_buffer #(
  parameter int unsigned NCOEF  = 20,
  parameter int unsigned COEF_W = 8,
  parameter int          INIT [NCOEF] = fir_pkg::DDA_H
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     coef_valid,
  input  logic signed [COEF_W-1:0] coef_in,
  input  logic                     clear,
  output logic signed [COEF_W-1:0] h [NCOEF],
  output logic                     changed
);

  logic signed [COEF_W-1:0] h_next [NCOEF];
  logic                     differs;

  always_comb begin
    for (int k = 0; k < NCOEF - 1; k++) h_next[k] = h[k+1];
    h_next[NCOEF-1] = coef_in;
    differs = 1'b0;
    for (int k = 0; k < NCOEF; k++)
      if (h_next[k] != h[k]) differs = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NCOEF; k++) h[k] <= COEF_W'(INIT[k]);
      changed <= 1'b1;
    end else begin
      if (coef_valid) h <= h_next;
      if (coef_valid && differs) changed <= 1'b1;
      else if (clear)            changed <= 1'b0;
    end
  end

endmodule
