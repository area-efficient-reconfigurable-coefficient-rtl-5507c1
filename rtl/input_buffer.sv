// input_buffer: tap delay line of the FIR filter (the "input buffer" of the
// reconfigurable filter and the sample store in front of the pre-adder).
//
// It holds the latest TAPS samples. When shift_en is high at a clock edge, din
// enters as x[0] (the newest sample) and every x[k] moves to x[k+1]; x[TAPS-1]
// is the oldest. All taps reset to zero. The taps are register outputs, so a
// sample shifted in at edge t is visible on taps[0] in the cycle after t.
//
// The delay line as the filter's input store follows the method; the reset
// to zero and the shift enable are this design's choices.
module input_buffer #(
  parameter int unsigned TAPS   = 32,
  parameter int unsigned DATA_W = 12
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     shift_en,
  input  logic signed [DATA_W-1:0] din,
  output logic signed [DATA_W-1:0] taps [TAPS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) taps[k] <= '0;
    end else if (shift_en) begin
      taps[0] <= din;
      for (int k = 1; k < TAPS; k++) taps[k] <= taps[k-1];
    end
  end

endmodule
