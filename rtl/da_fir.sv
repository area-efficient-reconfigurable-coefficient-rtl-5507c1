// da_fir: fixed-coefficient, symmetric FIR filter in bit-serial distributed
// arithmetic (DA), with a divided LUT and a pipelined adder tree.
//
// Datapath: samples enter the tap delay line (input_buffer); the pre-adder
// forms the TAPS/2 pair sums y[i] = x[i] + x[TAPS-1-i] (DATA_W+1 bits); the
// bit_serializer presents bit b of all pair sums at once, LSB first. Those
// TAPS/2 bits address TAPS/8 four-input ROM LUTs (LUT g takes pair sums
// 4g .. 4g+3 and holds their coefficient partial sums); the LUT outputs are
// registered and summed by a pipelined adder tree, and the scaling accumulator
// weights each bit's sum by 2^b, subtracting the sign bit's. With the default
// four LUTs there are three pipeline register levels (LUT output and two adder
// levels) in front of the accumulator.
//
// Interface: a valid/ready sample input and a one-cycle out_valid pulse per
// output. out_data is the exact filter sum Y[n] = sum_k h[k] x[n-k] with
// h[TAPS-1-k] = h[k], at full precision (no rounding or scaling).
//
// Timing: a new sample is taken every W = DATA_W+1 cycles at most (13 with the
// default 12-bit input). in_ready falls for the cycle after a sample is taken
// and until the serializer has taken the pre-added words, which it does one
// cycle after acceptance or as soon as it has sent the last bit of the previous
// word set. From that load to out_valid is W + LEVELS + 2 cycles, so a sample
// taken while the filter is idle is out W + LEVELS + 3 cycles later (18 by
// default).
//
// The 32-tap, 12-bit-input structure with pre-addition, four LUTs and three
// pipeline register levels follows the method; the coefficient width, the
// default coefficient values, the handshake and reset behaviour are this
// design's own.
module da_fir
  import fir_pkg::*;
#(
  parameter int unsigned TAPS   = 32,
  parameter int unsigned DATA_W = 12,
  parameter int unsigned COEF_W = 12,
  parameter int          COEFS [TAPS/2] = fir_pkg::DA_H,
  localparam int unsigned PAIRS  = TAPS / 2,
  localparam int unsigned W      = DATA_W + 1,
  localparam int unsigned NLUT   = PAIRS / LUT_IN,
  localparam int unsigned LUT_W  = COEF_W + 2,
  localparam int unsigned LEVELS = (NLUT > 1) ? $clog2(NLUT) : 1,
  localparam int unsigned SUM_W  = LUT_W + LEVELS,
  localparam int unsigned OUT_W  = SUM_W + W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_data
);

  logic signed [DATA_W-1:0] x [TAPS];
  logic signed [W-1:0]      y [PAIRS];
  logic [PAIRS-1:0]         bits;
  bit_tag_t                 ser_tag;
  logic                     ser_ready;
  logic                     load_pending;
  logic                     accept, load;
  logic signed [LUT_W-1:0]  lut_q [NLUT];
  logic signed [SUM_W-1:0]  bit_sum;
  bit_tag_t                 tag_pipe [LEVELS+1];

  assign in_ready = !load_pending;
  assign accept   = in_valid && in_ready;
  assign load     = load_pending && ser_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      load_pending <= 1'b0;
    else if (accept) load_pending <= 1'b1;
    else if (load)   load_pending <= 1'b0;
  end

  input_buffer #(.TAPS(TAPS), .DATA_W(DATA_W)) u_input_buffer (
    .clk, .rst_n, .shift_en(accept), .din(in_data), .taps(x)
  );

  symmetric_preadd #(.TAPS(TAPS), .DATA_W(DATA_W)) u_preadd (
    .x(x), .y(y)
  );

  bit_serializer #(.WORDS(PAIRS), .W(W)) u_serializer (
    .clk, .rst_n, .load, .words(y), .ready(ser_ready), .bits, .tag(ser_tag)
  );

  for (genvar g = 0; g < NLUT; g++) begin : g_lut
    da_rom_lut #(
      .COEF_W(COEF_W),
      .H('{COEFS[LUT_IN*g], COEFS[LUT_IN*g+1], COEFS[LUT_IN*g+2], COEFS[LUT_IN*g+3]})
    ) u_lut (
      .clk, .rst_n, .addr(bits[LUT_IN*g +: LUT_IN]), .data(lut_q[g])
    );
  end

  lut_adder_tree #(.N(NLUT), .IN_W(LUT_W)) u_tree (
    .clk, .rst_n, .din(lut_q), .sum(bit_sum)
  );

  // The bit tags follow the data through the LUT register and the tree levels.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= LEVELS; i++) tag_pipe[i] <= '0;
    end else begin
      tag_pipe[0] <= ser_tag;
      for (int i = 1; i <= LEVELS; i++) tag_pipe[i] <= tag_pipe[i-1];
    end
  end

  scaling_accumulator #(.IN_W(SUM_W), .W(W)) u_acc (
    .clk, .rst_n, .s(bit_sum), .tag(tag_pipe[LEVELS]), .y(out_data), .y_valid(out_valid)
  );

endmodule
