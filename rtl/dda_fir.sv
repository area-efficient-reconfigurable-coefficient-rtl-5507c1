// dda_fir: symmetric FIR filter with reloadable coefficients, in dynamic
// distributed arithmetic (DDA).
//
// The datapath is the bit-serial distributed-arithmetic one of da_fir (tap
// delay line as input buffer, pair pre-adder, bit serializer, TAPS/8 four-input
// LUTs, pipelined adder tree, scaling accumulator with output register), but
// the LUTs are RAMs. A coefficient buffer takes new coefficients as a stream;
// when they change, the LUT updater rewrites all LUTs from them (16 cycles) and
// the filter then continues with the new response. No multiplier is used for
// either the filtering or the LUT contents, only adders.
//
// Coefficient reload: each cycle with coef_valid high shifts coef_in into the
// buffer (write h[0] first, h[TAPS/2-1] last; h[TAPS-1-k] = h[k]). While a
// change is pending or the LUTs are being rewritten (lut_updating), no new
// pre-added word set enters the serializer, so in_ready stays low once a sample
// is waiting; a word set already being serialized finishes with the old
// coefficients, and the rewrite starts once the serializer is empty and no
// coefficient is written in that cycle, so a burst of writes costs one pass
// (a write during a pass forces another one). After
// reset the buffer holds COEF_INIT and the LUTs are built from it first
// (in_ready falls after the first sample until that pass is over).
//
// Interface and timing otherwise as da_fir: valid/ready sample input, one
// out_valid pulse per output, exact full-precision sum. A sample takes
// W = DATA_W+1 cycles (5 with the default 4-bit input), the n+1 cycles of an
// n-bit input for a symmetric filter. Latency without a rewrite is
// W + LEVELS + 3 cycles from the sample being taken to out_valid (11 with the
// default five LUTs and three adder levels).
//
// The 40 taps, the 4-bit input and the 8-bit coefficients are read from the
// published simulation of this filter; the serial coefficient port, the
// hold-and-rewrite policy and reset behaviour are this design's own.
module dda_fir
  import fir_pkg::*;
#(
  parameter int unsigned TAPS   = 40,
  parameter int unsigned DATA_W = 4,
  parameter int unsigned COEF_W = 8,
  parameter int          COEF_INIT [TAPS/2] = fir_pkg::DDA_H,
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
  input  logic                     coef_valid,
  input  logic signed [COEF_W-1:0] coef_in,
  output logic                     lut_updating,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_data
);

  logic signed [DATA_W-1:0] x [TAPS];
  logic signed [W-1:0]      y [PAIRS];
  logic [PAIRS-1:0]         bits;
  bit_tag_t                 ser_tag;
  logic                     ser_ready;
  logic                     load_pending;
  logic                     accept, load, hold;
  logic signed [COEF_W-1:0] h [PAIRS];
  logic                     coef_changed;
  logic                     upd_start, upd_busy;
  logic                     lut_we;
  logic [LUT_IN-1:0]        lut_waddr;
  logic signed [LUT_W-1:0]  lut_wdata [NLUT];
  logic signed [LUT_W-1:0]  lut_q [NLUT];
  logic signed [SUM_W-1:0]  bit_sum;
  bit_tag_t                 tag_pipe [LEVELS+1];

  assign hold      = coef_changed || upd_busy;
  assign in_ready  = !load_pending;
  assign accept    = in_valid && in_ready;
  assign load      = load_pending && ser_ready && !hold;
  // Rewrite only when no bit of a word set is still addressing the LUTs, and
  // not while coefficients are still arriving (a burst of writes costs one pass).
  assign upd_start = coef_changed && !upd_busy && !ser_tag.valid && !coef_valid;
  assign lut_updating = upd_busy;

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

  coef_buffer #(.NCOEF(PAIRS), .COEF_W(COEF_W), .INIT(COEF_INIT)) u_coef_buffer (
    .clk, .rst_n, .coef_valid, .coef_in, .clear(upd_start), .h, .changed(coef_changed)
  );

  lut_updater #(.NCOEF(PAIRS), .COEF_W(COEF_W)) u_updater (
    .clk, .rst_n, .start(upd_start), .h, .busy(upd_busy), .done(),
    .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata)
  );

  for (genvar g = 0; g < NLUT; g++) begin : g_lut
    dda_ram_lut #(.LUT_W(LUT_W)) u_lut (
      .clk, .rst_n, .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata[g]),
      .addr(bits[LUT_IN*g +: LUT_IN]), .data(lut_q[g])
    );
  end

  lut_adder_tree #(.N(NLUT), .IN_W(LUT_W)) u_tree (
    .clk, .rst_n, .din(lut_q), .sum(bit_sum)
  );

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

  // A LUT may only be rewritten while no word set reads it.
  a_no_read_during_write: assert property (@(posedge clk) disable iff (!rst_n)
    lut_we |-> !ser_tag.valid);

endmodule
