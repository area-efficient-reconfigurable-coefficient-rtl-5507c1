// bit_serializer: the parallel-to-serial shift register of a bit-serial
// distributed-arithmetic filter.
//
// On load it captures WORDS words of W bits each. Over the next W cycles it
// presents bit b (b = 0, the LSB, up to W-1, the sign bit) of every word at
// once on bits[], one bit position per cycle; bit i of the bundle belongs to
// word i. tag says which position is shown (first = bit 0, last = bit W-1).
// ready is high when the serializer is empty or shows its last bit, so a load
// in that cycle follows without a gap and a new word set can be taken every W
// cycles, which is the W-cycle rate of the filter (W = input width + 1).
//
// Bit-serial, LSB-first operation follows the method; the tag format and the
// gap-free reload on the last bit are this design's choices.
module bit_serializer
  import fir_pkg::*;
#(
  parameter int unsigned WORDS = 16,
  parameter int unsigned W     = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [W-1:0] words [WORDS],
  output logic                ready,
  output logic [WORDS-1:0]    bits,
  output bit_tag_t            tag
);

  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0]  sh [WORDS];
  logic [CW-1:0] pos;
  logic          active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      pos    <= '0;
      for (int i = 0; i < WORDS; i++) sh[i] <= '0;
    end else if (load && ready) begin
      active <= 1'b1;
      pos    <= '0;
      for (int i = 0; i < WORDS; i++) sh[i] <= words[i];
    end else if (active) begin
      if (pos == CW'(W-1)) begin
        active <= 1'b0;
      end else begin
        pos <= pos + 1'b1;
      end
      for (int i = 0; i < WORDS; i++) sh[i] <= sh[i] >> 1;
    end
  end

  always_comb begin
    for (int i = 0; i < WORDS; i++) bits[i] = sh[i][0];
    tag.valid = active;
    tag.first = active && (pos == '0);
    tag.last  = active && (pos == CW'(W-1));
    ready     = !active || tag.last;
  end

endmodule
