// tb_scaling_accumulator: feeds random per-bit sums s_0 .. s_(W-1), LSB first
// and with random idle cycles inside and between words, and checks the result
// against -2^(W-1) s_(W-1) + sum_(b<W-1) 2^b s_b, computed in 64-bit integers,
// one cycle after the last bit, with a single-cycle y_valid.
module tb_scaling_accumulator;
  import fir_pkg::*;
  localparam int IW = 16, W = 13;
  logic clk = 0, rst_n = 0;
  logic signed [IW-1:0] s = '0;
  bit_tag_t tag = '0;
  logic signed [IW+W-1:0] y;
  logic y_valid;
  int checks = 0, failures = 0, outs = 0;
  longint want;

  scaling_accumulator #(.IN_W(IW), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 150; n++) begin
      want = 0;
      for (int b = 0; b < W; b++) begin
        @(negedge clk);
        if (n > 0 && $urandom_range(0, 3) == 0) begin
          tag = '0;
          s = IW'($urandom);
          @(negedge clk);
        end
        case (n)
          0: s = IW'(2 ** (IW-1) - 1);
          1: s = IW'(-(2 ** (IW-1)));
          default: s = IW'($urandom);
        endcase
        tag.valid = 1'b1;
        tag.first = (b == 0);
        tag.last  = (b == W-1);
        if (b == W-1) want -= longint'(s) <<< b;
        else          want += longint'(s) <<< b;
        checks++;
        if (y_valid) failures++;
      end
      @(negedge clk);
      tag = '0;
      checks++;
      if (!y_valid || longint'(y) != want) begin
        failures++;
        if (failures < 10) $display("word %0d: got %0d want %0d v=%b", n, y, want, y_valid);
      end
      outs++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
