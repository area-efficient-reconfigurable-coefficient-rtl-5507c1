// tb_bit_serializer: loads random word sets, back to back and with gaps, and
// checks that bit b of every word appears in the b-th cycle after the load
// (LSB first), with first/last tags, and that ready is high exactly when the
// serializer is empty or shows its last bit (one word set per W cycles).
module tb_bit_serializer;
  import fir_pkg::*;
  localparam int WORDS = 16, W = 13;
  logic clk = 0, rst_n = 0, load = 0, ready;
  logic signed [W-1:0] words [WORDS];
  logic [WORDS-1:0] bits;
  bit_tag_t tag;
  int checks = 0, failures = 0;
  logic [W-1:0] cur [WORDS];
  int pos = -1;          // bit position the model expects on the outputs
  int loads = 0, b2b = 0;

  bit_serializer #(.WORDS(WORDS), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t %s", $time, what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < WORDS; i++) words[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      // compare the outputs of this cycle with the model
      chk(tag.valid == (pos >= 0), "valid");
      chk(ready == (pos < 0 || pos == W-1), "ready");
      if (pos >= 0) begin
        chk(tag.first == (pos == 0), "first");
        chk(tag.last == (pos == W-1), "last");
        for (int i = 0; i < WORDS; i++) chk(bits[i] == cur[i][pos], "bit");
      end
      load = ($urandom_range(0, 2) != 0);
      for (int i = 0; i < WORDS; i++) words[i] = W'($urandom);
      @(posedge clk);
      if (load && ready) begin
        loads++;
        if (pos == W-1) b2b++;
        for (int i = 0; i < WORDS; i++) cur[i] = words[i];
        pos = 0;
      end else if (pos >= 0) begin
        pos = (pos == W-1) ? -1 : pos + 1;
      end
    end
    chk(loads > 20 && b2b > 5, "not enough loads / back-to-back loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
