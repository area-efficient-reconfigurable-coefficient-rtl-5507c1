// tb_coef_buffer: checks the reset contents and the changed flag after reset,
// then random coefficient writes against a shift model: the stored set, the
// flag set by a write that alters the set, not set by a write that leaves it
// as it was, cleared by clear, and kept when a change meets a clear.
module tb_coef_buffer;
  localparam int NC = 20, CW = 8;
  localparam int INIT [NC] = fir_pkg::DDA_H;
  logic clk = 0, rst_n = 0, coef_valid = 0, clear = 0;
  logic signed [CW-1:0] coef_in = '0;
  logic signed [CW-1:0] h [NC];
  logic changed;
  int checks = 0, failures = 0;
  int model [NC];
  bit mchanged;
  int same_writes = 0, diff_writes = 0, collisions = 0;

  coef_buffer #(.NCOEF(NC), .COEF_W(CW), .INIT(INIT)) dut (.*);

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
    bit differs;
    int nxt [NC];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NC; k++) model[k] = INIT[k];
    mchanged = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      for (int k = 0; k < NC; k++) chk(int'(h[k]) == model[k], "coefficient");
      chk(changed == mchanged, "changed flag");
      coef_valid = ($urandom_range(0, 1) == 1);
      // in half of the phases every write is the same value: once the buffer
      // is full of it, such writes change nothing
      if (n % 100 < 50) coef_in = CW'(5);
      else              coef_in = CW'($urandom);
      clear = ($urandom_range(0, 3) == 0);
      for (int k = 0; k < NC-1; k++) nxt[k] = model[k+1];
      nxt[NC-1] = int'(coef_in);
      differs = 0;
      for (int k = 0; k < NC; k++) if (nxt[k] != model[k]) differs = 1;
      @(posedge clk);
      if (coef_valid) begin
        if (differs) diff_writes++; else same_writes++;
        if (differs && clear) collisions++;
        model = nxt;
      end
      if (coef_valid && differs) mchanged = 1;
      else if (clear)            mchanged = 0;
    end
    chk(same_writes > 0 && diff_writes > 0 && collisions > 0, "cases not reached");
    $display("same=%0d diff=%0d collisions=%0d", same_writes, diff_writes, collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
