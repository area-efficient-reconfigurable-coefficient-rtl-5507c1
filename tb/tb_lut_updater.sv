// tb_lut_updater: starts passes with random coefficient sets, collects the 16
// writes of each pass into model LUTs and checks every entry of every LUT
// against sum_j a[j]*h[4g+j], the busy length of 16 cycles, the done pulse and
// that a start while busy is ignored.
module tb_lut_updater;
  localparam int NC = 20, CW = 8, NL = NC / 4, LW = CW + 2;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [CW-1:0] h [NC];
  logic busy, done, we;
  logic [3:0] waddr;
  logic signed [LW-1:0] wdata [NL];
  int checks = 0, failures = 0;
  int got [NL][16];
  int written [16];

  lut_updater #(.NCOEF(NC), .COEF_W(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && we) begin
    written[waddr]++;
    for (int g = 0; g < NL; g++) got[g][waddr] = int'(wdata[g]);
  end

  initial begin
    int want, busy_cycles;
    for (int k = 0; k < NC; k++) h[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 20; pass++) begin
      for (int k = 0; k < NC; k++)
        h[k] = (pass == 0) ? CW'(-(2 ** (CW-1))) : CW'($urandom);
      for (int a = 0; a < 16; a++) written[a] = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = (pass % 2 == 1);   // a start while busy must be ignored
      busy_cycles = 0;
      while (busy) begin
        busy_cycles++;
        @(negedge clk);
        start = 0;
        if (busy_cycles > 40) break;
      end
      checks++;
      if (busy_cycles != 16 || !done) begin
        failures++;
        $display("pass %0d: busy %0d cycles, done=%b", pass, busy_cycles, done);
      end
      for (int a = 0; a < 16; a++) begin
        checks++;
        if (written[a] != 1) failures++;
        for (int g = 0; g < NL; g++) begin
          want = 0;
          for (int j = 0; j < 4; j++) if (a[j]) want += int'(h[4*g+j]);
          checks++;
          if (got[g][a] != want) begin
            failures++;
            if (failures < 10) $display("lut %0d[%0d]: got %0d want %0d", g, a, got[g][a], want);
          end
        end
      end
      repeat (2) @(negedge clk);
      checks++;
      if (busy || done) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
