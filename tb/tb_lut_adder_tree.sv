// tb_lut_adder_tree: two trees, four inputs (two levels, the fixed filter) and
// five inputs (three levels, the reconfigurable filter). Random inputs change
// every cycle; each sum must appear exactly LEVELS cycles later.
module tb_lut_adder_tree;
  localparam int IW = 10;
  logic clk = 0, rst_n = 0;
  logic signed [IW-1:0] d4 [4], d5 [5];
  logic signed [IW+1:0] s4;
  logic signed [IW+2:0] s5;
  int checks = 0, failures = 0;
  int hist4 [$], hist5 [$];

  lut_adder_tree #(.N(4), .IN_W(IW)) dut4 (.clk, .rst_n, .din(d4), .sum(s4));
  lut_adder_tree #(.N(5), .IN_W(IW)) dut5 (.clk, .rst_n, .din(d5), .sum(s5));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a4, a5;
    for (int i = 0; i < 4; i++) d4[i] = '0;
    for (int i = 0; i < 5; i++) d5[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      a4 = 0; a5 = 0;
      for (int i = 0; i < 4; i++) begin
        d4[i] = (n == 0) ? IW'(-(2 ** (IW-1))) : IW'($urandom);
        a4 += int'(d4[i]);
      end
      for (int i = 0; i < 5; i++) begin
        d5[i] = (n == 1) ? IW'(-(2 ** (IW-1))) : IW'($urandom);
        a5 += int'(d5[i]);
      end
      hist4.push_back(a4);
      hist5.push_back(a5);
      @(posedge clk);
      #1;
      if (hist4.size() == 2) begin
        checks++;
        if (int'(s4) != hist4.pop_front()) failures++;
      end
      if (hist5.size() == 3) begin
        checks++;
        if (int'(s5) != hist5.pop_front()) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
