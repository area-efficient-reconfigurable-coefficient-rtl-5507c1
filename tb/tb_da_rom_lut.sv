// tb_da_rom_lut: reads every address of a constant LUT in random order and
// checks each entry against the partial-sum rule sum_j a[j]*h[j], one cycle
// after the address.
module tb_da_rom_lut;
  localparam int CW = 12;
  localparam int H [4] = '{-261, -387, 670, 2047};
  logic clk = 0, rst_n = 0;
  logic [3:0] addr = '0;
  logic signed [CW+1:0] data;
  int checks = 0, failures = 0;

  da_rom_lut #(.COEF_W(CW), .H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      addr = (n < 16) ? 4'(n) : 4'($urandom);
      want = 0;
      for (int j = 0; j < 4; j++) if (addr[j]) want += H[j];
      @(posedge clk);
      #1;
      checks++;
      if (int'(data) != want) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %0d want %0d", addr, data, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
