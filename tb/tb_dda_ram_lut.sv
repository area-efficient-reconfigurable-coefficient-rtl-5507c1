// tb_dda_ram_lut: fills the LUT RAM, then mixes random writes and reads and
// checks every read (one cycle after its address) against a model array.
module tb_dda_ram_lut;
  localparam int LW = 10;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr = '0, addr = '0;
  logic signed [LW-1:0] wdata = '0, data;
  int checks = 0, failures = 0;
  int model [16];

  dda_ram_lut #(.LUT_W(LW)) dut (.*);

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
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a); wdata = LW'($urandom);
      model[a] = int'(wdata);
      @(posedge clk);
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      addr = 4'($urandom);
      want = model[addr];
      we = $urandom_range(0, 1);
      waddr = 4'($urandom);
      wdata = LW'($urandom);
      // a write to the address being read takes effect after this read
      @(posedge clk);
      if (we) model[waddr] = int'(wdata);
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
