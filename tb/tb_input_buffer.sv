// tb_input_buffer: checks the tap delay line against a queue model. Random
// samples are shifted in with random gaps; after every edge each tap must equal
// the sample shifted in k shifts ago (zero before any).
module tb_input_buffer;
  localparam int TAPS = 32, DW = 12;
  logic clk = 0, rst_n = 0, shift_en = 0;
  logic signed [DW-1:0] din = '0;
  logic signed [DW-1:0] taps [TAPS];
  int checks = 0, failures = 0;
  int model [TAPS];

  input_buffer #(.TAPS(TAPS), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < TAPS; k++) model[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      shift_en = ($urandom_range(0, 3) != 0);
      din = DW'($urandom);
      @(posedge clk);
      if (shift_en) begin
        for (int k = TAPS-1; k > 0; k--) model[k] = model[k-1];
        model[0] = int'(din);
      end
      #1;
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (int'(taps[k]) != model[k]) begin
          failures++;
          if (failures < 10) $display("tap %0d: got %0d want %0d", k, taps[k], model[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
