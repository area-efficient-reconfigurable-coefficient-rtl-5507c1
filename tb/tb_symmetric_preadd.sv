// tb_symmetric_preadd: drives random (and extreme) sample sets and checks each
// pair sum y[i] = x[i] + x[TAPS-1-i], computed here in integers.
module tb_symmetric_preadd;
  localparam int TAPS = 32, DW = 12;
  logic signed [DW-1:0] x [TAPS];
  logic signed [DW:0]   y [TAPS/2];
  int checks = 0, failures = 0;

  symmetric_preadd #(.TAPS(TAPS), .DATA_W(DW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < TAPS; k++) begin
        case (n)
          0: x[k] = DW'(-(2 ** (DW-1)));
          1: x[k] = DW'(2 ** (DW-1) - 1);
          default: x[k] = DW'($urandom);
        endcase
      end
      #1;
      for (int i = 0; i < TAPS/2; i++) begin
        checks++;
        if (int'(y[i]) != int'(x[i]) + int'(x[TAPS-1-i])) begin
          failures++;
          if (failures < 10) $display("y[%0d]=%0d x=%0d,%0d", i, y[i], x[i], x[TAPS-1-i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
