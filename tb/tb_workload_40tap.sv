// tb_workload_40tap: the 40-tap configurations.
//   1. The fixed-coefficient DA filter built for a 40-tap low-pass
//      (TAPS = 40: five LUTs and three adder levels), 12-bit random samples.
//   2. The reconfigurable filter at its default size (40 taps, 4-bit samples)
//      with every input at 4'hF (-1), held for more than 40 samples, then
//      returned to zero; the settled output must be -2 * (h[0] + ... + h[19]).
// Each output is compared with the direct-form sum.
module tb_workload_40tap;
  localparam int T = 40, NC = 20;
  localparam int H40 [NC] = '{-4, -5, 6, 8, -11, -16, 21, 28, -37, -47,
                              60, 76, -96, -121, 155, 201, -272, -395, 674, 2047};
  localparam int HD [NC] = fir_pkg::DDA_H;
  logic clk = 0, rst_n = 0;
  logic a_valid = 0, a_ready, a_ovalid;
  logic signed [11:0] a_data = '0;
  logic signed [29:0] a_out;
  logic d_valid = 0, d_ready, d_ovalid, d_upd;
  logic signed [3:0] d_data = '0;
  logic signed [17:0] d_out;
  int checks = 0, failures = 0;
  int ah [$], dh [$];
  longint aq [$], dq [$];
  longint d_last = 0;
  int a_n = 0, d_n = 0, hsum = 0;

  da_fir #(.TAPS(T), .DATA_W(12), .COEF_W(12), .COEFS(H40)) u_da (
    .clk, .rst_n, .in_valid(a_valid), .in_ready(a_ready), .in_data(a_data),
    .out_valid(a_ovalid), .out_data(a_out));

  dda_fir u_dda (
    .clk, .rst_n, .in_valid(d_valid), .in_ready(d_ready), .in_data(d_data),
    .coef_valid(1'b0), .coef_in(8'sd0), .lut_updating(d_upd),
    .out_valid(d_ovalid), .out_data(d_out));

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && a_valid && a_ready) begin
    longint e;
    e = 0;
    ah.push_front(int'(a_data));
    if (ah.size() > T) void'(ah.pop_back());
    for (int k = 0; k < ah.size(); k++) e += longint'((k < NC) ? H40[k] : H40[T-1-k]) * ah[k];
    aq.push_back(e);
  end
  always @(posedge clk) if (rst_n && d_valid && d_ready) begin
    longint e;
    e = 0;
    dh.push_front(int'(d_data));
    if (dh.size() > T) void'(dh.pop_back());
    for (int k = 0; k < dh.size(); k++) e += longint'((k < NC) ? HD[k] : HD[T-1-k]) * dh[k];
    dq.push_back(e);
  end
  always @(posedge clk) if (rst_n && a_ovalid) begin
    longint e;
    e = aq.pop_front();
    a_n++; checks++;
    if (longint'(a_out) != e) begin
      failures++;
      if (failures < 10) $display("da40 out %0d = %0d want %0d", a_n, a_out, e);
    end
  end
  always @(posedge clk) if (rst_n && d_ovalid) begin
    longint e;
    e = dq.pop_front();
    d_n++; checks++;
    if (longint'(d_out) != e) begin
      failures++;
      if (failures < 10) $display("dda out %0d = %0d want %0d", d_n, d_out, e);
    end
    if (d_n == 50) d_last = longint'(d_out);
  end

  initial begin
    for (int k = 0; k < NC; k++) hsum += HD[k];
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        a_valid = 1;
        a_data = 12'($urandom);
        while (!a_ready) @(negedge clk);
        @(posedge clk);
      end
      begin
        for (int i = 0; i < 90; i++) begin
          @(negedge clk);
          d_valid = 1;
          d_data = (i < 50) ? 4'hF : 4'h0;
          while (!d_ready) @(negedge clk);
          @(posedge clk);
        end
        @(negedge clk);
        d_valid = 0;
      end
    join
    @(negedge clk);
    a_valid = 0;
    d_valid = 0;
    repeat (60) @(negedge clk);
    checks++;
    if (a_n != 200 || d_n != 90 || aq.size() != 0 || dq.size() != 0) begin
      failures++;
      $display("outputs %0d %0d", a_n, d_n);
    end
    checks++;
    if (d_last != -2 * hsum) begin
      failures++;
      $display("settled output %0d, want %0d", d_last, -2 * hsum);
    end
    $display("da40 outputs=%0d dda outputs=%0d settled=%0d", a_n, d_n, d_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
