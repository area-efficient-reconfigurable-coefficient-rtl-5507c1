// tb_da_fir: end-to-end test of the fixed-coefficient filter at its default
// size (32 taps, 12-bit samples, 12-bit coefficients). Samples (impulses,
// full-scale steps and random values) are offered with random gaps and
// at full rate; every output is compared with the direct-form sum
// sum_k h[k] x[n-k], h[31-k] = h[k], computed here. It also checks the
// latency (W + LEVELS + 2 = 17 cycles from the serializer taking a word set to
// out_valid, so 18 from acceptance when the filter is idle) and that at full
// rate a sample is taken every W = 13 cycles.
module tb_da_fir;
  localparam int TAPS = 32, DW = 12, CW = 12, W = DW + 1, LATENCY = W + 2 + 2;  // from serializer load
  localparam int H [16] = fir_pkg::DA_H;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid;
  logic signed [DW-1:0] in_data = '0;
  logic signed [28:0] out_data;
  int checks = 0, failures = 0;
  int hist [$];
  longint expq [$];
  longint tacc [$];
  longint cycle = 0, last_acc = -1, last_load = -100;
  int n_out = 0, full_rate_gaps = 0, stalls = 0;

  da_fir dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic int coef(int k);
    return (k < TAPS/2) ? H[k] : H[TAPS-1-k];
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accepted samples -> expected outputs
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    longint e;
    hist.push_front(int'(in_data));
    if (hist.size() > TAPS) void'(hist.pop_back());
    e = 0;
    for (int k = 0; k < hist.size(); k++) e += longint'(coef(k)) * hist[k];
    expq.push_back(e);
    // the serializer takes the word set one cycle after acceptance, or when
    // it finishes the previous one, whichever is later
    last_load = (last_load + W > cycle + 1) ? last_load + W : cycle + 1;
    tacc.push_back(last_load);
    if (last_acc >= 0 && cycle - last_acc == longint'(W)) full_rate_gaps++;
    last_acc = cycle;
  end
  always @(posedge clk) if (rst_n && in_valid && !in_ready) stalls++;

  always @(posedge clk) if (rst_n && out_valid) begin
    longint e, t;
    e = expq.pop_front();
    t = tacc.pop_front();
    checks += 2;
    n_out++;
    if (longint'(out_data) != e) begin
      failures++;
      if (failures < 10) $display("out %0d: got %0d want %0d", n_out, out_data, e);
    end
    if (cycle - t != longint'(LATENCY)) begin
      failures++;
      if (failures < 10) $display("out %0d: latency %0d", n_out, cycle - t);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      if (n < 150) begin
        in_valid = 0;
        repeat ($urandom_range(0, 30)) @(negedge clk);
      end
      in_valid = 1;
      if (n < 40)       in_data = (n == 0) ? 12'sd1 : '0;            // impulse
      else if (n < 80)  in_data = DW'(-(2 ** (DW-1)));               // negative full scale
      else if (n < 110) in_data = DW'(2 ** (DW-1) - 1);              // positive full scale
      else              in_data = DW'($urandom);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (n_out != 300 || expq.size() != 0) begin
      failures++;
      $display("outputs: %0d", n_out);
    end
    checks++;
    if (full_rate_gaps < 100 || full_rate_gaps > 250 || stalls == 0) begin
      failures++;
      $display("full-rate gaps %0d, stalls %0d", full_rate_gaps, stalls);
    end
    $display("outputs=%0d full_rate_gaps=%0d stalls=%0d", n_out, full_rate_gaps, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
