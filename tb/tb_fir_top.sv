// tb_fir_top: end-to-end test of the whole design at its default parameters:
// the fixed 32-tap filter and the reconfigurable 40-tap filter run at the same
// time, each fed with its own random sample stream and each output compared
// with a direct-form model. It counts how often each mechanism of the design
// happened and fails if one never did:
//   da_stall       sample offered while the fixed filter is busy (in_ready low)
//   da_full_rate   fixed filter taking samples back to back, W = 13 cycles apart
//   sign_subtract  output whose pair sums include a negative one, so the sign
//                  bit's LUT term is non-zero and is subtracted
//   dda_build      LUT build of the reconfigurable filter after reset
//   dda_rewrite    LUT rewrite after a coefficient reload
//   dda_stall      sample held while the LUTs are rewritten
//   dda_no_change  coefficient write that changes nothing and starts no rewrite
module tb_fir_top;
  localparam int DA_T = 32, DA_DW = 12, DA_W = 13;
  localparam int DD_T = 40, DD_NC = 20, DD_DW = 4, DD_CW = 8;
  logic clk = 0, rst_n = 0;
  logic da_in_valid = 0, da_in_ready, da_out_valid;
  logic signed [DA_DW-1:0] da_in_data = '0;
  logic signed [28:0] da_out_data;
  logic dda_in_valid = 0, dda_in_ready, dda_coef_valid = 0, dda_lut_updating, dda_out_valid;
  logic signed [DD_DW-1:0] dda_in_data = '0;
  logic signed [DD_CW-1:0] dda_coef_in = '0;
  logic signed [17:0] dda_out_data;
  int checks = 0, failures = 0;
  int da_hist [$], dd_hist [$];
  longint da_exp [$], dd_exp [$];
  bit da_neg [$];
  int dd_h [DD_NC];
  longint cycle = 0, da_last = -1;
  int da_stall = 0, da_full_rate = 0, sign_subtract = 0;
  int dda_build = 0, dda_rewrite = 0, dda_stall = 0, dda_no_change = 0;
  int da_outs = 0, dd_outs = 0;
  localparam int DA_H [16] = fir_pkg::DA_H;

  fir_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("%0t %s", $time, what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fixed filter model
  always @(posedge clk) if (rst_n && da_in_valid && da_in_ready) begin
    longint e;
    bit neg;
    da_hist.push_front(int'(da_in_data));
    if (da_hist.size() > DA_T) void'(da_hist.pop_back());
    e = 0;
    neg = 0;
    for (int k = 0; k < da_hist.size(); k++)
      e += longint'((k < 16) ? DA_H[k] : DA_H[DA_T-1-k]) * da_hist[k];
    for (int i = 0; i < 16; i++)
      if (((i < da_hist.size()) ? da_hist[i] : 0) +
          ((DA_T-1-i < da_hist.size()) ? da_hist[DA_T-1-i] : 0) < 0) neg = 1;
    da_exp.push_back(e);
    da_neg.push_back(neg);
    if (da_last >= 0 && cycle - da_last == longint'(DA_W)) da_full_rate++;
    da_last = cycle;
  end
  always @(posedge clk) if (rst_n && da_in_valid && !da_in_ready) da_stall++;
  always @(posedge clk) if (rst_n && da_out_valid) begin
    longint e;
    e = da_exp.pop_front();
    if (da_neg.pop_front()) sign_subtract++;
    da_outs++;
    chk(longint'(da_out_data) == e, $sformatf("da out %0d = %0d want %0d", da_outs, da_out_data, e));
  end

  // reconfigurable filter model (coefficients only change while it is idle)
  always @(posedge clk) if (rst_n && dda_in_valid && dda_in_ready) begin
    longint e;
    dd_hist.push_front(int'(dda_in_data));
    if (dd_hist.size() > DD_T) void'(dd_hist.pop_back());
    e = 0;
    for (int k = 0; k < dd_hist.size(); k++)
      e += longint'((k < DD_NC) ? dd_h[k] : dd_h[DD_T-1-k]) * dd_hist[k];
    dd_exp.push_back(e);
  end
  always @(posedge clk) if (rst_n && dda_in_valid && !dda_in_ready && dda_lut_updating) dda_stall++;
  always @(posedge clk) if (rst_n && dda_out_valid) begin
    longint e;
    e = dd_exp.pop_front();
    dd_outs++;
    chk(longint'(dda_out_data) == e, $sformatf("dda out %0d = %0d want %0d", dd_outs, dda_out_data, e));
  end

  task automatic da_send(input int n, input int max_gap);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      da_in_valid = 0;
      if (max_gap > 0) repeat ($urandom_range(0, max_gap)) @(negedge clk);
      da_in_valid = 1;
      da_in_data = DA_DW'($urandom);
      while (!da_in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    da_in_valid = 0;
  endtask

  task automatic dd_send(input int n, input int max_gap);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      dda_in_valid = 0;
      if (max_gap > 0) repeat ($urandom_range(0, max_gap)) @(negedge clk);
      dda_in_valid = 1;
      dda_in_data = DD_DW'($urandom);
      while (!dda_in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    dda_in_valid = 0;
  endtask

  // Writes a set while a sample waits, so that the sample must be held.
  task automatic dd_reload(input int hs [DD_NC]);
    repeat (30) @(negedge clk);          // let the filter drain
    for (int k = 0; k < DD_NC; k++) begin
      dda_coef_valid = 1;
      dda_coef_in = DD_CW'(hs[k]);
      @(negedge clk);
    end
    dda_coef_valid = 0;
    dd_h = hs;
    // the next sample arrives while the rewrite runs
    dd_send(1, 0);
    while (dda_lut_updating) @(negedge clk);
  endtask

  always @(posedge clk) if (rst_n && dda_lut_updating && !$past(dda_lut_updating)) begin
    if (cycle < 10) dda_build++;
    else            dda_rewrite++;
  end

  initial begin
    int hs [DD_NC];
    int r0;
    dd_h = fir_pkg::DDA_H;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin
        da_send(150, 20);
        da_send(150, 0);
      end
      begin
        dd_send(100, 6);
        for (int k = 0; k < DD_NC; k++) hs[k] = $urandom_range(0, 255) - 128;
        dd_reload(hs);
        dd_send(100, 0);
        for (int k = 0; k < DD_NC; k++) hs[k] = 7;
        dd_reload(hs);
        r0 = dda_rewrite;
        // the same value once more: nothing changes
        @(negedge clk);
        dda_coef_valid = 1;
        dda_coef_in = 8'sd7;
        @(negedge clk);
        dda_coef_valid = 0;
        repeat (5) @(negedge clk);
        if (dda_rewrite == r0) dda_no_change++;
        dd_send(60, 2);
      end
    join
    repeat (60) @(negedge clk);
    chk(da_exp.size() == 0 && dd_exp.size() == 0, "outputs missing");
    chk(da_outs == 300, "fixed filter output count");
    chk(da_stall > 0, "da_stall never happened");
    chk(da_full_rate > 0, "da_full_rate never happened");
    chk(sign_subtract > 0, "sign_subtract never happened");
    chk(dda_build == 1, "dda_build never happened");
    chk(dda_rewrite == 2, "dda_rewrite count");
    chk(dda_stall > 0, "dda_stall never happened");
    chk(dda_no_change > 0, "dda_no_change never happened");
    $display("da_outs=%0d dd_outs=%0d da_stall=%0d da_full_rate=%0d sign_subtract=%0d",
             da_outs, dd_outs, da_stall, da_full_rate, sign_subtract);
    $display("dda_build=%0d dda_rewrite=%0d dda_stall=%0d dda_no_change=%0d",
             dda_build, dda_rewrite, dda_stall, dda_no_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
