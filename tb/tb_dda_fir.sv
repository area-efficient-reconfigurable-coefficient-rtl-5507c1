// tb_dda_fir: end-to-end test of the reconfigurable-coefficient filter at its
// default size (40 taps, 4-bit samples, 8-bit coefficients).
//   phase 1: the reset coefficient set; the filter must first build its LUTs.
//   phase 2: a new random set is loaded while no sample is in flight; every
//            later output must use it.
//   phase 3: a set is loaded while samples stream at full rate; each output
//            must use the old or the new set, and never the old one again
//            after the first that uses the new one. The filter must hold a
//            waiting sample (in_ready low) while it rewrites its LUTs.
//   phase 4: a constant set is loaded, then the same value written again,
//            which changes nothing and must not start a LUT rewrite.
// Outputs are compared with the direct-form sum sum_k h[k] x[n-k],
// h[39-k] = h[k]. Where no rewrite intervenes, the latency from the serializer
// load to out_valid (W + LEVELS + 2 = 10 cycles) and the rate of one sample per
// W = 5 cycles (n+1 cycles for n-bit samples) are checked too.
module tb_dda_fir;
  localparam int TAPS = 40, NC = 20, DW = 4, CW = 8, W = DW + 1, LATENCY = W + 3 + 2;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, lut_updating;
  logic coef_valid = 0;
  logic signed [CW-1:0] coef_in = '0;
  logic signed [DW-1:0] in_data = '0;
  logic signed [17:0] out_data;
  int checks = 0, failures = 0;
  int hist [$];
  longint exp_old [$], exp_new [$], tload [$];
  bit timed [$];
  int hset_old [NC], hset_new [NC];
  longint cycle = 0, last_load = -100, last_acc = -1;
  bit strict = 1, timing_on = 1, seen_new = 0;
  int n_out = 0, full_rate = 0, upd_stalls = 0, updates = 0, old_used = 0, new_used = 0;
  int phase = 0;

  dda_fir dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic int coef(int hs [NC], int k);
    return (k < NC) ? hs[k] : hs[TAPS-1-k];
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("%0t phase %0d: %s", $time, phase, what);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    longint eo, en;
    hist.push_front(int'(in_data));
    if (hist.size() > TAPS) void'(hist.pop_back());
    eo = 0; en = 0;
    for (int k = 0; k < hist.size(); k++) begin
      eo += longint'(coef(hset_old, k)) * hist[k];
      en += longint'(coef(hset_new, k)) * hist[k];
    end
    exp_old.push_back(eo);
    exp_new.push_back(en);
    last_load = (last_load + W > cycle + 1) ? last_load + W : cycle + 1;
    tload.push_back(last_load);
    timed.push_back(timing_on);
    if (timing_on && last_acc >= 0 && cycle - last_acc == longint'(W)) full_rate++;
    last_acc = cycle;
  end

  always @(posedge clk) if (rst_n && in_valid && !in_ready && lut_updating) upd_stalls++;
  always @(posedge clk) if (rst_n && lut_updating && !$past(lut_updating)) updates++;

  always @(posedge clk) if (rst_n && out_valid) begin
    longint eo, en, tl;
    bit tm, is_old, is_new;
    eo = exp_old.pop_front();
    en = exp_new.pop_front();
    tl = tload.pop_front();
    tm = timed.pop_front();
    n_out++;
    is_old = (longint'(out_data) == eo);
    is_new = (longint'(out_data) == en);
    if (strict) chk(is_new, $sformatf("out %0d = %0d, want %0d", n_out, out_data, en));
    else begin
      chk(is_new || (is_old && !seen_new),
          $sformatf("out %0d = %0d, old %0d new %0d", n_out, out_data, eo, en));
      if (is_new && !is_old) seen_new = 1;
      if (is_old && !is_new) old_used++;
      if (is_new && !is_old) new_used++;
    end
    if (tm) chk(cycle - tl == longint'(LATENCY), $sformatf("latency %0d", cycle - tl));
  end

  task automatic send(input int n, input int max_gap);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 0;
      if (max_gap > 0) repeat ($urandom_range(0, max_gap)) @(negedge clk);
      in_valid = 1;
      in_data = DW'($urandom);
      if (i % 17 == 3) in_data = DW'(-(2 ** (DW-1)));
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic drain();
    repeat (40) @(negedge clk);
    chk(exp_new.size() == 0, "outputs missing");
  endtask

  task automatic write_coefs(input int hs [NC]);
    for (int k = 0; k < NC; k++) begin
      @(negedge clk);
      coef_valid = 1;
      coef_in = CW'(hs[k]);
      @(posedge clk);
    end
    @(negedge clk);
    coef_valid = 0;
  endtask

  initial begin
    int hs [NC];
    int u0;
    hset_old = fir_pkg::DDA_H;
    hset_new = fir_pkg::DDA_H;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: first sample waits for the LUT build after reset
    phase = 1;
    timing_on = 0;
    send(1, 0);
    drain();
    timing_on = 1;
    send(60, 12);
    send(100, 0);
    drain();
    chk(updates == 1, $sformatf("%0d LUT builds after reset", updates));

    // phase 2: reload while idle
    phase = 2;
    for (int k = 0; k < NC; k++) hs[k] = $urandom_range(0, 255) - 128;
    hset_old = hs; hset_new = hs;
    write_coefs(hs);
    while (lut_updating || dut.coef_changed) @(negedge clk);
    send(80, 8);
    send(80, 0);
    drain();
    chk(updates == 2, "no LUT rewrite after a reload");

    // phase 3: reload while streaming
    phase = 3;
    strict = 0;
    timing_on = 0;
    hset_old = hset_new;
    for (int k = 0; k < NC; k++) hs[k] = $urandom_range(0, 255) - 128;
    hset_new = hs;
    fork
      send(120, 0);
      begin
        repeat (30) @(negedge clk);
        write_coefs(hs);
      end
    join
    drain();
    chk(old_used > 0 && new_used > 0, $sformatf("old %0d new %0d", old_used, new_used));
    chk(upd_stalls > 0, "no stall during a LUT rewrite");
    strict = 1;

    // phase 4: a write that changes nothing starts no rewrite
    phase = 4;
    for (int k = 0; k < NC; k++) hs[k] = -3;
    hset_old = hs; hset_new = hs;
    write_coefs(hs);
    while (lut_updating || dut.coef_changed) @(negedge clk);
    u0 = updates;
    write_coefs('{default: -3});
    repeat (5) @(negedge clk);
    chk(updates == u0, "a write that changes nothing started a LUT rewrite");
    timing_on = 1;
    send(60, 3);
    drain();

    chk(full_rate > 100, $sformatf("only %0d samples at the full rate", full_rate));
    $display("outputs=%0d updates=%0d upd_stalls=%0d full_rate=%0d old=%0d new=%0d",
             n_out, updates, upd_stalls, full_rate, old_used, new_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
