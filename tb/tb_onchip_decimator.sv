// tb_onchip_decimator: runs each decimating data-rate mode on a wrapped random
// walk and checks the chip output against a direct convolution. The
// testbench applies the three off-chip first-differencers to the pins (modulo
// 2^21) and compares the result with the true signal filtered by
// h = (sum_{k<M} z^-k)^3 (1 + z^-(M/2)), decimated by M and cut to the pin
// bits selected for that mode. Where LSBs are dropped before the
// differencers the difference may be off by at most 8 pin LSBs (the sum of
// |1, -3, 3, -1|); elsewhere it must be exact. The output phase is found once
// per mode and must then stay fixed: the pins change 8 clocks after the
// second kept sample with the pipelined (slanted) carry chains and 5 clocks
// after it with full-width adders. One output must appear every M clocks.
// Both data paths are run side by side on the same input. The undecimated
// mode is checked for the bypass path.
module tb_onchip_decimator;
  import decim_pkg::*;
  logic        clk = 0, rst;
  rate_e       rate;
  logic [15:0] x_in;
  logic [20:0] pins, pins0;
  logic        pins_valid, pins_valid0;
  int checks = 0, failures = 0, cyc = 0;

  onchip_decimator dut (.clk, .rst, .rate, .x_in, .pins, .pins_valid);
  onchip_decimator #(.SLANT(1'b0)) dut0 (.clk, .rst, .rate, .x_in, .pins(pins0), .pins_valid(pins_valid0));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint xt [];          // true input by cycle

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("rate %0d: %s", int'(rate), what);
    end
  endtask

  longint h [];
  int     hl, start;

  // Check one collected output stream against the reference filter.
  task automatic check_stream(longint p [$], int vcyc [$], int m, int sh, int n_out,
                              int exp_lag, string name);
    int     lag;
    longint tol, yref, diff;
    logic [20:0] dd;
    bit found;
    tol = (sh > 0) ? 8 : 0;
    found = 0;
    lag = -1;
    for (int l = 0; l < 8 * m + 16 && !found; l++) begin
      found = 1;
      for (int j = 8; j < 12; j++) begin
        dd = 21'(p[j] - 3 * p[j-1] + 3 * p[j-2] - p[j-3]);
        yref = 0;
        for (int k = 0; k < hl; k++)
          if (vcyc[j] - l - k >= start) yref += h[k] * xt[vcyc[j] - l - k];
        diff = longint'($signed(21'(dd - 21'(yref >>> sh))));
        if (diff > tol || diff < -tol) found = 0;
      end
      if (found) lag = l;
    end
    check(found, {name, ": no output phase matches the reference filter"});
    if (!found) lag = exp_lag;    // still compare every output at the expected lag
    check(lag == exp_lag, $sformatf("%s: latency %0d clocks instead of %0d", name, lag, exp_lag));
    for (int j = 12; j < n_out; j++) begin
      dd = 21'(p[j] - 3 * p[j-1] + 3 * p[j-2] - p[j-3]);
      yref = 0;
      for (int k = 0; k < hl; k++) yref += h[k] * xt[vcyc[j] - lag - k];
      diff = longint'($signed(21'(dd - 21'(yref >>> sh))));
      check(diff <= tol && diff >= -tol,
            $sformatf("%s output %0d: combed pins %0d, reference %0d", name, j, $signed(dd), 21'(yref >>> sh)));
    end
    $display("rate %0d, %s: M=%0d, %0d outputs checked, lag %0d clocks", int'(rate), name, m, n_out - 12, lag);
  endtask

  task automatic run_mode(rate_e r, int m, int bx, int sh, int n_out);
    longint hr [];
    longint p1 [$], p0 [$];
    int     v1 [$], v0 [$];
    int     lim, last1, last0;
    longint step;
    // impulse response of the whole decimator
    hl = 3 * (m - 1) + m / 2 + 1;
    h  = new[hl];
    foreach (h[i]) h[i] = 0;
    h[0] = 1;
    for (int s = 0; s < 3; s++) begin
      hr = new[hl];
      foreach (hr[i]) begin
        hr[i] = 0;
        for (int k = 0; k < m; k++) if (i - k >= 0) hr[i] += h[i - k];
      end
      h = hr;
    end
    hr = new[hl];
    foreach (hr[i]) hr[i] = h[i] + ((i - m / 2 >= 0) ? h[i - m / 2] : 0);
    h = hr;

    rate = r;
    start = cyc;
    xt = new[start + (n_out + 8) * m + 64];
    foreach (xt[i]) xt[i] = 0;
    lim = (1 << (bx - 1)) - 1;
    last1 = -1;
    last0 = -1;
    // drive and collect
    while (p1.size() < n_out || p0.size() < n_out) begin
      step = longint'($signed($urandom_range(0, 2 * lim))) - longint'(lim);
      if (cyc % 5 == 0) step = longint'(lim);
      if (cyc < start + 4) step = 0;   // REGISTER CLEAR lands in these clocks
      xt[cyc] = ((cyc > start) ? xt[cyc - 1] : 0) + step;
      x_in = 16'($urandom);
      for (int b = 0; b < bx; b++) x_in[b] = xt[cyc][b];
      @(posedge clk); #1;
      if (pins_valid) begin
        if (last1 >= 0) check(cyc - last1 == m, "output period is not M");
        last1 = cyc;
        p1.push_back(longint'(pins));
        v1.push_back(cyc);
      end
      if (pins_valid0) begin
        if (last0 >= 0) check(cyc - last0 == m, "output period is not M (full-width adders)");
        last0 = cyc;
        p0.push_back(longint'(pins0));
        v0.push_back(cyc);
      end
    end
    check_stream(p1, v1, m, sh, n_out, 8, "slanted");
    check_stream(p0, v0, m, sh, n_out, 5, "full-width");
  endtask

  initial begin
    logic [15:0] prev;
    rst = 1; rate = RATE_622080; x_in = '0;
    repeat (3) @(posedge clk); #1;
    rst = 0;
    run_mode(RATE_8448,   2,  14, 0, 200);
    run_mode(RATE_34368,  4,  12, 0, 200);
    run_mode(RATE_139264, 4,  10, 0, 200);
    run_mode(RATE_51840,  12, 11, 6, 150);
    run_mode(RATE_155520, 12, 10, 5, 150);
    run_mode(RATE_622080, 16, 8,  4, 150);
    // bypass: pins = {x_in, 00000} one clock later, every clock
    rate = RATE_44736;
    repeat (3) @(posedge clk);
    #1;
    for (int i = 0; i < 300; i++) begin
      prev = 16'($urandom);
      x_in = prev;
      @(posedge clk); #1;
      check(pins_valid && pins == {prev, 5'b0}, "bypass output");
      check(pins_valid0 && pins0 == {prev, 5'b0}, "bypass output (full-width adders)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
