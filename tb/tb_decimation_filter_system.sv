// tb_decimation_filter_system: end-to-end test of the whole signal path at
// the default parameters (24-bit filters, r = 12, 622.08 MHz filter set).
//
// The stimulus is an unbounded random walk X; the chip sees only its low B_x
// bits (with random garbage above them). For every data rate visited, the
// unwrapped programmable-logic signal is compared with the ideal modified-CIC
// output computed here from the true X:
//   S(t) = sum_k h[k] X[t-k],  h = (box of length M)^3 * (1 + z^-(M/2)),
//   expected value = S(t - D) scaled to the 24 bits the filters see (ref_at),
// modulo 2^24 and up to a constant offset (the registers restart from zero at
// every mode change). The clock delay D is found by search in each mode and
// must equal the pipeline delay: 7 + 6 M clocks when decimating
// (unwrap extender and integrators 4, three more for the carry-chain slant,
// then the intermediate stage, combs, unwrapper and the LSP/MSP alignment of
// the input functions take 6 output periods), 3 clocks when bypassed. The decimation period must be M.
// The two band outputs are compared on every clock, in every mode, with a
// model of the input functions (fed from the pins) and of the 622.08 MHz
// filter set, so the programmable-logic side is checked end to end too.
//
// Mechanisms counted (a failure is counted for any that never happens):
// decimated outputs, bypass (M = 1) outputs, each decimation rate 2/4/12/16,
// input wrap-around at bit B_x, wrap-around of the 21-bit pins, mode
// switches, highpass A/B/C selections, the 0.2 Hz highpass, the 100 Hz
// lowpass select, and the FIR set switch that comes with highpass C.
module tb_decimation_filter_system;
  import decim_pkg::*;
  import filt_pkg::*;
  localparam int W = 24;
  localparam int NT = 60000;                 // clock history kept
  localparam bank_cfg_t B622 = bank_cfg(RATE_622080);
  localparam int H622  [8] = '{1, -1, -7, -14, -7, 28, 83, 127};
  localparam int H622C [8] = '{1, -1, -8, -16, -11, 24, 82, 127};

  function automatic longint wrap(longint v, int bits);
    return (v <<< (64 - bits)) >>> (64 - bits);
  endfunction

  // First-order filter model (difference equations at the fixed-point scale
  // of the filter: product scaled by 2^(s + q)).
  class iir_m;
    iir_cfg_t c;
    int q, aw;
    longint acc, hp;
    longint pipe [8];
    function new(iir_cfg_t cfg);
      c  = cfg;
      q  = cfg_frac(cfg);
      aw = W + int'(cfg.s) + q;
      clear();
    endfunction
    function void clear();
      acc = 0; hp = 0;
      foreach (pipe[i]) pipe[i] = 0;
    endfunction
    function longint lp();
      return wrap(acc >>> (int'(c.s) + q), W);
    endfunction
    function longint prod(longint w);   // coefficients of this set: unrounded
      longint f;
      int ms, ns;
      ms = c.use_m ? int'(c.m) : 0;
      ns = c.use_n ? int'(c.n) : 0;
      if (c.form_b)
        f = (c.use_m ? (c.m_sub ? (64'sd1 << ms) - 1 : (64'sd1 << ms) + 1) : 64'sd1) *
            (c.use_n ? (c.n_sub ? (64'sd1 << ns) - 1 : (64'sd1 << ns) + 1) : 64'sd1);
      else
        f = (64'sd1 << q) + (c.use_m ? (c.m_sub ? -(64'sd1 << (q - ms)) : (64'sd1 << (q - ms))) : 0)
                          + (c.use_n ? (c.n_sub ? -64'sd1 : 64'sd1) : 0);
      return w * f;
    endfunction
    function void step(longint x);
      longint w;
      int k;
      k  = int'(c.k);
      w  = wrap(x - lp(), W);
      hp = w;
      if (k == 0) acc = wrap(acc + prod(w), aw);
      else begin
        acc = wrap(acc + pipe[k-1], aw);
        for (int i = k - 1; i > 0; i--) pipe[i] = pipe[i-1];
        pipe[0] = prod(w);
      end
    endfunction
  endclass

  logic clk = 0, rst = 1;
  rate_e rate;
  logic [IN_W-1:0] x_in;
  logic [1:0] hp_sel;
  logic hp02_on, lp_sel;
  logic [PINS-1:0] pins;
  logic sample_valid;
  logic signed [W-1:0]  lowpass_out;
  logic signed [W+11:0] bandpass_out;

  always #5 clk = ~clk;

  decimation_filter_system dut (
    .clk, .rst, .rate, .x_in, .hp_sel, .hp02_on, .lp_sel,
    .pins, .sample_valid, .lowpass_out, .bandpass_out
  );

  int checks = 0, failures = 0;
  longint xt [NT];                 // true X per clock
  int     cyc = 0;

  // mechanism counters
  int n_valid, n_bypass, n_m2, n_m4, n_m12, n_m16, n_in_wrap, n_pin_wrap, n_switch;
  int n_sel [3];
  int n_02, n_lp100, n_setc;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL at cycle %0d: %s", cyc, msg);
    end
  endtask

  // ---- band model (622.08 MHz set), fed with the design's unwrapped signal
  iir_m a10, a100, aa, ab, ac, a02;
  longint fir_hist [16];
  longint fir_y;
  bit     bank_check;              // compare the bands (off until reset ends)
  logic   clr_n, en_n, hp02_n;
  logic [1:0] sel_n;
  longint y_n;

  task automatic bank_clear();
    a10.clear(); a100.clear(); aa.clear(); ab.clear(); ac.clear(); a02.clear();
    foreach (fir_hist[i]) fir_hist[i] = 0;
    fir_y = 0;
  endtask

  task automatic bank_step(longint xv);
    longint mux, din, tap;
    mux = (sel_n == 2'd1) ? ab.hp : (sel_n == 2'd2) ? ac.hp : aa.hp;
    din = hp02_n ? a02.hp : mux;
    for (int i = 15; i > 0; i--) fir_hist[i] = fir_hist[i-1];
    fir_hist[0] = din;
    fir_y = 0;
    for (int j = 0; j < 16; j++) begin
      tap = (sel_n == 2'd2) ? longint'(H622C[j < 8 ? j : 15 - j]) : longint'(H622[j < 8 ? j : 15 - j]);
      fir_y += tap * fir_hist[j];
    end
    a02.step(mux);
    a10.step(xv); a100.step(xv); aa.step(xv); ab.step(xv); ac.step(xv);
  endtask

  // ---- input-function model (three combs, then unwrap by 12 bits), fed
  // from the pins, with the programmable-logic clear modelled as a register
  // set by reset or by a change of rate
  logic [20:0] c_prev [3];
  logic [20:0] c_out  [3];
  logic [20:0] u_prev, u_diff;
  logic [32:0] uw_acc, uw_q;         // uw_q: accumulator one strobe late
  longint      uw_y;                 // the 24 bits the filters see
  logic        clr_m;                // model of the clear register
  rate_e       rate_q_m;
  logic        rst_n;
  rate_e       rate_n;
  logic [20:0] pins_n;

  task automatic infn_clear();
    for (int i = 0; i < 3; i++) begin
      c_prev[i] = '0;
      c_out[i]  = '0;
    end
    u_prev = '0; u_diff = '0; uw_acc = '0; uw_q = '0;
  endtask

  task automatic infn_step(logic [20:0] p, mode_cfg_t c);
    logic [20:0] o [3];
    logic [20:0] u_in;
    o = c_out;
    uw_q = uw_acc;
    u_in = (c.m == 5'd1) ? 21'(p << (5'd16 - c.bx)) : o[2];
    c_out[0]  = p - c_prev[0];
    c_prev[0] = p;
    for (int i = 1; i < 3; i++) begin
      c_out[i]  = o[i-1] - c_prev[i];
      c_prev[i] = o[i-1];
    end
    uw_acc = uw_acc + 33'(signed'(u_diff));
    u_diff = u_in - u_prev;
    u_prev = u_in;
  endtask

  // sample everything the programmable-logic registers see just before
  // each edge, then advance the models on the edge
  always @(negedge clk) begin
    clr_n  = clr_m;
    en_n   = sample_valid;
    pins_n = pins;
    rst_n  = rst;
    rate_n = rate;
    sel_n  = hp_sel;
    hp02_n = hp02_on;
    y_n    = uw_y;
  end

  always @(posedge clk) begin
    if (clr_n) begin
      infn_clear();
      bank_clear();
    end else if (en_n) begin
      infn_step(pins_n, mode_cfg(rate_n));
      bank_step(y_n);
    end
    uw_y     = longint'(signed'(uw_q[32:9]));
    clr_m    = rst_n || (rate_n != rate_q_m);
    rate_q_m = rate_n;
    #2;
    if (bank_check) begin
      check(longint'(lowpass_out) == (lp_sel ? a100.lp() : a10.lp()),
            $sformatf("lowpass_out %0d expected %0d", lowpass_out, lp_sel ? a100.lp() : a10.lp()));
      check(longint'(bandpass_out) == fir_y,
            $sformatf("bandpass_out %0d expected %0d", bandpass_out, fir_y));
    end
  end

  // ---- ideal decimator reference
  longint h [64];
  int     hl;

  function automatic void make_h(int m);
    longint a [64], b [64];
    foreach (a[i]) a[i] = 0;
    a[0] = 1;
    hl = 1;
    for (int s = 0; s < 3; s++) begin
      foreach (b[i]) b[i] = 0;
      for (int i = 0; i < hl; i++) for (int k = 0; k < m; k++) b[i+k] += a[i];
      hl += m - 1;
      a = b;
    end
    foreach (b[i]) b[i] = 0;
    for (int i = 0; i < hl; i++) begin
      b[i] += a[i];
      b[i + m/2] += a[i];
    end
    hl += m / 2;
    h = b;
  endfunction

  // Expected unwrapped value (before the 2^24 wrap) for output clock t.
  // Decimating: the pins carry S / 2^sh, the unwrapper keeps 33 bits of it
  // and the filters see the top 24, i.e. S / 2^(sh + 9). Bypassed: the pins
  // carry X * 2^(21 - B_x), so the filters see X * 2^(12 - B_x).
  function automatic longint ref_at(int t, int m, int sh, int bx);
    longint s;
    s = 0;
    if (m == 1) begin
      s = xt[t];
      return (12 - bx >= 0) ? (s <<< (12 - bx)) : (s >>> (bx - 12));
    end
    for (int k = 0; k < hl; k++) s += h[k] * xt[t - k];
    return s >>> (sh + 9);
  endfunction

  // ---- one mode: drive the walk, record outputs, check them
  int     vt [4096];               // clock of each output strobe
  longint vy [4096];               // unwrapped value after it

  task automatic run_mode(rate_e r, int n_clk, int exp_delay, bit with_bank);
    mode_cfg_t c;
    int m, bx, sh, nv, step_max, best_d, best_err, err, base, last_t;
    longint walk, e, prev_pins;
    c  = mode_cfg(r);
    m  = int'(c.m);
    bx = int'(c.bx);
    sh = (c.oms == OMS_6_26) ? 6 : (c.oms == OMS_5_25) ? 5 : (c.oms == OMS_4_24) ? 4 : 0;
    if (m > 1) make_h(m);
    step_max = (bx >= 9) ? 64 : (1 << (bx - 2));
    if (rate != r && cyc > 0) n_switch++;
    rate = r;
    walk = xt[cyc];
    nv = 0;
    last_t = -1;
    prev_pins = longint'(pins);
    for (int i = 0; i < n_clk; i++) begin
      // constant input while the registers restart, then a random walk
      if (i >= 4 * m + 8) walk += longint'($urandom_range(0, 2 * step_max)) - longint'(step_max);
      if ((walk >>> bx) != (xt[cyc] >>> bx)) n_in_wrap++;
      x_in = IN_W'(walk);
      for (int b = bx; b < IN_W; b++) x_in[b] = 1'($urandom);
      if (with_bank && $urandom_range(0, 499) == 0) hp_sel  = 2'($urandom_range(0, 2));
      if (with_bank && $urandom_range(0, 999) == 0) hp02_on = ~hp02_on;
      if (with_bank && $urandom_range(0, 999) == 0) lp_sel  = ~lp_sel;
      @(posedge clk); #1;
      cyc++;
      xt[cyc] = walk;
      if (sample_valid) begin
        if (i > 4 * m + 8 && nv < 4096) begin
          vt[nv] = cyc;
          vy[nv] = uw_y;
          nv++;
        end
        if (last_t >= 0 && i > 4 * m + 8)
          check(cyc - last_t == m, $sformatf("output period %0d, M=%0d", cyc - last_t, m));
        last_t = cyc;
        n_valid++;
        if (m == 1) n_bypass++;
        if (m == 2) n_m2++;
        if (m == 4) n_m4++;
        if (m == 12) n_m12++;
        if (m == 16) n_m16++;
        if (with_bank) begin
          n_sel[hp_sel == 2'd3 ? 0 : int'(hp_sel)]++;
          if (hp02_on) n_02++;
          if (lp_sel) n_lp100++;
          if (hp_sel == 2'd2) n_setc++;
        end
        if (wrap(longint'(pins) - prev_pins, PINS) != longint'(pins) - prev_pins) n_pin_wrap++;
        prev_pins = longint'(pins);
      end
    end
    // find the delay D (clocks) that lines the outputs up with the reference
    base = 16;
    best_d = -1; best_err = 1 << 30;
    for (int d = 0; d < 200; d++) begin
      err = 0;
      for (int j = base + 1; j < base + 40 && j < nv; j++) begin
        e = wrap((vy[j] - vy[base]) - (ref_at(vt[j] - d, m, sh, bx) - ref_at(vt[base] - d, m, sh, bx)), W);
        err += int'(e < 0 ? -e : e);
      end
      if (err < best_err) begin best_err = err; best_d = d; end
    end
    check(best_d == exp_delay, $sformatf("rate %0d: delay %0d clocks, expected %0d", int'(r), best_d, exp_delay));
    for (int j = base + 1; j < nv; j++) begin
      e = wrap((vy[j] - vy[base]) - (ref_at(vt[j] - best_d, m, sh, bx) - ref_at(vt[base] - best_d, m, sh, bx)), W);
      check(e >= -2 && e <= 2, $sformatf("rate %0d output %0d: off by %0d", int'(r), j, e));
    end
    $display("rate %0d: M=%0d, %0d outputs, delay %0d clocks", int'(r), m, nv, best_d);
  endtask

  initial begin
    a10 = new(B622.lpf10); a100 = new(B622.lpf100); aa = new(B622.hpa);
    ab = new(B622.hpb); ac = new(B622.hpc); a02 = new(B622.hpf02);
    bank_clear();
    infn_clear();
    clr_m = 1'b1; rate_q_m = RATE_622080; uw_y = 0;
    bank_check = 0;
    rate = RATE_622080; x_in = '0; hp_sel = 2'd2; hp02_on = 0; lp_sel = 0;
    xt[0] = 0;
    repeat (4) @(posedge clk);
    #1 rst = 0;

    bank_check = 1;
    run_mode(RATE_622080, 24000, 7 + 6 * 16, 1);
    run_mode(RATE_51840,  4000, 7 + 6 * 12, 0);
    run_mode(RATE_44736,  2000, 3, 0);
    run_mode(RATE_34368,  3000, 7 + 6 * 4, 0);
    run_mode(RATE_8448,   3000, 7 + 6 * 2, 0);
    run_mode(RATE_1544,   2000, 3, 0);
    run_mode(RATE_139264, 3000, 7 + 6 * 4, 0);
    run_mode(RATE_155520, 4000, 7 + 6 * 12, 0);
    run_mode(RATE_2048,   1500, 3, 0);
    run_mode(RATE_6312,   1500, 3, 0);
    run_mode(RATE_622080, 6000, 7 + 6 * 16, 1);

    check(n_valid > 0 && n_bypass > 0, "no decimated or no bypass outputs");
    check(n_m2 > 0 && n_m4 > 0 && n_m12 > 0 && n_m16 > 0, "a decimation rate was not used");
    check(n_in_wrap > 0, "input never wrapped");
    check(n_pin_wrap > 0, "pins never wrapped");
    check(n_switch > 0, "no mode switch");
    check(n_sel[0] > 0 && n_sel[1] > 0 && n_sel[2] > 0, "a highpass was never selected");
    check(n_02 > 0 && n_lp100 > 0 && n_setc > 0, "0.2 Hz highpass, 100 Hz lowpass or FIR set C unused");
    $display("outputs %0d (bypass %0d; M=2 %0d, 4 %0d, 12 %0d, 16 %0d), input wraps %0d, pin wraps %0d, switches %0d",
             n_valid, n_bypass, n_m2, n_m4, n_m12, n_m16, n_in_wrap, n_pin_wrap, n_switch);
    $display("highpass A/B/C %0d/%0d/%0d, 0.2 Hz on %0d, 100 Hz %0d, FIR set C %0d",
             n_sel[0], n_sel[1], n_sel[2], n_02, n_lp100, n_setc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NT - 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
