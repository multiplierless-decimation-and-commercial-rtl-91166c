// tb_filter_bank_rates: runs the filter bank of every data rate at once.
//
// Ten filter_bank instances, one per data-rate configuration from
// filt_pkg::bank_cfg, get the same random-walk input, random sample strobes
// and randomly changing selections. Each is compared on every clock with a
// model built here from the difference equations of its stages:
//   first-order filter: w = x - y, y += eps * w (k strobes late),
//   h_fix (only where LPF "D" is first order with loop delays):
//     y = x[n-5] - 25/512 sum_{m=1..k} x[n-5-m],
//   FIR: y = sum_j a_j x[n-j] with the set chosen by the highpass select.
//
// Independently of the bank, the testbench holds the filter list of each rate
// (cutoffs of every filter, whether a highpass "C" exists, and whether LPF "D"
// is first or third order) and the decimated sample rate. It checks that each
// configuration has the right structure, and that each coefficient eps =
// 2^-s * f lies within 2 % of 1 - exp(-2 pi fc / fs) wherever that relation
// holds (no loop delay, or eps below 0.02); the two wide filters with loop
// delays (250 kHz at 622.08 MHz, 400 kHz at 44.736 MHz) are designed for the
// delayed loop and are left out of that check.
module tb_filter_bank_rates;
  import decim_pkg::*;
  import filt_pkg::*;
  localparam int W  = 24;
  localparam int NR = 10;

  // Filter list per rate (index = rate_e): decimated rate in MHz, highpass A
  // and B cutoffs in Hz, highpass C (0: none), lowpass D and its order.
  localparam real FS   [NR] = '{1.544, 2.048, 6.312, 4.224, 8.592, 44.736, 4.32, 34.816, 12.96, 38.88};
  localparam real HPA  [NR] = '{10, 20, 10, 20, 100, 10, 10, 200, 10, 10};
  localparam real HPB  [NR] = '{8e3, 700, 3e3, 3e3, 10e3, 30e3, 500, 10e3, 1e3, 5e3};
  localparam real HPC  [NR] = '{0, 18e3, 0, 80e3, 0, 0, 20e3, 0, 65e3, 250e3};
  localparam real LPD  [NR] = '{40e3, 200e3, 60e3, 400e3, 800e3, 400e3, 400e3, 3500e3, 1300e3, 5000e3};
  localparam int  LPDO [NR] = '{1, 3, 1, 3, 3, 1, 3, 3, 3, 3};

  function automatic longint wrap(longint v, int bits);
    return (v <<< (64 - bits)) >>> (64 - bits);
  endfunction

  // First-order filter model.
  class iir_m;
    iir_cfg_t c;
    int q, aw, r;
    longint acc, hp;
    longint pipe [8];
    function new(iir_cfg_t cfg);
      c   = cfg;
      r   = int'(cfg.rnd);
      q   = cfg_frac(cfg) - r;
      aw  = W + int'(cfg.s) + q;
      clear();
    endfunction
    function void clear();
      acc = 0; hp = 0;
      foreach (pipe[i]) pipe[i] = 0;
    endfunction
    function longint lp();
      return wrap(acc >>> (int'(c.s) + q), W);
    endfunction
    // eps * w * 2^(s + q): the coefficient written as integer shifts
    function longint prod(longint w);
      longint f1, a, t;
      int ms, ns, fr;
      ms = c.use_m ? int'(c.m) : 0;
      ns = c.use_n ? int'(c.n) : 0;
      fr = cfg_frac(c);
      if (c.form_b) begin
        f1 = c.use_m ? (c.m_sub ? (w << ms) - w : (w << ms) + w) : w;
        a  = f1 << ns;
        t  = c.use_n ? f1 : 0;
      end else begin
        a = c.use_m ? (c.m_sub ? (w << fr) - (w << (fr - ms)) : (w << fr) + (w << (fr - ms)))
                    : (w << fr);
        t = c.use_n ? w : 0;
      end
      if (r > 0) t = (t + (64'sd1 << (r - 1))) >>> r;
      return c.n_sub ? (a >>> r) - t : (a >>> r) + t;
    endfunction
    function void step(longint x);
      longint w;
      int k;
      k = int'(c.k);
      w = wrap(x - lp(), W);
      hp = w;
      if (k == 0) acc = wrap(acc + prod(w), aw);
      else begin
        acc = wrap(acc + pipe[k-1], aw);
        for (int i = k - 1; i > 0; i--) pipe[i] = pipe[i-1];
        pipe[0] = prod(w);
      end
    endfunction
    // eps as a real number
    function real eps();
      real f1, f2;
      f1 = c.use_m ? (c.m_sub ? -1.0 : 1.0) / real'(64'd1 << c.m) : 0.0;
      f2 = c.use_n ? (c.n_sub ? -1.0 : 1.0) / real'(64'd1 << c.n) : 0.0;
      if (c.form_b) return (1.0 + f1) * (1.0 + f2) / real'(64'd1 << c.s);
      return (1.0 + f1 + f2) / real'(64'd1 << c.s);
    endfunction
  endclass

  // Model of one whole bank.
  class bank_m;
    bank_cfg_t b;
    iir_m f10, f100, fa, fb, fc, f02, fd;
    longint fir_hist [16];
    longint fir_y;
    longint fix_hist [1:12];
    longint fix_y;
    function new(bank_cfg_t cfg);
      b = cfg;
      f10 = new(cfg.lpf10); f100 = new(cfg.lpf100); fa = new(cfg.hpa);
      fb = new(cfg.hpb); fc = new(cfg.hpc); f02 = new(cfg.hpf02); fd = new(cfg.lpd);
      clear();
    endfunction
    function void clear();
      f10.clear(); f100.clear(); fa.clear(); fb.clear(); fc.clear(); f02.clear(); fd.clear();
      foreach (fir_hist[i]) fir_hist[i] = 0;
      for (int i = 1; i <= 12; i++) fix_hist[i] = 0;
      fir_y = 0; fix_y = 0;
    endfunction
    function longint lowpass(bit lp_sel);
      return lp_sel ? f100.lp() : f10.lp();
    endfunction
    function longint bandpass();
      return b.lpd_fir ? fir_y : fd.lp();
    endfunction
    function void step(longint xv, logic [1:0] hp_sel, bit hp02_on);
      longint mux, din, tap, s;
      fir_set_e set;
      int k;
      // values seen before the strobe
      mux = (hp_sel == 2'd1) ? fb.hp : (hp_sel == 2'd2 && b.has_hpc) ? fc.hp : fa.hp;
      din = hp02_on ? f02.hp : mux;
      if (b.lpd_fir) begin
        set = (b.has_hpc && hp_sel == 2'd2) ? b.fir_set_c : b.fir_set;
        for (int i = 15; i > 0; i--) fir_hist[i] = fir_hist[i-1];
        fir_hist[0] = din;
        fir_y = 0;
        for (int j = 0; j < 16; j++) begin
          tap = longint'(fir_coef(set, j < 8 ? j : 15 - j));
          fir_y += tap * fir_hist[j];
        end
      end else if (b.lpd.k == 0) begin
        fd.step(din);
      end else begin
        k = int'(b.lpd.k);
        fd.step(wrap(fix_y, W));
        s = 0;
        for (int m = 1; m <= k; m++) s += fix_hist[5 + m];
        fix_y = (512 * fix_hist[5] - 25 * s) >>> 9;
        for (int i = 12; i > 1; i--) fix_hist[i] = fix_hist[i-1];
        fix_hist[1] = din;
      end
      f02.step(mux);
      f10.step(xv); f100.step(xv); fa.step(xv); fb.step(xv);
      if (b.has_hpc) fc.step(xv);
    endfunction
  endclass

  logic clk = 0, clr = 1, en = 0;
  logic signed [W-1:0] x;
  logic [1:0] hp_sel;
  logic hp02_on, lp_sel;
  logic signed [W-1:0]  lo [NR];
  logic signed [W+11:0] bp [NR];
  int checks = 0, failures = 0;
  int seen_sel [4];
  int seen_02, seen_lp100;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NR; g++) begin : g_bank
    filter_bank #(.W(W), .CFG(bank_cfg(rate_e'(g)))) u_bank (
      .clk, .clr, .en, .x, .hp_sel, .hp02_on, .lp_sel,
      .lowpass_out(lo[g]), .bandpass_out(bp[g]));
  end

  bank_m bm [NR];

  // eps of a filter against its cutoff fc at the decimated rate fs (MHz)
  task automatic check_eps(string what, int r, iir_m f, real fc);
    real e_id, e;
    e    = f.eps();
    e_id = 1.0 - $exp(-2.0 * 3.14159265358979 * fc / (FS[r] * 1.0e6));
    if (f.c.k != 0 && e >= 0.02) return;
    checks++;
    if (e / e_id > 1.02 || e / e_id < 0.98) begin
      failures++;
      $display("rate %0d %s: eps %g, expected about %g", r, what, e, e_id);
    end
  endtask

  task automatic check_configs();
    for (int r = 0; r < NR; r++) begin
      checks += 2;
      if (bm[r].b.has_hpc != (HPC[r] != 0.0)) begin
        failures++; $display("rate %0d: highpass C presence wrong", r);
      end
      if (bm[r].b.lpd_fir != (LPDO[r] == 3)) begin
        failures++; $display("rate %0d: lowpass D order wrong", r);
      end
      check_eps("10 Hz LPF", r, bm[r].f10, 10.0);
      check_eps("100 Hz LPF", r, bm[r].f100, 100.0);
      check_eps("0.2 Hz HPF", r, bm[r].f02, 0.2);
      check_eps("HPF A", r, bm[r].fa, HPA[r]);
      check_eps("HPF B", r, bm[r].fb, HPB[r]);
      if (HPC[r] != 0.0) check_eps("HPF C", r, bm[r].fc, HPC[r]);
      if (LPDO[r] == 1)  check_eps("LPF D", r, bm[r].fd, LPD[r]);
    end
  endtask

  task automatic compare();
    for (int r = 0; r < NR; r++) begin
      checks += 2;
      if (longint'(lo[r]) != bm[r].lowpass(lp_sel) || longint'(bp[r]) != bm[r].bandpass()) begin
        failures++;
        if (failures < 10)
          $display("t=%0t rate %0d sel=%0d/%0d/%0d: lo=%0d(%0d) bp=%0d(%0d)", $time, r,
                   hp_sel, hp02_on, lp_sel, lo[r], bm[r].lowpass(lp_sel), bp[r], bm[r].bandpass());
      end
    end
  endtask

  initial begin
    longint walk;
    for (int r = 0; r < NR; r++) bm[r] = new(bank_cfg(rate_e'(r)));
    check_configs();
    x = '0; hp_sel = 2'd0; hp02_on = 0; lp_sel = 0;
    repeat (3) @(posedge clk);
    #1 clr = 0;
    walk = 0;
    for (int n = 0; n < 20000; n++) begin
      if ($urandom_range(0, 199) == 0) hp_sel  = 2'($urandom_range(0, 3));
      if ($urandom_range(0, 299) == 0) hp02_on = ~hp02_on;
      if ($urandom_range(0, 299) == 0) lp_sel  = ~lp_sel;
      walk = walk + longint'($urandom_range(0, 8191)) - 4096;
      if (n % 5000 == 4999) walk = walk + 64'sd3000000;    // steps that wrap the input
      x  = W'(walk);
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (en) begin
        for (int r = 0; r < NR; r++) bm[r].step(longint'(x), hp_sel, hp02_on);
        seen_sel[hp_sel]++;
        if (hp02_on) seen_02++;
        if (lp_sel) seen_lp100++;
      end
      compare();
    end
    checks++;
    if (seen_sel[0] == 0 || seen_sel[1] == 0 || seen_sel[2] == 0 || seen_02 == 0 || seen_lp100 == 0) begin
      failures++;
      $display("a selection was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
