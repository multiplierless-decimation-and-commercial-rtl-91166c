// tb_filter_bank: checks both filter-bank configurations against a model
// built in this testbench from the difference equations of each stage:
//   first-order filter: w = x - y, y += eps * w (k strobes late),
//   h_fix: y = x[n-5] - 25/512 sum_{m=1..4} x[n-5-m],
//   FIR:   y = sum_j a_j x[n-j] with the set chosen by the highpass select.
// The 622.08 MHz bank (FIR lowpass "D", three highpasses) and the 44.736 MHz
// bank (h_fix + first-order lowpass "D", two highpasses, rounded multipliers)
// get the same random-walk input, random strobes and randomly changing
// selections, and every output is compared on every clock. The testbench
// also checks that each selection was exercised.
module tb_filter_bank;
  import decim_pkg::*;
  import filt_pkg::*;
  localparam int W = 24;
  localparam bank_cfg_t B622 = bank_cfg(RATE_622080);
  localparam bank_cfg_t B447 = bank_cfg(RATE_44736);

  // FIR taps a0..a7 (1/128 units) of the two 622.08 MHz sets
  localparam int H622  [8] = '{1, -1, -7, -14, -7, 28, 83, 127};
  localparam int H622C [8] = '{1, -1, -8, -16, -11, 24, 82, 127};

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
  endclass

  logic clk = 0, clr = 1, en = 0;
  logic signed [W-1:0] x;
  logic [1:0] hp_sel;
  logic hp02_on, lp_sel;
  logic signed [W-1:0]  lo_a, lo_b;
  logic signed [W+11:0] bp_a, bp_b;
  int checks = 0, failures = 0;
  int seen_sel [3];
  int seen_02, seen_lp100, seen_setc;

  always #5 clk = ~clk;

  filter_bank #(.W(W), .CFG(B622)) u_622 (.clk, .clr, .en, .x, .hp_sel, .hp02_on, .lp_sel,
                                          .lowpass_out(lo_a), .bandpass_out(bp_a));
  filter_bank #(.W(W), .CFG(B447)) u_447 (.clk, .clr, .en, .x, .hp_sel, .hp02_on, .lp_sel,
                                          .lowpass_out(lo_b), .bandpass_out(bp_b));

  iir_m a10, a100, aa, ab, ac, a02;      // 622.08 bank
  iir_m b10, b100, ba, bb, b02, blpd;    // 44.736 bank
  longint fir_hist [16];
  longint fir_y;
  longint fix_hist [1:9];
  longint fix_y;

  function automatic longint sel3(int s, longint h0, longint h1, longint h2);
    return (s == 1) ? h1 : (s == 2) ? h2 : h0;
  endfunction

  task automatic model_clear();
    a10.clear(); a100.clear(); aa.clear(); ab.clear(); ac.clear(); a02.clear();
    b10.clear(); b100.clear(); ba.clear(); bb.clear(); b02.clear(); blpd.clear();
    foreach (fir_hist[i]) fir_hist[i] = 0;
    for (int i = 1; i <= 9; i++) fix_hist[i] = 0;
    fir_y = 0; fix_y = 0;
  endtask

  task automatic model_step(longint xv);
    longint mux_a, din_a, mux_b, din_b, tap;
    bit use_c;
    // values seen before the strobe
    mux_a = sel3(int'(hp_sel), aa.hp, ab.hp, ac.hp);
    din_a = hp02_on ? a02.hp : mux_a;
    mux_b = sel3(int'(hp_sel), ba.hp, bb.hp, ba.hp);   // no HPF C: falls back to A
    din_b = hp02_on ? b02.hp : mux_b;
    use_c = (hp_sel == 2'd2);
    // FIR, 622.08 bank
    for (int i = 15; i > 0; i--) fir_hist[i] = fir_hist[i-1];
    fir_hist[0] = din_a;
    fir_y = 0;
    for (int j = 0; j < 16; j++) begin
      tap = use_c ? longint'(H622C[j < 8 ? j : 15 - j]) : longint'(H622[j < 8 ? j : 15 - j]);
      fir_y += tap * fir_hist[j];
    end
    // lowpass D of the 44.736 bank takes the h_fix output seen before the strobe
    blpd.step(wrap(fix_y, W));
    fix_y = (512 * fix_hist[5] - 25 * (fix_hist[6] + fix_hist[7] + fix_hist[8] + fix_hist[9])) >>> 9;
    for (int i = 9; i > 1; i--) fix_hist[i] = fix_hist[i-1];
    fix_hist[1] = din_b;
    a02.step(mux_a); b02.step(mux_b);
    a10.step(xv); a100.step(xv); aa.step(xv); ab.step(xv); ac.step(xv);
    b10.step(xv); b100.step(xv); ba.step(xv); bb.step(xv);
  endtask

  task automatic compare();
    longint e_lo_a, e_lo_b;
    e_lo_a = lp_sel ? a100.lp() : a10.lp();
    e_lo_b = lp_sel ? b100.lp() : b10.lp();
    checks += 4;
    if (longint'(lo_a) != e_lo_a || longint'(bp_a) != fir_y ||
        longint'(lo_b) != e_lo_b || longint'(bp_b) != blpd.lp()) begin
      failures++;
      if (failures < 10)
        $display("t=%0t sel=%0d/%0d/%0d: 622 lo=%0d(%0d) bp=%0d(%0d) 447 lo=%0d(%0d) bp=%0d(%0d)",
                 $time, hp_sel, hp02_on, lp_sel, lo_a, e_lo_a, bp_a, fir_y,
                 lo_b, e_lo_b, bp_b, blpd.lp());
    end
  endtask

  initial begin
    longint walk;
    a10 = new(B622.lpf10); a100 = new(B622.lpf100); aa = new(B622.hpa);
    ab = new(B622.hpb); ac = new(B622.hpc); a02 = new(B622.hpf02);
    b10 = new(B447.lpf10); b100 = new(B447.lpf100); ba = new(B447.hpa);
    bb = new(B447.hpb); b02 = new(B447.hpf02); blpd = new(B447.lpd);
    x = '0; hp_sel = 2'd0; hp02_on = 0; lp_sel = 0;
    repeat (3) @(posedge clk);
    #1 clr = 0;
    model_clear();
    walk = 0;
    for (int n = 0; n < 30000; n++) begin
      if ($urandom_range(0, 199) == 0) hp_sel  = 2'($urandom_range(0, 2));
      if ($urandom_range(0, 299) == 0) hp02_on = ~hp02_on;
      if ($urandom_range(0, 299) == 0) lp_sel  = ~lp_sel;
      walk = walk + longint'($urandom_range(0, 8191)) - 4096;
      if (n % 5000 == 4999) walk = walk + 64'sd3000000;    // steps that wrap the input
      x  = W'(walk);
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
      if (en) begin
        model_step(longint'(x));
        seen_sel[hp_sel == 2'd3 ? 0 : int'(hp_sel)]++;
        if (hp02_on) seen_02++;
        if (lp_sel) seen_lp100++;
        if (hp_sel == 2'd2) seen_setc++;
      end
      compare();
    end
    checks += 6;
    if (seen_sel[0] == 0 || seen_sel[1] == 0 || seen_sel[2] == 0 || seen_02 == 0 ||
        seen_lp100 == 0 || seen_setc == 0) begin
      failures++;
      $display("a selection was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
