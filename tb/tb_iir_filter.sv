// tb_iir_filter: checks the first-order filter in three configurations
//   DEF: eps = 2^-19 (1 - 2^-3)(1 - 2^-5), k = 4   (10 Hz lowpass, 622.08 MHz)
//   HPC: eps = 2^-5 (1 + 2^-3 - 2^-8),     k = 3   (250 kHz highpass)
//   RND: eps = 2^-6 (1 + 2^-1)(1 - 2^-6), 1 LSB rounded, k = 0
// against a cycle-by-cycle integer model of the difference equations
//   w[n] = x[n] - y[n],  y[n+1] = y[n] + eps * w[n-k]
// kept at the same fixed-point scale (the product scaled by 2^(s+frac)).
// Also checks: the impulse first reaches the lowpass output k+1 strobes after
// it is applied; with a constant input the lowpass settles on the input
// (unit DC gain) and the highpass on zero; the input may wrap modulo 2^24.
module tb_iir_filter;
  import filt_pkg::*;
  localparam int W = 24;
  localparam iir_cfg_t DEF = '{s:19, m:3, n:5, use_m:1, use_n:1, m_sub:1, n_sub:1, form_b:1, rnd:0, k:4};
  localparam iir_cfg_t HPC = '{s:5,  m:3, n:8, use_m:1, use_n:1, m_sub:0, n_sub:1, form_b:0, rnd:0, k:3};
  localparam iir_cfg_t RND = '{s:6,  m:1, n:6, use_m:1, use_n:1, m_sub:0, n_sub:1, form_b:1, rnd:1, k:0};

  logic clk = 0, clr = 1, en = 0;
  logic signed [W-1:0] x;
  logic signed [W-1:0] lp [3];
  logic signed [W-1:0] hp [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  iir_filter #(.W(W), .CFG(DEF)) u_def (.clk, .clr, .en, .x, .lp(lp[0]), .hp(hp[0]));
  iir_filter #(.W(W), .CFG(HPC)) u_hpc (.clk, .clr, .en, .x, .lp(lp[1]), .hp(hp[1]));
  iir_filter #(.W(W), .CFG(RND)) u_rnd (.clk, .clr, .en, .x, .lp(lp[2]), .hp(hp[2]));

  // --- reference model -------------------------------------------------
  // Per configuration: eps * 2^(s + q) = (A * w - round(B * w / 2^r)),
  // q fractional bits, written out by hand for each coefficient.
  localparam int S [3] = '{19, 5, 6};
  localparam int Q [3] = '{8, 8, 6};   // fractional bits kept in the product
  localparam int K [3] = '{4, 3, 0};

  longint acc_m [3];
  longint pipe  [3][8];
  longint hp_m  [3];

  function automatic longint wrap(longint v, int bits);
    return (v <<< (64 - bits)) >>> (64 - bits);
  endfunction

  function automatic longint prod(int c, longint w);
    case (c)
      0: return 217 * w;                          // (8-1)(32-1)
      1: return 287 * w;                          // 256 + 32 - 1
      default: return 96 * w - ((3 * w + 1) >>> 1); // 1.5 * 63/64 * 2^6, rounded
    endcase
  endfunction

  function automatic longint lp_of(int c);
    return wrap(acc_m[c] >>> (S[c] + Q[c]), W);
  endfunction

  task automatic model_clear();
    for (int c = 0; c < 3; c++) begin
      acc_m[c] = 0;
      hp_m[c]  = 0;
      for (int i = 0; i < 8; i++) pipe[c][i] = 0;
    end
  endtask

  task automatic model_step(longint xv);
    longint w, v;
    for (int c = 0; c < 3; c++) begin
      w = wrap(xv - lp_of(c), W);
      v = prod(c, w);
      hp_m[c] = w;
      if (K[c] == 0) begin
        acc_m[c] = wrap(acc_m[c] + v, W + S[c] + Q[c]);
      end else begin
        acc_m[c] = wrap(acc_m[c] + pipe[c][K[c]-1], W + S[c] + Q[c]);
        for (int i = K[c] - 1; i > 0; i--) pipe[c][i] = pipe[c][i-1];
        pipe[c][0] = v;
      end
    end
  endtask

  task automatic compare(string what);
    for (int c = 0; c < 3; c++) begin
      checks += 2;
      if (longint'(lp[c]) != lp_of(c) || longint'(hp[c]) != hp_m[c]) begin
        failures++;
        if (failures < 10)
          $display("%s cfg%0d: lp=%0d (exp %0d) hp=%0d (exp %0d)", what, c,
                   lp[c], lp_of(c), hp[c], hp_m[c]);
      end
    end
  endtask

  // Drive one clock with the given input and strobe; update the model.
  task automatic step(longint xv, bit strobe);
    x  = W'(xv);
    en = strobe;
    @(posedge clk);
    #1;
    if (strobe) model_step(longint'(signed'(W'(xv))));
    compare("step");
  endtask

  initial begin
    longint walk;
    int first [3];
    clr = 1; x = '0;
    repeat (3) @(posedge clk);
    #1 clr = 0;
    model_clear();

    // impulse latency: lp first changes k+1 strobes after the impulse
    for (int c = 0; c < 3; c++) first[c] = -1;
    for (int n = 0; n < 12; n++) begin
      step(n == 0 ? 64'sd4194304 : 64'sd0, 1'b1);
      for (int c = 0; c < 3; c++)
        if (first[c] < 0 && lp[c] != 0) first[c] = n + 1;
    end
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (first[c] != K[c] + 1) begin
        failures++;
        $display("cfg%0d: impulse reached lp after %0d strobes, expected %0d", c, first[c], K[c] + 1);
      end
    end

    // random walk that wraps modulo 2^24, random strobes
    walk = 0;
    for (int n = 0; n < 20000; n++) begin
      walk = walk + longint'($signed($urandom_range(0, 131071))) - 65536;
      step(walk, $urandom_range(0, 3) != 0);
    end

    // constant input: lowpass -> x, highpass -> 0 (fast configurations)
    for (int n = 0; n < 3000; n++) step(64'sd1234567, 1'b1);
    for (int c = 1; c < 3; c++) begin
      checks += 2;
      if (lp[c] < 1234567 - 2 || lp[c] > 1234567 + 2 || hp[c] < -2 || hp[c] > 2) begin
        failures++;
        $display("cfg%0d: DC lp=%0d hp=%0d", c, lp[c], hp[c]);
      end
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
