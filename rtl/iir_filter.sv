// iir_filter: first-order lowpass/highpass filter for wrapping signals.
//
// Structure: w[n] = x[n] - y[n] (input adder, W bits, carry-out ignored),
// v[n] = eps * w[n] (shift_add_mult plus a 2^-s alignment), and an
// accumulator y[n+1] = y[n] + v[n-k]. With k = 0 this is
//   Y(z)/X(z) = eps z^-1 / (1 - (1 - eps) z^-1)   (lowpass output y)
//   W(z)/X(z) = (1 - z^-1) / (1 - (1 - eps) z^-1) (highpass output w),
// i.e. the impulse-invariant first-order filter with alpha = 1 - eps, unit
// DC gain for the lowpass. Multiplying by eps instead of alpha keeps the wide
// data path inside the accumulator loop only: the accumulator holds W integer
// bits plus s + FRAC fractional bits, everything else is W bits wide.
//
// k > 0 inserts k extra registers in the large loop so the loop can be
// pipelined at high sample rates; the coefficient is then the eps' given for
// that k, and the correction filter h_fix is either left out (small eps) or
// placed in front (hfix_filter). All arithmetic wraps modulo 2^W in the
// integer part, so the input may be the low bits of an unbounded signal as
// long as |w| stays below 2^(W-1); the lowpass output is then the low W bits
// of the true lowpass signal.
//
// Interface: x (signed W bits), en (sample strobe; all registers advance
// only when en is high), clr (synchronous clear), lp = integer part of the
// accumulator register, hp = w registered on en. Timing: lp[n] reflects
// inputs up to x[n-1-k]; hp is w[n] one strobe later.
//
// The structure, the unrounded multiplier and the loop-delay technique follow
// the design. The k loop registers sit on the multiplier output here; the
// design spreads them over the adders of the loop, which changes timing but
// not the transfer function.
module iir_filter
  import filt_pkg::*;
#(
  parameter int       W   = 24,
  parameter iir_cfg_t CFG = '{s:19, m:3, n:5, use_m:1, use_n:1, m_sub:1, n_sub:1, form_b:1, rnd:0, k:4}
) (
  input  logic                clk,
  input  logic                clr,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] lp,
  output logic signed [W-1:0] hp
);

  localparam int FRAC = cfg_frac(CFG) - int'(CFG.rnd);
  localparam int OW   = W + FRAC + 2;                  // multiplier output width
  localparam int AW   = W + int'(CFG.s) + FRAC;        // accumulator width
  localparam int K    = int'(CFG.k);

  logic signed [W-1:0]  w;
  logic signed [OW-1:0] p;
  logic signed [AW-1:0] v, v_loop, acc;
  logic signed [AW-1:0] dly [K+1];

  assign lp = acc[AW-1 -: W];
  assign w  = x - lp;

  shift_add_mult #(.W(W), .CFG(CFG)) u_mult (
    .w (w),
    .p (p)
  );

  // Sign extend (or, for tiny s, wrap) the product to the accumulator width.
  assign v = AW'(p);

  assign dly[0]  = v;
  assign v_loop  = dly[K];

  for (genvar i = 1; i <= K; i++) begin : g_loop_dly
    always_ff @(posedge clk) begin
      if (clr)     dly[i] <= '0;
      else if (en) dly[i] <= dly[i-1];
    end
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      acc <= '0;
      hp  <= '0;
    end else if (en) begin
      acc <= acc + v_loop;
      hp  <= w;
    end
  end

endmodule
