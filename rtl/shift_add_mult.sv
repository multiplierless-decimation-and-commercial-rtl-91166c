// shift_add_mult: multiplierless constant-coefficient multiplier.
//
// Multiplies a signed W-bit sample by f = (1 +- 2^-m +- 2^-n) (form a: both
// shifted copies taken from the input) or f = (1 +- 2^-m)(1 +- 2^-n) (form b:
// the second shifted copy is taken from the first adder's output), using at
// most two adders. Either term may be absent (a one-adder or zero-adder
// coefficient). Nothing is rounded by default: the product keeps FRAC
// fractional bits (n for form a, m + n for form b), so the coefficient acts
// the same on small and large signals. The overall 2^-s of the coefficient is
// not applied here; it is an alignment the caller's accumulator absorbs.
//
// With CFG.rnd = R > 0 the R LSBs of the second adder are rounded off: since
// they come only from its shifted input, that input is rounded to nearest
// (its top discarded bit becomes the carry-in, or the borrow-in when the term
// is subtracted) and the output carries FRAC - R fractional bits.
//
// Purely combinational. Output p equals w * f * 2^(FRAC - R), exact when
// R = 0. The forms follow the design; the use of a single parameter struct is
// this implementation's choice.
module shift_add_mult
  import filt_pkg::*;
#(
  parameter int       W   = 24,
  parameter iir_cfg_t CFG = '{s:19, m:3, n:5, use_m:1, use_n:1, m_sub:1, n_sub:1, form_b:1, rnd:0, k:4},
  localparam int      FRAC = cfg_frac(CFG),
  localparam int      R    = int'(CFG.rnd),
  localparam int      OW   = W + FRAC - R + 2
) (
  input  logic signed [W-1:0]  w,
  output logic signed [OW-1:0] p
);

  localparam int PW = W + FRAC + 2;   // |f| < 2.25, so two guard bits suffice
  localparam int MS = CFG.use_m ? int'(CFG.m) : 0;
  localparam int NS = CFG.use_n ? int'(CFG.n) : 0;

  logic signed [PW-1:0] wx, first, a, t, t_r;

  always_comb begin
    wx = PW'(w);
    if (CFG.form_b) begin
      // first adder: w * (1 +- 2^-m), scaled by 2^m
      if (CFG.use_m) first = CFG.m_sub ? (wx <<< MS) - wx : (wx <<< MS) + wx;
      else           first = wx;
      a = first <<< NS;               // unshifted input of the second adder
      t = CFG.use_n ? first : '0;     // shifted input of the second adder
    end else begin
      // first adder: w + -2^-m w, scaled by 2^FRAC
      if (CFG.use_m) first = CFG.m_sub ? (wx <<< FRAC) - (wx <<< (FRAC - MS))
                                       : (wx <<< FRAC) + (wx <<< (FRAC - MS));
      else           first = wx <<< FRAC;
      a = first;
      t = CFG.use_n ? wx : '0;
    end
    if (R > 0) t_r = (t + (PW'(1) <<< (R > 0 ? R - 1 : 0))) >>> R;
    else       t_r = t;
    p = OW'(CFG.n_sub ? (a >>> R) - t_r : (a >>> R) + t_r);
  end

endmodule
