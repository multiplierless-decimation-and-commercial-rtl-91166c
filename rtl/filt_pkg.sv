// filt_pkg: configuration types and coefficient tables of the off-chip
// (programmable-logic) filters.
//
// A first-order filter is set by its coefficient eps = 2^-s * f, where f is
// (1 +- 2^-m +- 2^-n) (form a) or (1 +- 2^-m)(1 +- 2^-n) (form b), either
// term optional, by the number k of extra delays in its large loop and by the
// number of LSBs rounded off the second coefficient adder. The programmable
// logic holds one data-rate configuration at a time; bank_cfg() returns the
// set of filters of one configuration, for a 24-bit data path, for each of
// the ten data rates. The cutoffs per rate are those of the design's filter
// list; each coefficient is the design's shift-and-add choice for that
// cutoff at the decimated rate, with eps close to 1 - exp(-2 pi fc / fs). The FIR tables are the 16-tap symmetric coefficient sets in
// 1/128 units (taps a0..a7; a15..a8 mirror them).
package filt_pkg;

  import decim_pkg::*;

  typedef struct packed {
    logic [5:0] s;        // overall right shift
    logic [3:0] m;        // first shift (used if use_m)
    logic [3:0] n;        // second shift (used if use_n)
    logic       use_m;
    logic       use_n;
    logic       m_sub;    // 1: the 2^-m term is subtracted
    logic       n_sub;    // 1: the 2^-n term is subtracted
    logic       form_b;   // 0: 1+-2^-m+-2^-n, 1: (1+-2^-m)(1+-2^-n)
    logic [1:0] rnd;      // LSBs rounded off the second coefficient adder
    logic [2:0] k;        // extra delays in the large loop
  } iir_cfg_t;

  // Fractional bits carried by the unrounded multiplier output.
  function automatic int cfg_frac(iir_cfg_t c);
    if (c.form_b) return (c.use_m ? int'(c.m) : 0) + (c.use_n ? int'(c.n) : 0);
    if (c.use_n)  return int'(c.n);
    if (c.use_m)  return int'(c.m);
    return 0;
  endfunction

  // FIR coefficient sets.
  typedef enum logic [2:0] {
    FIR_2048 = 3'd0, FIR_8448 = 3'd1, FIR_34368 = 3'd2, FIR_51840 = 3'd3,
    FIR_139264 = 3'd4, FIR_155520 = 3'd5, FIR_622080 = 3'd6,
    FIR_622080_HPC = 3'd7   // 622.08 MHz, used with the 250 kHz highpass
  } fir_set_e;

  function automatic logic signed [7:0] fir_coef(fir_set_e set, int j);
    logic signed [7:0] t [8];
    unique case (set)
      FIR_2048:       t = '{-8'sd4, -8'sd10, -8'sd13, -8'sd5, 8'sd19, 8'sd58, 8'sd100, 8'sd127};
      FIR_8448:       t = '{-8'sd4, -8'sd9,  -8'sd12, -8'sd5, 8'sd19, 8'sd58, 8'sd100, 8'sd127};
      FIR_34368:      t = '{-8'sd5, -8'sd10, -8'sd12, -8'sd4, 8'sd22, 8'sd60, 8'sd101, 8'sd127};
      FIR_51840:      t = '{-8'sd5, -8'sd10, -8'sd12, -8'sd4, 8'sd22, 8'sd61, 8'sd101, 8'sd127};
      FIR_139264:     t = '{-8'sd2, -8'sd7,  -8'sd12, -8'sd9, 8'sd11, 8'sd50, 8'sd96,  8'sd127};
      FIR_155520:     t = '{-8'sd2, -8'sd7,  -8'sd12, -8'sd9, 8'sd11, 8'sd50, 8'sd96,  8'sd127};
      FIR_622080:     t = '{ 8'sd1, -8'sd1,  -8'sd7,  -8'sd14, -8'sd7, 8'sd28, 8'sd83, 8'sd127};
      FIR_622080_HPC: t = '{ 8'sd1, -8'sd1,  -8'sd8,  -8'sd16, -8'sd11, 8'sd24, 8'sd82, 8'sd127};
      default:        t = '{8'sd0, 8'sd0, 8'sd0, 8'sd0, 8'sd0, 8'sd0, 8'sd0, 8'sd0};
    endcase
    return t[j];
  endfunction

  // One configuration of the filtering system.
  typedef struct packed {
    iir_cfg_t lpf10;      // 10 Hz lowpass  ("lowpass" band)
    iir_cfg_t lpf100;     // 100 Hz lowpass ("lowpass" band)
    iir_cfg_t hpf02;      // optional 0.2 Hz highpass (removes ramp offset)
    iir_cfg_t hpa;        // bandpass highpass "A"
    iir_cfg_t hpb;        // bandpass highpass "B"
    iir_cfg_t hpc;        // bandpass highpass "C" (if has_hpc)
    logic     has_hpc;
    logic     lpd_fir;    // 1: LPF "D" is the FIR, 0: first-order IIR + h_fix
    iir_cfg_t lpd;        // LPF "D" when it is first order
    fir_set_e fir_set;    // FIR set normally used
    fir_set_e fir_set_c;  // FIR set used while HPF "C" is selected
  } bank_cfg_t;

  localparam iir_cfg_t IIR_NONE = '0;

  // Shorthand for one coefficient: eps = 2^-s (1 +- 2^-m +- 2^-n) (fb = 0) or
  // 2^-s (1 +- 2^-m)(1 +- 2^-n) (fb = 1); m = 0 or n = 0 leaves that term out;
  // ms/ns = 1 subtracts it; k loop delays; rnd LSBs rounded.
  function automatic iir_cfg_t cf(int s, int m, bit ms, int n, bit ns, bit fb,
                                  int k = 0, int rnd = 0);
    iir_cfg_t c;
    c.s      = 6'(s);
    c.m      = 4'(m);
    c.n      = 4'(n);
    c.use_m  = (m != 0);
    c.use_n  = (n != 0);
    c.m_sub  = ms;
    c.n_sub  = ns;
    c.form_b = fb;
    c.rnd    = 2'(rnd);
    c.k      = 3'(k);
    return c;
  endfunction

  // Configuration of one data rate. Rates up to 155.52 MHz (decimated rate at
  // most 12.96 MHz) need no loop delays; 139.264 MHz uses k = 3 and k = 4,
  // and 44.736 and 622.08 MHz use k = 4 (k = 3 for the 250 kHz highpass).
  // The first-order LPF "D" of 1.544 and 6.312 MHz has no loop delay and so
  // no h_fix; the 44.736 MHz one has both.
  function automatic bank_cfg_t bank_cfg(rate_e r);
    bank_cfg_t b;
    b = '0;
    unique case (r)
      RATE_1544: begin
        b.lpf10  = cf(15, 2, 0, 4, 0, 1);     // 2^-15 (1+2^-2)(1+2^-4)
        b.lpf100 = cf(11, 3, 1, 5, 1, 0);     // 2^-11 (1-2^-3-2^-5)
        b.hpf02  = cf(20, 3, 1, 5, 1, 1);     // 2^-20 (1-2^-3)(1-2^-5)
        b.hpa    = b.lpf10;                   // 10 Hz
        b.hpb    = cf(5, 6, 0, 7, 0, 0);      // 8 kHz: 2^-5 (1+2^-6+2^-7)
        b.lpd    = cf(3, 3, 0, 4, 0, 1);      // 40 kHz: 2^-3 (1+2^-3)(1+2^-4)
        b.fir_set = FIR_2048;  b.fir_set_c = FIR_2048;
      end
      RATE_2048: begin
        b.lpf10  = cf(15, 8, 0, 0, 0, 0);     // 2^-15 (1+2^-8)
        b.lpf100 = cf(12, 2, 0, 7, 0, 0);     // 2^-12 (1+2^-2+2^-7)
        b.hpf02  = cf(21, 2, 0, 5, 0, 1);     // 2^-21 (1+2^-2)(1+2^-5)
        b.hpa    = cf(14, 8, 0, 0, 0, 0);     // 20 Hz: 2^-14 (1+2^-8)
        b.hpb    = cf(9, 4, 0, 5, 0, 0);      // 700 Hz: 2^-9 (1+2^-4+2^-5)
        b.hpc    = cf(4, 3, 1, 6, 1, 0);      // 18 kHz: 2^-4 (1-2^-3-2^-6)
        b.has_hpc = 1'b1;  b.lpd_fir = 1'b1;
        b.fir_set = FIR_2048;  b.fir_set_c = FIR_2048;
      end
      RATE_6312: begin
        b.lpf10  = cf(17, 2, 0, 4, 0, 0);     // 2^-17 (1+2^-2+2^-4)
        b.lpf100 = cf(14, 1, 0, 3, 0, 0);     // 2^-14 (1+2^-1+2^-3)
        b.hpf02  = cf(22, 3, 1, 5, 1, 0);     // 2^-22 (1-2^-3-2^-5)
        b.hpa    = b.lpf10;                   // 10 Hz
        b.hpb    = cf(9, 1, 0, 6, 0, 1);      // 3 kHz: 2^-9 (1+2^-1)(1+2^-6)
        b.lpd    = cf(4, 4, 1, 7, 1, 0);      // 60 kHz: 2^-4 (1-2^-4-2^-7)
        b.fir_set = FIR_2048;  b.fir_set_c = FIR_2048;
      end
      RATE_8448: begin
        b.lpf10  = cf(16, 5, 1, 7, 0, 0);     // 2^-16 (1-2^-5+2^-7)
        b.lpf100 = cf(13, 2, 0, 5, 1, 0);     // 2^-13 (1+2^-2-2^-5)
        b.hpf02  = cf(22, 2, 0, 0, 0, 0);     // 2^-22 (1+2^-2)
        b.hpa    = cf(15, 5, 1, 7, 0, 0);     // 20 Hz: 2^-15 (1-2^-5+2^-7)
        b.hpb    = cf(8, 3, 0, 6, 0, 0);      // 3 kHz: 2^-8 (1+2^-3+2^-6)
        b.hpc    = cf(3, 3, 1, 5, 0, 1);      // 80 kHz: 2^-3 (1-2^-3)(1+2^-5)
        b.has_hpc = 1'b1;  b.lpd_fir = 1'b1;
        b.fir_set = FIR_8448;  b.fir_set_c = FIR_8448;
      end
      RATE_34368: begin
        b.lpf10  = cf(17, 5, 1, 7, 1, 0);     // 2^-17 (1-2^-5-2^-7)
        b.lpf100 = cf(14, 3, 0, 4, 0, 1);     // 2^-14 (1+2^-3)(1+2^-4)
        b.hpf02  = cf(23, 2, 0, 6, 1, 0);     // 2^-23 (1+2^-2-2^-6)
        b.hpa    = b.lpf100;                  // 100 Hz
        b.hpb    = cf(7, 4, 1, 8, 1, 0);      // 10 kHz: 2^-7 (1-2^-4-2^-8)
        b.lpd_fir = 1'b1;
        b.fir_set = FIR_34368;  b.fir_set_c = FIR_34368;
      end
      RATE_44736: begin
        b.lpf10  = cf(20, 1, 0, 6, 1, 1, 4, 1);   // 2^-20 (1+2^-1)(1-2^-6), 1 LSB rounded
        b.lpf100 = cf(16, 4, 1, 5, 1, 1, 4, 3);   // 2^-16 (1-2^-4)(1-2^-5), 3 LSBs rounded
        b.hpf02  = cf(25, 4, 1, 0, 0, 0, 4);      // 2^-25 (1-2^-4)
        b.hpa    = b.lpf10;                       // 10 Hz
        b.hpb    = cf(8, 4, 0, 0, 0, 0, 4);       // 30 kHz: 2^-8 (1+2^-4)
        b.lpd    = cf(5, 2, 0, 3, 0, 1, 4);       // 400 kHz: 2^-5 (1+2^-2)(1+2^-3)
        b.fir_set = FIR_2048;  b.fir_set_c = FIR_2048;
      end
      RATE_51840: begin
        b.lpf10  = cf(16, 4, 1, 6, 0, 0);     // 2^-16 (1-2^-4+2^-6)
        b.lpf100 = cf(13, 3, 0, 4, 0, 0);     // 2^-13 (1+2^-3+2^-4)
        b.hpf02  = cf(22, 2, 0, 5, 1, 0);     // 2^-22 (1+2^-2-2^-5)
        b.hpa    = b.lpf10;                   // 10 Hz
        b.hpb    = cf(11, 1, 0, 7, 1, 1);     // 500 Hz: 2^-11 (1+2^-1)(1-2^-7)
        b.hpc    = cf(5, 4, 1, 6, 1, 0);      // 20 kHz: 2^-5 (1-2^-4-2^-6)
        b.has_hpc = 1'b1;  b.lpd_fir = 1'b1;
        b.fir_set = FIR_51840;  b.fir_set_c = FIR_51840;
      end
      RATE_139264: begin
        b.lpf10  = cf(19, 4, 1, 0, 0, 0, 4);  // 2^-19 (1-2^-4)
        b.lpf100 = cf(16, 3, 0, 4, 0, 0, 3);  // 2^-16 (1+2^-3+2^-4)
        b.hpf02  = cf(25, 2, 0, 5, 1, 1, 4);  // 2^-25 (1+2^-2)(1-2^-5)
        b.hpa    = cf(15, 3, 0, 4, 0, 0, 3);  // 200 Hz: 2^-15 (1+2^-3+2^-4)
        b.hpb    = cf(9, 4, 1, 6, 1, 0, 3);   // 10 kHz: 2^-9 (1-2^-4-2^-6)
        b.lpd_fir = 1'b1;
        b.fir_set = FIR_139264;  b.fir_set_c = FIR_139264;
      end
      RATE_155520: begin
        b.lpf10  = cf(18, 2, 0, 6, 0, 1);     // 2^-18 (1+2^-2)(1+2^-6)
        b.lpf100 = cf(15, 1, 0, 4, 0, 1);     // 2^-15 (1+2^-1)(1+2^-4)
        b.hpf02  = cf(24, 1, 0, 3, 0, 0);     // 2^-24 (1+2^-1+2^-3)
        b.hpa    = b.lpf10;                   // 10 Hz
        b.hpb    = cf(11, 7, 1, 0, 0, 0);     // 1 kHz: 2^-11 (1-2^-7)
        b.hpc    = cf(5, 7, 1, 0, 0, 0);      // 65 kHz: 2^-5 (1-2^-7)
        b.has_hpc = 1'b1;  b.lpd_fir = 1'b1;
        b.fir_set = FIR_155520;  b.fir_set_c = FIR_155520;
      end
      default: begin  // RATE_622080
        b.lpf10  = cf(19, 3, 1, 5, 1, 1, 4);  // 2^-19 (1-2^-3)(1-2^-5)
        b.lpf100 = cf(16, 4, 0, 0, 0, 0, 4);  // 2^-16 (1+2^-4)
        b.hpf02  = cf(25, 3, 0, 5, 1, 1, 4);  // 2^-25 (1+2^-3)(1-2^-5)
        b.hpa    = b.lpf10;                   // 10 Hz
        b.hpb    = cf(10, 3, 1, 4, 1, 1, 4);  // 5 kHz: 2^-10 (1-2^-3)(1-2^-4)
        b.hpc    = cf(5, 3, 0, 8, 1, 0, 3);   // 250 kHz: 2^-5 (1+2^-3-2^-8)
        b.has_hpc = 1'b1;  b.lpd_fir = 1'b1;
        b.fir_set = FIR_622080;  b.fir_set_c = FIR_622080_HPC;
      end
    endcase
    return b;
  endfunction

endpackage
