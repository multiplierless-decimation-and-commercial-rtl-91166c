// filter_bank: the filtering system that follows the decimator.
//
// Two bands are produced at once from the unwrapped, decimated signal:
//  * "lowpass" band: a first-order 10 Hz or 100 Hz lowpass (lp_sel);
//  * "bandpass" band: one of the first-order highpasses "A", "B" or "C"
//    (hp_sel), optionally followed by a 0.2 Hz highpass that removes the DC
//    offset a ramp in the input leaves after a single highpass (hp02_on), then
//    lowpass "D". LPF "D" is the 16-tap FIR (third-order rates) or, where a
//    first-order lowpass is required, a first-order IIR: preceded by the h_fix
//    correction filter when its loop holds extra delays (44.736 MHz), alone
//    when it does not (1.544 and 6.312 MHz).
// The programmable logic holds one data-rate configuration at a time; CFG
// (from filt_pkg::bank_cfg) sets every coefficient and loop delay. While
// HPF "C" is selected the FIR uses the set that also flattens that filter's
// ripple, where the configuration provides one.
//
// Interface: x (signed W), en (sample strobe), clr, selections, lowpass_out
// (signed W), bandpass_out (signed W+12: the FIR output in 1/128 units, or the
// IIR lowpass output sign extended). Each filter is registered, so every stage
// adds at least one strobe of latency. Unused selection codes (hp_sel = 3, or
// 2 when there is no HPF "C") select HPF "A".
//
// The block structure follows the design's filtering-system diagram; the
// select encodings are this implementation's choice.
module filter_bank
  import filt_pkg::*;
#(
  parameter int        W   = 24,
  parameter bank_cfg_t CFG = bank_cfg(decim_pkg::RATE_622080)
) (
  input  logic                 clk,
  input  logic                 clr,
  input  logic                 en,
  input  logic signed [W-1:0]  x,
  input  logic [1:0]           hp_sel,     // 0: A, 1: B, 2: C
  input  logic                 hp02_on,
  input  logic                 lp_sel,     // 0: 10 Hz, 1: 100 Hz
  output logic signed [W-1:0]  lowpass_out,
  output logic signed [W+11:0] bandpass_out
);

  logic signed [W-1:0] lp10, lp100, hpa, hpb, hpc, hp02, hp_mux, d_in;
  logic signed [W-1:0] unused_lp [4];
  logic signed [W-1:0] unused_hp [2];

  iir_filter #(.W(W), .CFG(CFG.lpf10))  u_lpf10  (.clk, .clr, .en, .x(x), .lp(lp10),  .hp(unused_hp[0]));
  iir_filter #(.W(W), .CFG(CFG.lpf100)) u_lpf100 (.clk, .clr, .en, .x(x), .lp(lp100), .hp(unused_hp[1]));
  iir_filter #(.W(W), .CFG(CFG.hpa))    u_hpa    (.clk, .clr, .en, .x(x), .lp(unused_lp[0]), .hp(hpa));
  iir_filter #(.W(W), .CFG(CFG.hpb))    u_hpb    (.clk, .clr, .en, .x(x), .lp(unused_lp[1]), .hp(hpb));

  if (CFG.has_hpc) begin : g_hpc
    iir_filter #(.W(W), .CFG(CFG.hpc)) u_hpc (.clk, .clr, .en, .x(x), .lp(unused_lp[2]), .hp(hpc));
  end else begin : g_no_hpc
    assign hpc          = hpa;
    assign unused_lp[2] = '0;
  end

  always_comb begin
    unique case (hp_sel)
      2'd1:    hp_mux = hpb;
      2'd2:    hp_mux = hpc;
      default: hp_mux = hpa;
    endcase
  end

  iir_filter #(.W(W), .CFG(CFG.hpf02)) u_hpf02 (.clk, .clr, .en, .x(hp_mux), .lp(unused_lp[3]), .hp(hp02));

  assign d_in        = hp02_on ? hp02 : hp_mux;
  assign lowpass_out = lp_sel ? lp100 : lp10;

  if (CFG.lpd_fir) begin : g_fir
    fir_set_e set;
    assign set = (CFG.has_hpc && hp_sel == 2'd2) ? CFG.fir_set_c : CFG.fir_set;
    fir_symmetric #(.W(W)) u_lpd (.clk, .clr, .en, .set(set), .x(d_in), .y(bandpass_out));
  end else if (CFG.lpd.k != 0) begin : g_iir_fix
    logic signed [W:0]   fixed;
    logic signed [W-1:0] lpd, lpd_hp;
    hfix_filter #(.W(W), .K(int'(CFG.lpd.k))) u_fix (.clk, .clr, .en, .x(d_in), .y(fixed));
    // The correction adds one bit of headroom; the bandpass signal is bounded
    // well inside W bits, so the LSBs are kept.
    iir_filter #(.W(W), .CFG(CFG.lpd)) u_lpd (.clk, .clr, .en, .x(fixed[W-1:0]), .lp(lpd), .hp(lpd_hp));
    assign bandpass_out = (W+12)'(lpd);
  end else begin : g_iir
    // No loop delay, so no correction filter is needed.
    logic signed [W-1:0] lpd, lpd_hp;
    iir_filter #(.W(W), .CFG(CFG.lpd)) u_lpd (.clk, .clr, .en, .x(d_in), .lp(lpd), .hp(lpd_hp));
    assign bandpass_out = (W+12)'(lpd);
  end

endmodule
