// fir_symmetric: 16-tap symmetric FIR lowpass for the "bandpass" band.
//
// The FIR stands in for a third-order Butterworth lowpass and at the same time
// undoes the passband droop of the CIC decimator. Its 16 taps are symmetric
// (a_j = a_15-j), so the 8 pairs of delayed samples are first added and each
// sum is multiplied by one 8-bit coefficient (a_j * 128, largest 127). The
// coefficient set is chosen at run time from the sets in filt_pkg (one per
// decimated data rate, plus a set used with the 250 kHz highpass at
// 622.08 MHz). The output is the exact sum in 1/128 units, W + 12 bits wide;
// dividing by 128 * C_fir (C_fir = sum of the 16 taps) gives unit DC gain.
//
// Interface: x (signed W bits), en (sample strobe), clr, set (coefficient
// set), y (signed W+12 bits). Timing: y is registered; y after the strobe
// that takes x[n] is sum_j a_j x[n-j].
//
// The tap count, symmetry and coefficients follow the design; the
// pre-adder/multiplier form is this implementation's choice (the design
// leaves the FIR to a vendor generator).
module fir_symmetric
  import filt_pkg::*;
#(
  parameter int W = 24
) (
  input  logic                  clk,
  input  logic                  clr,
  input  logic                  en,
  input  fir_set_e              set,
  input  logic signed [W-1:0]   x,
  output logic signed [W+11:0]  y
);

  localparam int TAPS = 16;

  logic signed [W-1:0]  d [TAPS];      // d[0] = x[n], d[j] = x[n-j]
  logic signed [W-1:0]  d_q [1:TAPS-1];
  logic signed [W+11:0] acc;

  assign d[0] = x;
  for (genvar j = 1; j < TAPS; j++) begin : g_taps
    assign d[j] = d_q[j];
  end

  always_comb begin
    acc = '0;
    for (int j = 0; j < TAPS / 2; j++)
      acc += (W+12)'((W+1)'(d[j]) + (W+1)'(d[TAPS-1-j])) * (W+12)'(fir_coef(set, j));
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int j = 1; j < TAPS; j++) d_q[j] <= '0;
      y <= '0;
    end else if (en) begin
      d_q[1] <= x;
      for (int j = 2; j < TAPS; j++) d_q[j] <= d_q[j-1];
      y <= acc;
    end
  end

endmodule
