// hfix_filter: approximate correction for extra loop delays.
//
// An IIR filter whose large loop holds k extra delays behaves like the ideal
// filter preceded by h_fix[n] = (eps/eps')(d[n] - eps sum_{m=1..k}
// (1-eps)^(m-1) d[n-m]). For the 400 kHz first-order lowpass of the
// 44.736 MHz rate eps is too large to drop h_fix, so it is approximated with
// one coefficient, eps_m = 2^-5 (1 + 2^-1 + 2^-4) = 25/512:
//   y[n] = x[n-5] - eps_m * sum_{m=1..K} x[n-5-m]
// The eps/eps' gain is left out; the instrument scales the result instead.
// The sum of K samples is formed as a running window, multiplied by eps_m
// with shifts and adds, and subtracted from the delayed input with 9 extra
// fractional bits; the result is truncated to an integer W+1 bits wide.
//
// Interface: x (signed W bits), en (sample strobe), clr, y (signed W+1 bits,
// registered). Timing: latency 5 strobes, matching the d[n-5] term.
//
// The impulse response, eps_m and the 5-sample latency follow the design; the
// internal pipelining is this implementation's choice (all delay sits in
// a sample delay line rather than in split carry chains).
module hfix_filter #(
  parameter int W = 24,
  parameter int K = 4
) (
  input  logic                clk,
  input  logic                clr,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W:0]   y
);

  localparam int LAT = 5;
  localparam int N   = LAT + K;               // delay line length
  localparam int SW  = W + $clog2(K) + 1;      // window-sum width
  localparam int FW  = W + $clog2(K) + 12;     // working width, 9 fraction bits

  logic signed [W-1:0] d [1:N];               // d[i] = x[n-i] before the strobe
  logic signed [SW-1:0] sum;
  logic signed [FW-1:0] corr, full;

  always_comb begin
    sum = '0;
    for (int i = LAT + 1; i <= LAT + K; i++) sum += SW'(d[i]);
    // eps_m * sum * 512 = sum * (16 + 8 + 1)
    corr = (FW'(sum) <<< 4) + (FW'(sum) <<< 3) + FW'(sum);
    full = (FW'(d[LAT]) <<< 9) - corr;
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int i = 1; i <= N; i++) d[i] <= '0;
      y <= '0;
    end else if (en) begin
      d[1] <= x;
      for (int i = 2; i <= N; i++) d[i] <= d[i-1];
      y <= (W+1)'(full >>> 9);
    end
  end

endmodule
