// decimation_filter_system: complete signal path, from the wrapped chip
// input to the "lowpass" and "bandpass" band outputs.
//
// The input is the low B_x bits of an unbounded random-walk signal sampled at
// one of ten data rates (up to 622.08 MHz). On the chip, a modified CIC
// decimator (unwrap extender, 3 integrators, 1 + z^-(M/2) intermediate stage,
// output multiplexor) lowers the rate by M = 1..16 and sends 21 bits out. In
// the programmable logic, three first-differencers finish the decimator, a
// further differencer/accumulator pair unwraps the signal by R bits, and the
// filter bank forms the two bands.
//
// The chip's carry chains are split into four 7-bit slices one clock apart
// (onchip_decimator at its default SLANT = 1), so the pins change 8 clocks
// after the second sample of an output period enters. One clock drives
// everything; the programmable-logic side advances on the strobe pins_valid,
// i.e. at the decimated rate. End to end, a step at x_in reaches the
// unwrapped filter input 7 + 6M clocks later when decimating and 3 clocks
// later (three strobes) when bypassed; each filter then adds its own strobes.
// The chip side follows the `rate` input at run time. The filter
// coefficients are those of one configuration (PLD_RATE), as the programmable logic would be loaded for
// one data rate at a time; `rate` should then be set to PLD_RATE.
//
// Interface: x_in (16-bit chip input; decimated modes use the low 14 bits),
// rate, hp_sel/hp02_on/lp_sel (band selections), pins (the 21 chip output
// pins), sample_valid (high for the clock in which the programmable-logic
// registers advance), lowpass_out (signed W), bandpass_out (signed W+12).
//
// The partition between chip and programmable logic, the widths (21 pins,
// b = 24, r = 12) and the filter set follow the design. Clocking the
// programmable logic from the chip clock with an enable, and clearing it for one
// clock on reset or on any change of `rate`, are this implementation's choices.
module decimation_filter_system
  import decim_pkg::*;
  import filt_pkg::*;
#(
  parameter int    W        = 24,            // filter data path b
  parameter int    R        = 12,            // unwrap extension r
  parameter rate_e PLD_RATE = RATE_622080
) (
  input  logic                 clk,
  input  logic                 rst,
  input  rate_e                rate,
  input  logic [IN_W-1:0]      x_in,
  input  logic [1:0]           hp_sel,
  input  logic                 hp02_on,
  input  logic                 lp_sel,
  output logic [PINS-1:0]      pins,
  output logic                 sample_valid,
  output logic signed [W-1:0]  lowpass_out,
  output logic signed [W+11:0] bandpass_out
);

  mode_cfg_t           cfg;
  rate_e               rate_q;
  logic                pld_clr;
  logic signed [W-1:0] unwrapped;

  assign cfg = mode_cfg(rate);

  onchip_decimator u_chip (
    .clk        (clk),
    .rst        (rst),
    .rate       (rate),
    .x_in       (x_in),
    .pins       (pins),
    .pins_valid (sample_valid)
  );

  // Clear the programmable-logic registers after reset and on a mode change.
  always_ff @(posedge clk) begin
    rate_q  <= rate;
    pld_clr <= rst || (rate != rate_q);
  end

  input_functions #(.W(W), .R(R)) u_infn (
    .clk    (clk),
    .clr    (pld_clr),
    .en     (sample_valid),
    .bypass (cfg.m == 5'd1),
    .bx     (cfg.bx),
    .pins   (pins),
    .y      (unwrapped)
  );

  filter_bank #(.W(W), .CFG(bank_cfg(PLD_RATE))) u_bank (
    .clk          (clk),
    .clr          (pld_clr),
    .en           (sample_valid),
    .x            (unwrapped),
    .hp_sel       (hp_sel),
    .hp02_on      (hp02_on),
    .lp_sel       (lp_sel),
    .lowpass_out  (lowpass_out),
    .bandpass_out (bandpass_out)
  );

endmodule
