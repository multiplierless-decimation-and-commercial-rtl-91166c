// intermediate_stage: the 1 + z^-(M/2) intermediate stage, the output
// multiplexor and the decimation register.
//
// Only one output in M is kept, so the stage does not compute a correct
// filter output every clock. A holding register captures the third integrator
// output v[n0] in the cycle where `latch` is high (the first cycle of each
// output period); the adder then forms v[n0] + v[n] every cycle and the
// decimation register, enabled by `dec_en` M/2 cycles later, keeps
// v[n0] + v[n0 + M/2]. The adder is 27 bits with its carry-out unused. The
// output multiplexor sits before the decimation register so the pins change
// only when a new output is ready.
//
// The design calls for a transparent latch open in the first half of cycle 0;
// this version uses an enabled flip-flop that captures the same sample at the
// end of that cycle, which gives the same kept output whenever M >= 2. For
// M = 1 the multiplexor selects the undecimated input and dec_en stays high.
//
// Interface: v (27 bits), x_bypass (16-bit chip input), latch, dec_en, sel
// (OUTPUT MULTIPLEXOR SELECT), pins (21 bits, registered).
module intermediate_stage
  import decim_pkg::*;
(
  input  logic            clk,
  input  logic [BY-1:0]   v,
  input  logic [IN_W-1:0] x_bypass,
  input  logic            latch,
  input  logic            dec_en,
  input  oms_e            sel,
  output logic [PINS-1:0] pins
);

  logic [BY-1:0]   hold_q;
  logic [BY-1:0]   sum;
  logic [PINS-1:0] mux_out;

  assign sum = hold_q + v;

  output_mux u_mux (
    .sum      (sum),
    .x_bypass (x_bypass),
    .sel      (sel),
    .pins     (mux_out)
  );

  always_ff @(posedge clk) begin
    if (latch)  hold_q <= v;
    if (dec_en) pins   <= mux_out;
  end

endmodule
