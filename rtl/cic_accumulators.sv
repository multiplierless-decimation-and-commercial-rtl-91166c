// cic_accumulators: the three integrator stages of the modified CIC decimator.
//
// Three cascaded accumulators run at the input sample rate on the full 27-bit
// width. Each stage's output is taken from its register, so every stage adds
// one clock of latency (3 in total). Overflow wraps modulo 2^27, which the
// three first-differencers after decimation cancel exactly, so the stages need
// no clear in normal operation; clr is provided for testing, as suggested for
// these registers.
//
// Interface: u (27 bits in), clr (synchronous clear), v (27 bits, third
// integrator register). v[n] = sum of the three-fold running sum of u up to
// u[n-3].
module cic_accumulators
  import decim_pkg::*;
#(
  parameter int W = BY
) (
  input  logic         clk,
  input  logic         clr,
  input  logic [W-1:0] u,
  output logic [W-1:0] v
);

  logic [W-1:0] a1, a2, a3;

  always_ff @(posedge clk) begin
    if (clr) begin
      a1 <= '0;
      a2 <= '0;
      a3 <= '0;
    end else begin
      a1 <= a1 + u;
      a2 <= a2 + a1;
      a3 <= a3 + a2;
    end
  end

  assign v = a3;

endmodule
