// unwrap_extender: unwrapping bit extender at the front of the decimator.
//
// The input is only the low B_x bits of an unbounded random-walk signal whose
// sample-to-sample step is below 2^(B_x-1). Taking the first difference of the
// wrapped input, sign extending it from bit B_x-1 and accumulating it at 27
// bits rebuilds the low 27 bits of the true signal (up to the offset removed
// by REGISTER CLEAR).
//
// B_x can be 8..14, so the 14-bit first difference passes bits 8..13 through a
// thermometer-coded 2:1 multiplexor chain: where UNWRAP EXTEND SELECT bit
// ues[i] (UES(8+i)) is 1 the difference bit is used, otherwise the bit below
// is repeated, so the sign ends up copied from bit B_x-1. Because the low bits
// of the accumulator always equal the low bits of the input register, the
// bottom 8 accumulator bits are not built: output bits 0..7 come straight from
// the first-differencer register, and the 19-bit accumulator for bits 8..26
// takes as carry-in the borrow out of bit 7 of the difference (written here as
// a true borrow; in the A + ~B + 1 form it is the inverted carry).
//
// Interface: x (14 bits of the chip input), ues, clr (REGISTER CLEAR, clears
// both registers synchronously), y (27 bits). Timing: y is registered; y for
// input x[n] appears one clock after x[n] is presented.
//
// The structure follows the design description; the synchronous clear and
// the exact form of the extension chain are this implementation's choices.
module unwrap_extender
  import decim_pkg::*;
(
  input  logic               clk,
  input  logic               clr,
  input  logic [BX_MAX-1:0]  x,
  input  logic [5:0]         ues,
  output logic [BY-1:0]      y
);

  localparam int HI = BY - BX_MIN;  // 19 accumulator bits (8..26)

  logic [BX_MAX-1:0] x_q;           // first-differencer register
  logic [HI-1:0]     acc_q;         // accumulator for bits 8..26

  // Low part of the difference: only its borrow and bit 7 are needed.
  logic [BX_MIN:0]   lo_diff;       // 9 bits: bit 8 is the borrow out of bit 7
  logic [BX_MAX-1:0] diff;
  logic [BX_MAX-1:BX_MIN-1] ext;    // extension chain, bits 7..13
  logic [HI-1:0]     addend;

  always_comb begin
    lo_diff = {1'b0, x[BX_MIN-1:0]} - {1'b0, x_q[BX_MIN-1:0]};
    diff    = x - x_q;
    ext[BX_MIN-1] = diff[BX_MIN-1];
    for (int i = BX_MIN; i < BX_MAX; i++)
      ext[i] = ues[i-BX_MIN] ? diff[i] : ext[i-1];
    addend = {{(BY-BX_MAX){ext[BX_MAX-1]}}, ext[BX_MAX-1:BX_MIN]};
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      x_q   <= '0;
      acc_q <= '0;
    end else begin
      x_q   <= x;
      acc_q <= acc_q + addend + HI'(lo_diff[BX_MIN]);
    end
  end

  assign y = {acc_q, x_q[BX_MIN-1:0]};

endmodule
