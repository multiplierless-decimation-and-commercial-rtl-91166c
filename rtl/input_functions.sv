// input_functions: first stage of the programmable-logic filters.
//
// For decimated rates, three 21-bit first-differencers (1 - z^-1 each, at the
// decimated rate) complete the CIC decimator whose integrators and
// intermediate stage are on the chip. All of them wrap modulo 2^21, which
// cancels the wrap-around of the on-chip integrators. A fourth
// first-differencer followed by a (21+R)-bit accumulator then "unwraps" the
// signal by R more bits, so that the highpass filters see a data path wide
// enough for their bounded output. The top W bits of the unwrapped value feed
// the filters (R+21-W LSBs are dropped).
//
// For undecimated rates (bypass = 1) the three differencers are skipped. Only
// B_x bits of the pins are then meaningful (pins[20:5] carry the 16-bit chip
// input), so the pins are first shifted left by 16 - B_x to put bit B_x-1 at
// the top; the unwrap differencer then wraps at the right bit.
//
// Every adder is split into a 16-bit least significant part (LSP) and a
// most significant part (MSP: 5 bits for the differencers, 5 + R bits for the
// accumulator). The LSPs of all stages run one strobe ahead of the MSPs: a
// 5-bit register delays the MSP of the input, each LSP adder's carry (borrow)
// out waits in a one-bit register for its MSP, and at the end the LSP bits
// that reach the output (W - 5 - R of them) pass one more register so they
// line up with the accumulator MSP. No carry chain is longer than 16 bits
// except the accumulator MSP.
//
// Interface: pins (21 bits), en (new-sample strobe), clr (synchronous clear of
// all registers, to be pulsed when the mode changes), bypass, bx (B_x,
// used only when bypass), y (signed W bits, registered). Timing: every
// register advances on en; latency is 6 strobes when decimating (3 combs,
// unwrap differencer, accumulator, MSP alignment) and 3 when bypassed.
//
// The chain, widths, the choice of r and the LSP/MSP carry pipelining follow
// the design; the bypass shifter is this implementation's choice.
module input_functions
  import decim_pkg::*;
#(
  parameter int W = 24,     // filter data path b
  parameter int R = 12      // unwrap extension r
) (
  input  logic                clk,
  input  logic                clr,
  input  logic                en,
  input  logic                bypass,
  input  logic [4:0]          bx,
  input  logic [PINS-1:0]     pins,
  output logic signed [W-1:0] y
);

  localparam int LW = 16;          // LSP width
  localparam int MW = PINS - LW;   // MSP width of the differencers
  localparam int AW = MW + R;      // MSP width of the accumulator
  localparam int TW = W - AW;      // LSP bits that reach the output

  if (TW < 1 || TW > LW) begin : g_bad
    $error("input_functions: W - 5 - R must lie in 1..16");
  end

  logic [PINS-1:0] a;              // input, aligned for undecimated rates
  logic [MW-1:0]   a_m_q;          // MSP offset register

  // Differencer stages 0..2 are the combs, stage 3 unwraps.
  logic [LW-1:0] dl_prev [4], dl_out [4], dl_in [4];
  logic [MW-1:0] dm_prev [4], dm_out [4], dm_in [4];
  logic          d_bor   [4];      // registered borrow from LSP to MSP

  logic [LW-1:0] acc_l;
  logic          acc_c;
  logic [AW-1:0] acc_m;
  logic [TW-1:0] lsp_q;

  always_comb begin
    a = bypass ? pins << (5'(IN_W) - bx) : pins;
    dl_in[0] = a[LW-1:0];
    dm_in[0] = a_m_q;
    for (int i = 1; i < 3; i++) begin
      dl_in[i] = dl_out[i-1];
      dm_in[i] = dm_out[i-1];
    end
    dl_in[3] = bypass ? a[LW-1:0] : dl_out[2];
    dm_in[3] = bypass ? a_m_q      : dm_out[2];
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      a_m_q <= '0;
      for (int i = 0; i < 4; i++) begin
        dl_prev[i] <= '0;
        dl_out[i]  <= '0;
        dm_prev[i] <= '0;
        dm_out[i]  <= '0;
        d_bor[i]   <= 1'b0;
      end
      acc_l <= '0;
      acc_c <= 1'b0;
      acc_m <= '0;
      lsp_q <= '0;
    end else if (en) begin
      a_m_q <= a[PINS-1:LW];
      for (int i = 0; i < 4; i++) begin
        dl_prev[i]           <= dl_in[i];
        {d_bor[i], dl_out[i]} <= {1'b0, dl_in[i]} - {1'b0, dl_prev[i]};
        dm_prev[i]           <= dm_in[i];
        dm_out[i]            <= dm_in[i] - dm_prev[i] - MW'(d_bor[i]);
      end
      {acc_c, acc_l} <= {1'b0, acc_l} + {1'b0, dl_out[3]};
      acc_m <= acc_m + AW'(signed'(dm_out[3])) + AW'(acc_c);
      lsp_q <= acc_l[LW-1 -: TW];
    end
  end

  assign y = {acc_m, lsp_q};

endmodule
