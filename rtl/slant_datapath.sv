// slant_datapath: the on-chip decimator data path with its carry chains
// pipelined into four slices ("carry-chain pipeline slant").
//
// Every 27-bit adder of the chip is cut into four slices: bits 0..6, 7..13,
// 14..20 and 21..26. Slice j of a sample is processed one clock after slice
// j-1, and the carry out of each slice is held in a one-bit register for the
// next slice, so no carry ripples through more than seven bits in a clock.
// The data therefore travel "slanted": in any clock, slice j holds a sample
// j clocks older than slice 0.
//
//  * Unwrapping bit extender: bits 0..6 of the input enter directly; bits
//    7..13 first pass a 7-bit slant register. Output bits 0..7 are the input
//    register itself; bits 8..26 are an accumulator of the sign-extended
//    first difference, whose carry-in is the borrow out of bit 7 of the
//    difference (the borrow out of bit 6 is carried from slice 0 in a
//    register). The sign chosen by UNWRAP EXTEND SELECT is formed in slice 1
//    and passed on to slices 2 and 3 through two registers.
//  * Three integrators: each slice adds its part of the input and the
//    registered carry of the slice below.
//  * Intermediate stage: each slice has its own holding register, loaded by
//    its own latch strobe (latch[j], one clock after latch[j-1]), and its own
//    adder slice with a registered carry. Slices 0..2 of the sum are then
//    delayed by 3, 2 and 1 registers so that all four line up with slice 3
//    (the "de-slant"); the top slice goes straight to the output multiplexor
//    and the decimation register, which DECIMATOR ENABLE loads.
//
// Interface: x (the low 14 input bits), x_bypass (16-bit input for M = 1),
// ues, sel (OUTPUT MULTIPLEXOR SELECT), latch[3:0], dec_en, clr (REGISTER
// CLEAR: clears the unwrapping extender and its pipeline registers), pins.
// Timing: slice j of sample n leaves the unwrapping extender after clock
// n+j+1 and the third integrator after clock n+j+4. latch[j] must be high
// in the clock where slice j of the first kept sample leaves the integrators,
// and dec_en M/2 clocks after latch[3]; the pins then change 8 clocks after
// the second kept sample entered (5 for the unpipelined data path).
//
// The slice boundaries, the slant and de-slant registers, the pipelined sign
// and the per-slice latches follow the design. The latches are enabled
// flip-flops here (the design uses transparent latches open for the first
// half of the clock), the integrators have no clear (three combs remove any
// starting value), and the slice adders are plain behavioural adders.
module slant_datapath
  import decim_pkg::*;
(
  input  logic              clk,
  input  logic              clr,
  input  logic [BX_MAX-1:0] x,
  input  logic [IN_W-1:0]   x_bypass,
  input  logic [5:0]        ues,
  input  logic [3:0]        latch,
  input  logic              dec_en,
  input  oms_e              sel,
  output logic [PINS-1:0]   pins
);

  localparam int NS = 4;    // slices
  localparam int SL = 7;    // slice width (the top slice has BY - 21 = 6 bits)

  // ---------------- unwrapping bit extender ----------------
  logic [6:0] x0_q;         // input register, bits 0..6
  logic [6:0] x1_s;         // slant register, bits 7..13
  logic [6:0] x1_q;         // input register, bits 7..13
  logic       b6_q;         // borrow out of bit 6 of the difference
  logic       b6;           // the same, before its register
  logic [6:0] d1;           // difference bits 7..13
  logic       b7;           // borrow out of bit 7 of the difference
  logic [5:0] ext;          // extended difference, bits 8..13
  logic [6:0] e1;           // {carry, accumulator bits 8..13}
  logic [7:0] e2;           // {carry, accumulator bits 14..20}
  logic [5:0] e3;           // accumulator bits 21..26
  logic [5:0] acc1_q;
  logic [6:0] acc2_q;
  logic [5:0] acc3_q;
  logic       c1_q, c2_q;   // accumulator carries into slices 2 and 3
  logic       s1_q, s2_q;   // sign extension for slices 2 and 3

  // Bits 8..13 of the extended difference: each is either the difference
  // bit itself (its UES bit set) or a copy of the bit below it.
  function automatic logic [5:0] extend(logic [6:0] d, logic [5:0] ues_v);
    logic [6:0] e;
    e[0] = d[0];
    for (int i = 1; i < 7; i++) e[i] = ues_v[i-1] ? d[i] : e[i-1];
    return e[6:1];
  endfunction

  always_comb begin
    b6  = (x[6:0] < x0_q);
    d1  = x1_s - x1_q - 7'(b6_q);
    b7  = ({1'b0, x1_s[0]} < {1'b0, x1_q[0]} + 2'(b6_q));
    ext = extend(d1, ues);
    e1 = {1'b0, acc1_q} + {1'b0, ext} + 7'(b7);
    e2 = {1'b0, acc2_q} + {1'b0, {7{s1_q}}} + 8'(c1_q);
    e3 = acc3_q + {6{s2_q}} + 6'(c2_q);
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      x0_q <= '0; x1_s <= '0; x1_q <= '0; b6_q <= 1'b0;
      acc1_q <= '0; acc2_q <= '0; acc3_q <= '0;
      c1_q <= 1'b0; c2_q <= 1'b0; s1_q <= 1'b0; s2_q <= 1'b0;
    end else begin
      // slice 0
      x0_q   <= x[6:0];
      b6_q   <= b6;
      x1_s   <= x[13:7];
      // slice 1
      x1_q   <= x1_s;
      acc1_q <= e1[5:0];
      c1_q   <= e1[6];
      s1_q   <= ext[5];
      // slice 2
      acc2_q <= e2[6:0];
      c2_q   <= e2[7];
      s2_q   <= s1_q;
      // slice 3
      acc3_q <= e3;
    end
  end

  logic [BY-1:0] u;         // extender output, slanted
  assign u = {acc3_q, acc2_q, acc1_q, x1_q[0], x0_q};

  // ---------------- integrators and intermediate stage ----------------
  logic [BY-1:0] integ [4];     // integ[0] = u, integ[i] = integrator i output
  logic [BY-1:0] sum;           // intermediate-stage sum, slanted
  logic          ci [3][NS];    // integrator carry registers
  logic          cs [NS];       // intermediate-stage carry registers
  logic [BY-1:0] aligned;       // de-slanted sum

  assign integ[0] = u;

  for (genvar j = 0; j < NS; j++) begin : g_slice
    localparam int LO = SL * j;
    localparam int W  = (j == NS - 1) ? BY - LO : SL;

    logic [W-1:0] a_q [3];
    logic [W-1:0] h_q;
    logic [W:0]   s_int [3];
    logic [W:0]   s_mid;
    logic         cin_int [3];
    logic         cin_mid;

    for (genvar i = 0; i < 3; i++) begin : g_int
      if (j == 0) begin : g_c0
        assign cin_int[i] = 1'b0;
      end else begin : g_cn
        assign cin_int[i] = ci[i][j-1];
      end
      assign s_int[i] = {1'b0, a_q[i]} + {1'b0, integ[i][LO +: W]} + (W+1)'(cin_int[i]);
      always_ff @(posedge clk) begin
        a_q[i]   <= s_int[i][W-1:0];
        ci[i][j] <= s_int[i][W];
      end
      assign integ[i+1][LO +: W] = a_q[i];
    end

    if (j == 0) begin : g_m0
      assign cin_mid = 1'b0;
    end else begin : g_mn
      assign cin_mid = cs[j-1];
    end
    assign s_mid = {1'b0, h_q} + {1'b0, integ[3][LO +: W]} + (W+1)'(cin_mid);
    assign sum[LO +: W]  = s_mid[W-1:0];

    always_ff @(posedge clk) begin
      if (latch[j]) h_q <= integ[3][LO +: W];
      cs[j] <= s_mid[W];
    end

    // de-slant: slice j waits NS-1-j clocks for the top slice
    if (j == NS - 1) begin : g_top
      assign aligned[LO +: W] = sum[LO +: W];
    end else begin : g_dly
      logic [W-1:0] dq [NS-1-j];
      always_ff @(posedge clk) begin
        dq[0] <= sum[LO +: W];
        for (int k = 1; k < NS - 1 - j; k++) dq[k] <= dq[k-1];
      end
      assign aligned[LO +: W] = dq[NS-2-j];
    end
  end

  logic [PINS-1:0] mux_out;

  output_mux u_mux (
    .sum      (aligned),
    .x_bypass (x_bypass),
    .sel      (sel),
    .pins     (mux_out)
  );

  always_ff @(posedge clk) begin
    if (dec_en) pins <= mux_out;
  end

endmodule
