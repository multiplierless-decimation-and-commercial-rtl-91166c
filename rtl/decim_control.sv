// decim_control: control signals of the on-chip decimator.
//
// From the selected data-rate mode it derives the static controls UNWRAP
// EXTEND SELECT and OUTPUT MULTIPLEXOR SELECT (looked up in decim_pkg), a
// REGISTER CLEAR pulse, and the two periodic strobes of the intermediate
// stage. A phase counter runs 0..M-1. With the carry chains pipelined into
// STAGES slices, each slice of the intermediate stage has its own latch
// strobe: latch[j] is high in phase j (mod M), one clock after latch[j-1],
// following the one-clock slant of the data. DECIMATOR ENABLE (dec_en) comes
// M/2 clocks after the last slice's latch, in phase STAGES-1+M/2 (mod M), so
// the kept output is the sum of two integrator samples M/2 apart and one
// output leaves every M clocks. STAGES = 1 gives the unpipelined timing
// (latch in phase 0, enable in phase M/2). With M = 1 the decimator is
// bypassed and dec_en is held high; the latches then carry no meaning.
//
// REGISTER CLEAR is asserted for one clock after reset and after every change
// of mode (at least one clock is required); the phase counter restarts with it.
// The strobe timing follows the design's timing diagrams (four latches on
// consecutive clocks, the enable M/2 clocks after the fourth, e.g. clock 12
// of 16 for M = 16; for M = 2 the first/third and second/fourth latches
// coincide); the counter, the registered clear and the mode encoding are this
// design's own, since the control logic itself was left to the host chip.
//
// Interface: clk, rst (synchronous, active high), rate (mode, may change at any
// time). reg_clear is registered; latch and dec_en decode the registered phase
// counter; ues/oms decode `rate` directly.
module decim_control
  import decim_pkg::*;
#(
  parameter int STAGES = 4          // carry-chain pipeline stages (slices)
) (
  input  logic       clk,
  input  logic       rst,
  input  rate_e      rate,
  output logic       reg_clear,
  output logic [5:0] ues,
  output oms_e       oms,
  output logic [STAGES-1:0] latch,
  output logic       dec_en
);

  mode_cfg_t  cfg;
  rate_e      rate_q;
  logic [4:0] phase;

  assign cfg = mode_cfg(rate);
  assign ues = cfg.ues;
  assign oms = cfg.oms;

  always_ff @(posedge clk) begin
    if (rst) begin
      rate_q    <= rate;
      reg_clear <= 1'b1;
      phase     <= '0;
    end else begin
      rate_q    <= rate;
      reg_clear <= (rate != rate_q);
      if (rate != rate_q || phase == cfg.m - 5'd1) phase <= '0;
      else                                         phase <= phase + 5'd1;
    end
  end

  // a mod M by repeated subtraction (a is at most STAGES - 1 + 8 here)
  function automatic logic [4:0] wrap_phase(int a, logic [4:0] m);
    int r;
    r = a;
    for (int i = 0; i < 8; i++) if (m != 5'd0 && r >= int'(m)) r -= int'(m);
    return 5'(r);
  endfunction

  // No strobe in the clock where the mode changes (the counter restarts).
  for (genvar j = 0; j < STAGES; j++) begin : g_latch
    assign latch[j] = (rate == rate_q) && (phase == wrap_phase(j, cfg.m));
  end
  assign dec_en = (rate == rate_q) &&
                  ((cfg.m == 5'd1) || (phase == wrap_phase(STAGES - 1 + int'(cfg.m) / 2, cfg.m)));

  // The phase never leaves 0..M-1 once a mode has been held for one clock.
  a_phase_range: assert property (@(posedge clk) disable iff (rst || rate != rate_q)
                                  phase < cfg.m);

endmodule
