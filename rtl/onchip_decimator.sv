// onchip_decimator: the part of the modified CIC decimator that lives on the
// analog chip.
//
// Chain: unwrapping bit extender (B_x bits -> 27 bits) -> three 27-bit
// integrators -> intermediate stage (1 + z^-(M/2)) -> output multiplexor ->
// decimation register -> 21 output pins. The three comb stages that complete
// the filter (R_M(z)^3 (1 + z^-(M/2)), gain 2 M^3) run off chip at the low rate
// (see input_functions). Everything here runs on the input-rate clock.
//
// Interface: x_in (16-bit chip input; the decimated modes use x_in[13:0]),
// rate (data-rate mode), rst (synchronous), pins (21 bits, registered) and
// pins_valid, high for one clock after each decimation-register update
// (every clock when M = 1). One output is produced every M clocks.
//
// SLANT = 1 (the default, as in the design) builds the data path with every
// carry chain pipelined into four 7-bit slices (slant_datapath); the pins
// then change 8 clocks after the second kept sample entered. SLANT = 0 builds
// the same filter with full 27-bit adders (unwrap_extender, cic_accumulators,
// intermediate_stage), 5 clocks after it. Both give identical outputs apart
// from that delay.
//
// The chain, widths and pipelining follow the design; the SLANT option is this
// implementation's, kept because the unpipelined path is easier to follow.
module onchip_decimator
  import decim_pkg::*;
#(
  parameter bit SLANT = 1'b1     // 1: carry chains pipelined into 4 slices
) (
  input  logic            clk,
  input  logic            rst,
  input  rate_e           rate,
  input  logic [IN_W-1:0] x_in,
  output logic [PINS-1:0] pins,
  output logic            pins_valid
);

  localparam int STAGES = SLANT ? 4 : 1;

  logic              reg_clear, dec_en;
  logic [STAGES-1:0] latch;
  logic [5:0]        ues;
  oms_e              oms;

  decim_control #(.STAGES(STAGES)) u_ctrl (
    .clk       (clk),
    .rst       (rst),
    .rate      (rate),
    .reg_clear (reg_clear),
    .ues       (ues),
    .oms       (oms),
    .latch     (latch),
    .dec_en    (dec_en)
  );

  if (SLANT) begin : g_slant
    slant_datapath u_dp (
      .clk      (clk),
      .clr      (reg_clear),
      .x        (x_in[BX_MAX-1:0]),
      .x_bypass (x_in),
      .ues      (ues),
      .latch    (latch),
      .dec_en   (dec_en),
      .sel      (oms),
      .pins     (pins)
    );
  end else begin : g_flat
    logic [BY-1:0] unwrapped, integ;

    unwrap_extender u_unwrap (
      .clk (clk),
      .clr (reg_clear),
      .x   (x_in[BX_MAX-1:0]),
      .ues (ues),
      .y   (unwrapped)
    );

    cic_accumulators #(.W(BY)) u_integ (
      .clk (clk),
      .clr (1'b0),
      .u   (unwrapped),
      .v   (integ)
    );

    intermediate_stage u_inter (
      .clk      (clk),
      .v        (integ),
      .x_bypass (x_in),
      .latch    (latch[0]),
      .dec_en   (dec_en),
      .sel      (oms),
      .pins     (pins)
    );
  end

  always_ff @(posedge clk) begin
    if (rst) pins_valid <= 1'b0;
    else     pins_valid <= dec_en;
  end

endmodule
