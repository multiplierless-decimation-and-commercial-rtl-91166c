// output_mux: OUTPUT MULTIPLEXOR ahead of the 21 output pins.
//
// The decimator's valid MSB is bit B_y-1 of the 27-bit intermediate-stage sum,
// and B_y depends on the data rate. This 5:1 multiplexor aligns that MSB with
// the top pin and drops the LSBs that noise analysis allows to truncate:
//   000: bits 6..26 (B_y = 27)    001: bits 5..25 (B_y = 26)
//   010: bits 4..24 (B_y = 25)    011: bits 0..20 (B_y <= 21)
//   100: the 16-bit undecimated chip input, with five zeros added as LSBs.
// Purely combinational; the select does not change during operation.
// The codes and bit ranges follow the design; the value driven for the three
// unused select codes (zero) is this implementation's choice.
module output_mux
  import decim_pkg::*;
(
  input  logic [BY-1:0]   sum,
  input  logic [IN_W-1:0] x_bypass,
  input  oms_e            sel,
  output logic [PINS-1:0] pins
);

  always_comb begin
    unique case (sel)
      OMS_6_26:   pins = sum[26:6];
      OMS_5_25:   pins = sum[25:5];
      OMS_4_24:   pins = sum[24:4];
      OMS_0_20:   pins = sum[20:0];
      OMS_BYPASS: pins = {x_bypass, {(PINS-IN_W){1'b0}}};
      default:    pins = '0;
    endcase
  end

endmodule
