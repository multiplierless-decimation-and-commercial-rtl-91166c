// decim_pkg: widths, data-rate modes and per-mode control constants of the
// on-chip modified-CIC decimator (K = 3 integrator/comb stages, L = 1
// intermediate stage).
//
// The widths come from the design: a 27-bit internal path (the largest B_y,
// needed by the 51.84 MHz rate), a 14-bit unwrapping first-differencer (the
// largest B_x of any decimated rate), a 16-bit chip input (the largest B_x of
// the undecimated rates) and 21 output pins. The per-mode table reproduces the
// decimation rate M, B_x, UNWRAP EXTEND SELECT and OUTPUT MULTIPLEXOR SELECT of
// each of the ten input data rates. The encoding of the mode number itself is
// this design's choice.
package decim_pkg;

  localparam int BY      = 27;  // internal decimator width (bits 0..26)
  localparam int BX_MAX  = 14;  // width of the unwrapping first-differencer
  localparam int BX_MIN  = 8;   // smallest B_x: bits below it are never extended
  localparam int IN_W    = 16;  // chip input width (undecimated rates use 16 bits)
  localparam int PINS    = 21;  // output pins

  // One mode per input data rate.
  typedef enum logic [3:0] {
    RATE_1544   = 4'd0,   // 1.544 MHz
    RATE_2048   = 4'd1,   // 2.048 MHz
    RATE_6312   = 4'd2,   // 6.312 MHz
    RATE_8448   = 4'd3,   // 8.448 MHz
    RATE_34368  = 4'd4,   // 34.368 MHz
    RATE_44736  = 4'd5,   // 44.736 MHz
    RATE_51840  = 4'd6,   // 51.84 MHz
    RATE_139264 = 4'd7,   // 139.264 MHz
    RATE_155520 = 4'd8,   // 155.52 MHz
    RATE_622080 = 4'd9    // 622.08 MHz
  } rate_e;

  // OUTPUT MULTIPLEXOR SELECT codes: which bits reach the 21 pins.
  typedef enum logic [2:0] {
    OMS_6_26   = 3'b000,  // B_y = 27
    OMS_5_25   = 3'b001,  // B_y = 26
    OMS_4_24   = 3'b010,  // B_y = 25
    OMS_0_20   = 3'b011,  // B_y <= 21
    OMS_BYPASS = 3'b100   // M = 1: undecimated input, zero padded below
  } oms_e;

  typedef struct packed {
    logic [4:0] m;        // decimation rate M (1, 2, 4, 12 or 16)
    logic [4:0] bx;       // input width B_x
    logic [5:0] ues;      // UNWRAP EXTEND SELECT, ues[i] drives UES(8+i)
    oms_e       oms;      // OUTPUT MULTIPLEXOR SELECT
  } mode_cfg_t;

  // Per-rate control constants. UES is stored with bit 0 = UES8, so the
  // printed string "111100" (UES8 first) becomes 6'b001111.
  function automatic mode_cfg_t mode_cfg(rate_e r);
    unique case (r)
      RATE_1544:   return '{m: 5'd1,  bx: 5'd16, ues: 6'b111111, oms: OMS_BYPASS};
      RATE_2048:   return '{m: 5'd1,  bx: 5'd16, ues: 6'b111111, oms: OMS_BYPASS};
      RATE_6312:   return '{m: 5'd1,  bx: 5'd14, ues: 6'b111111, oms: OMS_BYPASS};
      RATE_8448:   return '{m: 5'd2,  bx: 5'd14, ues: 6'b111111, oms: OMS_0_20};
      RATE_34368:  return '{m: 5'd4,  bx: 5'd12, ues: 6'b001111, oms: OMS_0_20};
      RATE_44736:  return '{m: 5'd1,  bx: 5'd11, ues: 6'b000111, oms: OMS_BYPASS};
      RATE_51840:  return '{m: 5'd12, bx: 5'd11, ues: 6'b000111, oms: OMS_6_26};
      RATE_139264: return '{m: 5'd4,  bx: 5'd10, ues: 6'b000011, oms: OMS_0_20};
      RATE_155520: return '{m: 5'd12, bx: 5'd10, ues: 6'b000011, oms: OMS_5_25};
      RATE_622080: return '{m: 5'd16, bx: 5'd8,  ues: 6'b000000, oms: OMS_4_24};
      default:     return '{m: 5'd1,  bx: 5'd16, ues: 6'b111111, oms: OMS_BYPASS};
    endcase
  endfunction

endpackage
