// tb_intermediate_stage: feeds random 27-bit integrator words, generates the
// latch and DECIMATOR ENABLE strobes for M = 2, 4, 12 and 16 (latch in the
// first cycle of each period, enable M/2 cycles later) and checks that the
// pins hold v[n0] + v[n0 + M/2], reduced to the selected 21 bits, and stay
// unchanged between enables. Also checks the M = 1 bypass.
module tb_intermediate_stage;
  import decim_pkg::*;
  logic        clk = 0;
  logic [26:0] v;
  logic [15:0] xb;
  logic        latch, dec_en;
  oms_e        sel;
  logic [20:0] pins, exp_p, held;
  int checks = 0, failures = 0;

  intermediate_stage dut (.clk, .v, .x_bypass(xb), .latch, .dec_en, .sel, .pins);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [20:0] pick(logic [26:0] s, oms_e o);
    case (o)
      OMS_6_26: return s[26:6];
      OMS_5_25: return s[25:5];
      OMS_4_24: return s[24:4];
      default:  return s[20:0];
    endcase
  endfunction

  task automatic run_m(int m, oms_e o, int periods);
    logic [26:0] v0;
    sel = o;
    for (int p = 0; p < periods; p++) begin
      for (int c = 0; c < m; c++) begin
        v = 27'($urandom);
        latch  = (c == 0);
        dec_en = (c == m / 2);
        if (c == 0) v0 = v;
        if (c == m / 2) exp_p = pick(v0 + v, o);
        held = pins;
        @(posedge clk); #1;
        checks++;
        if (c == m / 2) begin
          if (pins !== exp_p) begin
            failures++;
            if (failures < 10) $display("M=%0d p=%0d pins=%h expected %h", m, p, pins, exp_p);
          end
        end else if (pins !== held) begin
          failures++;
          if (failures < 10) $display("M=%0d p=%0d c=%0d pins changed without enable", m, p, c);
        end
      end
    end
  endtask

  initial begin
    xb = '0; latch = 0; dec_en = 0; v = '0; sel = OMS_0_20;
    @(posedge clk); #1;
    run_m(2,  OMS_0_20, 300);
    run_m(4,  OMS_0_20, 300);
    run_m(12, OMS_6_26, 200);
    run_m(12, OMS_5_25, 200);
    run_m(16, OMS_4_24, 200);
    // M = 1: undecimated input straight to the pins every clock
    sel = OMS_BYPASS; dec_en = 1; latch = 0;
    for (int i = 0; i < 500; i++) begin
      xb = 16'($urandom); v = 27'($urandom);
      exp_p = {xb, 5'b0};
      @(posedge clk); #1;
      checks++;
      if (pins !== exp_p) begin failures++; $display("bypass pins=%h expected %h", pins, exp_p); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
