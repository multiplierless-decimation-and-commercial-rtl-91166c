// tb_shift_add_mult: checks five coefficient multipliers on random 24-bit
// inputs against integer products worked out by hand:
//   (1 - 2^-3)(1 - 2^-5) form b -> 217 w / 2^8
//   (1 + 2^-3 - 2^-8)    form a -> 287 w / 2^8
//   (1 + 2^-4)      one adder   ->  17 w / 2^4
//   (1 + 2^-1)(1 - 2^-6), 1 LSB rounded  -> 96 w - round(3 w / 2)   (/2^6)
//   (1 - 2^-4)(1 - 2^-5), 3 LSBs rounded -> 60 w - round(15 w / 8)  (/2^6)
// where round() takes the discarded half up, as the carry/borrow-in rule does.
module tb_shift_add_mult;
  import filt_pkg::*;
  localparam iir_cfg_t C1 = '{s:19, m:3, n:5, use_m:1, use_n:1, m_sub:1, n_sub:1, form_b:1, rnd:0, k:4};
  localparam iir_cfg_t C2 = '{s:5,  m:3, n:8, use_m:1, use_n:1, m_sub:0, n_sub:1, form_b:0, rnd:0, k:3};
  localparam iir_cfg_t C3 = '{s:16, m:4, n:0, use_m:1, use_n:0, m_sub:0, n_sub:0, form_b:0, rnd:0, k:4};
  localparam iir_cfg_t C4 = '{s:20, m:1, n:6, use_m:1, use_n:1, m_sub:0, n_sub:1, form_b:1, rnd:1, k:4};
  localparam iir_cfg_t C5 = '{s:16, m:4, n:5, use_m:1, use_n:1, m_sub:1, n_sub:1, form_b:1, rnd:3, k:4};

  logic signed [23:0] w;
  logic signed [33:0] p1;
  logic signed [33:0] p2;
  logic signed [29:0] p3;
  logic signed [31:0] p4;
  logic signed [31:0] p5;
  int checks = 0, failures = 0;

  shift_add_mult #(.W(24), .CFG(C1)) u1 (.w, .p(p1));
  shift_add_mult #(.W(24), .CFG(C2)) u2 (.w, .p(p2));
  shift_add_mult #(.W(24), .CFG(C3)) u3 (.w, .p(p3));
  shift_add_mult #(.W(24), .CFG(C4)) u4 (.w, .p(p4));
  shift_add_mult #(.W(24), .CFG(C5)) u5 (.w, .p(p5));

  task automatic check(longint got, longint exp, string name);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: w=%0d p=%0d expected %0d", name, w, got, exp);
    end
  endtask

  initial begin
    longint wl;
    for (int i = 0; i < 4000; i++) begin
      w = 24'($urandom);
      if (i == 0) w = 24'sh7FFFFF;
      if (i == 1) w = 24'sh800000;
      if (i == 2) w = -24'sd1;
      #1;
      wl = longint'(w);
      check(longint'(p1), 217 * wl, "form b");
      check(longint'(p2), 287 * wl, "form a");
      check(longint'(p3), 17 * wl, "one adder");
      check(longint'(p4), 96 * wl - ((3 * wl + 1) >>> 1), "rounded 1");
      check(longint'(p5), 60 * wl - ((15 * wl + 4) >>> 3), "rounded 3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
