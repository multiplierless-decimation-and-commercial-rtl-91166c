// tb_fir_symmetric: checks the 16-tap symmetric FIR. For every coefficient
// set it sends an impulse of 1 and checks that the output, one strobe after
// each input, reads a0..a7 then a7..a0 (the mirrored taps), from a table
// typed into this testbench. It then drives random full-scale samples with
// random strobes and random set changes and compares each output with the
// direct 16-term convolution sum_j h[j] x[n-j].
module tb_fir_symmetric;
  import filt_pkg::*;
  localparam int W = 24;

  // a0..a7 per set, in 1/128 units
  localparam int H [8][8] = '{
    '{-4, -10, -13, -5, 19, 58, 100, 127},
    '{-4,  -9, -12, -5, 19, 58, 100, 127},
    '{-5, -10, -12, -4, 22, 60, 101, 127},
    '{-5, -10, -12, -4, 22, 61, 101, 127},
    '{-2,  -7, -12, -9, 11, 50,  96, 127},
    '{-2,  -7, -12, -9, 11, 50,  96, 127},
    '{ 1,  -1,  -7, -14, -7, 28,  83, 127},
    '{ 1,  -1,  -8, -16, -11, 24, 82, 127}};

  logic clk = 0, clr = 1, en = 0;
  fir_set_e set;
  logic signed [W-1:0]  x;
  logic signed [W+11:0] y;
  int checks = 0, failures = 0;
  longint hist [16];

  always #5 clk = ~clk;

  fir_symmetric #(.W(W)) dut (.clk, .clr, .en, .set, .x, .y);

  function automatic int tap(int s, int j);
    return (j < 8) ? H[s][j] : H[s][15 - j];
  endfunction

  task automatic strobe(longint xv);
    x = W'(xv); en = 1;
    @(posedge clk); #1;
    en = 0;
    for (int i = 15; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = longint'(signed'(W'(xv)));
  endtask

  initial begin
    longint exp_y;
    x = '0; set = FIR_2048;
    for (int i = 0; i < 16; i++) hist[i] = 0;
    repeat (2) @(posedge clk);
    #1 clr = 0;

    for (int s = 0; s < 8; s++) begin
      set = fir_set_e'(s);
      clr = 1; @(posedge clk); #1 clr = 0;
      for (int n = 0; n < 18; n++) begin
        strobe(n == 0 ? 1 : 0);
        checks++;
        exp_y = (n < 16) ? longint'(tap(s, n)) : 0;
        if (longint'(y) != exp_y) begin
          failures++;
          if (failures < 10) $display("set %0d impulse n=%0d: y=%0d expected %0d", s, n, y, exp_y);
        end
      end
    end
    for (int i = 0; i < 16; i++) hist[i] = 0;

    for (int n = 0; n < 20000; n++) begin
      if ($urandom_range(0, 99) == 0) set = fir_set_e'($urandom_range(0, 7));
      if ($urandom_range(0, 2) == 0) begin
        @(posedge clk); #1;          // clock without a strobe: y must hold
      end
      strobe(longint'($signed(W'($urandom))));
      exp_y = 0;
      for (int j = 0; j < 16; j++) exp_y += longint'(tap(int'(set), j)) * hist[j];
      checks++;
      if (longint'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("random n=%0d set %0d: y=%0d expected %0d", n, set, y, exp_y);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
