// tb_unwrap_extender: checks that the unwrapping bit extender rebuilds the low
// 27 bits of an unbounded random walk from its wrapped low B_x bits, for every
// input width a decimated mode uses (8, 10, 11, 12, 14), with the unused upper
// input bits driven with random garbage. The reference is the true walk held
// in a 64-bit integer. Also checks the one-clock latency and REGISTER CLEAR.
module tb_unwrap_extender;
  import decim_pkg::*;

  logic              clk = 0;
  logic              clr;
  logic [BX_MAX-1:0] x;
  logic [5:0]        ues;
  logic [BY-1:0]     y;
  int checks = 0, failures = 0, wraps = 0;

  unwrap_extender dut (.clk, .clr, .x, .ues, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_width(int bx, logic [5:0] ues_v, int n);
    longint xt, step, lim;
    logic [BX_MAX-1:0] garbage;
    logic [BY-1:0] exp_y;
    ues = ues_v;
    lim = (longint'(1) << (bx - 1)) - 1;
    xt  = 0;
    x   = '0;
    clr = 1;
    @(posedge clk); #1;
    clr = 0;
    for (int i = 0; i < n; i++) begin
      // steps up to the limit, biased so the walk wraps many times
      step = $signed($urandom_range(0, 2 * lim)) - lim;
      if (i % 3 == 0) step = (i % 2 == 0) ? lim : lim - 1;
      xt = xt + step;
      garbage = BX_MAX'($urandom);
      for (int b = 0; b < BX_MAX; b++) x[b] = (b < bx) ? xt[b] : garbage[b];
      @(posedge clk); #1;
      exp_y = xt[BY-1:0];
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("bx=%0d i=%0d: y=%h expected %h", bx, i, y, exp_y);
      end
    end
    if (xt > (longint'(1) << bx)) wraps++;
  endtask

  initial begin
    clr = 1; x = '0; ues = '0;
    repeat (2) @(posedge clk);
    #1;
    run_width(14, 6'b111111, 3000);
    run_width(12, 6'b001111, 3000);
    run_width(11, 6'b000111, 3000);
    run_width(10, 6'b000011, 3000);
    run_width(8,  6'b000000, 3000);
    // REGISTER CLEAR: output returns to the current input, sign extended
    x = 14'h00A5; ues = 6'b000000; clr = 1;
    @(posedge clk); #1;
    checks++;
    if (y !== '0) begin failures++; $display("clear: y=%h", y); end
    clr = 0;
    @(posedge clk); #1;
    checks++;
    if (y !== {{19{1'b1}}, 8'hA5}) begin failures++; $display("after clear: y=%h", y); end
    checks++;
    if (wraps < 5) begin failures++; $display("walk did not wrap in every width"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
