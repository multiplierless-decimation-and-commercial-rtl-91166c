// tb_hfix_filter: checks the loop-delay correction filter (K = 4). An
// impulse of 512 must come out 5 strobes later as 512 followed by four
// samples of -25 (eps_m = 25/512); random inputs with random strobes are then
// compared with floor(x[n-5] - 25/512 * sum_{m=1..4} x[n-5-m]).
module tb_hfix_filter;
  localparam int W = 24;

  logic clk = 0, clr = 1, en = 0;
  logic signed [W-1:0] x;
  logic signed [W:0]   y;
  int checks = 0, failures = 0;
  longint hist [10];

  always #5 clk = ~clk;

  hfix_filter #(.W(W), .K(4)) dut (.clk, .clr, .en, .x, .y);

  task automatic strobe(longint xv);
    x = W'(xv); en = 1;
    @(posedge clk); #1;
    en = 0;
    for (int i = 9; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = longint'(signed'(W'(xv)));
  endtask

  initial begin
    longint exp_y, num;
    x = '0;
    for (int i = 0; i < 10; i++) hist[i] = 0;
    repeat (2) @(posedge clk);
    #1 clr = 0;

    // hist[0] is the sample just taken, so y (registered) shows the formula
    // with x[n-5] = hist[5] only one strobe later: compare y after each strobe
    // against the value computed from the history before that strobe.
    for (int n = 0; n < 12; n++) begin
      strobe(n == 0 ? 512 : 0);
      exp_y = (n == 5) ? 512 : (n >= 6 && n <= 9) ? -25 : 0;
      checks++;
      if (longint'(y) != exp_y) begin
        failures++;
        $display("impulse n=%0d: y=%0d expected %0d", n, y, exp_y);
      end
    end

    for (int n = 0; n < 20000; n++) begin
      if ($urandom_range(0, 2) == 0) begin
        @(posedge clk); #1;
      end
      strobe(longint'($signed(W'($urandom))));
      num = 512 * hist[5] - 25 * (hist[6] + hist[7] + hist[8] + hist[9]);
      exp_y = num >>> 9;
      checks++;
      if (longint'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("random n=%0d: y=%0d expected %0d", n, y, exp_y);
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
