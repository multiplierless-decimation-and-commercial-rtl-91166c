// tb_input_functions: builds the pin stream a decimating chip would send for
// a random-walk signal s (its third running sum, modulo 2^21), runs it through
// the input functions with r = 12, and checks that the output equals the top
// 24 bits of the true s unwrapped to 33 bits (6 strobes of latency, 3 when
// bypassed). The
// walk's steps approach 2^20, so the 21-bit path wraps often. It also checks
// the undecimated path with B_x = 11: the chip input sits in pins[20:5] with
// garbage above bit 10, and the output must be the true input scaled by
// 2^(5 + 16 - 11 - 9). Strobes are sparse (one clock in three).
module tb_input_functions;
  import decim_pkg::*;
  localparam int W = 24, R = 12;
  logic        clk = 0, clr, en, bypass;
  logic [4:0]  bx;
  logic [20:0] pins;
  logic signed [W-1:0] y;
  int checks = 0, failures = 0, wraps = 0;

  input_functions #(.W(W), .R(R)) dut (.clk, .clr, .en, .bypass, .bx, .pins, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint st [$];

  task automatic strobe();
    en = 1;
    @(posedge clk); #1;
    en = 0;
    repeat (2) @(posedge clk);
    #1;
  endtask

  initial begin
    longint s, i1, i2, i3, step, lim, exp_v;
    logic [W-1:0] e;
    clr = 1; en = 0; bypass = 0; bx = 5'd16; pins = '0;
    @(posedge clk); #1;
    clr = 0;
    s = 0; i1 = 0; i2 = 0; i3 = 0;
    lim = (longint'(1) << 20) - 1;
    for (int n = 0; n < 3000; n++) begin
      step = longint'($urandom_range(0, 32'(2 * lim))) - lim;
      if (n % 4 == 0) step = lim - 3;
      if (n < 4) step = 0;
      s  = s + step;
      i1 = i1 + s; i2 = i2 + i1; i3 = i3 + i2;
      if ((s >>> 20) != ((s - step) >>> 20)) wraps++;
      st.push_back(s);
      pins = 21'(i3);
      strobe();
      if (n >= 6) begin
        // latency 6 strobes: output reflects s[n-5] (the pins of strobe n-5)
        exp_v = st[n - 5] >>> (PINS + R - W);
        e = W'(exp_v);
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("n=%0d y=%h expected %h", n, y, e);
        end
      end
    end
    // undecimated path, B_x = 11
    clr = 1; bypass = 1; bx = 5'd11; pins = '0;
    @(posedge clk); #1;
    clr = 0;
    s = 0;
    st.delete();
    lim = (1 << 10) - 1;
    for (int n = 0; n < 2000; n++) begin
      logic [15:0] xin;
      step = longint'($urandom_range(0, 32'(2 * lim))) - lim;
      if (n % 3 == 0) step = lim;
      if (n < 2) step = 0;
      s = s + step;
      st.push_back(s);
      xin = 16'($urandom);
      xin[10:0] = s[10:0];
      pins = {xin, 5'b0};
      strobe();
      if (n >= 3) begin
        // latency 3 strobes; value scaled by 2^(21 - 11), then 9 LSBs dropped
        e = W'(st[n - 2] <<< 1);
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("bypass n=%0d y=%h expected %h", n, y, e);
        end
      end
    end
    checks++;
    if (wraps < 100) begin failures++; $display("only %0d wraps", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
