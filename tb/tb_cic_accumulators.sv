// tb_cic_accumulators: drives random 27-bit words into the three integrators
// and compares the output with a triple running sum kept in 64-bit integers,
// reduced modulo 2^27, three clocks later.
module tb_cic_accumulators;
  logic        clk = 0, clr;
  logic [26:0] u, v;
  int checks = 0, failures = 0;
  longint s1, s2, s3;
  longint hist [$];

  cic_accumulators #(.W(27)) dut (.clk, .clr, .u, .v);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; u = '0;
    @(posedge clk); #1;
    clr = 0;
    s1 = 0; s2 = 0; s3 = 0;
    for (int i = 0; i < 5000; i++) begin
      u = 27'($urandom);
      // reference registers: a1 += u, a2 += a1, a3 += a2 (old values)
      s3 = s3 + s2;
      s2 = s2 + s1;
      s1 = s1 + longint'(u);
      @(posedge clk); #1;
      checks++;
      if (v !== s3[26:0]) begin
        failures++;
        if (failures < 10) $display("i=%0d v=%h expected %h", i, v, s3[26:0]);
      end
    end
    // latency: a single impulse reaches v after 3 clocks
    clr = 1; u = '0;
    @(posedge clk); #1;
    clr = 0; u = 27'd1;
    @(posedge clk); #1;
    u = '0;
    for (int c = 1; c <= 4; c++) begin
      checks++;
      if (v !== ((c < 3) ? 27'd0 : (c == 3 ? 27'd1 : 27'd3))) begin
        failures++; $display("impulse c=%0d v=%0d", c, v);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
