// tb_decim_control: for every data-rate mode, checks UNWRAP EXTEND SELECT and
// OUTPUT MULTIPLEXOR SELECT against the per-rate control table, that each
// latch strobe repeats every M clocks, that latch j comes j clocks (mod M)
// after latch 0, that DECIMATOR ENABLE comes exactly STAGES-1+M/2 clocks
// (mod M) after latch 0 (always high for M = 1), and that REGISTER CLEAR
// pulses for one clock after each mode change. The four-stage (pipelined)
// and one-stage controls are checked side by side: for M = 16 the enable
// must come 11 clocks after the first latch (clock 12 when the first latch
// is clock 1) and 8 clocks after it without pipelining.
module tb_decim_control;
  import decim_pkg::*;
  logic       clk = 0, rst;
  rate_e      rate;
  logic       reg_clear, dec_en, reg_clear1, dec_en1;
  logic [3:0] latch;
  logic [0:0] latch1;
  logic [5:0] ues1;
  oms_e       oms1;
  logic [5:0] ues;
  oms_e       oms;
  int checks = 0, failures = 0;

  decim_control dut (.clk, .rst, .rate, .reg_clear, .ues, .oms, .latch, .dec_en);
  decim_control #(.STAGES(1)) dut1 (.clk, .rst, .rate, .reg_clear(reg_clear1), .ues(ues1),
                                    .oms(oms1), .latch(latch1), .dec_en(dec_en1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected table: M, UES as printed (UES8 first, "x" = don't care), OMS.
  int    exp_m   [10] = '{1, 1, 1, 2, 4, 1, 12, 4, 12, 16};
  string exp_ues [10] = '{"xxxxxx", "xxxxxx", "xxxxxx", "111111", "111100",
                          "xxxxxx", "111000", "110000", "110000", "000000"};
  string exp_oms [10] = '{"100", "100", "100", "011", "011", "100", "000", "011", "001", "010"};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("rate %0d: %s", int'(rate), what);
    end
  endtask

  initial begin
    int last_latch, m, cyc;
    int last_j [4];
    rst = 1; rate = RATE_1544;
    repeat (2) @(posedge clk); #1;
    rst = 0;
    for (int r = 0; r < 10; r++) begin
      rate = rate_e'(r);
      m = exp_m[r];
      #1;
      for (int b = 0; b < 6; b++)
        if (exp_ues[r][b] != "x")
          check(ues[b] == (exp_ues[r][b] == "1"), $sformatf("UES%0d", 8 + b));
      for (int b = 0; b < 3; b++)
        check(oms[2 - b] == (exp_oms[r][b] == "1"), "OMS");
      @(posedge clk); #1;
      if (r > 0) check(reg_clear == 1'b1, "no REGISTER CLEAR after mode change");
      @(posedge clk); #1;
      check(reg_clear == 1'b0, "REGISTER CLEAR longer than one clock");
      check(ues1 == ues && oms1 == oms && reg_clear1 == reg_clear, "one-stage control differs");
      last_latch = -1;
      foreach (last_j[j]) last_j[j] = -1;
      for (cyc = 0; cyc < 8 * m + 8; cyc++) begin
        if (m == 1) check(dec_en == 1'b1 && dec_en1 == 1'b1, "enable not held for M = 1");
        else begin
          check(latch1[0] == latch[0], "one-stage latch differs from the first-stage latch");
          if (latch[0]) begin
            if (last_latch >= 0) check(cyc - last_latch == m, "latch period");
            last_latch = cyc;
          end
          for (int j = 1; j < 4; j++)
            if (latch[j]) begin
              if (last_j[j] >= 0) check(cyc - last_j[j] == m, "stage latch period");
              last_j[j] = cyc;
              if (last_latch >= 0)
                check((cyc - last_latch) % m == j % m, $sformatf("latch %0d offset", j));
            end
          if (dec_en && last_latch >= 0)
            check((cyc - last_latch) % m == (3 + m / 2) % m, "enable offset");
          if (dec_en1 && last_latch >= 0)
            check(cyc - last_latch == m / 2, "enable offset (one stage)");
        end
        @(posedge clk); #1;
      end
      if (m > 1) check(last_latch >= 0, "no latch strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
