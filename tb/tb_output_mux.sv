// tb_output_mux: applies random 27-bit sums and 16-bit inputs under each of
// the five OUTPUT MULTIPLEXOR SELECT codes and checks the 21 pins against the
// bit ranges 6..26, 5..25, 4..24, 0..20 and {input, 00000}.
module tb_output_mux;
  import decim_pkg::*;
  logic [26:0] sum;
  logic [15:0] xb;
  oms_e        sel;
  logic [20:0] pins, exp_p;
  int checks = 0, failures = 0;

  output_mux dut (.sum(sum), .x_bypass(xb), .sel(sel), .pins(pins));

  initial begin
    for (int i = 0; i < 2000; i++) begin
      sum = 27'($urandom);
      xb  = 16'($urandom);
      for (int s = 0; s < 5; s++) begin
        sel = oms_e'(s);
        #1;
        case (s)
          0: for (int b = 0; b < 21; b++) exp_p[b] = sum[b + 6];
          1: for (int b = 0; b < 21; b++) exp_p[b] = sum[b + 5];
          2: for (int b = 0; b < 21; b++) exp_p[b] = sum[b + 4];
          3: for (int b = 0; b < 21; b++) exp_p[b] = sum[b];
          default: for (int b = 0; b < 21; b++) exp_p[b] = (b < 5) ? 1'b0 : xb[b - 5];
        endcase
        checks++;
        if (pins !== exp_p) begin
          failures++;
          if (failures < 10) $display("sel=%0d sum=%h x=%h pins=%h expected %h", s, sum, xb, pins, exp_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
