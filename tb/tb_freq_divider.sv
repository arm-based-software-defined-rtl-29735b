// tb_freq_divider: self-checking test of the frequency divider: for
// several div_value settings (including 0 and 1, which act as 2) the
// divided clock's period must be div_value DCO cycles and its high time
// div_value/2 DCO cycles.
module tb_freq_divider;
  import sdpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic dco_clk = 1'b0, rst_n = 1'b0, div_clk;
  logic [DIV_W-1:0] div_value = 16'd4;
  int checks = 0, failures = 0, dco_edges = 0;

  always #1000 dco_clk = ~dco_clk;
  always @(posedge dco_clk) dco_edges++;

  freq_divider dut (.dco_clk, .rst_n, .div_value, .div_clk);

  initial begin
    int vals [9] = '{4, 2, 3, 5, 8, 17, 100, 0, 1};
    int e0, e1, e2, n;
    #5000 rst_n = 1'b1;
    foreach (vals[k]) begin
      div_value = DIV_W'(vals[k]);
      n = (vals[k] < 2) ? 2 : vals[k];
      repeat (2) @(posedge div_clk);
      for (int p = 0; p < 5; p++) begin
        e0 = dco_edges;
        @(negedge div_clk);
        e1 = dco_edges;
        @(posedge div_clk);
        e2 = dco_edges;
        checks += 2;
        if (e2 - e0 != n) begin
          failures++;
          $display("FAIL N=%0d period %0d", n, e2 - e0);
        end
        if (e1 - e0 != n / 2) begin
          failures++;
          $display("FAIL N=%0d high %0d", n, e1 - e0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
