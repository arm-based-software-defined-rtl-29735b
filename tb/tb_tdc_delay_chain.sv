// tb_tdc_delay_chain: self-checking test of the delay-chain oscillator
// model: the period is PERIOD_PS (default 1 ns, and 250 ps overridden)
// and it stops while enable is low.
module tb_tdc_delay_chain;
  timeunit 1ps; timeprecision 1fs;

  logic enable = 1'b0, clk_a, clk_b;
  int checks = 0, failures = 0, edges_a = 0;

  tdc_delay_chain                        dut_a (.enable, .tdc_clk(clk_a));
  tdc_delay_chain #(.PERIOD_PS(250.0))   dut_b (.enable, .tdc_clk(clk_b));

  always @(posedge clk_a) edges_a++;

  initial begin
    realtime t0;
    #2000 enable = 1'b1;
    @(posedge clk_a) t0 = $realtime;
    repeat (100) @(posedge clk_a);
    checks++;
    if ($realtime - t0 != 100000.0) begin
      failures++;
      $display("FAIL default period %f", ($realtime - t0) / 100.0);
    end
    @(posedge clk_b) t0 = $realtime;
    repeat (100) @(posedge clk_b);
    checks++;
    if ($realtime - t0 != 25000.0) begin
      failures++;
      $display("FAIL 250 ps period %f", ($realtime - t0) / 100.0);
    end
    enable = 1'b0;
    #5000;
    edges_a = 0;
    #20000;
    checks++;
    if (edges_a != 0) begin
      failures++;
      $display("FAIL runs while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
