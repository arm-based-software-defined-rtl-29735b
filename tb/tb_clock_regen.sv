// tb_clock_regen: self-checking test of the clock re-generation: with a
// reference of 100 ns period and 40 % duty cycle, ref_pulse must rise at a
// reference rising edge and stay high for exactly one reference period.
module tb_clock_regen;
  timeunit 1ps; timeprecision 1fs;

  logic ref_clk = 1'b0, rst_n = 1'b0, ref_pulse;
  int checks = 0, failures = 0;

  initial forever begin
    #60000 ref_clk = 1'b1;
    #40000 ref_clk = 1'b0;
  end

  clock_regen dut (.ref_clk, .rst_n, .ref_pulse);

  initial begin
    realtime t0, t1;
    #30000 rst_n = 1'b1;
    for (int n = 0; n < 20; n++) begin
      @(posedge ref_pulse);
      t0 = $realtime;
      @(negedge ref_pulse);
      t1 = $realtime;
      checks++;
      if (t1 - t0 != 100000.0) begin
        failures++;
        $display("FAIL pulse width %f", t1 - t0);
      end
      checks++;
      if ((t0 - 60000.0) / 100000.0 != real'(int'((t0 - 60000.0) / 100000.0))) begin
        failures++;
        $display("FAIL pulse not on a reference edge at %f", t0);
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
