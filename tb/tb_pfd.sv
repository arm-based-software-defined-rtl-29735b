// tb_pfd: self-checking test of the phase frequency detector. Two 100 ns
// clocks with a set offset: the phase error pulse must be as wide as the
// offset, lead must be set when the divided clock comes first and lag when
// it comes second; equal edges give no pulse and neither flag.
module tb_pfd;
  timeunit 1ps; timeprecision 1fs;

  logic ref_clk = 1'b0, div_clk = 1'b0, rst_n = 1'b0;
  logic phase_error, lead, lag;
  int checks = 0, failures = 0;
  real offset_ps = 0.0;   // > 0: divided clock later than reference
  realtime t_rise, width;

  pfd dut (.ref_clk, .div_clk, .rst_n, .phase_error, .lead, .lag);

  initial forever begin
    #50000 ref_clk = 1'b1;
    #50000 ref_clk = 1'b0;
  end
  // Divided clock: rises offset_ps after each reference rising edge.
  initial begin
    realtime target;
    for (int k = 0; ; k++) begin
      target = 50000.0 + 100000.0 * k + offset_ps;
      if (target > $realtime) #(target - $realtime);
      div_clk = 1'b1;
      #40000 div_clk = 1'b0;
    end
  end

  always @(posedge phase_error) t_rise = $realtime;
  always @(negedge phase_error) width = $realtime - t_rise;

  initial begin
    real offs [5] = '{3000.0, -7000.0, 12500.0, -250.0, 0.0};
    #1 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    foreach (offs[k]) begin
      offset_ps = offs[k];
      width = 0.0;
      repeat (4) @(posedge ref_clk);
      #60000;
      checks += 3;
      if (offs[k] != 0.0 && (width < (offs[k] < 0 ? -offs[k] : offs[k]) - 1.0 ||
                              width > (offs[k] < 0 ? -offs[k] : offs[k]) + 1.0)) begin
        failures++;
        $display("FAIL offset %f width %f", offs[k], width);
      end
      if (lead !== (offs[k] < 0.0)) begin
        failures++;
        $display("FAIL offset %f lead %b", offs[k], lead);
      end
      if (lag !== (offs[k] > 0.0)) begin
        failures++;
        $display("FAIL offset %f lag %b", offs[k], lag);
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
