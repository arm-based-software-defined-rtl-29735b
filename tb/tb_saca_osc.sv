// tb_saca_osc: self-checking test of the SACA oscillator model: period at
// codes 0, 128 and 255 (812.35 ps, linear, 9708.74 ps), first rising edge
// at the rising edge of enable, and the stop after the cycle in progress.
module tb_saca_osc;
  timeunit 1ps; timeprecision 1fs;

  logic enable = 1'b0;
  logic [7:0] code = 8'd0;
  logic clk;
  int checks = 0, failures = 0;

  saca_osc dut (.enable, .period_code(code), .clk);

  task automatic near(input realtime got, input realtime exp, input string what);
    checks++;
    if (got < exp - 0.01 || got > exp + 0.01) begin
      failures++;
      $display("FAIL %s: %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    realtime t_en, t0, t1;
    byte codes [3] = '{8'd0, 8'd128, 8'd255};
    for (int k = 0; k < 3; k++) begin
      code = codes[k];
      #1000;
      enable = 1'b1;
      t_en = $realtime;
      @(posedge clk);
      near($realtime - t_en, 0.0, "first edge at enable");
      t0 = $realtime;
      repeat (10) @(posedge clk);
      t1 = $realtime;
      near((t1 - t0) / 10.0, 812.35 + (9708.74 - 812.35) * real'(code) / 255.0, "period");
      #10;
      enable = 1'b0;
      @(negedge clk);
      #50000;
      checks++;
      if (clk !== 1'b0) begin
        failures++;
        $display("FAIL clock not stopped low");
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
