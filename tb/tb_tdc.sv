// tb_tdc: self-checking test of the TDC with a 1 ns counting clock.
// Phase-style frames (100 ns, falling edge to falling edge) with a pulse of
// set width inside: error_value must be the width in ns within one count;
// a pulse far shorter than a count gives 0 with error_valid. The result
// must hold through later frames until error_set, clear while error_set is
// high, and a new one must follow. Period-style: pulse high for one 100 ns
// period, frame = ~pulse: value 100 within one count. Result latency after
// the closing frame edge is checked against four counting cycles.
module tb_tdc;
  import sdpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic tdc_clk = 1'b0, rst_n = 1'b0;
  logic pulse = 1'b0, frame = 1'b0, error_set = 1'b0;
  logic [ERRVAL_W-1:0] error_value;
  logic error_valid;
  int checks = 0, failures = 0;
  realtime t_fall;

  always #500 tdc_clk = ~tdc_clk;

  tdc dut (.tdc_clk, .rst_n, .pulse, .frame, .error_set, .error_value, .error_valid);

  always @(negedge frame) t_fall = $realtime;

  task automatic rearm();
    error_set = 1'b1;
    #10000;
    checks++;
    if (error_valid !== 1'b0) begin
      failures++;
      $display("FAIL valid not cleared by error_set");
    end
    error_set = 1'b0;
  endtask

  // One phase-style frame: frame high 50 ns then low 50 ns; the pulse of
  // width w_ps starts 20 ns into the frame.
  task automatic phase_frame(input real w_ps);
    frame = 1'b1;
    #20000;
    if (w_ps > 0.0) begin
      pulse = 1'b1;
      #(w_ps);
      pulse = 1'b0;
    end
    #(30000.0 - w_ps);
    frame = 1'b0;
    #50000;
  endtask

  task automatic expect_value(input int exp, input int tol, input string what);
    checks++;
    if (!error_valid || int'(error_value) < exp - tol || int'(error_value) > exp + tol) begin
      failures++;
      $display("FAIL %s: valid %b value %0d expected %0d", what, error_valid, error_value, exp);
    end
  endtask

  initial begin
    real widths [5] = '{13000.0, 27000.0, 4000.0, 1000.0, 0.0};
    int v;
    #3000 rst_n = 1'b1;
    foreach (widths[k]) begin
      rearm();
      phase_frame(widths[k]);   // the frame that starts the measurement
      phase_frame(widths[k]);   // the measured frame
      phase_frame(widths[k]);
      expect_value(int'(widths[k] / 1000.0), 1, "phase width");
    end
    // Tiny pulse: far below one count.
    rearm();
    repeat (3) phase_frame(10.0);
    expect_value(0, 0, "sub-resolution pulse");
    // Hold: later frames with other widths do not change the result.
    rearm();
    repeat (3) phase_frame(20000.0);
    v = int'(error_value);
    repeat (3) phase_frame(5000.0);
    checks++;
    if (int'(error_value) != v || !error_valid) begin
      failures++;
      $display("FAIL result not held");
    end
    // Latency after the closing frame edge.
    rearm();
    phase_frame(8000.0);
    frame = 1'b1;
    #50000 frame = 1'b0;
    @(posedge error_valid);
    checks++;
    if ($realtime - t_fall > 4500.0) begin
      failures++;
      $display("FAIL latency %f ps", $realtime - t_fall);
    end
    // Period-style: pulse one 100 ns period wide, frame = ~pulse.
    rearm();
    for (int p = 0; p < 4; p++) begin
      pulse = 1'b1; frame = 1'b0;
      #100000;
      pulse = 1'b0; frame = 1'b1;
      #100000;
    end
    expect_value(100, 1, "period");
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
