// tb_error_detector: self-checking test of the whole error detector with
// a 10 MHz reference, an ideal 40 MHz DCO clock and div_value 4.
// Frequency search mode: error_value must be the reference period in TDC
// counts (100 for 1 ns counts) within one. Phase tracking mode: for several
// DCO phase shifts the phase between reference and divided-clock rising
// edges is measured from the waveforms; error_value must equal it in ns
// within one, and lead/lag must say which edge came first. Also checks the
// divided clock's period.
module tb_error_detector;
  import sdpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic ref_clk = 1'b0, dco_clk = 1'b0, rst_n = 1'b0;
  logic [DIV_W-1:0] div_value = 16'd4;
  detect_mode_e detect_mode = DET_IDLE;
  logic error_set = 1'b0;
  logic [ERRVAL_W-1:0] error_value;
  logic error_valid, lead, lag, div_clk;
  int checks = 0, failures = 0, n_lead = 0, n_lag = 0;
  real shift_ps = 0.0;
  realtime t_ref, t_div, t_div_prev;

  always #50000 ref_clk = ~ref_clk;
  // DCO: 25 ns period; each change of shift_ps delays it once.
  initial forever begin
    real s;
    s = shift_ps;
    shift_ps = 0.0;
    if (s > 0.0) #(s);
    #12500 dco_clk = 1'b1;
    #12500 dco_clk = 1'b0;
  end

  always @(posedge ref_clk) t_ref = $realtime;
  always @(posedge div_clk) begin
    t_div_prev = t_div;
    t_div = $realtime;
  end

  error_detector dut (.ref_clk, .dco_clk, .rst_n, .div_value, .detect_mode, .error_set,
                      .error_value, .error_valid, .lead, .lag, .div_clk);

  task automatic measure();
    error_set = 1'b1;
    #20000 error_set = 1'b0;
    wait (error_valid);
  endtask

  initial begin
    real shifts [9] = '{3000.0, 4000.0, 6000.0, 8000.0, 2000.0, 1500.0, 16000.0, 5000.0, 20000.0};
    real d;
    #120000 rst_n = 1'b1;
    detect_mode = DET_PERIOD;
    measure();
    checks++;
    if (error_value < 99 || error_value > 101) begin
      failures++;
      $display("FAIL reference period %0d", error_value);
    end
    checks++;
    if (t_div - t_div_prev != 100000.0) begin
      failures++;
      $display("FAIL divided period %f", t_div - t_div_prev);
    end
    detect_mode = DET_PHASE;
    foreach (shifts[k]) begin
      shift_ps = shifts[k];
      #400000;
      measure();
      // Phase of the latest pair of edges (the detector's last frame).
      d = (t_div - t_ref);
      if (d > 50000.0)  d -= 100000.0;
      if (d < -50000.0) d += 100000.0;
      if (d < 0.0) n_lead++;
      if (d > 0.0) n_lag++;
      checks += 2;
      if (real'(error_value) < (d < 0 ? -d : d) / 1000.0 - 1.0 ||
          real'(error_value) > (d < 0 ? -d : d) / 1000.0 + 1.0) begin
        failures++;
        $display("FAIL phase %f ps measured %0d", d, error_value);
      end
      if ((d < 0.0 && !(lead && !lag)) || (d > 0.0 && !(lag && !lead))) begin
        failures++;
        $display("FAIL phase %f ps lead %b lag %b", d, lead, lag);
      end
    end
    checks++;
    if (n_lead == 0 || n_lag == 0) begin
      failures++;
      $display("FAIL lead cases %0d lag cases %0d", n_lead, n_lag);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
