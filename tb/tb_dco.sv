// tb_dco: self-checking test of the DCO model. For several tuning words
// the measured period must match the linear map from 2173.913 ps (CTW 0,
// 460 MHz) to 1515151.515 ps (CTW 2^28-1, 0.66 MHz); a word is used only
// after Latch_signal; DCO_ready falls at the latch and rises once the new
// period is in use; the coarse bits show CTW[27:19]; reset stops the clock.
module tb_dco;
  import sdpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic rst_n = 1'b1, dco_mode = 1'b0, latch_signal = 1'b0;
  logic [CTW_W-1:0] dco_ctw = '0;
  logic dco_ready, dco_clk;
  logic [8:0] c1;
  int checks = 0, failures = 0, edges = 0;

  dco dut (.rst_n, .dco_ctw, .dco_mode, .latch_signal, .dco_ready, .dco_clk, .c1);

  always @(posedge dco_clk) edges++;

  function automatic real period_of(input logic [CTW_W-1:0] c);
    return 2173.913 + (1515151.515 - 2173.913) * real'(c) / (2.0 ** 28 - 1.0);
  endfunction

  task automatic measure(input real exp, input string what);
    realtime t0;
    @(posedge dco_clk);
    @(posedge dco_clk) t0 = $realtime;
    repeat (4) @(posedge dco_clk);
    checks++;
    if (($realtime - t0) / 4.0 < exp - 0.01 || ($realtime - t0) / 4.0 > exp + 0.01) begin
      failures++;
      $display("FAIL %s: period %f expected %f", what, ($realtime - t0) / 4.0, exp);
    end
  endtask

  task automatic load(input logic [CTW_W-1:0] c);
    dco_ctw = c;
    #100 latch_signal = 1'b1;
    #1;
    checks++;
    if (dco_ready !== 1'b0 && c != dut.ctw_active) begin
      failures++;
      $display("FAIL ready did not fall");
    end
    #1000 latch_signal = 1'b0;
    wait (dco_ready);
  endtask

  initial begin
    static logic [CTW_W-1:0] words [5] = '{28'h0, 28'h0ff8000, 28'h1000000, 28'h0000fff, 28'h0ff80000 >> 4};
    #1 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    measure(period_of(0), "reset word");
    // A new word is not used before the latch.
    dco_ctw = 28'h0100000;
    #20000;
    measure(period_of(0), "no latch yet");
    foreach (words[k]) begin
      load(words[k]);
      measure(period_of(words[k]), "period");
    end
    load(28'hff8_0000);
    checks++;
    if (c1 !== 9'h1ff) begin
      failures++;
      $display("FAIL coarse bits %h", c1);
    end
    measure(period_of(28'hff8_0000), "slow word");
    rst_n = 1'b0;
    #2000000;
    edges = 0;
    #3000000;
    checks++;
    if (edges != 0 || dco_clk !== 1'b0) begin
      failures++;
      $display("FAIL clock runs in reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1s;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
