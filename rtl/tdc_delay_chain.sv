// tdc_delay_chain: behavioural model of the TDC's internal delay chain (not
// synthesizable; in silicon a ring of delay cells).
// While enable is high it produces a free-running clock of period
// PERIOD_PS; the TDC counts its rising edges, so this period is the TDC's
// resolution. The period, 1 ns by default, is this model's own choice.
module tdc_delay_chain #(
  parameter real PERIOD_PS = 1000.0
) (
  input  logic enable,
  output logic tdc_clk
);
  timeunit 1ps; timeprecision 1fs;

  initial tdc_clk = 1'b0;

  always begin
    wait (enable);
    #(PERIOD_PS / 2.0) tdc_clk = 1'b1;
    #(PERIOD_PS / 2.0) tdc_clk = 1'b0;
  end

endmodule
