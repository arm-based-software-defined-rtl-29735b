// clock_regen: clock re-generation for reference period measurement.
// A toggle flip-flop clocked by the reference clock turns it into ref_pulse,
// which is high for exactly one reference period (from one rising edge to
// the next) and then low for one. The TDC counts the high time to measure
// the reference period in the frequency search stage.
// Only the block's place in the error detector (reference clock in, pulse
// to the detect-mode mux) is given; the toggle flip-flop is this design's
// reading of it.
module clock_regen (
  input  logic ref_clk,
  input  logic rst_n,
  output logic ref_pulse
);
  timeunit 1ps; timeprecision 1fs;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) ref_pulse <= 1'b0;
    else        ref_pulse <= ~ref_pulse;
  end

endmodule
