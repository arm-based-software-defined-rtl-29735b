// saca_osc: behavioural model of the SACA's gated oscillator (not
// synthesizable; in silicon a gated ring oscillator with a programmable
// delay).
// While enable is high it runs; the first rising edge of the output follows
// the rising edge of enable at once. When enable falls, the cycle in
// progress is completed and the output stays low. The period is set by an
// 8-bit code, linear in period from 812.35 ps (code 0, 1231 MHz) to
// 9708.74 ps (code 255, 103 MHz), the output range given for the SACA.
// The linear code-to-period mapping and the code width are this model's
// own choices.
module saca_osc #(
  parameter real PMIN_PS = 812.35,
  parameter real PMAX_PS = 9708.74
) (
  input  logic       enable,
  input  logic [7:0] period_code,
  output logic       clk
);
  timeunit 1ps; timeprecision 1fs;

  real half_ps;

  always_comb half_ps = (PMIN_PS + (PMAX_PS - PMIN_PS) * real'(period_code) / 255.0) / 2.0;

  initial clk = 1'b0;

  always begin
    wait (enable);
    clk = 1'b1;
    #(half_ps);
    clk = 1'b0;
    if (enable) #(half_ps);
  end

endmodule
