// dco: behavioural model of the digitally controlled oscillator (not
// synthesizable; in silicon a cell-based DCO with coarse and fine delay
// banks).
// The period is linear in the 28-bit control tuning word: CTW 0 gives
// PMIN_PS (460 MHz) and CTW 2^28-1 gives PMAX_PS (0.66 MHz), the DCO's
// range. The most significant bits CTW[27:19] are brought out as c1, the
// coarse control bits (CTW 0x8ff8_0000 written on the bus gives c1 = 0x1ff,
// the slowest coarse setting).
// A rising edge of latch_signal takes the new dco_ctw; it is applied at the
// next edge of dco_clk, so a half period in progress is never cut short.
// dco_ready falls at the latch and rises at that edge, once the new period
// is in use. dco_mode (frequency search or phase tracking) is accepted, but the
// model's period does not depend on it, because how the mode changes the
// oscillator's insides is not known.
// While rst_n is low the clock stops low and the CTW returns to zero.
// The range, the CTW width and the latch/ready/mode signals follow the
// platform; the linear mapping is this model's own choice.
module dco
  import sdpll_pkg::*;
#(
  parameter real PMIN_PS = 2173.913,
  parameter real PMAX_PS = 1515151.515
) (
  input  logic             rst_n,
  input  logic [CTW_W-1:0] dco_ctw,
  input  logic             dco_mode,
  input  logic             latch_signal,
  output logic             dco_ready,
  output logic             dco_clk,
  output logic [8:0]       c1
);
  timeunit 1ps; timeprecision 1fs;

  logic [CTW_W-1:0] ctw_latched, ctw_active;
  real              half_ps;

  always @(posedge latch_signal or negedge rst_n) begin
    if (!rst_n) ctw_latched <= '0;
    else        ctw_latched <= dco_ctw;
  end

  initial begin
    dco_clk    = 1'b0;
    ctw_active = '0;
  end

  always begin
    if (!rst_n) begin
      dco_clk    = 1'b0;
      ctw_active = '0;
    end
    wait (rst_n);
    if (ctw_active != ctw_latched) ctw_active = ctw_latched;
    half_ps = (PMIN_PS + (PMAX_PS - PMIN_PS) * real'(ctw_active) / real'(2.0 ** CTW_W - 1.0)) / 2.0;
    #(half_ps);
    if (rst_n) dco_clk = ~dco_clk;
  end

  assign dco_ready = rst_n && (ctw_active == ctw_latched);
  assign c1        = ctw_active[CTW_W-1 -: 9];

endmodule
