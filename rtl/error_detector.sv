// error_detector: the phase/frequency error detector IP.
// The DCO clock is divided by div_value (freq_divider); the PFD compares the
// divided clock with the reference and gives a phase error pulse plus lead
// and lag; clock_regen turns the reference into a pulse one period wide;
// detect_mux picks, by detect_mode, the reference pulse (frequency search:
// measure the reference period) or the phase error (phase tracking); the
// TDC counts the delay-chain clock over the chosen pulse and reports
// error_value with error_valid, held until error_set re-arms it.
// Units: error_value counts periods of the delay chain (PERIOD_PS).
// The composition (divider, PFD, clock re-generation, mux, TDC) and its
// outputs follow the error detector's block diagram; the delay-chain period
// is this design's choice. The logic loop that synthesis reports in here is
// the PFD's intended self-reset (see pfd).
module error_detector
  import sdpll_pkg::*;
#(
  parameter real TDC_PERIOD_PS = 1000.0
) (
  input  logic                ref_clk,
  input  logic                dco_clk,
  input  logic                rst_n,
  input  logic [DIV_W-1:0]    div_value,
  input  detect_mode_e        detect_mode,
  input  logic                error_set,
  output logic [ERRVAL_W-1:0] error_value,
  output logic                error_valid,
  output logic                lead,
  output logic                lag,
  output logic                div_clk
);
  timeunit 1ps; timeprecision 1fs;

  logic ref_pulse, phase_error, pulse, frame, tdc_clk;

  freq_divider u_div (
    .dco_clk, .rst_n, .div_value, .div_clk
  );

  clock_regen u_regen (
    .ref_clk, .rst_n, .ref_pulse
  );

  pfd u_pfd (
    .ref_clk, .div_clk, .rst_n, .phase_error, .lead, .lag
  );

  detect_mux u_mux (
    .detect_mode, .ref_clk, .ref_pulse, .phase_error, .pulse, .frame
  );

  tdc_delay_chain #(.PERIOD_PS(TDC_PERIOD_PS)) u_chain (
    .enable(rst_n), .tdc_clk
  );

  tdc u_tdc (
    .tdc_clk, .rst_n, .pulse, .frame, .error_set, .error_value, .error_valid
  );

endmodule
