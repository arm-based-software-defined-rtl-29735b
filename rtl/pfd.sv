// pfd: phase frequency detector.
// The classic two flip-flop detector: the reference rising edge sets up,
// the divided-clock rising edge sets dn, and as soon as both are set they
// are cleared together. phase_error = up | dn is a pulse as wide as the
// time between the two rising edges. lead and lag tell which edge came
// first in the latest comparison: lead is high when the divided clock led
// the reference (dn already set at the reference edge), lag when it lagged
// (up already set at the divided-clock edge). Edges that coincide give
// neither and a pulse of zero width.
// Function and outputs (phase error, lead, lag) follow the error detector's
// description; the two flip-flop structure is the standard one, chosen
// here.
// Timing loop: up and dn feed their own asynchronous clear through an AND
// gate. Synthesis reports this as a logic loop; it stands, because this
// self-reset is how the detector ends each pulse, and its width (about one
// flip-flop clear delay) sets the detector's dead zone.
module pfd (
  input  logic ref_clk,
  input  logic div_clk,
  input  logic rst_n,
  output logic phase_error,
  output logic lead,
  output logic lag
);
  timeunit 1ps; timeprecision 1fs;

  logic up, dn, clr;

  assign clr = (up & dn) | ~rst_n;

  always_ff @(posedge ref_clk or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge div_clk or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end

  // Which clock came first: sampled at each clock's own edge.
  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) lead <= 1'b0;
    else        lead <= dn;
  end

  always_ff @(posedge div_clk or negedge rst_n) begin
    if (!rst_n) lag <= 1'b0;
    else        lag <= up;
  end

  assign phase_error = up | dn;

endmodule
