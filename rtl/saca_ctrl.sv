// saca_ctrl: window control of the semi-asynchronous clock generator.
// At each rising edge of the reference clock the window opens, which starts
// the gated oscillator; the window closes at the cycle_count-th rising edge
// of the oscillator output, so exactly cycle_count output cycles follow each
// reference edge, the first one starting with it. A reference edge that
// comes while the window is still open (the burst is longer than the
// reference period) is ignored, and the next burst waits for the next edge.
// The window is the XOR of two toggle flip-flops: start_t, clocked by the
// reference, toggles to open it, and stop_t, clocked by the oscillator,
// copies start_t to close it. Each flop reads the other across clock
// domains; the window signal itself gates the oscillator, so it is meant
// to be placed with it as a hard macro.
// cycle_count of 0 is treated as 1.
// Following the SACA's description: synchronous to the reference rising
// edge, a user-defined number of cycles. The toggle-pair construction is
// this design's own.
module saca_ctrl (
  input  logic       ref_clk,
  input  logic       osc_clk,
  input  logic       rst_n,
  input  logic [7:0] cycle_count,
  output logic       window
);
  timeunit 1ps; timeprecision 1fs;

  logic       start_t, stop_t;
  logic [7:0] cnt;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n)                start_t <= 1'b0;
    else if (start_t == stop_t) start_t <= ~start_t;
  end

  always_ff @(posedge osc_clk or negedge rst_n) begin
    if (!rst_n) begin
      stop_t <= 1'b0;
      cnt    <= '0;
    end else if ({1'b0, cnt} + 9'd1 >= {1'b0, cycle_count}) begin
      cnt    <= '0;
      stop_t <= start_t;
    end else begin
      cnt    <= cnt + 8'd1;
    end
  end

  assign window = start_t ^ stop_t;

endmodule
