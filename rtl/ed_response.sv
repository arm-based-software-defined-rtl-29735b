// ed_response: error detector response, the bridge from the error
// detector's clock domains to the bus clock.
// error_valid, lead and lag each pass through a two flip-flop synchroniser
// into HCLK. error_value is not synchronised bit by bit: the TDC holds it
// steady for as long as error_valid is high, so it is sampled only while the
// synchronised valid is high, and the valid bit is shown one cycle later, so
// that error_det_resp never shows a valid flag with a stale value.
// error_det_resp = {valid, lead, lag, error_value[28:0]}.
// The packing of the four detector outputs into one 32-bit response word
// follows the platform's bus interface; the bit order and the synchronisers
// are this design's choice.
module ed_response
  import sdpll_pkg::*;
(
  input  logic                hclk,
  input  logic                hresetn,
  input  logic [ERRVAL_W-1:0] error_value,
  input  logic                error_valid,
  input  logic                lead,
  input  logic                lag,
  output logic [31:0]         error_det_resp
);
  timeunit 1ps; timeprecision 1fs;

  logic [1:0] valid_s, lead_s, lag_s;
  logic       valid_q;
  logic [ERRVAL_W-1:0] value_q;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      valid_s <= '0;
      lead_s  <= '0;
      lag_s   <= '0;
      valid_q <= 1'b0;
      value_q <= '0;
    end else begin
      valid_s <= {valid_s[0], error_valid};
      lead_s  <= {lead_s[0], lead};
      lag_s   <= {lag_s[0], lag};
      valid_q <= valid_s[1];
      if (valid_s[1]) value_q <= error_value;
    end
  end

  assign error_det_resp = {valid_q, lead_s[1], lag_s[1], value_q};

endmodule
