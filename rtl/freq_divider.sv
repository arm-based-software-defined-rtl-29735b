// freq_divider: divides the DCO clock by div_value.
// A counter advances at each rising DCO edge and wraps to zero when it
// reaches div_value - 1; the divided clock is high while the count is below
// div_value / 2, so its period is div_value DCO cycles and its rising edge
// comes one DCO edge after the wrap (registered output, no glitches).
// div_value below 2 is treated as 2. div_value comes from the bus clock
// domain and is meant to be changed only while the loop is not measuring.
// The counting scheme follows the divider's description; the duty cycle
// and the handling of small values are this design's choice.
module freq_divider
  import sdpll_pkg::*;
(
  input  logic             dco_clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div_value,
  output logic             div_clk
);
  timeunit 1ps; timeprecision 1fs;

  logic [DIV_W-1:0] cnt, cnt_next, n_eff;

  always_comb begin
    n_eff    = (div_value < DIV_W'(2)) ? DIV_W'(2) : div_value;
    cnt_next = (cnt >= n_eff - DIV_W'(1)) ? '0 : cnt + DIV_W'(1);
  end

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      div_clk <= 1'b0;
    end else begin
      cnt     <= cnt_next;
      div_clk <= (cnt_next < (n_eff >> 1));
    end
  end

endmodule
