// saca_ahb_if: AHB interface of the semi-asynchronous clock generator
// (SACA), through which the CPU sets the SACA's two user-defined values.
// Registers (offsets in the SACA page 0x97xx_xxxx):
//   0x00 COUNT   bits 7:0: number of output cycles after each reference
//                rising edge (reset 8, as in the SACA example)
//   0x04 PERIOD  bits 7:0: period code of the gated oscillator, 0 fastest,
//                255 slowest (reset 255, so that eight cycles fit in one
//                period of a 10 MHz reference)
// Every access takes one cycle: no wait states, always OKAY.
// The two values follow the SACA's description (cycle count and clock
// period are user-defined); the register map, the 8-bit widths and the
// reset values are this design's choice.
module saca_ahb_if
  import sdpll_pkg::*;
(
  input  logic       hclk,
  input  logic       hresetn,
  input  logic       hsel,
  input  ahb_m2s_t   bus,
  input  logic       hready,
  output ahb_s2m_t   rsp,
  output logic [7:0] cycle_count,
  output logic [7:0] period_code
);
  timeunit 1ps; timeprecision 1fs;

  logic       dp_valid, dp_write;
  logic [7:0] dp_off;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_valid    <= 1'b0;
      dp_write    <= 1'b0;
      dp_off      <= '0;
      cycle_count <= 8'd8;
      period_code <= 8'd255;
    end else if (hready) begin
      if (dp_valid && dp_write) begin
        unique case (dp_off)
          SACA_REG_COUNT:  cycle_count <= bus.hwdata[7:0];
          SACA_REG_PERIOD: period_code <= bus.hwdata[7:0];
          default: ;
        endcase
      end
      dp_valid <= hsel && bus.htrans[1];
      dp_write <= bus.hwrite;
      dp_off   <= bus.haddr[7:0];
    end
  end

  always_comb begin
    rsp.hrdata = '0;
    rsp.hready = 1'b1;
    rsp.hresp  = HRESP_OKAY;
    if (dp_valid && !dp_write) begin
      unique case (dp_off)
        SACA_REG_COUNT:  rsp.hrdata = {24'b0, cycle_count};
        SACA_REG_PERIOD: rsp.hrdata = {24'b0, period_code};
        default:         rsp.hrdata = '0;
      endcase
    end
  end

endmodule
