// ed_read_ctrl: error detector read control, the AHB slave through which
// the CPU sets up the error detector and reads its measurements.
// Registers (offsets in the error detector page 0x96xx_xxxx):
//   0x00 DIV    bits 15:0: div_value, the frequency divider ratio (reset 4)
//   0x04 MODE   bits 1:0: detect_mode, 0 idle, 1 reference period
//               (frequency search), 2 phase error (phase tracking)
//   0x08 SET    write: re-arm the detector. error_set is raised and held
//               until the response shows the old result cleared (valid bit
//               low), then dropped, which starts a new measurement.
//               read: bit 0 is error_set, high while re-arming.
//   0x0C RESP   read only: error_det_resp = {valid, lead, lag, value[28:0]}
// Every access takes one cycle: no wait states, always OKAY.
// The signal names and widths (div_value[15:0], detect_mode[1:0],
// error_set, error_det_resp[31:0]) follow the platform's bus interface; the
// offsets, the reset values and the re-arm handshake are this design's
// choice.
module ed_read_ctrl
  import sdpll_pkg::*;
(
  input  logic             hclk,
  input  logic             hresetn,
  input  logic             hsel,
  input  ahb_m2s_t         bus,
  input  logic             hready,
  output ahb_s2m_t         rsp,
  output logic [DIV_W-1:0] div_value,
  output detect_mode_e     detect_mode,
  output logic             error_set,
  input  logic [31:0]      error_det_resp
);
  timeunit 1ps; timeprecision 1fs;

  logic       dp_valid, dp_write;
  logic [7:0] dp_off;
  logic       set_req;   // CPU has asked for a re-arm this cycle

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_valid    <= 1'b0;
      dp_write    <= 1'b0;
      dp_off      <= '0;
      div_value   <= DIV_W'(4);
      detect_mode <= DET_IDLE;
      error_set   <= 1'b0;
      set_req     <= 1'b0;
    end else begin
      set_req <= 1'b0;
      if (set_req) error_set <= 1'b1;
      else if (error_set && !error_det_resp[31]) error_set <= 1'b0;
      if (hready) begin
        if (dp_valid && dp_write) begin
          unique case (dp_off)
            ED_REG_DIV:  div_value   <= bus.hwdata[DIV_W-1:0];
            ED_REG_MODE: detect_mode <= detect_mode_e'(bus.hwdata[1:0]);
            ED_REG_SET:  set_req     <= 1'b1;
            default: ;
          endcase
        end
        dp_valid <= hsel && bus.htrans[1];
        dp_write <= bus.hwrite;
        dp_off   <= bus.haddr[7:0];
      end
    end
  end

  always_comb begin
    rsp.hrdata = '0;
    rsp.hready = 1'b1;
    rsp.hresp  = HRESP_OKAY;
    if (dp_valid && !dp_write) begin
      unique case (dp_off)
        ED_REG_DIV:  rsp.hrdata = {{(32-DIV_W){1'b0}}, div_value};
        ED_REG_MODE: rsp.hrdata = {30'b0, detect_mode};
        ED_REG_SET:  rsp.hrdata = {31'b0, error_set | set_req};
        ED_REG_RESP: rsp.hrdata = error_det_resp;
        default:     rsp.hrdata = '0;
      endcase
    end
  end

endmodule
