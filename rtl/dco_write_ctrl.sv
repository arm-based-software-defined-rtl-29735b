// dco_write_ctrl: DCO write control, the AHB slave through which the CPU
// sets the DCO.
// Registers (offsets in the DCO page 0x95xx_xxxx):
//   0x10 DCO_MODE   bit 0: DCO mode, 0 frequency search, 1 phase tracking
//   0x14 DCO_CTW    bits 27:0: the DCO control tuning word. Writing it also
//                   raises Latch_signal for one HCLK cycle, after the new
//                   word is already on DCO_CTW, telling the DCO to take it.
//   0x18 STATUS     bit 0: DCO_ready from the DCO (read only, synchronised
//                   to HCLK with two flip-flops)
// Every access takes one cycle: the slave never inserts wait states and
// always answers OKAY. Write data is taken at the rising edge that ends the
// data phase; read data is driven during the data phase.
// The CTW width, the DCO_mode/Latch_signal/DCO_ready signals and the
// address 0x9500_0014 of the control word follow the platform; the bit
// placement (CTW in HWDATA[27:0], so that the example word 0x8ff8_0000
// gives the coarse control bits CTW[27:19] = 0x1ff) and the other offsets
// are this design's reading.
module dco_write_ctrl
  import sdpll_pkg::*;
(
  input  logic             hclk,
  input  logic             hresetn,
  input  logic             hsel,
  input  ahb_m2s_t         bus,
  input  logic             hready,
  output ahb_s2m_t         rsp,
  output logic [CTW_W-1:0] dco_ctw,
  output logic             dco_mode,
  output logic             latch_signal,
  input  logic             dco_ready
);
  timeunit 1ps; timeprecision 1fs;

  logic       dp_valid, dp_write;
  logic [7:0] dp_off;
  logic [1:0] ready_sync;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      dp_valid     <= 1'b0;
      dp_write     <= 1'b0;
      dp_off       <= '0;
      dco_ctw      <= '0;
      dco_mode     <= 1'b0;
      latch_signal <= 1'b0;
      ready_sync   <= '0;
    end else begin
      ready_sync   <= {ready_sync[0], dco_ready};
      latch_signal <= 1'b0;
      if (hready) begin
        // Data phase ends here: perform a pending write.
        if (dp_valid && dp_write) begin
          unique case (dp_off)
            DCO_REG_MODE: dco_mode <= bus.hwdata[0];
            DCO_REG_CTW: begin
              dco_ctw      <= bus.hwdata[CTW_W-1:0];
              latch_signal <= 1'b1;
            end
            default: ;
          endcase
        end
        // Address phase ends here: remember it for the data phase.
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
        DCO_REG_MODE:   rsp.hrdata = {31'b0, dco_mode};
        DCO_REG_CTW:    rsp.hrdata = {{(32-CTW_W){1'b0}}, dco_ctw};
        DCO_REG_STATUS: rsp.hrdata = {31'b0, ready_sync[1]};
        default:        rsp.hrdata = '0;
      endcase
    end
  end

endmodule
