// ahb_decoder: AHB address decoder.
// It decodes the address-phase HADDR[31:24] into one select per slave
// (combinational, used in the address phase) and registers that select, on
// rising HCLK with hready high, as the data-phase select the read-data
// multiplexer needs. An address outside every page selects no slave; the
// response multiplexer then answers OKAY with zero wait states.
// The pages are: internal memory 0x00, DCO 0x95 (the DCO control register
// sits at 0x9500_0014 in the platform's example), error detector 0x96 and
// SACA 0x97 (these two are this design's choice).
module ahb_decoder
  import sdpll_pkg::*;
(
  input  logic                  hclk,
  input  logic                  hresetn,
  input  logic [31:0]           haddr,
  input  logic                  hready,
  output logic [NUM_SLAVES-1:0] hsel,
  output logic [NUM_SLAVES-1:0] hsel_data
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    hsel = '0;
    unique case (haddr[31:24])
      PAGE_MEM:  hsel[SLV_MEM]  = 1'b1;
      PAGE_DCO:  hsel[SLV_DCO]  = 1'b1;
      PAGE_ED:   hsel[SLV_ED]   = 1'b1;
      PAGE_SACA: hsel[SLV_SACA] = 1'b1;
      default:   hsel = '0;
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)    hsel_data <= '0;
    else if (hready) hsel_data <= hsel;
  end

endmodule
