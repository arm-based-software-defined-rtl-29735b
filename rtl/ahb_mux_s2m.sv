// ahb_mux_s2m: slave-to-master multiplexer of the AHB central interconnect.
// It returns the read data, ready and response of the slave selected in
// the current data phase (hsel_data, registered by the decoder) to all
// masters. With no slave selected (an unmapped address, or reset) it
// answers ready, OKAY and zero data: this stands in for a default slave,
// which is this design's choice. Purely combinational.
module ahb_mux_s2m
  import sdpll_pkg::*;
#(
  parameter int unsigned NUM_SLV = NUM_SLAVES
) (
  input  ahb_s2m_t [NUM_SLV-1:0] s_in,
  input  logic     [NUM_SLV-1:0] hsel_data,
  output ahb_s2m_t               m_out
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    m_out.hrdata = '0;
    m_out.hready = 1'b1;
    m_out.hresp  = HRESP_OKAY;
    for (int i = 0; i < NUM_SLV; i++) begin
      if (hsel_data[i]) m_out = s_in[i];
    end
  end

endmodule
