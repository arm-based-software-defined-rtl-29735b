// ahb_mux_m2s: master-to-slave multiplexer of the AHB central interconnect.
// The address and control signals of the master that owns the address phase
// (hmaster, from the arbiter) and the write data of the master that owns the
// data phase (hmaster_data) are routed to all slaves. Purely combinational.
// The split into an address/control mux and a write-data mux follows the
// AHB central multiplexor scheme; the select encoding is this design's.
module ahb_mux_m2s
  import sdpll_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 16,
  localparam int unsigned MW = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  ahb_m2s_t [NUM_MASTERS-1:0] m_in,
  input  logic     [MW-1:0]          hmaster,
  input  logic     [MW-1:0]          hmaster_data,
  output ahb_m2s_t                   s_out
);
  timeunit 1ps; timeprecision 1fs;

  ahb_m2s_t addr_sel, data_sel;

  always_comb begin
    addr_sel = m_in[0];
    data_sel = m_in[0];
    for (int i = 0; i < NUM_MASTERS; i++) begin
      if (hmaster == MW'(i))      addr_sel = m_in[i];
      if (hmaster_data == MW'(i)) data_sel = m_in[i];
    end
    s_out        = addr_sel;
    s_out.hwdata = data_sel.hwdata;
  end

endmodule
