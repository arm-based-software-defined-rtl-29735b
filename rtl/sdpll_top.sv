// sdpll_top: the software-defined PLL platform.
// A CPU (outside this module, attached as AHB master 0) runs the tracking
// software from the internal memory and closes the loop over the AHB bus:
// it reads the error detector's measurements and writes control tuning
// words to the DCO. The DCO clock, divided by div_value, is compared with
// the reference in the error detector. The bus clock HCLK is made by the
// SACA: a burst of cycle_count fast cycles after each reference rising
// edge, so the whole bus (and the CPU on it) runs only in those bursts.
// Bus: AMBA 2.0 AHB with arbiter, decoder and central multiplexers.
//   0x00xx_xxxx internal memory (2 MiB)
//   0x95xx_xxxx DCO write control   (0x14 CTW, 0x10 mode, 0x18 status)
//   0x96xx_xxxx error detector read control (0x00 div, 0x04 mode,
//               0x08 re-arm, 0x0C response)
//   0x97xx_xxxx SACA (0x00 cycle count, 0x04 period code)
// Master ports are arrays of NUM_MASTERS (one, the CPU, by default); every
// master sees the same read data, ready and response. hclk is an output:
// masters must run on it. rst_n resets everything asynchronously; HCLK
// starts at the first reference rising edge after reset.
// The partition and the connections follow the platform's system
// architecture; the DCO, the SACA oscillator and the TDC delay chain are
// behavioural models.
module sdpll_top
  import sdpll_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 1,
  localparam int unsigned MW = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic                      ref_clk,
  input  logic                      rst_n,
  output logic                      hclk,
  // AHB masters (the CPU is master 0)
  input  logic     [NUM_MASTERS-1:0] m_hbusreq,
  input  ahb_m2s_t [NUM_MASTERS-1:0] m_bus,
  output logic     [NUM_MASTERS-1:0] m_hgrant,
  output ahb_s2m_t                   m_rsp,
  // Clocks and detector outputs, for observation
  output logic                      dco_clk,
  output logic                      div_clk,
  output logic [8:0]                dco_c1,
  output logic                      lead,
  output logic                      lag
);
  timeunit 1ps; timeprecision 1fs;

  // ---- Bus fabric ----
  logic [MW-1:0]          hmaster, hmaster_data;
  ahb_m2s_t               s_bus;
  logic [NUM_SLAVES-1:0]  hsel, hsel_data;
  ahb_s2m_t [NUM_SLAVES-1:0] s_rsp;
  logic                   hready;

  assign hready = m_rsp.hready;

  ahb_arbiter #(.NUM_MASTERS(NUM_MASTERS)) u_arbiter (
    .hclk, .hresetn(rst_n), .hbusreq(m_hbusreq), .hready,
    .hgrant(m_hgrant), .hmaster, .hmaster_data
  );

  ahb_mux_m2s #(.NUM_MASTERS(NUM_MASTERS)) u_mux_m2s (
    .m_in(m_bus), .hmaster, .hmaster_data, .s_out(s_bus)
  );

  ahb_decoder u_decoder (
    .hclk, .hresetn(rst_n), .haddr(s_bus.haddr), .hready, .hsel, .hsel_data
  );

  ahb_mux_s2m #(.NUM_SLV(NUM_SLAVES)) u_mux_s2m (
    .s_in(s_rsp), .hsel_data, .m_out(m_rsp)
  );

  // ---- Internal memory ----
  ahb_sram u_mem (
    .hclk, .hresetn(rst_n), .hsel(hsel[SLV_MEM]), .bus(s_bus), .hready,
    .rsp(s_rsp[SLV_MEM])
  );

  // ---- SACA: bus clock generator ----
  logic [7:0] saca_count, saca_period;
  logic       saca_window;

  saca_ahb_if u_saca_if (
    .hclk, .hresetn(rst_n), .hsel(hsel[SLV_SACA]), .bus(s_bus), .hready,
    .rsp(s_rsp[SLV_SACA]), .cycle_count(saca_count), .period_code(saca_period)
  );

  saca_ctrl u_saca_ctrl (
    .ref_clk, .osc_clk(hclk), .rst_n, .cycle_count(saca_count), .window(saca_window)
  );

  saca_osc u_saca_osc (
    .enable(saca_window), .period_code(saca_period), .clk(hclk)
  );

  // ---- DCO and its write control ----
  logic [CTW_W-1:0] dco_ctw;
  logic             dco_mode, latch_signal, dco_ready;

  dco_write_ctrl u_dco_ctrl (
    .hclk, .hresetn(rst_n), .hsel(hsel[SLV_DCO]), .bus(s_bus), .hready,
    .rsp(s_rsp[SLV_DCO]), .dco_ctw, .dco_mode, .latch_signal, .dco_ready
  );

  dco u_dco (
    .rst_n, .dco_ctw, .dco_mode, .latch_signal, .dco_ready, .dco_clk,
    .c1(dco_c1)
  );

  // ---- Error detector and its read control ----
  logic [DIV_W-1:0]    div_value;
  detect_mode_e        detect_mode;
  logic                error_set, error_valid;
  logic [ERRVAL_W-1:0] error_value;
  logic [31:0]         error_det_resp;

  ed_read_ctrl u_ed_ctrl (
    .hclk, .hresetn(rst_n), .hsel(hsel[SLV_ED]), .bus(s_bus), .hready,
    .rsp(s_rsp[SLV_ED]), .div_value, .detect_mode, .error_set, .error_det_resp
  );

  ed_response u_ed_resp (
    .hclk, .hresetn(rst_n), .error_value, .error_valid, .lead, .lag, .error_det_resp
  );

  error_detector u_ed (
    .ref_clk, .dco_clk, .rst_n, .div_value, .detect_mode, .error_set,
    .error_value, .error_valid, .lead, .lag, .div_clk
  );

endmodule
