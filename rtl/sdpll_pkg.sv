// sdpll_pkg: types and constants shared by the SDPLL platform.
// The AHB types follow AMBA 2.0 AHB: a master-to-slave bundle (address,
// control and write data) and a slave-to-master bundle (read data, ready,
// response). The memory map places the DCO control register at 0x9500_0014
// as in the platform's DCO control example; the error detector and SACA
// pages are this design's own choice, as are all register offsets other
// than the DCO control word.
package sdpll_pkg;
  timeunit 1ps; timeprecision 1fs;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // Master to slave: address phase controls plus data-phase write data.
  typedef struct packed {
    logic [31:0] haddr;
    htrans_e     htrans;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [2:0]  hburst;
    logic [3:0]  hprot;
    logic [31:0] hwdata;
  } ahb_m2s_t;

  // Slave to master.
  typedef struct packed {
    logic [31:0] hrdata;
    logic        hready;
    hresp_e      hresp;
  } ahb_s2m_t;

  // Slave indices on the bus.
  localparam int unsigned SLV_MEM  = 0;
  localparam int unsigned SLV_DCO  = 1;
  localparam int unsigned SLV_ED   = 2;
  localparam int unsigned SLV_SACA = 3;
  localparam int unsigned NUM_SLAVES = 4;

  // Address pages, selected by HADDR[31:24].
  localparam logic [7:0] PAGE_MEM  = 8'h00;
  localparam logic [7:0] PAGE_DCO  = 8'h95;
  localparam logic [7:0] PAGE_ED   = 8'h96;
  localparam logic [7:0] PAGE_SACA = 8'h97;

  // DCO write control registers (offsets within the page).
  localparam logic [7:0] DCO_REG_MODE   = 8'h10;
  localparam logic [7:0] DCO_REG_CTW    = 8'h14;
  localparam logic [7:0] DCO_REG_STATUS = 8'h18;

  // Error detector read control registers.
  localparam logic [7:0] ED_REG_DIV   = 8'h00;
  localparam logic [7:0] ED_REG_MODE  = 8'h04;
  localparam logic [7:0] ED_REG_SET   = 8'h08;
  localparam logic [7:0] ED_REG_RESP  = 8'h0C;

  // SACA registers.
  localparam logic [7:0] SACA_REG_COUNT  = 8'h00;
  localparam logic [7:0] SACA_REG_PERIOD = 8'h04;

  // Error detector detect modes.
  typedef enum logic [1:0] {
    DET_IDLE   = 2'b00,  // no measurement
    DET_PERIOD = 2'b01,  // frequency search: measure the reference period
    DET_PHASE  = 2'b10,  // phase tracking: measure the phase error
    DET_RSVD   = 2'b11   // reserved, behaves as idle
  } detect_mode_e;

  localparam int unsigned CTW_W     = 28;  // DCO_CTW[27:0]
  localparam int unsigned DIV_W     = 16;  // div_value[15:0]
  localparam int unsigned ERRVAL_W  = 29;  // error_value[28:0]

endpackage
