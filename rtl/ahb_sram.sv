// ahb_sram: internal memory of the platform, an AHB slave.
// It holds the tracking program and its data; the CPU starts fetching at
// address 0. Zero wait states: a read's address phase reads the array at
// the rising edge that ends it, so the word is on hrdata throughout the data
// phase; a write is stored at the rising edge that ends its data phase,
// with byte lanes chosen by HSIZE and HADDR[1:0] (little endian). A read of
// the word written in the transfer just before is forwarded from the write
// data. Bytes, halfwords and words are supported; bursts are handled as
// single transfers. HRESP is always OKAY.
// The memory may be preloaded with $readmemh from INIT_FILE (the platform
// loads its compiled program this way in simulation). The size, 2 MiB, is
// this design's choice: large enough for the addresses the platform's DCO
// example shows the program using (up to 0x0010_0248).
module ahb_sram
  import sdpll_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 2 * 1024 * 1024,
  parameter string       INIT_FILE = ""
) (
  input  logic     hclk,
  input  logic     hresetn,
  input  logic     hsel,
  input  ahb_m2s_t bus,
  input  logic     hready,
  output ahb_s2m_t rsp
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned WORDS = MEM_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  logic          wr_pend;
  logic [AW-1:0] wr_addr;
  logic [3:0]    wr_be;
  logic [31:0]   rdata_q;
  logic [31:0]   wr_word;

  wire addr_valid = hsel && hready && bus.htrans[1];
  wire [AW-1:0] a_word = bus.haddr[AW+1:2];

  function automatic logic [3:0] byte_en(input logic [2:0] hsize, input logic [1:0] a);
    unique case (hsize)
      3'd0:    byte_en = 4'b0001 << a;
      3'd1:    byte_en = a[1] ? 4'b1100 : 4'b0011;
      default: byte_en = 4'b1111;
    endcase
  endfunction

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  // Word after merging the pending write's byte lanes into the stored word.
  always_comb begin
    for (int b = 0; b < 4; b++)
      wr_word[8*b +: 8] = wr_be[b] ? bus.hwdata[8*b +: 8] : mem[wr_addr][8*b +: 8];
  end

  // Data phase of a write: store it.
  always_ff @(posedge hclk) begin
    if (wr_pend) mem[wr_addr] <= wr_word;
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      wr_pend <= 1'b0;
      wr_addr <= '0;
      wr_be   <= '0;
      rdata_q <= '0;
    end else begin
      if (hready) begin
        wr_pend <= addr_valid && bus.hwrite;
        wr_addr <= a_word;
        wr_be   <= byte_en(bus.hsize, bus.haddr[1:0]);
      end else if (wr_pend) begin
        wr_pend <= 1'b0;
      end
      if (addr_valid && !bus.hwrite) begin
        // Forward a write completing at this same edge.
        rdata_q <= (wr_pend && wr_addr == a_word) ? wr_word : mem[a_word];
      end
    end
  end

  assign rsp.hrdata = rdata_q;
  assign rsp.hready = 1'b1;
  assign rsp.hresp  = HRESP_OKAY;

endmodule
