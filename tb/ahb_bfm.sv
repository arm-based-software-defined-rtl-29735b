// ahb_bfm: behavioural AHB master for testbenches (not synthesizable).
// Drives all its outputs at falling HCLK edges and samples at falling edges,
// so nothing races with the slaves' rising-edge flip-flops. Each transfer
// asks for the bus (hbusreq), waits for hgrant with hready, waits one more
// cycle for the address phase to be its own, then runs one single
// address phase and one data phase, honouring wait states.
// Tasks: write(addr, data), read(addr, data), write_read(addr, data, rdata)
// (a write followed immediately by a pipelined read of the same address),
// and idle(n).
module ahb_bfm
  import sdpll_pkg::*;
(
  input  logic     hclk,
  output logic     hbusreq,
  input  logic     hgrant,
  output ahb_m2s_t bus,
  input  ahb_s2m_t rsp
);
  timeunit 1ps; timeprecision 1fs;

  int unsigned transfers = 0;

  initial begin
    hbusreq    = 1'b0;
    bus        = '0;
    bus.htrans = HTRANS_IDLE;
    bus.hsize  = 3'd2;
  end

  task automatic own_bus();
    @(negedge hclk);
    hbusreq = 1'b1;
    while (!(hgrant && rsp.hready)) @(negedge hclk);
    @(negedge hclk);
  endtask

  task automatic addr_phase(input logic [31:0] a, input logic w, input logic [2:0] size);
    bus.haddr  = a;
    bus.htrans = HTRANS_NONSEQ;
    bus.hwrite = w;
    bus.hsize  = size;
    while (!rsp.hready) @(negedge hclk);
    @(negedge hclk);
    transfers++;
  endtask

  task automatic write_sz(input logic [31:0] a, input logic [31:0] d, input logic [2:0] size);
    own_bus();
    addr_phase(a, 1'b1, size);
    bus.htrans = HTRANS_IDLE;
    bus.hwdata = d;
    hbusreq    = 1'b0;
    while (!rsp.hready) @(negedge hclk);
  endtask

  task automatic write(input logic [31:0] a, input logic [31:0] d);
    write_sz(a, d, 3'd2);
  endtask

  task automatic read(input logic [31:0] a, output logic [31:0] d);
    own_bus();
    addr_phase(a, 1'b0, 3'd2);
    bus.htrans = HTRANS_IDLE;
    hbusreq    = 1'b0;
    while (!rsp.hready) @(negedge hclk);
    d = rsp.hrdata;
  endtask

  task automatic write_read(input logic [31:0] a, input logic [31:0] d, output logic [31:0] r);
    own_bus();
    addr_phase(a, 1'b1, 3'd2);
    bus.hwdata = d;
    addr_phase(a, 1'b0, 3'd2);
    bus.htrans = HTRANS_IDLE;
    hbusreq    = 1'b0;
    while (!rsp.hready) @(negedge hclk);
    r = rsp.hrdata;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge hclk);
  endtask

endmodule
