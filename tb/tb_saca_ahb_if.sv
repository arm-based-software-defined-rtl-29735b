// tb_saca_ahb_if: self-checking test of the SACA register slave: reset
// values (8 cycles, slowest period code), writes, read-back and the
// one-cycle access.
module tb_saca_ahb_if;
  import sdpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic hclk = 1'b0, hresetn = 1'b0;
  logic hbusreq;
  ahb_m2s_t bus;
  ahb_s2m_t rsp;
  logic [7:0] cycle_count, period_code;
  int checks = 0, failures = 0;

  always #5000 hclk = ~hclk;

  ahb_bfm u_bfm (.hclk, .hbusreq, .hgrant(1'b1), .bus, .rsp);
  saca_ahb_if dut (.hclk, .hresetn, .hsel(bus.haddr[31:24] == 8'h97), .bus,
                   .hready(rsp.hready), .rsp, .cycle_count, .period_code);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] r, d, e;
    #20000 hresetn = 1'b1;
    check(32'(cycle_count), 8, "reset count");
    check(32'(period_code), 255, "reset period");
    for (int n = 0; n < 40; n++) begin
      d = $urandom;
      e = $urandom;
      u_bfm.write(32'h9700_0000, d);
      u_bfm.write(32'h9700_0004, e);
      u_bfm.idle(1);
      check(32'(cycle_count), {24'h0, d[7:0]}, "count");
      check(32'(period_code), {24'h0, e[7:0]}, "period");
      u_bfm.read(32'h9700_0000, r);
      check(r, {24'h0, d[7:0]}, "count readback");
      u_bfm.read(32'h9700_0004, r);
      check(r, {24'h0, e[7:0]}, "period readback");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
