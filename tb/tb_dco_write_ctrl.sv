// tb_dco_write_ctrl: self-checking test of the DCO write control slave.
// Writes the control word 0x8ff8_0000 to 0x9500_0014 (coarse bits must
// read 0x1ff) and random words, checks DCO_CTW, one Latch_signal pulse per
// CTW write and none for other writes, the mode register, the read-back
// registers, the synchronised DCO_ready status and the one-cycle access.
module tb_dco_write_ctrl;
  import sdpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic hclk = 1'b0, hresetn = 1'b0;
  logic hbusreq;
  ahb_m2s_t bus;
  ahb_s2m_t rsp;
  logic [CTW_W-1:0] dco_ctw;
  logic dco_mode, latch_signal, dco_ready = 1'b0;
  int checks = 0, failures = 0, latches = 0;

  always #5000 hclk = ~hclk;
  always @(posedge hclk) if (latch_signal) latches++;

  ahb_bfm u_bfm (.hclk, .hbusreq, .hgrant(1'b1), .bus, .rsp);
  dco_write_ctrl dut (.hclk, .hresetn, .hsel(bus.haddr[31:24] == 8'h95), .bus,
                      .hready(rsp.hready), .rsp, .dco_ctw, .dco_mode, .latch_signal, .dco_ready);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] r, d;
    int l0, t0;
    #20000 hresetn = 1'b1;
    check(32'(dco_ctw), 0, "reset ctw");
    l0 = latches;
    u_bfm.write(32'h9500_0014, 32'h8ff8_0000);
    u_bfm.idle(2);
    check(32'(dco_ctw), 32'h0ff8_0000, "ctw");
    check(32'(dco_ctw[27:19]), 32'h1ff, "coarse bits");
    check(latches - l0, 1, "one latch pulse");
    for (int n = 0; n < 50; n++) begin
      d = $urandom;
      l0 = latches;
      u_bfm.write(32'h9500_0014, d);
      u_bfm.idle(2);
      check(32'(dco_ctw), {4'h0, d[27:0]}, "ctw random");
      check(latches - l0, 1, "latch per write");
      u_bfm.read(32'h9500_0014, r);
      check(r, {4'h0, d[27:0]}, "ctw readback");
    end
    l0 = latches;
    u_bfm.write(32'h9500_0010, 32'h1);
    u_bfm.idle(1);
    check(32'(dco_mode), 1, "mode set");
    check(latches - l0, 0, "no latch on mode write");
    u_bfm.read(32'h9500_0010, r);
    check(r, 1, "mode readback");
    u_bfm.write(32'h9500_0010, 32'h0);
    u_bfm.idle(1);
    check(32'(dco_mode), 0, "mode clear");
    dco_ready = 1'b1;
    u_bfm.idle(3);
    u_bfm.read(32'h9500_0018, r);
    check(r, 1, "ready status");
    dco_ready = 1'b0;
    u_bfm.idle(3);
    u_bfm.read(32'h9500_0018, r);
    check(r, 0, "not ready status");
    // One-cycle write: bus request cycle, address phase, data phase, no wait state.
    @(negedge hclk);
    t0 = $time;
    u_bfm.write(32'h9500_0014, 32'h123);
    checks++;
    if (($time - t0) / 10000 != 3 || rsp.hresp != HRESP_OKAY) begin
      failures++;
      $display("FAIL write not single-cycle: %0d", ($time - t0) / 10000);
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
