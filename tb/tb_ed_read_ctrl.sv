// tb_ed_read_ctrl: self-checking test of the error detector read control.
// Checks reset values, div_value and detect_mode writes and read-back,
// the response word read at 0x9600_000C, and the re-arm handshake:
// error_set rises after a SET write, stays high while the response still
// shows a valid result, and falls once the valid bit clears.
module tb_ed_read_ctrl;
  import sdpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic hclk = 1'b0, hresetn = 1'b0;
  logic hbusreq;
  ahb_m2s_t bus;
  ahb_s2m_t rsp;
  logic [DIV_W-1:0] div_value;
  detect_mode_e detect_mode;
  logic error_set;
  logic [31:0] resp = 32'h0;
  int checks = 0, failures = 0;

  always #5000 hclk = ~hclk;

  ahb_bfm u_bfm (.hclk, .hbusreq, .hgrant(1'b1), .bus, .rsp);
  ed_read_ctrl dut (.hclk, .hresetn, .hsel(bus.haddr[31:24] == 8'h96), .bus,
                    .hready(rsp.hready), .rsp, .div_value, .detect_mode, .error_set,
                    .error_det_resp(resp));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] r, d;
    #20000 hresetn = 1'b1;
    check(32'(div_value), 4, "reset div");
    check(32'(detect_mode), 0, "reset mode");
    check(32'(error_set), 0, "reset set");
    for (int n = 0; n < 30; n++) begin
      d = $urandom;
      u_bfm.write(32'h9600_0000, d);
      u_bfm.idle(1);
      check(32'(div_value), {16'h0, d[15:0]}, "div");
      u_bfm.read(32'h9600_0000, r);
      check(r, {16'h0, d[15:0]}, "div readback");
      u_bfm.write(32'h9600_0004, d);
      u_bfm.idle(1);
      check(32'(detect_mode), {30'h0, d[1:0]}, "mode");
      resp = $urandom;
      u_bfm.read(32'h9600_000C, r);
      check(r, resp, "response word");
    end
    // Re-arm while a valid result is shown.
    resp = 32'h8000_0055;
    u_bfm.write(32'h9600_0008, 32'h1);
    u_bfm.idle(2);
    check(32'(error_set), 1, "set raised");
    u_bfm.idle(10);
    check(32'(error_set), 1, "set held while valid");
    u_bfm.read(32'h9600_0008, r);
    check(r, 1, "busy readback");
    resp = 32'h0;
    u_bfm.idle(3);
    check(32'(error_set), 0, "set dropped after valid cleared");
    u_bfm.read(32'h9600_0008, r);
    check(r, 0, "not busy");
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
