// tb_ahb_sram: self-checking test of the internal memory slave.
// Random word, halfword and byte writes through the AHB master model, each
// mirrored in a reference array; reads compared with it; a write followed
// by a pipelined read of the same word checks the forwarding path; a
// zero-wait-state check counts the cycles of one transfer.
module tb_ahb_sram;
  import sdpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned BYTES = 4096;
  logic hclk = 1'b0, hresetn = 1'b0;
  logic hbusreq;
  ahb_m2s_t bus;
  ahb_s2m_t rsp;
  int checks = 0, failures = 0;
  logic [7:0] ref_mem [BYTES];

  always #5000 hclk = ~hclk;

  ahb_bfm u_bfm (.hclk, .hbusreq, .hgrant(1'b1), .bus, .rsp);
  ahb_sram #(.MEM_BYTES(BYTES)) dut (.hclk, .hresetn, .hsel(bus.haddr[31:24] == 8'h00),
                                     .bus, .hready(rsp.hready), .rsp);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] ref_word(input int a);
    return {ref_mem[a+3], ref_mem[a+2], ref_mem[a+1], ref_mem[a]};
  endfunction

  initial begin
    logic [31:0] r, d, a;
    int t0, t1;
    int unsigned sz;
    for (int i = 0; i < BYTES; i++) ref_mem[i] = 8'h00;
    #20000 hresetn = 1'b1;
    // Initialise the whole memory with words.
    for (int i = 0; i < BYTES; i += 4) begin
      d = $urandom;
      u_bfm.write(i, d);
      for (int b = 0; b < 4; b++) ref_mem[i+b] = d[8*b +: 8];
    end
    for (int n = 0; n < 400; n++) begin
      a  = $urandom_range(0, BYTES - 4);
      sz = $urandom_range(0, 2);
      if (sz == 1) a[0] = 1'b0;
      if (sz == 2) a[1:0] = 2'b00;
      d = $urandom;
      if ($urandom_range(0, 1)) begin
        // Data on the lanes the address selects, as AHB requires.
        u_bfm.write_sz(a, d, 3'(sz));
        for (int b = 0; b < (1 << sz); b++) ref_mem[a+b] = d[8*((a[1:0]+b)%4) +: 8];
      end else begin
        a[1:0] = 2'b00;
        u_bfm.read(a, r);
        check(r, ref_word(a), "read");
      end
    end
    // Write then read the same word back to back.
    for (int n = 0; n < 20; n++) begin
      a = $urandom_range(0, BYTES/4 - 1) * 4;
      d = $urandom;
      u_bfm.write_read(a, d, r);
      for (int b = 0; b < 4; b++) ref_mem[a+b] = d[8*b +: 8];
      check(r, d, "forwarded read");
    end
    // Zero wait states: one read takes address phase + data phase.
    @(negedge hclk);
    t0 = $time;
    u_bfm.read(32'h0, r);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10000 != 3) begin
      failures++;
      $display("FAIL transfer took %0d cycles", (t1 - t0) / 10000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
