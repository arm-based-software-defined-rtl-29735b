// tb_ahb_arbiter: self-checking test of the AHB arbiter with 4 masters.
// Random requests and random hready; a reference model computes the
// fixed-priority grant (master 0 highest, master 0 by default), hmaster one
// transfer behind the grant and hmaster_data one behind hmaster, updated
// only when hready is high.
module tb_ahb_arbiter;
  timeunit 1ps; timeprecision 1fs;

  localparam int N = 4;
  logic hclk = 1'b0, hresetn = 1'b0;
  logic [N-1:0] hbusreq = '0, hgrant;
  logic hready = 1'b1;
  logic [1:0] hmaster, hmaster_data;
  logic [N-1:0] exp_grant;
  logic [1:0] exp_master, exp_mdata;
  int checks = 0, failures = 0, switches = 0;

  always #5000 hclk = ~hclk;

  ahb_arbiter #(.NUM_MASTERS(N)) dut (.hclk, .hresetn, .hbusreq, .hready, .hgrant, .hmaster, .hmaster_data);

  function automatic logic [N-1:0] prio(input logic [N-1:0] req);
    for (int i = 0; i < N; i++) if (req[i]) return N'(1) << i;
    return N'(1);
  endfunction

  function automatic logic [1:0] idx(input logic [N-1:0] g);
    for (int i = 0; i < N; i++) if (g[i]) return 2'(i);
    return 2'd0;
  endfunction

  initial begin
    exp_grant = 4'b0001; exp_master = 0; exp_mdata = 0;
    #20000 hresetn = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge hclk);
      checks++;
      if (hgrant !== exp_grant || hmaster !== exp_master || hmaster_data !== exp_mdata) begin
        failures++;
        $display("FAIL cycle %0d: grant %b/%b master %0d/%0d mdata %0d/%0d", n,
                 hgrant, exp_grant, hmaster, exp_master, hmaster_data, exp_mdata);
      end
      hbusreq = N'($urandom);
      hready  = ($urandom_range(0, 3) != 0);
      // Model the edge coming up.
      if (hready) begin
        exp_mdata  = exp_master;
        exp_master = idx(exp_grant);
        if (prio(hbusreq) != exp_grant) switches++;
        exp_grant  = prio(hbusreq);
      end
    end
    checks++;
    if (switches < 10) failures++;
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
