// tb_ahb_mux_s2m: self-checking test of the slave-to-master multiplexer:
// each one-hot data-phase select returns that slave's read data, ready and
// response; no select returns ready, OKAY and zero.
module tb_ahb_mux_s2m;
  import sdpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  ahb_s2m_t [NUM_SLAVES-1:0] s_in;
  logic [NUM_SLAVES-1:0] hsel_data;
  ahb_s2m_t m_out, exp;
  int checks = 0, failures = 0, k;

  ahb_mux_s2m dut (.s_in, .hsel_data, .m_out);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < NUM_SLAVES; i++) s_in[i] = {$urandom, 3'($urandom)};
      if ($urandom_range(0, 4) == 0) begin
        hsel_data = '0;
        exp = '{hrdata: '0, hready: 1'b1, hresp: HRESP_OKAY};
      end else begin
        k = $urandom_range(0, NUM_SLAVES - 1);
        hsel_data = NUM_SLAVES'(1) << k;
        exp = s_in[k];
      end
      #10;
      checks++;
      if (m_out !== exp) begin
        failures++;
        $display("FAIL sel=%b", hsel_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
