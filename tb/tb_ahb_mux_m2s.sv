// tb_ahb_mux_m2s: self-checking test of the master-to-slave multiplexer
// with 4 masters: random buses and selects; the address and controls must
// come from hmaster, the write data from hmaster_data.
module tb_ahb_mux_m2s;
  import sdpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam int N = 4;
  ahb_m2s_t [N-1:0] m_in;
  logic [1:0] hmaster, hmaster_data;
  ahb_m2s_t s_out, exp;
  int checks = 0, failures = 0;

  ahb_mux_m2s #(.NUM_MASTERS(N)) dut (.m_in, .hmaster, .hmaster_data, .s_out);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < N; i++) m_in[i] = {$urandom, $urandom, $urandom};
      hmaster      = 2'($urandom);
      hmaster_data = 2'($urandom);
      #10;
      exp        = m_in[hmaster];
      exp.hwdata = m_in[hmaster_data].hwdata;
      checks++;
      if (s_out !== exp) begin
        failures++;
        $display("FAIL m=%0d d=%0d", hmaster, hmaster_data);
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
