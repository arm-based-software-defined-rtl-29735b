// tb_detect_mux: self-checking test of the detect-mode multiplexer over
// every mode and input combination.
module tb_detect_mux;
  import sdpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  detect_mode_e detect_mode;
  logic ref_clk, ref_pulse, phase_error, pulse, frame;
  logic exp_p, exp_f;
  int checks = 0, failures = 0;

  detect_mux dut (.detect_mode, .ref_clk, .ref_pulse, .phase_error, .pulse, .frame);

  initial begin
    for (int v = 0; v < 32; v++) begin
      detect_mode = detect_mode_e'(v[4:3]);
      {ref_clk, ref_pulse, phase_error} = v[2:0];
      #10;
      case (v[4:3])
        2'd1:    begin exp_p = v[1]; exp_f = ~v[1]; end
        2'd2:    begin exp_p = v[0]; exp_f = v[2];  end
        default: begin exp_p = 1'b0; exp_f = 1'b0; end
      endcase
      checks++;
      if (pulse !== exp_p || frame !== exp_f) begin
        failures++;
        $display("FAIL v=%0d pulse %b frame %b", v, pulse, frame);
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
