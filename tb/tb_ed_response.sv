// tb_ed_response: self-checking test of the response bridge. Random
// results are presented with error_valid; the response word must show
// {valid, lead, lag, value} with the value already correct whenever the
// valid bit is set, within four HCLK cycles of error_valid rising, and the
// valid bit must clear after error_valid falls.
module tb_ed_response;
  import sdpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic hclk = 1'b0, hresetn = 1'b0;
  logic [ERRVAL_W-1:0] error_value = '0;
  logic error_valid = 1'b0, lead = 1'b0, lag = 1'b0;
  logic [31:0] resp;
  int checks = 0, failures = 0;

  always #5000 hclk = ~hclk;

  ed_response dut (.hclk, .hresetn, .error_value, .error_valid, .lead, .lag, .error_det_resp(resp));

  // Whenever the valid bit shows, the value must be the one presented.
  always @(negedge hclk) if (hresetn && resp[31]) begin
    checks++;
    if (resp[28:0] !== error_value) begin
      failures++;
      $display("FAIL valid with value %h expected %h", resp[28:0], error_value);
    end
  end

  initial begin
    int n_cyc;
    #20000 hresetn = 1'b1;
    for (int n = 0; n < 100; n++) begin
      #($urandom_range(1000, 30000));
      error_value = ERRVAL_W'($urandom);
      lead = 1'($urandom);
      lag  = ~lead;
      #($urandom_range(100, 3000));
      error_valid = 1'b1;
      n_cyc = 0;
      while (!resp[31] && n_cyc < 10) begin
        @(negedge hclk);
        n_cyc++;
      end
      checks++;
      if (n_cyc > 4 || resp[30] !== lead || resp[29] !== lag) begin
        failures++;
        $display("FAIL latency %0d lead %b lag %b", n_cyc, resp[30], resp[29]);
      end
      #($urandom_range(1000, 30000));
      error_valid = 1'b0;
      repeat (5) @(negedge hclk);
      checks++;
      if (resp[31] !== 1'b0) begin
        failures++;
        $display("FAIL valid stuck");
      end
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
