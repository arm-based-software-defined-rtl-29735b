// tb_saca_ctrl: self-checking test of the SACA window control, run with the
// SACA oscillator model. With a 10 MHz reference, for cycle counts 8, 4 and
// 1 and the slowest period, each reference period must hold exactly that
// many output cycles, the first starting at the reference rising edge. With
// 12 cycles at the slowest period (longer than the reference period), every
// burst must still be 12 cycles and start at a reference edge.
module tb_saca_ctrl;
  timeunit 1ps; timeprecision 1fs;

  logic ref_clk = 1'b0, rst_n = 1'b0;
  logic osc_clk, window;
  logic [7:0] count = 8'd8, code = 8'd255;
  int checks = 0, failures = 0, edges = 0, bursts = 0;
  realtime t_ref;

  always #50000 ref_clk = ~ref_clk;

  saca_ctrl dut (.ref_clk, .osc_clk, .rst_n, .cycle_count(count), .window);
  saca_osc  u_osc (.enable(window), .period_code(code), .clk(osc_clk));

  realtime t_first;
  always @(posedge ref_clk) t_ref = $realtime;
  always @(posedge osc_clk) begin
    edges++;
    if (edges == 1) t_first = $realtime;
  end

  // Count the output cycles of one whole reference period, from just
  // before one reference rising edge to just before the next.
  task automatic check_bursts(input int n, input int periods);
    @(negedge ref_clk);
    #49990;
    edges = 0;
    for (int p = 0; p < periods; p++) begin
      @(negedge ref_clk);
      #49990;
      bursts++;
      checks += 2;
      if (edges != n) begin
        failures++;
        $display("FAIL burst of %0d cycles, expected %0d", edges, n);
      end
      if (t_first != $realtime + 10 - 100000) begin
        failures++;
        $display("FAIL first cycle not at the reference edge");
      end
      edges = 0;
    end
  endtask

  initial begin
    #120000 rst_n = 1'b1;
    check_bursts(8, 5);
    count = 8'd4;
    check_bursts(4, 3);
    count = 8'd1;
    check_bursts(1, 3);
    // A burst longer than the reference period: 12 x 9.7 ns > 100 ns.
    count = 8'd12;
    @(negedge ref_clk);
    for (int p = 0; p < 3; p++) begin
      @(posedge window);
      edges = 0;
      checks++;
      if ($realtime != t_ref) begin
        failures++;
        $display("FAIL burst not started by a reference edge");
      end
      @(negedge window);
      @(negedge osc_clk);
      checks++;
      if (edges != 12) begin
        failures++;
        $display("FAIL long burst %0d", edges);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
