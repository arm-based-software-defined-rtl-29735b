// tb_ahb_decoder: self-checking test of the address decoder: each of the
// four pages (0x00 memory, 0x95 DCO, 0x96 error detector, 0x97 SACA) and
// unmapped addresses, the address-phase select and the data-phase select
// registered on hready.
module tb_ahb_decoder;
  import sdpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  logic hclk = 1'b0, hresetn = 1'b0;
  logic [31:0] haddr = '0;
  logic hready = 1'b1;
  logic [NUM_SLAVES-1:0] hsel, hsel_data, exp_sel, exp_data;
  int checks = 0, failures = 0;

  always #5000 hclk = ~hclk;

  ahb_decoder dut (.hclk, .hresetn, .haddr, .hready, .hsel, .hsel_data);

  function automatic logic [NUM_SLAVES-1:0] model(input logic [31:0] a);
    case (a[31:24])
      8'h00:   return 4'b0001;
      8'h95:   return 4'b0010;
      8'h96:   return 4'b0100;
      8'h97:   return 4'b1000;
      default: return 4'b0000;
    endcase
  endfunction

  initial begin
    logic [7:0] pages [6] = '{8'h00, 8'h95, 8'h96, 8'h97, 8'h12, 8'hff};
    exp_data = '0;
    #20000 hresetn = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge hclk);
      checks++;
      if (hsel_data !== exp_data) begin
        failures++;
        $display("FAIL data-phase select %b expected %b", hsel_data, exp_data);
      end
      haddr  = {pages[$urandom_range(0, 5)], 24'($urandom)};
      hready = ($urandom_range(0, 3) != 0);
      #1;
      exp_sel = model(haddr);
      checks++;
      if (hsel !== exp_sel) begin
        failures++;
        $display("FAIL select for %h: %b expected %b", haddr, hsel, exp_sel);
      end
      if (hready) exp_data = exp_sel;
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
