// ahb_arbiter: AMBA 2.0 AHB bus arbiter.
// Each master raises hbusreq[i] to ask for the bus; the arbiter grants one
// master at a time with fixed priority, master 0 highest. When nobody asks,
// the bus stays with master 0, the default master. The grant (hgrant) may
// change at any rising HCLK edge where hready is high; hmaster, the index of
// the master that owns the address phase, follows the grant one transfer
// later, and hmaster_data, the owner of the data phase, one transfer after
// that. The multiplexers use hmaster and hmaster_data as their selects.
// What follows the AHB description: request/grant, one master at a time, up
// to 16 masters. The fixed-priority policy, the default master and the
// absence of locked transfers and split/retry handling are this design's
// own choices.
module ahb_arbiter #(
  parameter int unsigned NUM_MASTERS = 16,
  localparam int unsigned MW = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1
) (
  input  logic                   hclk,
  input  logic                   hresetn,
  input  logic [NUM_MASTERS-1:0] hbusreq,
  input  logic                   hready,
  output logic [NUM_MASTERS-1:0] hgrant,
  output logic [MW-1:0]          hmaster,
  output logic [MW-1:0]          hmaster_data
);
  timeunit 1ps; timeprecision 1fs;

  logic [NUM_MASTERS-1:0] next_grant;
  logic [MW-1:0]          grant_idx;

  // Fixed priority: the lowest-numbered requesting master wins.
  always_comb begin
    next_grant = '0;
    next_grant[0] = 1'b1;
    for (int i = NUM_MASTERS - 1; i >= 0; i--) begin
      if (hbusreq[i]) begin
        next_grant = '0;
        next_grant[i] = 1'b1;
      end
    end
  end

  always_comb begin
    grant_idx = '0;
    for (int i = 0; i < NUM_MASTERS; i++) begin
      if (hgrant[i]) grant_idx = MW'(i);
    end
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      hgrant       <= NUM_MASTERS'(1);
      hmaster      <= '0;
      hmaster_data <= '0;
    end else if (hready) begin
      hgrant       <= next_grant;
      hmaster      <= grant_idx;
      hmaster_data <= hmaster;
    end
  end

  // Exactly one master is granted at any time.
  a_onehot_grant : assert property (@(posedge hclk) disable iff (!hresetn) $onehot(hgrant));

endmodule
