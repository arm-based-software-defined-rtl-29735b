// tb_sdpll_top: end-to-end test of the SDPLL platform at its default
// parameters. A bus master model stands in for the CPU and runs a simple
// tracking program over the AHB bus, clocked by the SACA's HCLK bursts:
//   0. loads a small data table into the internal memory and keeps its
//      loop variables there, as compiled code would;
//   1. writes the control word 0x8ff8_0000 to 0x9500_0014 and checks that
//      the DCO's coarse bits become 0x1ff;
//   2. frequency search: sets div_value 4, measures the reference period
//      with the TDC and writes the matching tuning word;
//   3. re-programs the SACA to 16 faster cycles per reference period;
//   4. coarse tracking: measures the phase error with the TDC and corrects
//      the tuning word (proportional plus integral) until the error is below
//      one TDC count;
//   5. fine tracking: steps the word by lead/lag alone.
// Checks: register and memory values, the DCO period after the search and
// at the end (within 0.2 % of a quarter of the 100 ns reference period),
// the phase at the end (measured from the waveforms, under 2 ns), SACA
// bursts of 8 then 16 cycles per reference period, and that every
// mechanism happened: each SACA setting, period and phase measurements,
// re-arm waits, lead and lag, DCO latches, coarse and fine iterations.
module tb_sdpll_top;
  import sdpll_pkg::*;
  timeunit 1ps; timeprecision 1fs;

  localparam real TREF_PS = 100000.0;   // 10 MHz reference
  localparam int  NDIV    = 4;

  logic ref_clk = 1'b0, rst_n = 1'b1, hclk;
  logic [0:0] hbusreq, hgrant;
  ahb_m2s_t [0:0] m_bus;
  ahb_s2m_t m_rsp;
  logic dco_clk, div_clk, lead, lag;
  logic [8:0] dco_c1;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_burst8 = 0, n_burst16 = 0, n_period_meas = 0, n_phase_meas = 0;
  int n_busy_wait = 0, n_lead = 0, n_lag = 0, n_latch = 0, n_coarse = 0, n_fine = 0;
  int hclk_edges = 0;

  // Reference with 40 % / 60 % duty cycle.
  initial forever begin
    #60000 ref_clk = 1'b1;
    #40000 ref_clk = 1'b0;
  end

  sdpll_top dut (
    .ref_clk, .rst_n, .hclk, .m_hbusreq(hbusreq), .m_bus, .m_hgrant(hgrant), .m_rsp,
    .dco_clk, .div_clk, .dco_c1, .lead, .lag
  );

  ahb_bfm u_cpu (.hclk, .hbusreq(hbusreq[0]), .hgrant(hgrant[0]), .bus(m_bus[0]), .rsp(m_rsp));

  // SACA bursts per reference period.
  always @(posedge hclk) hclk_edges++;
  always @(posedge ref_clk) begin
    if (hclk_edges == 8)  n_burst8++;
    if (hclk_edges == 16) n_burst16++;
    hclk_edges = 0;
  end
  always @(posedge dut.latch_signal) n_latch++;

  // Waveform phase between reference and divided clock rising edges.
  realtime t_ref, t_div;
  always @(posedge ref_clk) t_ref = $realtime;
  always @(posedge div_clk) t_div = $realtime;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // One measurement: re-arm, wait for the handshake, poll for the result.
  task automatic measure(output logic [31:0] resp);
    logic [31:0] r;
    u_cpu.write(32'h9600_0008, 32'h1);
    do begin
      u_cpu.read(32'h9600_0008, r);
      if (r[0]) n_busy_wait++;
    end while (r[0]);
    do u_cpu.read(32'h9600_000C, resp); while (!resp[31]);
  endtask

  function automatic real dco_period_ps(input longint ctw);
    return 2173.913 + (1515151.515 - 2173.913) * real'(ctw) / (2.0 ** 28 - 1.0);
  endfunction

  function automatic longint ctw_for(input real period_ps);
    return longint'((period_ps - 2173.913) / (1515151.515 - 2173.913) * (2.0 ** 28 - 1.0));
  endfunction

  task automatic set_ctw(input longint ctw);
    u_cpu.write(32'h9500_0014, 32'(ctw));
    u_cpu.write(32'h0010_0248, 32'(ctw));   // keep the word in a memory variable
  endtask

  task automatic dco_period_measured(output real p);
    realtime t0;
    @(posedge dco_clk) t0 = $realtime;
    repeat (40) @(posedge dco_clk);
    p = ($realtime - t0) / 40.0;
  endtask

  initial begin
    logic [31:0] r, resp;
    longint ctw, ctw_f;
    int e, locked;
    real p, ph;

    #1 rst_n = 1'b0;   // a falling edge, so every asynchronous reset fires
    #250000 rst_n = 1'b1;

    // 0. Data table in memory, read back.
    for (int i = 0; i < 16; i++) u_cpu.write(32'h0010_0200 + 4 * i, 32'h7fe6_0000 + i);
    for (int i = 0; i < 16; i++) begin
      u_cpu.read(32'h0010_0200 + 4 * i, r);
      check(r, 32'h7fe6_0000 + i, "memory table");
    end
    u_cpu.read(32'h9700_0000, r);
    check(r, 8, "SACA default count");

    // 1. The DCO control example.
    u_cpu.write(32'h9500_0014, 32'h8ff8_0000);
    u_cpu.idle(4);
    check(32'(dco_c1), 32'h1ff, "coarse bits after 0x8ff80000");

    // 2. Frequency search.
    u_cpu.write(32'h9600_0000, NDIV);
    u_cpu.write(32'h9500_0010, 32'h0);             // DCO: frequency search
    u_cpu.write(32'h9600_0004, 32'(DET_PERIOD));
    measure(resp);
    n_period_meas++;
    checks++;
    if (resp[28:0] < 99 || resp[28:0] > 101) begin
      failures++;
      $display("FAIL reference period %0d counts", resp[28:0]);
    end
    ctw = ctw_for(real'(resp[28:0]) * 1000.0 / NDIV);
    ctw_f = ctw;
    set_ctw(ctw);
    u_cpu.read(32'h0010_0248, r);
    check(r, 32'(ctw), "CTW variable in memory");
    #500000;
    dco_period_measured(p);
    checks++;
    if (p < 0.98 * TREF_PS / NDIV || p > 1.02 * TREF_PS / NDIV) begin
      failures++;
      $display("FAIL DCO period after search %f", p);
    end

    // 3. Faster bus clock: 16 cycles at period code 100.
    u_cpu.write(32'h9700_0004, 32'd100);
    u_cpu.write(32'h9700_0000, 32'd16);
    u_cpu.read(32'h9700_0000, r);
    check(r, 16, "SACA count");

    // 4./5. Coarse then fine tracking.
    u_cpu.write(32'h9500_0010, 32'h1);             // DCO: phase tracking
    u_cpu.write(32'h9600_0004, 32'(DET_PHASE));
    locked = 0;
    for (int it = 0; it < 400 && locked < 20; it++) begin
      measure(resp);
      n_phase_meas++;
      if (resp[30]) n_lead++;
      if (resp[29]) n_lag++;
      // Signed phase error in TDC counts: positive when the divided clock lags.
      e = int'(resp[28:0]);
      if (resp[30]) e = -e;
      if (e != 0 && locked == 0) begin
        // Coarse: proportional plus integral on the phase error.
        n_coarse++;
        ctw_f = ctw_f - longint'(e) * 1200;
        ctw   = ctw_f - longint'(e) * 6000;
      end else begin
        // Fine: below one count, step by lead/lag alone.
        n_fine++;
        if (e != 0 && (e > 1 || e < -1)) locked = 0;
        else locked++;
        if (resp[30])      ctw_f = ctw_f + 40;
        else if (resp[29]) ctw_f = ctw_f - 40;
        ctw = ctw_f - longint'(e) * 3000;
      end
      set_ctw(ctw);
    end
    checks++;
    if (locked < 20) begin
      failures++;
      $display("FAIL no lock after tracking: locked %0d", locked);
    end
    dco_period_measured(p);
    checks++;
    if (p < 0.998 * TREF_PS / NDIV || p > 1.002 * TREF_PS / NDIV) begin
      failures++;
      $display("FAIL DCO period at the end %f ps", p);
    end
    @(posedge ref_clk);
    @(posedge div_clk);
    #1;
    ph = t_div - t_ref;
    if (ph > TREF_PS / 2) ph -= TREF_PS;
    checks++;
    if (ph > 2000.0 || ph < -2000.0) begin
      failures++;
      $display("FAIL phase at the end %f ps", ph);
    end
    $display("DCO period %f ps, phase %f ps, coarse %0d fine %0d lead %0d lag %0d latches %0d",
             p, ph, n_coarse, n_fine, n_lead, n_lag, n_latch);
    $display("bursts8 %0d bursts16 %0d period meas %0d phase meas %0d busy waits %0d bus transfers %0d",
             n_burst8, n_burst16, n_period_meas, n_phase_meas, n_busy_wait, u_cpu.transfers);
    check(32'(n_burst8 > 0),      1, "8-cycle SACA bursts");
    check(32'(n_burst16 > 0),     1, "16-cycle SACA bursts");
    check(32'(n_period_meas > 0), 1, "period measurement");
    check(32'(n_phase_meas > 0),  1, "phase measurement");
    check(32'(n_busy_wait > 0),   1, "re-arm handshake wait");
    check(32'(n_lead > 0),        1, "lead");
    check(32'(n_lag > 0),         1, "lag");
    check(32'(n_latch > 2),       1, "DCO latches");
    check(32'(n_coarse > 0),      1, "coarse tracking");
    check(32'(n_fine > 0),        1, "fine tracking");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
