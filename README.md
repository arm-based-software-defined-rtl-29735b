# Software-defined PLL platform on an AMBA AHB bus

An all-digital phase-locked loop normally has its loop filter and its
lock-acquisition state machine built into hardware. A software-defined PLL
(SDPLL) instead keeps only the analog-facing parts in hardware: an oscillator
whose frequency is set by a digital word, and a detector that turns a time
difference into a number. A processor closes the loop in software. It reads
the measured error over a system bus, computes a new tuning word and writes it
back. This makes the tracking strategy as easy to change as a C program.

This RTL is the hardware side of such a platform, built around an AMBA 2.0
AHB bus:

* **DCO**, a digitally controlled oscillator. It runs from 0.66 MHz to 460 MHz
  and is set by a 28-bit control tuning word (CTW).
* **Error detector**, a frequency divider, a phase/frequency detector (PFD) and
  a time-to-digital converter (TDC). It measures either the reference period or
  the phase error between the reference and the divided DCO clock. It also
  reports whether the divided clock leads or lags.
* **SACA**, a semi-asynchronous clock generator. After every reference rising
  edge it emits a burst of a programmable number of fast clock cycles, then
  stays low. That burst is the bus clock `HCLK`, so the bus and the processor
  only run when there is work to do.
* **AHB fabric**: an arbiter, an address decoder, and central master-to-slave
  and slave-to-master multiplexers.
* **Internal memory** for program and data.
* **Bus interfaces** that expose the DCO, the error detector and the SACA as
  zero-wait AHB slaves.

The processor itself (a 32-bit RISC core, an AHB master) is not part of this
RTL. Its bus signals are ports of the top level, and the testbenches drive them
with a bus-master model that runs a small tracking program.

## The loop, as software sees it

The software runs through three stages. The hardware is built so that each one
is a short sequence of register accesses.

1. **Frequency search.** Set the divider ratio `N`. Set the detector to
   *period* mode and re-arm it. Wait for the result: the reference period in
   TDC counts. From it, compute the CTW that makes the DCO run at `N` times the
   reference frequency, and write it.
2. **Coarse tracking.** Switch the detector to *phase* mode. Each reference
   period the TDC returns the width of the PFD pulse, meaning the distance
   between the reference edge and the divided-clock edge. The lead/lag bits give
   its sign. Correct the CTW in proportion to the error, and keep an integral
   term for the frequency offset.
3. **Fine tracking.** Once the error is below one TDC count, step the CTW by a
   small amount up or down, based only on lead/lag.

`tb/tb_sdpll_top.sv` does exactly this at a 10 MHz reference with `N = 4`. The
loop settles to a DCO period within 0.2 % of 25 ns. The remaining phase error
is well under one TDC count.

## Memory map

The slave is selected by `HADDR[31:24]`. All registers are 32 bits wide and
take one bus cycle to read or write.

| Page | Slave | Offset | Register | Access | Reset |
|---|---|---|---|---|---|
| `0x00` | internal memory | any | data | R/W, byte/half/word | from `INIT_FILE` or zero |
| `0x95` | DCO | `0x10` | `[0]` DCO mode | R/W | 0 |
| | | `0x14` | `[27:0]` CTW; a write also pulses `latch_signal` | R/W | 0 |
| | | `0x18` | `[0]` DCO ready, meaning the last word is in use | R | |
| `0x96` | error detector | `0x00` | `[15:0]` divider ratio `N` | R/W | 4 |
| | | `0x04` | `[1:0]` detect mode: 0 idle, 1 period, 2 phase, 3 idle | R/W | 0 |
| | | `0x08` | write: re-arm the TDC. Read `[0]`: re-arm still in progress | W/R | 0 |
| | | `0x0C` | `{valid, lead, lag, value[28:0]}` | R | 0 |
| `0x97` | SACA | `0x00` | `[7:0]` HCLK cycles per reference edge | R/W | 8 |
| | | `0x04` | `[7:0]` HCLK period code: 0 fastest, 255 slowest | R/W | 255 |

Other pages return zero with an OKAY response. Other offsets inside a page
read as zero and ignore writes.

The address `0x9500_0014` for the CTW, and the placement of the coarse
control bits `C1 = CTW[27:19]`, follow the platform's own example: writing
`0x8ff8_0000` there sets `C1` to `0x1ff`. All other offsets, the pages
`0x96` and `0x97`, and the reset values are choices of this design.

## Crossing between clock domains

This is the least obvious part of the design. There are four unrelated
clocks:

* the reference;
* the DCO;
* the free-running TDC delay-chain clock;
* `HCLK`, which exists only in bursts after a reference edge.

A register written on `HCLK` can therefore stay unsampled for most of a
reference period, and a result produced by the TDC can arrive while `HCLK` is
stopped. Every crossing uses a level that stays stable, never a single-cycle
pulse, so no event is lost:

* **CTW to DCO.** The CTW register holds its value. `latch_signal` is one
  `HCLK` cycle long, but the DCO takes the word on its rising edge, which is an
  asynchronous capture of a stable word. The DCO applies the new word at its
  next half-period boundary. `dco_ready` is synchronised back into `HCLK`
  through two flip-flops, and software polls it.
* **Re-arm (`error_set`).** A write to `0x08` raises `error_set` and holds it.
  The TDC synchronises it into its own clock and clears its result. The valid
  bit then falls, and once that fall reaches `HCLK`, `error_set` drops. Reading
  `0x08` shows whether this handshake is still in progress.
* **Result to bus.** `error_valid`, `lead` and `lag` pass through two-flop
  synchronisers into `HCLK`. The 29-bit value is sampled only while the
  synchronised valid is high, and the TDC holds the value stable for as long as
  valid is high. The valid bit shown to software is delayed one more cycle, so
  the value it comes with has already been captured.
* **Detect mode and divider ratio** are static configuration: software
  changes them only between measurements.

The synchronisers cost a few `HCLK` cycles of latency. With 8 cycles per
reference period, a result normally reaches the bus in the next burst.

## Error detector

```
 ref_clk ──┬──► clock_regen ──ref_pulse──┐
           │                             ├─► detect_mux ─pulse,frame─► tdc ─► value, valid
           └──► pfd ◄── div_clk          │        ▲                     ▲
                 │  └──phase_error───────┘   detect_mode          tdc_delay_chain
                 └──► lead, lag
 dco_clk ──► freq_divider(N) ──► div_clk
```

* `freq_divider` counts DCO rising edges and wraps after `N` of them. Its
  output is high for the first `N/2` counts. `N < 2` is treated as 2.
* `clock_regen` is a toggle flip-flop on the reference rising edge. Its output
  is high for exactly one reference period out of every two, whatever the
  reference duty cycle.
* `pfd` is the usual two-flip-flop detector. It raises `up` on a reference edge
  and `dn` on a divided-clock edge, and clears both when both are set. Its
  `phase_error` output is high from the first edge of a pair to the second.
  `lead` is sampled on the reference edge and `lag` on the divided-clock edge.
  So `lead = 1` means that the divided clock came first, and `lag = 1` means it
  came second.
  The clear is a deliberate loop from the two flip-flops through an AND gate
  back to their asynchronous clears. Synthesis tools report it as a logic
  loop. The delay around it sets the minimum pulse width, which is the
  detector's dead zone.
* `detect_mux` passes either the re-generated reference pulse (period mode) or
  the PFD pulse (phase mode) to the TDC. It also passes a *frame*: a signal
  whose falling edges bound one measurement. The frame lets a pulse that is
  shorter than one TDC count still produce a result, namely zero.
* `tdc` counts delay-chain clock cycles while the pulse is high, from one frame
  falling edge to the next. It then sets `valid` and holds the value until a
  re-arm. The count saturates at `2^29 - 1`.
* `tdc_delay_chain` stands in for the chain of delay cells. It is a
  free-running clock with a 1 ns default period (`TDC_PERIOD_PS` on
  `error_detector`). That period is the TDC resolution.

## SACA

`saca_ctrl` and `saca_osc` together produce `HCLK`:

* `saca_ctrl` opens a *window* on every reference rising edge. It closes the
  window when the oscillator has produced the programmed number of rising
  edges. The window is the XOR of two toggle flip-flops, one in the reference
  domain and one in the oscillator domain, so there is no asynchronous reset
  path between them.
* `saca_osc` starts with a rising edge when the window opens, and finishes the
  cycle in progress when the window closes, so there are no runt pulses. Its
  period goes linearly from 812 ps at code 0 to 9.71 ns at code 255, which is
  1231 MHz down to 103 MHz.
* A reference edge that arrives while a burst is still running is ignored.

## DCO model

`dco` is a timing model, not a circuit. Its period goes linearly from
2.174 ns (460 MHz) at CTW 0 to 1.515 µs (0.66 MHz) at CTW `0xFFFFFFF`.
It also brings out the 9 coarse control bits `C1 = CTW[27:19]`. A real DCO
splits the word into several coarse and fine fields and has a non-linear
characteristic. Software that needs to be realistic should measure the
period, as the frequency-search stage does, rather than trust the linear
map. The `dco_mode` input is brought to the model but does not change it.

## Module list

| Module | Kind | Role |
|---|---|---|
| `sdpll_pkg` | package | AHB structs and enums, slave pages, register offsets, widths |
| `sdpll_top` | RTL | the whole platform; processor bus signals are ports |
| `ahb_arbiter` | RTL | fixed priority, master 0 highest and default; up to 16 masters |
| `ahb_decoder` | RTL | page decode, registered data-phase select |
| `ahb_mux_m2s` | RTL | address/control from the address-phase owner, write data from the data-phase owner |
| `ahb_mux_s2m` | RTL | response of the data-phase slave |
| `ahb_sram` | RTL | 2 MiB memory, byte lanes, zero wait |
| `dco_write_ctrl` | RTL | DCO registers, latch pulse, ready synchroniser |
| `ed_read_ctrl` | RTL | detector registers, re-arm handshake |
| `ed_response` | RTL | synchronises and packs the detector result |
| `saca_ahb_if` | RTL | SACA registers |
| `saca_ctrl` | RTL | burst window |
| `error_detector` | RTL | wraps the six detector parts |
| `freq_divider`, `clock_regen`, `pfd`, `detect_mux`, `tdc` | RTL | see above |
| `saca_osc`, `tdc_delay_chain`, `dco` | behavioural | timed models of the oscillators |

The behavioural models use `real` parameters and `#` delays. They are meant
for simulation only. In silicon they are replaced by the analog or custom
cells.

## Where this design goes beyond its source

The platform as originally described gives the block diagram, the signal
names and widths, the frequency ranges, the bus protocol, the single-cycle
register access and the DCO example above. The following are this design's
own choices:

* fixed-priority arbitration, no locked transfers, SPLIT or RETRY, and zero
  data with OKAY for unmapped pages;
* register offsets other than the CTW, the error detector and SACA pages, and
  all reset values;
* the `{valid, lead, lag, value}` packing of the detector response;
* the re-arm handshake, all synchronisers, and the TDC frame signal;
* the detect-mode encoding;
* the divider's duty cycle;
* the TDC resolution of 1 ns;
* the memory size of 2 MiB;
* the linear oscillator characteristics and the 8-bit SACA fields.

One stated figure was not followed. An 83.87 MHz SACA output at a 10 MHz
reference is below the stated 103 to 1231 MHz range of the SACA, so the model
keeps to the range.

## Simulating

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
one ends by printing `TB_RESULT checks=<n> failures=<m>`, and each has a
watchdog. `tb/ahb_bfm.sv` is the shared bus-master model. Time units are set in
every file (`timeunit 1ps; timeprecision 1fs;`). With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/sdpll_pkg.sv tb/tb_sdpll_top.sv --top-module tb_sdpll_top -o sim
./obj_dir/sim
```

For a single block, swap in its testbench and top module name. `-Wno-fatal`
is needed because Verilator warns that the delays in the oscillator models
are computed at run time (`ZERODLY`); those delays are never zero. `tb_sdpll_top`
runs the full platform at its default parameters and finishes in well under a
second. It checks:

* register and memory contents;
* the DCO example (`C1 = 0x1ff`);
* SACA bursts of 8 and then 16 cycles;
* the final DCO period and phase;
* that every mechanism occurred at least once: period and phase
  measurements, re-arm waits, lead and lag, DCO latches, and coarse and fine
  iterations.

Because the top has no clock of its own other than the reference, all of its
state is reset asynchronously. Assert `rst_n` low for a while after time 0.
