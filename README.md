# RTO7 test and debug logic

The RTO7 is a single-chip receiver for Bluetooth-like radio. Its digital part takes the two 1-bit
sigma-delta streams of a low-IF (500 kHz) I/Q front end and demodulates them into a bit stream. This
RTL is that digital part. Above all it is the design-for-test and design-for-debug structure built
around it. The structure does three things:

- It makes the chip testable on an ATE through core test shells, wrapper chains and four scan chains.
- It makes the chip debuggable in the application, through the same IEEE 1149.1 TAP. You program a
  breakpoint on an internal signal and let the receiver run. The breakpoint stops both on-chip clocks
  (64 MHz and 8 MHz), and the frozen state of every flip-flop is then shifted out on TDO as a
  **state dump**.
- It keeps those state dumps **deterministic**, which is hard in a chip with two clock domains and a
  reset that the debugger issues through the TAP.

The demodulator itself is functional: a GFSK signal on the 500 kHz IF, with a frequency offset, is
demodulated by the RTL in simulation. Its filter details are this design's own, though (see
*Departures*). The weight of the design lies in the test and debug logic.

## Chip-level structure

```
 TCK TMS TDI TRST_N ─► tap_ctrl ─► instruction, capture/shift/update strobes, TDO mux
                        │
        boundary scan (bsr, 7 cells on the digital pins)
        global TCB {test_mode, bs_extest}
                        │
  ┌─────────────────────┴──────────────┐     ┌────────────────────────────────────────────┐
  │ dig_ctrl_shell                     │     │ demod_shell (test shell)                   │
  │  local TCB, wrapper chain (2)      │     │  local TCB, wrapper chain (3) + bypass     │
  │  clk_rst_gen: 64 MHz → 8 MHz,      │clk8 │  ┌───────────────────────────────────────┐ │
  │     reset sync, internal reset     ├────►│  │ debug_shell                           │ │
  │  clk_slice ×2 (64 / 8 MHz gating)  │clk64│  │  AC-TPR (2), BC-TPR (204), bypass,    │ │
  │  CC-TPR (6)                        ├────►│  │  lockup flop, chain muxes,            │ │
  │  application settings reg (32)     │rst8 │  │  5 breakpoint modules ─► OR ─► stop ──┼─┼──┐
  │     (pins or TAP, bit 0 = power    ├────►│  │  demod_core (CIC, NCO, CORDICs, ...)  │ │  │
  │      down)                         │     │  └───────────────────────────────────────┘ │  │
  └────────────────▲───────────────────┘     └────────────────────────────────────────────┘  │
                   └─────────────────────────── debug stop clocks ─────────────────────────────┘
```

Each register is a TAP data register selected by its own instruction. The instruction register is
4 bits wide and captures `0001`. Codes not in the table select the bypass register.

| Instruction | Code | Data register | Bits |
|---|---|---|---|
| EXTEST | 0000 | boundary scan; output cells drive the pins | 7 |
| SAMPLE | 0001 | boundary scan; capture the pins | 7 |
| PROGRAM_TCB | 0010 | global TCB → controller TCB → demodulator TCB | 2+5+5 |
| PROGRAM_STATUS | 0011 | application settings register | 32 |
| PROGRAM_DBG_CC | 0100 | CC-TPR, clock control | 6 |
| PROGRAM_DBG_AC | 0101 | AC-TPR, debug chain select | 2 |
| PROGRAM_DBG_BC | 0110 | BC-TPR, breakpoint control | 204 |
| DBG_RESET | 0111 | bypass; functional reset held while current | 1 |
| DBG_SCAN | 1000 | debug chain chosen by the AC-TPR | 559 / 66 / 1 |
| BYPASS | 1111 | bypass | 1 |

Registers shift least significant bit first. In a chained register, such as the three TCBs, the last
register on the chain (next to TDO) takes the first bits.

## A debug session, step by step

This is the flow the end-to-end testbench (`tb/tb_rto7_top.sv`) drives through the pins. It is the
main reason the design exists.

1. **Arm the clock controller.** Write the CC-TPR with `stop8 = stop64 = 1` so a breakpoint stops
   both domains. This is also its reset value.
2. **Program a breakpoint.** Write the BC-TPR. For example, give point A (the I output of the matched
   filter) a window of ±60000 with its counter disabled. An out-of-range sample then raises a stop
   request.
3. **Reset through the TAP.** Load `DBG_RESET`. While it is the current instruction, the functional
   reset is low. Loading any other instruction releases it. The reset goes through the clock
   generator's synchronisers:
   - both clocks start with a rising edge a fixed number of 64 MHz cycles later;
   - the internal reset of the demodulator is released on an 8 MHz edge;
   - the internal reset also appears on the `rst_out` pin, so external stimulus can be started in
     step with it.
4. **Run.** The five breakpoint modules watch points A–E. A module whose counter is disabled requests
   a stop when its condition holds. The OR of the five requests goes straight to the two clock slices.
   At the next falling clock edge the slices close the functional gates of the domains armed in the
   CC-TPR. The gates stay closed until the next functional reset, even if the request goes away.
5. **See that it stopped.** Read the BC-TPR. Its observe half captures the flags and counters of all
   five modules. The CC-TPR's `stopped8`/`stopped64` bits show which domains are frozen.
6. **Dump the state.** Set up the scan:
   - select the chain in the AC-TPR (`01` = 8 MHz, `10` = 64 MHz, `00`/`11` = bypass);
   - give that domain debug clocks in the CC-TPR (`dbg_clk8` or `dbg_clk64`);
   - set the debug scan enable `dbg_se` in the demodulator's TCB.

   Then load `DBG_SCAN`. In Shift-DR each TCK pulse is passed to the selected domain as a clock. Its
   chain shifts by one, and its tail appears on TDO.

   The 8 MHz chain is 559 bits: core chain 0 (482), then a falling-edge lockup flop, then core
   chain 1 (77). The 64 MHz chain is the 66 CIC integrator bits.

   Shifting a dump in again restores the state. The testbench checks that a second shift returns
   exactly the pattern put in.

Run steps 2–6 twice with the same stimulus and the dumps must be bit-identical. The testbench checks
this for both chains.

### What keeps the dumps deterministic

Four details matter, and each is a place where a straightforward design goes wrong.

- **The stop holds.** During a dump the debug clock also clocks the breakpoint modules. They see
  the chains' contents pass through points A–E, and their requests come and go. If the clock gate
  simply followed the request, functional clock pulses would slip into the middle of the dump. When
  they slip in would depend on the TCK rate, so dumps would differ from run to run. Each clock slice
  therefore latches a breakpoint stop until the next functional reset. `tb/tb_dump_repeat.sv`
  exposes the problem if this hold is removed.
- **Breakpoint vs. reset race.** The breakpoint is programmed before the TAP reset. A breakpoint
  still firing from the previous run could then close the clock gate around reset release. If so,
  the first clock pulse after reset would be gated in some runs and not in others, depending on how
  long the debugger took between the two TAP operations. Here the stop request is ignored while the
  internal reset is low (`clk_slice`, `dig_ctrl_shell`), and breakpoint state is cleared by that
  reset. The first pulses after reset are therefore always identical.
- **Capturing the breakpoint state.** The BC-TPR is a holdable register. It shifts only while
  selected and in Shift-DR, and it captures only while selected and in Capture-DR. Releasing the hold
  in Capture-DR, not only in Shift-DR, is what lets the debugger poll the flags and see the moment a
  breakpoint was hit. Its control half has an update stage, so shifting the register never changes a
  live reference value.
- **Holdable debug bypass.** The one-bit debug bypass flop loads only during `DBG_SCAN` shifts, so
  other TAP traffic never changes it. The AC-TPR is likewise a plain holdable shift register with no
  capture or update stage. Its value is the chain select.

## Breakpoint modules and the 204-bit BC-TPR

There are two kinds of module, both clocked by the gated 8 MHz clock and reset synchronously by the
internal reset:

- **A, B (`bp_range`)** watch the 20-bit matched filter outputs I and Q. The flag is set when the
  input is below `lo` or above `hi` (two's complement, bounds inclusive). With `en_cnt = 1` the
  module instead counts out-of-range cycles in a 9-bit saturating counter and never requests a stop.
- **C, D, E (`bp_cmp`)** watch the phase (C), the frequency (D) and the equaliser output (E), all
  12 bits wide. Each has a *greater than* flag and an *equal* flag against `ref`. Each flag either
  requests a stop or, when enabled, is counted by its own 9-bit counter.

BC-TPR layout, from the TDO end upwards (`rtl/rto7_pkg.sv`, `bc_ctl_t` / `bc_obs_t`):

| Part | Per module | Total |
|---|---|---|
| observe, C/D/E | `flag_gt flag_eq cnt_gt[9] cnt_eq[9]` = 20 | 60 |
| observe, A/B | `flag cnt[9]` = 10 | 20 |
| control, C/D/E | `ref[12] en_gt en_eq` = 14 | 42 |
| control, A/B | `lo[20] hi[20] en_cnt` = 41 | 82 |
| | | **204** |

At reset every module is in counting mode and the A/B windows span the full range. Nothing stops the
clocks until a breakpoint is programmed.

## Clock and reset control

`clk_rst_gen` (64 MHz domain):
- synchronises the functional reset, which is `rst_n` pin AND NOT `DBG_RESET`, with two flops;
- divides by 8 for the 8 MHz clock, 50% duty, first rising edge three 64 MHz cycles after the
  release;
- releases the internal reset `rst8_n` on the second 8 MHz rising edge.

Both `clk8` and the internal reset go to pins (`clk8_out`, `rst_out`), so the generator can be
checked from outside. The generator's flip-flops reset asynchronously.

There are two `clk_slice`s, one per domain:
- **functional** — fclk AND an enable sampled on fclk's falling edge; no short pulses. A breakpoint
  stop also sets a hold flop, cleared only by the functional reset;
- **debug** — TCK AND an enable sampled on TCK's falling edge, for debug scans;
- **test** — TCK, gated by the TCB's `tck_en`, in structural test mode.

The functional enable falls when the application register's power-down bit (bit 0) is set, or when
an armed stop request arrives outside reset.

The slices reset asynchronously on the functional reset. That reset is released while the generator
still holds both clocks low, and the clocks start only after the generator's own synchronised
release. The asynchronous release therefore never meets a clock edge. The breakpoint modules and the
demodulator reset synchronously on the internal reset.

The application settings register (32 bits) loads from four pins (`as_sclk`, `as_sdata`, `as_sen`,
`as_ld`) or from the TAP through `PROGRAM_STATUS`. Its outputs other than power-down go to the
analog front end as the `app_q` port.

## Structural test

Each core sits in a test shell: a local TCB `{intest, extest, bypass, tck_en, dbg_se}` and a wrapper
chain over its functional inputs and outputs. In INTEST the wrapper cells drive the core inputs. In
EXTEST they drive the core outputs. Debug signals and the settings register's TAP controls are not
wrapped.

Setting the global TCB's `test_mode` bit turns the chip into a scan-test device. TCK becomes the
clock of every domain, and **TDI becomes the scan enable**: the TAP stays in Run-Test/Idle with TMS
low, so TDI is free. That is why debug has its own scan enable, `dbg_se`: during debugging the TAP
pins carry TAP traffic. The four pin chains are:

| Pin | Chain | Bits |
|---|---|---|
| `scan_in/out[0]` | demodulator chain 0 (CIC combs, NCO, rotating CORDIC, matched filter) | 482 |
| `scan_in/out[1]` | demodulator chain 1 (vectoring CORDIC, differentiator, loop, equaliser) | 77 |
| `scan_in/out[2]` | demodulator 64 MHz chain (CIC integrators) → controller chain | 66 + 6 |
| `scan_in/out[3]` | demodulator wrapper (or its 1-bit bypass) → controller wrapper → CC-TPR | 3 + 2 + 6 |

## Demodulator datapath

At 64 MHz, a third-order CIC decimates each sigma-delta stream by 8. Its comb values cross into the
8 MHz domain through falling-edge anti-skew flops. The rest runs at 8 MHz:

1. **Rotating CORDIC**, 12 iterations: turns the signal by the NCO angle, bringing 500 kHz down to
   0 Hz.
2. **NCO**: a 12-bit phase accumulator, where a full turn is 4096. The default word −256 is −500 kHz
   at 8 MHz.
3. **Matched filter**: an 8-tap moving average for a one-symbol pulse. Its outputs I and Q are
   points **A** and **B**.
4. **Vectoring CORDIC**: gives the phase, point **C**.
5. **Differentiator**: the phase difference is the instantaneous frequency, point **D**.
6. **Frequency loop**: integrates D with gain 2^-5 and adds the result to −256 as the NCO word. This
   removes the carrier offset.
7. **Decision-feedback equaliser**: one tap, one symbol back. Its output is point **E**, and its sign
   is the 8×-oversampled bit stream `bit_out`.

All state flops are scan flops. Scan has priority over the synchronous reset, so a state dump taken
during reset still shifts.

## Departures and own choices

Own choices where the original description gives the function but not the detail:
- instruction codes;
- TCB, CC-TPR and settings-register bit assignments;
- the 12-bit phase width; the 12-bit C/D/E reference width is the one that makes the BC-TPR exactly
  204 bits;
- CIC order, matched filter shape, loop gain, equaliser taps;
- the split of the demodulator flops over its three chains;
- the boundary-scan pin list.

Deliberate departures:
- **Breakpoint state is captured in Capture-DR.** A design that released the BC-TPR's hold only in
  Shift-DR could not capture breakpoint state. The corrected behaviour is built.
- **The breakpoint/reset race is removed** (see above) instead of reproduced. With the gating here,
  the TCK-frequency-dependent behaviour cannot occur.
- **A breakpoint stop holds until the next functional reset** (see above). The request alone only
  says when to stop.
- **`DBG_RESET` lasts as long as the instruction is current.** A pulse width is not specified.
- The RF front end and the sigma-delta ADC are analog and not built. The testbenches model the ADC as
  two first-order modulators fed by a GFSK-like signal.

The lockup flop in the 8 MHz debug chain matters only with real clock skew between the two chains. A
zero-delay simulation cannot tell it apart from a wire.

## Simulating

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. Shared tasks are in
`tb/tb_common.svh` (check counting), `tb/dr_tasks.svh` (data-register strobes) and
`tb/jtag_tasks.svh` (a TAP host). With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cordic_pkg.sv rtl/rto7_pkg.sv tb/tb_rto7_top.sv --top-module tb_rto7_top
./obj_dir/Vtb_rto7_top
```

Replace `tb_rto7_top` by any other testbench name.

`tb_rto7_top` runs the whole chip at its default sizes, through the pins only:
- a functional demodulation check;
- settings writes from the pins and from the TAP, and power-down;
- SAMPLE and EXTEST;
- two complete breakpoint / DBG_RESET / stop / poll / dump runs, with their dumps compared;
- the debug bypass;
- a counting-mode breakpoint;
- the four test-mode chains;
- an interconnect test: with EXTEST in the demodulator's TCB, the wrapper output cell, loaded through
  pin chain 3, drives `bit_out`.

It counts each mechanism and fails if one never happened. It takes well under a second.

`tb_dump_repeat` repeats the debug run 40 times and requires every state dump to be identical to
the first. Across the runs it varies:
- the TCK rate, from 1.25 MHz to 20 MHz;
- the idle time between programming and reset, and the length of the reset, at random;
- the starting state: half the runs start from a running chip, so the new breakpoint fires before
  the TAP reset.

`tb_demod_core` checks demodulation with frequency offsets of 0, +50 and −30 kHz. At least 95 of 100
symbols must be recovered, and the loop's settled error must match the offset.
