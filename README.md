# Tunable DCM-based beat-frequency TRNG

This is a true random number generator (TRNG) for FPGAs made only of digital parts. Two on-chip
clock managers (DCMs) produce two clocks whose frequencies differ slightly. One clock samples the
other. How long each "beat" between them lasts depends on clock jitter, which is physical noise.
The low bits of that length are the random output. The DCMs' multiply/divide ratios can be
rewritten at run time through their dynamic reconfiguration ports (DRPs). That lets the generator
be retuned on a running device, choosing from a fixed table of safe settings, until its output is
good enough.

The logic is synthesizable SystemVerilog. The DCMs are vendor hard macros. They are written here as
a behavioural simulation model with the real primitive's ports, and on a device the vendor
primitive takes the model's place.

## How the randomness is harvested

```
            clk ──┬──► DCM A (M_A/D_A) ── clk_a ──┬──────────────► counter clock
                  │                               │   ┌────┐
                  └──► DCM B (M_B/D_B) ── clk_b ──┼──►│D  Q├─► settle ─► rising edge ─► restart counter,
                                                  └──►│>   │                            capture count
                                                      └────┘
```

- **Beat detector** (`bfd_core`). A D flip-flop clocked by `clk_a` samples `clk_b` as data. Each
  cycle, `clk_b`'s phase relative to `clk_a` moves by the period difference. So the flip-flop
  output is a square wave at the beat frequency `|f_a - f_b|`.
- **Beat counter** (`bfd_core`). A counter clocked by `clk_a` restarts at the rising edge of that
  square wave that starts each beat. The value it had reached is captured in `count_max`. That
  value is the beat period in `clk_a` cycles, about `f_a / |f_a - f_b|`.
- **Where the randomness comes from.** Near each edge of the beat wave the two clocks are almost
  aligned, so jitter decides the cycle on which the sampled value flips. It also makes the value
  flip back and forth for a while, which is called bounce.
- **Hold-off** (`HOLDOFF`, 32 cycles). A rising edge that comes less than `HOLDOFF` cycles after
  the last accepted one does not restart the counter. Each beat therefore gives exactly one count:
  a full beat period whose length jitter has moved by a few cycles. Without the hold-off, bounce
  yields runs of tiny counts (1, 2, 3, ...) whose LSBs are strongly biased. In simulation that
  made the output fail the frequency, runs and distribution tests for every tuning set. Keep
  `HOLDOFF` above the bounce width (the jitter zone divided by the phase slide per cycle) and well
  below the shortest beat period.
- **Output bits** (`lsb_collector`). Only the three least significant bits of each count are
  kept. These are the bits the jitter scrambles; the upper bits mostly just restate the nominal
  beat period.
- **Settling.** The sampling flip-flop can go metastable, which is expected. Two more flip-flops
  let it settle before edge detection. `count_valid` therefore follows the sampling edge by three
  `clk_a` cycles.

Both DCMs take the same reference clock, so without jitter the two clocks would be strictly
periodic with respect to each other, and every beat count would repeat. The only entropy is the
DCM jitter around the edge crossings. How much of it reaches the three LSBs depends on how far the
phase slides per cycle (`|T_a - T_b|`) compared with the jitter. A slow slide gives a wide zone of
uncertain samples and more entropy per beat, but fewer beats per second. That trade-off is why the
ratios are tunable.

## Getting bits into the system clock domain

The counter runs on `clk_a`, and the output register runs on the system clock `clk`.
`lsb_collector` links them with a toggle handshake:

1. On `count_valid`, if nothing is in flight, the three LSBs go into a holding register and a
   request bit toggles.
2. The request passes two synchronizer flip-flops into `clk`. When it differs from the acknowledge
   bit, the held bits are taken. They have been stable since the toggle.
3. If `en` is high, the bits are shifted into the bottom of `trng[5:0]`. The acknowledge bit is
   updated either way.
4. The acknowledge passes two flip-flops back into `clk_a`, and the holding register is free again.

A count that arrives while a transfer is in flight is dropped. One transfer round trip takes about
3 `clk` cycles plus 2 `clk_a` cycles, about 8 `clk_a` cycles. With the default hold-off, counts
are at least 32 `clk_a` cycles apart, so no count is dropped. The drop path matters only if
`HOLDOFF` is lowered or `clk` is made much slower.

After two kept samples, `trng_valid` pulses for one `clk` cycle. `trng` then holds six fresh bits,
with the older sample in `trng[5:3]`.

Throughput is one 3-bit sample per beat. For set 0 (76.19 MHz against 76.32 MHz, a beat every
608 `clk_a` cycles, 8 us) that is about 375 kbit/s. Across the table it ranges from about 375 to
720 kbit/s. No post-processing is done here.

## Tuning through the DRP

`drp_tuner` is the tuning controller. `param_rom` is the block RAM of safe settings. Only stored
settings are ever written to the DCMs, so the clocks cannot be driven into an illegal or unsafe
configuration. A retune runs in these steps:

| step  | action |
|-------|--------|
| READ  | present the set index to the block RAM (1-cycle read) |
| WRITE | assert DCM reset; one DRP write per DCM: `{M-1, D-1}` at address `0x50` |
| WAIT  | wait until both DCMs have pulsed `DRDY` |
| HOLD  | keep reset 4 more cycles, then release it |
| LOCK  | wait for both `LOCKED`; then `ready` rises |

After `rst`, set 0 is loaded. Each later rising edge of `load` moves to the next set, wrapping
after the last. A `load` edge during a retune is ignored. While `ready` is low:

- the `clk_a` domain is held in reset through an asynchronous-assert, synchronous-release reset
  synchronizer, because `clk_a` stops while the DCM is in reset;
- the output side is held in reset, so no bits made with half-configured clocks reach `trng`.

A retune takes about 80 `clk` cycles, most of it the DCM model's 64-cycle lock time.

The stored sets assume a 50 MHz reference (frequencies for 50 MHz):

| set | DCM A M/D | f_a (MHz) | DCM B M/D | f_b (MHz) | nominal beat period (clk_a cycles) |
|-----|-----------|-----------|-----------|-----------|-------------------------------------|
| 0 | 32/21 | 76.19 | 29/19 | 76.32 | 608 |
| 1 | 32/23 | 69.57 | 25/18 | 69.44 | 576 |
| 2 | 31/24 | 64.58 | 22/17 | 64.71 | 527 |
| 3 | 29/22 | 65.91 | 25/19 | 65.79 | 551 |
| 4 | 23/14 | 82.14 | 28/17 | 82.35 | 391 |
| 5 | 27/16 | 84.38 | 22/13 | 84.62 | 351 |
| 6 | 30/19 | 78.95 | 19/12 | 79.17 | 360 |
| 7 | 31/20 | 77.50 | 17/11 | 77.27 | 341 |

The differences are small on purpose, only 0.15 % to 0.3 %. The phase then slides by only 20 to
45 ps per cycle, so a ±150 ps jitter blurs the crossing over many cycles. With this jitter,
differences of 0.4 % to 3 % give visibly biased output in simulation.

These values are this design's own. They were chosen against the simulated jitter, not measured on
hardware. Tuning exists so that sets which pass statistical tests on a given device can be picked.
So replace the table (the `table_entry` function in `param_rom.sv`) with values characterised on
the target part. The table holds
M 2..32 and D 1..32, the usual CLKFX limits.

## Top level: `trng_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | system clock; reference for both DCMs and DRP clock |
| `rst` | in | 1 | asynchronous, active high |
| `en` | in | 1 | when low, samples are discarded and `trng` holds |
| `load` | in | 1 | rising edge: retune to the next stored set |
| `trng` | out | 6 | random output word |
| `trng_valid` | out | 1 | one-cycle pulse: `trng` holds six new bits |
| `ready` | out | 1 | tuned and locked; output is being produced |
| `set_idx` | out | 3 | tuning set in use |

Parameters: `CNT_W` (counter width, 16), `HOLDOFF` (32), `LSB_W` (bits per sample, 3), `OUT_W` (word width, 6),
`DEPTH` (stored sets, 8) and `JITTER_PS` (model jitter, 150 ps). The generator's own pins are
`clk`, `rst`, `en`, `load` and `trng[5:0]`. `trng_valid`, `ready` and `set_idx` were added so
software can tell fresh bits and the tuning state apart.

## Files

| file | contents |
|------|----------|
| `rtl/trng_pkg.sv` | `md_t` / `md_pair_t` tuning-set types, DRP request/response structs, DRP address and encoding |
| `rtl/trng_top.sv` | the whole generator |
| `rtl/bfd_core.sv` | sampling flip-flop, settling stages, beat counter and capture |
| `rtl/lsb_collector.sv` | LSB extraction, clock-domain crossing, output shift register |
| `rtl/param_rom.sv` | block RAM of tuning sets |
| `rtl/drp_tuner.sv` | DRP reconfiguration controller (FSM) |
| `rtl/reset_sync.sv` | reset synchronizer for the `clk_a` domain |
| `rtl/dcm_model.sv` | behavioural DCM with DRP (simulation only) |
| `tb/*_tb.sv` | one self-checking testbench per module; `trng_top_tb` runs the whole design |
| `tb/trng_nist_tb.sv` | statistical tests on the output of every tuning set |

## The DCM model

`dcm_model` has a DCM_ADV-like port list: `CLKIN`, `RST`, `CLKFX`, `LOCKED`, `DCLK`, `DEN`,
`DWE`, `DADDR`, `DI`, `DO` and `DRDY`. Its behaviour:

- After `RST` is released, it measures the `CLKIN` period over 64 edges and then raises `LOCKED`.
- It produces `CLKFX = CLKIN * M / D`. Every edge is displaced from an ideal grid by an
  independent, uniformly distributed jitter of up to ±`JITTER_PS`. The jitter does not
  accumulate, as for an output locked to its reference.
- A DRP access returns `DRDY` 3 `DCLK` cycles after `DEN`. A written M/D applies at the next
  release of `RST`.

The jitter model decides how random the simulated output looks, so treat simulated statistics as
a plumbing check only. Real entropy has to be measured on hardware. When targeting a device,
replace the two `dcm_model` instances with the vendor primitive. Check that primitive's DRP
address and encoding for the CLKFX M/D register, and change `DRP_ADDR_CLKFX` and `md_to_drp` in
`trng_pkg` if they differ.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. The package must be compiled first:

```
verilator --binary --timing --assert -Irtl -Itb rtl/trng_pkg.sv tb/trng_top_tb.sv \
          --top trng_top_tb -o sim && ./obj_dir/sim
```

Use the same command with another `tb/<module>_tb.sv` and `--top <module>_tb` to test one module.
`trng_top_tb` runs with every parameter at its default. It covers the initial tuning and all eight
retunes plus the wrap to set 0, with 100 output words per set, and finishes in well under a second
of wall time. For each set it checks:

- the mean beat period against `f_a / |f_a - f_b|`;
- that every output word is built from captured count LSBs in capture order;
- bit balance, and that the output varies;
- that `en` low freezes the output;
- that `load` during a retune is ignored.

It also fails unless the hold-off has ignored at least one bounce edge. Dropped counts are counted
but cannot occur at the defaults. `lsb_collector_tb` covers that path.

`trng_nist_tb` is the statistical workload. For every tuning set it collects 12,000 output bits
and runs three tests at the 1 % level:

- the NIST SP 800-22 frequency (monobit) test;
- the NIST SP 800-22 runs test;
- a chi-square test of the 3-bit sample values.

It prints the p-values, and it fails if no set passes all three. With the default seed all eight
sets pass. It takes about 12 s. The other NIST tests need longer sequences than are practical to
simulate. Again, this shows only that the harvesting logic does not bias a jittery input; it says
nothing about real silicon jitter.

## Where this departs from, or goes beyond, the description it follows

- **DCM register map and DRP protocol.** The description only says that M and D are changed
  through the DRP. The address, encoding, latencies, lock time, the reset around the write and the
  jitter model are assumptions.
- **Tuning policy.** The description stores safe M/D values in block RAM but does not say how a set
  is chosen. Here `load` steps through the sets in order. Set 0 after reset, and ignoring `load`
  during a retune, are also this design's choices.
- **Table contents.** The depth and all values are this design's own.
- **Hold-off.** The description restarts the counter when the flip-flop sets, once per beat
  interval. The hold-off that turns a bouncing crossing into one restart is this design's way of
  getting that behaviour.
- **Counter details.** The counter is 16 bits wide and saturates, and there are two settling
  stages. These are not specified by the description.
- **`en` and `load` pins.** They appear in the reference design's pin list without a stated
  function. Here `en` gates the output shift register and `load` triggers a retune.
- **Output packing.** A 6-bit output shift register filled 3 bits at a time, older sample on top,
  is this design's reading of the `trng[5:0]` output.
- **Added logic.** The clock-domain crossing, dropping counts while busy, and the `trng_valid`,
  `ready` and `set_idx` outputs are additions.
- **Size.** Synthesis of the logic gives about 156 flip-flops, 32 of them the block RAM output
  register, plus a 256-bit table. A 56-flip-flop build is reported for the reference design. Most of the difference is the DRP controller and the
  clock-domain crossing.
- **Bias elimination.** "Built-in bias elimination" is claimed for the reference design. Apart
  from tuning and keeping only the low count bits, no post-processing is described, and none is
  implemented. Add a von Neumann corrector or a hash after `trng` if the raw bits are not good
  enough.
- **Statistical quality.** Passing the NIST SP 800-22 tests is reported for the reference design.
  Here only three tests run, on simulated jitter (see `trng_nist_tb`). Real conformance has to be
  shown on hardware.
