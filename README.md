# Tunable beat-frequency-detection TRNG for FPGAs

A true random number generator that gets its entropy from clock jitter. Two clocks
are made with almost the same frequency. A flip-flop samples one clock with the other.
Because the frequencies differ slightly, the sampled value stays constant for many
cycles and flips once per *beat interval*. A counter measures each beat interval in
clock cycles. Jitter makes that count wobble by a cycle or a few, so the count's
low-order bits are random.

The classic form of this generator uses two free-running ring oscillators. Their
frequencies depend on placement, routing and the individual chip, and nothing can
correct them. This design uses two FPGA **Digital Clock Managers (DCMs)** instead. A
DCM synthesises `f_out = f_in * M / D`, and its multiplier `M` and divider `D` can be
rewritten at run time through the DCM's **dynamic reconfiguration port (DRP)**. The
frequency gap, and with it the trade-off between random bits per sample and sample
rate, can therefore be tuned while the FPGA runs. To keep unsafe settings out of the
clock managers, only `(M, D)` pairs checked at design time can be loaded. They sit in
a small block RAM.

```
                 +--------+ clk_a                  +---------+  count_max  +-----------------+
  clk_in ---+--->| DCM-A  |------------> D     Q --> rise    |------------>| post-processing |--> rnd_word
            |    +--------+              beat_dff  | counter |             |  (LSB packer)   |    rnd_valid
            |    +--------+ clk_b          ^       +---------+             +-----------------+
            +--->| DCM-B  |----------------+------------^-------------------------^
                 +--------+        (clock B = rng_clk clocks all three)
                   ^   ^
       DRP A ------+   +------ DRP B
        |                        |
  +-----+------------------------+----+     16-bit {M,D}   +---------+  5-bit addr  +-------------------+
  |        dcm_drp_controller         |<------------------ | md_bram |<-------------| address_generator |
  +-----------------------------------+                    +---------+              +-------------------+
        ^ drp_req                                                                        ^ cfg_load / cfg_step
```

## How a count becomes random bits

Let clock A have period `TA` and clock B period `TB`, with `TB < TA`. At every B edge,
A's phase relative to B slides by `TA - TB`. After `TA / (TA - TB)` B cycles it has
slid one whole period. In that time the flip-flop output `beat` has gone through one
low phase and one high phase. `beat_counter` counts B cycles. On each rising edge of
`beat` it outputs the count as `count_max` and starts again from zero.

With the default settings, `(M, D) = (20, 24)` for A and `(21, 24)` for B, and a 50 MHz
reference:

- `TA` is 24.000 ns and `TB` is 22.857 ns.
- The mean count is 24.000 / 1.143, about 21.

With jitter, single counts vary between about 20 and 22. Only the bottom bit or two
carry entropy, and the upper bits are the nominal interval. Moving the two
frequencies closer does three things:

- The mean count grows.
- More jitter accumulates over each interval.
- The count spreads over more values, so more low bits become random.

The cost is fewer counts per second. As a numeric illustration: at a 1 % gap with
0.01 % jitter, counts fall in 99..101 and one LSB is usable. At a 0.5 % gap, counts
fall in 196..204 and three LSBs are usable. The `nbits` input, from 1 to 3, selects how
many LSBs of each count go to the output.

`post_processing_unit` appends the `nbits` LSBs of every count to a bit accumulator,
newest bits at the LSB end. When 32 bits are available it emits the oldest 32 as
`rnd_word`. Leftover bits start the next word, so a bit is never lost or repeated when
32 is not a multiple of `nbits`. There is no whitening or health testing. A
deployment should add them, or run statistical tests on the output and pick the
setting and `nbits` from the results.

The closest pair of distinct settings in the stored table, 22/23 against 23/24, gives
a nominal count of about 528. With the model's rounding of half periods to whole
picoseconds, the figure is 523. That fits easily in the 12-bit counter. At this
setting the phase drifts by only 40 ps per cycle, which is less than the 50 ps jitter
of the model. The flip-flop output therefore chatters near each crossing and adds
short intervals. In simulation the mean count falls to about 450, and the relative
standard deviation rises to almost 40 %. This is the regime where many low bits are
random. The short intervals it adds matter if the output is used without further
processing. If two settings
have the same `M/D`, no beat occurs. The counter then saturates at 4095 and reports
that value at the next beat, if one ever comes.

## Retuning: the DRP path

The table in `md_bram` holds 23 settings: one `{M[7:0], D[7:0]}` per 16-bit word, in
a 32-word memory with a 5-bit address. Words 23..31 are zero. `address_generator`
holds one table index per DCM, `idx_a` and `idx_b`:

- `cfg_load` sets both indices. A load that names index 23 or above is refused with
  `cfg_err`, so nothing outside the checked table can reach a DCM.
- `cfg_step` advances both indices by one, wrapping after 22. A host can use it to
  sweep through the settings.

A pulse on `drp_req` makes `dcm_drp_controller` run this sequence on `sys_clk`:

1. Assert the reset of both DCMs.
2. Read the word for DCM-A (`phase = DCM_A` selects `idx_a` as the address), convert it
   to `{M-1, D-1}` and write it to DRP address `7'h50` of DCM-A. Wait for `DRDY`.
3. Do the same for DCM-B.
4. Hold the reset for `RST_HOLD` (8) more cycles, then release it.
5. Wait until both `LOCKED` signals, through a two-flop synchroniser, are high. Then
   pulse `done`.

Each DCM takes 4 cycles plus the DRDY latency. The total is
`2*(4 + DRDY latency) + RST_HOLD + lock time + 2`. If DRDY or LOCKED fails to arrive
within `TIMEOUT` (4096) cycles, `drp_err` is set and the controller returns to idle.
`drp_err` is cleared by the next request. Requests that arrive while `busy` is high
are ignored.

## Clock domains and resets

This is the subtle part of the design. There are three clock sources:

| domain    | clock     | contents                                                        |
|-----------|-----------|-----------------------------------------------------------------|
| control   | `sys_clk` | address generator, BRAM, DRP controller, clock-B reset release  |
| random    | `clk_b` = `rng_clk` | beat flip-flop, counter, post-processing unit, all random outputs |
| sampled   | `clk_a`   | only the D input of the beat flip-flop                          |

Clock A is sampled asynchronously on purpose: metastability and jitter at that
flip-flop are the entropy source. No synchroniser belongs there.

Clock B only runs while DCM-B is locked. An asynchronous reset that is asserted and
released while the clock is stopped does not reliably reset anything, in hardware or
in a two-state simulator. The top level therefore works in two steps:

1. It holds the clock-B logic in reset while either DCM is unlocked, and for 16
   `sys_clk` cycles after both have locked. During that time clock B already runs, so
   the reset is seen on several of its edges.
2. It releases the reset through a two-stage synchroniser clocked by `clk_b`.

Every retune resets the DCMs, so it also resets the counter and the packer. A
partly filled output word is dropped. The first beat after any reset only starts a
measurement, and the interval before it produces no output.

All outputs of the random side are in the `rng_clk` domain. A consumer in another
clock domain needs its own crossing, for example an asynchronous FIFO.

`en` low holds both DCMs in reset. This stops both clocks and therefore all random
output.

## Top-level interface (`tunable_bfd_trng`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk_in` | in | 1 | DCM reference clock |
| `sys_clk` | in | 1 | control and DRP clock |
| `rst` | in | 1 | asynchronous reset, active high |
| `en` | in | 1 | run the DCMs |
| `drp_req` | in | 1 | start a retune |
| `busy`, `done`, `drp_err` | out | 1 | retune in progress / finished / timed out |
| `cfg_load`, `cfg_idx_a`, `cfg_idx_b` | in | 1, 5, 5 | load table indices |
| `cfg_step` | in | 1 | advance both indices |
| `cfg_err`, `idx_a`, `idx_b` | out | 1, 5, 5 | refused load, current indices |
| `locked_a`, `locked_b` | out | 1 | DCM lock status |
| `rng_clk` | out | 1 | clock of the random outputs |
| `nbits` | in | 2 | LSBs kept per count (0 acts as 1) |
| `beat` | out | 1 | beat flip-flop output |
| `count_max`, `count_valid` | out | 12, 1 | measured beat interval |
| `rnd_word`, `rnd_valid` | out | 32, 1 | random word |

The top's parameters are:

- `CLKIN_PERIOD_PS` (20000) and `JITTER_PS` (50). These set the clock model.
- `LOCK_CYCLES` (16).
- `INIT_IDX_A` (18) and `INIT_IDX_B` (22). These are the power-up settings.
- `COUNT_W` (12), `MAX_BITS` (3) and `OUT_W` (32).
- `RST_HOLD` (8) and `TIMEOUT` (4096).

## Files

| file | content |
|------|---------|
| `rtl/trng_pkg.sv` | widths, DRP address, `md_t`, DRP request/response structs, the `(M, D)` table function |
| `rtl/tunable_bfd_trng.sv` | top level, clock-B reset release |
| `rtl/dcm_model.sv` | **behavioural** DCM model (not synthesizable) |
| `rtl/beat_dff.sv` | beat flip-flop |
| `rtl/beat_counter.sv` | beat-interval counter |
| `rtl/post_processing_unit.sv` | LSB extraction and word packing |
| `rtl/md_bram.sv` | table of safe `(M, D)` settings |
| `rtl/address_generator.sv` | table-index registers and address mux |
| `rtl/dcm_drp_controller.sv` | retune sequencer |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_tuning_sweep.sv` | mean and spread of the count over several table settings |

### The DCM model

`dcm_model` has the port names of the vendor primitive (`CLKIN`, `RST`, `CLKFX`,
`LOCKED`, `DCLK`, `DEN`, `DWE`, `DADDR`, `DI`, `DO`, `DRDY`). It works as follows:

- It generates `CLKFX` with nominal period `CLKIN_PERIOD_PS * D / M`.
- It adds independent uniform jitter of ±`JITTER_PS` to every half period. This gives
  a random-walk phase, like a real PLL or DLL.
- It raises `LOCKED` `LOCK_CYCLES` reference edges after reset.
- It accepts `{M-1, D-1}` at DRP address `7'h50`. The new values take effect at the
  next reset release.
- An out-of-range `M` (outside 2..32) or `D` (outside 1..32) never locks.

The register address, the encoding and the timings are this model's choices. On a
real FPGA, replace `dcm_model` with the vendor's clock-manager primitive. Check the
DRP register map in the vendor's documentation and adapt `md_to_drp` and
`DRP_MD_ADDR` in `trng_pkg`. The jitter figure decides how random the simulated
counts are. It is not a measured property of any device.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/trng_pkg.sv tb/tb_tunable_bfd_trng.sv \
          --top tb_tunable_bfd_trng -Mdir obj && ./obj/Vtb_tunable_bfd_trng
```

Replace the testbench name to run another one. The tools find the modules in `rtl/`
through `-Irtl`.

`tb_tunable_bfd_trng` runs the top at its default parameters, about 0.9 ms of
simulated time. It checks each of these:

- The mean count against `TA / (TA - TB)`, and that the counts vary.
- Every output word, bit for bit, against the LSBs of the observed counts, for
  `nbits` 1, 2 and 3.
- Two retunes through `cfg_load` and `cfg_step`.
- The refusal of an out-of-range index.
- A retune with `en` low, which times out with `drp_err`.
- Recovery after that timeout.

It counts each of these mechanisms and fails if one never happened.

`tb_tuning_sweep` loads four table settings, from a 25 % gap down to the table's
closest pair. These give nominal counts of 7, 21, 121 and 523. It prints the mean
count and its relative standard deviation for each setting. It checks the mean
against the nominal frequencies wherever drift dominates jitter. It also checks that
the spread of the count grows as the gap shrinks. A typical run gives relative
standard deviations of 1.8 %, 2.1 %, 3.0 % and 38 %.

## Where this design departs from, or goes beyond, the published description

- **Controller in hardware.** The published system ran the DRP controller as software
  on a soft processor. Here it is a state machine. The processor's other roles are the
  ports `drp_req`, `cfg_*`, `nbits` and `rnd_*`: choosing settings, requesting
  retunes and collecting the random words. The processor itself is not included.
- **Table contents.** The 23 stored pairs are the DCM-1 `(M, D)` column of the
  published tuning table, in order, with its repeated entries. One 16-bit word holds
  one pair, which matches the stated 46 bytes for 23 settings. Both DCMs therefore
  choose from the same list. The table's per-row pairing of DCM-1 and DCM-2 values is
  not kept, and its frequency and count columns are not used.
- **Own choices** where the description gives no detail: the address generator's
  behaviour (index registers, range check, step mode), the retune sequence and
  timeout, the `{M-1, D-1}` encoding, the counter width (12 bits, close to the 25
  registers reported for the counter; this build uses 27), the edge detection and
  first-interval suppression, the 32-bit word packing, the reset scheme, the 50 MHz
  reference and the 50 ps jitter of the model.
- **Not included.**
  - The "error-correction" ability mentioned in passing. It is not described.
  - Any bias-removal or health-test logic.
  - The ring-oscillator version of the generator, which is only a baseline for
    comparison.

## Size

After generic synthesis at the defaults, without the two DCM models:

- Control side: 65 flip-flops in the controller, 11 in the address generator, and the
  32 x 16 table memory.
- Random side: 1 flip-flop for the beat detector, 27 for the counter and 74 for the
  post-processing unit.
