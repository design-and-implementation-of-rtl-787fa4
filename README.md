# Three-user frequency-hopping spread-spectrum transmitter (2FSK over DDFS)

This is a frequency-hopping spread-spectrum (FHSS) transmitter for three
users sharing eight carrier frequencies, 100 kHz to 800 kHz in 100 kHz steps.
Every user sends the same kind of 2FSK signal. Each user hops through its own
fixed sequence of the eight carriers, and all users hop at the same instants.
In any hop slot, each user sits on its own carrier. Everything is made from
one 50 MHz clock and 32-bit phase accumulators:

* the data signal,
* the hop clock,
* each user's carrier.

A carrier changes frequency by loading a new 32-bit frequency code into a
direct digital frequency synthesizer (DDFS). The phase stays continuous
across the change.

The design follows a published FPGA implementation on a Cyclone II board
(DE-1) that drove an 8-bit DAC. Where that description was incomplete or
inconsistent, the choices made here are listed under "Departures and
choices".

## Frequency codes: the one idea behind every block

A phase accumulator of n = 32 bits that adds a code L on every clock wraps
F_CLK * L / 2^32 times per second. With F_CLK = 50 MHz, one code step is
0.0116 Hz. The design uses this one mechanism for every frequency:

| signal | frequency | code L | where |
|---|---|---|---|
| data square wave | 4 Hz | 344 | `fhss_pkg::L_DATA` |
| slow hop clock | 1 Hz | 86 | `L_H_SLOW` |
| fast hop clock | 16 Hz | 1374 | `L_H_FAST` |
| carrier Fk, k = 1..8 | k x 100 kHz | k x 8589935 | `freq_code(k)` |
| 2FSK deviation | 10 kHz | 858993 | `L_DF` |

For the data and hop clocks, the accumulator's MSB is the square wave. Its
wrap (carry out) is a one-clock tick. For a carrier, the top 13 accumulator
bits address a sine table.

The carrier codes are the rounded 100 kHz code multiplied by k, not each
frequency rounded on its own. That is why 200 kHz is 17179870 and not
17179869.

## Slow and fast hopping

The symbol time is one period of the data square wave, T_S = 0.25 s.

* **Slow hopping (1 Hz).** Each hop lasts T_H = 1 s, four data periods.
  344 is exactly 4 x 86, so hop boundaries always fall on data-period
  boundaries.
* **Fast hopping (16 Hz).** Each hop lasts T_H = 62.5 ms, so one data period
  spans about four hops. 1374 is not exactly 4 x 344, so the fast hops
  drift slowly against the data wave (about 0.15 % of a period per data period). This follows
  from the design's rounded codes.

Both hop clocks run all the time. The `mode` input only selects which tick
advances the hopping. A mode change therefore takes effect at the next tick
of the newly selected clock and never produces an extra hop.

After reset all accumulators start at phase 0, so data and hop clocks begin
aligned. The first hop comes one full hop period after reset: slot T1 lasts
a whole hop.

## Hopping tables

A 3-bit counter (`hop_counter`) holds the current slot T1..T8. It addresses
three 8 x 32-bit hopping memories (`hop_rom`), one per user, which hold
frequency codes. The sequences, in 100 kHz units (Fk = k x 100 kHz):

| slot | T1 | T2 | T3 | T4 | T5 | T6 | T7 | T8 |
|---|---|---|---|---|---|---|---|---|
| user 1 | F5 | F1 | F8 | F4 | F6 | F2 | F3 | F7 |
| user 2 | F2 | F4 | F7 | F1 | F3 | F8 | F6 | F5 |
| user 3 | F7 | F2 | F5 | F8 | F1 | F6 | F2 | F4 |

User 3 uses F2 twice and never uses F3. This is how the original hopping
algorithm is specified.

The tables are built at elaboration by `fhss_pkg::user_hop_table()` from
the `user_freq()` function. To load a different hopping algorithm, change
that function or pass another `TABLE` parameter to `hop_rom` / `fhss_user`.

The `hop_last` input sets how many frequencies are used. The counter wraps
to T1 after slot `hop_last`: 7 uses all eight, 4 uses T1..T5. If `hop_last`
is lowered below the current slot, the next hop goes back to T1.

## 2FSK on a DDFS

Each user has an `fhss_user`: its `hop_rom` feeds an `fsk_modulator`. For
data 1 the modulator adds L_DF to the carrier code, and for data 0 it adds
nothing, so a 100 kHz carrier gives 100 kHz for a 0 and 110 kHz for a 1. The
sum is registered and drives a `ddfs`.

The `ddfs` has a 32-bit accumulator, and its top 13 bits address
`sine_rom`. `sine_rom` is a 2^13 x 8-bit table holding
round(128 + 127 sin(2 pi i / 8192)), offset binary, values 1..255. The
table is computed at initialisation with integer fixed-point arithmetic
(Taylor series), so no data file is involved.

All three users get the same data square wave. `signal_combiner` outputs
the floor of the mean of the three samples as one 8-bit code for an external
DAC. The spectrum of that signal shows the three current carriers at once.
The per-user samples are also available as outputs.

## Top level and timing

`fhss_top` ports:

| port | dir | meaning |
|---|---|---|
| `clk` | in | 50 MHz clock |
| `rst_n` | in | asynchronous, active low; all phases 0, slot T1 |
| `mode` | in | `HOP_SLOW` (0) or `HOP_FAST` (1) |
| `hop_last` | in | last slot used, 0..7 |
| `data_bit` | out | data square wave |
| `hop_tick` | out | one-clock hop pulse |
| `slot` | out | current slot, 0 = T1 |
| `carrier[3]` | out | each user's carrier code |
| `code[3]` | out | carrier code + 2FSK deviation, as applied to the DDFS |
| `sample[3]` | out | each user's 8-bit sample |
| `dac` | out | mixed 8-bit DAC code |

Pipeline, in clock edges:

1. `hop_tick` is high for one clock. On the next edge `slot` changes, and
   `carrier` follows combinationally.
2. One edge later, `code` takes the new carrier plus the data bit's
   deviation.
3. One edge after that, the DDFS phase starts advancing by the new code.
4. One more edge later, `sample` reflects the new phase.
5. `dac` follows `sample` by one clock.

A hop therefore reaches the DAC 5 clocks (100 ns) after `hop_tick`,
negligible against a hop period.

Parameters of `fhss_top`: `DATA_CODE`, `SLOW_CODE`, `FAST_CODE`, `DF_CODE`
and `SINE_AW`. Their defaults are the values above. Raising the three clock
codes speeds up simulation without changing any structure.

## Files

* `rtl/fhss_pkg.sv`: widths, codes, `hop_mode_e`, and the hopping tables.
* `rtl/square_gen.sv`: accumulator square wave and tick.
* `rtl/clock_signals.sv`: data, slow and fast clocks, and the mode select.
* `rtl/hop_counter.sv`, `rtl/hop_rom.sv`: slot counter and hopping memory.
* `rtl/sine_rom.sv`, `rtl/ddfs.sv`, `rtl/fsk_modulator.sv`: the 2FSK DDFS.
* `rtl/fhss_user.sv`: one user's hopping memory plus its modulator.
* `rtl/signal_combiner.sv`: the three-user mix.
* `rtl/fhss_top.sv`: the transmitter.
* `tb/<module>_tb.sv`: a self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/fhss_ref_pkg.sv`: reference tables and a floating-point sine used by
  the testbenches.
* `tb/fhss_top_checker.sv`: a cycle-accurate model of the whole transmitter
  that compares every output on every clock. It also counts slow hops, fast
  hops, full and shortened hop cycles, mode switches, and hops during data
  1 and data 0. Each hop interval must equal 2^32 / code clocks.
* `tb/fhss_top_tb.sv`: end-to-end test at raised clock rates (a data period
  is 4096 clocks, with the same 4:1 ratios). It runs a full slow cycle,
  fast hopping, a five-frequency sequence and both mode switches, in about
  200k clocks.
* `tb/fsk_demo_tb.sv`: the stand-alone 2FSK demonstration at real rates: a
  1 kHz data wave keys a 100 kHz carrier, and each half period must show
  100 kHz or 110 kHz.
* `tb/fhss_top_full_tb.sv`: `fhss_top` with every parameter at its default.
  It runs one complete fast cycle (8 hops, 25 M clocks), switches to slow
  hopping and runs one complete slow cycle (8 hops, 400 M clocks). It takes
  a few minutes in Verilator.

Simulating one testbench with Verilator:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/fhss_pkg.sv tb/fhss_ref_pkg.sv tb/fhss_top_tb.sv --top fhss_top_tb
    ./obj_dir/Vfhss_top_tb

Linting the design: `verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl rtl/fhss_pkg.sv rtl/fhss_top.sv`.

The only lint warnings left are unused package constants and unused
signals: the data-clock tick and the hop square wave inside the top, the
combiner's full-width sum, and the DDFS phase inside `fsk_modulator`.

## Departures and choices

Taken from the published design: the 50 MHz clock, the 32-bit accumulators,
every code in the table above, the three hopping sequences, the 8 x 32-bit
hopping memories, the binary slot counter, the 10 kHz deviation with a 1
mapped to the higher frequency, the 8-bit output, and the slow/fast
selection.

Inconsistencies in the original, and how this design resolves them:

* **300 kHz code.** The carrier table gives 27569805 for 300 kHz. This
  design uses 3 x 8589935 = 25769805, which fits the formula and the other
  seven entries.
* **Users 2 and 3 codes.** Their code tables repeat user 1's codes slot by
  slot, which contradicts their own frequency columns. This design follows
  the frequencies, which also agree with the summary table and the measured
  spectra for T1..T3.
* **Frequency dividers.** The block list speaks of frequency dividers for
  the data and hop clocks, while the equations define them as accumulators
  with codes 344 / 86 / 1374. This design builds the accumulators.
* **Slot T4.** An introductory example lists different frequencies for T4;
  this design uses the hopping tables.

This design's own choices:

* The asynchronous active-low reset.
* Registered ticks.
* A combinational read of the 8-word hopping memory.
* A synchronous sine table, 2^13 words deep. The stated ROM size, "13 KB",
  is read as 13 address bits.
* The sine amplitude and rounding.
* Phase truncation to 13 bits.
* One data signal shared by all users.
* `hop_last` as the way to set the number of frequencies.
* Mixing the three users by averaging.

Not built:

* BPSK and 4FSK/MFSK modulation, which are mentioned only as extensions.
* The board's oscillator and the 8-bit DAC: `clk` comes in as a port and
  the DAC code goes out.
* Receiver and de-spreading; none is described.

## Verification status

Every module's testbench compares against values computed independently:

* the carrier frequencies in kHz from the tables,
* codes as kHz / 100 x 8589935,
* samples from a floating-point sine,
* reference accumulators.

Each testbench also fails when its module is deliberately broken. The
end-to-end tests check every output on every clock and the exact hop
intervals. At the real 50 MHz rates, the full-size test covers one complete
fast cycle and one complete slow cycle. Nothing here has been run on an
FPGA or through timing analysis.
