# FPGA proton-irradiation test design: SEU shift-register test and PLL self-check

This design is for testing a flash FPGA (ProASIC3E class, e.g. A3PE1500) under a proton
beam. The beam upsets flip-flops and can disturb clock circuits. The design makes both
effects countable: it runs a known stimulus through the logic and counts, with triple
redundancy, what comes out. Each run has a fixed length and is read out at the end.

Two test circuits ("core sections") sit in one framework:

* **SEU core section.** A data counter feeds its LSB, a 0101... pattern, into a long chain of
  flip-flops, which is the part in the beam. Three independent counters count the ones that
  leave the chain, and a voter combines the three counts. The counter's most significant bit
  is the trigger that ends the run after a fixed number of cycles. Each upset in the chain
  changes the count.
* **PLL-test core section.** A PLL makes 80 MHz and two 320 MHz clocks (0° and 90°) from the
  40 MHz reference. A checker ("hitreg") watches it without a break. A 32-bin TDC measures
  where a looped-back copy of the 40 MHz clock rises. A TDC check compares that value with a
  value set on switches. A clock check counts edges of the PLL outputs. Errors are latched
  for LEDs and for two status lines. Three total counters and three result counters, each
  set voted, turn those lines into run statistics.

Runs follow one procedure for any core section. The host sets the clock frequency and starts
the run by enabling the PLL clock. The beam is applied for a fixed dose. The host then
disables the clock and reads the counters.

All RTL is in `rtl/`, one module per file; the testbenches and a PLL model are in `tb/`.

## Block map

```
fpga_irradiation_top
├── seu_core                       (clock: seu_clk, 40/80/160/240 MHz)
│   ├── data_counter               34-bit, LSB = data, bit 33 = trigger
│   ├── shift_register_chain       1024 flip-flops
│   ├── result_counter  x3         counts ones leaving the chain until the trigger
│   └── tvs                        bitwise 2-of-3 vote + mismatch flag
└── pll_test_core                  (clock: clk40; checker also uses clk80, clk_0, clk_90)
    ├── hitreg                     the PLL checker
    │   ├── tdc                    4 phases x 8 samples = 32 bins of 0.78 ns
    │   ├── clock_check            edge counts per high half of clk40
    │   └── tdc_check              compare, start-up counter, error latches
    ├── result_counter  x3         "total": cycles with PLL clock runs
    ├── result_counter  x3         "result": cycles with all ok
    └── tvs             x2
```

`irradiation_pkg` holds the shared constants and the 5-bit TDC value type.

## SEU core section

Everything runs on the rising edge of `seu_clk` and has an asynchronous active-low reset.

* `data_counter` counts from 0. Its LSB is the chain input and bit `TRIGGER_BIT` (default
  33) is `done`. It stops when `done` sets, so `done` stays high until reset. At 40 MHz,
  2^33 cycles take 214.7 s, which is about 3.5 minutes.
* `shift_register_chain` delays the data by `DEPTH` cycles (default 1024).
* The three `result_counter` copies count the cycles in which the chain output is 1. They
  count only while `done` is low.
* `tvs` gives `result`, the bitwise majority of the three copies. It raises `mismatch` when
  the copies differ.

**Expected count.** In a run with no upsets the LSB is 1 in cycles 2, 4, 6, ... after reset.
Each 1 reaches the counters `DEPTH` cycles later, so the final voted result is
`(2^TRIGGER_BIT − DEPTH) / 2`. With the defaults that is (8 589 934 592 − 1024)/2 =
4 294 966 784. An upset in the chain moves the count by one for each bit flipped. An upset in
one counter copy leaves `result` unchanged and sets `mismatch`.

**Run length at other frequencies.** With bit 33, a run lasts 107 s at 80 MHz, 54 s at
160 MHz and 36 s at 240 MHz. For about 3.5 minutes at every frequency, set `TRIGGER_BIT` to
34 at 80 MHz, 35 at 160 MHz and 35 or 36 at 240 MHz. The counters are `TRIGGER_BIT+1` bits
wide, so they cannot overflow.

## PLL checker (`hitreg`)

On the test board, the 40 MHz reference goes to the PLL and also, through a 3.5 cm jumper,
back into the FPGA as `hit`. If the PLL is healthy, the rising edge of `hit` always falls in
the same 0.78 ns bin of the 40 MHz period. The expected bin is set on two rotary switches:
hex D on bits 3:0 and 0 on bit 4, i.e. bin 13. The switches read inverted, so the checker
compares the TDC value with `~tdc_value`. `rst_n` of the checker is the PLL's lock output, so
the checker restarts whenever the PLL relocks.

### TDC (`tdc`): the timing is the subtle part

Sampling uses four phases of the 320 MHz clock (period 3.125 ns), 0.78 ns apart:

| phase p | sampled on      | sample register | copied to hold register on |
|---------|-----------------|-----------------|----------------------------|
| 0       | rising `clk_0`  | `shreg0`        | falling `clk40`            |
| 1       | rising `clk_90` | `shreg1`        | falling `clk40`            |
| 2       | falling `clk_0` | `shreg2`        | rising `clk80`             |
| 3       | falling `clk_90`| `shreg3`        | rising `clk80`             |

Each sample register shifts toward bit 0. It holds the last 8 samples of its phase, oldest
in bit 0, which makes one 25 ns period. `clk80` must rise together with the falling edge of
`clk40`, so all four hold registers capture the same period. On the next rising edge of
`clk40` they are interleaved into `window`: bit `4k+p` is sample `k` of phase `p`. Bit 0 is
then the oldest sample and bit 31 the newest, 0.78 ns apart.

One cycle later the encoder registers the lowest `j` at which `window[j] = 0` and
`window[j+1] = 1`. This is the bin of the first rising edge of `hit`. For `j = 31` the bit
after the window is the oldest 0° sample of the following period. If `window` has no rising
edge, the value is 0 with `valid` low.

If the PLL outputs trail a `clk40` rising edge by δ, sample `j` of a window was taken at
`12.5 ns + δ + j·0.78 ns` after some rising edge of `clk40`. A `hit` that rises `d` ns after
`clk40` therefore lands in bin `⌈((d − δ − 12.5) mod 25) / 0.78⌉ − 1`, with 0 read as 25.
`tb_tdc` checks this for all 32 bins.

Latency: the value for a period appears on `tdc` two `clk40` rising edges after that
period's samples were captured.

### Clock check (`clock_check`)

While `clk40` is high, three counters count rising edges of `clk_0`, `clk_90` (3 bits each)
and `clk80` (2 bits). While it is low, they are held at zero: `clk40` itself is their
asynchronous clear. On the falling edge of `clk40`, just before the clear, the check passes
if both 320 MHz counts are 3 or 4 and the 80 MHz count is 1. A count of 3 is allowed because
one edge can coincide with the `clk40` edge. A stopped output, or one at half or double
rate, fails the check.

### TDC check and latches (`tdc_check`)

* `tdc_ok` is updated on the falling edge of `clk40` whenever `valid` is high. It is 1 when
  the value equals the set value and 0 otherwise. Without `valid` it keeps its state.
* A 4-bit start-up counter runs from reset to 7 and stays there. This gives the TDC time to
  fill after lock.
* At count 6 the latches are initialised: TDC-ok and clock-ok set to 1, and the LED value set
  to the current TDC value.
* From count 7 on, a failed comparison clears the TDC-ok latch and copies the failing value to
  the LED value. A failed clock check clears the clock-ok latch. Both hold until the next
  reset.

`hitreg` outputs `all_ok = clock-ok AND TDC-ok` and `pllclk_runs = clock-ok`, plus
active-low LED versions of both latches. `all_ok` and `pllclk_runs` are the signals sent over
the board's RJ45 link (TX3 and TX4).

### PLL test as a framework core section (`pll_test_core`)

Both status lines are latched failures, so counting the cycles in which they are high
measures how long the PLL survived. While `run` is high:

* each of the three total counters counts the `clk40` cycles with `pllclk_runs` high;
* each of the three result counters counts the cycles with `all_ok` high.

A voter follows each set of three. A count equal to the run length means no error. A lower
count gives the cycle of the first error. The result count is never above the total count.
`pll_lock` restarts only the checker; the counters have their own reset `rst_n`.

Error timing: an error that shows in the high half of a `clk40` cycle is latched at the next
rising edge. The counters still count that edge and stop from the following one.

## Top-level interface (`fpga_irradiation_top`)

Parameters: `TRIGGER_BIT` = 33, `DEPTH` = 1024, `PLL_CNT_W` = 34.

| group | ports |
|-------|-------|
| SEU section | in: `seu_clk`, `seu_rst_n`; out: `seu_data_count`, `seu_result`, `seu_result_copies[3]`, `seu_mismatch`, `seu_done` |
| PLL clocks | in: `clk40` (reference), `clk80` (PLL GLA), `clk_0` (GLB), `clk_90` (GLC), `pll_lock` (LOCK) |
| PLL test control | in: `pll_rst_n` (counter reset), `pll_run` (counting window), `hit` (looped-back reference), `tdc_value[4:0]` (switches, inverted) |
| PLL test status | out: `all_ok`, `pllclk_runs`, `tdc`, `tdc_ok`, `valid`, `led_tdc`, `led_tdc_ok_n`, `led_pllclk_runs_n` |
| PLL test counters | out: `total_count`, `total_mismatch`, `result_count`, `result_mismatch` |

Several parts are outside the RTL and appear only as ports:

* both PLLs: the one whose frequency the host selects for `seu_clk`, and the PLL under test;
* the LVDS input and output buffers, and the gate that combines the LVDS reset and the
  board's reset switch into the PLL's power-down input;
* the host link that sets the frequency, starts runs and reads the counters;
* the board's switches, LEDs and jumper.

These are vendor macros or board parts, or their logic and protocol are not specified. RAM and
ROM core sections are named as future core sections but not defined, and are not included.

## Design choices not fixed by the original description

* What the counters count: the SEU result counters count ones leaving the chain. The PLL-test
  total and result counters count the cycles with `pllclk_runs` and with `all_ok` high.
* The SEU counters stop at the trigger, and the data counter stops with them.
* The chain length is 1024. The width of the PLL-test counters is 34 bits.
* Voting is bitwise majority. The `mismatch` outputs are an addition.
* Resets are asynchronous and active low. `pll_test_core` has a `run` input and a counter
  reset separate from the PLL lock.
* The trigger bit is a parameter, not a run-time setting.
* The PLL checker itself (TDC, clock check, TDC check, latches) follows the original logic
  exactly. Only its split into three modules is new.

## Simulation

The testbenches are self-checking. Each ends with a `TB_RESULT checks=N failures=M` line and
has a watchdog. They need verilator 5 with timing support:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/irradiation_pkg.sv tb/tb_tdc.sv --top-module tb_tdc
./obj_dir/Vtb_tdc
```

Replace `tb_tdc` with any testbench name. Registers start at random values in a two-state
simulator, so every testbench drives its resets high and then low at time zero.

| testbench | what it shows |
|-----------|---------------|
| `tb_data_counter`, `tb_shift_register_chain`, `tb_result_counter`, `tb_tvs` | the SEU building blocks against reference models, including an upset travelling down the chain |
| `tb_seu_core` | three complete runs (trigger on bit 8, 16-stage chain): clean, an upset in the chain, an upset in one counter copy |
| `tb_tdc` | all 32 bins, hit constant low and high |
| `tb_clock_check` | nominal clocks; a stopped, half-rate or double-rate output |
| `tb_tdc_check` | the latches against a reference model, with random errors |
| `tb_hitreg`, `tb_pll_test_core` | the board setup: start-up after lock, TDC error, clock error, relock, counter readout, counter upset |
| `tb_fpga_irradiation_top` | end to end (trigger on bit 10, 64-stage chain, 16-bit PLL counters): one SEU run at each of 40, 80, 160 and 240 MHz with run length, chain upset and copy upset checked; the PLL test through lock, a clean window, a TDC error and a clock error |
| `tb_top_default` | the top with all parameters at their defaults: a complete PLL-test operation, and the first 2^24 cycles of an SEU run with an upset in the chain |

The PLL testbenches use `tb/pll320_model.sv`, a behavioural PLL model with a test input that
stops one output. They scale the reference to a 25.6 ns period, so that every edge and bin
boundary falls on a whole picosecond.

**Limit.** A complete SEU run at the default size (2^33 cycles) was not simulated. It would
take about 40 minutes at the roughly 3.6 M cycles/s measured. The largest complete run
simulated has its trigger on bit 10. `tb_top_default` covers the default size for the first
2^24 cycles.
