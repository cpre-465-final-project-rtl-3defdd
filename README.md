# Moving average and moving standard deviation of a temperature stream

This engine takes readings from a temperature sensor one at a time. For each
reading it reports one statistic of the last 14 readings:

* `MODE = 0`: their mean, rounded to the nearest integer.
* `MODE = 1`: their standard deviation.

It was designed for remote monitoring of plant temperature. An IoT mote
delivers the readings, and a display shows the results. The sensor, the mote
and the display are outside this RTL. They connect to the `TN`/`SAMPLE`
inputs and to the `AVG_SD`/`DONE` outputs.

The design rests on two ideas:

1. **Nothing is re-added over the window.** The engine keeps a running sum
   and a running sum of squares. Each new reading is added to them, and the
   reading that leaves the 14-deep window is subtracted.
2. **The square root is never computed outright.** The engine holds an
   estimate of the standard deviation. Each reading taken in SD mode improves
   that estimate by one Babylonian (Newton) step. The step is arranged to need
   a single division. Two multipliers and that one divider are shared, in
   turn, across a fixed 4-clock schedule.

## The arithmetic

With `n` readings in the window (`n <= 14`), let `S` be their sum and `Q` the
sum of their squares. Then:

```
mean  = (S + floor(n/2)) / n             integer division: a fraction of .5 or more rounds up
var   = Q/n - (S/n)^2 = (n*Q - S^2) / n^2      population variance (divides by n, not n-1)
```

The Babylonian step for `sqrt(var)`, starting from the current estimate `s`,
is `s' = (s + var/s) / 2`. Over a common denominator this becomes:

```
        s^2*n^2 + (n*Q - S^2) + s*n^2
  s' = -------------------------------        (integer division)
                 2*s*n^2
```

The `+ s*n^2` term is half the divisor, so the quotient is rounded to the
nearest integer. `n*Q - S^2` is never negative. A rounded step never returns
less than `(s+1)/2`, so the estimate never reaches zero and the divisor stays
non-zero.

### What "standard deviation" means on the output

Each SD-mode reading runs **one** step, starting from the estimate left by
the previous SD-mode reading. After reset the estimate is 1024. Mean-mode
readings do not advance it. The value on `AVG_SD` is therefore the current
estimate. It is not the exact square root after every reading.

* **Steady spread.** When the spread of the window stays the same, the
  estimate settles within ±1 of the true value. From the starting value of
  1024 this takes about 3 steps for spreads in the high hundreds or more. It
  takes up to about 9 steps for spreads near 1.
* **Sudden jump.** If the spread jumps while the estimate is small, one step
  can overshoot far above the true value. For example, readings that were
  constant and are then joined by a 4095 produce such a jump. The estimate is
  16 bits wide and saturates at 65535 in that case. From there it halves on
  each step until it converges again.
* **Output limit.** The output is 12 bits wide and saturates at 4095. A
  settled standard deviation of 12-bit readings never exceeds 2048.

## The schedule

A reading is taken at the rising clock edge where `SAMPLE = 1` and
`READY = 1`. `MODE` is taken at the same edge. The sequencer (`noaa_ctrl`)
then steps through the states below. It selects the operands of the two
shared multipliers (`mult_share`) and of the shared divider (`div_unit`):

| edge | state | work | multiplier 1 | multiplier 2 |
|---|---|---|---|---|
| 1 | IDLE | push the reading into the window; `S += TN - oldest`; capture both squares | `TN*TN` | `oldest*oldest` |
| 2 | C2 | `Q += TN^2 - oldest^2`. Mean mode: divide, load `AVG_SD`, return to IDLE. SD mode: capture both products | `S*S` | `s*(n*n)` |
| 3 | C3 | capture both products (SD only) | `s*(s*n^2)` | `n*Q` |
| 4 | C4 | divide; the result is the new estimate `s` and the value loaded into `AVG_SD` (SD only) | – | – |

`oldest` is the reading that this push discards. While the window is not yet
full, `oldest` is 0, because all slots reset to zero. The sums are therefore
exact from the first reading on, with no special case. A separate small
multiplier forms `n*n`.

`DONE` is a registered pulse one clock long. It is high in the clock after
edge 2 (mean) or edge 4 (SD). In that same clock the engine is back in IDLE,
so the next reading can be offered right away. This gives one reading every
2 clocks in mean mode and every 4 clocks in SD mode. A `SAMPLE` that arrives
while `READY` is low is ignored. `TN` and `MODE` need to be valid only at the
taking edge.

## Interface (`noaa_module`)

| port | dir | width | meaning |
|---|---|---|---|
| `CLK` | in | 1 | clock |
| `RESET` | in | 1 | asynchronous, active high; forgets all readings and resets the estimate to 1024 |
| `SAMPLE` | in | 1 | a reading is on `TN` |
| `MODE` | in | 1 | 0: mean, 1: standard deviation |
| `TN` | in | 12 | reading, unsigned |
| `DONE` | out | 1 | one-clock pulse: `AVG_SD` holds a new result |
| `READY` | out | 1 | idle; `SAMPLE` will be taken at the next edge |
| `AVG_SD` | out | 12 | result, held until the next one |

The sizes live in `noaa_pkg`:

* window depth `DEPTH = 14` and reading width `TW = 12`;
* sum 16 bits, sum of squares 32 bits, estimate 16 bits;
* multiplier products 40 bits, divider numerator 42 bits.

The widths are chosen so that no value can overflow for 12-bit readings. If
you change `DEPTH` or `TW`, recheck them.

## Blocks

| file | role |
|---|---|
| `rtl/noaa_pkg.sv` | sizes, multiplier-select and state enums |
| `rtl/noaa_module.sv` | top: wiring and the saturating result register |
| `rtl/noaa_ctrl.sv` | sequencer FSM, `DONE`, `READY`; assertions on the `DONE` pulse and the SD-only states |
| `rtl/window_fifo.sv` | 14 × 12-bit shift register and count `n` |
| `rtl/running_sums.sv` | incremental `S` and `Q` |
| `rtl/mult_share.sv` | two shared multipliers with operand muxes, plus `n*n` |
| `rtl/div_unit.sv` | shared combinational divider (mean or SD step) |
| `rtl/sd_iter.sv` | estimate and partial-product registers, saturation |

## Where this design departs from the original reference design

The engine follows an earlier reference design of the same function. This
RTL keeps its formulas, its multiplier sharing, its
operand pairing, its initial estimate of 1024 and its 4-clock latency in SD
mode. It differs in the following ways:

* **`SAMPLE` is an input strobe.** The specification says a reading is taken
  when `SAMPLE` is 1. The reference code instead made `SAMPLE` an output and
  detected a new reading by a change of `TN`, which would drop two equal
  readings in a row. `READY` is an addition.
* **Clock enables instead of gated clocks.** The reference design built each
  step from a chain of delayed flags ANDed with the clock. Here there is one
  clock and a state machine. The schedule is the same.
* **Saturation.** The reference code truncates both the 16-bit estimate and
  the 12-bit output. This design saturates them. Its numerator is also wide
  enough for `s^2*n^2`, which could overflow the reference's 32-bit register
  for large estimates.
* **Variance divides by `n`.** This follows the derivation and the reference
  code. An introductory formula in the specification shows `n-1`.
* **Throughput.** The reference's summary quotes a throughput of one reading
  per half clock period. A design that does one step per clock edge cannot
  reach that rate. This one takes a reading every 2 or 4 clocks.
* **Not modelled.** The reference's synthesis results (4.2 ns clock, area,
  power) belong to its ASIC flow. They are not modelled here.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* **`tb_noaa_module`** runs the whole engine at its default sizes. A model
  in the testbench keeps its own window, recomputes the sums from scratch
  and applies the rounded step with 64-bit integers. The test checks every
  result and every latency: 2 edges for the mean, 4 for the SD. It runs:
  * a 100-reading and a 30-reading random stream;
  * a window fill followed by evictions;
  * mode switches;
  * readings offered while busy;
  * a spread jump that saturates the estimate and the output;
  * a reset in mid-stream;
  * a periodic input. On that input the estimate must end within 1 of the
    true standard deviation, computed in floating point.

  Each of these mechanisms is counted. One that never happened counts as a
  failure.
* **Unit testbenches**
  * `tb_window_fifo`: against a queue model.
  * `tb_running_sums`: against sums recomputed over a model window.
  * `tb_mult_share`: all select codes.
  * `tb_div_unit`: rounding of both quotients checked in real arithmetic.
  * `tb_sd_iter`: loads, reset values and saturation.
  * `tb_noaa_ctrl`: the control outputs clock by clock.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/noaa_pkg.sv tb/tb_noaa_module.sv --top-module tb_noaa_module -o sim
./obj_dir/sim
```

Substitute another `tb_<block>` to run a unit test. Every testbench
finishes in well under a second.
