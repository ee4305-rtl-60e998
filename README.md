# Two-input frequency detector

Two logic signals A and B come in. The question is which one has the higher
frequency, and the answer has to reach a LED. This RTL answers it in two
independent ways, and both run side by side on the same pair of inputs:

* an **asynchronous flow-table detector**. This is a clockless sequential
  circuit with three feedback variables. It raises *Fast* when B makes two
  edges without an edge of A in between, and *Slow* when A does. Two
  set-reset flip-flops hold the last answer so that it can be seen on a LED.
* a **counter-difference detector**. Each input clocks its own 3-bit counter.
  An adder forms the difference of the two counts, and a 3-to-8 decoder
  lights one of eight LEDs for that difference. The lit LED walks down when
  B is faster and walks up when A is faster. How fast it walks shows the
  size of the frequency difference.

Neither detector needs a clock of its own. Everything happens on the edges
of A and B. The original target was a small programmable logic device (CPLD)
whose test board carries 8 LEDs.

## The asynchronous detector

### The flow graph

The circuit follows the input pair AB. If both inputs have the same
frequency, AB steps through the Gray sequence 00, 01, 11, 10 (B leads) or
00, 10, 11, 01 (A leads). The circuit has ten *primitive states*, and each
one is stable for one input value:

| state | stable at AB | outputs (Fast, Slow) | meaning |
|---|---|---|---|
| 1 | 00 | 0 0 | normal cycle |
| 2 | 01 | 0 0 | normal cycle |
| 3 | 11 | 0 0 | normal cycle |
| 4 | 10 | 0 0 | normal cycle |
| 5 | 01 | 0 0 | normal cycle (A leads) |
| 6 | 10 | 0 0 | normal cycle (A leads) |
| 7 | 00 | 1 0 | B toggled twice while A = 0 |
| 8 | 11 | 1 0 | B toggled twice while A = 1 |
| 9 | 00 | 0 1 | A toggled twice while B = 0 |
| 10 | 11 | 0 1 | A toggled twice while B = 1 |

These are the transitions on one input change. A blank entry is an input
change that cannot happen from that state:

| from | AB=00 | AB=01 | AB=11 | AB=10 |
|---|---|---|---|---|
| 1 | 1 | 2 | | 6 |
| 2 | 7 | 2 | 3 | |
| 3 | | 5 | 3 | 4 |
| 4 | 1 | | 8 | 4 |
| 5 | 1 | 5 | 10 | |
| 6 | 9 | | 3 | 6 |
| 7 | 7 | 2 | | 6 |
| 8 | | 5 | 8 | 4 |
| 9 | 9 | 2 | | 6 |
| 10 | | 5 | 10 | 4 |

When B is faster, the circuit keeps falling back into 7 and 2 (A = 0) or into
8 and 4 (A = 1). Fast is high in states 7 and 8. When A is faster, it falls
into 9 and 6 or into 10 and 5, with Slow high in 9 and 10.

### State assignment

States that never need to be told apart are merged into six rows. The six
rows are coded in three variables f, g, h. The codes are chosen so that no
transition has a critical race:

| fgh | states |
|---|---|
| 000 | 9 (AB=00), 6 (AB=10) |
| 001 | 1 |
| 011 | 7 (AB=00), 2 (AB=01) |
| 100 | 8 (AB=11), 4 (AB=10) |
| 101 | 3 |
| 111 | 5 (AB=01), 10 (AB=11) |
| 010, 110 | unused |

Some transitions pass through an intermediate row. From row 000 with AB=11,
the circuit goes 000 → 001 → 101 to reach state 3. Going straight to 100 or
111 would end in state 8 or 10. From state 4 or 5 with AB=00, the circuit
goes through 101 to reach state 1 (001). That keeps it away from row 000,
which would be state 9. The package `freq_det_pkg` names the row codes.

### Equations

```
next f = A B g' h + (A + B + g + h') f
next g = A' B + B f g + A' f' g
next h = B f' + A' f + A' f' h + B f h
Fast   = B' f' g + B f h'
Slow   = A' f' h' + A f g
```

`async_fd_core` writes these equations as continuous assignments whose
outputs feed straight back into their own inputs. The feedback loop *is* the
state memory. There is no register and no clock. The output equations also
depend on f. A shorter form, `Fast = B'g + Bh'` and `Slow = A'h' + Ag`, gives
the same stable-state values. However, it pulses briefly during transitions,
and those pulses would upset the flip-flops that follow.

**Start-up.** The unused rows 010 and 110 lead into used rows for every input
value except one: row 010 with AB=00 is stable and shows Fast and Slow
together. The next input change leaves it. So the circuit needs no reset and
starts by itself after any power-up state. The input sequence 10, 11, 01, 00
brings it from any state to state 1.

**Operating rule.** The detector works in *fundamental mode*. Only one input
may change at a time, and only after the circuit has settled from the
previous change. If A and B change at the same instant, the result is not
defined. In hardware, this sets the upper limit on the input frequencies.

### Held outputs

Fast and Slow last only until the next input edge. `sr_latch` computes
`q = set | (q & ~rst)`, which is also clockless and set-dominant.
`async_freq_detector` uses two of them:

* `fof` is set by Fast and reset by Slow.
* `sof` is set by Slow and reset by Fast.

After the first indication, exactly one of them is lit. It shows which input
was faster most recently.

Lint and synthesis tools report the feedback in `async_fd_core` and
`sr_latch` as combinational loops. The loops are intended. In a simulator
they settle within the same time step, because the state assignment is free
of critical races.

## The counter-difference detector

`sync_freq_detector` has three parts:

* **`t_counter`** (two instances). Each is a 3-bit synchronous counter of
  toggle flip-flops clocked by one of the inputs. Bit 0 always toggles. Bit
  i toggles when all lower bits are 1. It counts rising edges modulo 8.
* **`diff_adder`**. It adds counter A to the bitwise inverse of counter B in
  a ripple chain of `full_adder` cells, with the carry into the first cell
  tied to 0. The result is **A − B − 1 mod 8**. Equal counts therefore light
  LED 7. Between an edge of B and the matching edge of A the count of B
  is one ahead, which gives 6; between an edge of A and the matching edge
  of B the count of A is one ahead, which gives 0. The carry out of the top cell is brought out as `co`, and it is 1
  exactly when count A > count B. Overflow is ignored on purpose: any 3-bit
  result is a valid difference.
* **`oct_demux`**. It decodes the difference one-hot onto `led[7:0]`.

With equal frequencies, the lit LED switches between 7 and 6 when B leads,
and between 7 and 0 when A leads. When B is faster, it walks 7, 6, 5, …,
wrapping round. When A is faster, it walks the
other way.

This detector reads the *direction* of the walk. If the frequency difference
is very large, the LEDs change too fast for the eye and all of them seem to
be on. The asynchronous detector's answer does not depend on the size of
the difference. Edges of A and B that
fall close together cause short glitches on the decoded outputs, because the
LED outputs are combinational from two independently clocked counters.

`rst_n` is an asynchronous, active-low clear of both counters. It is an
addition of this RTL. The counters work without it, since only their
difference is used, but a known start makes simulation deterministic.

## Top level: `freq_detector_top`

Both detectors are connected to the same inputs, as they would be when both
are fitted into one device:

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | 1 | input A (F1 of the counter detector) |
| `b` | in | 1 | input B (F2) |
| `rst_n` | in | 1 | clears the two counters; the asynchronous detector ignores it |
| `fa`, `sl` | out | 1 | Fast and Slow, direct |
| `fof`, `sof` | out | 1 | Fast and Slow, held |
| `fgh` | out | 3 | feedback variables (observation) |
| `led` | out | 2**WIDTH | one-hot LED row L0..L7 |
| `diff` | out | WIDTH | A − B − 1 mod 2**WIDTH |
| `co` | out | 1 | adder carry (count A > count B) |

The only parameter is `WIDTH`, the counter, adder and decoder width. It
defaults to 3, which gives 8 LEDs. The default is set by `CNT_WIDTH` in
`freq_det_pkg`.

Pin placement and the device's input and output buffers are not modelled.

## Choices made in this RTL

These points are decisions of this RTL and are not fixed by the original
design:

* The counters count on the rising edge, and they have the `rst_n` clear.
* The carry into the first adder cell is 0. The lit LED for equal
  frequencies with B leading (7 and 6) agrees with this.
* The LED outputs are active high.
* The `fgh`, `diff` and `co` observation ports are added.
* The held outputs `fof` and `sof` appear on the top together with `fa` and
  `sl`.
* `oct_demux`, `diff_adder`, `t_counter` and the top are parameterised in
  `WIDTH`. Only the default of 3 is the original size.

## Verification

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and contains a watchdog. The reference
models are written independently of the RTL equations:

* `tb/fd_ref_pkg.sv` walks the primitive flow table above directly. The
  asynchronous testbenches compare `fgh`, Fast and Slow with it after every
  input change.
* `tb_async_fd_core` also runs three further checks:
  * It forces each of the eight feedback codes and checks start-up.
  * It replays a 17-step reference sequence with known f, g, h and Fast and
    Slow values.
  * It runs a 4000-step random walk that must visit all ten states.
* The counter testbenches count input edges themselves. They check `diff`,
  `led` and `co` after every edge, and they check that the LED walks down
  and up.
* `tb_freq_detector_top` runs the whole design at default parameters
  through six phases:
  * equal frequencies with either input leading
  * B twice as fast as A
  * A held while B runs
  * A three times as fast as B
  * B held while A runs

  It checks both detectors and the held outputs after every change. It also
  counts each mechanism and fails if one never occurred: both normal cycles,
  each of the states 7 to 10, both flip-flops set, the LED walking in both
  directions, both counters wrapping, and both carry values.

Nothing here checks timing, because the RTL has no delays. In particular,
the highest usable input frequency is not checked.

## Simulating

The asynchronous detector is combinational feedback, so Verilator reports it
with `UNOPTFLAT` warnings. `-Wno-fatal` keeps those from stopping the build.
For example, to simulate the top:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  --top-module tb_freq_detector_top \
  rtl/freq_det_pkg.sv tb/fd_ref_pkg.sv tb/tb_freq_detector_top.sv
./obj_dir/Vtb_freq_detector_top
```

The two packages are named first, and Verilator finds the modules in
`rtl/` by their file names. Any other testbench builds the same way with its
own `--top-module` and file name. Each one runs in well under a second.

When you drive the asynchronous detector yourself, change only one input at
a time, and let time advance between changes.
