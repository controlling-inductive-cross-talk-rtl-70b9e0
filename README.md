# Cross-talk and power avoiding CODEC for wire-bonded off-chip buses

Wire-bonded packages put nanohenries of inductance in every signal and
supply pin. When many pins switch at once the supply pins bounce, and the
mutual inductance between neighbouring pins makes static pins glitch and
slows the edges of switching pins. The usual remedy, a better package, is
expensive. The idea implemented here is to leave the package alone and
restrict what the bus is allowed to do: between two bus cycles only
transitions that keep bounce, glitch, edge degradation and power below
chosen limits are used. Fewer transitions means fewer bits per cycle, but
because the bus no longer suffers the worst-case patterns it can be clocked
much faster, and the net throughput goes up.

This repository holds synthesizable SystemVerilog for such a code: a
table-based ("memory-based") encoder for the transmitting chip, the matching
decoder for the receiving chip, a combinational checker for the coding
constraints, and a link top that puts them together. All tables are computed
at elaboration from a small electrical model, so changing the bus size, the
coupling reach or the limits regenerates the code. The method follows the
ASP-DAC 2006 paper "Controlling Inductive Cross-talk and Power in Off-chip
Buses using CODECs"; the RTL, the choice of numbers and the details listed
under "Design choices and departures" are this implementation's.

## Bus segments and transitions

The bus is cut into identical segments of `n` pins: a VDD pin, `n-2` signal
pins, a VSS pin, in that order, repeated across the bus.

```
 segment j-1          segment j            segment j+1
 VDD S S S VSS | VDD  S   S   S  VSS | VDD S S S VSS
               |  v0  v1  v2  v3  v4 |
```

From one bus cycle to the next every signal pin `i` undergoes a transition
`v_i`: `+1` rising, `-1` falling, `0` static. A rising or falling pin
induces a voltage `k_q * v` on the pin `q` positions away (`k_1` on the
nearest neighbour, `k_2` on the next, `k_3` on the third), up to a reach
`p`. Positions past the segment's edge belong to the adjacent segments.
Supply pins never switch, so with `p <= 2` a segment only sees its own
signal pins and the supply pins on either side, and each segment can be
coded on its own. With `p = 3` the outer signal pins also see one signal pin
of each adjacent segment; that pin is driven by another segment's encoder,
so its transition is unknown and is assumed to be the worst possible (its
`k_3` is added to the coupling the bound must tolerate). The example bus used
throughout is `n = 7` (five signal pins), `p = 2`.

## The coding constraints

For a segment with `NS = n-2` signal pins there are `3n-3` constraints,
numbered as follows (this numbering is what the rule checker reports):

| rule | pin / scope | condition that must hold |
|---|---|---|
| 1 | VDD pin | `(z/2) * #rising pins <= P_bnc` |
| 3i-1 | signal pin i rising | `sum k_q * v(neighbours) >= P_1` |
| 3i | signal pin i falling | `sum k_q * v(neighbours) <= P_-1` |
| 3i+1 | signal pin i static | `-P_0 <= sum k_q * v(neighbours) <= P_0` |
| 3NS+2 | VSS pin | `(z/2) * #falling pins <= P_bnc` |
| 3NS+3 | segment | `#switching pins <= P_power` |

`z` is the `L di/dt` voltage of one pin; a signal pin returns its current
through two supply pins, hence `z/2`. All voltages are integers in permille
of VDD. Two styles are provided:

| style | P_0, P_bnc | P_1 / P_-1 |
|---|---|---|
| aggressive | 50 (5 % of VDD) | -50 / +50 |
| non-aggressive | 125 (12.5 % of VDD) | -125 / +125 |

with `k_1 = 50`, `k_2 = 25`, `k_3 = 12`, `z = 100`. Power encoding adds
`P_power = floor(POWER_PCT/100 * NS)`, e.g. 20 % of five pins = one
switching pin per cycle.

With these numbers the aggressive style means, in plain words: at most one
pin rises and at most one falls per cycle, and a static pin may have one
switching nearest neighbour but not two of the same direction. For three
signal pins it removes exactly these 14 of the 27 transitions:
`011 0-1-1 101 110 111 11-1 1-11 1-1-1 -10-1 -111 -11-1 -1-10 -1-11 -1-1-1`.
The non-aggressive style allows two pins per direction and, for three
signal pins, removes only `111` and `-1-1-1`.

## From legal transitions to a code

The legal transitions form a directed graph over the `2^NS` pin states
(every state has a self-edge: a bus that does not switch breaks no rule).
An `m`-bit word can be sent every cycle if there is a set `S` of states such
that every state in `S` has at least `2^m` legal edges into `S`, self-edge
included, and `|S| >= 2^m`. Then, whatever state the bus is in, there are
enough distinct legal next states to name every word, and the bus never
leaves `S`.

`xtalk_pkg::closed_set(cfg, m)` finds the largest such set by a fixpoint:
start from all states and repeatedly drop a state with fewer than `2^m`
edges into what is left. `eff_width(cfg)` tries `m = NS, NS-1, ...` and
returns the first that leaves a large enough set. For the aggressive
example bus the all-zero and all-one states are dropped (from `00000` only
six transitions are legal) and the remaining 30 states carry `m = 3` bits.

The code itself: word `d`, sent while the pins are in state `s`, moves them
to the `d`-th legal successor of `s` inside `S`, counting states upwards.
The decoder inverts this with the state it saw in the previous cycle.

Effective widths produced by the model (`p = 2`):

| signal pins | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| aggressive m | 1 | 1 | 2 | 2 | 3 | 3 | 4 | 4 |
| non-aggressive m | 1 | 2 | 2 | 3 | 4 | 5 | 5 | 6 |
| aggressive, power 20 % (5 pins) | | | | | 2 | | | |

The published overhead curves, overhead = (physical - effective) /
physical, agree everywhere except non-aggressive with six signal pins, where
the curve shows 33 % (m = 4) and this model gives 17 % (m = 5).
With `p = 3` the non-aggressive example bus still carries `m = 4`.

## The hardware

### `xtalk_encoder`

A register holding the signal-pin state and a constant table
`enc_rom[state][word]` of next states. Each clock: `sig_out <=
enc_rom[sig_out][data_in]`. The word appears on the pins one cycle after it
is sampled. Synchronous active-low reset puts the pins in the lowest state
of `S` (`00001` for the aggressive example bus, `00000` non-aggressive).
Every cycle carries a word; there is no valid signal.

### `xtalk_decoder`

Remembers the previous received state and looks up
`dec_rom[previous][current]`, which holds the word and a valid bit. Output
`data_out` and `code_err` are registered, one cycle after the pin state.
`code_err` is raised for any pair that is not a codeword transition (a pin
error or the two ends out of step, or a previous state outside `S`);
decoding simply continues from the received state. Reset must be applied to
both ends together.

Table sizes grow as `2^(2*NS)` in the decoder, so the generators are
limited to `NS <= 8` (`xtalk_pkg::MAX_NS`). For the example bus the encoder
table is 32 x 8 entries of 5 bits and the decoder table 32 x 32 entries of
4 bits.

### `xtalk_rule_check`

Combinational evaluation of all `3n-3` rules for a pair of consecutive pin
states; `viol[r-1]` is set when rule `r` breaks, `legal_o` when none does.
The encoder tables are built from the same equations in `xtalk_pkg`
(`rule_viol`); the module form is used in the link as a monitor.

### `xtalk_link` (top)

`SEGMENTS` independent segments. Per segment, the transmitting side has an
encoder driving `tx_sig`; the receiving side takes `rx_sig` into a decoder
and into a rule checker fed with the previous received state, reporting
`rx_viol`. The supply pins, pads, package and board wiring are analog and
outside the RTL: connect `tx_sig` to `rx_sig` yourself. With a straight
connection a word on `tx_data` at clock edge k is on `rx_data` after edge
k+2; one word per segment per cycle.

| parameter | default | meaning |
|---|---|---|
| `SEGMENTS` | 1 | number of segments |
| `N_PINS` | 7 | pins per segment, n (3..10) |
| `REACH` | 2 | coupling reach p (1..3) |
| `STYLE` | `STYLE_AGGRESSIVE` | or `STYLE_NON_AGGRESSIVE` |
| `POWER_PCT` | 100 | power bound, percent of signal pins |

The word width `M` is derived (3 at the defaults); read it as
`xtalk_pkg::eff_width(xtalk_pkg::make_cfg(N_PINS, REACH, STYLE, POWER_PCT))`.

## What the code buys

Published SPICE and sweep results for the five-signal-pin bus (not
reproduced here, they need the analog package model): the uncoded bus
failed above 8 MA/s per pin (133 Mb/s), the coded buses survived 19.9 and
37 MA/s (333 and 667 Mb/s per pin), so even after giving up bus width the
total throughput doubled from 667 to about 1332 Mb/s. Note that the
published summary table gives effective widths 4 (aggressive) and 2
(non-aggressive) for that sweep, which the power-bounded configurations do
not reproduce: this model gives 2 for both styles with a 20 % power bound,
and 3 / 4 without one.

## Design choices and departures

* `k_1`, `k_2`, `k_3` and `z` are not specified by the method; the values above
  were chosen so that the aggressive elimination list and the overhead
  curves are reproduced.
* The edge-degradation bounds are one-sided, as in the equations: a
  neighbour may hinder a switching pin by at most the threshold. A
  published rule table also attributes edge-rule violations to `111` and
  `-1-1-1`; those transitions are removed anyway by the supply-bounce rules,
  so the set of legal transitions is the same.
* Word-to-codeword order, reset state, registers at the outputs, the
  `code_err` flag and the rule monitor are this design's choices.
* Coupling reach is limited to 3. For `p = 3` the unknown signal pins of
  the adjacent segments are taken at their worst, which is safe but may
  give up code space that a joint design of neighbouring segments would
  keep.
* Codes are built for up to 8 signal pins per segment; the published ASIC
  and FPGA figures go up to 8-bit words, which would need larger segments.

## Files

* `rtl/xtalk_pkg.sv` - configuration type, constraint model, closed-set
  search, table generators
* `rtl/xtalk_encoder.sv`, `rtl/xtalk_decoder.sv` - the CODEC
* `rtl/xtalk_rule_check.sv` - constraint checker
* `rtl/xtalk_link.sv` - top level
* `tb/tb_xtalk_ref_pkg.sv` - independent reference model for the tests
* `tb/tb_xtalk_rule_check.sv` - the 3-pin elimination list and
  exhaustive 5-pin comparisons with the reference model (p = 2 with a power
  bound, and p = 3)
* `tb/tb_xtalk_encoder.sv`, `tb/tb_xtalk_decoder.sv` - codebook, legality,
  reset and error detection
* `tb/tb_xtalk_overhead.sv` - effective width for 1..8 signal pins
* `tb/tb_link_harness.sv`, `tb/tb_xtalk_link.sv` - end to end, four
  configurations (including `p = 3`), wire faults, mid-stream reset
* `tb/tb_xtalk_link_full.sv` - the top at its default parameters

## Simulating

Every testbench prints `TB_RESULT checks=N failures=F` and ends. For
example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_xtalk_link \
  -y rtl -y tb +libext+.sv rtl/xtalk_pkg.sv tb/tb_xtalk_ref_pkg.sv \
  tb/tb_xtalk_link.sv
./obj_dir/Vtb_xtalk_link
```

Replace the top module and file for the other testbenches. Lint a module
with `verilator --lint-only -Wall -y rtl rtl/xtalk_pkg.sv rtl/<module>.sv`.
Elaboration computes the tables; at the defaults this takes well under a
second, at 8 signal pins the decoder table (65536 entries) takes noticeably
longer, and tools with a bounded constant-evaluation step count may need
that bound raised for segments larger than the example bus.

To try another bus, change `N_PINS`, `STYLE` or `POWER_PCT` on
`xtalk_link`, or build a configuration with `xtalk_pkg::make_cfg` and pass
it as `CFG` to the encoder, decoder and checker. To change the electrical
model, edit `make_cfg`; the testbenches' reference model in
`tb/tb_xtalk_ref_pkg.sv` holds the same numbers and must follow.
