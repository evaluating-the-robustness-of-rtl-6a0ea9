# STTL DES S-box sub-module: dual-rail logic with a data-independent clock of its own

Power-analysis attacks (DPA, CPA) recover a secret key from the way a chip's supply
current depends on the data it processes. Return-to-zero dual-rail logic hides the
*amount* of switching: each bit has two wires, and every computation raises exactly one
of them, whatever the value. It does not hide the *timing*. After place and route, the
true and false paths of a gate have different loads, so the moment a gate fires still
depends on the data. That is enough for an attack.

Secure Triple Track Logic (STTL) closes that gap with a third wire per bit, a **validity
rail**. It carries no information about the value, and it is deliberately slow. A gate
may fire only when its inputs' validity rails say so. The firing instant of every gate
is then set by a chain of data-independent validity signals, not by the data. As a
result, both the switching count and the timing of the circuit no longer depend on the
secret.

This repository holds a synthesizable SystemVerilog model of such a circuit: the part of
the first DES round that power attacks target. Six plaintext bits are XORed with six
sub-key bits, and the result goes into DES S-box 1. Every gate is an STTL cell. Around
it sits the small clocked harness an FPGA evaluation board needs: an RS232 receiver, and
a sequencer that applies one spacer-to-valid-to-spacer computation per command byte.

## 1. The triple-track code

Each logical bit is a `sttl_pkg::sttl_t` with three wires, `{v, r1, r0}`:

| state                 | v | r1 | r0 |
|-----------------------|---|----|----|
| spacer (no data)      | 0 | 0  | 0  |
| data set, not yet valid | 0 | value | ~value |
| valid 1               | 1 | 1  | 0  |
| valid 0               | 1 | 0  | 1  |
| illegal               | x | 1  | 1  |

One computation is a four-phase cycle:

1. Raise one data rail.
2. Raise `v`.
3. Release the data rail.
4. Release `v`, which brings the bit back to the spacer.

`v` rises and falls exactly once per computation for either value, so it leaks nothing.
Exactly one data rail switches per bit. Inverting a bit means swapping `r1` and `r0`,
which costs no logic.

The timing rule that everything rests on is this: **data rails settle before validity
rails**, in both directions. In the cell, the validity path is made much slower than the
data path (see below). At the circuit's inputs, the sequencer enforces the rule
(section 4).

## 2. Anatomy of an STTL cell (`sttl_gate2`)

A two-input cell computes `s = f(a, b)`. `f` is set by the 4-bit `TRUTH` parameter,
indexed by `{a, b}`. The default is And2; the S-box also uses Or2 and Xor2.

```
 a.v ─┐                                         (validation logic, sttl_validity)
      C ── Enable ──► LUT ─► LUT ─► LUT ─► LUT ──────────────────────────────► s.v
 b.v ─┘     │
            ▼                       (data logic)
 a.r?,b.r? ─► C(Enable, a.r_i, b.r_j)  × 4 minterms ─┬─ OR of minterms with f=1 ─► s.r1
                                                     └─ OR of minterms with f=0 ─► s.r0
```

* **Enable** is a 2-input Muller C-element on `a.v` and `b.v`. It rises only when both
  inputs are valid, and falls only when both are back at the spacer. It depends on
  validity rails alone, so it is data-independent.
* **Four minterm C-elements**, one per input combination `(i, j)`. Each one fires when
  Enable, `a`'s rail `i` and `b`'s rail `j` are all high. It releases when all three are
  low. The data rails are already present when Enable arrives, so the firing instant is
  Enable's instant, whatever the data. The C-elements also make the OR inputs
  hazard-free.
* **Two ORs** collect the minterms into `s.r1` and `s.r0`. Both rails therefore have the
  same depth: one C-element plus one OR.
* **Delay D**: Enable goes through four more LUT stages to become `s.v`. Counting the
  Enable C-element, the validation chain is five LUTs long (`N_DELAY = 5`), against two
  LUTs for the data path. So `s.v` always settles after `s.r1`/`s.r0`, which is exactly
  the precondition the next cell needs.

The cell takes 4 + 2 data LUTs plus 5 validation LUTs, 11 LUT4s in all. On a Spartan-3
that is six slices when placed as a hard macro.

**Why the timing becomes data-independent.** Each cell fires on its Enable, and Enable
is derived from the previous cells' validity rails. So the firing instants follow the
chain of validity signals, whose delays do not depend on the data. In this cell, count
from the moment the last input validity rail arrives:

* Enable follows one LUT later.
* The output data rails follow three LUTs later.
* The output validity rail follows five LUTs later.

At the next cell, data therefore leads validity by two LUT delays. Place and route can
still skew a data rail's arrival by some uncertainty U. That skew stays invisible as
long as U is smaller than this window. In general terms, the window is a slow-gate delay
plus a fast-gate delay, and lengthening the validity chain (`N_DELAY`) widens it. On an
FPGA this is the only tuning knob, which is why D is a chain of LUTs.

`tb_sttl_timing` shows this on the RTL cells. It builds a three-cell tree
(E = A·B, F = C·D, G = E·F) and puts the delays on the wires: 3 ns on data rails plus a
random per-rail skew, and 5 ns on validity rails.

* With the skew below 2 ns, G fires at exactly 5 ns in every run, for every input value.
* With skews of up to 4 ns, G's firing time spreads from 5 to 7 ns and so starts to
  depend on which rails switched. This is the leak STTL is designed to remove.

**C-element** (`c_element`): a latch that is transparent only while all inputs agree. It
maps to one LUT with feedback. There is no reset wire. Driving every input to 0 (the
spacer) clears every C-element, and the circuit is always started from the spacer.

## 3. S-box 1 as an STTL netlist (`sttl_sbox1`, `sttl_des_submodule`)

The S-box input is `x[5:0]`, with `x[5]` as DES bit 1. The row is `{x5, x0}` and the
column is `{x4..x1}`. The netlist has 216 cells:

1. Three 2-to-4 decoders (12 And2): for `{x5,x0}`, `{x4,x3}` and `{x2,x1}`. Zeros use
   rail-swapped inputs.
2. Sixteen column cells (16 And2).
3. Sixty-four minterm cells (64 And2), one per input value.
4. One balanced Or2 tree per output bit (4 × 31 Or2) over the 32 minterms where that bit
   of S1 is 1. Every output bit of S1 is 1 for exactly 32 inputs, so all four trees have
   the same shape.

`sttl_des_submodule` puts six Xor2 cells in front of the S-box for the key mixing. A path
from an input to an output crosses 8 cells (through the row decoder) or 9 (through the
column decoders). A minterm cell waits for both of its inputs to be valid, so every
output fires after 9 cell stages, whatever the data. In every computation each of the 222
cells raises exactly one data rail. At the moment of evaluation the 98 data rails of the
key-mixing, decoder, column and minterm cells are high, and exactly one of the 64
minterms is true. The testbenches check all of these properties.

The S-box table lives in `sttl_pkg` (`DES_S1_ROWS`). `s1_ones_index` is an
elaboration-time function that returns the n-th input for which a given output bit is 1.
The generate loops use it to wire the OR-tree leaves.

## 4. Driving an asynchronous circuit from a clocked board

`uart_rx` receives 8N1 bytes, with `CLK_HZ/BAUD` cycles per bit and sampling in
mid-bit. It has a two-flip-flop synchroniser, rejects glitches on the start bit, and
flags a bad stop bit on `frame_err`.

`sttl_sequencer` decodes each byte:

| byte `[7:6]` | action                                      |
|--------------|---------------------------------------------|
| `01`         | load sub-key `[5:0]`                        |
| `00`         | run one computation with plaintext `[5:0]` |
| `1x`         | ignored                                     |

A run drives all twelve inputs (plaintext and sub-key) through the four phases. Every
run is therefore a transition from the spacer to a valid 6-bit value and back:

```
cycle:        0        SETUP        +n (wait)     +1         SETUP        +m (wait)
p,k rails:  data set   v raised      ...        data released  v released   ...
state:      Q_DATA  -> Q_VALID ---(all 4 s.v seen)--> Q_CAPTURE -> Q_RTZ_DATA -> Q_RTZ_VALID --(all s.v low)--> idle
```

The four output validity rails pass through a two-flip-flop synchroniser. The data rails
are read directly: they settled before `v` rose and hold while `v` is high. The
sequencer then:

* stores the true rails in `result` and pulses `result_valid`;
* sets `result_err` if any output bit is not a legal 1-of-2 code;
* reports in `eval_cycles` how many clock cycles the wait for validity took.

For an STTL circuit, `eval_cycles` must be the same for every input. On hardware it is
a coarse on-chip measure of the constant computation time. A byte that arrives during a
run is dropped and flagged on `cmd_dropped`. This cannot happen at 115200 baud, because
a run lasts a few clock cycles and a byte lasts ten bit periods.

`sttl_des_prototype` wires the three parts together. It exposes the result, `busy` (a
natural oscilloscope trigger, high exactly while the STTL logic is switching), and the
raw STTL outputs of the sub-module.

## 5. What simulation can and cannot show

The RTL has no delays. Synthesis rejects them, and the delay that matters comes from
placement on the FPGA. In zero-delay simulation, Enable, the data rails and `s.v` all
move in the same time step. So the constant firing time is not something a simulator
can measure here. What the testbenches check instead is the causal structure that
produces it, and the data independence of the switching:

* With data rails set but any input validity rail low, no output moves. Firing is caused
  by validity, never by data. The testbenches raise the validity rails in random order.
* Outputs hold while input data rails are released and while only some validity rails
  have fallen. They return to the spacer only when all validity rails have fallen.
* Exactly one output data rail rises per computation. The number of high internal rails
  at evaluation is the same for all 4096 (plaintext, key) pairs.
* `eval_cycles` is identical for every run through the sequencer. This holds with a
  37 ns transport delay inserted after the sub-module, and in the full prototype.

`tb_sttl_timing` (section 2) adds wire delays around three cells to show the timing
effect itself. For the whole sub-module, simulate a post-place-and-route netlist with
back-annotated delays, or measure on the board.

For reference, the FPGA figures reported for this kind of sub-module on a Spartan-3 are:

| implementation | computation time | area |
|---|---|---|
| STTL | a constant 102.7 ns for every input | 994 slices |
| single-rail | 15.6 to 26.6 ns depending on the data | 175 slices |

The netlist here has more cells than that mapping. At 11 LUTs per cell it comes to about
1220 slices, which still fits a device of about 1950 slices.

## 6. Choices made in this model

These are not fixed by the STTL idea itself:

* **The code table of section 1.** The return-to-zero reading is used, with rail 1
  meaning a logic 1.
* **Enable** is a C-element of the two input validity rails. It is not a function of
  the cell's own output validity.
* **The five validation LUTs include the Enable C-element.** The other four are plain
  delay stages marked `keep`.
* **The S-box netlist** (decoders, minterms, OR trees) is one of many possible STTL
  netlists.
* **The clocked harness is this design's own.** That covers the command format, 50 MHz /
  115200 baud, `SETUP_CYCLES = 1`, the synchroniser, loading the sub-key over the serial
  link and `cmd_dropped`. The result is brought out on pins and not sent back over
  RS232.
* **No reset in the asynchronous part.** It relies on starting from the spacer.
* **Not modelled:**
  * the hard-macro placement that makes D physically slow;
  * the single-rail reference version;
  * the measurement bench (battery-fed core supply, current probe, oscilloscope) and the
    DPA/CPA analysis software.

## 7. Files

| file | contents |
|---|---|
| `rtl/sttl_pkg.sv` | `sttl_t`, encode/decode helpers, truth tables, DES S1 table |
| `rtl/c_element.sv` | N-input Muller C-element |
| `rtl/sttl_validity.sv` | Enable C-element and the validity delay chain |
| `rtl/sttl_gate2.sv` | two-input STTL cell (And2 / Or2 / Xor2 by `TRUTH`) |
| `rtl/sttl_sbox1.sv` | S-box 1 from 216 STTL cells |
| `rtl/sttl_des_submodule.sv` | key mixing + S-box 1 |
| `rtl/uart_rx.sv` | RS232 receiver |
| `rtl/sttl_sequencer.sv` | clocked four-phase driver and result capture |
| `rtl/sttl_des_prototype.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters: `N_DELAY` (validity chain length, 5) on every STTL module, `TRUTH` on
`sttl_gate2`, `CLK_HZ`/`BAUD` on `uart_rx` and the top, and `SETUP_CYCLES` (cycles by
which data leads validity at the inputs) on the sequencer and the top.

## 8. Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a watchdog ends
a hung run. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/sttl_pkg.sv tb/tb_sttl_des_prototype.sv --top-module tb_sttl_des_prototype
./obj_dir/Vtb_sttl_des_prototype
```

Replace the testbench name to run another one. Here is what each covers:

| testbench | coverage | run time |
|---|---|---|
| `tb_sttl_des_prototype` | full design at its default parameters: two sub-keys × 64 plaintexts over the serial line, a framing error and an unknown command; prints how often each mechanism occurred | about 6 s |
| `tb_sttl_des_submodule` | all 4096 input pairs | under 1 s |
| `tb_sttl_sbox1` | all 64 inputs | |
| `tb_sttl_gate2` | And2, Or2 and Xor2 through every input pair and arrival order | |
| `tb_sttl_validity` | validation logic | |
| `tb_c_element` | C-element | |
| `tb_uart_rx` | random bytes, bad stop bit, start-bit glitch, latency | |
| `tb_sttl_sequencer` | results, constant `eval_cycles`, input protocol order, ignored and dropped commands | |
| `tb_sttl_attack_campaign` | an acquisition campaign: sub-keys 35 and 57, each of the 64 transitions 50 times, over an 8-cycle-per-bit serial link; evaluation time and internal switching activity identical in all 6400 runs | about 6 s |
| `tb_sttl_timing` | firing time of a three-cell tree with wire delays, inside and beyond the skew window | |

Verilator's lint reports nothing on the RTL beyond unused package constants.
Synthesis infers one latch per C-element: that latch is the C-element's state and is
intended.
