# Vector detection with a reconfigurable FSM

This is a small coprocessor that watches a serial bit stream and reports,
frame by frame, which of a set of stored vectors has just gone past. The host
loads `n` vectors of `m` bits each, plus a `k`-bit output word for each of
them. It then sends the stream one bit per clock, in frames of `m` bits with
the most significant bit first. On the last bit of a frame that equals a
stored vector, the coprocessor drives that vector's word on `out` and raises
`detect`.

The detector is a finite state machine whose state diagram is a binary search
tree over the stored vectors. Its next-state logic is not hard-wired for a
particular vector set. It is computed every clock from the loaded vectors, so
new vectors reconfigure the FSM with no new logic and no resynthesis. The
design follows the method in the article "An FPGA-based Implementation of an
Efficient Vector Coprocessor using Reconfigurable FSM for Vector Detection
based Control". That article describes the architecture, the state encoding
and the output function. The next-state rules here are this design's own
formulation of its tree, and the interface details are this design's own (see [Departures and own choices](#departures-and-own-choices)).

Default size: `m = 8`, `n = 4`, `k = 2`. This is the largest evaluated size
with four vectors, and the size used for 8-bit gray-scale pixels.

## Structure

```
            v[n][m], r[n][k], prec_mode
                      |
              +----------------+      cfg_load
              | crossbar_switch|  (sort ascending, carry r along)
              +----------------+
                      | da, ra
              +----------------+
              | config regs    |  <- captured on cfg_load
              +----------------+
                      | da_q, ra_q
 bit_in ----> +--------------------------------+ ---> out[k], detect
              | reconfigurable_fsm             |
              |   next-state / output logic    |
              |   state_protection (3 copies)  | ---> seu_masked
              +--------------------------------+
                      ^ frame_end
              +----------------+
              | frame_counter  |  mod-m, 'last' on every m-th clock ---> frame_pos
              +----------------+
```

| File | Role |
|---|---|
| `rtl/vp_pkg.sv` | state-kind enum, `clog2_min1` width helper |
| `rtl/crossbar_switch.sv` | sorts the vectors into ascending order, moving each output word with its vector |
| `rtl/frame_counter.sv` | modulo-`m` counter that marks the last bit of each frame |
| `rtl/state_protection.sv` | state register kept in three copies and read through a majority vote |
| `rtl/reconfigurable_fsm.sv` | the tree detector: state encoding, next-state function, output function |
| `rtl/vector_coprocessor.sv` | top level: configuration registers and wiring |

## Why the vectors are sorted

Put the vectors in ascending order and read them MSB first. Then any vectors
that share their first `t` bits sit next to each other in the list. So a node
of the search tree (the set of vectors that agree with the bits seen so far)
is always a contiguous run of the sorted list. It can be named by the index
of its first vector, its *head*. The crossbar switch does this sort. It
ranks each vector by counting how many vectors are smaller, plus how many
equal vectors have a lower index. Ranks are unique, and equal vectors keep
their load order. Output position `p` then selects the vector of rank `p`.
The crossbar is combinational: n² comparators of m bits and an n:1 mux per
position. Its result is registered on `cfg_load`.

Adjacent sorted vectors `i` and `i+1` are compared by a *switching* variable
`x[i][t]`. It is 1 when the two vectors differ anywhere in their first `t`
bits. A tree node that starts at head `h` ends just before the first `i >= h`
with `x[i][t] = 1`.

## State encoding

The state is `p = CB + G + 2` bits, packed as `{cfg, diff, kind}`:

* `CB = ceil(log2 n)` **configure bits**. These hold the head index of the
  current node.
* `G = ceil(log2(m-2))` **difference bits**. These hold the column. Two
  states with the same head in different columns must differ, so the column
  is part of the state.
* two **kind** bits:

| kind | meaning | column | bits consumed in frame |
|---|---|---|---|
| `00` | initial state, whole state is zero | 1 | 0 |
| `01` | after a first bit 0; also the *default state for input 0* | 2 | 1 |
| `10` | after a first bit 1; also the *default state for input 1* | 2 | 1 |
| `11` | conventional state, `diff = column - 3` | 3 .. m | 2 .. m-1 |

With the defaults (`m = 8`, `n = 4`) this gives `p = 2 + 3 + 2 = 7`. The two
column-2 states do double duty, and that is the subtle part of the design. They are:

* the real tree nodes for the prefixes `0` and `1`. The node `01` has head 0
  if the smallest vector starts with 0. The node `10` has as its head the
  first vector that starts with 1.
* the *default* states. The FSM falls back to one of them whenever the
  current node has no vector that continues with the incoming bit.

### Next-state function

From a state that has consumed `t` bits, with input bit `b`:

| current state | next state |
|---|---|
| initial | `01` if `b = 0`, `10` if `b = 1` |
| `t = 1 .. m-2` | look for the first vector of the node whose bit `t` (counted from the MSB) equals `b`. If one exists, go to `{its index, t-1, 11}`. Otherwise go to the default state for `b` |
| `t = m-1` (last column) | initial |
| any state, when `frame_end` is high | initial |

For `b = 0` the new head is the current head, if that vector continues with 0.
For `b = 1` it is the split point inside the node. This is why the method
describes the update for input 0 as going "top to bottom" and for input 1 as
"bottom to top".

### Why falling back cannot cause a false detection

After a mismatch at bit `j >= 2`, the FSM sits in a column-2 state. It
consumed `j` bits but behaves as if it had consumed one. From there it may walk
down the tree again, but it is now `j - 1` columns behind. The last column is
reached only after exactly `m - 1` bits with no fallback. So a frame that has
left the tree can never reach it before the frame counter resets the FSM. The
counter's reset is needed for the same reason. Without it, a lagging FSM would
run into the next frame, and vectors that overlap in the stream could chain.

### Output function

The output is a Mealy output, produced only in the last column. If a vector of
the current node has a last bit equal to `bit_in`, `out` is its word and
`detect` is 1. Otherwise `out` is 0. A last-column node holds at most two
different vectors, which differ only in their last bit. Identical vectors
share a node, and the one later in sorted order (the later one loaded) wins.

### Worked example

The vectors are `0000, 1100, 1011, 1010` (`m = 4`, `n = 4`, so `p = 2 + 1 + 2 = 5`).
Sorted, they are `0:0000, 1:1010, 2:1011, 3:1100`.

| bits seen | state | meaning |
|---|---|---|
| – | `00000` | initial |
| `0` / `1` | `00001` / `00010` | column 2 |
| `00` | `00011` | head 0, column 3 |
| `10` | `01011` | head 1 (`1010`, `1011`), column 3 |
| `11` | `11011` | head 3, column 3 |
| `01` | `00010` | no vector: default for input 1 |
| `000` | `00111` | head 0, column 4 |
| `101` | `01111` | head 1, column 4; a 0 then gives word of `1010`, a 1 the word of `1011` |
| `110` | `11111` | head 3, column 4 |
| `100` | `00001` | default for input 0 |

`tb/tb_fsm_encoding_example.sv` checks these states bit for bit for all 16
frames.

## Frame reset

`frame_counter` counts 0 .. m-1, one step per clock. Its `last` output is high
while the m-th bit of a frame is on `bit_in`. The FSM takes `last` as a
synchronous reset, so it is back in the initial state when the next frame
starts. The method calls this an "m-bit counter". A modulo-m counter of
`ceil(log2 m)` bits is all the reset period needs, so that is what is built.

## State protection

The initial and default states are visited in nearly every frame, so a soft
error in the state register would most often hit them. The method protects
them by replication. Here the whole 7-bit state register is kept in three
copies and read through a bitwise majority vote. Every copy is rewritten from
the voted next state on each clock, so a single upset is masked at once and
scrubbed on the next edge. `seu_masked` is high while the copies disagree.

Each copy is stored XORed with its own constant mask. The three registers then
have different contents, and a synthesis tool cannot merge them into one.
Without the masks, yosys folds the three copies into a single 7-bit register.

## Interface and timing (`vector_coprocessor`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `cfg_load` | in | 1 | capture `v`, `r`, `prec_mode`; restart the frame |
| `prec_mode` | in | 1 | 1: a vector's word is its position in ascending order (0 = smallest). 0: use `r` |
| `v` | in | `N x M` | vectors, any order |
| `r` | in | `N x K` | output word of each vector |
| `bit_in` | in | 1 | serial stream, MSB of each frame first |
| `out` | out | `K` | output word of the detected vector, 0 otherwise |
| `detect` | out | 1 | a vector ends on this bit |
| `frame_pos` | out | `ceil(log2 M)` | position of the current bit in its frame |
| `seu_masked` | out | 1 | state copies disagree (a masked upset) |

Timing:

* **Load.** On the clock where `cfg_load` is high, the sorted configuration is
  registered, and the counter and FSM restart. The bit on `bit_in` in that
  clock is ignored. The first bit of the next frame comes on the following
  clock. A load may cut a frame short. `detect` stays low until the first
  load.
* **Stream.** Frames run back to back, one bit per clock, with no gaps and no
  valid signal.
* **Detection.** `out` and `detect` are combinational. They are valid while
  the m-th bit of a frame is on `bit_in`, that is, in the same clock, with
  `frame_pos = M-1`. A frame takes exactly `m` clocks. An assertion checks that
  `detect` never rises on any other bit.
* **Critical path.** The critical path runs from the state register, through
  the head decode and the n-wide group search, to the output mux and the state
  register again. The crossbar is off this path, because its result is
  registered.

## Parameters and sizes

| Parameter | Default | Meaning |
|---|---|---|
| `M` | 8 | vector (frame) length, `M >= 2` |
| `N` | 4 | number of vectors |
| `K` | 2 | output word width, normally `ceil(log2 N)` |

The widths `CB`, `G` and `P` are derived. Degenerate cases (`N = 1`, `M <= 3`)
are rounded up to at least one bit. At the defaults, coarse synthesis gives 65
flip-flops: 41 configuration bits, 3 counter bits and 3 × 7 state bits.

The method was evaluated at `m = 4 .. 8` and `n = 3 .. 5`, and used with
`(m, n) = (8, 4)` for 8-bit pixels and `(2, 2)` for a binary image. The frame
length is a parameter, so each `(m, n)` needs its own instance:

* `(8, 3)` runs on the default instance, with one slot holding a copy of
  another vector.
* Every other size, including `(2, 2)`, needs its parameters set.
  `tb_table1_configs` runs all of them.

## Departures and own choices

Taken from the method:

* the sorted-vector tree
* the state layout `{configure, difference, 2 bits}` and its width formula
* the column-1 initial state
* the column-2 states that also serve as default states
* the reset every m-th clock
* the output rule (last column, input bit equals the vector's last bit)
* user-defined or precedence-based output words
* replication of the state

Rebuilt or chosen here:

* **Next-state equations.** They are written here as search rules over the
  sorted vectors, formulated from the method's description: configure bits
  equal the head index, and updates go top-down for 0 and bottom-up for 1. `x[i][t]` is taken as cumulative over the first `t` bits.
  That is the reading under which the configure-bit recurrence names tree
  nodes consistently.
* **Column numbering.** The difference bits hold `column - 3`, and the
  conventional kind is `11`.
* **Last column.** A state in the last column always returns to the initial
  state. The frame reset forces this anyway.
* **Protection.** Every state is triplicated, not only the frequently visited
  ones. The masks are an implementation detail.
* **Ties.** Equal vectors keep their load order, and the later one wins.
* **Precedence words.** The word is the zero-based ascending position, so
  the largest vector gets the highest word.
* **Interface.** The `cfg_load` protocol, the configuration registers, the
  `detect` flag and `frame_pos`. Without `detect`, a word of 0 could not be
  told apart from "nothing detected".
* **Bit order.** The stream is MSB first.

Not covered:

* The host processor that produces the stream and the vectors.
* The image-watermarking algorithm that the method's application study
  plugged the detector into. The testbench only streams images of those
  sizes.
* The FPGA figures reported for the method (LUT and slice counts, a maximum
  clock of about 20.8 MHz at (8, 4), static power). They belong to a specific
  FPGA flow and are not reproduced.

## Simulation

Every testbench checks itself and ends with one line,
`TB_RESULT checks=N failures=F`. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vp_pkg.sv tb/tb_vector_coprocessor.sv --top tb_vector_coprocessor -o sim
./obj_dir/sim
```

Swap in any other testbench name. `rtl/vp_pkg.sv` must be listed first, and
the other modules are found through `-y`.

| Testbench | What it checks |
|---|---|
| `tb_crossbar_switch` | sorting and output words against a stable insertion sort, with equal vectors |
| `tb_frame_counter` | count sequence, `last` on every m-th clock, `clear` |
| `tb_state_protection` | one-clock delay, upsets forced into each copy are masked and flagged, reset value |
| `tb_reconfigurable_fsm` | random sorted vector sets and frames: detect/out on every bit against direct comparison, initial and column-2 states, counts fallbacks, shared last-column nodes, duplicates |
| `tb_fsm_encoding_example` | exact state encoding on the 4-bit worked example |
| `tb_vector_coprocessor` | end to end at the default size: 20,000 frames, unsorted loads, precedence mode, loads in mid-frame, forced upsets. Fails if any of these never happens |
| `tb_table1_configs` | all 15 `(m, n)` sizes with `m = 4..8`, `n = 3..5`, plus `(2, 2)` |
| `tb_watermark_images` | a 256×256 8-bit image at the defaults (524,289 clocks) and a 64×64 binary image at `(2, 2)`, detection counts and cycle counts |

All testbenches drive stimulus from `$urandom` or from formulas, and read no
files. `vp_harness.sv` holds the per-instance driver and checker used by
`tb_table1_configs`.
