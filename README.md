# Pipelined run-length decompressor from a cyclo-dynamic dataflow graph

A run-length code describes a bit string by the lengths of its runs: the
string `11100001100` becomes the codes `3 4 2 2`. Decoding it is a loop
whose trip count depends on the data: each code produces as many output
bits as its value. An algorithm of that kind has no fixed schedule and is
usually built as a hand-written state machine with a datapath. This
design takes another route: the decoder is drawn as a *cyclo-dynamic
dataflow graph* (nodes that compute, edges that carry data through
registers, a small controller that decides how many iterations each
cycle of the loop runs) and the graph is mapped node by node into
hardware, as is done for ordinary synchronous dataflow. The result does
one loop iteration per clock: one output bit per clock, plus one clock
per code to fetch the next code.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, with the code
buffer written as an array so that an FPGA tool maps it to one block RAM.

## The graph and its hardware

Every node of the graph is a module or a small piece of logic in the top
`rle_decompressor`, and every register delay on an edge is a flip-flop
stage. Read left to right, the graph is:

| node | module | what it holds or computes |
|---|---|---|
| input delays | in `rle_decompressor` | `yi1`, `eyd`, `startd`, `eosd`: the code, its strobe, start and end of stream, each one clock late |
| I1 | `cddf_counter` | write pointer `pw`; cleared by `startd`, +1 on `eyd` |
| MW, B, MR | `cddf_bram` | circular code buffer of `2**NB` words; write and read address registers `aw`, `ar` inside |
| I2 | `cddf_counter` | read pointer `pr`; cleared by `startd`, +1 on `ipr` |
| I3 | `rle_code_counter` | run counter `c`: loads a code, then counts down once per output bit |
| G | `rle_bit_gen` | `fl`, the value of the bits of the current run; inverted at each new code |
| NS, ST, OS | `rle_fsm` | Free / Init / Run controller and its outputs `ipr`, `dec`, `ex` |
| output delays | in `rle_decompressor` | `xo` (one register after `fl`), `exo` (two registers after `ex`) |

`rle_pkg` holds the default sizes and the state type.

### Counters with two outputs

`cddf_counter` exposes both the register `q` and the node value `nxt`
(the value `q` takes at the next edge). The write pointer's `nxt` feeds
the buffer's write-address register and its `q` is the pointer the
controller compares. Both registers load the same value every clock, so
`aw` is always equal to `pw`: the address register has been duplicated
so that the buffer can own its address registers, as a block RAM does.
The read side works the same way (`ar` always equals `pr`). Pointers wrap
modulo `2**NB`, which is what makes the buffer circular.

### The buffer and the critical paths

The buffer has registers on the write data (`yi1`, outside the module),
the write address and the read address, but no output register: the word
at `ar` goes through the read multiplexer straight into the run counter,
whose register `c` plays that role. Two paths set the clock period:

* buffer read multiplexer, then the load/decrement mux of the run counter;
* controller output logic (`ipr`), then the read-pointer incrementer.

Every other path is shorter. Both go from one register to another within
one clock, which is what "one iteration per clock" requires.

## The controller: Free, Init, Run

```
 Free --start--> Init --(pw - pr > N) or eos seen--> Run --(pw == pr and c == 0)--> Free
```

* **Free**: idle. `start` moves it to Init and, one clock later, clears
  the pointers, the run counter and `fl`.
* **Init**: codes are written, nothing is read. Once the write pointer
  leads the read pointer by more than `N` codes (difference taken modulo
  the buffer depth) the decoder moves to Run. The lead gives the reader a
  cushion against a source that delivers codes irregularly.
* **Run**: writing continues; in parallel the reader expands codes:
  * `c == 0` and the buffer is not empty: `ipr` — advance `pr`, load the
    code at `ar` into `c`, invert `fl`. No output bit this clock.
  * `c != 0`: `dec` and `ex` — emit one bit with value `fl`, decrement `c`.
  * `c == 0` and the buffer is empty (`pw == pr`): the stream is over;
    back to Free.

A sticky end-of-stream flag (set by `eos`, cleared by `start`) also
releases Init. Without it, a stream of `N` codes or fewer could never
build the lead and would stay in Init forever. This guard is an addition
of this design; the other transitions are those of the method.

### Timing of one stream

With `N = 2` and the codes `3 4 2 2` sent on consecutive clocks after
`start` (clock numbers are those of the edge at which a value is
sampled):

```
clock  3  start
clock  4  ey, yi = 3          ... codes 4, 2, 2 on clocks 5..7
clock  8  pw = 3 > N          -> Run from clock 9
clock  9  ipr: c <= 3, fl <= 1
clocks 10..12  ex, c = 3,2,1   -> exo/xo = 1 on clocks 12..14
clock 13  ipr: c <= 4, fl <= 0
...
clock 24  c == 0, pw == pr     -> Free
```

So a code `y` takes `y + 1` clocks in Run, and an output bit leaves two
clocks after the clock in which the controller raised `ex`. The output
strobe `exo` is low for one clock between runs (the load clock). A code
of 0 is legal: it emits nothing and only inverts the bit value, which is
how a string that starts with zeros is coded.

## Using it

Ports of `rle_decompressor`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all logic on the rising edge |
| `rst` | in | 1 | synchronous, active high: controller to Free, strobes cleared, counters cleared |
| `start` | in | 1 | one-clock pulse; begins a stream |
| `ey` | in | 1 | code strobe |
| `yi` | in | `CODE_W_P` | run length |
| `eos` | in | 1 | one-clock pulse after the last code |
| `xo` | out | 1 | output bit |
| `exo` | out | 1 | `xo` is valid |
| `state` | out | 2 | controller state (`rle_pkg::rle_state_t`) |

Rules for the code source, none of which the hardware checks:

* Send codes only within a stream: the first no earlier than the clock
  after `start`, none while the decoder is idle. A code sent while idle
  still advances the write pointer and can release the next Init early.
* Keep fewer than `2**NB_P` codes unread. The buffer has no full flag;
  an overrun overwrites unread codes. Since every code takes at least one
  clock to expand, a source that sends one code per clock must be
  throttled once the buffer fills.
* Once Run has started, do not let the buffer run empty before the last
  code: an empty buffer with `c == 0` ends the stream.
* Pulse `eos` after the last code. It is required only when the stream
  has `N_P` codes or fewer, but harmless otherwise.

Runs alternate between ones and zeros and the first run is ones.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `CODE_W_P` | 8 | code width; the longest run is `2**CODE_W_P - 1` |
| `NB_P` | 9 | buffer address width; the buffer holds `2**NB_P` = 512 codes |
| `N_P` | 8 | lead, in codes, the writer must gain before output starts; must be below `2**NB_P` |

None of the three values is fixed by the method; they are this design's
choices. At the defaults the buffer is 4096 bits, inside one 18 Kb FPGA
block RAM, and generic synthesis gives 44 flip-flops for the whole
decoder.

## How it relates to the method it follows

Taken from the method: the node set and the registers on the edges of
the optimized graph, the block-RAM form of the buffer, the split of the
controller into next-state logic, state register and output logic, its
three states and their transitions, the modulo pointers and the lead
condition `pw - pr > N`.

This design's own choices, where the method is silent or inconsistent:

* **Bits per code and polarity.** The method's loop pseudo-code emits
  `c + 1` bits per code and starts with zeros, but its worked example
  (`3422` for `11100001100`) emits `c` bits and starts with ones. The RTL
  follows the example.
* **Streaming, not batches.** The pseudo-code writes a batch of codes and
  then reads it back; here the buffer is a circular FIFO and writing and
  reading overlap, with the bit value cleared only at `start`.
* **End of stream.** `eos` releases Init (see above). In the method's
  graph end of stream enters the controller's output logic; here it sets
  a flag in the state register that the next-state logic reads.
* **Control edges not drawn in the graph**: the buffer write enable is
  the delayed code strobe; the read pointer is cleared by start like the
  write pointer; the run counter's load and the bit-value toggle are both
  driven by `ipr`; the output logic also compares `pw` with `pr`.
* **Reset**: a synchronous `rst` has been added.
* **No output register on the buffer**: the block-RAM symbol of the
  method has one, but the optimized graph has none between the buffer
  and the run counter, and the RTL follows the graph.

Not included: the method also reports an LZW decompressor built the same
way, but it does not describe its structure, its code width or its
dictionary size, so there is no RTL for it here.

## Simulation

All testbenches are self-checking and end with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rle_pkg.sv rtl/*.sv \
  tb/rle_stream_driver.sv tb/tb_rle_decompressor_full.sv \
  --top-module tb_rle_decompressor_full
./obj_dir/Vtb_rle_decompressor_full
```

| testbench | what it covers |
|---|---|
| `tb_cddf_counter` | clear, count, wrap-around, both outputs, against a reference count |
| `tb_cddf_bram` | random writes and reads through the address registers, including reading a word written on the previous clock |
| `tb_rle_code_counter` | clear, load, decrement against a reference |
| `tb_rle_bit_gen` | clear and toggle against a reference |
| `tb_rle_fsm` | random pointers, counts, start and eos against a reference model of the controller; every transition, including the eos release, must occur |
| `tb_rle_decompressor` | end to end at a reduced size (16-code buffer, lead 4, 5-bit codes) |
| `tb_rle_decompressor_full` | end to end at the default sizes |

The two end-to-end benches share `rle_stream_driver`. It plays the
example `3 4 2 2`, then several random streams of run lengths with
occasional zero-length codes, then the example again. It checks every
output bit against a string built from the codes alone. It also checks
that each stream spends exactly `sum(code + 1) + 1` clocks in Run. It
counts and requires: a wait in Init, a release by the lead, a release by
`eos`, pointer wrap-around, a source held back by a full buffer,
zero-length codes, and one return to Free per stream. The default-size
run takes a few seconds.

The controller carries two assertions, checked when simulating with
`--assert`: a code is never taken from an empty buffer, and loading and
counting never happen in the same clock.
