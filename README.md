# Four-state self-timed arrays that stick instead of slip

A self-timed (clockless) array moves data by handshakes between neighbouring
cells rather than on clock edges. If every bit is sent in a *four-state code*,
a cell always knows whether its neighbour holds a new item or the previous
one. That property changes how the array reacts to faults. A clocked systolic
array simply passes a wrong value on. A four-state array can do one of two
things:

* **stick**: the handshake can no longer complete, the array stops, and its
  output makes no more transitions. A silent output is an *erasure*: you know
  which copy failed. Two copies are then enough to correct one fault, where
  triple redundancy would otherwise be needed.
* **slip**: items are lost or duplicated and the array keeps running, so the
  error goes undetected and the stream is shifted for good.

Whether an array sticks or slips depends on how its cells are connected. This
RTL implements the four-state cells, a shift register (which slips), and a
convolutional encoder built to stick: phase inversion between its
exclusive-OR cells removes every slipping state. It also provides a
duplicated encoder that turns sticking into single-fault correction.

## The four-state code

Each bit travels on two wires, `{parity, data}`. The acknowledgement that
travels back is a single *phase* wire.

| code | name | phase | value |
|------|------|-------|-------|
| 00   | P0   | P     | 0     |
| 01   | Q1   | Q     | 1     |
| 10   | Q0   | Q     | 0     |
| 11   | P1   | P     | 1     |

Phase is `parity ^ data`. Consecutive items on a link alternate between P and
Q, so every new item changes exactly one wire and there are no races. Any
single-wire error also flips the phase. That is why an error shows up in the
handshake and not only in the data. `fs_pkg` holds the type `fs_t`, the
helpers `fs_phase`, `fs_data`, `fs_encode` and `fs_inv_parity`, and the
fault-injection record.

## The two cells

**D-cell (`fs_dcell`).** It holds one item. It copies its input when the
input's phase differs from its consumer's phase (the acknowledgement), and
otherwise holds. Q-phase data passes only while the next cell holds P-phase
data, and the other way round. The phase of what it holds is its own
acknowledgement to the cell before it. This is a Muller C-element pipeline
stage that carries a data bit. Some D-cells feed two consumers: the top cell
of an encoder element feeds the next element and its own exclusive-OR cell.
Such a cell copies only when its input phase differs from *both*
acknowledgements (`N_ACK = 2`).

**Parity-inverting exclusive-OR cell (`fs_xor_pinv`).** It reads input B
through an inverted parity wire, so B appears in the opposite phase. It also
expects its consumer's acknowledgement to be inverted. The cell takes a new
result when

```
phase(A) != phase(B)  and  ack == phase(A)
```

and the result is `fs_encode(phase(A), A.data ^ B.data)`. All other input
combinations leave it unchanged. These are the eight rows of its truth
table; the testbench checks every combination of stored state, A, B,
acknowledgement and `fire` against those rows.

## Self-timed cells as clocked RTL

The cells are written as synthesizable synchronous logic. Each cell's state is
a register that may change only on a rising clock edge with its `fire`
strobe high. This is an emulation of the clockless circuit, not a clockless
implementation:

* With `fire` held high, every enabled cell acts on every edge. In the
  shift register, neighbouring cells are never both enabled, so this is a
  legal ordering of the self-timed circuit. For the encoder, the testbenches
  compare firing everything at once with firing random subsets of cells,
  and get the same results. Firing everything is
  also the fastest: the encoder then delivers one result every 2 cycles.
* Driving `fire` with random bits, or one-hot, emulates arbitrary cell
  delays. The testbenches do this to show that results do not depend on
  timing.
* Each cell has a `fault_t` input for error injection. `flip` XORs the stored
  state in the cycle it is high (a soft error). `stuck_en`/`stuck_val` force
  output wires for as long as they are set (a hard error). Tie it to zero in
  normal use.

Reset (`rst_n`, asynchronous, active low) puts every cell at P0.

## The shift register and its two failure modes (`fs_shift_reg`)

`STAGES` D-cells (default 6) form a chain. Items enter at `in` and are
acknowledged on `in_ack`, which is the first cell's phase. They leave at
`out`; the consumer acknowledges by returning the phase of the item it took
on `out_ack`. Full, the register holds one item per cell in alternating
phases. An item crosses an empty register in one cycle per cell.

* **Stick (hard error).** Suppose a data wire is stuck at 0. An item that
  needs a 1 reaches that cell; the cell's output then shows the *old* phase,
  so the next cell never sees a new item. The register stops there. The
  testbench checks that items before the first 1 arrive, and that nothing
  after it does. It also follows one case step by step. A full register
  `P1 Q0 P0 Q0 P0 Q0` with the fifth cell's data stuck at 0 drains to
  `P1 P1 P1 P1 Q0 Q0`. The faulty cell holds the 1 but shows Q0, so its
  right neighbour takes nothing more.
* **Slip (soft error).** Take a full register holding `P1 Q1 P0 Q0 P1 Q1`,
  and flip the parity of the third cell to Q0. The cells to its left now
  believe their data was taken, and the register settles to
  `P1 P1 P1 Q0 P1 Q1`. Two items are gone and the output keeps flowing; no
  sign of the loss appears anywhere. The testbench reproduces this sequence
  cell by cell.

A cell that receives from one cell and sends to one cell always slips. To
get sticking, a cell's output must reach some later cell by two different
paths.

## The fault-resistant convolutional encoder

`fs_conv_encoder` multiplies the input bit stream by a fixed polynomial over
GF(2). Given a result-in stream `rin`, its result stream is:

```
r[t] = XOR over k of ( COEF[k] & x[t-k] )  XOR  rin[t-N+1]      x[t<0] = 0
```

Here `rin[0] = 0` is the item the last cell takes out of reset. A zero
result-in gives plain encoding; a non-zero one lets encoders be cascaded.

### Structure

`N` identical elements (`fs_conv_elem`, default `N = 8`) form a chain.
Element 0 is at the data-in / result-out end.

```
data_in ──► [T0] ──► [T1] ──► ... ──► [T(N-1)] ──► data_out
             │sw      │sw               │sw
             ▼        ▼                 ▼
result_out ◄ [X0] ◄── [X1] ◄── ... ◄── [X(N-1)] ◄── result_in
```

* `Tk` is a D-cell on the data row. It feeds `Tk+1` and, through the
  coefficient switch, input A of `Xk`, so it waits for both
  acknowledgements.
* `Xk` is a parity-inverting exclusive-OR cell. It adds the switched item to
  the partial sum from `Xk+1` (input B) and passes the sum left. No buffer
  cell sits between the exclusive-OR cells.
* The coefficient switch, for `COEF[k] = 0`, passes the top cell's phase
  with the data bit forced to 0. The handshake still runs and the product
  term is 0.

The data stream moves right and the partial sums move left. Each partial
sum picks up exactly one data item in every element it passes, because `Xk`
waits for both operands.

### Why it sticks rather than slips

`Tk` reaches `Xk` by two paths: directly, and through `Tk+1` and `Xk+1`. A
phase error in any cell on such a loop breaks the agreement that the handshake
needs. Take the phases of two adjacent elements, `Tk Tk+1 / Xk Xk+1`, which
gives 16 combinations. Without errors, the window cycles through a 12-state
loop with 16 transitions. The other four combinations (`PP/QP`, `PQ/PP`,
`QP/QQ`, `QQ/PQ`) are dead ends: from them no cell of the window can move. A
soft error inverts the phase of one cell. It either leaves the window in a
state of the loop, from which it keeps running, or moves it into a dead
end. There is no second loop in which the
array could keep running with items missing.

How often each outcome happens depends on what the array is doing when the
error hits. `tb_fs_conv_encoder` flips one random bit in an interior element
60 times during a random stream and prints the split. With the default seed,
21 flips stuck the array and 39 left every result correct; none slipped.
A run that completes with a wrong result is counted and printed but not
failed: an error that keeps the handshake in its loop may go unnoticed.
None occurred in these runs.

`tb_fs_debruijn` checks this on the RTL. It fires one random cell per cycle
and watches elements 3 and 4. Exactly the 12 loop states and the 16 listed
transitions occur, and no others. It then flips one bit in the window in 40
runs. Each run ends either in a dead end with the input stopped, or running
again inside the loop.

An alternative encoder element exists. It adds a D-cell buffer on the result
row and uses ordinary (non-inverting) exclusive-OR cells. That version has a
10-state loop in which it keeps running at half rate after losing two items,
so it is not provided.

### Handshake conventions at the ports

Reset leaves every cell at P0, which represents an all-zero history. The
environment has to start consistent with that.

| port pair | new item present when | acknowledge by | after reset |
|-----------|-----------------------|----------------|-------------|
| `data_in` / `data_in_ack` | (source) `data_in_ack == phase(data_in)` means the current item was taken | presenting the next item with the opposite phase | source at P0 |
| `data_out` / `data_out_ack` | `phase(data_out) != data_out_ack` | setting `data_out_ack = phase(data_out)` | ack = P |
| `result_in` / `result_in_ack` | (source) `result_in_ack != phase(result_in)` means the current item was taken | presenting the next item with the opposite phase | source at P0 |
| `result_out` / `result_out_ack` | `phase(result_out) == result_out_ack` | inverting `result_out_ack` | ack = **Q** |

The result row uses the inverted convention of the parity-inverting cells.
The result-out consumer starts at Q because it is taken to have consumed the
reset content of `X0`.

**Caveat at the edges.** The first data cell `T0` takes input from one
producer, the external source. That link behaves like a shift register: a
flip in `T0` can make the source believe an item was taken when it was not,
and the item is lost. The no-slip property holds inside the array, not on a
single link out to the environment.

## Duplication with erasure correction (`fs_duplex_encoder`)

A stuck copy is an erasure, so two copies of the encoder correct one fault:

* **`fs_ack_merge`** presents one acknowledgement to a source that feeds
  both copies. While both copies are live, it is a Muller C-element: it
  follows the two phases when they agree and holds while they differ, so the
  source waits for the slower copy. Once a copy is erased, the merge follows
  the other copy alone. There is one merge for `data_in` and one for
  `result_in`.
* **`fs_erasure_join`** takes the outputs of the two copies. When every live
  copy has a new item and the output is free, it passes copy 0's item (or
  copy 1's, if copy 0 is erased) and acknowledges both copies. There is one
  join for `data_out` and one for `result_out`, and both present the normal
  convention to the outside.
  * If one live copy has an item and the other has not, a counter runs.
    After `TIMEOUT` cycles (default 64) the join pulses `miss` for the silent
    copy. `miss` appears `TIMEOUT + 1` cycles after the other copy's item.
  * If both copies deliver but the data differ, it pulses `mismatch`. With
    two copies this is detection only, and copy 0's value is passed on.
* **`fs_duplex_encoder`** holds the sticky `erased[1:0]` register, which
  either join can set, and a sticky `mismatch_seen` flag.

Limits of this scheme:

* `TIMEOUT` must exceed the largest delay difference between two healthy
  copies. Otherwise a slow but healthy copy is erased.
* A stuck wire whose forced value differs from the cell's content *at the
  moment the fault appears* makes one spurious phase change. That can pass
  one wrong item before the cell sticks. The copies then disagree and
  `mismatch_seen` is set, but the wrong item is not corrected.
* A soft error that changes data without breaking the handshake (for
  example, both wires of one cell flipped) is detected as a mismatch, not
  corrected.
* With both copies erased, the encoder stops.

## Top level (`fs_array_top`)

The duplicated encoder (`enc_*` ports) and the shift register (`sr_*` ports)
sit side by side and share only `clk` and `rst_n`.

Parameters:

| parameter | default |
|-----------|---------|
| `N` (elements per copy) | 8 |
| `COEF` | `8'b1011_0001` |
| `TIMEOUT` | 64 |
| `SR_STAGES` | 6 |

Per-cell inputs `enc_fire[copy][element][cell]` and
`enc_fault[copy][element][cell]` take cell 0 = top (D) cell and
cell 1 = exclusive-OR cell. `sr_fire`/`sr_fault` are indexed by stage. At
the default size, yosys coarse synthesis gives about 540 word-level cells and
107 flip-flop bits.

## Files

| file | content |
|------|---------|
| `rtl/fs_pkg.sv` | code type, helpers, fault record |
| `rtl/fs_dcell.sv` | D-cell |
| `rtl/fs_xor_pinv.sv` | parity-inverting exclusive-OR cell |
| `rtl/fs_shift_reg.sv` | shift register |
| `rtl/fs_conv_elem.sv` | one encoder element |
| `rtl/fs_conv_encoder.sv` | encoder chain |
| `rtl/fs_ack_merge.sv` | acknowledgement merge for two copies |
| `rtl/fs_erasure_join.sv` | output join with time-out |
| `rtl/fs_duplex_encoder.sv` | duplicated encoder |
| `rtl/fs_array_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_fs_debruijn.sv` | phase-state diagram check of the encoder |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal \
    --top-module tb_fs_array_top -y rtl +libext+.sv \
    rtl/fs_pkg.sv tb/tb_fs_array_top.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_fs_array_top` with any other testbench name. `fs_pkg.sv` must
come first. Lint with `verilator --lint-only -Wall -y rtl +libext+.sv
rtl/fs_pkg.sv rtl/<module>.sv`. All testbenches run in seconds.

What the testbenches cover:

* **Cells**: exhaustive against their truth tables, including
  `fire = 0`, two acknowledgements, and fault injection.
* **Shift register**:
  * latency of one cycle per cell;
  * capacity of one item per cell;
  * random streaming;
  * the slip sequence;
  * the stick, including the step-by-step case;
  * one item every 2 cycles at full speed.
* **Element and encoder**:
  * random data, random result-in, random cell firing and a stalling
    environment, checked against the formula above;
  * the encoder also runs at full speed, with one result every 2 cycles;
  * 60 single soft errors, none of which may slip.
* **Duplex encoder**:
  * healthy operation;
  * hard faults in each copy (the faulty copy is erased and every result
    stays correct);
  * soft faults (every result arrives; wrong ones are flagged).
* **Top (`tb_fs_array_top`, default parameters)**: counts and requires each
  mechanism:
  * results and backpressure;
  * skew between the copies;
  * erasure after a hard error and after a soft error;
  * mismatch detection;
  * shift-register streaming, slip and stick.

## Where this RTL goes beyond, or departs from, the source design

Taken from the source design:

* the code;
* the two cell truth tables;
* the shift register;
* the element structure of the fault-resistant encoder and its phase
  inversion;
* the idea that a stuck copy is an erasure, so duplication corrects one
  fault.

This implementation's own choices:

* **Clocked emulation** with `fire` strobes and reset values.
* **Two-consumer D-cell.** Its rule ("differs from both acknowledgements")
  is not given as a table.
* **Coefficient switch.** The meaning of switch position 0 (phase passed,
  data forced to 0) is this design's reading.
* **Sizes.** The encoder length (8), the polynomial (`1011_0001`), the
  shift-register length (6) and the time-out (64) are not specified by the
  source, and are chosen here.
* **Boundary handshakes.** The conventions at the encoder's four ports are
  inferred from the cells next to them.
* **Duplication circuits.** The whole duplication scheme (C-element merge,
  join, time-out counter, mismatch flag, sticky erasure) is one possible
  realisation of a scheme the source describes only in words.
* **Fault injection ports.** They exist only for test.

Not provided:

* the slipping encoder variant;
* a mesh of four-state cells, in which every cell receives from its left and
  upper neighbours. It is described only as a topology that sticks on any
  error, with no cell function, so there is nothing definite to implement.
