# Reconfigurable datapaths: a SOLAR routing channel, DRAW arithmetic units and two small controllers

This repository holds synthesizable SystemVerilog for the hardware in a
methodology study on reconfigurable systems. Most of the logic is the
**SOLAR routing channel**. It connects the neurons ("nodes") of a
self-organizing learning array by passing data around a time-multiplexed
shift-register stream. There is no wiring between the nodes. The other parts
are:

- a Turbo-decoder arithmetic kernel for a coarse-grained reconfigurable array
  (DRAW): a 16-bit barrel shifter, and Max-Log-MAP state-metric and LLR
  datapaths built from DRPU cells, the array's processing units;
- two small examples: a comment-filter state machine and an 8-bit
  multiplexer.

These designs do not belong together. The top module `reconfig_top` places
them side by side, and each keeps its own ports.

## 1. The SOLAR routing channel

### The problem
A learning array has many nodes. During learning, each node picks which
outputs of the earlier nodes it uses. If every choice needs its own wire, the
interconnect grows faster than the nodes do, and changing a connection means
re-routing. The routing channel removes those wires. Every value a column
produces travels past every node of that column, and each node takes what it
needs.

### Stream, slots and copy ratio
A batch is N input bytes (N = 4: one Iris sample has four features). The
`input_serializer` repeats each byte C times (C = 5), so the column sees a
stream of L = C·N = 20 **slots**. Slot s holds byte s / C. The repeats give a
node several slot positions per input value, so a result can be written to
its own slot without overwriting the byte it came from.

### One column (`solar_column`)
A column is an L-stage shift register of bytes, `sr_q[0..L-1]`, with K = 4
nodes. Node i sits at position P_i = C·(i+1), between register P_i − 1
("register 1", its tap) and register P_i ("register 2"). The node's output
multiplexer either passes the tap on or puts its own result in its place.

Every column runs the same period of 3L = 60 cycles, counted by one shared
`routing_timer` (phase 0..3L−1):

| phase          | switch at the column input       | what node i does                           |
|----------------|----------------------------------|--------------------------------------------|
| 0 .. L−1       | take the stream from upstream    | idle until the batch reaches P_i           |
| P_i .. P_i+L−1 | after L: the column loops on itself | **read**: store the configured slots     |
| P_i+L .. P_i+2L−1 | loop                          | **write**: replace those slots with the result |
| to 3L−1        | loop                             | idle                                       |

In phases L..3L−1 the last node's output goes back into `sr_q[0]`, so the
batch circulates exactly twice. On the first lap every node reads the batch
as it came in. On the second lap every node writes its result. At phase 0
the switch turns back, and the column sends the modified batch downstream
while it takes in the next batch.

The slot in node i's register 1 is `(phase − P_i) mod L`. Nodes compute this
from the shared phase, so no separate timing wires are needed.

The order of reads and writes has two consequences:
- A node never sees results from its own column's current batch. Connections
  go only from one column to a later one.
- When two nodes of one column write the same slot, the node further down
  the column (the larger i) wins, because it writes later in the loop.

### A node (`solar_node`, `node_alu`)
A node's configuration (`node_cfg_t`) is an operation and two slot numbers,
`slot_a` and `slot_b`. Unary operations read and write `slot_a`. Binary ones
read both slots and write the result to both.

The node stores its operands during the read window. The combinational ALU
output is stable from then until the end of the write window. All values are
8-bit unsigned numbers standing for 0..1.

| op | result |
|----|--------|
| `OP_IDENT` | x |
| `OP_HALF` | x / 2 |
| `OP_EXP` Em(x) | (32 + x[4:0]) · 2^x[7:5] / 32, truncated; Em(192) = 64 |
| `OP_LOG` Lm(x) | {floor(log2 x), 5 fraction bits of x / 2^floor(log2 x)}; Lm(0) = 0 |
| `OP_SIG` | x < 128: Em(128 + x[6:0]) / 2; x ≥ 128: 255 − Em(128 + ~x[6:0]) / 2 |
| `OP_ADD` Am(a,b) | a/2 + b/2 (each halved first), e.g. Am(47,57) = 51 |
| `OP_SUB` Sm(a,b) | a − b, or 0 if b > a |
| `OP_NONE` | the node only passes data through |

Em and Lm are cheap approximations of 2^(x/32) and 32·log2(x) by
piecewise-linear segments. The sigmoid is built from Em and is mirrored
around 128.

### The array (`solar_array`)
COLS = 7 columns are chained, each one's output feeding the next one's input.
Together they form the 4 × 7 array. All columns share one phase, since each
holds its own batch at the same point of its period. That means:

- `in_ready` is high in the last cycle of every period, when a batch offered
  with `in_valid` is taken. If nothing is offered, an empty (zero) batch
  streams through.
- A result leaves the last column COLS·3L = 420 cycles after the batch was
  taken. It comes out on `out_data` at slot `out_slot`, with `out_valid`
  high for real batches only.
- The throughput is one batch per 60 cycles. The 150 Iris samples take
  150·60 + 420 = 9420 cycles.

`node_rd`/`node_wr` give each node's read and write strobes, for observation.

**Configuration.** `cfg` is a plain input. No learned network configuration
is built in. Hold `cfg` steady while the batch it applies to is in the array.

## 2. DRAW Turbo-decoder kernel

### Barrel shifter (`barrel_shifter`, `barrel_stage`)
The shifter is a 16-bit logarithmic design with three bypass/shift stages,
which shift by 1, 2 and 4 bits. Stage k acts when bit k of `num_shift` is
set, so shifts of 0..7 are possible. All stages use the same mode:

| `dir` | `arith_logic` | operation |
|-------|---------------|-----------|
| 0 | 0 | shift left, zero fill |
| 1 | 0 | shift right, sign fill (arithmetic) |
| 0 | 1 | rotate left |
| 1 | 1 | rotate right |

Example: CE5B shifted by 1 gives 9CB6 / E72D / 9CB7 / E72D. Shifted by 7 it
gives 2D80 / FF9C / 2DE7 / B79C. `stage1_o` shows the first stage's output.
The shifter is combinational.

### DRPU cell (`drpu_cell`)
A DRPU cell is one processing unit configured as an add, subtract, max or
min of two signed 8-bit metrics. Add and subtract saturate. The result is
registered, so each cell adds one cycle.

### State-metric unit (`alpha_unit`)
Nine cells compute one Max-Log-MAP forward (α) or backward (β) update:

    γ_i = ((S1 ± S2) ± Λ) ± max(0, Λ)
    γ_j = (S1' ± S2') ± max(0, Λ)
    α_m = max(α_i ± γ_i, α_j ± γ_j)

The signs depend on the trellis branch, so they are inputs (`sub_cfg`, one
bit per ± cell, set = subtract). They pass down the pipeline with their
data. Balancing registers let all inputs enter in one cycle, so the result
comes out exactly 5 cycles later, and a new update can start every cycle.
A full 8-state recursion needs eight of these units, which this design does
not instantiate.

### LLR unit (`llr_unit`)
For NS = 8 states, the unit takes α, β and γ for the transitions of the
bit-1 set (index 1) and of the bit-0 set (index 0). The steps are:

1. per transition, α + β, then + γ (2 cycles);
2. a 3-level max tree per set (3 cycles);
3. LLR = max over bit-1 − max over bit-0 (1 cycle).

Latency is 6 cycles, with a new input every cycle. Both trees run in
parallel, which takes 47 cells. A design that shares one tree between the
two sets would need about 23 cells but more cycles.

## 3. Small controllers
- **`comment_filter`**: a Mealy FSM on a character stream. `in_comment` is
  the output of the transition each character takes. It is high for the
  characters of a `//` or `/* */` comment, from the second character of the
  opening delimiter up to (not including) the closing `/` or newline.
  - States: Init 000, R (after a first `/`) 001, S (line comment) 010,
    M (block comment) 011, M2 (after a `*` inside a block comment) 100.
  - In M2 a `*` stays in M2, so `**/` closes a comment.
  - `rst_n` is active low and synchronous. `ch_valid` marks valid
    characters.
- **`uadl_mux`**: an 8-bit 2:1 multiplexer. `select` = 0 picks `d1`.

## 4. Where this design departs from its source, and how far to trust it
- **Nodes are hardwired.** The original node is a small soft processor. It
  runs a program at a multiple of the shift-register clock and polls a
  slot-number input. Here the node is fixed-function logic on the single
  clock, and it takes the slot from the shared phase counter. The
  read/compute/write schedule is the same, but per-node programs are not
  possible.
- **Node-to-slot choices are configuration, not learned.** The learning
  rule and the Iris network's connections are not part of this RTL.
- **One register between columns**, not an extra output register per
  column. This keeps all columns on one phase.
- **The sigmoid formula is this design's.** The source describes it only as
  Em of the value with the MSB used as a sign. The formula above is a fit to
  the published curve.
- **Barrel-shifter modes** are inferred from the published output tables.
- **α-unit signs** are configuration, since the source does not give them
  per branch.
- **LLR size**: the LLR unit computes both sets in parallel to meet the
  6-cycle latency (47 cells). The smaller cell count that the source quotes
  would not meet it.
- **Comment filter**: the state chart sends any non-`/` in M2 back to M,
  while the reference code keeps `*` in M2. The code's behaviour is built.
- **Not built:**
  - the complete SISO decoder with its sliding-window memories;
  - the 3GPP encoder and interleaver;
  - the DRAP processor around the shifter (its ALU, Booth multiplier and
    configuration fields are not specified);
  - the array's configuration, switching and communication units.
- **Arithmetic widths**:
  - 8-bit data throughout the routing channel and the metric datapaths;
  - 16-bit data in the shifter;
  - a 16-bit phase counter (so 3L must stay below 65536).

Every module has a self-checking testbench. It compares against an
independent reference model and checks the latencies above cycle for cycle:
60-cycle column delay, 420-cycle array latency, 5-cycle α and 6-cycle LLR.
`tb_reconfig_top` runs every design in the top at its default size. It
counts each mechanism and fails if any of them never occurs: node reads and
writes, column fill and circulation, an idle period, each shifter mode,
DRPU saturation, and both comment styles. `tb_solar_array` streams 150 Iris-like
samples with idle periods between them.

## 5. Simulating and changing it
List the two packages first, then the testbench. With Verilator 5:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl \
        rtl/solar_pkg.sv rtl/draw_pkg.sv tb/tb_solar_array.sv \
        --top-module tb_solar_array -o sim
    ./obj_dir/sim

`-y rtl` lets Verilator find each module in the file of the same name.
`-Wno-fatal` keeps the remaining width warnings from stopping the build.

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself,
or stops through a watchdog if the design hangs. The full end-to-end run is
`tb_reconfig_top`.

Parameters worth changing:

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `solar_array` | `K` | 4 | nodes per column |
| | `COLS` | 7 | columns (6, 12 and 24 give the other array sizes studied) |
| | `N` | 4 | inputs per batch |
| | `C` | 5 | copy ratio; L = C·N |
| `llr_unit` | `NS` | 8 | trellis states per bit set (a power of two) |
| `barrel_shifter` | `W` | 16 | data width |
| | `STAGES` | 3 | number of stages; shifts up to 2^STAGES − 1 |

The shared types and constants are in `rtl/solar_pkg.sv` (node operation
codes, the `node_cfg_t` struct) and `rtl/draw_pkg.sv` (DRPU operation
codes, the metric type).

`reconfig_top` fixes the array at 4 × 7. To change its size, change the
widths of its `sol_*` ports.
