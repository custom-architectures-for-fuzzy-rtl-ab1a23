# Fuzzy and neural network controllers in custom hardware

This repository holds synthesizable SystemVerilog for two small controller
architectures that trade speed for area in different ways:

* an **active-rule fuzzy logic controller (FLC)**. It does not evaluate the
  whole rule base. It finds the few membership functions that each input
  actually fires, and visits only the rules built from those. With overlapping
  triangular sets at most two sets per input fire, so a two-input controller
  visits 4 rule combinations however large its rule base is;
* a **time-multiplexed neural network (ANN)**. The hardware for a single
  neuron (an 8x8 multiplier, an accumulator and an activation function)
  computes a whole layered network. A row of data registers, controlled cell by
  cell by a microprogram, feeds the multiplier one value per cycle, and each
  value meets its weight from a circular weight ROM.

The two controllers are independent. `controllers_top` places them side by side
with shared clock and reset. Each keeps its own start/done handshake.

Throughout this text, "the original architecture" means the published design
that this RTL follows. Where this RTL makes its own choices, the text says so.

## Fuzzy logic controller

### Algorithm

Each crisp input `x_i` has `p_i` membership functions (fuzzy sets). One output
has `r` sets. A rule maps one set per input to one output set. One inference
runs these steps:

1. **Fuzzify.** For every input, scan its sets `j = 0..p_i-1`. Each non-zero
   degree `A_ij(x_i)` is stored in a small register bank `RegV_i[ptr]`, with the
   set's identifier in `IdfV_i[ptr]`, and `ptr` advances. Zero degrees are not
   stored.
2. **Infer.** For every combination of stored entries (one per input):
   * add the identifiers to form the rule address;
   * read the consequent output set `ADF` from the rule bank;
   * update `SOP[ADF] = max(SOP[ADF], min(selected degrees))`.
3. **Defuzzify.** For every output set `k`, accumulate
   `N += c_k * SOP[k]` and `D += SOP[k]`. The output is `y = N / D`.

The identifiers are stored pre-scaled by a stride, so the rule address is a
plain sum. The stride of input `i` is the product of the set counts of the
inputs after it. For the default 7x5 controller, input 0 stores `5*j` and
input 1 stores `j`, so the address is `5*j0 + j1`.

### Datapath (`flc_top`)

| block | module | what it holds or does |
|---|---|---|
| MF(x), MF-IDF(x) | `flc_mf_mem` | degree table indexed by `{j, x}`; identifier table indexed by `j` |
| fuzzifier plane | `flc_fuzz_plane` | Address Computing counter; `RegV`/`IdfV` banks (2 entries); AB_ptr mux |
| address maker, rule bank, ADF | `flc_rule_bank` | adder of identifiers; consequent table; ADF register |
| MIN, MAX, SOP | `flc_inference` | min over inputs; max with `SOP[ADF]`; 8 SOP registers; ADF/IND mux |
| Output MF, adders, N, D, Div | `flc_defuzz` | `c_k * SOP[k]`; N and D accumulators; divider; output register |
| control | `flc_control` | microprogram without jumps |

Two multiplexers decide which address a bank uses:

* **AB_ptr = 1**: the RegV/IdfV banks use the computed pointer (fuzzification).
* **AB_ptr = 0**: the banks use `SelV_i` from the control unit (inference).
* **ADF_IND = 0**: the SOP bank uses ADF (inference).
* **ADF_IND = 1**: the SOP bank uses IND from the control unit
  (defuzzification).

### Microprogram and timing

`flc_control` steps through a table of control words, one per cycle, without
jumps. The table is built at elaboration from the sizes:

| words | count (default) | action |
|---|---|---|
| fuzzify | `PMAX` (7) | `j = 0..PMAX-1` to all planes. A plane with fewer sets reads degree 0 beyond its last set. |
| infer | `2 * 2^N_IN` (8) | For each SelV combination: one word loads ADF, the next writes SOP. |
| defuzzify | `R_MF` (7) | `IND = 0..R_MF-1`; accumulate N and D |
| finish | 1 | load `N/D` into `y_o`; clear RegV, IdfV, ADF, SOP, N and D |

* **Start.** A start pulse latches `x_i` and begins a run.
* **Done.** `done_o` pulses when `y_o` holds the new result, 23 cycles after
  the start edge at the default sizes.
* **Back-to-back runs.** If `start_i` is still high during the last word, the
  next inference starts at once. Throughput is then one inference every
  `PMAX + 2^(N_IN+1) + R_MF + 1` cycles.
* **Wrong combinations are harmless.** An input that fires only one set leaves
  its second register at degree 0. A combination that uses that register then
  has minimum 0, and the MAX leaves SOP unchanged.

The ADF register sits between the rule bank and the SOP address. This is why
each combination takes two words.

### Built-in table contents

The original architecture is generated per application, and its tables come
from that application. This RTL fills them with simple, documented formulas:

* **Input sets:** triangles spread evenly over `0..255`, each reaching 255 at
  its centre and 0 at its neighbours' centres.
* **Rules:** a diagonal table, `out = round(mean_i(j_i*(R-1)/(P_i-1)))`.
  Other rules can be loaded with the `RULE_FILE` parameter (`$readmemh`). The
  file holds the tables of all outputs one after the other. Odd-numbered
  outputs use the mirrored table `R-1-out`, so that the outputs differ.
* **Output sets:** centres at `c_k = 255*k/(R-1)`.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `N_IN` | 2 | inputs (fuzzifier planes) |
| `P_MF` | `{7,5,0,0}` | sets per input, first `N_IN` entries used |
| `N_OUT` | 1 | output variables (one rule bank, SOP bank and defuzzifier each) |
| `R_MF` | 7 | sets per output variable |
| `SOP_N` | 8 | SOP registers |
| `XW`, `MUW`, `YW` | 8 | input, degree and output widths |

The defaults are the sizes of the truck backer-upper controller: 35 rules.
The testbenches also run two other sizes:

* an inverted-pendulum controller: `{7,7}`, 49 rules;
* a three-input, three-output autofocus controller: `{3,3,3}`, `R_MF = 3`,
  `N_OUT = 3`.

## Neural network controller

### Circular pipeline (`ann_top`)

```
 x_i ──►┌──────────────┐ row out ┌──────────┐  16 ┌─────┐  ┌────┐  ┌─────────┐
        │ data/results ├────────►│ 8x8 mul  ├────►│ acc ├─►│ AF ├─►│ output  │──► y_o
  ┌────►│ row (L cells)│         │ 16 stages│     └─────┘  └─┬──┘  └─────────┘
  │     └──────▲───────┘         └────▲─────┘                │
  │     microinstruction        weight ROM                   │
  │     (2 bits per cell)      (circular, S_WM)              │
  └──────────────────────────────────────────────────────────┘
```

| block | module |
|---|---|
| data/results row | `ann_data_row` |
| pipelined signed array multiplier | `ann_multiplier` |
| saturating 16-bit accumulator | `ann_accumulator` |
| activation function | `ann_activation` |
| circular weight ROM | `ann_weight_rom` |
| microprogrammed control unit | `ann_control` |
| output register | `ann_output` |

The **row output** is its rightmost cell, `L-1`. Every cycle each cell performs
one of four operations, chosen by its 2-bit field in the microinstruction
register:

| op | cell receives |
|---|---|
| `OP_ROT` (rotate) | the row output |
| `OP_NOP` | its own value |
| `OP_SHIFT` | the value of its left neighbour (cell 0 receives 0) |
| `OP_LOAD` | the activation result, or input `x[in_idx]` |

Rotation plus shifting form a ring. Suppose the rightmost `a` cells hold a
layer's inputs. Give `OP_ROT` to cell `L-a` and `OP_SHIFT` to the cells right of
it. The row output then presents input 0, 1, ..., a-1 on successive cycles, and
after `a` cycles the ring is back in its original order.

The weight ROM advances on every product. Its order is layer by layer, then
neuron by neuron, then input by input. So each value meets its weight.

### Scheduling a layer (the hard part)

Pipeline latency is what complicates the schedule:

* The multiplier takes 16 cycles. It is built from 8 rows of 8 one-bit
  multipliers (AND gates), with two pipeline stages per row.
* The accumulator takes one more cycle.
* The registered activation takes one more cycle.
* So a neuron's result exists `DLY = 18` cycles after its last product left
  the row.

Control tags (`mac`, `first`, `last`) travel through the multiplier with the
operands. The accumulator therefore restarts and finishes at the right product
without any timing knowledge of its own.

`ann_control` builds the microprogram at elaboration from `LAYERS`. The first
`LAYERS[0]` words load input `k` into cell `L-1-k`. Then, for a layer with `a`
inputs and `b` neurons:

1. **Multiply.** The `a*b` product cycles run back to back, one ring rotation
   per neuron.
2. **Store results.** The result of neuron `j < b-1` is loaded into cell
   `L-a-1-j`, left of the ring, in the cycle it leaves the activation
   function.
3. **Realign.** Once the ring is no longer needed, the whole row shifts right
   `a` times. Then the last neuron's result is loaded into cell `L-b`. The `b`
   results now sit in the rightmost cells in the order the next layer's ring
   needs: result `j` in cell `L-1-j`.
4. **Output layer.** The output layer skips steps 2 and 3. Its results are
   written into the output register instead.

A layer therefore needs `a + b - 1` cells: `a` for the ring and `b-1` for
finished results, because the last result is stored only after the ring is
free. The row length is the maximum over all pairs of adjacent levels,
`L = max(N - 1)`. A row that is too short is rejected at elaboration.

For the default 4-4-5-3 network:

| cycles (microprogram words) | action |
|---|---|
| 0-3 | load inputs |
| 4-19 | layer 1 products |
| 25, 29, 33 | hidden results loaded |
| 34-37 | shift |
| 38 | last result of layer 1 loaded |
| 39-58 | layer 2 products |
| 60-72 | layer 2 results loaded |
| 73-76 | shift |
| 77 | last result of layer 2 loaded |
| 78-92 | output-layer products |
| 100, 105, 110 | output register writes |

This is 111 words. `done_o` pulses 112 cycles after the start edge.

### Hopfield networks

A synchronous Hopfield update of `n` nodes is a layer from `n` nodes to the
same `n` nodes. Several updates are therefore a layered net `{n, n, ..., n}`.
Set `S_WM = n*n`, with zero self weights, and the circular ROM reuses the same
weights for every update.

With `ASYNC = 1` the control unit builds an asynchronous program instead, in
which nodes are updated one at a time:

* The `n` states sit in the ring of the rightmost `n` cells. Node `k` is in
  cell `L-1-k`.
* For node `j`, the ring rotates once. This gives `n` products with weight
  row `j`.
* The control then waits `DLY` cycles for the result and loads it straight
  back into cell `L-1-j`. The next node therefore already sees the new state.
* Each node takes `n + DLY` cycles. `LAYERS` is written as `{n, n, ..., n}`,
  where the first entry stands for loading the states and each further entry
  is one sweep over all nodes.
* The last sweep also writes every new state to `y_o`.

For 3 nodes and 4 sweeps this is `3 + 12*21 = 255` words. The testbench runs
a 3-node net both ways.

### Activation function

The activation is a piecewise-linear sigmoid. Every slope is a power of two,
so each segment needs only a shift and an offset:

| \|x\| | y |
|---|---|
| 0-2047 | x >> 5 |
| 2048-4095 | 64 + (x-2048) >> 6 |
| 4096-5119 | 96 + (x-4096) >> 6 |
| 5120-8191 | 112 + (x-5120) >> 8 |
| 8192-12287 | 124 + (x-8192) >> 10 |
| >= 12288 | 127 |

Negative inputs give `-f(|x|)`, so the output range is -127..127. Reading the
result as `y + 128` gives the familiar 0..255 sigmoid shape.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `L` | 8 | row cells |
| `N_LAYERS` | 4 | levels, including the inputs |
| `LAYERS` | `{4,4,5,3,0,0,0,0}` | level sizes, first `N_LAYERS` used |
| `S_WM` | 51 | weights |
| `WEIGHT_FILE` | `""` | `$readmemh` file, two hex digits per weight |
| `ASYNC` | 0 | 1: asynchronous Hopfield program instead of the layered one |

Without a weight file, the ROM holds the built-in formula `w(i) = ((29*i+7) mod 256)
- 128`. A trained network needs its weights in a file, in the order described
above. Data and weights are signed 8-bit values. The accumulator saturates
instead of wrapping.

## How far the RTL follows the original architecture

**FLC: taken from the original**
* the blocks and their connections;
* the control signals SelV, AB_ptr, IND and ADF_IND, with their multiplexer
  polarities;
* two RegV/IdfV entries per input and eight SOP registers;
* the max-min inference and the N/D defuzzification;
* a microprogram without jumps.

**FLC: this design's own choices**
* widths and membership-function shapes;
* rule contents and output-set centres;
* the Output MF as centre times SOP;
* a plain combinational divider (the original leaves the divider open);
* the exact microprogram schedule;
* clearing all banks at the end of every inference.

The schedule takes 23 cycles per inference for the truck controller. The
original reports 22 microinstructions for it, 16 for the pendulum and 14 for
the autofocus controller. Here all three take 23.

The original datapath drawing shows one output variable. For several outputs
(`N_OUT > 1`) this design gives each output its own rule bank, SOP bank and
defuzzifier. These copies share the fuzzifier planes and the control unit.
They run in parallel, so extra outputs cost no extra cycles.

**ANN: taken from the original**
* the circular pipeline;
* 8-bit data with 16-bit products and sums;
* the four cell operations and the 2-bits-per-cell microinstruction;
* the circular weight ROM;
* the activation table;
* the sizing rule `L = max(N-1)`;
* the example network sizes.

**ANN: this design's own choices**
* the microprogram schedule. Published examples of it are partial and do not
  account for pipeline latency;
* the asynchronous Hopfield schedule. The original only states that a
  microprogram updates the nodes one after another;
* the 2-bit codes of the cell operations;
* the two-stages-per-row multiplier pipeline. It does not have the register
  count quoted for the original multiplier;
* accumulator saturation;
* the negative half of the activation function;
* the start/done handshake.

The original also reports implementations with a 16-bit datapath, 10 to 26
inputs and two hidden neurons. Those need a longer row and a wider datapath
than the defaults here. The data width is fixed at 8 bits, because the
activation table is defined for 8-bit outputs. The network shape itself runs
with a longer row: a 10-2-1 net with `L = 11` and 22 weights takes 70 cycles
per decision. The reported frequencies and decision rates of the original
imply far shorter decisions, about `inputs + 5` cycles. This schedule cannot
match that, because it waits out the 18-cycle pipeline at every level.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/ann_pkg.sv rtl/flc_pkg.sv tb/tb_controllers_top.sv --top-module tb_controllers_top
./obj_dir/Vtb_controllers_top
```

Run from the repository root, because `tb/tb_ann_workloads.sv` reads
`tb/hopfield3_weights.hex` by a relative path.

| testbench | what it checks |
|---|---|
| `tb_controllers_top` | Runs both controllers at their default sizes against reference models: 200+10 fuzzy inferences and 30 network decisions, with latencies. Counts one-set and two-set fuzzification, back-to-back inferences, every row operation, both load sources, output writes and saturation. |
| `tb_flc_top` | The fuzzy controller against full evaluation of all rules. |
| `tb_ann_top` | The network against a layer-by-layer integer model. |
| `tb_flc_workloads` | Pendulum sizes (7x7 sets) and autofocus sizes (3x3x3 sets, three outputs). |
| `tb_ann_workloads` | The 4-3-2 network in a 6-cell row; a 3-node Hopfield net with 4 synchronous updates and with 4 asynchronous sweeps; a 10-2-1 network in an 11-cell row. |
| `tb_ann_control` | Follows symbolic node numbers through a model of the row and checks that every product pairs the right node with the right weight slot, for the default network and for an asynchronous 3-node Hopfield program. |
| other `tb_<module>` | One per module, against small models. |

All testbenches are two-state and need no random-constraint solver.
