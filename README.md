# Sequence invariant state machine (SISM)

A synchronous controller whose logic depends only on the *size* of its flow
table (how many states, how many inputs) and never on the sequence it runs.
The flow table is data: a store of destination state codes. Two machines of
the same size differ only in what is written in that store, the way two PLAs
differ only in their programming, but the logic in front of each flip-flop is
the small, regular structure of a multiplexer tree rather than a PLA.

This RTL implements the architecture in parameterised SystemVerilog: a
destination code store, one identical *state bit cell* per state variable
(input switch matrix followed by a binary tree switch), the state
flip-flops, and output-equation logic built from the same cells. The default
build is a six-state, three-input example machine (below).

## How a transition is computed

A flow table has `NUM_STATES` rows (present states `S0..`) and `NUM_INPUTS`
columns (input states `I1..`). Entry `N(s, j)` is the state the machine
enters from `Si` when input `Ij` is present. States are coded in binary in
the order they are declared, `S0 = 0`.

```
 destination codes N(s,j) ──► input switch matrix ──► all next states ──► next state logic ──► Y ──► D FF ──► y
                                    ▲ in_sel (one-hot)        (one per row)        ▲ y (present state)        │
                                                                                   └────────── feedback ──────┘
```

1. **Input switch matrix** (`sism_input_switch_matrix`). The one-hot input
   picks one column of the flow table. For one state bit it outputs, for
   every present state `s`, that bit of `N(s, selected column)`. In silicon
   this is a pass-transistor matrix gated by the input lines; here every row
   is `OR_j (in_sel[j] & code_bit[s][j])`.
2. **Next state logic** (`sism_next_state_logic`). A binary tree of two-way
   switches steered by the present state variables. Exactly one path (the one
   that decodes the present state) connects a row to the output, so the tree
   picks `N(present, selected)`. The least significant state variable steers
   the leaves (it chooses between `S2k` and `S2k+1`); the most significant
   one steers the root.
3. **State bit cell** (`sism_state_bit_slice`). Steps 1 and 2 for one bit.
   Because steps 1 and 2 do not depend on the table's contents, the cell is
   identical for every state bit. `sism_machine` instantiates it
   `STATE_BITS = max(1, ceil(log2(NUM_STATES)))` times. Cell `b` receives bit
   `b` of every code.
4. **State register** (`sism_state_register`). D flip-flops take `Y` on the
   rising edge and feed it back to every cell as `y`.

So the machine makes one transition per clock:
`state(after edge) = N(state, input)`. Both `next_state` and the outputs are
combinational in the present state and the input.

When `NUM_STATES` is not a power of two, the tree still has
`2**STATE_BITS` leaves. The leaves of unused codes read 0, so a state
outside the table leads to state 0. A valid table never reaches such a state.

## Programming the flow table

All codes travel as one flat vector. Entry `(s, j)` sits at bits
`(s*NUM_INPUTS + j)*CODE_BITS +: CODE_BITS`, with `j = 0` for `I1`.

* **Mask.** In the original circuit a programming mask over the input switch
  matrix ties each code bit to power or ground. Here the mask is the
  parameter `NS_MASK`. Reset loads it into the register store
  `sism_dest_codes`.
* **Run-time writes.** This design adds a write port:
  `ns_we / ns_wr_state / ns_wr_input / ns_wr_code` replace one entry on the
  next rising edge. That edge still uses the old entry. Writes outside the
  table are ignored, and an assertion flags a code that is not a valid
  state. Reset puts the mask back.

To program a machine from a flow table, number the states in order of
declaration and pack the rows. The default mask (function
`sism_pkg::flow_table_rotate`) is the example machine, states `a..f = 0..5`:

| state | I1 | I2 | I3 |
|-------|----|----|----|
| a | c | b | a |
| b | d | c | b |
| c | e | d | c |
| d | f | e | d |
| e | a | f | e |
| f | b | a | f |

That is, `N(s, j) = (s + NUM_INPUTS-1-j) mod NUM_STATES`. For other sizes the
default mask uses the same formula. This is only a convenient default.

## Outputs

`sism_output_logic` forms output equations with the same cells, one cell per
output bit, with no feedback and no flip-flop. The present state comes from
the machine's state register, and the cells read a second code store
(`OUT_MASK`, plus the `out_we ...` write port). Output `k` is bit `k` of
the output code `O(present state, input)`, which makes it a Mealy output.
`NUM_OUTPUTS` defaults to 2 and all output codes reset to 0. Both are this
design's choices, because the example machine has no outputs.

## Interface of `sism_machine`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous, active low: state := 0, both stores := masks |
| `in_sel` | in | `NUM_INPUTS` | one-hot input state (asserted one-hot out of reset) |
| `ns_we`, `ns_wr_state`, `ns_wr_input`, `ns_wr_code` | in | 1, idx, idx, `STATE_BITS` | write one destination code |
| `out_we`, `out_wr_state`, `out_wr_input`, `out_wr_code` | in | 1, idx, idx, `NUM_OUTPUTS` | write one output code |
| `state` | out | `STATE_BITS` | present state `y` |
| `next_state` | out | `STATE_BITS` | next state `Y` |
| `z` | out | `NUM_OUTPUTS` | outputs |

Here "idx" is `max(1, ceil(log2(n)))` bits. Parameters: `NUM_STATES` (6),
`NUM_INPUTS` (3), `NUM_OUTPUTS` (2), `NS_MASK`, `OUT_MASK`. At the defaults,
synthesis gives 93 flip-flops: 54 destination-code bits, 36 output-code bits
and 3 state bits.

## Sizes the architecture is shown at

* 6 states × 3 inputs, the example table above: this is the default build.
* 5 states × 3 inputs: the default build can hold this table and leave one
  row unused. `tb_sism_workloads` also runs it as a 5-state instance.
* 8 states × 3 inputs, the general table using all eight codes `S0..S7`: it
  needs `NUM_STATES = 8` (still 3 state bits, 72 code bits).
  `tb_sism_workloads` runs it and checks the general example "from `S1`
  under `I2` go to `N12`".

## What follows the architecture and what is this design's own

These follow the architecture:
* the block structure and data flow;
* one identical cell per state bit;
* the pass-transistor OR input matrix and the tree next-state selection;
* binary state codes in order of declaration;
* D flip-flops with feedback;
* output logic made from the same cells without feedback;
* the example flow table.

These are this design's own choices:
* The circuit is written at logic level, as AND-OR plus a multiplexer tree.
  Pass transistors, transistor sizing and layout are not modelled.
* With no input line high, a row reads 0. With several high, their columns
  are ORed. Electrically the node would float or contend, and an assertion
  flags both cases.
* The code stores are registers loaded from a mask at reset, not
  hard-wired, and they have a run-time write port.
* The reset is asynchronous and active low, to state 0 (the first state
  declared).
* The flat code packing, the value 0 for unused state codes, the number of
  outputs and the output codes.

Not built: the layout-level cells (programmable power and ground
connections, feedback taps as layout) and the layout generator that reads
the flow-table text file.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares
against a reference computed from the stimulus and ends with a
`TB_RESULT checks=N failures=M` line.

* `tb_sism_input_switch_matrix`, `tb_sism_next_state_logic`,
  `tb_sism_state_bit_slice`, `tb_sism_output_logic`: random codes, every
  input column and every state code, including unused codes.
* `tb_sism_state_register`: reset value, reset in mid-cycle, loads.
* `tb_sism_dest_codes`: reset contents against the example table written
  out by hand, random writes (some outside the table) against a reference
  array.
* `tb_sism_machine` uses the default parameters and runs end to end:
  * a fixed walk through the example table;
  * random inputs;
  * single-entry writes while running, for both code stores;
  * reprogramming the whole table to a different sequence;
  * a reset in the middle of the run.

  It checks `next_state` and `z` before every edge and `state` after it. It
  also counts that each input column, each state, self-loops, the wrap from
  `f`, writes, reprogramming, resets and non-zero outputs all occurred.
* `tb_sism_workloads`: the 5-state and 8-state machines described above.

Every testbench fails when its module has a deliberate fault, for example a
transposed matrix index, reversed tree steering or a wrong reset value.

## Simulating

With Verilator 5 (`--timing` for the testbench delays):

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/sism_pkg.sv tb/tb_sism_machine.sv --top-module tb_sism_machine
./obj_dir/Vtb_sism_machine
```

Any other testbench runs the same way. To change the machine, override
`NUM_STATES`, `NUM_INPUTS`, `NUM_OUTPUTS` and give `NS_MASK` / `OUT_MASK`
packed as described above, or write the table through the write ports after
reset.
