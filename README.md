# Reconfigurable computing: an event-oriented accelerator and a 1-bit processor array

This RTL holds two separate hardware designs from a study of how to use
reconfigurable computing systems. They share nothing but a reset and sit side
by side in the top module `rc_top`.

1. **Event-oriented computing (EOC) accelerator** (`eoc_system`). Event-driven
   programs follow the event-condition-action model. A change of a variable is
   an event. The event makes a set of conditions be evaluated. Each condition
   that comes out true starts an action on the processor, and the action
   changes variables again. The conditions are many, simple and independent,
   so they run in parallel hardware. Only a few of them fire in a round, so
   the accelerator sends back only those. The link to the processor then
   stays short of traffic, and it would otherwise be the bottleneck of such
   hybrid systems. The conditions built here are those of an artificial-life
   simulation: 32 organisms, and for each one the question "is another
   organism within a threshold distance, and which is the closest?".
2. **Reconfigurable 1-bit processor array** (`rpa_array`). It is a grid of
   bit-serial processor elements (PEs) that add, subtract, shift or pass
   bits. Short wires join each PE to its neighbours. Long wire segments let
   a PE reach PEs up to `DIST` away, and a segment starts at every `STEP`-th
   PE. Delay buffers in each PE line up words that took paths of different
   lengths.

---

## Part 1: the EOC accelerator

### One round

```
 CP ──write 32 variables, commit──► VRF ──snapshot──► RLs (32 comparators) ──flags+data──► RTT ──one unit at a time──► CP
     (clk_vrf, 200 MHz)                              (clk_rl, 61.5 MHz)                  (clk_rtt, 80 MHz)
```

| block | module | job |
|---|---|---|
| Variable register file (VRF) | `eoc_vrf` | One register per variable (`organism_t`: sex, x, y). The processor (CP) writes it one entry per transfer and then commits. All entries leave in parallel. |
| Reconfigurable logic (RLs) | `eoc_rl_array` + 32 × `eoc_comparator` | Evaluates all 32 conditions in lockstep. |
| Result-transferring tree (RTT) | `eoc_rtt` | Passes on only the conditions that fired, each with its additional data, to a queue that the CP reads. |
| synchronizer | `eoc_cdc_sync` | Carries the handshake toggles between the three clocks. |

The CP and its bus are not part of the RTL. The top brings out the CP's
write port (on `clk_vrf`) and read port (on `clk_rtt`). The testbenches hold
a behavioural CP that runs the artificial-life loop.

### Comparator modules: 4 distance units, 8 steps

Each comparator module (`SELF` = 0…31) has four distance units and four
running-minimum registers, one per lane. In step `s` (0…7), lane `k`
computes the Manhattan distance `|Δx|+|Δy|` from organism `SELF` to organism
`s + 8k`. Step 0 therefore looks at organisms 0, 8, 16 and 24, and step 1 at
1, 9, 17 and 25. The module skips its own index. After eight steps a narrow
step keeps the smallest of the four lane minima. In the same cycle it sets
`flag = (distance <= threshold)` and keeps the index of the closest organism
as the additional data. When two distances tie, the smaller index wins.

The sequencer in `eoc_rl_array` needs **10 cycles per round**: one
acknowledge cycle, eight steps and one narrow step. At 61.5 MHz that is
162.6 ns, which matches the published estimate. In the acknowledge cycle
the RLs copy all VRF entries into local registers. The CP may therefore
rewrite the VRF while the evaluation is still running.

### The result-transferring tree (the part to understand)

With `N = 32` conditions, the tree is a heap of registers:

```
            queue[3] ──► CP      (cp_valid / cp_idx / cp_adata, cp_ready)
            queue[2]
            queue[1]
            queue[0]  = root, fed by the top merge
           /        \
        node 2     node 3         2 buffer registers
        ...                       4, 8, 16 buffer registers
   leaf 32 ... leaf 63            flag + data registers, leaf 32+i holds condition i
```

* **Acknowledge cycle.** A result set is offered by the RLs. When every leaf
  is empty, the tree loads all 32 flag and data registers at once and
  acknowledges.
* **Sieving.** In every cycle, a register that is **empty at the start of the
  cycle** takes a unit from one of its two children, and that child becomes
  empty. Units whose flag is 0 never move, so they cost nothing. If both
  children hold a unit, the **left child wins**. The left child carries the
  smaller condition index. A register that holds a unit takes nothing new in
  that cycle, even if it hands its own unit on in the same cycle. Throughput
  near a congested node is therefore one unit every two cycles. That is
  plenty, because the CP link is far slower. The first unit still gets
  through in the shortest possible time.
* **Queue.** The top merge writes into `queue[0]`. Units shift down the
  four queue registers by the same rule, and the CP reads `queue[3]`.
* **Latency.** The first unit appears at the queue end **8 cycles after the
  acknowledge cycle**: four merge levels plus the root merge (that is
  log2 32 = 5), then three queue shifts. Counting the acknowledge cycle, this
  is 9 cycles, or 112.5 ns at 80 MHz. This matches the published estimate,
  and `tb_eoc_rtt` checks it to the cycle.
* **A unit** is `{idx, adata}`. `idx` is the index of the condition that
  fired, so the CP knows which action to run. `adata` is the index of the
  closest organism.
* **End of a round.** `set_done` pulses for one cycle once everything the
  tree has taken has been read, even if that was nothing. If the CP commits
  again before reading everything, the next result set waits in the RLs
  until the leaves are free. The two sets then share one `set_done`.

### Clocks and handshakes

The three blocks run on unrelated clocks. Every crossing is a toggle
request and acknowledge pair through a two-flop synchronizer, and data
crosses only while the handshake holds it stable:

* VRF → RLs: `commit` flips `req_tgl` and raises `cp_vrf_busy`. The RLs take
  the snapshot and flip `ack_tgl`. `busy` falls 2 to 3 `clk_vrf` cycles
  later. Writes or commits while `busy` are ignored, and an assertion flags
  them.
* RLs → RTT: `res_req_tgl` flips at the narrow step. The results stay frozen
  until the tree's acknowledge has come back. A new VRF request waits until
  then.

So from commit to the first result, add to the 10 + 9 working cycles up to
about 3 cycles of synchronizer latency at each crossing. `tb_eoc_system`
checks the measured time against that budget.

### Processor interface

1. Wait for `cp_vrf_busy == 0`. Write the variables with `cp_wr_en`,
   `cp_wr_addr` and `cp_wr_data`. Each write is visible the next cycle.
2. Pulse `cp_commit`.
3. On `clk_rtt`, read units while `cp_valid && cp_ready`, until
   `cp_set_done` pulses.
4. Run the update actions and go back to step 1.

`threshold` (9 bits, Manhattan distance) is a static setting. Change it only
while the accelerator is idle.

---

## Part 2: the 1-bit processor array

### Processor element (`rpa_pe`)

Words are bit-serial, least significant bit first, `W` = 16 bits long.
Each cycle the PE does the following:

1. It picks operand `a` and operand `b` from its `NIN` input wires with
   `sel_a` and `sel_b`, and delays each by `dly_a` or `dly_b` cycles
   (0…32) in a shift-register buffer.
2. It computes one result bit:

   | `op` | result |
   |---|---|
   | `OP_NOP` | 0 |
   | `OP_PASS` | `a` (bridging a wire through the PE) |
   | `OP_ADD` | `a + b`, with the carry cleared at the word start |
   | `OP_SUB` | `a + ~b + 1`, with the carry set at the word start |
   | `OP_SHL` | `2a`: the previous bit of `a`, and 0 at the word start |

3. It registers the bit, so every PE adds one cycle, bridging ones
   included. It then delays the bit by `dly_out` (0…32) before driving `y`.

The word start is the cycle in which the array's global `bit_cnt` equals
the PE's `phase`. **Rule for mapping:** if the operands' bit 0 arrives at
the PE's inputs in cycle `t0`, then `dly_a` and `dly_b` must make both
operands arrive at `t0 + d` together, and `phase` must be
`(t0 + d) mod W`. The result's bit 0 then leaves `y` at `t0 + d + 1 + dly_out`.

### Wiring (`rpa_array`)

* **Short wires.** PE inputs 0, 1, 2 and 3 are the outputs of the N, E, S and
  W neighbours. At the array edge these inputs come from `n_in`, `e_in`,
  `s_in` and `w_in`, and the edge PEs drive `n_out`, `e_out`, `s_out` and
  `w_out`.
* **Long wires.** In every row, a segment starts at each column
  `m·STEP` and covers columns `m·STEP … m·STEP+DIST`. Columns work the same
  way. Each PE is passed by `L = ceil((DIST+1)/STEP)` row segments and `L`
  column segments. With the default `DIST = 5, STEP = 1`, `L = 6`, so
  `NIN = 4 + 2L = 16`. PE input `4+j` is the row segment that starts at
  column `(c/STEP − j)·STEP`, and input `4+L+j` is the column segment chosen
  the same way. A PE drives segment `j` when its `drive_row[j]` or
  `drive_col[j]` bit is set. The segment value is the OR of its drivers, so
  a configuration must enable at most one driver per segment.
* **Configuration.** Write one PE per cycle with `cfg_we`, `cfg_addr`
  (= `r·COLS + c`) and `cfg_data`. The layout runs from the top bit down:
  `{op[3], sel_a[SELW], sel_b[SELW], dly_a[6], dly_b[6], dly_out[6], phase[log2 W], drive_row[L], drive_col[L]}`.
  At the default size this is 45 bits. Reset clears every PE to `OP_NOP`.
* **Framing.** `bit_cnt` counts 0…W−1. `sync` restarts it at 0, so that
  the edge inputs can be fed in step with it.

The default size is 19 × 19 PEs. It is large enough for the largest mapping
reported for this architecture: a 70-node data-flow graph on 19 × 19 PEs
before optimization. The testbenches do not run those benchmark graphs. They
run a small graph instead: an add with an input delay, a shift and a
subtract. Its result is then carried across the array by pass-through PEs on
row and column long wires. This covers every feature a placed graph uses:
operations, delay buffers, phases, short wires and both kinds of long wire.

---

## Design choices and departures

The following points are not fixed by the source. They are this design's
own choices:

* the coordinate width (8 bits per axis);
* the three-clock handshakes and the snapshot copy in the RLs;
* the CP read and write protocol (valid/ready, `set_done`, `idle`);
* the index carried with each unit;
* tie-breaking by the smaller index, and an inclusive threshold;
* asynchronous active-low reset everywhere.

In the array, the following are also this design's own:

* the word length (16 bits);
* the array size;
* the operation encoding and the configuration port;
* the wired-OR long segments;
* the global bit counter with a phase in each PE.

Where the source describes the behaviour, this RTL follows it:

* the 4-unit, 8-step comparator schedule;
* the tree with left (smaller index) priority, registers that accept only
  when empty, four queue registers, and the 10-cycle and 1 + 8-cycle timing;
* PE add, subtract and shift, one cycle per bridging PE, and in/out buffers
  of up to 32 cycles;
* long wires set by distance and step.

The reconfigurable logic is fixed logic for the artificial-life conditions.
Loading other condition sets, and the context switching of "virtual
hardware" used when conditions do not fit, would need an FPGA fabric and
are not modelled. Multiply and right shift are not PE operations here. The
PE set only covers add, subtract, shift and pass.

## Not included

* The core processor, the PCI-class bus that links it to the VRF and RTT,
  and the I/O elements and I/O controllers around the processor array. Only
  their roles are known. The processor array brings its edge wires out as
  ports instead.
* The online FPGA task placer and the placement-and-routing algorithm for
  the processor array. These are software.

## Files

| file | content |
|---|---|
| `rtl/eoc_pkg.sv`, `rtl/rpa_pkg.sv` | shared constants and types |
| `rtl/eoc_system.sv` | EOC accelerator top (VRF + RLs + RTT) |
| `rtl/eoc_vrf.sv`, `rtl/eoc_rl_array.sv`, `rtl/eoc_comparator.sv`, `rtl/eoc_rtt.sv`, `rtl/eoc_cdc_sync.sv` | its blocks |
| `rtl/rpa_array.sv`, `rtl/rpa_pe.sv`, `rtl/rpa_delay.sv` | processor array, PE, delay buffer |
| `rtl/rc_top.sv` | both designs side by side |
| `tb/tb_*.sv` | one self-checking testbench per module. Each prints `TB_RESULT checks=N failures=M`. |

## Simulating

All testbenches are self-checking and run with plain Verilator 5:

```sh
# one block, e.g. the result-transferring tree
verilator --binary --timing --assert -Irtl -y rtl rtl/eoc_pkg.sv rtl/eoc_rtt.sv tb/tb_eoc_rtt.sv --top-module tb_eoc_rtt
./obj_dir/Vtb_eoc_rtt

# the full design at default size (about a minute to build, a second to run)
verilator --binary --timing --assert -Irtl -y rtl rtl/eoc_pkg.sv rtl/rpa_pkg.sv rtl/rc_top.sv tb/tb_rc_top.sv --top-module tb_rc_top
./obj_dir/Vtb_rc_top
```

What the tests cover:

* `tb_eoc_comparator`: closest index, distance and flag against brute
  force, including ties and coincident organisms.
* `tb_eoc_rl_array`: all 32 results, the 10-cycle round, and holding
  results until the tree takes them.
* `tb_eoc_rtt`: exactly the fired units, each once; the 8-cycle first-unit
  latency; empty sets, full sets, back-to-back sets and a slow reader.
* `tb_eoc_vrf`, `tb_eoc_cdc_sync`: writes, busy and the handshake.
* `tb_rpa_pe`: every operation with random delays and phases, bit for bit
  against a word-level reference.
* `tb_rpa_array`: the graph `(a+b) − 2c` over short wires, then over row and
  column long-wire hops with `DIST = 3, STEP = 2`.
* `tb_eoc_system`: the artificial-life loop end to end on three clocks.
  Every unit is checked, and each mechanism is made to happen at least
  once: a round with no hits, a round where all 32 fire, sibling priority,
  back-pressure, a busy VRF, and the RLs waiting for the tree.
* `tb_rc_top`: both designs at default parameters.
