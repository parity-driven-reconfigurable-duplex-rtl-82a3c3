# Parity driven reconfigurable duplex system

SRAM-based FPGAs keep their logic functions and routing in configuration
memory. A single event upset (a bit flip in that memory) silently changes
what the circuit computes. This design detects such faults with very little
extra logic. It then keeps the system running on a second board while the
faulty part is repaired by partial reconfiguration.

The design has two layers.

* **Parity Waterfall (PWtf).** This layer protects a combinational circuit
  built from LUTs. Modern FPGAs use two-output LUTs (LUT6_2), and a LUT of five
  inputs or fewer leaves the second output (O5) unused. PWtf puts the LUT's
  function XORed with all its inputs on O5. A cascade of XOR "waves" then
  combines these O5 bits with the parity of the circuit's inputs. The result is
  the parity of the circuit's outputs. A single fault in any LUT's content, or
  in any routed branch, makes that parity wrong. One parity checker at the
  outputs therefore detects it. The cost is three extra I/Os (input parity,
  output parity, OK/Fail), and no second copy of the circuit is needed.
* **Duplex system.** Two boards run the same chain of PWtf modules. Each board
  has a checked 2:1 multiplexer that passes its own result while its checkers
  report OK, and the other board's result otherwise. A fault is therefore
  detected and also located, as with triple modular redundancy, but only two
  boards are needed. On each board, a reconfiguration unit repairs only the
  failing partition. An external unit reconfigures a whole board if that
  board's reconfiguration unit is itself suspect.

## Files

| file | contents |
|---|---|
| `rtl/pwtf_pkg.sv` | constants and the two example netlists |
| `rtl/lut6_2.sv` | the two-output LUT with its configuration word as an input |
| `rtl/pwtf_init_calc.sv` | builds the LUT6_2 configuration word of a PWtf cell |
| `rtl/pwtf_lut.sv` | one PWtf cell |
| `rtl/pwtf_block.sv` | a netlist of PWtf cells plus its parity waves |
| `rtl/pwtf_checker.sv` | the parity checker |
| `rtl/pwtf_rm.sv` | reconfigurable module: a block and its checker |
| `rtl/duplex_output_stage.sv` | checker and board multiplexer |
| `rtl/reconfig_unit.sv` | partial-reconfiguration controller of one board |
| `rtl/external_unit.sv` | full-reconfiguration controller for both boards |
| `rtl/pdrds_fpga.sv` | one board |
| `rtl/pdrds_top.sv` | the system: two boards and the external unit |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_pwtf_synthetic.sv`, `tb/pwtf_synth_bench.sv` | fault-coverage test of `pwtf_block` on generated netlists of 40 and 277 LUTs |

## Why the output parity comes out right

Consider the XOR of everything that feeds the waves. That is the input
parity, every cell's O5, and the extra branches described below. Cell *j*
computes `O5_j = f_j ^ (XOR of its input nets)`. Count how often each net
appears in the total:

* A block input appears once through the input parity. It appears once more
  for every LUT pin it drives.
* A LUT output `f_j` appears once through its own O5. It appears once more
  for every LUT pin it drives.

If every net is used an odd number of times, it appears an even number of
times in total and cancels. Here "used" counts LUT pins plus block outputs.
The only terms left are the nets that leave as block outputs. So, without
faults:

    parity_out = XOR of all outputs,     fail = (^out) ^ parity_out = 0

Now change one branch of a net, that is, the value arriving at one LUT pin.
That LUT's O5 changes by `Δf ^ 1`, and its O6 changes by `Δf`. The O6 change
spreads along its own odd-fanout net and returns to the checker as exactly
`Δf`. The net effect is a single inversion of `fail`, whatever the function
does. The same argument covers the other single faults:

* A flipped bit in the upper LUT5 changes O6 only. It behaves like a fault on
  every branch of the output net, and there is an odd number of them.
* A flipped bit in the lower LUT5 changes O5 only.
* A fault on a block input, or on the input parity, is covered too.

So `fail` goes high exactly when the fault is excited, meaning when the
flipped entry is actually read. An error can never reach the outputs
undetected. `tb_pwtf_block` checks this claim exhaustively for every
configuration bit and every branch of both example netlists.

### The routing condition

A net with even fanout would cancel its own error. `pwtf_block` finds every
such net at elaboration and routes one more branch of it straight into a
wave:

* the extra branch of a block input goes into wave 1;
* the extra branch of a level-*l* cell's output goes into wave *l*.

On a real device, the split of such a net must also be placed so that no
single wire segment feeds two branches. That is a place-and-route step and
cannot be expressed in RTL.

### Waves

Cells are given levels: a cell's level is one more than the highest level it
reads, and block inputs are level 0. The waves are then:

    wave[0] = parity_in
    wave[l] = wave[l-1] ^ (O5 of level-l cells) ^ (extra branches of level l)
    parity_out = wave[last level]

Each wave is written as an XOR expression. Synthesis splits it into LUTs.

A cell whose function uses four inputs or fewer has a free I4. It may take the
O5 of an earlier cell (`LUT_CHAIN`). That O5 then reaches the parity through
this cell's O5 and leaves the wave. This saves parity-wave LUTs. Each O5 may
be chained into at most one later cell, and chaining is allowed only when
K ≤ 4.

## LUT contents of a PWtf cell

A LUT6_2 has a 64-bit configuration word:

* `init[63:32]` is the upper LUT5. O6 reads it when I5 = 1.
* `init[31:0]` is the lower LUT5. O5 always reads it.

A PWtf cell ties I5 to 1. It sets the halves as follows.

* **Upper half:** the original k-input table, repeated until it has 32
  entries, so the unused inputs have no effect.
* **Lower half:** the upper half XOR `32'h96696996`. That constant is the
  5-input XOR table, so entry *a* is flipped when *a* has an odd number of
  ones.

Example: the 4-input table `16'h0145` gives the upper half `32'h01450145` and
the lower half `32'h972C68D3`. The word is `64'h01450145_972C68D3`. Some
descriptions print the two halves the other way round. This RTL follows the
primitive's structure: O6 reads the upper half when I5 = 1. `pwtf_init_calc`
does this arithmetic, and every `pwtf_lut` uses it with constant inputs.

## Describing your own circuit

`pwtf_block`, `pwtf_rm` and `pdrds_fpga` take the circuit as parameters. It
must be a netlist of LUTs with at most five inputs each, listed in
topological order.

| parameter | meaning |
|---|---|
| `N_IN`, `N_OUT`, `N_LUT` | sizes |
| `LUT_K[j]` | number of inputs of LUT *j* |
| `LUT_SRC[j][p]` | net driving pin *p* of LUT *j*: `0..N_IN-1` are block inputs, `N_IN+i` is the output of LUT *i* (must be *i* < *j*), `-1` is unused |
| `LUT_INIT[j]` | the LUT's original table (`2^K` entries used) |
| `LUT_CHAIN[j]` | the earlier LUT whose O5 drives I4, or `-1` |
| `OUT_SRC[o]` | net driving output *o* |

The levels, the fanout parity of each net, the extra branches and the wave
contents are all computed from these parameters at elaboration. Each of
these properties is computed once for the whole netlist, so elaboration time
grows roughly with the netlist size; a 277-LUT netlist elaborates in seconds.
An inconsistent netlist stops elaboration with an error. `tb_pwtf_synthetic`
shows how to compute the netlist parameters with constant functions. There,
each row of `LUT_SRC` comes from its own function call.

Two example netlists are in `pwtf_pkg`:

* **`EX1_*`** has 4 inputs, 2 outputs and four 2-input LUTs in two levels.
  Inputs B and the output of the second first-level LUT have fanout 2, so each
  gets an extra branch into the first wave. This is the default of
  `pwtf_block`.
* **`EX2_*`** has 4 inputs, 4 outputs and five LUTs. It includes one chained
  O5 and the table `16'h0145`. It is the default module of the duplex system.

Both netlists, including their LUT functions, are illustrative only.

## The duplex system

```
           board I                                  board II
in ─► RM-1 ─► RM-2 ─► RM-3 ─┬─► checker+mux ─► out   (same)
      │fail   │fail   │fail └────────────────► other board's mux input 1
      └───────┴───────┴─► reconfig unit ─► rp_req / rp_done (config port)
                                 │suspect
                          external unit ─► full_req / full_done
```

* **Modules (RM-1..RM-3)** are `pwtf_rm` instances in a chain. The outputs and
  parity of one module are the inputs of the next. Each has its own checker.
  A parity error made upstream carries through the later waves, so the later
  modules also report Fail.
* **Output stage** (`duplex_output_stage`, partition RP-5) checks the last
  module's result. Its multiplexer input 0 is the local result and input 1 is
  the other board's. It passes the other board's result in any of these
  cases:
  * its own checker reports Fail;
  * any local module reports Fail;
  * a local partition is being repaired;
  * the local reconfiguration unit is suspect;
  * the board is held for full reconfiguration.

  A faulty checker only gives a false Fail, and that only switches to the
  healthy board. All of this is combinational, so the switch happens in the
  same cycle the error appears.
* **Reconfiguration unit** (partition RP-4) runs as follows.
  1. While idle, it samples the Fail signals every clock.
  2. It picks the lowest-numbered failing partition, because errors flow
     downstream.
  3. One clock later it raises the one-hot `rp_req` and holds it until the
     configuration port pulses `rp_done` for one cycle.
  4. One settle cycle follows.

  The unit declares itself *suspect*, and stops, in two cases:
  * The same partition would be repaired twice in a row. A partition that
    fails again right after its repair points to a false report.
  * Its state, kept in two copies that each have their own next-state logic,
    stops matching.

  `suspect` is sticky until reset.
* **External unit** handles suspect boards one at a time, board I first. It
  raises `full_req[b]` until `full_done[b]` arrives, and then waits one
  settle cycle. While `full_req[b]` is high, board *b* is held in reset and
  the other board carries the outputs.

The configuration port itself is outside the RTL. That includes the
bitstreams, the internal configuration access port, and the reading and
writing of frames. `pdrds_top` brings out its request/done handshakes. The
modules are combinational, so no state has to be resynchronised after a
repair.

Counting signal pins only, each board has 21 of them with the default
4-input, 4-output circuit:
* inputs: 4 + 1 (data and parity);
* outputs: 4 + 1 + 1 (data, parity and OK/Fail);
* to the other board: 4 + 1;
* from the other board: 4 + 1.

Clock, reset, the repair handshakes and the fault-emulation inputs are not
counted. That gives 42 pins over two boards, or 22 if both halves sat on one
board, where the links between the halves would not be pins. This matches
the count reported for the same scheme on an 8-pin circuit.

### Fault-emulation inputs

These inputs let a simulation inject faults. Tie them all to 0 in use.

| input | effect |
|---|---|
| `cfg_upset` | XORed into each LUT's configuration word |
| `pin_flip` | inverts one branch of a net where it enters a LUT pin |
| `chk_upset` | inverts an output-stage checker |
| `ru_upset` | flips one bit of one state copy of a reconfiguration unit |

## Interfaces and timing

* All data paths are combinational, with zero latency.
* The control logic (`reconfig_unit`, `external_unit`) is clocked on `clk`
  and has a synchronous, active-low `rst_n`.
* Request timing:
  * `rp_req` rises one clock after a Fail is sampled;
  * it falls one clock after `rp_done`;
  * one settle cycle follows before the next request.
* `full_req` behaves the same way.
* In `pdrds_top`, array index 0 of every two-element port is board I, and
  index 1 is board II.

## Choices made in this design

The method fixes the cell structure, the O5 content, the wave cascade and the
odd-fanout rule. It also fixes the duplex arrangement: two boards, three
modules per board, a checker and a 0/1 multiplexer per board, a
reconfiguration unit and an external unit. Everything below is this design's
own choice.

* **Example circuits.** The circuits and their LUT functions are examples.
  The second-level wiring of `EX1` is chosen to fit the two-level example.
* **Checker.** It is a single OK/Fail wire. It is not a two-rail,
  totally-self-checking checker.
* **Reconfiguration unit.**
  * Repair order: the lowest-numbered failing partition is repaired first.
  * Suspect handling: a second consecutive request for the same partition is
    not carried out; the unit goes suspect instead.
  * Internal checker: implemented as a duplicated, compared state register.
  * Partition numbering: the output stage is a repair target, last in
    `rp_req`.
* **Output multiplexer.** The extra conditions that switch it to the other
  board are this design's additions.
* **External unit.** It holds a board in reset during full reconfiguration
  and serves boards one at a time.
* **Handshakes.** All handshakes, reset styles and settle cycles are this
  design's.
* **Parity waves.** Each wave is an XOR expression rather than hand-placed
  5-input LUTs.

## How far it is verified

Every module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`.

* `tb_lut6_2`, `tb_pwtf_init_calc`, `tb_pwtf_lut`, `tb_pwtf_checker`: these
  are exhaustive or random checks against independently computed values,
  including the `0145 → 01450145 / 972C68D3` example.
* `tb_pwtf_block`, `tb_pwtf_rm`: these run every input vector under every
  single configuration-bit flip and every single branch inversion. `fail` must
  equal "the flipped entry is read". Branch, input and input-parity faults
  must always be flagged. Wrong outputs must never pass unflagged.
* `tb_duplex_output_stage`, `tb_reconfig_unit`, `tb_external_unit`,
  `tb_pdrds_fpga`: these check the select logic, request timing, priority,
  the consecutive-repair rule, upset detection and board serialisation.
* `tb_pdrds_top` runs the full system at its default size. A behavioural
  configuration port repairs partitions and boards. The test applies a random
  input every clock and injects the following faults:
  * LUT upsets in both halves on both boards;
  * a routing fault;
  * a checker fault;
  * a reconfiguration-unit upset;
  * a fault that partial reconfiguration cannot remove.

  Both boards' outputs must stay correct on every clock. The test also counts
  switches, detections, partial repairs, output-stage repairs, suspect events
  and full reconfigurations. Each of these must happen at least once.

* `tb_pwtf_synthetic` repeats the `tb_pwtf_block` checks on three generated
  netlists. Two have 40 LUTs with 4 inputs and 4 outputs, and one has 277
  LUTs with 16 inputs and 17 outputs. These are the sizes of two of the
  small IWLS 2005 benchmarks on which the method is reported to reach full
  fault coverage.
  * Each netlist comes from a hash formula given in the testbench header.
  * The netlists are 12, 15 and 89 levels deep.
  * About a third of the cells chain an O5.
  * Roughly half of the nets have even fanout, most of them unused nets.
  * The bench's reference model evaluates the plain netlist and knows nothing
    about waves.
  * For the 277-LUT netlist, every third configuration bit is flipped under
    24 random input vectors.
  * A stuck-at fault on a branch acts as an inversion whenever it is excited,
    so the branch-inversion checks cover stuck-at faults as well.

  The bench also prints a rough count of the five-input LUTs the waves would
  take: about 42 to 47 % of the circuit. Published figures for real circuits
  are 5 to 20 %. Random netlists have many more unused, even-fanout
  nets and fewer chaining opportunities, so the numbers are not comparable.

What is not covered: the real benchmark circuits. The method has been applied
to the IWLS 2005 benchmark circuits (32 to about 31 000 LUTs). Their netlists
are not part of this design, so none of them has been run. The synthetic
netlists above only match two of them in size.

## Simulating

Use Verilator 5. Run from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/pwtf_pkg.sv \
        tb/tb_pdrds_top.sv --top-module tb_pdrds_top -o sim
    ./obj_dir/sim

Replace `tb_pdrds_top` with any other testbench name; `-y tb` is needed only
by `tb_pwtf_synthetic`, which uses `pwtf_synth_bench`. Every testbench runs in
well under a second, except `tb_pwtf_synthetic`, which builds and runs in
about a minute.
