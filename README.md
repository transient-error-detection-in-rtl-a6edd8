# CFCSP: a control-flow watchdog for off-the-shelf microcontrollers

A transient fault in a program counter, an address line or a memory cell
often shows up as a *control flow error*: the processor jumps somewhere the
program never branches to. This design is a small watchdog processor that
catches such jumps from outside the CPU. It works with any processor and
needs no bus access or debug port. The only link is a set of output-port
pins.

The approach is called *control flow checking by shadow processing*. The
program is split into basic blocks, which are straight runs of code that
are entered at the top and left by a final jump. A few signature writes are
added to every block. The watchdog does not execute the program. It keeps
a "shadow" of where the program should be: a state machine built from the
program's control flow graph (CFG), plus three simpler checks. Any signature
that breaks one of the four rules sets a sticky error output.

The technique targets a small programmable device next to the processor.
The published evaluation used an 8051 microcontroller and an Altera
MAX 7000S. This RTL is plain synthesizable SystemVerilog with no vendor
primitives.

## What the program sends

Each retained basic block is instrumented like this, in this order:

| position | signature | used by |
|---|---|---|
| block start | block ID (unique per block) | execution flow checker |
| | block enter | enter-exit checker |
| | block index (the block's ID again) | block complete checker |
| … block body … | | |
| before the final jump | block index (same value) | block complete checker |
| | block exit | enter-exit checker |
| | the block's own branch/jump | |

Every signature also restarts the time-out timer.

Each signature is one byte on an 8-bit output port, followed by a rising
edge on a strobe pin:

| bits | field | values |
|---|---|---|
| 7:6 | kind | `00` block ID, `01` enter, `10` exit, `11` index |
| 5:0 | value | block ID or index, 1..63; ignored for enter and exit |

The program must put the byte on the port at least one watchdog clock before
it raises the strobe. It must hold the byte until the strobe is low again.
The watchdog synchronises the strobe and the byte with two flip-flops each
(`SYNC_STAGES`), so the processor and the watchdog may run on unrelated
clocks. Each rising edge of the strobe gives exactly one signature.

The port protocol, the byte layout and the 6-bit ID field are choices made
for this RTL. The published technique only says that the watchdog is wired
to the processor's output ports.

## The four checkers

All four checkers see the same signature stream and work independently. An
error in one checker does not stop the others. Every error holds until
`rst_n`.

### 1. Execution flow (`exec_flow_checker`)

This is the main mechanism. The state is the ID of the block the program is
in. State 0 means that no block has run yet. A block-ID signature is legal
only if the CFG has an edge from the current block to the new one. A legal
ID moves the state to that block. Anything else moves to an absorbing error
state: an illegal edge, a repeat of the current block without a self-loop,
or an ID above `NUM_BLOCKS`.

In the published scheme a tool generates a separate FSM description for each
program. Here the CFG is a parameter of one generic module instead:

```
parameter int unsigned NUM_BLOCKS;
parameter logic [NUM_BLOCKS:0][NUM_BLOCKS:0] SUCC;   // SUCC[from][to]
```

Row 0 is the start state. Its only set bit should be the entry block. Bit
`SUCC[r][c]` is set when block `r` may jump to block `c`. The default is the
five-block example program, `cfcsp_pkg::FIG2_SUCC`:

```
start -> 1,  1 -> 2,  2 -> 3,  2 -> 4,  3 -> 5,  4 -> 5,  5 -> 2
```

A block with an empty row is a program end. A self-loop, such as an inner
loop that is one basic block, is a set diagonal bit.

### 2. Enter-exit (`enter_exit_checker`)

This is a three-state machine. **A** means between blocks and accepts only
*enter*, which moves to **B**. **B** means inside a block and accepts only
*exit*, which moves back to **A**. Any other message goes to **Error**. It
catches a jump from the end of one block into the middle of another. That
jump skips the target's block ID, so checker 1 never sees it, but the
target's *exit* then arrives in state A.

### 3. Block complete execution (`block_complete_checker`)

This is a register and a comparator. The first index signature of a pair is
stored. The second is compared with it, and any difference is an error. It
catches a jump from the middle of one block into the middle of another,
where neither a block ID nor an enter/exit pair is out of place.

### 4. Time-out (`timeout_checker`)

This is a counter that every signature restarts. If `TIMEOUT_CYCLES`
watchdog clocks pass with no signature, the checker flags an error. This
catches a stopped processor, or a jump out of the program area, where
nothing is sent at all. The limit should be just above the longest
execution time of any basic block in watchdog clocks. That value depends on
the program and the clocks, so the default of 2048 is only a placeholder.
The timer runs from reset, so a processor that never starts is also caught.

### Which checker catches which jump

| the faulty jump goes … | first caught by |
|---|---|
| from a block's end to the start of a block that is not a CFG successor | execution flow |
| from inside a block back to the start of any block | execution flow (and enter-exit) |
| from a block's end into the middle of another block | enter-exit |
| from the middle of one block into the middle of another | block complete |
| out of the program, or the processor stops | time-out |
| to the start of a legal successor | not detectable by design |

Code between blocks (short blocks left uninstrumented, see below) sends
nothing. A jump into or within such code is caught only when it disturbs
the next signatures.

## Error outputs and timing

`error_reporter` keeps one sticky flag per mechanism (`error_flags`: bit 0
flow, 1 enter-exit, 2 block complete, 3 time-out). `error` is the OR of the
flags. `err_type` (`cfcsp_pkg::err_type_e`) records the mechanism that
detected first, so a result logger can credit each detection to a single
mechanism. If several mechanisms fire in the same clock, the lower bit wins.

Latency, counted in watchdog clock edges from the first edge that samples
the strobe high:

- edge 3: the signature is decoded (`sig_valid`);
- edge 4: the checkers update;
- edge 5: `error`, `error_flags` and `err_type` show the result.

For a time-out, the timer restarts at edge 4 of the last signature.
`error` rises `TIMEOUT_CYCLES + 5` edges after that signature's strobe.

`cur_block` (flow state) and `in_block` (enter-exit state B) are brought
out for observation.

## Top level

`cfcsp_watchdog` holds the receiver, the four checkers and the reporter.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | watchdog clock, asynchronous active-low reset |
| `port_data` | in | 8 | signature byte from the processor |
| `port_strobe` | in | 1 | one rising edge per signature |
| `error` | out | 1 | error detection signal |
| `err_type` | out | 3 | first detecting mechanism (0 = none) |
| `error_flags` | out | 4 | all mechanisms that detected |
| `cur_block` | out | 6 | flow checker state |
| `in_block` | out | 1 | enter-exit checker in state B |

| parameter | default | meaning |
|---|---|---|
| `NUM_BLOCKS` | 5 | number of block IDs (at most 63) |
| `SUCC` | example CFG | successor matrix, as above |
| `TIMEOUT_CYCLES` | 2048 | time-out limit in clocks (placeholder) |
| `SYNC_STAGES` | 2 | synchroniser depth on the port |

At the defaults the design has about 66 flip-flops and a small constant successor table.
That is far below the size of the small CPLD it was meant for.

## Adapting it to a program

1. Split the assembly program into basic blocks and number them 1..N from
   the entry. The number 0 is reserved.
2. Optionally, leave out very short blocks. They are rarely hit by a fault,
   and each instrumented block costs memory and watchdog states. Leaving a
   block out makes its predecessors jump directly to its successors in the
   CFG. For example, dropping blocks 2 and 5 from a graph
   `1->{2,3}, 2->{4,5}, 3->5, 4->6, 5->7, 6->8, 7->8` leaves
   `1->{3,4,7}, 3->7, 4->6, 6->8, 7->8`. The IDs are not renumbered.
3. Insert the five signature writes per block as in the first table.
4. Set `NUM_BLOCKS` and `SUCC` from the CFG, and set `TIMEOUT_CYCLES` from
   the longest block time.

The published evaluation reported an average detection coverage of about
90% on bubble sort, linked-list and matrix-multiplication benchmarks. It
also reported a performance overhead of 42–82% from the signature writes.
Those figures belong to that 8051 setup. The testbenches here do not
reproduce them.

## Departures from the published design, and choices made here

- **One generic FSM**, configured by a parameter matrix, instead of
  HDL generated per program.
- **Port protocol, byte layout and 6-bit IDs** are chosen here.
- **Start state 0** checks that the first block is the entry block. This is
  implicit in the published FSM.
- **Sticky errors** until reset. The published FSMs draw no way out of
  Error. The reset is meant to come from whatever logs the result.
- **Time-out value** is a placeholder (see above). The timer running from
  reset is a choice made here.
- **Error type** (first detector, lower index wins on a tie) is defined
  here. The published system only says that the logger reads the detected
  error type.
- **Index values** are the block IDs. Any value unique to each block would
  do.

Not included, because they are not logic of the watchdog: the target
microcontroller, the fault-injection and result-logging microcontroller,
the host PC, and the software tool chain that finds blocks, builds the CFG,
inserts signatures and produces the checker configuration. The testbenches
stand in for the first two.

## Verification

Each module has a self-checking testbench in `tb/` that compares the module
with a reference model written in the testbench. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `sig_port_rx_tb` | random bytes; one pulse per strobe; exact latency |
| `exec_flow_checker_tb` | random walks with illegal IDs on the 5-block CFG and on the pruned 8-ID CFG; a hand-written edge list is the reference |
| `enter_exit_checker_tb` | random enter/exit streams against a 3-state model |
| `block_complete_checker_tb` | random index pairs with single-bit mismatches |
| `timeout_checker_tb` | longest legal gap, exact expiry clock, stickiness |
| `error_reporter_tb` | random and simultaneous errors; first-type priority |
| `cfcsp_watchdog_tb` | whole watchdog at default parameters. Legal runs take both branches and the loop. Long block bodies stay near the time-out. Directed faults make each mechanism detect, with latency checked. They include a jump back to a block's own start and a jump into the code between two blocks. A random fault campaign of 150 jumps and hangs checks flags and type after every signature. |
| `cfcsp_benchmarks_tb` | three representative CFGs (bubble sort 8 blocks, linked list 7, matrix multiply 9 with a self-loop), made up for this test because the real ones are not published. Each runs to completion fault-free, then takes 200 injected faults with a per-mechanism count. Uses the helper `cfg_program_runner`. |

Running one with Verilator 5 (the package first, each file once):

```
RTL="rtl/cfcsp_pkg.sv rtl/sig_port_rx.sv rtl/exec_flow_checker.sv \
     rtl/enter_exit_checker.sv rtl/block_complete_checker.sv \
     rtl/timeout_checker.sv rtl/error_reporter.sv rtl/cfcsp_watchdog.sv"
verilator --binary --timing --assert $RTL tb/cfcsp_watchdog_tb.sv \
    --top-module cfcsp_watchdog_tb -o sim
./obj_dir/sim
```

For `cfcsp_benchmarks_tb`, also add `tb/cfg_program_runner.sv`. A block
testbench needs only the package and its own module. All testbenches
finish in well under a second. The random stimulus uses `$urandom`, so
`+verilator+seed+N` gives a different run.

Not verified: operation against a real 8051 program and clock, timing
closure on any device, and the published coverage and overhead numbers.

## Files

- `rtl/cfcsp_pkg.sv`: signature and error types, mechanism indices, the example CFG, the default time-out
- `rtl/sig_port_rx.sv`: port synchroniser and signature decoder
- `rtl/exec_flow_checker.sv`, `rtl/enter_exit_checker.sv`,
  `rtl/block_complete_checker.sv`, `rtl/timeout_checker.sv`: the four mechanisms
- `rtl/error_reporter.sv`: error signal, flags and first error type
- `rtl/cfcsp_watchdog.sv`: top level
- `tb/*_tb.sv`: testbenches; `tb/cfg_program_runner.sv` is a testbench helper
