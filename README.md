# An event-driven logic simulation accelerator as a three-stage ring

Event-driven gate-level simulation does three kinds of work. It keeps a queue
of future events ordered by time. It keeps the present value of every node
and knows which gates each node drives. It evaluates gates. This RTL gives
each kind of work its own processing unit with its own private memory. The
units are joined in a ring by one-way FIFO channels, so all three work at the
same time on different parts of the same time step:

```
          events (state updates, fanout requests)
  +-------------+        +-------------+  instruction packets  +-------------+
  | queue unit  | -----> | state unit  | --------------------> |  eval unit  | <-> Eval-2
  | event list, |        | state array,|                       | gate models |     (physical
  | delays, time|        | fanin/fanout|                       |             |      chips)
  +-------------+        +-------------+                       +-------------+
         ^                                                            |
         +------------------ results (schedule / spike check) --------+
```

The structure follows the Daisy MegaLogician accelerator, described in
"Hardware Acceleration of Logic Simulation using a Data Flow Micro
Architecture". The following come from that description:

- the unit partitioning and what each unit holds;
- the two phases of a time step;
- the schedule and spike-check split;
- the command-loading rule;
- the 12-state level/strength values and the transfer-gate example the
  switch models follow;
- the 24-bit word and the 256 × 24 channel FIFOs;
- the one-million-gate capacity.

In the original machine, each unit is a microprogrammed processor card. Its
microcode is not published. Here each unit's tasks are hardwired state
machines instead. The packet formats, the handshakes and the end-of-tick
protocol are this design's own. They are described below.

## Files

| file | contents |
|---|---|
| `rtl/mlsim_pkg.sv` | word, gate, time and state types; opcodes; three-valued evaluation and switch-model functions |
| `rtl/megalogician.sv` | top: three units, three channels, three host input ports |
| `rtl/queue_unit.sv` | event queue, delay table, time control, scheduling and spike check |
| `rtl/state_unit.sv` | state array, gate types, fanin/fanout lists, instruction-packet builder |
| `rtl/eval_unit.sv` | gate models, evaluation, schedule/spike decision, Eval-2 hand-off |
| `rtl/cmd_dispatch.sv` | per-unit command source selection (input port before FIFO) |
| `rtl/sync_fifo.sv` | 256 × 24 channel FIFO |
| `rtl/host_port.sv` | one-word host input port with a full flag |
| `tb/*.sv` | one self-checking testbench per module, a reference simulator and an Eval-2 stand-in |

## Node values

A node value is a level/strength pair packed in 4 bits as `{strength[3:2], level[1:0]}`.

| | encoding |
|---|---|
| level | 0 = `0`, 1 = `1`, 2 = unknown (3 is read as unknown) |
| strength | 0 = forcing, 1 = resistive, 2 = high impedance, 3 = unknown |

This gives the 12 states of a level/strength logic system. The logic gate
models use only the level of each input and always drive a forcing output.
The transfer gate and tristate models (below) also produce the other
strengths.

## One time step

Everything in the ring is driven by the queue unit. A simulation run starts
when the host writes `OP_RUN` with an end time. The queue unit then counts
time up by one per idle cycle until the first event in its list is due. A
time step then goes through two phases.

1. **State update.** The queue unit takes every due event off its list, up
   to `TICK_DEPTH` events. It sends each one as `OP_UPDATE {gate}{state}`.
   The state unit writes the new value into its state array.
2. **Propagation.** The queue unit sends the same gates again as
   `OP_FANOUT {gate}`, followed by an `OP_TICK_END` marker. For each fanout
   request, the state unit walks the gate's fanout list. For every driven
   gate, it reads that gate's fanin list and the fanin states and sends an
   instruction packet to the eval unit. The eval unit computes the gate's
   output and compares it with the gate's present value:
   - **different**: it sends `OP_SCHED {gate}{new state}`. The queue unit
     inserts an event at `now + delay`. The delay is the rise delay for a
     new 1, the fall delay for a 0, and the larger of the two for unknown.
   - **equal**: it sends `OP_SPIKE {gate}`. If the gate has events pending,
     the queue unit removes all of them. A pulse shorter than the gate's
     delay is swallowed, which is inertial-delay behaviour.

Because phase 1 is sent before phase 2 on the same FIFO, every gate is
evaluated with all of this step's updates applied.

**Knowing that a step is finished.** The queue unit cannot ask the other
units for their progress. Instead, the `OP_TICK_END` marker travels through
the state unit and the eval unit behind all of the step's packets, and comes
back on the result channel behind all of the step's results. When the marker
returns, every event of the step has been scheduled. The queue unit then
moves on to the next time. The eval unit holds the marker back until every
packet it passed to Eval-2 has returned.

**Split steps.** Due gates are remembered in a tick buffer of `TICK_DEPTH`
entries. If more events are due than the buffer holds, the step is run in
several passes at the same time. Each pass has its own update phase,
propagation phase and marker. This only happens on very active steps. It can
schedule extra events, and later passes correct them through spike checks.

**Worked example** (checked in the testbenches). The circuit:

| gate | function | inputs | delay | value before t = 100 |
|---|---|---|---|---|
| A | input | – | – | 1 |
| B | input | – | – | 1 |
| C | nand | A, B | 10 | 0 |
| D | nand | A, C | 15 | 1 |
| E | nand | B, C | 12 | 1 |
| G | nand | D, E | 18 | 1 |
| H | buffer | G | 1 | 1 |

Input A falls at t = 100:

| time | update | fanout gates | result |
|---|---|---|---|
| 100 | A = 0 | C, D | C becomes 1 (scheduled at 110); D stays 1 (spike check) |
| 110 | C = 1 | D, E | D stays 1 (spike check); E becomes 0 (scheduled at 122) |
| 122 | E = 0 | G | G stays 1 (spike check) |

## Packets

Every channel word is 24 bits wide. A packet starts with a header word
`{opcode[23:20], gate[19:0]}` and is followed by the data words its opcode
calls for.

| opcode | value | direction | data words |
|---|---|---|---|
| `OP_RUN` | 1 | host → queue | end time |
| `OP_LD_DELAY` | 2 | host → queue | `{rise[23:12], fall[11:0]}` |
| `OP_LD_EVENT` | 3 | host → queue | time, then state |
| `OP_SCHED` | 4 | eval → queue | new state |
| `OP_SPIKE` | 5 | eval → queue | none |
| `OP_TICK_END` | 6 | queue → state → eval → queue | none |
| `OP_UPDATE` | 7 | queue → state | state |
| `OP_FANOUT` | 8 | queue → state | none |
| `OP_LD_GATE` | 9 | host → state | `{type[11:4], state[3:0]}` |
| `OP_LD_FANIN` | 10 | host → state | count, then one gate id per word, in input order |
| `OP_LD_FANOUT` | 11 | host → state | count, then one gate id per word |
| `OP_EVAL` | 12 | state → eval | `{type[23:16], current state[15:12], n[11:8], 0}`, then n input states, six per word, first input in `[3:0]` |
| `OP_LD_MODEL` | 13 | host → eval | model in header `[15:8]`, type in `[7:0]` |

A gate model (`model_t`) has three fields:

- a base function: and, or, xor, buffer of the first input, transfer gate
  or tristate driver;
- an invert bit, which turns these into nand, nor, xnor and not;
- a `pmx` bit, which sends the gate to Eval-2.

Evaluation folds the inputs one per cycle through a three-valued table:

| function | result |
|---|---|
| and | any 0 gives 0, else any unknown gives unknown, else 1 |
| or | any 1 gives 1, else any unknown gives unknown, else 0 |
| xor | unknown if any input is unknown, else parity |

The transfer gate and the tristate driver take input 0 as data and input 1
as control, and produce a full level/strength value:

| control | transfer gate | tristate driver |
|---|---|---|
| 1 | data level; forcing strength drops to resistive, weaker strengths pass | data level, forcing |
| 0 | present level, high impedance | present level, high impedance |
| unknown | unknown strength; the present level if the data level equals it, else unknown | same |

A node that is switched off keeps its level as a stored charge. This is how
a transfer gate feeding an inverter is modelled: the node goes from R1 to
Z1 when the gate turns off, and to U1 when its control is unknown. A stored
charge never decays to unknown here; that would need a timed event.

## Units in detail

### Command loading (`cmd_dispatch`)

Every unit runs "commands": a command word followed by its data words. When
a unit is between commands, the next command comes from the first source
that has a word:

1. the host input port, if it is full;
2. otherwise the input FIFO, if it is not empty;
3. otherwise the unit waits.

The data words of a command are then read from the same source. This is the
command-loading rule of the original processor card. Here the opcode selects
a hardwired task instead of a microcode start address.

### Queue unit

The events sit in a pool of `EV_DEPTH` entries, each `{gate, time, state, next}`:

- Entry 0 marks the end of a list.
- Free entries come from a free list, or from a bump pointer until the pool
  has been used once.
- The event list is kept sorted by time. Insertion walks it one entry per
  cycle. Equal times keep their arrival order.

A per-gate count of pending events answers "does this gate have anything
scheduled?" in one cycle. Only when the answer is yes does a spike check walk
the list to remove the gate's events.

The host sets the gate's rise and fall delays (12 bits each) with
`OP_LD_DELAY`. The same command clears the gate's pending count, so the host
must load the delays of every gate before the first run. Simulation time is
24 bits wide and does not wrap.

A run ends when the list is empty, or when the head event is later than the
end time. `now` is then set to the end time, so runs can be chained. If the
pool is full, the new event is dropped and `pool_overflow` is set.

### State unit

For each gate the unit stores:

- its present state;
- an 8-bit type;
- a base pointer and count for its fanin list (at most 15 entries);
- a base pointer and count for its fanout list (at most 4095 entries).

The lists are packed end to end in two list memories of `LIST_DEPTH`
entries, in the order the host loads them. For an instruction packet, each
fanin state costs one cycle, and each group of six costs one more cycle to
send. The packet also carries the gate's present state, because the eval unit
has no copy of the state array.

### Eval unit and Eval-2

Packets whose model has the `pmx` bit set are for gates modelled by a real
chip. They are forwarded unchanged on `pmx_out_*`, a valid/ready stream. The
physical-model processor (Eval-2) is not part of this RTL. It must return,
for each packet, either `OP_SCHED {gate}{state}` or `OP_SPIKE {gate}` on
`pmx_in_*`. Returned results take priority over new packets. Eval-2 must
accept packets while its results wait to be taken.

## Flow control

All channels are 256 words deep by default. A unit pushes only while its
output channel is not full. The ring cannot lock up, for two reasons:

- The queue unit serves waiting results before it starts any new packet.
- The queue unit starts a packet only when the queue→state channel has room
  for all of it.

So the queue unit always drains the result channel, the eval unit can always
finish, and so can the state unit.

## Host interface

Each unit has a one-word input port. The host writes a word with `*_host_wr`
when `*_host_full` is low. The port is freed as soon as the unit takes the
word. A typical session:

1. Load the models with `OP_LD_MODEL`.
2. For every gate, send `OP_LD_GATE`, `OP_LD_FANIN` and `OP_LD_FANOUT` to
   the state unit.
3. For every gate, send `OP_LD_DELAY` to the queue unit.
4. Send the stimulus with `OP_LD_EVENT`.
5. Send `OP_RUN`, then wait for `running` to fall.

To observe results, use the `trace_*` outputs, which show each state update
as it is applied at time `now`. `rd_gate`/`rd_state` read the state array.
Activity counters report events, schedules, removed events, time steps,
split steps, updates, packets, evaluations and Eval-2 hand-offs.

## Parameters and capacity

| parameter | default | meaning |
|---|---|---|
| `N_GATES` | 2^20 | gates (the original machine: up to one million) |
| `LIST_DEPTH` | 2^22 | entries in each of the fanin and fanout list memories |
| `EV_DEPTH` | 2^16 | event pool entries |
| `TICK_DEPTH` | 2^12 | events per pass of one time step |
| `N_TYPES` | 256 | gate models |
| `FIFO_DEPTH` | 256 | words per channel (as in the original machine) |

Only `N_GATES` and `FIFO_DEPTH` come from the original design. The other
sizes are this design's choices. A million gates with the typical fanout of
2.5 per gate need about 2.5 M entries in each list memory, so 4 M entries
leave room to spare. Smaller designs fit easily. The event pool holds
events that are scheduled but not yet due. The original machine measured
0.13 to 1 event per 1000 gates per time step on large circuits. For a
million gates that is up to about 1000 new events per step. With delays of
about 20 steps, some 20,000 events are pending, well inside 2^16. Much longer
delays at that activity would fill the pool; `pool_overflow` then reports
the lost event. The evaluations quoted for
the original machine came from designs of 250 and 35,000 gates.

All tables are plain arrays with combinational reads, written for clarity
rather than for a particular RAM. On an FPGA or ASIC, the large tables
(state, types, list pointers, lists, delays, event pool) would become
synchronous RAMs, and the controllers would need one more wait state per
read.

## Departures from the original machine

- **Hardwired controllers instead of microcode.** The original cards share
  one microprogrammed datapath. That datapath has a 16K × 36 control store,
  a 14-bit microaddress, 8 × 24 registers, a 24-bit ALU and a memory address
  generator. None of these is built: without the microinstruction format and
  the microcode, they would be guesswork. Cycle counts therefore differ from
  the published ones:
  - collecting fanins: about 100 clocks per update in the original;
  - evaluating a gate: 40 clocks in the original, 3 + n cycles here;
  - scheduling an event: about 70 clocks in the original;
  - a spike check: 15 clocks in the original.
- **Only simple gates are evaluated.** Logic gates, the transfer gate and
  the tristate driver are built. Memories, PLAs, latches, flip-flops,
  timing checks and the functional/behavioural model interpreters are not
  modelled. Nor is the resolution of wired nodes with several drivers.
- **A spike check removes the pending events.** The original only says that
  the queue unit checks whether an event is pending. Removal (inertial
  delay) is this design's reading.
- **An unchanged output is not scheduled.** In the worked example, a gate
  whose new output equals its present value (D at t = 100) gets a spike
  check instead of an event.
- **New to this design:** the end-of-tick marker, the split steps, the
  per-gate pending count, the packet formats, the single clock and the
  synchronous active-low reset.
- **Outside this RTL:** Eval-2 and the host workstation.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mlsim_pkg.sv tb/ml_tb_pkg.sv tb/tb_megalogician.sv --top-module tb_megalogician
./obj_dir/Vtb_megalogician
```

| testbench | what it shows |
|---|---|
| `tb_megalogician` | Runs the worked example and a random 400-gate circuit with every gate type (transfer gates and tristates included), up to 8 inputs, Eval-2 gates and a 20-event burst. Uses 16-word channels and an 8-event tick buffer. Every state update must match the reference simulator in `tb/ml_tb_pkg.sv` in time, gate, value and order, and so must the final state of every gate. Scheduling, spike removal, step splitting, channel back-pressure and Eval-2 hand-off must each occur. |
| `tb_megalogician_full` | Runs the same two circuits with every parameter at its default. |
| `tb_queue_unit` | Event ordering, step splitting, delay selection, spike removal and pool overflow. The testbench plays the rest of the ring. |
| `tb_state_unit` | Table loading, update trace and exact instruction packets under random output stalls. |
| `tb_eval_unit` | All gate types with 1–15 inputs (transfer gates and tristates with two, over random strengths), Eval-2 ordering against the tick marker, a rate of 7 cycles per 4-input packet, and hand-worked transfer gate and tristate cases (R1, Z1, U1). |
| `tb_cmd_dispatch`, `tb_sync_fifo`, `tb_host_port` | The building blocks. |

The reference simulator is ordinary behavioural code: a sorted event list
with the same time-step rules. Tests that use Eval-2 gates need
`tb/eval2_model.sv`, a stand-in whose "chip" is a three-input majority gate.
