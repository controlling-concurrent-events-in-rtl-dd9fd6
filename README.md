# Buffered event handling for IEC 61499 function blocks in synchronous logic

IEC 61499 describes control software as a network of function blocks (FBs)
that talk through *events* (instantaneous triggers) and *data*. An event that
reaches an input is meant to trigger exactly one execution of the block. In
software the events naturally arrive one after another. In a clocked FPGA
design, time is cut into clock cycles, so two things happen that the standard
never has to deal with:

* **Simultaneous events.** Two different events (say ADD and SUB) can arrive
  in the same clock cycle. Both must run, one after the other, and some order
  has to be chosen.
* **Event fan-in.** Several source blocks may drive the same event input. If
  two of them fire in the same cycle, an OR of their outputs would merge two
  events into one.

This RTL solves both problems with an **input event ring buffer** in front of
every function block. Each event source gets its own one-bit wire into the
buffer, even when several wires carry the same event type. The buffer can
store all the events of one clock cycle, in a fixed wire order, and it stores
each event together with the data values present at that moment. A separate
**Execution Unit (ExU)** then takes the events out of the buffer one per clock
cycle. It runs the block's state machine and algorithm on each one.

The example is the one the design was built around: a *BasicCalculator*
block with events ADD and SUB, data inputs `a` and `b` (16-bit INT), output
event DONE and result `x`. The top level, `composite_calculator`, wraps this
calculator in a *composite* FB. A composite FB is a container with its own
event buffer, which shows what nesting costs in latency.

## Event and clock conventions

* An event is a one-cycle high pulse on a one-bit wire. An event that happens
  twice in a row keeps the wire high for two cycles. DONE follows the same
  rule: it stays high for N cycles when N events are executed back to back.
* **Both clock edges are used.** Event buffers store their inputs on the
  **falling** edge. Execution Units run on the **rising** edge. An event
  driven by an ExU at a rising edge is therefore caught by the next block's
  buffer half a cycle later. The receiving ExU executes it half a cycle after
  that. The split keeps "collect events" and "execute events" apart inside
  one cycle.
* Reset is the active-low asynchronous `rst_n`. It empties every buffer,
  clears the overflow flags, puts the state machine in RDY and sets `x` to 0.

## The event ring buffer (`event_ring_buffer`)

This block is the core of the design, and its exact behaviour matters most to
anyone who connects to it.

**Input wires.** The buffer has `N_INS` event wires. The parameter
`WIRE_TYPE` holds one byte per wire, wire 0 in the low byte, giving that
wire's event type. By default `N_INS = N_TYPES * FANIN` and the wires are
grouped by type, so wire `i` carries type `i / FANIN`. With
`N_TYPES = 2, FANIN = 2` the wires are ADD_1, ADD_2, SUB_1, SUB_2. Uneven
fan-in takes an explicit map. For example, one source driving events a and b
and a second driving a, b and c gives five wires a_1, a_2, b_1, b_2, c with
`WIRE_TYPE = {8'd2, 8'd1, 8'd1, 8'd0, 8'd0}`. A single data bus `data_in` is
stored with every event.

**Storing (falling edge).** The buffer walks the wires from index 0 upward,
inside one `always_comb` loop. For each active wire:

1. If `N_PAR_WRITES` events have already been stored in this cycle, or if
   the slot after the head is the tail slot (`head + 1 == tail`, so the
   buffer is full), the event is dropped and the sticky `overflow` flag is set.
2. Otherwise `{type, data_in}` goes into the slot at the head, and the head
   moves on by one. After slot `DEPTH-1` it wraps to slot 0.

Several events in one cycle therefore fill consecutive slots. The head
pointer moves by the number of events stored.

**Order of simultaneous events.** Wire index sets the order. In the
calculator the ADD wires come before the SUB wires. ADD and SUB arriving
together are stored as ADD then SUB, so ADD is executed first. The standard
does not say which order is correct. Any fixed order is a design decision
that can change results, and it is worth documenting for each block.

**Capacity.** One slot always stays empty, so that a full buffer can be told
apart from an empty one. A buffer of `DEPTH` slots holds at most `DEPTH - 1`
events. With the default `DEPTH = 4` and four event wires, four simultaneous
events into an empty buffer store three and flag one overflow. Use
`DEPTH = 5` if four must fit.

**Reading.** The consumer owns the tail pointer and drives it in on
`tail_ptr`. The buffer returns the tail entry combinationally on
`rd_type` / `rd_data`, with `rd_valid = (head != tail)`.

**Cost.** The write logic grows with the number of events that can be stored
per cycle. Each slot's input multiplexer has to consider every wire that
could land in it. `N_PAR_WRITES` lets you trade capacity per cycle against
area.

## The calculator's Execution Unit (`calc_exu`)

On every rising edge the ExU does one complete execution step:

1. It takes the data kept from the previous step (its own copy of `a`, `b`).
2. If the buffer is not empty, it takes the tail entry and advances the tail
   pointer.
3. It overwrites only the data inputs that belong to the event (the IEC
   61499 `WITH` association). Both ADD and SUB carry `a` and `b`. The masks
   are in `iec61499_pkg` (`CALC_WITH_ADD`, `CALC_WITH_SUB`).
4. It runs the Execution Control Chart (ECC) and the algorithm of the new
   state.
5. It keeps the updated data for the next step.
6. It registers the outputs `done` and `x`.

The ECC has three states:

```
        RDY --SUB (priority 1)--> SUB : x = a - b, DONE
        RDY --ADD (priority 2)--> ADD : x = a + b, DONE
        ADD --1--> RDY,   SUB --1--> RDY
```

The unconditional `1` transitions back to RDY and the next event's
transition out of RDY happen in the same clock edge. As a result, queued
events execute one per cycle. With nothing queued the state is RDY, DONE is
low and `x` keeps its last value. For example, ADD with `a = 10, b = 5`
stored at a falling edge gives state ADD, DONE high and `x = 15` at the next
rising edge. One cycle later the state is RDY again and DONE is low.

The ExU keeps its own copy of the data inputs because an algorithm is
allowed to change them. The buffer keeps the data as it was when each event
arrived. Together, these two copies give each event the data that belongs to
it, even when the inputs have changed by the time the event runs.

## The composite block (`cfb_exu`, `composite_calculator`)

A composite FB has the same ring buffer in front of it. Without one, it would
lose simultaneous or fanned-in events. Its Execution Unit (`cfb_exu`) does
no computation. On each rising edge it takes one buffered entry, raises the
inner block's matching event wire for one cycle, and drives the stored data
to the inner block's data inputs.

`composite_calculator` contains one buffer (FANIN = 2), one `cfb_exu`, and
the `basic_calculator` (FANIN = 1, driven only by the `cfb_exu`). The
calculator's DONE and `x` are the top's outputs directly. Output events are
not buffered.

Latency of one event through the top:

| edge | what happens |
|---|---|
| falling n | event stored in the CFB buffer |
| rising n | `cfb_exu` forwards it (inner event wire high) |
| falling n+1 | calculator buffer stores it |
| rising n+1 | calculator executes: DONE high, `x` valid |

This is exactly one clock cycle more than the bare calculator. Every further
level of nesting adds another cycle. The inner calculator buffer receives at
most one event per cycle and executes one per cycle, so it cannot overflow.
Only the outer buffer can overflow.

## Files and parameters

| file | contents |
|---|---|
| `rtl/iec61499_pkg.sv` | INT type, event and ECC-state enums, calculator data record, WITH masks |
| `rtl/event_ring_buffer.sv` | generic event ring buffer |
| `rtl/calc_exu.sv` | calculator Execution Unit (ECC + algorithms) |
| `rtl/basic_calculator.sv` | buffer + ExU = the BasicCalculator block |
| `rtl/cfb_exu.sv` | generic forwarding Execution Unit of a composite block |
| `rtl/composite_calculator.sv` | top: composite block around the calculator |

| parameter | default | meaning |
|---|---|---|
| `DEPTH` | 4 | buffer slots (holds `DEPTH-1` events) |
| `N_PAR_WRITES` | 4 | events stored per clock cycle |
| `FANIN` | 2 (top), 1 (calculator) | wires per event type |
| `N_TYPES`, `DATA_W` | 2, 32 | generic buffer/ExU sizes; fixed by the package for the calculator |
| `N_INS`, `WIRE_TYPE` | `N_TYPES*FANIN`, grouped | buffer wires and their event types (at most 64 wires) |

Besides the functional ports, the top brings out both buffers' head and tail
pointers, both overflow flags and the calculator's ECC state.

## Simulating

Every testbench in `tb/` checks itself. Each one prints a line
`TB_RESULT checks=N failures=M` and stops on its own, or when its watchdog
expires. Example with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -yrtl \
    rtl/iec61499_pkg.sv tb/tb_composite_calculator.sv \
    --top-module tb_composite_calculator -o sim
./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_event_ring_buffer` | queue model against three instances: 4 slots with 2×2 fan-in wires; 8 slots limited to 2 writes per cycle; 6 slots with the uneven map a_1, a_2, b_1, b_2, c. Covers order, head/tail, wrap, overflow and the write limit. Also the sequence SUB, then ADD+SUB (head 0 → 1 → 3). |
| `tb_calc_exu` | ECC, algorithms, tail pointer and DONE/`x` timing. Includes the ADD 10 + 5 = 15 step. |
| `tb_cfb_exu` | one-hot forwarding of three event types, data, tail pointer |
| `tb_basic_calculator` | whole calculator against a cycle-accurate model. Covers simultaneous events (ADD first), two-cycle DONE and overflow. |
| `tb_composite_calculator` | the top at its default parameters against a two-level cycle-accurate model. Checks the extra cycle of latency and counts simultaneous events, fan-in, overflow, back-to-back execution, both algorithms and pointer wrap. Each must occur at least once. |

Each run takes well under a second.

## Where this RTL makes its own choices

* **Algorithm assignment.** The calculator's behaviour is x = a + b for ADD
  and x = a − b for SUB. The original ECC diagram of this example attaches
  ALG_ADD to state SUB and ALG_SUB to state ADD, which contradicts that
  behaviour and the published ADD waveform (10 + 5 = 15). The RTL follows
  the behaviour.
* **Edge of the composite ExU.** `cfb_exu` runs on the rising edge, like
  every ExU here. One timing description of the composite case places its
  read on a falling edge. Either way the result is one extra clock cycle.
* **Wire-to-type map.** The type of each buffer wire is a parameter
  (`WIRE_TYPE`). Its default gives every type `FANIN` wires.
* **Single data bus.** One data bus feeds all wires of a buffer. Separate
  data per source FB is not modelled.
* **Dropped events.** Events beyond `N_PAR_WRITES` in one cycle are dropped
  and set the overflow flag, the same as events that find the buffer full.
  The flag stays set until reset.
* **Widths and arithmetic.** INT is taken as 16-bit signed. Sums and
  differences wrap around.
* **The two ECC transitions.** The `1` transition back to RDY and the next
  event's transition happen in the same edge, which gives one event per
  cycle. A stricter reading, with one transition per clock, would halve
  throughput.
* **Not built.** The alternative of merging same-type events with an OR, a
  simple function block without an ECC, and a single buffer shared by several
  blocks. The last of these would save area but allow only one event per
  cycle across those blocks.
