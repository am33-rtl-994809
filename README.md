# FleetTwo dock in SystemVerilog

Fleet is a processor with no central pipeline. Functional units, called
*ships*, sit around a packet-switched *switch fabric*. Data moves between
ships only when a program explicitly moves it. A small programmable element
called a *dock* sits between each ship port and the fabric. A program is a
stream of instruction packets sent to docks. Each dock executes its own
instructions: wait for a word, latch it, hand it to the ship, send it or a
token somewhere else, and repeat.

This repository holds synthesizable RTL for the FleetTwo dock. It has both
kinds of dock (input and output), a switch fabric, a FIFO ship, and a top
level that puts them together into a small working Fleet. Most of the design
is in the dock's instruction pump: how instructions enter it, loop inside it
and leave it. Most of this README is therefore about the pump.

## The dock at a glance

```
             instruction destination                data destination
                      |                                   |
        token? ---> torpedo waiting area        input dock: data fifo
                      |                         output dock: token store
                      v                                   |
                 EF (epilogue fifo)                       |
                      |                                   |
                 [hatch] <---- requeue copy ----+         |
                      |                         |         |
                 IF (instruction fifo)          |         |
                      |                         |         |
                 OD (on deck) + literal latch --+         |
                      |                                   |
                 execution: OLC, ILC, A/B/C flags,  <-----+
                 data latch, path latch, TAPL
                      |                 |
              ship side           fabric side (tokens, data packets)
```

* **Input dock** (`IS_INPUT = 1`). Words from the fabric go into a small
  buffer. Moves take them from there, can capture them in the data latch and
  can hand them to the ship. The dock sends only tokens into the fabric.
* **Output dock** (`IS_INPUT = 0`). Words come from the ship. Tokens that
  arrive from the fabric wait in a token store, which keeps only their signal
  bit. Moves send data packets and tokens along the path latch.

## Packets, paths and the signal bit

A packet is a path, a token bit and one 37-bit word (`fleet_pkg::packet_t`).
A *token* is a packet whose word carries no meaning. A path is 13 bits wide.

* Path bit 0 is the **signal bit**. It does not affect routing. Every fabric
  destination is therefore reachable by two paths, and the receiving dock uses
  the bit as a control value: it is copied into the C flag.
* Path bits 12..1 select the destination. In `fleet_top` the destinations are
  numbered as follows:
  * 0: input dock, instruction destination
  * 1: input dock, data destination
  * 2: output dock, instruction destination
  * 3: output dock, data destination
  * 4 and up: external ports

A word can carry an instruction in its low 26 bits. It can also carry a path
in bits 36..24, which is what *dispatch* uses.

## Life of an instruction (the pump)

The pump is `dock_pump`. Its state is the hatch, three queues (EF, IF, OD) and
the torpedo waiting area.

1. **Arrival.** An instruction packet enters the epilogue fifo (EF). A *token*
   sent to the instruction destination is a **torpedo**. A torpedo does not
   enter EF. It waits in a one-place waiting area instead.
2. **The hatch.** The hatch sits between EF and IF. It is either *sealed* or
   *unsealed*, and it starts unsealed.
   * While it is unsealed, the head of EF moves into the instruction fifo
     (IF).
   * A `tail` instruction at the head of EF seals the hatch and is then
     dropped. It never enters IF.
   * While the hatch is sealed, EF is frozen. The only input to IF is then
     the requeue path from the on-deck stage.
   * The hatch is unsealed whenever OLC is written with zero. That happens
     when OLC is decremented to zero, set to zero, or cleared by a torpedo.
3. **On deck.** The head of IF moves to the on-deck stage (OD). At the same
   time the literal latch is loaded with the instruction's literal: the
   shift immediate, or the set immediate with its extension applied. Two
   processes then run, and the next instruction comes on deck only when both
   are done:
   * **Requeue.** If OLC = 0 or the instruction is one-shot (OS = 1), do
     nothing. Otherwise wait until the hatch is sealed and IF has room, then
     put a copy of the instruction back into IF. The OLC test is repeated
     every cycle. A requeue still waiting when OLC becomes zero therefore
     finishes without a copy.
   * **Execution** (`dock_exec`), described in the next section.

This gives two kinds of loop:

* **Outer loop.** Set OLC to N with a one-shot instruction. Then send the
  loop body (OS = 0, usually with predicate "OLC ≠ 0") followed by a `tail`.
  The tail seals the hatch, so the body keeps circulating through IF and OD.
  Anything sent after the tail waits in EF. The body ends the loop by
  decrementing OLC. When OLC reaches zero the hatch unseals. The copies still
  in IF then pass OD once more: their predicates fail and they are not
  requeued. After that, the waiting instructions flow in.
* **Inner loop.** A single `move` repeated ILC times (see below).

A loop body must fit in IF: at most `IF_DEPTH` instructions, 4 by default. A
longer body fills IF while its head waits on deck, and the pump deadlocks.

## Execution

`dock_exec` holds the architected state of a dock:

* OLC: 6 bits, 0..63
* ILC: 0..63 or infinity
* flags A, B and C
* the 37-bit data latch
* the 13-bit path latch
* the 13-bit torpedo acknowledgment path latch (TAPL)

For the instruction on deck it works through these steps in order:

1. **Predicate** (bits 24:22):

   | code | executes if      |
   |------|------------------|
   | 000  | OLC ≠ 0 and A = 0 |
   | 001  | OLC ≠ 0 and A = 1 |
   | 010  | OLC ≠ 0 and B = 0 |
   | 011  | OLC ≠ 0 and B = 1 |
   | 100, 101 | never (reserved) |
   | 110  | OLC ≠ 0          |
   | 111  | always           |

   An instruction whose predicate fails is ignored. The predicate is
   evaluated once. It is not evaluated again between the iterations of a
   move.
2. **Torpedo.** This step applies to an interruptible move (I = 1) while a
   torpedo is waiting. It is checked before every iteration, including while
   the move is blocked waiting for input. The dock then does all of the
   following:
   * consumes the torpedo
   * sets OLC to 0, which unseals the hatch
   * sets ILC to 1
   * sends a token along TAPL
   * ends the move
3. Otherwise the instruction executes. A move with ILC = 0 executes zero
   times.

### Instruction encoding

Bits are numbered 26..1, as in the original format; bit n is index n-1 in
the RTL.

| bits 21:20 | instruction |
|-----------|-------------|
| 00 | `shift`: bits 19..1 are an immediate |
| 10 | `set`: bits 19..15 select the destination, 14..12 the source |
| 01 | `move`: bits 19..15 are Ti Di Dc Do To, 14..13 select the path |
| 11 | `tail` |

All instructions have OS at bit 25 and the predicate at bits 24..22. Bit 26 is
I and exists only in `move`.

The `set` variants:

| bits 19..12 | other fields | effect |
|---|---|---|
| 10000 100 | imm 6..1 | OLC ← immediate |
| 10000 010 | | OLC ← data latch (low 6 bits) |
| 10000 001 | | OLC ← OLC − 1 (stays 0 at 0) |
| 01000 100 | bit 7 = 0, imm 6..1 | ILC ← immediate |
| 01000 100 | bit 7 = 1 | ILC ← ∞ |
| 01000 010 | | ILC ← data latch (low 6 bits) |
| 00100 e | imm 13..1 | data latch ← immediate, extended with e (0 or 1) |
| 00010 | nextA 12..7, nextB 6..1 | A, B ← OR of the selected old flags |
| 000010 | imm 13..1 | TAPL ← immediate |
| 000001 | | TAPL ← data latch (low 13 bits) |

In the flag-update fields, the six select bits pick, from the left: A, ¬A, B,
¬B, C, ¬C. All selected values are ORed together, so:

* selecting nothing gives 0;
* selecting a flag and its complement gives 1;
* selecting each flag for itself gives a no-op.

`shift` moves the data latch up by 19 bits: the old low 18 bits become the top
18 bits, and the immediate fills the low 19 bits. Repeated shifts build a wide
constant.

### Moves

A move runs ILC iterations, or runs forever if ILC = ∞, until a torpedo stops
it. Afterwards ILC is 1 again. An iteration happens in a cycle in which
everything it needs is available, so a move that never stalls does one
iteration per cycle.

| field | input dock | output dock |
|-------|-----------|-------------|
| Ti | wait for a packet from the fabric | wait for a token from the fabric |
| Di | wait for a word from the fabric | wait for a word from the ship |
| Dc | capture the Di word in the data latch | same |
| Do | hand the data latch to the ship | send the data latch as a packet along the path |
| To | send a token along the path | same |

Some further rules apply to every iteration:

* **Dc.** In an iteration that also captures a word, Do outputs that new
  word. Di without Dc consumes the word and throws it away.
* **Path.** The path is chosen before anything is sent, by bits 14..13:
  * `moveto` (1x) loads the 13-bit immediate into the path latch.
  * `dispatch` (01) loads bits 36..24 of the incoming word. Such a word
    carries its own destination, and the move sends it there, which is how an
    instruction stored as data reaches the dock that will run it.
  * `move` (00) keeps the path latch.
* **C flag.** An iteration that takes a fabric packet copies that packet's
  signal bit into C. An iteration on an output dock that takes only a ship
  word (Di without Ti) copies the ship's flag into C.

## The switch fabric

`fleet_fabric` is a crossbar. Each destination has one output register and a
round-robin arbiter over all sources. This design guarantees the following:

* every packet is delivered exactly once;
* packets from one source to one destination arrive in the order they were
  sent;
* an uncontended packet arrives one cycle after it is accepted.

A path naming a destination that does not exist trips an assertion.

## The FIFO ship and the top level

`fifo_ship` is a first-in first-out buffer of 8 words. It takes words from
its input dock's Do and offers them to its output dock's Di. Its flag, which
feeds the output dock's C, is high when the word on offer is the last one it
holds.

`fleet_top` builds one Fleet from these parts:

* the fabric;
* the FIFO ship;
* the ship's input dock and output dock;
* `ext_src` and `ext_dst` fabric ports for everything else in a Fleet: other
  ships' docks, or a host that sends instructions.

Each dock's state (OLC, ILC, flags, data latch, path, TAPL, hatch) and
one-cycle event pulses (torpedo, iteration, ignored, requeue, tail) are
brought out for observation.

## Handshakes and timing

* **Valid/ready everywhere.** Every interface uses valid/ready handshakes. A
  transfer happens on a rising edge where both are high.
* **Registered outputs.** The dock's outputs to the fabric and the ship come
  from holding registers, so no valid depends on a ready. An iteration can
  refill a register in the same cycle it empties.
* **Instruction latency.** An instruction accepted at the instruction
  destination is on deck three cycles later (EF, IF, OD), if nothing is
  ahead of it.
* **One instruction per cycle.** `set` and `shift` finish in the cycle they
  are on deck, and the next instruction can be on deck in the following
  cycle.
* **Reset.** Reset is active-low and asynchronous. After reset:
  * the hatch is unsealed;
  * OLC = 0, so only predicate-111 instructions run until OLC is set;
  * ILC = 1;
  * the flags and all latches are 0.

## Where this design fills in or departs from the architecture

These points are this design's own choices, or follow one of two conflicting
readings:

* **Path width.** The path is 13 bits, the width of the moveto, TAPL and
  dispatch fields. One place in the architecture describes an 11-bit path
  beside the 26-bit instruction; the 13-bit field layout was followed. With
  13-bit paths, a dispatched word's path field (bits 36..24) overlaps the I
  and OS bits of the instruction it carries.
* **The I bit.** I = 1 means interruptible. The architecture also states the
  opposite polarity in one place. Only moves can be torpedoed.
* **Move details.** The behaviour of each move field, including where the C
  flag comes from, is this design's reading of the field names and of the
  dock's data flow.
* **`tail` encoding.** The opcode `11` for `tail` is an assignment made here.
* **Undefined ILC value.** The architecture mentions an "unset" ILC value but
  does not define it, so it is not implemented.
* **Buffer sizes.** None are given. The defaults are:
  * EF: 2
  * IF: 4
  * the input dock's data buffer and the output dock's token store: 4 each
  * the FIFO ship: 8
  * the torpedo waiting area: 1
* **Fabric.** The fabric structure, its path encoding (signal bit at bit 0)
  and the numbering of destinations are this design's own.
* **Token and data sources.** An output dock has separate token and data
  sources into the fabric. A move with both Do and To can therefore send both
  in one iteration, but the fabric does not keep order between the two.
* **The ship's flag.** The meaning of the FIFO ship's flag is this design's
  own.
* **Other ships.** The other ships of a Fleet (ALU, memory access, on-chip
  memory, bitwise operations, application-specific units) are not part of
  this RTL. Only their fabric traffic is represented, through the external
  ports.

## Files

| file | contents |
|------|----------|
| `rtl/fleet_pkg.sv` | widths, packet and instruction types, field accessors, instruction builders |
| `rtl/sync_fifo.sv` | generic valid/ready fifo used for all queues |
| `rtl/dock_pump.sv` | EF, torpedo waiting area, hatch, IF, OD, literal latch, requeue |
| `rtl/dock_exec.sv` | predicate, torpedo handling, set/shift/move, architected state |
| `rtl/fleet_dock.sv` | one dock: pump + execution + inbound buffer |
| `rtl/fleet_fabric.sv` | crossbar switch fabric |
| `rtl/fifo_ship.sv` | FIFO ship |
| `rtl/fleet_top.sv` | fabric, FIFO ship with its input and output dock, external ports |
| `tb/tb_*.sv` | one self-checking testbench per module above |

## Verification

Each testbench works out its expected values independently of the RTL and
ends with one `TB_RESULT checks=N failures=M` line. Each has a watchdog.

* `tb_fifo_ship` compares random traffic against a queue model. It checks
  that the ship is full at exactly 8 words, its one-cycle latency and its
  flag.
* `tb_fleet_fabric` runs random traffic from four sources to four
  destinations with random back-pressure. It checks routing, the signal bit,
  order per source and destination, exactly-once delivery and latency.
* `tb_dock_pump` stands in for the execution unit. It checks:
  * straight-line order and the three-cycle latency;
  * the literal latch;
  * a loop that repeats while sealed;
  * that a one-shot instruction inside a loop body runs once;
  * that an instruction behind the tail waits, and runs once after the
    unseal;
  * the torpedo waiting area.
* `tb_dock_exec` runs both dock kinds. It checks:
  * every predicate code against every combination of OLC and flags;
  * every `set` variant, and `shift`;
  * flag logic, including C;
  * move iterations with their ILC counts, one per cycle;
  * ILC = 0 and ILC = ∞;
  * stalls;
  * moveto and dispatch;
  * the C flag sources;
  * torpedo handling and cases that must not take the torpedo.
* `tb_fleet_dock` runs programs sent as packets: nested loops on an input
  dock, a torpedoed infinite move on an output dock, and a dispatch.
* `tb_fleet_top` runs the whole Fleet at its default parameters:
  * a loop on the input dock that passes words and tokens to the output
    dock;
  * the output dock forwarding the words to the host;
  * a torpedo and its acknowledgment;
  * an instruction that travels as data through the FIFO ship and is
    dispatched to the input dock, where it runs;
  * shift, flags and predication;
  * a move skipped because ILC = 0.

  It counts requeues, tails, fabric stalls, torpedoes, ignored instructions
  and iterations, and fails if any of them never happened.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/fleet_pkg.sv tb/tb_fleet_top.sv \
          --top-module tb_fleet_top -o sim && ./obj_dir/sim
```

Replace `tb_fleet_top` with any other testbench name. The RTL also passes
`verilator --lint-only -Wall`. The only warnings are about unused bits,
unconnected fifo count outputs, and fifo storage that is written without
reset.
