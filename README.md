# FleetTwo dock in SystemVerilog

A Fleet processor does no scheduling in its functional units ("ships"). All
control lives in the *docks*: the small programmable elements that sit
between each ship port and a packet-switched fabric. A dock receives
instructions as packets, keeps a short program in a circular instruction
buffer (the *pump*) and replays it as a loop. Each instruction moves one word
between the fabric, a one-word data latch and the ship. This repository holds
synthesizable RTL for such a dock, in both kinds, following the FleetTwo dock
specification (March 2008 draft):

* an **input dock** takes words from the fabric and hands them to its ship;
* an **output dock** takes words from its ship and sends them into the fabric,
  as data packets or as payload-free *token* packets.

The ships and the switch fabric are outside this design. The top
(`fleettwo_top`) holds one dock of each kind and brings all their fabric-side
and ship-side handshakes out as ports.

## Words, packets and instructions

* A machine word is 37 bits. A packet is a word plus an 11-bit path; a token
  is a packet whose payload does not matter (`fleet_pkg::packet_t`).
* An instruction is 26 bits. It travels in the upper 26 bits of a word, and
  the lower 11 bits hold the path that carried it to its dock. The dock's
  instruction destination keeps bits 37..12.

Instruction fields, numbered 26..1 within the instruction:

| bits | field | meaning |
|---|---|---|
| 26 | I | interruptible: a waiting `move` may be torpedoed |
| 25 | OS | one shot: 0 = part of the outer loop, 1 = runs once |
| 24:23 | P | predicate: `00` if A, `10` if B, `11` always, `01` never (reserved) |
| 22:1 | body | see below |

| body bits 22..20 | instruction | operands |
|---|---|---|
| `1 SEL` | `literal` | Literal in 19..1; SEL picks the form (table below) |
| `0 11` | `literalhi` | Literal in 18..1 goes to D[37:20] |
| `0 10` | `literallo` | Literal in 19..1 goes to D[19:1] |
| `0 00` | `move` | 19 Ti, 18 Di, 17 Dc, 16 Do, 15 To, 14 PD, 11..1 path |
| `0 01`, bit 19 = 0 | `setFlags` | nextA 18..13, nextB 12..7, nextS 6..1 |
| `0 01`, bit 19 = 1 | 18..17: `00` setInner, `01` setOuter, `10` tail | 16..15 mode (`00` literal, `01` from D, `10` decrement), literal 14..1 |

The literal family and the setFlags input order come from the
specification. The specification calls its encodings provisional and does
not give the codes for `move`, `setFlags`, `setInner`, `setOuter` and `tail`,
nor the fields of `move`. This design places them in the two codes the
literal family leaves free. `fleet_pkg` has an encoder function for each
instruction (`enc_move`, `enc_literal`, `enc_setloop`, `enc_tail`, ...).

`literal` forms (D is the 37-bit data latch):

| SEL | D[37:20] | D[19:1] |
|---|---|---|
| 00 | Literal[18:1] | all 0 |
| 01 | Literal[18:1] | all 1 |
| 10 | all 0 | Literal[19:1] |
| 11 | all 1 | Literal[19:1] |

## From the horn to On Deck: how a dock runs a loop

This is the part that takes some thought. An instruction passes through
three stages:

1. **Horn fifo** (`fleet_horn`). Arriving instructions queue in a small fifo
   whose head is the *instruction horn*.
2. **Hatch.** Between the horn and the pump. After reset the hatch is
   unsealed, and instructions flow into the pump. A `tail` instruction seals
   it and is consumed there; it never enters the pump. While the hatch is
   sealed, the instructions that follow wait in the horn fifo. The hatch
   opens again whenever the outer loop counter OLC is *written with zero*:
   by a decrement to zero, by `setOuter` with zero, or by a torpedo.
3. **Pump** (`fleet_pump`). A circular buffer of `PUMP_DEPTH` instruction
   latches. Its oldest entry is the *On Deck* stage, where the instruction
   executes.

The on-deck rules (`fleet_ondeck`) turn this into loops:

* **Outer loop.** An instruction with OS=0 reaching On Deck while OLC>0
  first waits until the hatch is sealed, that is, until the whole loop body
  and its `tail` have arrived. When it retires, a copy of it is written back
  into the pump's tail in the same cycle. This happens whether or not its
  predicate held. The body therefore circulates for as long as OLC>0. The
  program ends the loop with `setOuter` in decrement mode inside the body.
  Once OLC is 0, OS=0 instructions reaching On Deck are dropped without
  executing, so the body drains out of the pump. Meanwhile the reopened
  hatch admits the *epilogue* that was waiting in the horn fifo.
* **Gating by OLC.** Every instruction executes only if its predicate holds
  and OLC>0. The one exception is `setOuter` with OS=1, which ignores OLC.
  So an epilogue or a fresh program starts with `setOuter` OS=1, and OLC
  resets to 0.
* **Inner loop.** `move` runs ILC+1 times and leaves ILC=0. Other
  instructions, and a `move` whose predicate fails, leave ILC alone.
* **Capacity.** The loop body (without `tail`) must fit in `PUMP_DEPTH`
  entries. A longer body deadlocks, because On Deck waits for a seal that
  cannot come. The programmer has to know the depth.

A typical program for an input dock, forwarding three words to the ship and
acknowledging each with a token:

```
setOuter  OS=1 literal 3
move      OS=0 Di Dc Do          // take a word, latch it, give it to the ship
move      OS=0 To path=5         // send a token back
setOuter  OS=0 decrement
tail
setOuter  OS=1 literal 1         // epilogue, waits behind the hatch
literal   OS=1 SEL=10 0x77
move      OS=1 Do
```

## move

One iteration of `move` has up to three steps. Each step waits for its
handshake:

| step | input dock | output dock |
|---|---|---|
| Ti | ignored (no token destination) | take one token from the token destination |
| Di | take a word from the data destination | take a word from the ship |
| Dc (with Di) | latch that word in D | latch that word in D |
| Do | present D to the ship | send D as a data packet |
| To | send a token packet | send a token packet (only if Do is clear) |

Ti comes first and Di second; both can complete in the same cycle. The
outputs start one cycle after the last input completes, so a freshly latched
word is the one sent. Do and To run in parallel. An iteration with nothing to
wait for takes one cycle. The packet path is the instruction's path field,
or D[11:1] when PD is set. Every other instruction takes one cycle on deck.

PD is what makes *dispatch* work. To run an instruction on some dock, a
program first gets the instruction word into the data latch of an output
dock: a word from a memory or fifo ship holds the instruction in its upper
26 bits and the path to the target dock in its lower 11. A `move Di Dc Do PD`
then sends that word to the target dock's instruction destination.

## Torpedo

Each dock has a separate torpedo destination with its own one-entry fifo,
so queued data never blocks a torpedo. A torpedo waits until On Deck holds
a *torpedoable* instruction. That is a `move` that is executing, has I=1 and
has Ti, Di or Do set. The torpedo then clears ILC and OLC, which opens the
hatch. It is consumed, and the `move` is dropped without a copy. A torpedo
can withdraw an output offer the receiver has not taken yet.

## Flags

A and B are general-purpose flags; S is the summary flag. Whenever D[37] is
written (capture, `literal`, `literalhi`), S takes the same value.
`setFlags` assigns each of the three flags the OR of the inputs that its
6-bit field selects. The inputs are A, ~A, B, ~B, S and ~S of the old
values, most significant bit first. An empty field gives 0, and selecting
both A and ~A gives 1. `fleet_pkg` defines `F_A`, `F_NA`, ... for these bits. Note that
`setFlags` always writes all three flags.

## Interfaces and timing

All handshakes are valid/ready and transfer on a rising clock edge where
both are high. Reset (`rst_n`) is asynchronous and active low, and clears
every counter, flag, the data latch and all fifos. A word written into a fifo
can leave it on the next cycle.

| port group (top) | dock | meaning |
|---|---|---|
| `in_instr_*`, `out_instr_*` | both | instruction destination, 37-bit word |
| `in_torp_*`, `out_torp_*` | both | torpedo destination (no payload) |
| `in_data_*` | input | data destination, 37-bit word, 4-entry fifo |
| `in_tok_*` | input | token packets into the fabric (`packet_t`) |
| `in_ship_*` | input | D to the ship |
| `out_tok_*` | output | token destination, 4-entry fifo |
| `out_pkt_*` | output | data or token packets into the fabric |
| `out_ship_*` | output | ship word into D |
| `sealed`, `ilc`, `olc`, `flags`, `d`, `ev_*` | both, index 0 = input dock | observation only |

Parameters (top and `fleet_dock`): `PUMP_DEPTH` = 4, `HORN_DEPTH` = 4,
`DEST_DEPTH` = 4 and `LC_W` = 14 (counter width). `fleet_dock` also has
`TORP_DEPTH` = 1 and `IS_OUTPUT`. The specification gives none of these
sizes. Only the 37-bit word, the 26-bit instruction and the 11-bit path are
fixed by it.

## Module map

| module | role |
|---|---|
| `fleet_pkg` | widths, `packet_t`, opcode and predicate enums, decoder, encoders |
| `fleet_fifo` | valid/ready circular fifo used for every destination and the horn |
| `fleet_horn` | horn fifo and hatch |
| `fleet_pump` | circular instruction buffer with write-back of the on-deck entry |
| `fleet_ondeck` | the on-deck rules, `move` sequencing, torpedo |
| `fleet_loop_counters` | ILC, OLC, and the "OLC written with zero" pulse |
| `fleet_flags` | A, B, S, predicate test, `setFlags` |
| `fleet_data_latch` | D, capture and literal loads |
| `fleet_dock` | one dock of either kind |
| `fleettwo_top` | one input dock and one output dock |

## Where this departs from or goes beyond the specification

* **Provisional encodings.** The codes of `move`, `setFlags`,
  `setInner`/`setOuter`, `tail`, the `move` fields and the PD bit are this
  design's own. The decrement mode of `setOuter` reflects the
  specification's note that the loop instruction gained a decrement mode.
* **Open cells in the on-deck table.** The specification leaves some cases
  "to discuss". OS=1 instructions follow the rule that OLC gates everything
  except OS=1 `setOuter`. `setOuter` is not inner-looping. Predicate `01`
  never holds.
* **Torpedoed instruction.** The specification leaves open whether the
  torpedoed instruction is re-queued; here it never is.
* **Horn fifo.** The specification says the instruction destination has no
  buffering fifo of its own, but also places a small fifo in front of the
  horn. Both are kept: the horn fifo *is* the instruction destination's
  storage, and its depth (4) is a choice.
* **Ti at an input dock.** The input dock has no token destination in the
  specification's drawings, so Ti is ignored there.
* **Not built.** The switch fabric (its path encoding and routing are not
  specified), the arbiter the table mentions, and the ships. The docks'
  fabric and ship sides are plain handshakes instead.

## Verification and simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_fleet_fifo`, `tb_fleet_pump`, `tb_fleet_horn` and
  `tb_fleet_loop_counters` compare random traffic with queue or counter
  models.
* `tb_fleet_flags` is exhaustive over flag states and `setFlags` fields.
* `tb_fleet_data_latch` covers all literal forms.
* `tb_fleet_ondeck` walks through the cases of the on-deck table.
* `tb_fleet_dock` runs whole programs:
  * an outer loop with an epilogue;
  * an inner loop with predicates;
  * a torpedo;
  * an output-dock loop gated by tokens, with S driving a predicate;
  * OLC loaded from the data latch, and an epilogue that sets OLC to zero;
  * a torpedo that ends an inner loop waiting for tokens.
* `tb_fleet_dock_random` generates 400 random programs and runs each on
  both dock kinds, with random stalls on every handshake. A program is a
  mix of one-shot blocks and outer loops, with random predicates, flags,
  literals, inner loops and `move` fields. An instruction-level reference
  model in the testbench runs the same program sequentially. The words given
  to the ship, the packets, the words and tokens taken, and the final D,
  flags and counters must all match the model.
* `tb_fleettwo_top` runs both docks at their default sizes. The output dock
  streams 40 words from its ship to the input dock, and the input dock
  returns a credit token for each. The input dock's loop ends with a
  torpedo, and an epilogue then runs. Finally the output dock dispatches two
  instruction words from its ship to the input dock. The test checks every
  word and counts each mechanism: waiting for the sealed hatch, write-back,
  seal and unseal, inner looping, the torpedo, a skipped predicate, S loads,
  dispatch and ship-side stalls.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/fleet_pkg.sv tb/tb_fleettwo_top.sv \
    -y rtl +libext+.sv --top-module tb_fleettwo_top -o sim
./obj_dir/sim
```

Verilator simulates two-state logic, so the testbenches initialise whatever
they read. `fleet_ondeck` carries two assertions: a write-back happens only
together with a retirement, and nothing retires from an empty pump.

These tests exercise the behaviour described above, including this design's
own choices. They cannot confirm behaviour the specification leaves open,
and there is no test against a reference implementation of FleetTwo.
