# Controller for a 16x16 ATM switching node

A 16x16 ATM switching node here is one controller chip plus four bit-sliced
switch chips. The switch chips hold the cells: each holds a quarter of every
53-byte cell, and the node holds up to 256 cells. The controller never touches
payload. It keeps a short header for every stored cell: 5 routing bits and a
16-bit timestamp. Each cell cycle it does two jobs:

* It tells the switch chips where to store each arriving cell.
* For each output it tells them which stored cell leaves (an 8-bit slot on the
  *address bus*) and where it goes (the output on the *destination bus*).

The rule is oldest first. The hard part is finding the oldest of up to 256
candidates fast enough. The controller does it with a bit-serial, content-
addressed search, described below.

The same chip works in both layer types of a distributing banyan fabric, chosen
by one pin (`dist_mode`):

* **Routing layer.** Output *j* is served only by cells whose routing bits
  equal *j*.
* **Distribution layer.** Routing bits are ignored. Cells go to the least-full
  node of the next layer.

Nodes exchange 4-bit fill levels as back-pressure.

## Block structure

```
                   +--------------------------------------------+
 fc_in[16]x4 ----->| flow_control_unit   fill level, back-press. |--> fc_out (4)
 cell_arrive[16] ->| address_file        valid bit per slot,     |--> store_ok / store_addr
                   |                     free-slot allocation    |
 header[16]x16 --->| register_file                               |
                   |   routing_filter -> 16 x register_module    |
                   |                     (16 x register_unit)    |
                   |        | 256 timestamp bits / clock         |
                   |        v                                    |
                   |   oldest_comparator                         |--> addr_bus (8)
                   |        (multi_high_detector groups)         |--> dest_bus (8)
                   +--------------------------------------------+
                          atm_ctrl_top (sequencer)
```

| Module | Role |
|---|---|
| `atm_ctrl_top` | Sequencer for one cell cycle; instantiates everything else |
| `register_file` | 256 headers: routing filter + 16 register modules |
| `routing_filter` | Drives each module's 16-bit bus: routing bits, then the timestamp |
| `register_module` | 16 register units on one bus |
| `register_unit` | 5 + 16 bit header, routing match, 16:1 timestamp-bit mux |
| `oldest_comparator` | Bit-serial maximum search and 256-to-8 encoder |
| `multi_high_detector` | "None / one / several high" detector for 16 signals |
| `address_file` | Slot valid bits, free-slot allocation, occupancy count |
| `flow_control_unit` | Own fill level; back-pressure; emptiest-output pick |
| `atm_ctrl_pkg` | Sizes, types, fill-level function |

## The oldest-packet search

This is the core of the design. Every slot holds a 16-bit timestamp, and larger
means older. Finding the oldest cell means finding the maximum among the slots
that qualify. In a routing layer a slot qualifies if it is occupied and its
routing bits match the output being served. In a distribution layer every
occupied slot qualifies.

The search never moves whole timestamps. It goes one bit position at a time,
most significant first:

1. `start` sets all 256 bits of the **candidate register** to 1.
2. The register file presents bit *k* of every slot on 256 wires, one wire per
   slot. Each `register_unit` does this with its 16:1 multiplexer, driven by the
   shared 4-bit select lines. A slot that does not qualify drives 0. This
   routing-bit match makes the register file behave as a content-addressable
   memory.
3. The comparator ANDs these bits with the candidate register. If the AND is
   not all zero, the slots with a 1 at this position beat every slot with a 0,
   so the AND becomes the new candidate set. If the AND *is* all zero, no
   candidate has a 1 here, so the position decides nothing. The *zero detector*
   then keeps the candidate register unchanged.
4. After 16 positions the survivors hold the maximum timestamp. The search ends
   earlier if exactly one candidate is left. The *one-detector* checks this
   after every position.
5. A 256-to-8 encoder turns the survivor into the slot address.

Example with three qualifying slots holding `1011`, `1001` and `1011` (4 bits
for brevity):

* Bit 3: all three have a 1, and all survive.
* Bit 2: the AND is zero, so the position is skipped.
* Bit 1: the `1001` slot drops out.
* Bit 0: the two `1011` slots tie. The lower address wins, and `tie` is raised.

Both detectors are built from `multi_high_detector`, a 16-input block with two
outputs: "at least one high" and "more than one high". Sixteen of these, plus
one over their "any" outputs, cover the 256 bits. "Exactly one survivor" means:

* exactly one group reports "any", and
* that group does not report "several".

The encoder is built the same way. It first picks the lowest group with a
survivor, then the lowest survivor in that group.

**Timestamps.** The search keeps 1s, so it finds the *largest* value. To make
the largest value the oldest cell, the controller stores
`{1, ~cycle_count[14:0]}`, where `cycle_count` advances once per cell cycle.

* Older cells have smaller counts, and so larger stored values.
* Bit 15 is always 1, so no stored timestamp is ever zero. This matters because
  a non-qualifying slot looks exactly like a timestamp of all zeros. The first
  bit position therefore removes every non-qualifying slot. If that position
  comes up all zero, nothing qualified, and `found` stays low.
* Cells that arrive in the same cell cycle share a timestamp. Among them, the
  lowest slot goes first.

**Timing of one search.** The search takes one `start` clock, then 16 bit
clocks. Each bit passes through two register stages (the input register, then
the candidate register). `done` therefore comes at most 19 clocks after `start`,
and sooner when the one-detector fires. The sequencer stops driving bits as soon
as `done` arrives.

## One cell cycle

`atm_ctrl_top` runs this sequence after each `cell_start` pulse:

| Clocks | State | What happens |
|---|---|---|
| 1 | `S_IDLE` → capture | Latch `cell_arrive` and all 16 headers |
| 1 | `S_LOAD_RT` | Allocate slots; write the routing bits; publish `store_ok` / `store_addr` (`store_valid`) |
| 1 | `S_LOAD_TS` | Write the timestamp into the same slots; mark them valid |
| 1 per output | `S_PICK` | Choose the next output to serve; start the comparator |
| ≤ 19 per output | `S_SEARCH` | Step the select lines from bit 15 down to bit 0; on `done`, send the winner (`dep_valid`, `addr_bus`, `dest_bus`) and free its slot |
| 1 | back to `S_IDLE` | `ready` is high |

How the next output is chosen:

* **Routing layer.** Outputs are tried in order 0..15. An output whose
  next-layer node reports level 15 (full) is skipped without a search.
* **Distribution layer.** `flow_control_unit` names the emptiest output that is
  not full and not yet served in this cell cycle (the lowest index on a tie).
  This repeats until no such output is left.

Each output gets at most one cell per cell cycle. The worst case is
3 + 16 × 20 + 1 = 324 clocks. One 53-byte cell at 155 Mb/s lasts 424 clocks at
155 MHz, so a full round fits in one cell time with room to spare.

## Storage organisation and allocation

The slot address is `{module[3:0], unit[3:0]}`.

* **Writes.** Input *i* writes only register module *i*, through bus *i* of the
  routing filter. Each module has one bus, so all 16 inputs can be written in
  the same two clocks.
* **Allocation.** `address_file` gives input *i* the lowest free unit of module
  *i*. A cell whose module is full is refused (`store_ok[i] = 0`). The switch
  chips are expected to drop it.
* **Sharing.** Storage is therefore shared among the outputs, but each input
  has its own 16 slots.

A unit loads in two steps, both while its column enable is high:

1. The routing bits, from bus bits [4:0], on the first load clock.
2. The timestamp on the second.

In the input header, the routing field is bits [4:0]; the parameter
`ROUTE_LSB` of `routing_filter` moves it.

## Flow control

`fc_out` is this node's fill level: `min(occupancy / 16, 15)`, registered.
0 means empty and 15 means full. `fc_in` carries 16 such levels, one per
next-layer node (output). Level 15 blocks that output. Neither layer type sends
to a full node.

## Top-level interface (`atm_ctrl_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock (155 MHz target); asynchronous active-low reset that empties the store |
| `dist_mode` | in | 1 | Layer pin: 1 = distribution layer |
| `cell_start` | in | 1 | Starts a cell cycle; sampled only while `ready` |
| `cell_arrive` | in | 16 | Arrival flag per input; sampled with `cell_start` |
| `header` | in | 16×16 | 16 header bits per input; routing bits in [4:0]; sampled with `cell_start` |
| `fc_in` | in | 16×4 | Fill level of each next-layer node |
| `fc_out` | out | 4 | This node's fill level |
| `ready` | out | 1 | Idle, waiting for `cell_start` |
| `store_valid` | out | 1 | One-clock pulse: `store_ok` / `store_addr` valid |
| `store_ok` | out | 16 | Cell of input *i* accepted |
| `store_addr` | out | 16×8 | Slot for the cell of input *i* |
| `dep_valid` | out | 1 | One-clock pulse per departing cell |
| `addr_bus` | out | 8 | Slot of the departing cell |
| `dest_bus` | out | 8 | Output of the departing cell (zero-extended) |

Most sizes are package constants in `atm_ctrl_pkg`: 16 ports, 16×16 slots,
5 routing bits, 16 timestamp bits, 4-bit levels. The comparator and the
detector also take parameters (`N`, `NBITS`, `G`). Changing the slot count
means changing the package constants together, because the 8-bit
`{module, unit}` address depends on them.

## What is interpretation, and what is left out

The following come from the chip's published architecture:

* the four parts and their pin counts (64 and 4 flow-control bits, 16 arrival
  signals, 256 header bits, the 8-bit address and destination buses);
* 256 headers of 5 + 16 bits in 16 modules of 16 units;
* the two-clock header load;
* the unit's routing comparator and 16:1 multiplexer;
* the comparator pipeline (input register, AND, zero detector, settable
  candidate register, encoder with one-detector);
* the none / one / several detector.

These are this design's own choices, and they are the points to check before
reuse:

* The cell-cycle sequencing and the order in which outputs are served.
* The timestamp coding and where it comes from (a 15-bit cell-cycle counter).
  The counter wraps after 32768 cell cycles. A cell stored for longer than that
  would be misordered; there is no ageing logic.
* Tie-break to the lowest slot.
* The input-to-module mapping, and refusing a cell when its module is full.
* The fill-level coding and the full threshold.
* The destination bus carries the output number. The address bus carries the
  slot.
* Headers are captured on `cell_start`. Reset behaviour.

Departures from the silicon:

* The header storage is D latches in the original. Here it is edge-triggered
  registers with load enables.
* The none / one / several detector is a precharged mixed-signal circuit in the
  original. Here only its logic function is kept.
* The comparator's feedback loop through its 2:1 multiplexer is rewritten as an
  equivalent select after the AND, so that the RTL has no combinational loop.

All ports are in the controller's clock domain. In the original chipset, the
rest of the node runs at a quarter of the controller's 155 MHz. The handover
between the two clocks is not modelled: an integrating design must
synchronise `cell_start` and the headers itself, and likewise the buses going
out.

The switch chips are not included. The controller's side of their interface
(`store_addr`, `addr_bus`, `dest_bus`, `header`) is on the top's ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
against a model written in the testbench and prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_multi_high_detector` | Zero, one-hot, adjacent pairs, random patterns against a population count |
| `tb_register_unit` | Routing/timestamp load, column-enable gating, match / mismatch / distribution / empty readout |
| `tb_register_module` | 16 units through one bus; every select value and routing value |
| `tb_routing_filter` | Routing bits in phase 0, timestamp in phase 1 |
| `tb_register_file` | 40 cell cycles of random writes; full 256-bit readout per select and routing value |
| `tb_oldest_comparator` | Random searches against a maximum model; ties; empty set; latency ≤ 19 clocks; counts early ends and skipped positions |
| `tb_address_file` | 2000 random arrive / commit / free steps; allocation, refusals, valid bits, occupancy |
| `tb_flow_control_unit` | Fill level, back-pressure, emptiest-output pick |
| `tb_atm_ctrl_top` | End to end at full size (see below) |

`tb_atm_ctrl_top` runs 185 cell cycles at full size through four phases:

* light routing-layer traffic;
* heavy back-pressure until modules fill and cells are refused;
* the distribution layer;
* draining.

It checks every slot allocation, every departure (slot and output, in order),
the fill level, and the 424-clock cell-time bound. It fails if any mechanism
never happened: back-pressure skip, refusal, early search end, tie, empty
search, skipped bit position, distribution pick, full fill level.

Running a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/atm_ctrl_pkg.sv tb/tb_atm_ctrl_top.sv --top-module tb_atm_ctrl_top \
    -Mdir obj_top -o sim
./obj_top/sim
```

Verilator finds the other modules through `-Irtl`, because each file is named
after its module. The same command works for every other testbench: change the
file and top-module name. Each testbench has a watchdog that ends the run with a
failure if it hangs.
