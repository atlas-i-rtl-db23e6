# ATLAS I switch core: a shared-buffer ATM switch with multi-lane credit flow control

ATLAS I is a single-chip 16 x 16 ATM switch meant for networks of workstations,
where two things matter more than in wide-area ATM: latency, and never losing a
cell under bursty load. It keeps all cells in one shared on-chip buffer of 256
cells, serves them from per-output, per-priority logical queues, and can run a
hop-by-hop credit protocol on each link. Under that protocol a cell is only sent
when the next switch is known to have room for it, so no cell is ever dropped.
The protocol is *multi-lane*: a congested connection can hold at most one buffer
slot downstream, so it cannot block the traffic behind it.

This repository is synthesizable SystemVerilog for the switch. The core,
`atlas_switch`, holds the data path, queueing, credit flow control, multicast,
link bundling, EFCI marking and the load-monitoring counters; there, cells enter
and leave as whole 53-byte words. The top, `atlas_chip`, puts a link receiver
and a link transmitter on each of the 16 links. They carry cells and credits as
a stream of characters. The analog serial transceivers and their clocking are
not included.

## Data path at a glance

```
 in_cell[0..15] ─► input registers ─► round-robin ─► translation table ─► header rewrite
                   (1 cell each)      (1 cell/cycle)   (mask, class,      (VPI/VCI, EFCI, HEC)
                                                        new VPI/VCI)             │
                                   free list ─► slot ───────────────────────────►│
                                                                                  ▼
 cr_out ◄─ credit return ◄─ slot release ◄─┐                          shared cell buffer
                                           │                          (256 x 424 bit)
 out_cell[0..15] ◄─ output link timers ◄─ output scheduler ◄── queue manager (16 x 3 FIFOs)
                                            ▲      ▲
 cr_in ─► credit table (poolCr, fgCr) ──────┘      └── creditless cell list
```

Per cycle the core admits at most one cell and sends at most one cell copy. At
the 50 MHz clock the chip was specified for, a cell time on a 622 Mb/s link is
about 34 cycles, so a single admission and a single departure per cycle covers
16 links in each direction with room to spare.

**Admission.** Each input link has a one-cell register. A round-robin arbiter
picks one occupied register per cycle. The translation table is indexed by the
input link and the low 6 bits of the VCI. It returns:

- a mask of outputs; more than one bit set means multicast;
- the service class;
- the new VPI/VCI, which every copy of the cell carries;
- whether the load monitor watches this VC.

If the entry is valid and a slot is free, the cell is written into the shared
buffer with its rewritten header. The slot is then linked into the class queue
of every output in the mask, in the same cycle. Cells that have no route, or
that find the buffer full, are dropped and counted. A cell that arrives while
its link's input register is still occupied is also lost and counted.

**Departure.** One idle output link per cycle is chosen round-robin among links
that have work. Its port is served in this order:

1. the head of the top-class queue, which is never back-pressured;
2. a middle- or low-class cell waiting in the creditless cell list whose flow
   group now has credit (middle class first);
3. the head of the middle-class queue, then the head of the low-class queue.

A back-pressured head cell that has no credit is not sent. It is moved into the
creditless cell list, so the cells queued behind it can still go. A cell that
is sent keeps its link busy for `CYCLES_PER_CELL` cycles. The slot is freed
when the last copy of the cell has left. If the cell arrived under credit flow
control, a credit then goes back upstream.

**Latency.** A cell presented on `in_cell` at cycle t is in the input register
after edge t+1. It is admitted at edge t+2, and `out_valid` rises after edge
t+3, i.e. 60 ns at 50 MHz. The chip itself cuts cells through byte by byte; this
model moves whole cells, so its latency excludes the serialisation time.

## Multi-lane credit flow control

This is the least obvious part of the design. It is spread over
`credit_table`, `creditless_cell_list` and the scheduler in `atlas_switch`.

**Flow groups and lanes.** On every link, connections are grouped into *flow
groups*. A flow group holds connections whose cells never need to overtake
each other; ideally, all the VCs that lead to one destination. The downstream
switch reserves a pool of L buffer slots for the link. Each flow group may hold
at most one of those slots at a time, so L flow groups can be in flight: L is
the number of lanes.

**Upstream state** (`credit_table`), kept per output port:

- `poolCr`: the free slots left in the downstream pool, loaded with L by
  management;
- `fgCr[i]`: one bit per flow group, initially 1.

A back-pressured cell of flow group i may leave only if `fgCr[i] == 1` and
`poolCr > 0`. Sending it clears `fgCr[i]` and decrements `poolCr`. When a
credit carrying i comes back, `fgCr[i]` is set again and `poolCr` is
incremented. Credits for output j arrive on input link j, the return direction
of the same cable (`cr_in_valid[j]`, `cr_in_fg[j]`). In a bundle every link
credits the bundle's leader, so several credits for one port can arrive in the
same cycle. All of them are counted.

**Downstream role.** A cell that arrived on a link with credit flow control
enabled remembers its link and its incoming flow group. When its last copy
leaves the buffer, the switch sends a credit with that flow group on
`cr_out_valid/cr_out_fg` of the same link number. A back-pressured cell that is
discarded returns its credit at once. If that credit and a departure credit
would leave on the same link in the same cycle, the input retries one cycle
later (`st_stalls`); a link carries one credit per cycle.

**Why order does not matter.** The protocol allows at most one cell of a flow
group per link into a switch. Waiting back-pressured cells therefore need no
ordering among themselves. The creditless cell list is an associative array
searched by output port and by the set of flow groups that have credit. It
returns any match, preferring the middle class.

**Flow-group identity.** The flow group of a cell on a link is the low 6 bits
of its VCI, so there are 64 flow groups per link (`FG_W`). The source leaves
the encoding open. Taking it from the VCI means both ends agree without any
side band. On the way out, the flow group comes from the new VCI written by
the translation table.

Credit flow control is switched on per link (`cfg_credit_en`). It applies to
the middle and low classes only; the top class is for traffic such as voice,
where a late cell is worse than a lost one. With credit flow control off, the
middle and low classes are plain FIFOs.

**Buffer reserve.** The pool sizes that upstream neighbours load must not add
up to more than the 256-cell buffer. Software writes that sum to
`cfg_bp_reserve`. Traffic outside credit control shares the whole buffer except
the part of the reserve not currently held by credit-controlled cells. A cell
outside credit control that finds only reserved slots free is dropped and
counted in `st_drop_full`. Credit-controlled cells from upstream neighbours that
obey their credits therefore never find the buffer full.

## Links: cells and credits as characters

The links are bidirectional. On link j the switch sends the cells for output
j, and on the same cable it receives the credits that the next switch returns
for them. In the other direction it receives cells from the upstream neighbour
on link j and sends that neighbour's credits back. A credit must reach the
sender within about one cell time, or a single lane per flow group is not
enough. So a credit is never packed into a cell and never waits for one: it is
sent as its own control character.

`link_tx` and `link_rx` work on decoded characters, one per clock. Each
character is a `link_char_t`: a control flag and 8 bits.

| Sequence | Characters |
|---|---|
| cell | `CH_BOC` (control), then the 53 bytes, header first |
| credit | `CH_CREDIT` (control), then one byte holding the flow group |
| nothing to send | `CH_IDLE` (control) |

The transmitter sends a queued credit before anything else, even in the middle
of a cell. The receiver takes a credit character and the byte after it out of
the stream without disturbing a cell it is collecting. A cell reaches the core
only after its last byte. A cell cut short by a new `CH_BOC`, or a data byte
outside a cell, is dropped and counted in `st_link_errors`.

In `atlas_chip` the core's output pacing is set to 58 clocks per cell:
54 characters for the cell and room for two credits. A two-cell queue in each
transmitter absorbs a longer burst of credits. With one character per 50 MHz
clock, a link carries 0.86 million cells per second. A real link of 622 Mb/s
carries 1.41 million, on a faster character clock that this model does not
have.

## Queues, multicast and the shared buffer

`queue_manager` keeps one FIFO per (output, class): 16 x 3 = 48 logical queues,
all in the shared buffer. Each queue is a linked list of buffer slots. Every
output has its own next-pointer memory, so a multicast cell is stored once and
linked into all its outputs' queues in one cycle. A per-slot reference count in
`atlas_switch` frees the slot after the last copy leaves. `free_list` holds one
flip-flop per slot and hands out the lowest free slot with a priority encoder.

## Link bundling

Links can be combined into pairs, quads or octets (`cfg_bundle_mode`, per
link: 0, 1, 2 or 3). Different modes can be mixed across the chip. A bundle is
an aligned group of 2^mode links named after its lowest link, the *leader*.
Queues and credits are kept under the leader, translation masks must name
leaders, and any idle link of the bundle may carry the leader's next cell.
Cells of one VC may therefore leave in a different order on different links of
a bundle. This design does nothing to restore their order.

## EFCI and load monitoring

`header_rewrite` sets the EFCI bit (the middle PTI bit) of user-data cells
admitted while the buffer holds at least `cfg_efci_thresh` cells. It then
recomputes the HEC (CRC-8, x^8+x^2+x+1, XOR 0x55).

`load_monitor` supports measuring the cell-loss probability of real traffic.
Real losses are too rare to count, so it emulates four smaller buffers, each fed
by the VCs that the translation table assigns to it. Each emulated buffer has a
programmable capacity and a server that removes one cell every `period` cycles.
An arriving cell that finds its emulated buffer full counts as a loss.
Software reads `mon_arrivals` and `mon_losses` and extrapolates to the real
buffer size; that extrapolation is not part of the hardware.

## Interfaces

`atlas_chip` has `rx_ch[16]` and `tx_ch[16]` (one `link_char_t` per link per
clock) and `st_link_errors`. All its other ports are the management and status
ports of `atlas_switch`, passed straight through. The table lists the ports of
`atlas_switch`. `atlas_pkg` defines the `atm_cell_t`, `atm_hdr_t`, `tt_entry_t`
and `link_char_t` types.

| Group | Signals | Notes |
|---|---|---|
| Cells in | `in_valid[16]`, `in_cell[16]` | one cell per link per cycle at most; a link should send no faster than one cell per cell time |
| Cells out | `out_valid[16]`, `out_cell[16]` | `out_cell[k]` is meaningful in the cycle `out_valid[k]` is high |
| Credits | `cr_in_valid/fg[16]`, `cr_out_valid/fg[16]` | one credit per link per cycle, carrying a 6-bit flow group |
| Translation | `tt_wr`, `tt_wr_idx = {link, vci[5:0]}`, `tt_wr_entry` | written one entry per cycle; reset invalidates all entries |
| Configuration | `cfg_credit_en`, `cfg_bundle_mode`, `cfg_pool_load` + `cfg_pool_init`, `cfg_bp_reserve`, `cfg_efci_thresh`, `mon_*` | static settings for a management processor to drive |
| Status | `buf_occupancy`, `ccl_occupancy`, `st_*`, `mon_*` | counters wrap at 2^32 |

Reset leaves every pool credit at 0. Back-pressured traffic on credit-enabled
outputs therefore waits until `cfg_pool_load` has been pulsed.

## Parameters

The package constants are the chip's sizes: `N_LINKS = 16`, `N_CELLS = 256`,
`N_CLASSES = 3` and `CELL_BYTES = 53`. The following values are choices of this
design:

- `FG_W = 6`
- `TT_VCI_BITS = 6`, giving a 1024-entry table
- `N_VBUF = 4`
- `CELL_CYCLES = 34`, a 680 ns cell time at 50 MHz

The core's parameter `CYCLES_PER_CELL` sets the output-link pacing. Each
submodule takes its sizes as parameters defaulting to these constants.
`atlas_chip` has two parameters:

- `LINK_CELL_CYCLES = 58`, the pacing it gives the core: `CHARS_PER_CELL = 54`
  plus two credits of `CHARS_PER_CREDIT = 2`;
- `CREDIT_QUEUE = 16`, the credit queue depth of each transmitter. It should be
  at least half the largest pool granted to an upstream neighbour, because the
  core can release that many credits back to back.

## How far this follows the original chip

These parts follow the published description: the 16 x 16 organisation, the
256-cell shared buffer, three classes with a never-back-pressured top class,
per-output logical queues, multicast masks with a single outgoing VPI/VCI,
EFCI, the pool and flow-group credit rules, link bundling, load monitoring by
emulated smaller buffers, and a free list of 256 flip-flops with a priority
encoder.

These parts depart from it or fill gaps:

- **Whole-cell transfers inside the switch.** The chip runs IEEE 1355 HIC
  serial links at about 1 GBaud, cuts cells through byte by byte, and uses
  elastic buffers between the link clocks and the core clock. Here the
  character streams run on the core clock. A cell enters the core only once it
  is complete, which adds one cell reception time (54 clocks) to the latency.
  The serial transceivers are analog and tied to a specific technology, and
  are not included. The character codes are this design's.
- **48 logical queues, not 54.** The chip has 54; the purpose of the other six
  is not known.
- **Simple structures.** The creditless cell list is a plain associative array.
  The chip used multi-port full-custom memories with search ports.
- **This design's own choices.** The flow-group encoding, the table index, the
  EFCI threshold rule, the credit handling of discarded cells, the drop
  policies and the management ports.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_free_list`: allocation order, the empty flag, the free count, and release
  in the same cycle as an allocation.
- `tb_cell_buffer`: all slots, and the one-cycle read latency.
- `tb_translation_table`: random entries against a model.
- `tb_header_rewrite`: known HEC values (the idle header 00 00 00 01 gives
  0x52), a table-driven reference CRC, and the EFCI rule.
- `tb_queue_manager`: 20,000 random cycles of unicast and multicast
  enqueues and dequeues against 48 reference queues, checked every cycle.
- `tb_creditless_cell_list`: random inserts, searches and takes against a
  model.
- `tb_credit_table`: directed cases and a random run that follows the protocol.
- `tb_load_monitor`: occupancy, arrivals and losses checked every cycle against
  a model.
- `tb_bundle_map`: mixed, all-single and all-octet configurations.
- `tb_link_tx`: random cells and credits, decoded independently. It checks
  that cells come out whole and in order, and that credits come out in order
  and are inserted inside cells.
- `tb_link_rx`: random character streams with credits inside cells, idles,
  broken cells and stray bytes. It checks cells, credits, their timing and the
  error reports.
- `tb_atlas_switch`: an end-to-end run of the full-size core with default
  parameters, described below.
- `tb_atlas_chip`: an end-to-end run of the full-size chip through its
  character links, described at the end of this section.

`tb_atlas_switch` acts as both neighbours of the switch. Upstream, it injects
cells with unique ids. On the credit-controlled input link 5 it sends only with
a credit in hand, one cell per flow group, and checks every credit that comes
back. Downstream, on the
credit-controlled output 3 (two lanes), it returns each credit 80 cycles after
the cell. It checks that the switch never has more cells outstanding than the
pool, or two of one flow group.

A scoreboard checks each delivered copy:

- it arrives on the right output or bundle;
- it carries the new VPI/VCI, a valid HEC and an intact payload;
- cells of a VC on plain links keep their order;
- no link sends faster than one cell per cell time.

At the end, every injected cell must be either delivered or covered by a drop
counter. During the overload of output 0, credit-controlled cells from link 5
keep arriving, and none of them may be lost. The run also checks the 3-cycle latency and requires each of these
mechanisms to occur at least once: unicast, multicast, priority overtaking,
unroutable drop, buffer-full drop, input overrun, EFCI, moves into the
creditless list, input stall, credit-controlled departures, credits returned
upstream, both links of a bundle carrying traffic, and back-to-back cells at
the full link rate. It runs about 13,000 cycles and completes in well under a
second.

`tb_atlas_chip` drives only link characters. Links 0 and 2 are
credit-obeying upstream neighbours that send back-pressured cells on four flow
groups each. Link 1 sends multicast middle-class cells, and link 3 sends
top-class cells. Output 2 runs credit flow control with a pool of two. Its
downstream model returns each credit 100 clocks after the cell, slipped into
link 2's busy input stream.

The scoreboard checks every cell, the downstream limits, and that exactly one
credit per back-pressured cell comes back upstream with the right flow group.
The measured latency is 6 clocks from the last byte in to the first character
out.

Each of these must occur at least once:

- a credit inserted inside an outgoing cell;
- a credit extracted from inside an incoming cell;
- multicast;
- moves into the creditless list;
- credit-gated departures;
- a reported broken cell.

The run takes about 5,400 clocks.

## Simulating

With Verilator 5 (two-state; unset state starts random):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/atlas_pkg.sv \
          tb/tb_atlas_switch.sv --top-module tb_atlas_switch -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`. Replace
`tb_atlas_switch` with `tb_atlas_chip` for the whole chip, or with any other
testbench to run a unit test. To lint the core,
use
`verilator --lint-only -Wall -Irtl -y rtl rtl/atlas_pkg.sv rtl/atlas_switch.sv`.
It reports four warnings, all deliberate: an unused search output, unused VCI
bits, and reset used both in flip-flops and in assertion `disable iff`
clauses.
