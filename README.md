# Packet routers on a cell switch

A high-speed IP router can be built around a switching fabric that moves
small fixed-size *cells*. It does not need one that moves whole
variable-length packets. Each packet is cut into cells at the input. The
cells cross a synchronous N x N cell switch. The packet is rebuilt at the
output.

This RTL holds two such routers. Both use N = 16 ports by default and a
cell time (*slot*) of one clock cycle:

* **`iq_router`**: an input-queued router. Each input keeps one queue per
  output ("virtual output queues", VOQ). An iSLIP scheduler computes a
  conflict-free input/output match every slot. The scheduler can work
  cell by cell or packet by packet.
* **`cioq_router`**: a combined input/output-queued router. Each input has
  one FIFO and each output has one FIFO. The fabric runs twice per slot
  (speed-up 2) under the FIFO-2 scheduler.

`router_top` places the two routers side by side, each with its own ports.

The main idea is *packet-mode* scheduling. Once the first cell of a
k-cell packet is sent from input i to output j, the pair (i, j) stays
connected for the next k - 1 slots. The cells of a packet therefore reach
the output back to back, never mixed with other packets. Reassembly at
the output then costs almost nothing. With `USE_ORM = 0` it is removed
entirely.

## Data units and timing

`switch_pkg` defines:

* the cell, `cell_t = {first, last, data[31:0]}`. `first` and `last` mark
  the first and last cells of a packet;
* the scheduling mode, `sched_mode_e` (`CELL_MODE`, `PACKET_MODE`);
* `MAX_PKT_CELLS = 192`, the largest packet in cells. This is a
  9180-octet IP-over-ATM MTU plus 8 octets of LLC/SNAP encapsulation,
  carried by AAL5 in 48-octet cell payloads.

A packet comes in on an input line as one word per clock. `in_valid`
marks each word. `in_sop` and `in_eop` mark the first and last words.
`in_dest` gives the output port and is sampled with the first word. One
line word equals one cell, so the line rate equals the switch rate.
Segmentation overheads are not modelled.

Output lines carry the same framing: `out_valid`, `out_sop`, `out_eop`
and `out_data`. They also carry `out_src`, the input the packet came
from. The output port of each packet is an input of the router; routing
look-up and link-layer interfaces are outside this design.

## Input-queued router (`iq_router`)

```
line i -> ism -> voq_buffer (N queues of L cells) --req/qlen--> islip_sched
                         \--head cell--> crossbar --> orm (+ packet FIFO) -> line j
```

### Segmentation with whole-packet discard (`ism`)

The `ism` stores the complete packet in a ring of `MAX_PKT` words. It
then sends the packet's cells at `ILS` cells per slot. It is
store-and-forward, so the first cell leaves in the slot after the last
word arrived.

Before the first cell goes out, the `ism` compares the packet length
with `free_cells`, the free room in the destination queue at that moment.
If the packet does not fit, the whole packet is dropped (`drop_pkt`)
rather than a part of it. Dropping only a part would just waste switch
bandwidth on a packet the output must throw away.

The next packet may arrive while the previous one is still being sent. A
small descriptor queue holds the destination and length of each stored
packet.

### Virtual output queues (`voq_buffer`)

Each input has N circular queues of `L` = 30000 cells in one memory.
There is no sharing between queues. The buffer takes one write and one
read per slot and exports every queue length to the scheduler. A write
into a full queue is lost (`wr_lost`). Whole-packet discard at the `ism`
normally prevents this.

### iSLIP in cell mode and packet mode (`islip_sched`)

Cell mode is ordinary iSLIP with `ITER` iterations (default 4):

* Each unmatched input requests every output it has cells for.
* Each unmatched output grants the first requester at or after its
  grant pointer.
* Each input accepts the first grant at or after its accept pointer.

Pointers move one place beyond the partner, and only for matches made in
the first iteration. This update gives iSLIP its desynchronisation.
Pairs matched in earlier iterations stay matched.

In packet mode each input keeps one flag and an output number, the
*held* connection. When input i sends a cell that is not the last cell of
its packet, (i, j) is held for the next slot. Held pairs are placed in
the match before the iterations start. Their inputs and outputs then take
no further part.

A held output stays reserved even in a slot where its queue is
momentarily empty. This keeps the packet contiguous at the output. The
flag clears when the last cell goes, and all holds clear in cell mode.
`match_held` shows which inputs sent over a held connection.

### Alternative schedulers: MUCS and iOCF

The `SCHED` parameter of `iq_router` (`IQ_SCHED` on the top) replaces
iSLIP with one of two weighted schedulers. Both have the same match ports
and the same packet-mode holding rule as iSLIP.

**MUCS (`SCHED = 1`, `mucs_sched`).** Each queue gets a weight from the
queue lengths:

w_ij = L_ij / sum_k L_ik + L_ij / sum_k L_kj

This is the queue's share of its input's backlog plus its share of its
output's backlog. Each quotient is computed in fixed point with 16
fractional bits and truncated. The match is matrix-greedy: up to N times,
the heaviest entry whose row and column are both free is taken. Ties go
to the first entry in a scan that starts at a pseudo-random row and
column, taken from a 16-bit LFSR. All of this is combinational; it is a
large circuit at N = 16 and is meant as a reference, not a fast
implementation.

**iOCF (`SCHED = 2`, `iocf_sched`).** The weight of a queue is the age of
its head cell. The matching is the same grant/accept iteration as iSLIP,
with two differences:

* Outputs grant the oldest request, and inputs accept the oldest grant.
* Ties are broken from a pseudo-random start.

To know the ages, the router adds a second `voq_buffer` per input. It is
written and read in step with the cell buffer and stores the slot number
at which each cell arrived. Its `heads` output gives the stamp of every
queue head, and a 32-bit slot counter minus the stamp is the age. This
doubles the input buffer memory, and only this setting builds it.

### Fabric (`crossbar`)

The fabric is a memoryless N x N multiplexer driven by the match. It
tags each output cell with its source input. An assertion checks that
no output is selected twice.

### Reassembly and packet FIFO (`orm`)

In cell mode, cells of several packets can arrive interleaved at an
output. The `orm` keeps one ring per source input (`DEPTH` = 384 cells,
two maximum packets). When a last cell completes a packet, the packet's
place is queued in the packet FIFO. Completed packets then go out in
that order, contiguously, one cell per slot.

A packet is discarded (`pkt_discard`) in two cases:

* a ring overflowed while the packet was being collected;
* a new first cell arrived from a source whose previous packet never
  ended.

In the last case the ring is rewound over the unfinished packet.

### Timing

For a k-cell packet on an idle router, the first cell is in its VOQ at
the end of the slot after the last word. With the reassembly stage
present, the packet appears on the output line after its last cell has
crossed the fabric. On an idle router, the last cell leaves on the output
line 2k + 1 slots after the last word arrived, and `tb_iq_router` checks
this figure.

## Combined input/output-queued router (`cioq_router`)

```
line i -> ism --SPEEDUP_IP_IN--> cell_fifo (in) --2 heads--> fifo2_sched
              2 fabric passes per slot (crossbar x2)
          -> cell_fifo (out, 2 writes) --SPEEDUP_IP_OUT--> orm -> line j
```

Each input and each output queue is a `cell_fifo`: a single circular
FIFO that accepts two writes and two removals per slot. It shows its
first two entries. The tag stored with each cell is the cell's output in
an input queue and its source in an output queue.

### FIFO-2 (`fifo2_sched`)

FIFO-2 runs twice per slot, and execution e drives fabric pass e. Each
execution works as follows:

* It scans the inputs cyclically from a start chosen round-robin. The
  start moves one input per execution, so two per slot.
* Each input offers its oldest cell not yet sent in this slot.
* The transfer is enabled if no earlier input in the scan has taken that
  output in this execution. Otherwise the input waits for the next
  execution (`deferred`).

So at most two cells leave an input and at most two reach an output each
slot (`pass2`).

Packet mode adds reservations. A packet that starts towards output j
reserves j until its last cell is sent, and other inputs are refused
there. How far the reservation extends is set by `EXCL`:

| Setting | Used when | Reservation | Effect |
|---|---|---|---|
| `EXCL = 1` | `SPEEDUP_IP_IN = 2` | j in both executions | Packets never interleave in an output queue, and an input can send two cells of its packet per slot |
| `EXCL = 0` | `SPEEDUP_IP_IN = 1` | only the execution in which the packet started | The holding input sends only in that execution, so up to two packets can interleave at an output |

The evaluated setups are named FF-`<ip_in><2><ip_out>`. The prefix is FF
in cell mode and FF-PM in packet mode. The defaults give FF-221 and
FF-PM221, and `mode` selects between them. FF-121, FF-PM121 and FF-PM222
need `SPEEDUP_IP_IN = 1` or `SPEEDUP_IP_OUT = 2`.

### Losses in the output queues

An output queue can overflow. The cells already queued from a damaged
packet cannot be removed, and the reassembly stage must throw the packet
away.

To guarantee that, once a cell of a packet is lost at a full output
queue, the router also drops the remaining cells of that packet from
that source before the queue (`out_lost`). It keeps one "poisoned" flag
per output and source for this. The `orm` then sees a packet without a
last cell. It discards that packet when the source's next first cell
arrives. If the lost cell was the first one, no cell of the packet reaches
the queue at all.

### Queue sizes

In the evaluation this router is studied with unlimited queues. Here
every queue holds `QDEPTH` cells. In `router_top` that is N x L = 480000
cells, the buffer of one input of the input-queued router.

## Top level (`router_top`)

`router_top` has parameters `N`, `L`, `ITER`, `USE_ORM`, `SPEEDUP_IP_IN`
and `SPEEDUP_IP_OUT`. It contains `u_iq` (an `iq_router`) and `u_cioq`
(a `cioq_router`). Their ports appear with the prefixes `iq_` and
`cioq_`. The two routers share only the clock and reset. Reset is
synchronous and active low, and it clears pointers, counters and held
state.

## Departures from the source description and own choices

* **iSLIP details.** The iteration count (4), the pointer-update rule and
  the choice to keep a held output reserved while its queue is empty are
  choices of this design. They follow standard iSLIP.
* **Alternative schedulers.** The MUCS and iOCF schedulers are built as
  selectable options. Their fixed-point weights, LFSR tie order and
  iteration count are own choices. The RPA scheduler, whose
  reservation-vector matching is only outlined, is not built.
* **FIFO-2 packet mode.** The rules in packet mode (reservation per
  execution or per output, and sending only in the reserving execution)
  are this design's reading. The source states only that the extension is
  straightforward.
* **Output-queue losses.** Dropping the rest of a packet after an
  output-queue loss is this design's own choice.
* **Buffer sizes and widths.** The CIOQ queue sizes (finite), the
  reassembly ring size, the 32-bit payload and the line framing are own
  choices.
* **Oversized packets.** Packets longer than `MAX_PKT` words are
  discarded (`too_long`).

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

The traffic helpers are:

* `traffic_gen`: an on/off packet source with uniform, hot-spot or
  single-output destinations. Packet lengths are 1 to 192 cells.
* `router_checker`: a scoreboard. It checks that every delivered packet
  is complete, in order, uncorrupted and not interleaved. It also checks
  that every packet offered was either delivered or accounted for as
  dropped.

The end-to-end tests are:

* `tb_router_top` runs both routers at 4 ports in cell mode, packet mode,
  overload and single-output phases. It counts each mechanism (whole-packet
  discard, held connections, VOQ and reassembly losses, FIFO-2 deferrals,
  double writes, output-queue losses) and fails if any of them never
  happened.
* `tb_iq_router` runs three 4-port IQ routers on the same kind of traffic:
  iSLIP with reassembly, MUCS without reassembly in packet mode, and
  iOCF. It also checks the single-packet latency.
* `tb_mucs_sched` and `tb_iocf_sched` check each match against the
  properties their heuristic guarantees. Examples are: the heaviest or
  oldest request is always served, no request is left with both ends free,
  and (for MUCS) every request left out is blocked by one at least as
  heavy.
* `tb_router_top_full` runs `router_top` with all defaults.

To simulate, for example:

```
verilator --binary --timing --assert -Wno-fatal rtl/switch_pkg.sv \
    tb/tb_router_top.sv -y rtl -y tb --top-module tb_router_top
./obj_dir/Vtb_router_top
```

The same command works for the other `tb_*` files. The full-size test
takes about a minute to compile.
