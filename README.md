# IFPLUT: IP forwarding with a lookup table partitioned by egress port

A router has to find, for every packet, the **longest** routing-table prefix that matches
the packet's destination address. This is hard because prefixes nest: 198.64.0.0/10 and
198.64.0.0/11 can both match the same address, and the longer one must win.

IFPLUT (IP forwarding based on a partitioned lookup table) avoids the search for the longest
match. It splits the routing table by egress port: partial table *k* (PLUT *k*) holds only
the routes that lead to port *k*. Within one partial table no prefix can enclose another:
if it did, both would lead to the same port, and the longer one would be redundant. So a
search of one PLUT gives **zero or one** hit, never several. The longest match of the whole
table is then:

1. *N* independent single-match searches, one per PLUT, run in parallel. Each returns the
   length of its hit.
2. A pick of the largest of the *N* lengths. Its position is the egress port.

This repository holds synthesizable SystemVerilog for that engine. The default is 16 ports
and IPv4. Each PLUT is a ternary CAM (TCAM) of 64 entries. The selector is a hardwired
comparator network. A sorted-list/binary-search PLUT is also provided as a separate block.

## Worked example

The route set below spreads 16 prefixes over 3 ports:

| port | routes |
|------|--------|
| 1 | 198.152.0.0/14, 198.96.0.0/11, 198.64.0.0/11, 215.11.0.0/16 |
| 2 | 198.128.0.0/11, 198.64.0.0/10, 120.48.0.0/12, 138.204.0.0/14, 138.176.0.0/12, 120.160.0.0/11, 120.224.0.0/13, 239.64.0.0/10 |
| 3 | 198.154.0.0/16, 138.200.0.0/13, 120.56.0.0/14, 198.112.0.0/13 |

A packet for 198.88.191.1 hits 198.64.0.0/11 in PLUT 1 and 198.64.0.0/10 in PLUT 2, and
nothing in PLUT 3. The three match lengths are 10, 9 and 0 (see the encoding below), so the
selector picks port 1. `tb_ifplut_top` loads exactly this table and checks this packet.

## Requirements on the routing table

The hardware relies on two properties of the table. Keeping them is the job of the software
that maintains the table:

* **No enclosure within a port.** If a route encloses another route of the same port, drop
  the longer one: the shorter one already sends those addresses to the same port. The
  TCAM asserts (in simulation) that a lookup never hits two entries.
* **One port per prefix.** The same prefix must not be given to two ports. Otherwise two
  PLUTs return the same length, no comparator wins, and the packet is reported as unrouted.

Both follow from the assumption that each egress port leads to its own next hop.

## Match length encoding

Each PLUT reports a match length **ML**. ML = 0 means no hit. ML = len − 1 means a hit on a
prefix of length len. For IPv4 this fits in 5 bits because real prefixes are 8 bits or
longer, so len − 1 is never 0 for a real hit. The RTL accepts lengths 2..ADDR_W. The IPv6
width is 7 bits (`ML_W = 7`, `ADDR_W = 128`).

A prefix IPN/len is compared under a mask that has the leftmost len bits set. For /13 that
mask is 255.248.0.0. `mask_gen` builds the mask with one comparison per bit.

## Datapath and timing

```
 in_valid/in_pkt[0..N-1]
        |
  line_arbiter  (round-robin, one packet per cycle)   -- register: stage 1
        |
    separator   (destination address = header bytes 16..19)
        |  broadcast dst address            packet bypass
        +--> plut_tcam[0] --ML[0]--+             |
        +--> plut_tcam[1] --ML[1]--+   (register: stage 2, packet kept in step)
        +-->      ...              |             |
        +--> plut_tcam[N-1]-ML[N-1]+             |
                                   v             |
                    selector (N comp_slice) --PS[0..N-1]
                                   |             |
                        egress_gate (register: stage 3) --> eg_valid/eg_pkt[0..N-1], no_route
 update port --> update_dispatch --> write enable of one PLUT
```

| clock edge | what happens to a packet accepted at edge *t* |
|------------|-----------------------------------------------|
| *t*        | arbiter grants it (`in_ready` high) and registers it |
| *t*+1      | every PLUT compares its address; the N match lengths are registered |
| *t*+2      | the selector's PS vector gates the packet onto its egress port (registered) |

So `eg_valid[k]` is high in the third cycle after acceptance. One packet is accepted every
cycle, with no bubbles. A packet that no PLUT matches raises `no_route` in the same cycle
instead of an egress valid. A packet whose IP version field is not 4 raises `bad_version`
one cycle earlier and is not looked up. An update presented at edge *u* is written at edge
*u*+1. Packets looked up from edge *u*+2 on see it.

The three-stage pipeline is this design's choice. The architecture itself only fixes the two
steps (parallel table search, then selection) and argues that the TCAM access time is
constant in the number of ports.

## The partial lookup table as a TCAM (`plut_tcam`)

This is the form the engine uses. Each entry holds a valid bit, the masked prefix value, the
mask and the ML. All entries compare `(addr & mask) == value` at once. Because at most one
entry can hit, the result is the **OR** of the hit-gated ML values. No priority encoder is
needed, and the entries need not be sorted. Two things follow:

* An add is a single write to **any free slot**, and a delete clears the valid bit. Updates
  are O(1).
* The port number is not stored; it is implied by which PLUT holds the entry.

The ternary cells are flip-flop value/mask pairs with comparators, not a TCAM macro. In
synthesis a 16 × 64 table is about 70 k bits of storage. The mask is made once, at write
time.

Slots are chosen by whoever issues the update (`upd_idx`). The hardware does not search for
free slots.

## The partial lookup table as a sorted list (`plut_bsearch`)

Because the prefixes of one PLUT are disjoint, they can be sorted by value. An address can
then lie only in the entry with the largest value not above it. `plut_bsearch` keeps up to
`DEPTH` entries sorted and finds that entry by binary search, one halving step per cycle.
It then confirms the hit with a masked compare.

* Latency is fixed at clog2(DEPTH+1) + 2 cycles: 9 for 64 entries, 7 for 16.
* It handles one request at a time, with `ready` high when idle.
* An add finds its sorted position with one comparator per slot and shifts the entries
  above it up. A delete closes the gap. Both take one cycle.

This block is **not** wired into `ifplut_top`. Using it there would need a stall on the line
arbiter, because a lookup takes several cycles. It is verified on its own.

## The selector (`selector`, `comp_slice`)

Slice *j* drives PS*j*. It holds N − 1 greater-than cells that compare ML*j* with every other
ML, and it ANDs their outputs. PS*j* is 1 only if ML*j* is strictly larger than all the
others. This has three consequences:

* For unicast, at most one PS is ever high.
* When nothing matched (all ML = 0), no PS is high.
* A tie, which a valid table cannot produce, selects no port.

Each cell works on 5 (or 7) bits. The AND of N − 1 terms is left to synthesis as a
log2(N)-deep tree, so delay grows slowly with N while area grows with N².

## Interfaces

`ifplut_top` parameters: `N` (ports, 16), `DEPTH` (entries per PLUT, 64), `ADDR_W` (32),
`ML_W` (5), `PKT_W` (packet word, 160 = one IPv4 header), `DST_BYTE` (16), `VERSION` (4).
For IPv6 use `ADDR_W = 128`, `ML_W = 7`, `PKT_W = 320`, `DST_BYTE = 24`, `VERSION = 6`
(the TCAM table, selector and mask generator are simulated at these widths; the whole engine is not).

| port | dir | meaning |
|------|-----|---------|
| `in_valid[N]`, `in_pkt[N][PKT_W]` | in | packet offered per input port. Hold it until `in_ready` |
| `in_ready[N]` | out | one-hot grant; the packet is taken at this clock edge |
| `upd_valid`, `upd_op` (`UPD_ADD`/`UPD_DELETE`), `upd_port`, `upd_idx`, `upd_ipn`, `upd_len` | in | write route IPN/len to slot `upd_idx` of the PLUT of `upd_port` (0-based) |
| `upd_err` | out | update refused because `upd_port` ≥ N |
| `eg_valid[N]`, `eg_pkt[N][PKT_W]` | out | packet on its egress port. The other ports carry zeros |
| `no_route` | out | a packet matched nothing and was dropped |
| `bad_version` | out | a packet with another IP version was dropped |

Ports are numbered from 0 in the RTL; port index *k* is the (*k*+1)-th line. Reset is
asynchronous and active low. It empties all tables.

A packet is carried as one word holding its IP header, most significant byte first. Payload
transfer and line framing are outside this design.

## Choices made here, and what is left out

Choices this RTL makes where the architecture leaves them open:

* round-robin arbitration with a valid/ready handshake
* the IPv4 header layout for the separator
* the version check
* issuer-chosen TCAM slots
* registered pipeline stages
* dropping unrouted packets with a flag
* egress ports without back-pressure
* 64 entries per PLUT (the architecture only says each gets about S/N of S routes)

The output drivers are gated registers, not tri-state buffers. The mask rule is "leftmost len
bits set", which is how the /13 example reads.

Not built:

* the line interfaces (for example OC-192 cards)
* the alternative selector in software on an embedded processor
* the control-plane software that partitions the table and removes redundant routes

The published cost and delay numbers for the selector (16 to 128 ports, IPv4 and IPv6) come
from a 0.35 µm standard-cell library and are not reproduced here. The RTL takes any `N`.
The default build is the 16-port IPv4 case.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_mask_gen` | every IPv4 length and every IPv6 length against a shifted all-ones word |
| `tb_comp_slice` | directed and random ML vectors, including ties and all-zero |
| `tb_selector` | N = 16 (5-bit ML) and N = 128 (7-bit ML) against a max-and-unique reference; the 198.88.191.1 example |
| `tb_separator` | random headers, address bytes 16..19, version filter |
| `tb_plut_tcam` | the port-1 routes, then a full random disjoint table with deletes and re-adds, against a reference search; one-cycle latency |
| `tb_plut_tcam_ipv6` | the same table at IPv6 widths (128-bit addresses, 7-bit ML, lengths 16..128 including a /128) |
| `tb_plut_bsearch` | sorted order of the port-3 routes, random table churn, fixed latency, refused updates (16 entries) |
| `tb_line_arbiter` | one grant, order per input, no starvation beyond N − 1 cycles, strict rotation when all request |
| `tb_egress_gate`, `tb_update_dispatch` | gating, `no_route`, decoding, refusal of bad ports |
| `tb_ifplut_top` | full default size (16 ports × 64 entries) end to end |

`tb_ifplut_top` loads the example table and checks 198.88.191.1 → port 1. It then builds about
500 more routes, many nested inside routes of other ports. It runs about 6000 cycles of
random traffic on all 16 inputs while routes are added and deleted. Each packet's port,
contents and 3-cycle latency are compared with a flat longest-prefix search over the
testbench's copy of the table. It also counts, and requires at least one of each of:

* input contention
* lookups with several PLUT hits
* unrouted drops
* bad-version drops
* adds and deletes under traffic
* refused updates
* runs of back-to-back packets

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ifplut_pkg.sv tb/tb_ifplut_top.sv --top-module tb_ifplut_top -o sim
./obj_dir/sim
```

## Files

* `rtl/ifplut_pkg.sv`: widths, defaults, update opcode
* `rtl/ifplut_top.sv`: the engine
* `rtl/line_arbiter.sv`, `rtl/separator.sv`, `rtl/plut_tcam.sv`, `rtl/mask_gen.sv`,
  `rtl/selector.sv`, `rtl/comp_slice.sv`, `rtl/egress_gate.sv`,
  `rtl/update_dispatch.sv`: its blocks
* `rtl/plut_bsearch.sv`: the sorted-list PLUT
* `tb/tb_*.sv`: one testbench per block
