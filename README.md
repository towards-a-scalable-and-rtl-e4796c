# A hierarchical wireless network-on-chip with error-controlled links

A flat mesh connecting hundreds of cores needs many hops between far-apart cores. This design
groups 256 cores into 16 small mesh subnets of 16 cores. Each subnet has a hub. The 16 hubs sit
on a wired ring, and 24 one-way wireless links, each using one laser frequency channel, form
shortcuts across that ring. Traffic inside a subnet stays on its mesh. Traffic between subnets
climbs to the local hub, which works out the shortest hub path once. That path uses the ring
alone or exactly one wireless shortcut. The rest of the packet follows it.

Both kinds of link carry an error-control code:

* **Wired links** use JTEC-SQED, a crosstalk-avoiding duplicated Hsiao code on 78 wires. It
  corrects any 3 wire errors and detects any 4.
* **Wireless links** use an H-PC, a two-dimensional Hamming product code. The space code is
  (38,32) per flit and the time code is (7,4) across blocks of four flits. The coded bits are
  time-multiplexed into 0.1 ns on-off-keyed slots.

## Hierarchy

```
winoc_top
├── subnet ×16                    4x4 mesh of switches
│   ├── subnet_switch ×16         6 ports: core, N, E, S, W, hub
│   │   └── noc_router            shared VC router core (rr_arb inside)
│   └── wire_link ×48             one-way mesh links: jtec_sqed_encoder → 78 wires → jtec_sqed_decoder
├── hub ×16                       20 ports: 16 switch ports, ring CW/CCW, 2 wireless
│   ├── hub_prerouter             path search for new inter-subnet packets
│   └── noc_router
├── wire_link ×512                switch→hub and hub→switch, one pair per switch
├── wire_link ×32                 ring, both directions
└── per wireless link ×24
    ├── wb_tx  = hpc_encoder → tdm_tx      (transmitter in the source hub)
    └── wb_rx  = tdm_rx → hpc_decoder → FIFO (receiver in the destination hub)
```

`winoc_pkg` holds:

* the flit and header types;
* the sizes;
* the wireless link table (`WL_SRC`, `WL_DST`);
* the code tables and functions. The Hsiao and Hamming column sets are computed by
  constant functions, not typed in.

## Flits, packets and flow control

A flit (`flit_t`) is a 32-bit payload plus a 2-bit type (head, body, tail, single) and a 2-bit
virtual channel (VC) number. A packet can have any length. The head flit's payload is a
`header_t`:

| field | bits | meaning |
|---|---|---|
| `tag` | 8 | free for the user |
| `wl_done` | 1 | the wireless hop has been taken |
| `wl_link` | 5 | chosen wireless link |
| `use_wl` | 1 | path uses a wireless link |
| `routed` | 1 | hub path has been fixed |
| `src_subnet`, `src_local` | 4 + 4 | source core |
| `dst_subnet`, `dst_local` | 4 + 4 | destination core |

Each input port has 4 VCs with 2-flit buffers. Switching is wormhole: a head flit claims an
output VC, and the body and tail flits follow on it. Credit-style flow control works through
`vc_ready` vectors. A sender may send on VC v only while the receiver shows `vc_ready[v]`.
The `out_taken` / `up_taken` signal says whether the flit was actually accepted. A wired link
can refuse a flit (see *retry* below), and the router then keeps the flit and offers it again.

## Routing

* **Inside a subnet**: e-cube (X then Y) on the 4x4 mesh. A flit for another subnet leaves its
  switch at once on that switch's direct link to the hub, so every switch is one hop from the
  hub.
* **At the first hub** (`routed` = 0): `hub_prerouter` compares two kinds of path to the
  destination hub:
  * the ring path, taking the shorter direction, with clockwise winning a tie;
  * every path made of ring hops, then one wireless link, then ring hops.

  It picks the fewest total hops. A wireless path wins a tie with the ring. Among equal
  wireless paths, the lowest link number wins. The hub writes `routed`, `use_wl` and
  `wl_link` into the header.
* **At later hubs**: until `wl_done` is set, a hub moves the flit along the ring toward the
  chosen link's source hub. The source hub sends it on the link and sets `wl_done`. After that,
  or if `use_wl` = 0, normal shortest ring routing takes it to the destination hub. That hub
  hands it to switch `dst_local` over the direct link.

Only paths with a single wireless link are searched, following the design's rule that keeps the
pre-routing cheap. A path with two wireless hops could sometimes be shorter.

### Link placement

The 24 links are listed in `winoc_pkg`:

```
WL_SRC = 0 1 2 3 3 4 5 5 6 6 7 8 8 9 9 10 11 11 12 12 13 14 15 15
WL_DST = 12 6 10 7 13 11 0 9 2 14 12 3 15 1 5 14 0 6 2 8 5 10 3 8
```

Every hub has at most two outgoing and two incoming links. This matches the hub's two wireless
ports. The placement was found by simulated annealing on the average hub-to-hub distance. With
these links that average is 2.0 hops over all 240 ordered hub pairs, against 4.27 for the ring
alone. `tb_hub_prerouter` recomputes it by breadth-first search. The placement is this design's
own. Its published average (1.5625 hops for 16 hubs and 24 links) could not be reached with
one-way links and two wireless ports per hub, so that number is not claimed here.

## Router timing

`noc_router` is shared by switches and hubs:

* Each cycle it stores arriving flits.
* For each VC whose front flit is a head, it computes the route and claims a free output VC.
  Output VCs are claimed lowest free first, with a round-robin over the requesters.
* It then runs round-robin switch arbitration per output, one flit per output per cycle.

A head flit spends two cycles in a router: one to be stored and routed, one to leave. Body
flits leave one cycle after they are stored. The original design splits input arbitration,
routing/switch traversal and output arbitration into three pipelined stages. Here they are
merged into one cycle. This departs from it: hop latency is shorter than in that design, while
throughput per port is the same (one flit per cycle).

A packet between two neighbouring cores of one subnet takes 4 cycles from injection to
delivery. This is checked in `tb_subnet` and `tb_winoc_top`.

## JTEC-SQED wired links (`jtec_sqed_encoder`, `jtec_sqed_decoder`, `wire_link`)

The 32-bit payload is encoded with a (39,32) Hsiao SEC-DED code:

* Every data column of the check matrix has weight 3.
* The columns 7, 28 and 112 are skipped so that each check bit is the XOR of 13 or 14 data
  bits.

The 39-bit codeword is sent twice, interleaved: copy A on the even wires and copy B on the odd
wires (`w[2i] = A[i]`, `w[2i+1] = B[i]`). Each wire's neighbour then carries the same bit, which
removes the worst-case opposite switching between neighbours.

The decoder classes each copy's syndrome as zero, odd or even, and picks as follows:

| copy A | copy B | output |
|---|---|---|
| zero | any | A |
| even | any | B, single-corrected |
| odd | zero | B |
| odd | even | A, single-corrected |
| odd | odd | corrected copies, which must agree |

This corrects every pattern of up to three wire errors. These cases raise `uncorrectable`:

* both syndromes even;
* both odd with disagreeing results, or with a syndrome that matches no column;
* both zero with different copies.

A four-error pattern either lands in one of these cases or, when all four errors hit the same
copy, is still decoded correctly from the other copy.

**Retry.** `wire_link` models one wired link. The codec is combinational, which fits the cycle
at 2.5 GHz. An `err` input flips wires for testing. On `uncorrectable` the link refuses the flit
(`up_taken` = 0, `retry` = 1). The sender keeps it and sends it again the next cycle. This
retransmission scheme is this design's own; the original only states that detected errors are
retransmitted. `corrected` reports a fixed flit.

The 4-bit sideband (flit type, VC) travels on plain wires next to the 78 coded ones. It is not
coded.

## Wireless links: H-PC and TDM

**Encoder (`hpc_encoder`).** Each flit becomes one 43-bit column:

* 38 bits of (38,32) Hamming code;
* a 5-bit sideband {valid, type, VC}.

Four columns make a block. A (7,4) Hamming code along time, applied bit by bit over the four
columns, adds three parity columns p1, p2 and p3. Both codes are linear, so the parity columns
are (38,32) codewords too. The sideband is protected only by the time code. So a single error
in each column is always corrected when it falls in the 38 coded bits. Two errors on the same
sideband bit within one block are not corrected.

If a block is part-filled and no flit arrives for `FLUSH_WAIT` (8) cycles, it is padded with
empty columns. Without this, the tail of a packet could wait forever. Two block buffers let
one block fill while the other is sent.

**TDM (`tdm_tx`, `tdm_rx`).** A column is cut into 4-bit symbols, one per cycle. This is 4
on-off-keyed slots of 0.1 ns in each 0.4 ns clock cycle, for 10 Gb/s per frequency channel.

* With `CH` channels per link, `4*CH` bits go per cycle.
* With the default single channel, a column takes 11 cycles and a block 77 cycles. That is 4
  flits of 32 bits in 30.8 ns.
* `sym_first` marks the first symbol of a block, so the receiver realigns on every block.
* `tdm_rx` outputs a column the cycle after its last symbol.

**Decoder (`hpc_decoder`).** Each column is corrected by the (38,32) decoder as it arrives.
After the 7th column, 37 parallel (7,4) decoders (32 data bits + 5 sideband bits) correct each
row. That fixes, for example, a burst that wipes out a whole column, which the column code
cannot. `col_fix` and `row_fix` report corrections.

**Flow control (`wb_rx`, `wb_tx`).**

* `wb_rx` puts decoded flits into a 16-flit FIFO.
* It raises `full` once 8 or more flits are held. That leaves room for the two blocks that may
  already be on the way.
* `wb_tx` starts no new block while `full` is high.
* In the original this flag rides in a control flit on the reverse channel. Here it is a wire
  (`wl_rx_full` → `wl_tx_full`), which the top brings out as ports.

The top leaves the physical wireless channel outside. For each link it brings out:

* the transmitter's symbols (`wl_tx_sym_*`);
* the receiver's symbol inputs (`wl_rx_sym_*`).

Connecting `wl_tx_sym_*[i]` to `wl_rx_sym_*[i]` (and `wl_rx_full` to `wl_tx_full`) closes link
`i`. The antennas, modulators, lasers and amplifiers are analog parts and are not modelled.

## Top-level ports of `winoc_top`

| port | meaning |
|---|---|
| `core_in_*[256]` | injection interface of each core: valid, flit; the core sees `vc_ready` |
| `core_out_*[256]` | delivery to each core; the core drives `vc_ready` |
| `wl_tx_sym_*`, `wl_rx_sym_*`, `wl_tx_full`, `wl_rx_full` `[24]` | the 24 wireless channels |
| `wl_col_fix`, `wl_row_fix` | corrections made by each wireless receiver |
| `ring_err[16][78]` | wire flips injected on each clockwise ring link, for testing; tie to 0 |
| `ring_fix`, `ring_retry` | that link corrected a flit / refused one |

Reset is synchronous and active low on every module.

## Departures from the original design

* Router stages run in one cycle instead of three pipelined ones (see *Router timing*).
* The wireless link placement, and thus the average distance of 2.0 hops, is this design's own.
* Hubs have 2 wireless ports each.
* The wired-link retransmission is a one-cycle refusal and resend.
* The wireless full flag is a separate wire.
* The sideband of a flit (type, VC) is uncoded on wired links.
* The H-PC column carries a 5-bit sideband, so a column has 43 bits instead of 38.
* Only the main configuration is built: 256 cores, 16 subnets, 24 single-channel links.
  `tdm_tx`/`tdm_rx` take the channel count as a parameter, but the link table is fixed at 24
  links.
* Not modelled: the analog wireless parts (antennas, modulators, lasers, amplifiers), the
  placement optimisation itself, and the baseline networks used for comparison.

## Simulating

All modules import `winoc_pkg`, so list it first. Each testbench in `tb/` is self-checking and
prints `TB_RESULT checks=N failures=M`. Some import `tb_ref_pkg` (independent reference
encoders), so add it after the package. Run with random initial values to make sure nothing
depends on them:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_hpc_decoder \
    rtl/winoc_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_hpc_decoder.sv -Mdir obj_hpc
./obj_hpc/Vtb_hpc_decoder +verilator+rand+reset+2
```

(`rtl/winoc_pkg.sv` appearing twice is harmless; or list the rtl files explicitly.)

| testbench | what it checks |
|---|---|
| `tb_jtec_sqed_encoder` | codewords against an independent Hsiao encoder; wire order |
| `tb_jtec_sqed_decoder` | random 1/2/3-error patterns corrected, 4-error patterns flagged or decoded correctly, plus hand-picked bursts |
| `tb_wire_link` | flits through the link with random errors; flagged flits held back and retried |
| `tb_hpc_encoder` | columns against a reference product code; flush of part blocks; latency |
| `tb_hpc_decoder` | single errors per column and whole-column bursts corrected; flags |
| `tb_tdm_tx`, `tb_tdm_rx` | 11 cycles per column (6 with 2 channels); back-to-back columns; realignment |
| `tb_wb_tx`, `tb_wb_rx` | 77 cycles per block; `full` at 8 flits honoured; errors corrected end to end |
| `tb_hub_prerouter` | every hub pair against a breadth-first search; average distance 2.0 |
| `tb_subnet_switch`, `tb_hub` | routing, header rewrite, VC allocation, wormhole order under random traffic |
| `tb_subnet` | 16-core mesh, latencies of 4 and 14 cycles |
| `tb_winoc_top` | the whole 256-core network at default size |

`tb_winoc_top` closes every wireless link on itself. It injects one bit error per column (kept
in the 38 coded bits) or a burst in one column, and it injects 1 to 4 wire errors on ring links. It sends:

* a lone neighbour packet (latency 4);
* 96 uniform random packets;
* 16 ring-only packets;
* a hotspot toward one subnet whose cores stall for 1500 cycles.

It checks that every flit arrives once, in order, at the right core. It also counts that each
of these happened at least once:

* local, ring and wireless delivery;
* column and row correction;
* wireless `full`;
* ring correction and ring retry.

The full design has 256 switches and 16 hubs of 20 ports. A verilator build of `tb_winoc_top`
takes about 14 minutes with 8 compile jobs (`-j 8`); the run itself (a few thousand cycles) then
takes under a minute.
