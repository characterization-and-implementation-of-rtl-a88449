# Fault-tolerant TSV links for a two-tier network-on-chip

Stacking dies and joining them with through-silicon vias (TSVs) gives a
network-on-chip short, fast vertical links, but TSVs are fragile: random open
defects in a few vias are enough to lose a chip. A vertical NoC link is dozens
of TSVs side by side, so one bad via in any of them breaks the link.

This RTL implements the repair scheme of *Characterization and Implementation
of Fault-Tolerant Vertical Links for 3-D Networks-on-Chip* around a small
two-tier NoC:

* each vertical link carries a few **spare TSVs**;
* a row of **2:1 multiplexers** on each tier can shift signals one via sideways,
  so a defective via is skipped and its traffic lands on a spare;
* the mux settings are worked out by an external tester after a **scan test of
  the vias**. They are then burnt into a small **fuse (OTP) memory** on each tier;
* a link with more defects than its spares can absorb is **disabled** by
  forcing its flow-control wires to safe values.

The repair path is all combinational muxing plus a fuse word; nothing on chip
computes the repair. That keeps the cost low: the paper reports about 21 % of a
vertical link's area and about 2 % of a switch's, in 130 nm.

## The stacked network

```
 top tier      P0/M0         P1/M1          P2/M2
                SW0 <------> SW1 <--------> SW2
                              |  ^
               link 0 (down)  v  |  link 1 (up)      fault-tolerant TSV links
                              |  ^
 bottom tier    SW3 <------> SW4 <--------> SW5
               P3/M3         P4/M4          P5/M5
```

`noc3d_top` is a 3x2 mesh folded onto two tiers. Three switches sit on each
tier, each serving one processor port and one memory port. Neighbours on a tier
are joined by planar links. The only vertical connection is between the two
central switches, one unidirectional fault-tolerant link per direction
(`ft_vertical_link`). The edge switches have 3 ports and the central ones 5.
Port numbers:

| port | SW0, SW3 | SW1, SW4 | SW2, SW5 |
|------|----------|----------|----------|
| 0 | processor | processor | processor |
| 1 | memory | memory | memory |
| 2 | east neighbour | west neighbour | west neighbour |
| 3 | – | east neighbour | – |
| 4 | – | vertical | – |

The cores attach directly to the switch ports through the top's `core_*`
arrays. Index k = 0..5 is processor Pk and k = 6..11 is memory M(k-6). The
network interfaces that would packetise core transactions are not part of
this RTL.

## Anatomy of one vertical link

A 32-bit vertical link is 38 signals. In this RTL they are grouped as follows:

| group | direction | width | contents |
|-------|-----------|-------|----------|
| forward | sender → receiver | 35 | flit[31:0] (bits 0-31), valid (32), forwarded clock (33), forwarded reset (34) |
| backward | receiver → sender | 3 | stall (bit 0), two sideband wires (bits 1-2) |

The paper counts 35 outgoing and 3 incoming wires, 6 of them for flow control
and for the forwarded clock and reset. It names stall but not the other two
incoming wires. Here those two are carried as generic sideband bits
(`vl_aux_i` → `vl_aux_o`).

Each group gets its own spares, because a spare can only stand in for wires
that run in its own direction. The default is four spares per link: three for
the 35 forward wires and one for the 3 backward wires. That makes
35 + 3 = 38 forward TSVs and 3 + 1 = 4 backward TSVs, 42 in all. It is the
configuration the paper builds and measures, and it takes its modelled yield
from 68 % to 98 %.

```
  sending tier                                   receiving tier
  switch out ──► ft_link_end ──► tsv_bundle ──► ft_link_end ──► switch in
                (tx_xbar, OTP,   (38 vias)      (rx_xbar, OTP,
                 inject chain)                   capture chain)
  switch in  ◄── ft_link_end ◄── tsv_bundle ◄── ft_link_end ◄── switch out (stall)
                (rx_xbar,        (4 vias)       (tx_xbar,
                 capture chain)                  inject chain)
```

Each tier holds one `ft_link_end` per link. It contains the transmit crossbar
for its outgoing group, the receive muxes for its incoming group, an OTP word,
two scan chains and a small test sequencer. The same repair information must be
fused on both tiers, since the sender shifts and the receiver unshifts.

## How a cluster is repaired

The spares split a group into **clusters**: consecutive signal ranges of
near-equal size, one spare each. The 35 forward signals form clusters of 11, 12
and 12 signals. The 3 backward signals form one cluster. A cluster of n signals
owns n+1 pads: pad index = signal index + cluster number, and the last pad of
each cluster is its spare.

Every pad has a 2:1 mux (`tsv_tx_xbar`) choosing between *its own* signal and
the *previous* signal of the cluster. Every received signal has a 2:1 mux
(`tsv_rx_xbar`) choosing between *its own* pad and the *next* pad. A
cluster's **repair code** k says how they are set:

* `k = 0`: no repair. Signal i uses pad i, and the spare is driven low.
* `k ≥ 1`: pad k-1 of the cluster is bad. Signals 0 .. k-2 keep their pads.
  Signals k-1 .. n-1 move up by one pad, so the last one uses the spare. The
  bad pad still carries a copy of its old signal, but nobody reads it.

Example, a 3-signal cluster whose second pad is open (code 2):

```
  signal 1 ─► pad 1
  signal 2 ─► pad 3        (pad 2 skipped)
  signal 3 ─► spare E1
```

A cluster tolerates exactly one bad via. A bad spare needs no repair (code 0).
Codes are `REP_W` = 6 bits, enough for clusters of up to 63 signals. That
covers even the 2-spare configuration, where all 35 forward wires share one
spare. The repair adds one mux on each tier to every path. The paper measures
this at up to 90 ps in 65 nm.

**Disabling a link.** When some cluster has two or more bad vias, the tester
blows the disable fuse (the MSB of the OTP word) on both ends. The receiver
then sees `valid = 0` and the sender sees `stall = 1`, whatever arrives on the
vias. No flit is lost or invented, and a packet routed over the link simply
waits. The paper then changes the network's routing tables to avoid the link.
Here routes come with the packets, so avoiding the link is up to whoever builds
the headers.

### Fuse word layout

`END_CFG_W` = (clusters of both groups) × `REP_W` + 1 = 25 bits per link end:

| bits | sending end (`[l][0]`) | receiving end (`[l][1]`) |
|------|------------------------|--------------------------|
| [17:0] / [5:0] | forward cluster codes 0,1,2 (cluster 0 lowest) | backward cluster code |
| [23:18] / [23:6] | backward cluster code | forward cluster codes 0,1,2 |
| [24] | disable | disable |

In other words, each end stores its *outgoing* codes first, then its *incoming*
codes. `otp_rom` models the fuses. They start at 0, `prog_en` ORs `prog_data`
in on a clock edge, nothing ever clears them, and reset leaves them alone.

## Testing the vias and programming the fuses

The chip has no logic that works out the repair. The tester reads every via
through scan chains, works out the codes off chip and writes the fuses. Each
link end has:

* an **inject chain** of OUT_W bits. While `test_en` is high it replaces the
  switch as the source of the outgoing signals;
* a **capture chain** of IN_W+IN_C bits that samples the incoming *pads*. It
  samples before the receive muxes, so every via, spares included, is seen on
  its own;
* `tsv_test_ctrl`, which sequences the chains.

With two ends per link that is four scan chains per link.

While `test_en` is high, the end's crossbars ignore the fuses and use
`test_shift`. At 0 every regular pad is driven. At 1 every cluster is fully
shifted, which drives the spares (a cluster's first pad keeps its own signal).
Also while `test_en` is high, flow control is clamped as for a disabled link,
so test patterns never reach a switch.

Per link and per pass, with both ends driven together:

1. raise `test_en` and set `test_shift` on both ends;
2. pulse `start`. From the next cycle, `tdi` is shifted in one bit per cycle
   for OUT_W cycles, bit 0 first. `test_busy` is high meanwhile; afterwards the
   vector stays on the pads;
3. after a few cycles, pulse `capture`. One cycle later the capture chain holds
   the incoming pads. On each of the next IN_W+IN_C cycles, `tdo` shows one
   pad, pad 0 first;
4. off chip, compare with what was sent. An open via reads 0, so an all-ones
   vector in the two passes (`test_shift` = 0, then 1) exposes every open;
5. derive one code per cluster (or the disable bit) and write both ends' fuse
   words with `otp_prog_en`/`otp_prog_data`. Then drop `test_en`.

`tb/tb_ft_vertical_link.sv` and `tb/tb_noc3d_top.sv` contain a complete tester
written as tasks (`scan_pass`, `test_and_repair`), which is a good starting
point for driving a real test.

## The STALL/GO switch

`stallgo_switch` is a wormhole switch that buffers only its inputs. Each input
has a 4-flit `flit_fifo`. Everything between an input buffer's head and the
next switch's input buffer is combinational: arbitration, the crossbar and the
link. The stall that comes back is a registered full flag, but the sender uses
it combinationally. A flit written into an input buffer at one clock edge is
offered to the next hop before the following edge, so the switch has one cycle
of latency. This is the STALL/GO arrangement the paper favours for vertical
links, because a short vertical link keeps that combinational path short.

* **Flow control.** A sender holds `valid` with a flit; the flit moves on every
  clock edge where `valid` is high and `stall` is low. `stall` is the input
  buffer's full flag. `out_valid` never depends on `out_stall`.
* **Packets.** A header flit `{len[3:0], route[27:0]}` is followed by `len`
  payload flits (0-15). `route[2:0]` is this switch's output port. The header
  leaves with `route` shifted right by 3, so each switch reads its port from
  the low bits. A path can be up to 9 hops.
* **Arbitration.** Each free output grants one waiting header, round robin
  (`rr_arbiter`). If payload follows, the output stays locked to that input
  until the last payload flit has left.

## Top-level interface

| ports | meaning |
|-------|---------|
| `clk`, `rst_n` | one clock for both tiers; asynchronous active-low reset (fuses are not reset) |
| `core_in_flit/valid/stall`, `core_out_flit/valid/stall` | STALL/GO ports of the 12 cores |
| `vl_test_en, vl_test_shift, vl_start, vl_capture, vl_tdi` → `vl_tdo, vl_test_busy` | `[link][end]` test access, end 0 = sending tier, end 1 = receiving tier; link 0 = SW1→SW4, link 1 = SW4→SW1 |
| `vl_otp_prog_en`, `vl_otp_prog_data` → `vl_link_disabled` | `[link][end]` fuse programming and disable state |
| `vl_open_fwd`, `vl_open_bwd` | per-via open-defect injection into the TSV model; tie to 0 outside simulation |
| `vl_fwd_clk_o`, `vl_fwd_rst_n_o` | the sender's clock and reset after crossing the vias |
| `vl_aux_i` → `vl_aux_o` | the two sideband backward wires of each link |

## Files

| file | contents |
|------|----------|
| `rtl/noc3d_pkg.sv` | widths, bit positions, spare counts, cluster arithmetic, header helper |
| `rtl/noc3d_top.sv` | the two-tier network |
| `rtl/ft_vertical_link.sv` | one unidirectional link: two ends and two via bundles |
| `rtl/ft_link_end.sv` | one tier's crossbars, fuses, scan chains and clamp |
| `rtl/tsv_tx_xbar.sv`, `rtl/tsv_rx_xbar.sv` | the shift muxes |
| `rtl/tsv_test_ctrl.sv` | scan sequencer |
| `rtl/otp_rom.sv` | behavioural fuse memory |
| `rtl/tsv_bundle.sv` | behavioural via bundle with open defects |
| `rtl/stallgo_switch.sv`, `rtl/flit_fifo.sv`, `rtl/rr_arbiter.sv` | the switch |

`otp_rom` and `tsv_bundle` model physical parts: a fuse macro and the vias
themselves. In a real chip they are replaced by the process's fuse block and by
the via pads. `otp_rom` uses an initialised variable for the blank state of the
fuses. Everything else is synthesizable.

## Simulating

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb rtl/noc3d_pkg.sv tb/tb_noc3d_top.sv --top-module tb_noc3d_top
./obj_dir/Vtb_noc3d_top
```

Replace the testbench name to run another one. The unit testbenches are
`tb_tsv_tx_xbar`, `tb_tsv_rx_xbar`, `tb_otp_rom`, `tb_tsv_bundle`,
`tb_tsv_test_ctrl`, `tb_ft_link_end`, `tb_ft_vertical_link`, `tb_flit_fifo`,
`tb_rr_arbiter` and `tb_stallgo_switch`.

* `tb_noc3d_top` runs the network at its default parameters in two phases.
  * Phase 1: random opens (at most one per cluster) go on both vertical links.
    The testbench scans, diagnoses and fuses the links, then all twelve cores
    exchange random packets, hundreds of them between tiers.
  * Phase 2 uses a fresh chip whose upward link has two opens in one cluster.
    That link must come out disabled. A packet routed over it must never
    arrive, while other traffic still flows.
  * It counts and requires each mechanism: scan passes, repairs, a disabled
    link, traffic both ways, vertical-link stall, core stall, multi-flit
    packets, the forwarded clock and reset, and the sideband wires.
  * It takes about 15 s.
* `tb_ft_vertical_link` runs 40 random single-fault repairs, including faulty
  spares. It also runs the unrepaired case, which must corrupt data, and the
  double-fault case, which must clamp.
* `tb_spare_configs` runs the same repair flow with 2, 3, 4, 7, 11 and 38 spares
  per link, using the helper `tb/ft_link_trial.sv`. It checks that a link comes
  out working exactly when no cluster has two defects, and prints how many
  random-defect links each configuration rescued. The spares are split
  1+1, 2+1, 3+1, 6+1, 10+1 and 35+3.

Each unit testbench has been run against a copy of its module with one
deliberate bug, and each one caught its bug.

## Changing the design

* **Spare count.** Set `FWD_C` and `BWD_C` on `ft_vertical_link`; the top
  takes `FWD_CLUSTERS` and `BWD_CLUSTERS` from the package. Clusters must stay
  at 63 signals or fewer (`REP_W`). The fuse word width follows.
* **Flit width.** `FLIT_W` and the forward-group bit positions live in
  `noc3d_pkg`. The forward group must stay flit + 3 wires.
* **Buffer depth.** `DEPTH` on `noc3d_top` and `stallgo_switch`.

## Where this RTL departs from the paper, and what it leaves out

* The paper's switches, network interfaces and routing tables come from an
  existing NoC library and are described only by function. The switch here
  is written from that description. The header format and round-robin
  arbitration are this design's own choices. The input buffer depth of 4
  follows the small depth the paper quotes when comparing switches. The network
  interfaces are not included, so no routing table is reprogrammed around a
  disabled link.
* The paper injects test vectors through the switches' input buffers, which
  are already on scan chains. Here dedicated inject and capture chains sit at
  the link boundary. The sequencer's command interface (`start`, `capture`)
  stands in for a standard test access port, which is not included.
* Cluster membership (consecutive signals), the repair-code format, the idle
  level of an unused spare, the fuse word layout and the safe clamp values
  (valid 0, stall 1) are this design's own choices. The paper asks that a
  cluster's vias be physically spread apart. That is a placement matter the
  RTL does not see.
* Both tiers run on one clock. The paper forwards clock and reset across the
  link for a mesochronous synchronizer that it does not describe. Here the
  forwarded clock and reset cross the vias and are brought out as ports.
* A via's electrical behaviour (RC delay of tens of picoseconds, contact
  resistance, misalignment) is not modelled. An open via is modelled as
  reading 0.
* Vias that pass through several tiers, and the paper's 64-bit 65 nm switch
  study, are not built. The output-buffered ACK/NACK switch variant is not
  built either; the paper only compares against it.
* The yield percentages and the area and power figures are physical results
  and cannot be reproduced from RTL. `tb_spare_configs` only shows that more
  spares repair more random defects.
