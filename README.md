# Source-address firewalls for a mesh network-on-chip

In a multiprocessor chip built around a packet-switched network-on-chip (NoC),
any processing element (PE) can send packets to any other. Two things can go
wrong:

- a PE can send to a node that should never hear from it, to read its data or
  to flood it (denial of service);
- a compromised PE can write another node's address into the source field of
  its packets and so pass as that node.

This design puts a small **firewall** on every node, between the router's
local port and the node's network interface (NI). It is *non-intrusive*: the
routers and NIs are not changed, only the handshake wires between them are
routed through the firewall. The firewall never stores a packet. It reads the
header as it goes by and then either joins the handshake through or swallows
the packet. It makes two checks:

| direction | check | stops |
|---|---|---|
| inbound (router → NI) | the bit for the packet's source in this node's **access register A_r** must be set | unwanted senders, flooding |
| outbound (NI → router) | the packet's declared source must equal this node's own address **F_addr** | impersonation |

The access registers can be changed while the chip runs. A trusted PE writes
them over a separate serial **configuration chain**. The chain passes through
every firewall along a Hamiltonian path of the mesh and is not connected to
the NoC.

## Packet format

Flits are 16 bits wide. A packet is:

| flit | content |
|---|---|
| 0 | address header |
| 1 | size = number of payload flits |
| 2 … size+1 | payload |

The header (`fw_pkg::header_t`):

| bits | 15:12 | 11:8 | 7:4 | 3:0 |
|---|---|---|---|---|
| field | destination Y | destination X | source Y | source X |

Four bits per coordinate allow at most 16 × 16 = 256 nodes. So an access
register has at most 256 bits: one bit per possible source. Node (x, y) owns
bit `y*M + x`.

## The link protocol, and how a filter sits in it

Each direction of the router–NI link is credit based:

- the sender drives `tx` and a flit;
- the receiver drives `credit` ("I can take a flit");
- a flit moves in every clock cycle in which `tx` and `credit` are both high;
- until then, the sender holds the flit steady. An assertion in `fw_filter`
  checks this rule.

Each direction has one `fw_filter` between sender and receiver. The flit wires
go straight from sender to receiver. The filter only reads them, and drives
the receiver's `rx` and the sender's `credit`:

```
 sender                 fw_filter                 receiver
 tx    ───────────────►  state machine ─── rx ───►
 data  ──────────┬─────────────────────────────►  data
                 └──► header latch
 credit ◄─────────────── state machine ◄── credit ─
```

A header first offered in cycle *t* goes through these states:

| cycle | state | sender credit | receiver rx | action |
|---|---|---|---|---|
| t | IDLE | 0 | 0 | header copied into the filter |
| t+1 | CHECK | 0 | 0 | verdict registered (pass/drop pulse) |
| t+2 | SETUP (allowed) | 0 | 0 | control path set up |
| t+3 … | PASS | = receiver credit | = sender tx | header and the rest move at link speed |
| t+2 … | DROP (rejected) | 1 | 0 | every flit is taken from the sender and thrown away |

An allowed packet therefore starts three cycles later than it would without a
firewall. A rejected one starts being consumed after two cycles. In PASS and
DROP the filter counts the flits that move. It keeps the second flit (the
size) in a register, ends the packet after that many payload flits, and goes
back to IDLE. A size of 0 ends the packet on the size flit.

A rejected packet is consumed, not left waiting. Otherwise it would sit in the
router or NI for ever and block the link.

The verdict is worked out by the parent `firewall` from the latched header:

- **inbound:** `A_r[y*M + x]` for the source (x, y). A source outside the mesh
  is rejected.
- **outbound:** source == F_addr. F_addr is a register loaded at reset from
  the parameters `FX`, `FY`.

The destination field is never checked. Routing it is the network's job.

## The configuration chain

Each firewall holds a `fw_config_node`: a three-stage shift register on the
chain, plus the access register. A **rule** is three back-to-back valid words
on `cfg_in` (`fw_pkg::cfg_word_t` = `{valid, data[7:0], ab}`):

1. X of the target firewall
2. Y of the target firewall
3. the A_r index to write, with the new bit value on the separate `ab` wire

Every word leaves a node exactly **three cycles** after it entered. The index
word is the last of the three. When it arrives, the X and Y words sit in the
first two shift stages, and the node compares them with its own address. If
they match, the node does two things on that clock edge:

- it writes `A_r[index] = ab`;
- it clears the frame out of the chain.

Rules for other firewalls pass on unchanged. The node counts valid words in
threes to find frame boundaries, so the three words of a rule must be
consecutive. After reset every A_r bit holds `INIT_ALLOW`. The default is 0:
everything denied until configured.

**Chain order.** The chain enters at node (0,0). It runs along row 0 from left
to right, back along row 1 from right to left, and so on (a snake). The k-th
firewall on the chain (k = 1 … M·N) applies a rule 3·k cycles after the
rule's first word enters `cfg_in`. The worst case is the last firewall on the
chain. Configuring it completely takes one rule for each of the other M·N−1
nodes, each sent once the previous one has landed, so it takes

    T = 3 · M·N · (M·N − 1) cycles

That is 216, 720, 1800, 3780, 7056 and 12096 cycles for meshes from 3×3 to
8×8. If the firewalls start with everything denied, only the allowed sources
need rules: 3 · M·N · |rules| cycles. For one rule in a 4×4 mesh that is 48
cycles. The chain itself could take rules back to back; the one-at-a-time
policy belongs to whoever drives `cfg_in`.

## The mesh (`secure_noc`)

`secure_noc` is the top. It instantiates one firewall per node and wires the
configuration chain in snake order. It also wires the flit data and the link
clocks (`clockTx` → `clockRx`) straight from each sender to its receiver.

The routers, NIs and PEs are not part of this RTL. Their local-port signals
are the top's ports, as unpacked arrays indexed by node id `y*M + x`. Most of
the top's output bits are therefore straight-through wires. This is expected:
a synthesis report will list them as driven directly by inputs.

Every firewall has one-cycle event outputs:

- `in_pass`, `in_drop`: an inbound packet was allowed or dropped;
- `out_pass`, `out_drop`: an outbound packet was allowed or dropped;
- `cfg_hit`: a configuration rule landed in this firewall.

They are there for monitoring. A real system could log attacks with them.

The whole design runs on one clock, `clk`, with an active-low asynchronous
reset, `rst_n`.

| parameter | default | meaning |
|---|---|---|
| `M`, `N` | 4, 4 | mesh size (each at most 16) |
| `INIT_ALLOW` | 0 | A_r value after reset |
| `fw_pkg::FLIT_W` | 16 | flit width |
| `fw_pkg::COORD_W` | 4 | bits per coordinate |
| `fw_pkg::CFG_W` | 8 | configuration data width (index up to 255) |

## Files

| file | content |
|---|---|
| `rtl/fw_pkg.sv` | flit, header and configuration-word types; chain-order functions |
| `rtl/fw_filter.sv` | one direction's filter state machine |
| `rtl/fw_config_node.sv` | configuration chain stage and access register |
| `rtl/firewall.sv` | one node's firewall: two filters, one configuration stage, F_addr |
| `rtl/secure_noc.sv` | top: M×N firewalls and the chain |
| `tb/tb_fw_filter.sv` | 200 random packets, random back-pressure: delivery, discard, exact 3/2-cycle latencies |
| `tb/tb_fw_config_node.sv` | random frames: 3-cycle forwarding, capture of own frames, A_r contents every cycle |
| `tb/tb_firewall.sv` | A_r loaded over the chain, then both directions at once against a reference model |
| `tb/tb_secure_noc.sv` | end-to-end at the default 4×4 (below) |
| `tb/tb_config_time.sv` | worst-case configuration time for 3×3 … 8×8 |
| `tb/noc_model.sv` | behavioural stand-in for the router network, test only |

## Verification

The end-to-end test `tb_secure_noc` runs the top at its default parameters.
It connects a behavioural network model to the router side and PE models to
the NI side. Six nodes are used: A(0,3), B(2,2), C(0,1), D(3,3), E(0,0),
F(3,1).

1. **Configuration**, driven by E at the head of the chain.
   - Node A is configured in full, one rule per other node. The last rule
     must land exactly 720 cycles after the first word.
   - Then the allowed pairs are set: A↔B, B↔C, E↔F.
   - Every rule's arrival cycle is checked against 3·k.
2. **Traffic.**
   - The allowed pairs exchange packets.
   - C also sends packets to B that claim to come from A.
   - D floods B and F.

The test checks three things:

- every legitimate packet is delivered exactly once and unchanged;
- nothing from D, and nothing forged, reaches any NI;
- D's packets cross the network and are dropped at the destination's
  firewall, and C's forged packets are dropped at C's own firewall.

It also counts these mechanisms and fails if any never happens:

- rule applied;
- inbound pass, inbound drop;
- outbound pass, outbound drop;
- back-pressure stall.

Each testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/fw_pkg.sv rtl/fw_filter.sv rtl/fw_config_node.sv rtl/firewall.sv rtl/secure_noc.sv \
  tb/noc_model.sv tb/tb_secure_noc.sv --top-module tb_secure_noc
./obj_dir/Vtb_secure_noc
```

For the block tests, list only the files that test needs. For example,
`tb_fw_filter` needs `fw_pkg.sv` and `fw_filter.sv`.

## What is fixed and what was chosen

These parts are taken from the design as specified:

- the placement of the firewalls and the two checks;
- the header layout and the packet format;
- discarding by consuming the packet;
- the 3-cycle forward and 2-cycle discard latencies;
- the packet-size register;
- the three-word, three-cycles-per-hop configuration chain with a separate
  A_b wire;
- the snake-shaped chain starting at the configuring node;
- the reset-time default permission;
- the 4×4 default size.

These are this implementation's own choices:

- the exact credit rule (a flit moves when tx and credit are both high);
- the bit order of A_r (`y*M + x`);
- the 8-bit configuration word;
- finding frame boundaries by counting back-to-back valid words;
- taking A_b with the index word;
- F_addr loaded from parameters at reset;
- rejecting source coordinates outside the mesh;
- ignoring out-of-range indices;
- one clock domain with the link clocks wired through;
- the event outputs.

The size flit cannot be seen before the header has moved, and the firewall
stores no flits. So the verdict depends on the header alone, and the size is
captured as the second flit passes.

**Limits.**

- Only the source address is judged. There is no notion of applications or
  of several tasks on one PE.
- The configuration chain has no acknowledgement. Whoever drives it must space
  the rules or trust the fixed 3·k-cycle delay.
- Area has not been measured for this RTL. Published figures for this scheme
  in a 65 nm standard-cell library put one firewall at about 14% of a
  router's area.
