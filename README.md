# RKT-NoC: a self-repairing mesh network-on-chip with Decimal Matrix Code protection

RKT-NoC is a packet-switched 2-D mesh network for FPGAs whose regions are
reconfigured while the system runs. Routers can fail, and regions of the mesh
can be taken away for a new module at any moment. So every router
(an *RKT-switch*) has to look after itself and its neighbours. It has to:

- correct errors on its links with a Decimal Matrix Code (DMC);
- ask for a packet again when an error cannot be corrected;
- notice when a neighbour routed a packet the wrong way;
- decide whether a fault is transient or permanent, and where it is;
- route around unavailable or faulty neighbours;
- never leave a packet stuck in an output buffer that faces a neighbour
  that has gone away.

The last point is the key idea. Every side of a router has a **loopback
module** between the router and the link. When the neighbour on that side
becomes unavailable, the loopback module turns the router's own output back
into its own input. The packets waiting to leave by that side re-enter the
router and are routed again, by another side.

The routers have four ports (N, E, S, W) and **no local port**. A processing
element or IP core attaches to the free side of any router on the edge of the
mesh. A large module may attach to several routers. That way, no single
faulty port can cut a module off.

## The mesh

`rkt_noc` is a `W x H` mesh of `rkt_switch` instances. The default is 4 x 4.

- Router `(x, y)` has x growing towards East and y growing towards North.
- Neighbouring routers are joined by a pair of unidirectional links.
- The free sides on the mesh edge are the module ports, `2W + 2H` of them
  (16 for 4 x 4). They are numbered:
  1. North edge, x = 0..W-1;
  2. East edge, y = 0..H-1;
  3. South edge, x = 0..W-1;
  4. West edge, y = 0..H-1.

The top has these control and status inputs and outputs:

- `node_unavail[n]` marks router n unavailable. This means a permanent fault,
  or a region that is being reconfigured. Its neighbours stop sending to it.
- `inj_route_fault` and `inj_link_en` / `inj_link_mask` inject faults for
  validation. The first corrupts a router's routing logic. The second XORs a
  mask into codewords leaving a given router side.
- Each router reports per side:
  - `port_disable`, and the permanent-fault classes `perm_bus`, `perm_port`
    and `perm_route`;
  - `loop_mode`;
  - one-cycle event strobes for corrected errors, uncorrectable errors,
    resends, routing errors and bypasses.

Coordinates are 4 bits wide, so meshes up to 16 x 16 can be built by changing
`W` and `H`.

## Packets and the link protocol

A packet has `PKT_FLITS = 4` flits of 32 data bits. Flit 0 is the header:

| bits    | field      | meaning                                                  |
|---------|------------|----------------------------------------------------------|
| [31:28] | `dst_x`    | destination router x                                     |
| [27:24] | `dst_y`    | destination router y                                     |
| [23:22] | `dst_port` | side of the destination router the module sits on        |
| [21:18] | `src_x`    | source router x                                          |
| [17:14] | `src_y`    | source router y                                          |
| [13]    | `bypass`   | set by the last router when it left the XY path          |
| [12]    | `turn`     | with `bypass`: the XY side was the side the packet came in by |
| [11:0]  | `tag`      | free for the modules                                     |

On the wire, each flit is a 68-bit DMC codeword (`link_fwd_t`: `valid`, `cw`).
The reverse direction (`link_bwd_t`) carries three signals:

- `occ`: the receiver's input buffer has no room for a packet;
- `ack`: one-cycle pulse, the packet arrived clean or was corrected;
- `nack`: one-cycle pulse, the packet had an uncorrectable error.

Switching is **store-and-forward**. A router forwards a packet only after it
has all of it. So a packet sits in one router at a time, and a router that is
about to be reconfigured only has to empty its own buffers.

Each link has at most one packet in flight:

1. The sender waits for `occ` low.
2. It sends the four flits on consecutive cycles.
3. It waits for `ack` (free the packet) or `nack` (send the same packet again).

Each input port and each output port buffers two packets
(`IN_PKTS = OUT_PKTS = 2`).

## Decimal Matrix Code

`dmc_encoder` and `dmc_decoder` protect every flit on every link.

The 32-bit word is cut into eight 4-bit symbols, laid out as a matrix of
2 rows x 4 columns:

- row 0 is `D[15:0]`, row 1 is `D[31:16]`;
- symbol `s` is `D[4s+3:4s]`.

The encoder produces two kinds of check bits:

- **Horizontal bits H[19:0].** Symbols are paired within a row (0 with 2,
  1 with 3, 4 with 6, 5 with 7). Each pair is added as two integers, giving a
  5-bit sum:
  - `H[4:0] = D[3:0] + D[11:8]`
  - `H[9:5] = D[7:4] + D[15:12]`
  - `H[14:10] = D[19:16] + D[27:24]`
  - `H[19:15] = D[23:20] + D[31:28]`
- **Vertical bits V[15:0].** The XOR of the two rows: `V = D[15:0] ^ D[31:16]`.

The codeword is `{V, H, D}`.

The decoder reuses the encoder on the received data ("encoder reuse") and
runs in two pipeline stages:

1. **Syndromes.** Compute the horizontal syndromes `dH_g = H'_g - H_g`, one
   for each symbol pair g, by integer subtraction. Compute the vertical
   syndrome `S = V' ^ V`. Register both.
2. **Correction.** Flip data bit i of row 0 when `S[i]` is set and the
   horizontal syndrome of that bit's symbol pair is non-zero. Do the same for
   row 1. Then re-encode the result to confirm the correction.

The word is reported **uncorrectable** in three cases:

- the corrected word still disagrees with the received H bits;
- a column's error cannot be placed in a single row;
- several symbol pairs disagree while V shows nothing. This happens when
  errors in both rows of the same column cancel out in the XOR.

Errors that only hit check bits leave the data as it was received.

The code corrects any error confined to one 4-bit symbol, from a single bit
up to a burst of all four bits. It flags errors in the same column of both
rows as uncorrectable. Other multi-symbol patterns are usually detected, but
not always: errors that cancel in both a decimal sum and the XOR go unseen.
The decoder test checks these cases against an independent reference:

- single-symbol errors;
- errors in the check bits only;
- errors in both rows of one column.

## Inside the RKT-switch

`rkt_switch` holds four copies of each per-side block, plus one central
controller and one journal:

```
           link ──► loopback_module ──► input_port ──┐
                         ▲   │    (DMC check, route    │
                         │   │     check, buffer,      ▼
                         │   │     routing)        rkt_control (round-robin
                         │   ▼                     crossbar, one arbiter
           link ◄── loopback_module ◄── output_port ◄─┘ per output)
                                (buffer, FSM,
                                 DMC encode)
                error_journal ◄── events of all four sides
```

### Input port

The input port's path:

1. The codeword goes through the DMC decoder.
2. The corrected flits are written into a two-packet `packet_fifo`.
3. When the last flit has arrived, the port sends `ack`. If any flit was
   uncorrectable, it sends `nack` and drops the packet.
4. It checks the header against the previous router's routing (see below).
5. It chooses an output side (`route_logic`) and requests it from
   `rkt_control`.

The `bypass` and `turn` flags in the header are rewritten according to this
router's own decision.

### Control

`rkt_control` keeps a round-robin arbiter per output side. An output is
granted to one requesting input when the output buffer has room for a whole
packet. The packet then moves one flit per cycle through the crossbar.

### Output port

The output port holds up to two packets. Its state machine works like this:

1. It waits for `occ` low.
2. It sends the oldest packet through the DMC encoder.
3. It waits for `ack` or `nack`.

It raises `sending` while flits are being read out. The loopback module uses
this signal.

### Latency

The minimum latency is **15 cycles per router**, from the first flit arriving
to the first flit leaving. The cycles break down as follows:

| step                              | cycles |
|-----------------------------------|--------|
| loopback module in                | 1      |
| DMC check                         | 2      |
| rest of the packet                | 3      |
| commit                            | 1      |
| routing                           | 1      |
| crossbar                          | 4      |
| output state machine start        | 1      |
| output register                   | 1      |
| loopback module out               | 1      |

A packet crossing a row of four routers takes 60 cycles.

## Routing and bypass

`route_logic` uses adaptive XY routing:

- Packets move in X first, then in Y, towards the destination router.
- At the destination router they leave by `dst_port`.

A side is usable only when all of these hold:

- a router or module is there;
- that neighbour is not marked unavailable;
- neither router on the link has disabled it.

When the XY side cannot be used, the router tries these fall-backs in order:

1. the other productive direction;
2. the side clockwise from the preferred one;
3. the side anticlockwise from it;
4. the opposite side.

It never sends a packet back by the side it came in by. Any choice other than
the XY one sets `bypass` in the header. `turn` is additionally set when the
XY side *was* the arrival side. In that case the router was forced off the XY
path by the no-U-turn rule, and no neighbour was unavailable.

## Detecting a neighbour's routing errors

`route_err_detect` checks the decision of the router the packet came from.
That router is P, the neighbour on the arrival side. The hard part is that a
bypass is legal only if P's XY neighbour was really unavailable, and that
neighbour is *diagonal* to the checking router. So each router receives four
**diagonal indications**, one for each diagonal neighbour. An indication is
set when any of these holds:

- that router is unavailable;
- it has disabled any of its own sides;
- the routers on either side of the diagonal have disabled their link to it.

A missing diagonal router counts as unavailable.

The checking router recomputes P's XY choice from the header. It accepts the
hop when one of these holds:

- the hop is P's XY choice;
- P set `bypass` and `turn`;
- P set `bypass` and P's XY neighbour is unavailable according to the
  diagonal indication;
- P set `bypass` and P's XY neighbour is out of view. This is the router two
  hops away, straight through P.

The hop is always an error when the destination was P itself.

Packets from edge modules and packets that were looped back are not checked.
Each error raises `ev_route_err`, and the journal counts it against that side.

## The loopback module and a safe change of mode

`loopback_module` sits between the router and the link on each side.

**Normal mode.** It registers the data in both directions. `occ`, `ack` and
`nack` pass straight through.

**Loopback mode.** This mode is entered when the side is unavailable:
`nbr_unavail`, `port_disable` or the neighbour's `nbr_disable`.

- The router's outgoing codewords come back into its own input one cycle
  later.
- The input's `ack` and `nack` go to its own output.
- The link sees `occ` permanently, and link flits are ignored.

Looped packets get routed again. The arrival side is now excluded, so they
leave by another side.

Changing mode while packets are moving is the delicate part. This design
treats it as a small protocol:

- **Pending Occ.** As soon as the wanted mode differs from the current one,
  the module shows `occ` to both the router's output and the link. No new
  packet starts in either direction.
- **Idle condition.** The mode changes only when nothing is in motion:
  - no flit in the loopback registers;
  - the router's output is not `sending`;
  - no packet received from the link is still waiting for its `ack` or
    `nack`.
- **Guard time.** At least `GUARD = 4` cycles pass after the change is
  requested. This covers a neighbour that decided to send just before it saw
  `occ`.
- **Outstanding packet.** A packet already sent to the neighbour may still be
  waiting for its `ack`. The module waits up to `ACK_WAIT = 24` cycles for
  it:
  - If the `ack` comes, the packet is freed and the mode changes.
  - If no `ack` comes, as when the neighbour is dead, the module gives the
    router's output a `nack`. The output then re-sends the packet into
    loopback, and it is routed elsewhere.

  Waiting for the late `ack`, instead of nacking at once, avoids delivering
  the packet twice.
- **Returning to normal.** This waits until the last looped packet has been
  acknowledged.

Without these rules, three failures appear in the full mesh under traffic:

- overflowing input buffers;
- lost packets;
- duplicated packets.

## Error journal: transient or permanent, and where

`error_journal` watches the packet events of all four sides and keeps three
error classes per side:

| class   | counts                                                                  | points to |
|---------|-------------------------------------------------------------------------|-----------|
| `bus`   | data errors in packets from the neighbour                               | the link, or the neighbour's output |
| `port`  | data errors in packets looped back through this router's own output and input | this router's port |
| `route` | routing errors of the neighbour                                         | the neighbour's routing logic |

An error followed by a clean packet is **transient**. `THRESH = 3` errors of
one class in a row make the fault **permanent**. A permanent fault does three
things:

- it sets `port_disable` on that side;
- it switches the side's loopback module to loopback;
- it removes the side from routing.

The other router on the link sees the disable through `nbr_disable` and drops
the link too. The journal also keeps saturating error counters. `clear`
resets it.

## Performance

Measured in simulation:

- **Latency:** 15 cycles per router, and 60 cycles across four routers.
- **Maximum flit injection rate:** measured with every edge module sending to
  the module on the opposite side.

  | mesh  | modules | flits per cycle per module |
  |-------|---------|----------------------------|
  | 1 x 1 | 4       | 0.444                      |
  | 3 x 3 | 12      | 0.364                      |
  | 4 x 4 | 16      | 0.364                      |

  The rate is set by one link's cycle. That cycle is 4 flit cycles plus the
  Ack round trip, 11 cycles in all. The 1 x 1 mesh is faster because its
  links end at modules, which acknowledge sooner.
- **Latency under random traffic:** every module sends back to back to
  random other modules. Latency is counted from the header entering the
  network to the header leaving it.

  | mesh  | minimum | average | maximum (cycles) |
  |-------|---------|---------|------------------|
  | 1 x 1 | 15      | 23      | 54               |
  | 3 x 3 | 15      | 96      | 567              |
  | 4 x 4 | 15      | 132     | 962              |

  At this saturating load, most of the time is spent waiting for links. A
  link carries one packet per Ack round trip.

  These figures come from one run. With another random seed, the averages
  move by a few cycles and the maxima by a few hundred.

## Where this design departs from the published description

- **Router latency.** The published minimum is 9 cycles (4 flits + 2 for
  error correction + 3 for routing and the two loopback crossings). This
  design takes 15. The extra time comes from the crossbar copy into the
  output buffer, which is a second store-and-forward step, and from the
  registered output state machine. The output buffer is needed so that Nack
  and loopback can replay a packet. The published formula also adds 2 cycles
  per router for Ack/Nack. Here the handshake does not delay the first flit.
- **Injection rate.** The published maximum is 0.369 flit per cycle per
  module for every size. This design reaches 0.364 on 3 x 3 and 4 x 4, and
  0.444 on 1 x 1.
- **Error-correcting code.** The latency text of the description speaks of a
  Hamming code taking two cycles. Its error-correction section proposes the
  Decimal Matrix Code instead. This design uses DMC, with two cycles.
- **Choices not given in the description.** The following are this design's
  own:
  - the header layout, including the new `turn` flag;
  - the Ack/Nack/Occ encoding;
  - one packet in flight per link;
  - two-packet buffers;
  - round-robin arbitration;
  - the order of the routing fall-backs;
  - the exact routing-error acceptance rule;
  - the contents of the diagonal indications;
  - the mode-change protocol of the loopback module, with `GUARD` and
    `ACK_WAIT`;
  - the journal's "THRESH in a row" rule.
- **Fault localization.** The journal is only partly what the description
  asks for. It places a fault on the link/neighbour side, on this router's
  port (by loopback), or in the neighbour's routing logic. It does not tell
  this router's input port apart from its output port.
- **Not built:**
  - the FPGA partial-reconfiguration machinery and the modules themselves;
  - the separate "finite state machine" block of the router drawing, which
    lives inside `output_port`.

  A region being reconfigured is represented only by `node_unavail`.
- **Not reproduced:**
  - the FPGA synthesis figures (registers, LUTs, frequency);
  - the published average-latency figures. Their values are not available
    for comparison. The measured averages are given above;
  - the published localization rate for routing errors on a 6 x 6 mesh,
    close to 96%. The method behind that figure is not known. On a 6 x 6
    mesh with one faulty routing logic, 3 or 4 of the faulty router's
    neighbours blamed it in every run tried, and no other side was ever
    blamed.

## Files

`rtl/`:

| file                  | contents                                                      |
|-----------------------|---------------------------------------------------------------|
| `rkt_pkg.sv`          | widths, directions, header and link types                     |
| `dmc_encoder.sv`      | combinational DMC encoder                                     |
| `dmc_decoder.sv`      | two-stage DMC checker and corrector                           |
| `packet_fifo.sv`      | packet buffer with commit and drop of whole packets           |
| `route_logic.sv`      | adaptive XY routing with fall-backs, `bypass` and `turn` flags |
| `route_err_detect.sv` | check of the previous router's routing                        |
| `input_port.sv`       | decoder, buffer, Ack/Nack, routing check, routing request     |
| `output_port.sv`      | output buffer, send/Ack/Nack state machine, encoder           |
| `loopback_module.sv`  | normal/loopback switching of one side                         |
| `rkt_control.sv`      | round-robin crossbar control                                  |
| `error_journal.sv`    | transient/permanent classification and port disabling         |
| `rkt_switch.sv`       | the router                                                    |
| `rkt_noc.sv`          | the mesh (top)                                                |

`tb/` holds one self-checking testbench per block, `tb_<block>.sv`, plus:

- `ip_model.sv`: an edge module that sends, receives, checks, stalls and
  acknowledges packets;
- `fir_mesh.sv`: a saturating-traffic harness used by `tb_rkt_fir.sv`;
- `lat_mesh.sv`: a random-traffic latency harness used by
  `tb_rkt_latency.sv`.

`tb_rkt_localize.sv` gives one router of a 6 x 6 mesh a faulty routing
logic while random traffic runs. It checks that the neighbours localize that
router, and only that router.

`tb_rkt_noc` runs the full default 4 x 4 mesh through six phases:

1. the latency of one packet across a row;
2. random traffic with receiver stalls;
3. a correctable link error;
4. an uncorrectable error burst, which causes Nack and resend;
5. a router made unavailable under traffic, which causes loopback and bypass;
6. a router with faulty routing logic. Its neighbours detect the errors and
   disable the links.

It counts each mechanism and fails if one never happens.

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

The testbenches were run with Verilator 5 in its two-state mode. They
initialise every signal they drive. To build and run one, for example the
full mesh test:

```sh
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    --top-module tb_rkt_noc -Mdir obj_noc rtl/rkt_pkg.sv tb/tb_rkt_noc.sv
./obj_noc/Vtb_rkt_noc
```

The same command works for every other testbench. Replace `tb_rkt_noc` with
its name (`tb_dmc_decoder`, `tb_loopback_module`, `tb_rkt_fir`, …). `-y rtl
-y tb` lets Verilator find the sub-modules by file name. The package must be
listed first.

Building the 4 x 4 mesh takes under a minute, and its simulation about one
second. The block tests are faster.

To use the network in another design:

1. Instantiate `rkt_noc` with the wanted `W`, `H` (up to 16), `PKT_FLITS`,
   buffer depths and `THRESH`.
2. Tie the fault-injection inputs to zero.
3. Connect modules to the `mod_in` / `mod_out` ports, following the link
   protocol above.

`tb/ip_model.sv` is a working example of a module interface.
