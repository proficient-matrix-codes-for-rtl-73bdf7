# 8-port NoC router with proficient matrix code (PrMC) protection

A network-on-chip router keeps packets in FIFO buffers, and soft errors in
those buffers (and on the links between routers) corrupt data. This router
protects every 64-bit payload with a *proficient matrix code*: a cheap
two-dimensional parity code that corrects a whole burst of adjacent errors
confined to one half of the word, using only 34 check bits for 64 data bits
(code rate 65 %). Around the code sits an 8-port router for a 2-D mesh with
diagonal links. It checks that every packet arrived by a legal hop, routes
around links that are out of service and, when one of its own links fails,
loops the packets waiting for that link back into the router so none are
lost.

The design follows the article "Proficient matrix codes for error detection
and correction in 8-port network on chip routers" (Koppala, Ashok Kumar,
Satyam, Vikram Teja, 2022). The article describes the code in detail, but
the router only as a block diagram. Everything the article leaves open has
been decided here; the section *Where this design departs from, or goes
beyond, the article* lists those choices.

## The proficient matrix code

### Encoding

The `DATA_W`-bit word is written as a matrix of two rows:

```
row 0:  d[0]        d[1]        ...  d[W/2-1]      -> h[0] = XOR of row 0
row 1:  d[W/2]      d[W/2+1]    ...  d[W-1]        -> h[1] = XOR of row 1
         |           |                |
        v[0]        v[1]        ...  v[W/2-1]       v[i] = d[i] ^ d[i+W/2]
```

That is `W/2 + 2` check bits in total:

| data bits | check bits | code word | code rate |
|-----------|-----------|-----------|-----------|
| 8         | 6         | 14        | 57.1 %    |
| 16        | 10        | 26        | 61.5 %    |
| 32        | 18        | 50        | 64.0 %    |
| 64        | 34        | 98        | 65.3 %    |

These are the counts the article reports for its code. The encoder
(`prmc_encoder`) is nothing but XOR trees. It is parameterised by `DATA_W`,
and all four sizes are tested.

### Decoding: what can and cannot be corrected

`prmc_decoder` re-encodes the received data with the same encoder (the
"partial encoder") and forms two syndromes:

* `dh = h' ^ h` (2 bits): which row has an **odd** number of flipped bits;
* `s  = v' ^ v` (W/2 bits): which columns have a flipped bit.

The decision table, in order:

| `dh`      | `s`                 | verdict                         | data out              |
|-----------|---------------------|---------------------------------|-----------------------|
| 00        | 0                   | clean                           | unchanged             |
| 01 or 10  | non-zero            | errors in that row, corrected   | row ^= `s`            |
| any ≠ 00  | 0                   | check bits hit, data intact     | unchanged             |
| 00        | exactly one bit set | one V bit hit, data intact      | unchanged             |
| otherwise | non-zero            | detected, **uncorrectable**     | unchanged, flagged    |

So the code corrects any **odd** number of errors inside one row. That
covers any single error and any adjacent burst of odd length up to 31 bits
(for 64-bit data). An **even** number of errors in one row leaves `dh = 00`.
The columns are known but the row is not, so such a pattern is flagged, not
corrected. The article hints that XNOR gates can fix this case but does not
say how, and one parity bit per row cannot locate it. Errors in both rows
are also flagged. A 2-bit error in a single column in both rows (`s = 0`,
`dh = 11`) is mistaken for two check-bit errors. This is a property of the
code, not of this implementation.

Every decision is combinational. With `en` low the decoder passes the data
through and flags nothing.

## The router

### Ports and directions

There are eight ports, one per direction, numbered clockwise from north
(`noc_pkg::dir_e`): N=0, NE=1, E=2, SE=3, S=4, SW=5, W=6, NW=7. The opposite
of direction `d` is `(d+4) mod 8`. x grows to the east and y to the north.
No port is reserved for a processing element. The element can sit on any
side, and `pe_port` says which one. Packets addressed to the router's own
coordinates leave through that port. Transit packets never use it.

### Flit

```
flit_t (109 bits) = { hdr_t { dst_x[3:0], dst_y[3:0], prev[2:0] },
                      prmc_cw_t { data[63:0], h[1:0], v[31:0] } }
```

A packet is one flit. `prev` is the direction of the output port the packet
left its previous router by. Each router writes it as the packet leaves, and
the next router checks it. The header is not covered by the code.

### Path through one port (`router_port`)

```
 link in ──►┌──────────┐   ┌──────────┐  ┌────────┐  ┌────────┐   ┌───────┐
            │ loopback │──►│  PrMC    │─►│ PrMC   │─►│ input  │──►│routing│──► request
 link out ◄─┤  module  │   │ decoder  │  │ re-enc.│  │ FIFO 8 │   │ logic │    to switch
            └────▲─────┘   └──────────┘  └────────┘  └────────┘   └───────┘
                 │         routing error detect ─► events to journal
            output FIFO 2 ◄──────────────────────────────────── from switch (crossbar)
                 ▲ port FSM (ACTIVE / DRAIN / DISABLED) drives the loopback
```

1. **Loopback module**. In normal operation it connects the link to the
   input path and the output FIFO to the link.
2. **PrMC decoder** corrects the payload. The corrected data is then
   **re-encoded**, so the input FIFO always holds a valid code word. An error
   that strikes while a flit waits in a buffer, or while it crosses the next
   link, is therefore corrected by the next decoder on its path. Protection
   is hop to hop.
3. **Routing error detection** flags a packet in two cases: its `prev` is
   not the direction that leads into this port, or the hop did not bring it
   closer to its destination in at least one coordinate. Flagged packets are
   still delivered, because the route is recomputed from the destination.
   The error is counted.
4. **Input FIFO** (8 entries). The switching is store and forward: a flit is
   routed only when it is entirely in the buffer.
5. **Routing logic** (adaptive XY over eight directions):
   * both offsets non-zero: try the diagonal, then the x direction, then y;
   * only x (or only y) non-zero: try the straight direction, then the two
     diagonals on that side;
   * both zero: deliver on `pe_port`.

   The first candidate that is in service (and is not the element's port)
   wins. If none is, the flit waits and `port_blocked` is high.
6. **Output FIFO** (2 entries), then `prev` is stamped and the flit goes to
   the link.

### Links out of service: port FSM and self-loop

`port_fault[d]` reports that the link or neighbour in direction `d` cannot
be used. Tie it high on mesh edges. Each port's `port_fsm` then steps
through three states:

* **ACTIVE**: normal.
* **DRAIN**: entered when `fault` rises. The port drops out of the routing
  of all other ports at once. Its link is cut in both directions. Flits
  already in its output FIFO go round the **self-loop** back into the port's
  own input path. There they are checked again (a looped flit must carry
  `prev` equal to the port's own direction), buffered and routed through
  another port.
* **DISABLED**: entered once the output FIFO is empty. The state returns to
  ACTIVE when `fault` falls.

This way a neighbour can be switched off at run time without losing the
packets that were already on their way to it.

### Switch control and journal

`switch_control` has one round-robin arbiter per output (`rr_arbiter`). Each
arbiter chooses among the inputs whose head flit wants that output, provided
the output FIFO has room. Up to eight flits cross the 8×8 crossbar per
cycle. `error_journal` keeps three saturating 16-bit counters per port:
corrected, uncorrectable and routing errors. It also records the port and
kind of the latest event and a sticky `any_err`. `journal_clear` resets it.

### Timing

* Links use valid/ready handshakes. A flit moves on a rising edge where
  both are high.
* Without contention a flit needs **2 cycles link to link**. It is accepted
  into the input FIFO on edge *t*, crosses the switch into the output FIFO
  on edge *t+1*, and can leave on edge *t+2*.
* The decoder, the re-encoder, the routing error check and the routing
  logic are combinational, in the same cycle as the FIFO write or the
  switch request.
* Reset is synchronous and active low (`rst_n`). It empties all FIFOs, sets
  every port ACTIVE and clears the journal.

## Where this design departs from, or goes beyond, the article

* **Taken from the article**:
  * the code: row parity bits from XOR trees, column XOR bits, the check-bit
    counts, and a decoder built from a partial encoder, syndrome XORs,
    location and correction;
  * eight directions including diagonals;
  * per port: a loopback module, a decoder, routing error detection, an
    input buffer, routing logic, an output buffer and an FSM;
  * a central control logic with an arbiter;
  * a centralized error journal;
  * store-and-forward switching, XY-based adaptive routing, a processing
    element attachable to any side, and 64-bit data.
* **Chosen here**:
  * the flit header, the valid/ready link protocol and the 4-bit
    coordinates;
  * the buffer depths (8 in, 2 out);
  * round-robin arbitration;
  * the FSM states;
  * the exact routing-error rules;
  * the candidate order of the adaptive routing;
  * the decoder verdicts for patterns the code cannot place;
  * re-encoding after correction;
  * forwarding (rather than dropping) packets with uncorrectable or routing
    errors;
  * the journal's contents.
* **Not implemented**:
  * correction of an even number of errors in one row (flagged instead);
  * the external "input control signal" and "output control signal" of the
    central control logic. They appear in the article's block diagram, but
    their function is not described;
  * an extra "U" redundancy input that appears in the article's decoder
    drawing. The article's own check-bit counts leave no room for it.
* **Not included**: the comparison codes (decimal matrix code, modified DMC,
  parity matrix code). The article uses them only as baselines for area and
  power–delay results.

## Files

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | sizes, `dir_e`, `flit_t`, `port_state_e`, direction helpers |
| `rtl/prmc_encoder.sv`, `rtl/prmc_decoder.sv` | the code |
| `rtl/flit_fifo.sv` | FIFO used for input and output buffers |
| `rtl/loopback_module.sv`, `rtl/port_fsm.sv` | link / self-loop switch and its controller |
| `rtl/routing_error_detect.sv`, `rtl/routing_logic.sv` | hop check and adaptive routing |
| `rtl/router_port.sv` | one port |
| `rtl/rr_arbiter.sv`, `rtl/switch_control.sv` | allocation and crossbar |
| `rtl/error_journal.sv` | error counters |
| `rtl/noc_router8.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Parameters: `noc_pkg::DATA_W` (64) and `COORD_W` (4) are package constants.
`noc_router8` takes `IN_DEPTH` (8), `OUT_DEPTH` (2) and `CNT_W` (16). The
encoder and decoder take `DATA_W` on their own and work at any even width
of 4 or more.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
the full router at its default sizes:

```
verilator --binary --timing --assert --top-module tb_noc_router8 \
    -y rtl -y tb +libext+.sv rtl/noc_pkg.sv tb/tb_noc_router8.sv -o sim
./obj_dir/sim
```

Replace `tb_noc_router8` with any other testbench name. Two more
testbenches go beyond single modules:

* `tb_prmc_capability` exercises the code at 8, 16, 32 and 64 data bits.
  At each width it tries every adjacent burst at every position and every
  single error. It prints the code rate and the longest corrected burst:
  57.14 / 61.54 / 64.00 / 65.31 % and 3 / 7 / 15 / 31 bits.
* `tb_noc_mesh` connects four routers as a 2×2 mesh with diagonal links and
  corrupts payloads on the links between routers. It checks that every flit
  reaches the right processing element intact. It also checks that the
  corrected-error counters add up to the number of corrupted transfers,
  including two-hop paths after the diagonal links are taken out of
  service.

`tb_noc_router8`, described below, is the main end-to-end test. `tb_noc_router8`
runs seven phases: a single flit to measure latency; clean random traffic
from all eight neighbours; traffic with injected single errors, odd bursts,
even bursts, check-bit errors and wrong `prev` fields; static faults with
detours; a fully blocked direction; a link that fails while its output FIFO
is full, so the self-loop is used; and a final comparison of the journal
with the injected error counts. A scoreboard checks that each of about
11,000 flits leaves exactly once, with correct data, a valid code word, the
right `prev` stamp and the expected output port. The testbench counts each
mechanism and fails if one never happens.

### How far it has been verified

Every module's testbench checks its outputs against an independent model in
the testbench. Each testbench was also run against a deliberately broken
copy of its module and reported failures. The router has only been
simulated alone and in the four-router mesh above. Larger meshes, deadlock
freedom under adversarial fault patterns, FPGA implementation and timing
closure have not been examined.
