# A stream-based IP router in SystemVerilog

Software routers are flexible but slow; fixed-function router ASICs are fast
but cannot be changed. This design takes a third route: packets are processed
as a *stream* of octets that runs through a chain of small hardware modules,
one octet per clock, like a very deep pipeline. Each module does one job
(generate packets, check and route them, collect them). Every module has the
same stream interface, so modules can be added, removed or swapped. A module
is reconfigured *in band*: programming data travels in the same stream as the
packets, marked by its own control signal.

The RTL reproduces a published FPGA prototype of such a router. The prototype
had three stream modules in a row:

```
  packet_generator  ──stream──▶  router_module  ──stream──▶  (packet sink)
   (LFSR traffic)                 SIC + ip_router              ports of the top
```

The generator makes IPv4 packets. The router checks each header, drops
packets from net 10, decrements the TTL, looks up a four-entry route table,
and sends the output port and nexthop beside the packet on a 4-bit side bus.
In the prototype the sink was a logic analyzer, so here the router's output
stream leaves the top module as ports.

## The stream bus

Each module-to-module link carries 16 bits forward and one bit back. The
8 + 4 + 4 split follows the prototype, which was limited to a 16-bit bus.

| signal      | width | direction  | meaning |
|-------------|-------|------------|---------|
| `data`      | 8     | downstream | one octet of packet or programming data |
| `cbus`      | 4     | downstream | control data bus: results for later modules (here: output port, then nexthop) |
| `pkt_start` | 1     | downstream | this octet is the first octet of a packet |
| `prgm`      | 1     | downstream | this octet is programming data |
| `valid`     | 1     | downstream | this octet is packet data that is still wanted |
| `rdy`       | 1     | upstream   | the downstream side can take a word this clock |

`stream_pkg::stream_t` bundles the five forward fields. The top keeps its
ports as plain structs.

Rules (the `sic` module checks the first two with assertions):

* A word moves on every clock in which `rdy` is high. A word with neither
  `valid` nor `prgm` set is an idle slot. There is no separate "word
  present" strobe.
* `prgm` and `valid` are never both high. `pkt_start` is only set on a
  `valid` word.
* The octets of one packet are on consecutive slots, with no idle slot
  inside a packet. The generator always sends them that way. The router's
  check for a complete header relies on it (see below).
* `valid` going low over a packet removes it. A module drops a packet by
  clearing `valid` (and `pkt_start`) on every octet of it as it leaves. The
  packet still uses its slots, so dropping never stalls the pipeline.
* In a module, `rdy` from downstream goes straight to upstream in the same
  clock. A stall therefore freezes the whole chain at once.

## Programming runs

A *programming run* is a group of consecutive `prgm` words that sits between
packets. Its first octet names the module it is for. The stream interface
controller (`sic`) of every module looks at that octet:

* **Its own ID** (`MODULE_ID`, default `8'h01` for the router): the SIC
  removes the whole run from the stream (each word becomes an idle slot). It
  writes octets 1, 2, … to configuration addresses 0, 1, ….
* **Another ID**: the SIC passes the run on through the module unchanged, in
  order with the packets around it.

The run ends at the first word without `prgm`. For the router, the
configuration space is the route table: 52 octets for four entries of 13
octets each.

| offset in entry | content |
|-----------------|---------|
| 0–3   | network address, most significant octet first |
| 4–7   | mask |
| 8–11  | nexthop address |
| 12    | output port (low nibble) |

Entry *e* starts at address 13·*e*. The prototype programmed modules through
the stream and supported four routes. The ID octet, the table layout and the
masked first-match rule are this design's own choices.

## Inside the router: how a header is caught in flight

This part is the hardest to follow. The router never stores a packet. It
keeps a window of the last 20 octets in a 20-stage shift register
(`hdr_shift_reg`), and the window moves forward one octet each clock. An
IPv4 header without options is exactly 20 octets long. So at one clock the
whole header is in the register at once. At that clock octet 0 is in the last
stage, leaving, and octet *k* is in stage 19−*k*.

```
 stage:   19     18    17  16   ...   11   ...   7..4      3..0      0 ◀── input
 octet:   0      1     2   3          8          12..15    16..19
          ver/   TOS   total          TTL        source    destination
          IHL          length
```

How the router finds that clock:

1. **At the input.** When the `pkt_start` octet arrives, `ver_ihl` checks the
   version nibble and stores the header length (IHL×4 octets). `cnt16`
   restarts and counts the octets of the packet as they enter.
2. **Header complete.** The `pkt_start` octet reaches stage 19 while `cnt16`
   reads 20. The control logic (`router_ctrl`) raises **PROC_PKT** for that
   clock. In the same clock:
   * `src_filter` tests the source address in stages 7..4 for net 10;
   * `dec_ttl` reads the TTL in stage 11 and returns TTL−1. The shift register
     writes that value into stage 12 instead of the old one, so the octet
     leaves 8 clocks later already updated;
   * `pkt_len` loads the total length from stages 17..16;
   * `rte_lu` compares the destination in stages 3..0 with all four routes at
     once and latches the nexthop of the first match;
   * `router_ctrl` combines the check results into the verdict for the packet.
     Octet 0 is leaving in this same clock, so the verdict for octet 0 is used
     directly. It is then kept in a register for the rest of the packet.
3. **As the packet leaves.** `INVALID_PKT` stays high for every octet of a
   rejected packet. It is also high for any octet beyond the total length
   given in the header. The SIC turns `INVALID_PKT` into the outgoing
   `valid`. While the octets leave, `rte_lu` drives the CBUS, selected by the
   octet index from `pkt_len`:

   | octet leaving | CBUS |
   |---------------|------|
   | 0             | output port |
   | 1 … 8         | nexthop address, nibbles 31:28 … 3:0 |
   | 9 …           | 0 |

A packet whose first octet reaches stage 19 while `cnt16` is not 20 was
shorter than a header (a *runt*), and it is dropped. This is why packets must
have no gaps inside them. A gap would make `cnt16` lag, and the packet would
be dropped as a runt.

Packets are dropped at the end of the pipeline; nothing is removed while a
packet is still entering. That is the main simplification of stream
processing.

### Checks

| check | rejected when | source |
|-------|---------------|--------|
| version | version nibble ≠ 4 | header check at `pkt_start`, as in the prototype |
| header length | IHL×4 ≠ 20 | options are not supported |
| total length | < 20 | this design |
| TTL | TTL ≤ 1 | TTL decrement follows the prototype; dropping at ≤ 1 is standard IPv4 forwarding (no ICMP message is sent) |
| source filter | source in 10.0.0.0/8 | the prototype's net-10 filter |
| route | no table entry matches | no default route unless the table has a mask-0 entry |
| runt | fewer than 20 octets | this design |

`chk_o` (type `chk_t`) shows which checks failed, in the cycle when
`proc_pkt_o` is high. It is there for observation only.

There is no checksum check and no checksum update. Like the prototype, the
generator writes a zero checksum, and the TTL write-back does not correct it.

## The packet generator

`packet_generator` is a stream source. It stands in for line traffic. For
each packet one step of a 32-bit Galois LFSR (`lfsr`, polynomial
x³²+x²²+x²+x+1) supplies:

| LFSR bits | field |
|-----------|-------|
| 1:0   | source: one of `SRC_ADDR[0..3]`. The default set contains 10.1.2.3, so the router's filter is exercised. |
| 3:2   | destination: one of `DST_ADDR[0..3]`. The defaults match the four default routes. |
| 11:4  | TTL (0 and 1 occur, and are dropped by the router) |
| 21:12 | length: *r*+1; if that is below 21, add 20. This gives 21..1024 octets. |
| 23:22 | idle slots after the packet (1..4 in total) |

Payload octets come from a 16-bit LFSR (x¹⁶+x¹⁴+x¹³+x¹¹+1). Other header
fields are 0x45, TOS 0, identification = packet number, no fragmentation,
protocol 17, checksum 0.

A pulse on `prgm_req_i` latches `prgm_table_i`. Before the next packet the
generator then sends a programming run for the router (ID `ROUTER_ID`). That
is how the top loads a new route table while traffic flows.

The following follow the prototype: four addresses of each kind, variable
TTL, lengths from 21 to 1,024, LFSRs. The address values, the bit slicing,
the gaps and the programming run are this design's choices.

## Timing and throughput

* One octet per clock, with no internal stall. At 25 MHz that is 200 Mbit/s,
  the prototype's figure. The clock rate depends on the target technology.
* Latency through the router: 20 transfer clocks from an octet entering
  `router_module` to it leaving.
* All module outputs to the next module are combinational from the last
  register stage (through the SIC's `valid` gating).
* Reset: `rst_n`, active low, sampled on the clock edge. It clears all state
  and loads the default route table (`stream_pkg::DEFAULT_ROUTES`).

## Files

| file | role |
|------|------|
| `rtl/stream_pkg.sv` | stream word, shift-register word, route entry, check vector, default route table |
| `rtl/stream_router_top.sv` | generator → router chain; sink side as ports |
| `rtl/packet_generator.sv`, `rtl/lfsr.sv` | traffic source |
| `rtl/router_module.sv` | router stream module: `sic` + `ip_router` |
| `rtl/sic.sv` | stream interface controller |
| `rtl/ip_router.sv` | router datapath; instantiates the blocks below |
| `rtl/hdr_shift_reg.sv` | 20-octet shift register with the TTL rewrite port |
| `rtl/cnt16.sv`, `rtl/ver_ihl.sv`, `rtl/pkt_len.sv` | octet counter, version/IHL register, total length and octet index |
| `rtl/src_filter.sv`, `rtl/dec_ttl.sv`, `rtl/rte_lu.sv` | net-10 filter, TTL decrement, route lookup and CBUS multiplexer |
| `rtl/router_ctrl.sv` | PROC_PKT, verdict, INVALID_PKT |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ref_pkg.sv` | reference model: builds packets and predicts what the router does with them |
| `tb/tb_check.svh` | check/report macros |

## Verification

Every testbench checks against values computed separately from the RTL. It
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_stream_router_top` runs the whole chain at default parameters. It
  sends 800 generated packets (about 300,000 octets), with random sink stalls
  and two route-table reloads through the stream. The second reload removes
  one route. A reference model watches the words entering the router and
  predicts every forwarded packet, octet by octet: the new TTL, port and
  nexthop on CBUS, and a latency of 20. The test also counts forwarding,
  net-10 filtering, TTL expiry, missing routes, reloads and stalls. It fails
  if any of them never happened.
* `tb_router_module` and `tb_ip_router` add faults the generator never
  produces: bad version or IHL, short total length, runts, trailing octets
  beyond the total length, and runs for other module IDs that must pass
  through.
* The other testbenches cover one block each (LFSR periods, counter
  saturation, shift-register rewrite, first-match lookup, SIC run handling,
  and so on).

Every testbench fails when a deliberate bug is put into its module.

To run one with Verilator 5 from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/stream_pkg.sv tb/tb_ref_pkg.sv tb/tb_stream_router_top.sv \
    --top-module tb_stream_router_top -o sim
./obj_dir/sim
```

Swap in the testbench and top-module names for any other testbench. The
full-chain run takes a few seconds.

## Where this design goes beyond, or departs from, the prototype

* **Following the prototype:** the 8/4/4-bit stream bus and its four control
  signals, an SIC that either programs its module or feeds it data, a
  20-octet shift register, a 16-bit octet counter, version check and
  header-length storage at `pkt_start`, PROC_PKT, PKT_LEN, a net-10 source
  filter, TTL decrement with write-back, a four-route lookup that puts port
  and nexthop on CBUS, and INVALID_PKT turned into `valid` by the SIC. Also
  the generator's traffic: four addresses, variable TTL, lengths 21..1024,
  LFSRs. Throughput is one octet per clock.
* **This design's own choices:** the programming-run format and the route
  table layout; masked first-match routing; the CBUS nibble order; which
  header checks are made and the TTL ≤ 1 rule; runt detection; marking
  octets beyond the total length invalid; `rdy` passed straight through each
  module; all address values and LFSR polynomials.
* **Left out:**
  * the packet sink itself: a capture device, here the top's output ports;
  * the second input stream for an external CAM: the prototype did not
    build it either;
  * checksums and ICMP;
  * routing tables larger than four entries.
* **Limitation:** packets must arrive without idle slots inside them.
  Otherwise they are dropped as runts.

## Changing it

* **Route table:** `stream_pkg::DEFAULT_ROUTES` sets the table loaded at
  reset. `N_ROUTES` sets the table size; the configuration address width
  (`CFG_AW`) must then cover 13·`N_ROUTES` octets.
* **Filtered network:** `src_filter.FILTER_NET`.
* **Traffic:** `packet_generator` parameters `SRC_ADDR`, `DST_ADDR`,
  `MIN_LEN`, `MAX_LEN` and `SEED`.
* **Several routers:** use a different `MODULE_ID` for each, so that
  programming runs reach the right one.
* **Shift-register depth:** `ip_router.DEPTH` must stay equal to the header
  length the router accepts, because the header positions follow from it.
