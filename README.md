# Artemis: a network-on-chip for dynamically self-reconfigurable systems

When part of an FPGA is rewritten at run time with a partial bitstream, the
rest of the chip keeps working. The logic around the rewritten area then has
three problems:

- The area's pins show random transients while configuration data is written.
  On a network port they look like the start of a packet. Such a "false
  packet" can corrupt or block the network.
- Packets sent to the area while it is rewritten cannot be delivered. They
  were meant either for the old core or for the new one, and nobody can tell
  which.
- The new core must start from reset and be connected again once it is in
  place.

This RTL solves them in the network itself. Artemis is a small packet-switched
mesh in the style of the Hermes NoC. Its routers accept **control packets**,
which are addressed to a router rather than to an IP. A control packet can
*insulate* the router's local area: the router then holds the area's core in
reset, ignores the area's pins and discards data packets headed there. A
second control packet *reconnects* the area. A hardware configuration
controller uses these two commands around each partial reconfiguration.

The system in `rtl/artemis_dsrs.sv` is a proof-of-concept built this way:

```
        router 01 ---------------- router 11
   reconfigurable area        configuration controller (cc_h)
   (mult | div | sqrt)           |-- bitstream SRAM (1 Mbyte, external)
        |                        |-- ICAP (FPGA configuration port)
        |                        |
        router 00 ---------------- router 10
        processor port            host link port
```

The processor asks for a core. The controller insulates area 01, copies the
core's partial bitstream from SRAM to ICAP, reconnects the area and tells the
processor the area's address. The processor then sends operands to the core
and reads the result back, all as packets.

## Links, flits and packets

Every link between two routers, or between a router and an IP, is a pair of
one-way channels. Each channel carries:

| signal | width | meaning |
|---|---|---|
| `tx` / `rx` | 1 | a flit is offered |
| `data` | 8 | flit data |
| `ctrl` | 1 | the flit belongs to a control packet |
| `ack` | 1 | the receiver takes the flit in this cycle |

A flit moves in every cycle in which `tx` and the receiver's `ack` are both
high. The receiver drives `ack = rx AND (buffer has room)`, so the sender's
`tx` never depends on `ack` combinationally. A sender must hold the flit
until it is acknowledged; the router asserts this. The type `flit_t`
(`artemis_pkg`) packs `{ctrl, data}`.

A packet consists of:

1. a header flit holding the target router address `{X[3:0], Y[3:0]}`;
2. a length flit giving the number of payload flits (0 to 255);
3. the payload.

A control packet has `ctrl = 1` on all of its flits. Its first payload flit
is the command: `CTL_INSULATE` (0x01) or `CTL_RECONNECT` (0x02).

## The router (`artemis_router`)

The router has five ports: East, West, North and South to its neighbours, and
Local to its IP. Each input port has a FIFO of `BUF_DEPTH` entries (16 by
default). Every entry is 9 bits: the flit plus its `ctrl` bit, which must
travel with the flit to the router that decodes it.

- **Allocation.** A central allocator visits the inputs round-robin, one per
  cycle. If the visited input holds a header that is not yet routed, the
  allocator routes it XY: first along X, then along Y, and to Local when both
  coordinates match. If that output is free, the input and output are
  connected.
- **Wormhole transfer.** The connection carries the header, the length flit
  and that many payload flits, then it is released.
- **Latency.** A header written into an empty router in cycle t is offered
  on its output in cycle t+2. After that the path moves one flit per cycle.

### Control packets and the local port

The local output has three modes, chosen when a packet is connected to it.

| mode | when | what the local output does |
|---|---|---|
| forward | the packet is a data packet and the area is connected | passes flits to the IP |
| control | the header has `ctrl = 1`, so the packet is for this router | swallows the packet; its command takes effect after the last flit |
| discard | the packet is a data packet and the area is insulated | swallows the packet flit by flit, so the sender never blocks |

While the area is insulated, the router:

- drives `reconf` high;
- closes its local input, which ignores `rx`;
- discards data packets sent to the local port.

Control packets addressed to other routers pass through like data packets.
They keep `ctrl = 1` on every hop.

## The interface to a reconfigurable core (`reconf_interface`, `r2f_macro`)

The core cannot be wired straight to the router. On the FPGA, the signals
that cross the area's boundary go through "macros": fixed LUTs that pin down
where the wires cross.

| direction | bits | how they cross |
|---|---|---|
| router to core | 11: router `tx`, 8 data bits, the router's ack of core flits, core reset | F2R macros: identity LUTs, plain wires in RTL |
| core to router | 10: core `tx`, 8 data bits, the core's ack of router flits | R2F macros: each bit is `in AND reconf_n` |

- The core reset is `reset OR reconf`.
- `reconf_n` is `NOT reconf`.
- So while the router insulates the area, the core is held in reset and
  only zeros reach the router, whatever the area's pins do.
- Together with the router closing its local input, this gives two
  independent barriers against false packets.
- `ctrl` does not cross the interface, because reconfigurable cores never
  send or receive control packets.

## The configuration controller (`cc_h`)

The controller sits on the local port of router 11. It waits for a request
packet:

```
11, 3, <src>, CMD_RECONF_REQ (0x10), <slot>
```

and then:

1. sends `{01, 1, CTL_INSULATE}` as a control packet;
2. reads three length bytes at the start of SRAM slot `<slot>`, then copies
   that many bytes to ICAP;
3. sends `{01, 1, CTL_RECONNECT}` as a control packet;
4. answers `<src>, 3, 11, CMD_RECONF_ACK (0x11), 01`. The last byte is the
   address of the area that now holds the core.

Slot k starts at byte `k * floor(2^SRAM_AW / MAX_BITSTREAMS)`. That is ten
slots of 104,857 bytes in the 1 Mbyte SRAM. The controller drops requests for
higher slots and malformed requests.

**Byte timing.** Each bitstream byte takes `BYTE_CYCLES` = 5 clock cycles:

- the SRAM address is held for all five;
- the data is sampled in the fourth;
- it is written to ICAP in the fifth, with `CE` and `WRITE` low.

ICAP `BUSY` stretches the fifth cycle.

Five cycles per byte is the rate the reference measurements imply: a
96,428-byte divider bitstream took 482,221 cycles. This RTL takes 482,155
cycles for it in simulation. Steps 1 and 3 each take at most 4 cycles from
request to last flit, also as measured.

The controller does not wait for the insulate packet to reach router 01
before it starts reading SRAM. The packet needs a few cycles; the bitstream
needs about half a million.

## The reconfigurable cores (`rip_core`, `arith_*`, `reconf_region`)

Three cores can be loaded into the area:

| core | input | output | latency |
|---|---|---|---|
| `arith_mult` | two unsigned 16-bit operands | 32-bit product | 1 cycle |
| `arith_div` | unsigned 16-bit by 16-bit, restoring | `{quotient, remainder}` | 17 cycles |
| `arith_sqrt` | unsigned 32-bit, digit by digit | 16-bit floor square root | 17 cycles |

Division by zero gives quotient `FFFF` and remainder equal to the dividend.

`rip_core` wraps any of the three in the same packet protocol:

```
write : 01, 6, <src>, 0x01, op[31:24], op[23:16], op[15:8], op[7:0]
read  : 01, 2, <src>, 0x02
result: <src>, 6, 01, 0x03, r[31:24], r[23:16], r[15:8], r[7:0]
```

- For mult and div, operand A is `op[31:16]` and B is `op[15:0]`.
- A read that arrives before the result is ready is answered as soon as the
  result is ready.
- Packets with unknown commands are consumed and ignored.

**What `reconf_region` models.** On the FPGA, the area holds only the core
its last bitstream put there. An RTL model cannot change its own netlist. So
`reconf_region` holds all three cores:

- The `region_cfg` input says which core is "configured". Only that core
  drives the pins; the other two are held in reset.
- While `region_cfg = IP_NONE` (blank, or being written), the pins follow
  the `glitch_*` inputs, which stand for the transients of a real
  reconfiguration.

In the system, `region_cfg` and `glitch_*` are top-level inputs, driven by
whatever models the FPGA's configuration port. The testbench's ICAP model
sets `region_cfg` from the first byte of each bitstream once the last byte is
written. It drives random transients in between.

## Top-level ports (`artemis_dsrs`)

| group | ports | connects to |
|---|---|---|
| processor | `p_rx, p_data_in, p_ack_rx, p_tx, p_data_out, p_ack_tx` | router 00 local port; directions as seen from the NoC |
| host link | `h_*` | router 10 local port, same format |
| SRAM | `sram_addr[19:0], sram_oe_n, sram_data[7:0]` | asynchronous, read-only |
| ICAP | `icap_ce_n, icap_write_n, icap_din[7:0], icap_busy` | Virtex-II style configuration port |
| area | `region_cfg, glitch_tx, glitch_ack, glitch_data` | the FPGA fabric, as above |
| status | `area_reconf, cc_busy` | observation |

The parameters are:

- `BUF_DEPTH` (16)
- `BYTE_CYCLES` (5)
- `SRAM_AW` (20)
- `MAX_BITSTREAMS` (10)

## What is built, and where it departs from the reference design

**Follows the reference design:**

- the `ctrl` sideband bit and its place in every buffer entry;
- the three network services (insulation, discarding, reconnection);
- the `reconf` output, the reset OR and the AND gating by `reconf_n`;
- the 8-bit macros and the 11/10-bit split across the interface;
- the 2x2 mesh and who sits on which router;
- the controller's four steps, the 1 Mbyte SRAM and the ten bitstreams;
- the five-cycle byte time;
- the three kinds of core and their operand widths;
- the three-step access protocol.

**This design's own choices,** where the reference is silent:

- handshake timing;
- packet layout and all command codes;
- XY routing and round-robin allocation;
- buffer depth;
- reset state (the area is connected after reset);
- SRAM slot layout and the length header;
- the ICAP pin convention;
- the arithmetic algorithms and latencies;
- signed or unsigned operands;
- division by zero.

**Not built:**

- The processor (a 32-bit MIPS-like CPU with 27 instructions) and its
  memories. They are not specified in enough detail; their router port is a
  top-level port.
- The host serial link. It is only named; its router port is a top-level
  port.
- The ICAP and the SRAM. They are a vendor primitive and an external chip.
  Behavioural models live in the testbenches.
- The bus-based comparison system: MicroBlaze, bus, software configuration
  control and bitstream compression.
- Core relocation and the bitstream tools. They belong to the design flow,
  not to the hardware.
- Only one reconfigurable area exists. The controller does not choose among
  several; `REGION_ADDR` is fixed to 01.
- The suggested shortcut in which a core answers without a read packet is
  not used.

**Limitations:**

- If a core is insulated halfway through sending a packet, the partial
  packet stays in router 01's local buffer and blocks that input. The system
  avoids this because the processor only requests reconfiguration when it
  is not using the core.
- The request-to-insulation time includes the time the request spends
  crossing the network. Processor software time, measured in the reference
  system for steps (a) and (e), does not exist here.

## Simulating

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and calls `$finish`.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/artemis_pkg.sv tb/tb_artemis_dsrs.sv --top-module tb_artemis_dsrs
./obj_dir/Vtb_artemis_dsrs
```

Replace the testbench name to run another.

**End-to-end test.** `tb_artemis_dsrs` runs the whole system at its default
size. It fills a 1 Mbyte SRAM model with three bitstreams of the reference
sizes: mult 99,644 bytes, div 96,428 and sqrt 101,988. It then:

- reconfigures the area three times, with ICAP `BUSY` stalls during the
  third;
- sends a data packet into the area during each reconfiguration and checks
  that it is discarded;
- checks that none of the random transients enters the network;
- runs 200 operations on each core once it is loaded, checking every result
  and reporting the average write-read-result time (43 to 54 cycles);
- keeps background traffic from the host port running throughout.

It takes about 1.6 million cycles, a few seconds of simulation.

**Other testbenches:**

| testbench | what it covers |
|---|---|
| `tb_artemis_router` | one router with random traffic on all ports, the 2-cycle header latency, and insulation, discarding and reconnection |
| `tb_artemis_noc` | the mesh with all-to-all traffic and control packets across it |
| `tb_cc_h` | the controller against SRAM and ICAP models, with exact byte timing |
| `tb_rip_core`, `tb_reconf_region` | the cores and the area behind their packet interface |
| `tb_arith_*`, `tb_artemis_buffer`, `tb_r2f_macro`, `tb_reconf_interface` | the small blocks |

All the tests use `$urandom` with the simulator's default seed.
