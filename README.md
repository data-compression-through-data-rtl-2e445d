# Delta-encoded cache lines in the network interfaces of a 4x4 mesh NoC

In a many-core chip most network traffic is cache lines moving between L2 banks and
memory controllers. Lines often hold little information: all zeros, one value repeated,
or numbers that lie close together (pointers into one region, counters, small integers).
This design shrinks such lines in the **network interface (NI)**, just before a packet
enters the network, and restores them in the receiving NI, just before the packet leaves
it. Caches and cores stay unchanged; the network only sees shorter packets, and with
store-and-forward routers a shorter packet is faster at every hop.

The RTL is a complete 4x4 mesh: 16 five-port routers, and 20 network interfaces (one per
tile, one per corner memory controller), each with a compressing injection half and a
decompressing ejection half. Cores, caches and memory controllers are not included; their
side of each interface is a port of the top module.

## The five encodings

A 16-byte line is four 32-bit words B0..B3. All encoders look at the line at the same time
and the smallest successful result wins:

| Priority | Name | Code | Body sent | Packet (header + body) |
|---|---|---|---|---|
| 1 | Zero | `000` | nothing | 4 bytes, 1 flit |
| 2 | Repeat value | `001` | B0 | 8 bytes, 2 flits |
| 3 | Base 4, delta 1 (B4D1) | `010` | B0, three 1-byte deltas | 11 bytes, 3 flits |
| 4 | Base 4, delta 2 (B4D2) | `011` | B0, three 2-byte deltas | 14 bytes, 4 flits |
| 5 | No compression | `111` | B0..B3 | 20 bytes, 5 flits |

A zero line also repeats its value and a repeated line has zero deltas; the priority order
resolves that in favour of the shortest packet.

### How a delta is stored

The base is B0. Three subtractors form `Bi - B0` (i = 1..3) modulo 2^32. Each difference
is split into a **sign bit**, which goes into the header, and a **magnitude**, which goes
into the body. The line fits B4D1 when all three magnitudes are below 256, B4D2 when all
are below 65536. The receiver adds the magnitude to B0 when the sign bit is 0 and
subtracts it when the sign bit is 1, so a 1-byte delta covers -255..+255 and the
arithmetic wraps around 2^32 exactly as the subtraction did.

Example: `B0 = 0x0000_1000, B1 = 0x0000_0FF0, B2 = 0x0000_1005, B3 = 0x0000_1000`
gives differences -16, +5, 0. Encoding `010`, sign bits `001` (bit 26 of the header
belongs to B1), body bytes `00 10 00 00 | 10 05 00` (B0 little-endian, then the three
magnitudes), 3 flits instead of 5.

All three deltas must fit. One delta that does not fit could not be rebuilt, so a line
with one outlier goes up one class (or to no compression).

## Packet format

Flits are 32 bits, with two extra sideband bits marking the head and the tail flit
(`flit_t` in `noc_comp_pkg`). The first flit is the header:

| Bits | Field |
|---|---|
| 31:29 | encoding (table above) |
| 28:26 | delta sign bits; bit 26 for B1, 28 for B3 |
| 25:24 | message type: `00` read request, `01` write reply, `10` write request, `11` read reply |
| 23:19 | destination node |
| 18:14 | source node |
| 13:0 | line address |

Node numbers are `{mc, y[1:0], x[1:0]}`: `mc = 0` is the tile at (x, y), `mc = 1` the
memory controller hung on corner router (x, y). Read requests and write replies are a
single header flit. Write requests and read replies carry a line; their body bytes follow
the header in order, byte 0 in bits 7:0 of the first body flit, and the last flit is padded
(B4D1's 7 body bytes take two flits, B4D2's 10 bytes take three).

The header layout, the sideband head/tail bits and the 14-bit address are this design's
choices; the encodings and packet sizes are fixed by the scheme.

## The network

`mesh_router` has five ports (Local, North, East, South, West) and works **store and
forward**: a packet competes for its output only once its tail flit is in the input buffer.
Routing is XY (first along X to the destination column, then along Y), which cannot
deadlock on a mesh. Each output has a round-robin arbiter and stays with one input until the
tail of that packet has passed; outputs are registered.

The router pipeline is modelled as a fixed delay: the head of a packet enters the next
router `PIPE_STAGES` (5) cycles after its tail entered this one, and the remaining flits
follow one per cycle. A packet of N flits therefore costs **N + 4 cycles per hop**: 5 for
a zero line, 9 for an uncompressed one. Measured end to end at the default parameters,
from request accepted at tile 0 to message valid at the destination, on an idle network:

| Router hops | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|
| Zero (1 flit) | 12 | 17 | 22 | 27 | 32 | 37 |
| Repeat (2 flits) | 15 | 21 | 27 | 33 | 39 | 45 |
| B4D1 (3 flits) | 18 | 25 | 32 | 39 | 46 | 53 |
| B4D2 (4 flits) | 21 | 29 | 37 | 45 | 53 | 61 |
| None (5 flits) | 24 | 33 | 42 | 51 | 60 | 69 |

The longest XY path in a 4x4 mesh is 6 hops, so the table stops there.

Each input port has 8 flits of buffer. That is the storage of two virtual channels of
4 flits, merged into one queue; this router has no virtual channels. Store and forward
needs room for a whole packet, and a 5-flit packet would not fit one 4-flit channel.

The four memory controllers sit at the corners. Each uses the outer port that its corner
router would otherwise leave unused: West for column 0, East for column 3. Packets for a
controller are routed to its corner router and leave there through that port.

## Module hierarchy

```
noc_compress_top            4x4 mesh + 20 network interfaces
├── ni_tx  (x20)            accept message, compress, send flits
│   └── bdi_compressor      compressors in parallel + priority mux
│       ├── zero_comp
│       ├── repeat_comp
│       ├── delta_comp #(1) B4D1: 3 subtractors, sign/magnitude, fit test
│       ├── delta_comp #(2) B4D2
│       └── comp_priority_mux
├── ni_rx  (x20)            collect flits, decompress, deliver message
│   └── bdi_decompressor    decoders in parallel, selected by the encoding
│       ├── delta_decomp #(1)   3 adder/subtractors
│       └── delta_decomp #(2)
└── mesh_noc                16 x mesh_router, links, corner controller ports
```

`noc_comp_pkg` holds the shared types (`line_t`, `enc_t`, `msg_t`, `header_t`, `flit_t`),
the port numbers and the packet-length function.

## Interfaces and timing

All channels use valid/ready: a transfer happens on a rising clock edge where both are 1,
and a sender keeps its data stable while it waits. The reset `rst_n` is asynchronous and
active low.

* **Top, endpoint e** (0..15 tiles at node e, 16..19 controllers at corners x0y0, x3y0,
  x0y3, x3y3): `req_valid_i/req_ready_o` with `req_msg_i`, `req_dst_i` (node number),
  `req_addr_i`, `req_line_i` send a message; `msg_valid_o/msg_ready_i` with `msg_hdr_o`
  (the received header, including the encoding that was used) and `msg_line_o` deliver
  one.
* **ni_tx**: compresses in the accepting cycle and registers the result. The header
  flit is valid the next cycle. An N-flit packet takes N cycles on the link, and the next
  message is accepted in the cycle the last flit leaves, so packets go back to back.
* **ni_rx**: a message is valid the cycle after its tail flit is taken. It holds one
  finished message and takes no flits until that message is read.
* **Compressor and decompressor** are purely combinational.

Assertions in `ni_tx`, `ni_rx` and `mesh_router` check that a flit offered is held until
taken, that a packet never exceeds 5 flits or 4 body flits, and that a router only reads a
packet it has completely stored.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/noc_comp_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_noc_compress_top.sv \
    --top-module tb_noc_compress_top -o sim
./obj_dir/sim
```

Replace the last file and the top module name to run another testbench. The package files
must come first.

| Testbench | What it shows |
|---|---|
| `tb_zero_comp`, `tb_repeat_comp` | detection on crafted and random lines |
| `tb_delta_comp` | fit test, signs and body for both widths near +-255/256, +-65535/65536 and around the 2^32 wrap |
| `tb_comp_priority_mux` | all flag combinations, priority order and packet lengths |
| `tb_bdi_compressor` | 3000 lines of all classes against a reference encoder |
| `tb_delta_decomp`, `tb_bdi_decompressor` | rebuilding lines, including the unused codes |
| `tb_ni_tx`, `tb_ni_rx` | packets flit by flit under backpressure; back-to-back rate; delivery one cycle after the tail |
| `tb_mesh_router` | XY port choice, exact store-and-forward delay, contention and full buffers |
| `tb_mesh_noc` | 1200 raw packets between all tiles and controllers; delay across the whole mesh |
| `tb_noc_compress_top` | the whole design at default parameters: a read that misses in L1 and L2 (tile to L2 bank to memory controller and back), the latency table above, then 800 random messages of all kinds between all 20 endpoints, each checked for header and line |

`tb_ref_pkg` is the reference model: it computes the encoding with signed 64-bit
arithmetic, independently of the RTL, and generates lines of each class.

## Parameters

| Parameter | Where | Default | Meaning |
|---|---|---|---|
| `BUF_DEPTH` | `mesh_router`, `mesh_noc`, top | 8 | flits of buffer per router input (2 channels x 4 flits) |
| `PIPE_STAGES` | `mesh_router`, `mesh_noc`, top | 5 | router pipeline depth, as a fixed per-hop delay |
| `DELTA_BYTES` | `delta_comp`, `delta_decomp` | 1 | delta width; instantiated as 1 and 2 |
| `NODE_ID` | `ni_tx` | 0 | node number written into the header's source field |

`BUF_DEPTH` must be at least 5, or store and forward could never move a full packet. The
mesh size, the word and line widths and the header fields are constants in
`noc_comp_pkg`. The 2-bit coordinates limit the mesh to 4x4.

## How far it goes, and where it is this design's own

Taken from the scheme as specified: the five encodings with their codes, priorities and
packet sizes; the first word as base with N-1 subtractors; sign bits in the header steering
an adder or subtractor in the decoder; the parallel units with a priority mux on both
sides; compression in the NI; the 4x4 mesh with 5-port routers, XY routing, store and
forward, 4-byte flits, 5-flit packets and controllers at the corners.

Chosen here, where the specification is silent or contradicts itself:

* **Sign and magnitude deltas.** The decoder is specified as an adder or subtractor
  steered by a sign bit. That fits a magnitude in the body and the sign in the header, and
  that is what is built. The range is therefore -255..+255 for 1-byte deltas, not the
  -128..+127 of two's complement.
* **All deltas must fit.** The specification can be read as "one short delta is enough".
  That cannot be decoded, so every delta must fit.
* **No virtual channels.** The specification asks for store-and-forward routers with two
  4-flit virtual channels, but a 5-flit packet does not fit in one channel. Store and
  forward was kept and the two channels were merged into one 8-flit queue per input.
* **The router pipeline is a delay.** The five stages are not built one by one. The
  per-hop cost of N + 4 cycles for an N-flit packet matches the published latency curves'
  slopes: about 5 cycles per hop for zero lines and 9 for uncompressed ones.
* **Own choices:** the header layout, the head/tail sideband, the valid/ready handshakes,
  round-robin arbitration, where the controllers plug in, and the message numbering.

Not included: cores, L1 and L2 caches, memory controllers and DRAM. They connect to the
top's endpoint ports. The published latency curves run to 16 hops; the 4x4 mesh has at
most 6.
