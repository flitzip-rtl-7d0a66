# FlitZip: per-flit delta compression in a NoC network interface

Reply packets in a tiled multicore carry a 64-byte cache block as four
128-bit body flits behind one head flit. Cache data often varies very little
inside one flit, even when the flits of a block have nothing in common: a row
of small counters, a run of `0xFF`, a flit of zeros. FlitZip uses that. Each
flit is split into sixteen 1-byte chunks and described by one 1-byte **base**
and sixteen small signed **differences** from that base. The flit's 3-bit
**encoding** and its base (11 bits together) go into the head flit's unused
low bits, so the body carries nothing but differences and the flits that
could not be compressed. A flit whose chunks are all equal is not sent at all.
When the result fits in fewer body flits than the original, the packet goes
out in that shorter form.

This repository holds synthesizable SystemVerilog for the compressor, the
decompressor and the network interface (NI) of one tile that contains them.
It also holds a virtual-channel router and an 8x8 mesh of tiles, each with
an NI and a router (`flitzip_mesh`, the top), and a self-checking testbench
for every module. The cores and caches are not included: each tile's
processor side is brought out as ports.

## The encoding of one flit

For a flit with chunks C1..C16 (C1 is the most significant byte):

1. Find `C_small` and `C_large`. The base is their average, rounded down:
   `base = (C_small + C_large) >> 1`.
2. The range `r = C_large - C_small` decides the encoding:

   | range r   | difference width k | encoding | bits sent for the flit |
   |-----------|--------------------|----------|------------------------|
   | 0         | –                  | `000`    | 0 (all chunks equal the base) |
   | 1         | 2                  | `010`    | 32  |
   | 2..3      | 3                  | `011`    | 48  |
   | 4..7      | 4                  | `100`    | 64  |
   | 8..15     | 5                  | `101`    | 80  |
   | 16..31    | 6                  | `110`    | 96  |
   | 32..255   | –                  | `111`    | 128 (flit sent as is) |

   In hardware: a 1-byte subtractor gives r. A zero test gives `000`.
   Otherwise an 8:3 priority encoder gives the index p of r's top bit, and
   `k = p + 2` (p+1 magnitude bits plus a sign bit). The flit is compressible
   when `k <= 6`, and its encoding is then k itself.
3. Each difference is `d_j = base - C_j`, kept as a k-bit two's-complement
   field. Because the base sits mid-range, `|d_j| <= ceil(r/2) < 2^(k-1)`, so
   k bits always suffice. The rule is lossless, and it is conservative by at
   most one bit.
4. The bit-strip packs the fields with `d_1` at bit 0: `d_j` sits at bits
   `[(j-1)*k +: k]` of the segment.

Encoding `001` (1-bit differences, values 0 and -1) is part of the table and
the decompressor accepts it. This compressor never produces it, because any
non-zero range needs k >= 2 under the rule above.

Decompression reverses the steps: each k-bit field is sign-extended to a
byte, and `C_j = base - d_j`. An uncompressed flit goes through the same
subtractors with zero in place of the base. For `000`, the base is copied
into all sixteen chunks.

## Packet format

Head flit (128 bits):

| bits      | field |
|-----------|-------|
| 127:126   | ID |
| 125:124   | FT, flit type: `00` head, `01` body, `10` tail, `11` head-tail |
| 123:122   | VC |
| 121:116   | Src tile |
| 115:110   | Dest tile |
| 109:107   | MT, message type: 0 request, 1 reply with block, 2..3 coherence |
| 106:75    | MEM-ADDR |
| 74:64     | flit 1: encoding [74:72], base [71:64] |
| 63:53     | flit 2: encoding [63:61], base [60:53] |
| 52:42     | flit 3: encoding [52:50], base [49:42] |
| 41:31     | flit 4: encoding [41:39], base [38:31] |
| 30:0      | zero |

The body payload is the segments of flits 1..4 laid end to end from bit 0.
A flit's size is 0, 16k or 128 bits, as given by its encoding. The payload
is then cut into `ceil(bits / 128)` body flits, and the last one is marked
tail. The receiver finds every flit's boundary from the four encodings
alone: the offset of flit i is the sum of the sizes of flits 1..i-1.

If the payload would still need four body flits, the packet is sent
unchanged and all four encodings are written as `111`. The receiver decodes
that like any other packet. So no extra "compressed" flag is needed.

Example: body flits `80818283…` (repeated), a random flit, all `FF`, all
`00`. The metadata is `011_10000001`, `111_<base>`, `000_11111111` and
`000_00000000`. The payload is 48 + 128 = 176 bits, which is two body flits
instead of four. The first 12 payload bits are `110_111_000_001`, which is
d1..d4 = 1, 0, -1, -2.

Packets without a block (MT other than reply) go out as a single head-tail
flit, with the metadata field left untouched. A reply whose four flits are
each all-equal also becomes a single head-tail flit: the block is fully
described by its four bases.

## Compressor (`fz_packet_compressor`)

- Four `fz_flit_compressor` instances work in parallel, one per body flit.
- **Step 1** (register inside each flit compressor) holds min/max, the base
  and the encoding (`fz_range_encoder`).
- **Step 2** (register in the packet compressor) holds the subtractors,
  `fz_bit_strip`, payload packing, the flit-count decision and the head
  flit.
- A packet taken at clock edge t puts its head flit on the output at edge
  t+2. After that it sends one flit per cycle while `out_ready` is high.
- `in_ready` stays low while a packet is still being sent. Both steps stall
  together.

## Decompressor (`fz_packet_decompressor`)

- When the head flit arrives, the decompressor reads the four (encoding,
  base) pairs and computes each flit's offset and end in the payload.
- Body flits are written one after another into a 512-bit payload register.
- A single `fz_flit_decompressor` (one-cycle, registered output) rebuilds
  one original flit per cycle. It always takes the lowest-numbered flit
  whose bits have all arrived.
- `000` flits need no payload, so they are rebuilt while body flits are
  still in transit.
- A body flit counts as arrived in the cycle it is offered on the input.
  When the last body flit completes only the last original flit, the packet
  is ready (`out_valid`) from the clock edge after the one that took that
  flit. That is one cycle of decompression latency for the whole packet.
  If the last body flit completes several original flits, each extra flit
  adds one cycle, because there is only one decompressor.

## Network interface (`flitzip_ni`)

```
tx (processor) -> fz_packet_compressor -> eject queue (fz_flit_fifo) -> net_out
net_in -> inject queue (fz_flit_fifo) -> fz_packet_decompressor -> rx (processor)
```

- **Processor side.** `tx_hdr` (`hdr_ctrl_t`, 53 bits) and `tx_body`
  (4 x 128 bits, `[0]` = body flit 1) are sent with `tx_valid`/`tx_ready`.
  The received packet comes back on `rx_hdr`/`rx_body` with
  `rx_valid`/`rx_ready`. `rx_hdr.ft` shows head or head-tail, and the block
  is zero for packets without one.
- **Network side.** Flits are `flit_t` `{ft, data[127:0]}`, with
  valid/ready. A router with credit flow control can drive `ready` from its
  credits.
- **Status.** `stat_valid` pulses once per packet, with `stat_compressed`,
  `stat_body_flits` and the four encodings. `ejq_count` and `inq_count`
  give the queue occupancy.
- **Parameters.** `NB` (body flits per packet, default 4) and
  `EJQ_DEPTH`/`INQ_DEPTH` (default 5 flits, one uncompressed packet). NB
  may be 1..6: 6 x 11 metadata bits still fit in the 75 free head bits, and
  an elaboration assertion checks this. The flit width (128) and the chunk
  size (1 byte) are package constants.
- **Reset and assertions.** All state uses an asynchronous active-low
  `rst_n`. Assertions check these handshake rules:
  - an output flit is held while the network stalls;
  - the four flit compressors stay in lockstep;
  - a tail flit comes exactly where the head flit said the packet ends;
  - a queue never holds more than its depth.

## Router (`noc_router`)

An input-buffered wormhole router with five ports: 0 local, 1 north,
2 east, 3 south, 4 west.

- **Buffers.** Every input has `NUM_VC` = 5 virtual channels (VCs) of
  `BUF_DEPTH` = 4 flits.
- **Route computation.** XY routing on the Dest field (head bits
  [115:110]): first along x, then along y. Tile `t = y*MESH_X + x`, and y
  grows southwards.
- **VC allocation.** A head flit at the front of an idle VC asks its output
  port for a downstream VC. Each output grants one request per cycle, round
  robin, and hands out its lowest free VC. The local output counts as a
  single VC.
- **Switch allocation.** Each input picks, round robin, one VC that has a
  flit and a downstream credit. Each output then picks one of the inputs
  that chose it, also round robin. The winners cross the crossbar into the
  output registers, which drive the links. A tail or head-tail flit frees
  both VCs.
- **Flow control.** Between routers it uses credits: one credit per
  downstream buffer slot, returned (`cr_out_*`) when a flit leaves an input
  VC. The NI side uses valid/ready. The NI writes into VC 0 of the local
  input.
- **Timing.** A flit written into a buffer at one clock edge can be in the
  output register at the next one. That is 2 cycles per hop for a body flit,
  link included, and 3 for a head flit, which also needs VC allocation. The
  evaluated router takes 2 cycles plus a 1-cycle link.

## Mesh (`flitzip_mesh`, the top)

`MESH_X` x `MESH_Y` tiles (default 8x8). Each tile has one `flitzip_ni` and
one `noc_router`.

- The NI's network output feeds the router's local input. The router's local
  output feeds the NI's network input.
- Neighbouring routers are joined in both directions by flit, VC and valid
  wires, with credit and VC wires going back.
- Ports at the mesh edge are tied idle, since XY routing never uses them.
- Every tile's `tx_*`, `rx_*` and status signals are arrays indexed by tile
  number. A packet is delivered at the tile that its Dest field names.
- `MESH_X * MESH_Y` may be at most 64, because Src and Dest are 6 bits wide.
  An elaboration assertion checks this.

## What follows the FlitZip description and what is chosen here

These follow the published technique:

- 1-byte chunks and base;
- the mid-range base;
- `d = base - C`;
- the 3-bit encodings with their meanings;
- the 6-bit limit;
- the range subtractor and priority encoder;
- the base-or-zero multiplexer;
- bit-stripping;
- metadata at head bits [74:31], with the encoding above the base;
- payload packing order;
- compressing only when a flit is saved;
- four compressors in parallel;
- two cycles to compress;
- one decompressor circuit that works as flits arrive and adds one cycle
  for the last flit.

These are choices of this implementation:

- **Difference width.** The width comes from the range (`k = top bit of
  r + 2`), which is how the worked example comes out. A width taken from
  the largest |difference| would sometimes save one bit.
- **Encoded width.** The encoding gives the full field width, sign bit
  included, so `011` means 3-bit fields and 48 bits per flit. A reading
  with an extra sign bit per field was rejected: it contradicts the worked
  decompression example.
- **Uncompressed packets.** A packet that saves no flit is marked by
  writing `111` for all four flits.
- **Uncompressed flits.** For `111` the subtractor operands are swapped
  (`C - 0`), so the chunk passes unchanged. The base stored for such a flit
  is the computed average, which is not used.
- **Head-flit fields.** The control fields are packed contiguously from bit
  127, using the widths of the published head-flit format (ID 2, FT 2,
  VC 2, Src 6, Dest 6, MT 3, address 32). Those widths fill exactly 127..75.
- **Codes.** The head-tail flit type and the message-type codes are this
  design's own. Only replies carry a block.
- **Interfaces.** The valid/ready handshakes, the queue depths, the
  whole-block processor interface and the asynchronous reset are this
  design's own.
- **Encoding table.** The table is fixed logic (`fz_range_encoder` and
  `flitzip_pkg::seg_len`), not a programmable memory.
- **Compression point.** Compression happens before the eject queue, so
  the queue holds compressed flits.
- **Router internals.** The router's units (VC buffers, RC, VA, SA,
  crossbar), XY routing, 5 VCs of 4 flits and the 8x8 mesh follow the
  evaluated network. Their insides are this design's own: the round-robin
  arbiters, credit flow control, single-VC local ports, and the shorter
  pipeline described above.

## Not covered

- **Tile.** The tile's core, caches, directory and memory are not included.
- **Link width.** 256-bit links, and with them blocks above 96 bytes, are
  not supported: the flit width is fixed at 128.
- **Base size.** Bases of 2, 4 or 8 bytes are not supported. Only the
  1-byte base is built.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog. `tb/fz_ref_pkg.sv` is an independent reference model
written with integer arithmetic: it covers flit and packet compression and
random flit generators of each content kind.

| testbench | checks |
|-----------|--------|
| `tb_fz_range_encoder` | all 32 896 (small, large) pairs against the table; the range 31/32 limit |
| `tb_fz_bit_strip` | random differences at every width, strip disabled, 000 |
| `tb_fz_flit_compressor` | every kind of flit with random stalls; the example flits; one-cycle step latency |
| `tb_fz_flit_decompressor` | round trip of random flits, encoding 001, the example segment; one-cycle latency |
| `tb_fz_packet_compressor` | 1500+ packets with back-pressure against the reference; example metadata and body bits; two-cycle latency; uncompressed, head-only and request cases |
| `tb_fz_packet_decompressor` | 2000 reference streams with gaps and hold; ready one cycle after the last flit at idle-network spacing |
| `tb_fz_flit_fifo` | order, full, empty, count, simultaneous read and write when full |
| `tb_flitzip_ni` | 3000 packets through the NI at default sizes, looped back over a stalling link; every packet compared; each encoding, packet case and stall counted and required |
| `tb_noc_router` | centre router of a 3x3 mesh, 1500 packets from all five inputs: XY output port, flit order per VC, no downstream overrun, every packet once; credit stalls, full VCs, all five VCs busy, local stalls counted and required |
| `tb_flitzip_mesh` | 3x3 mesh, 720 packets between random tiles, corner to corner included: every packet delivered once, at its Dest, unchanged; compressed, uncompressed, head-only and request packets and both kinds of stall counted and required |
| `tb_flitzip_mesh_full` | the same test on the default 8x8 mesh with 768 packets |

The end-to-end test uses flits in roughly the proportions measured for
real benchmarks: about half all-equal and a fifth uncompressible. It sends
about 0.57 of the uncompressed flit count.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/flitzip_pkg.sv tb/fz_ref_pkg.sv tb/tb_flitzip_ni.sv --top-module tb_flitzip_ni
./obj_dir/Vtb_flitzip_ni
```

Replace the testbench name to run another one. `tb_fz_flit_fifo` does not
need `fz_ref_pkg.sv`, but passing it does no harm. Every testbench
finishes in well under a second of simulation time. The 3x3 mesh test
builds in about a minute. The 8x8 one (`tb_flitzip_mesh_full`) takes about
16 minutes to build with `-j 8`.
