# DropLayer-aware ReRAM manycore for GNN training

Training a graph neural network on a ReRAM manycore chip is limited by
communication, not arithmetic: every layer's outputs must travel over the
network-on-chip to the processing elements (PEs) that hold the next layer's
weights or the graph's adjacency blocks. DropLayer regularisation (DropEdge on
the adjacency, Dropout on features) throws a random fraction of those values
away anyway. This design never sends a dropped value. The sender draws a
random 16-bit key from an LFSR, sends only the values whose key bit is 1, and
puts the key in the packet header. The receiver uses the key to put each value
back in its row and writes zero in the rows that were dropped. Routers read the
packet length from the key's population count, so packets are as short as the
drop rate allows.

The chip has 36 PEs in 4 tiers of 3 x 3, joined by a 3D mesh with tree-based
multicast. Each PE has 4 tiles, and each tile has 12 IMAs (in-situ
multiply-accumulate units). An IMA holds a 128 x 128 matrix of 16-bit weights,
stored in 8 ReRAM crossbars of 2-bit cells. All 16-bit values are signed Q8.8
fixed point.

## The DropLayer key (`drop_lfsr`)

Each tile has one 16-bit LFSR. Its taps and seed can be reprogrammed; the
reset values are x^16+x^14+x^13+x^11+1 and 0xACE1, and a zero seed is
replaced by 1. Drop probability comes from weighted outputs. For each key bit,
the LFSR advances four steps and its low four bits are compared with a 4-bit
threshold `thr`. The bit is 1 (keep) when those bits are >= `thr`, so values
are dropped with probability `thr/16`. Bit i-1 of the key is k_i, which
controls value d_i.

- With drop disabled, the key is all ones (NoDrop).
- A key takes 17 clocks from `gen` to `key_valid`.
- At a 1 GHz logic clock, a key is ready well within one 10 MHz crossbar step.

The available probabilities are steps of 1/16. A probability of 0.5 is exact.
A probability of 0.3 is set as 5/16 = 0.3125.

## Variable-length packets (`drop_packetizer`, `drop_decoder`)

A packet carries one group of 16 values. It is a head flit followed by
popcount(key) body flits. There is no tail flit, because the length is known
from the head.

A flit is one head bit plus a 69-bit payload (`dare_pkg::flit_t`). The head
flit carries the whole `header_t`:

| field | bits | meaning |
|---|---|---|
| `dest` | 36 | destination PE bit mask (multicast) |
| `src_pe`, `src_tile` | 6, 2 | sender |
| `dst_tile`, `dst_ima` | 2, 4 | target tile and IMA in each destination PE |
| `dst_seg` | 3 | which 16-row group of the IMA's 128 inputs |
| `key` | 16 | k_1..k_16 |

Each body flit carries one kept 16-bit value in the low bits of the payload.
Kept values go out in increasing index order.

The decoder clears its 16 rows when a head flit arrives. It writes body flit j
into the row of the j-th set key bit. One clock after the last flit, it pulses
`out_valid` with the header and the 16 rows. It always accepts one flit per
clock.

## 3D mesh and multicast routing (`noc_router`, `noc_3d_mesh`)

The routers are numbered so that PE n sits at x = n mod 3, y = (n/3) mod 3,
z = n/9. Each router has seven ports: local, ±x, ±y and ±z. The ±z ports are
the vertical links between tiers.

**Routing.** Routing is dimension-ordered: x first, then y, then z. For each
output port, a router computes which PEs are reached through that port. It
ANDs that set with the head flit's destination mask. Every port with a
non-empty result gets a branch, and that branch's head flit carries only its
part of the mask. Applied hop by hop, this builds the multicast tree.

**Why packet-sized buffers.** Plain wormhole switching deadlocks with tree
multicast. Two branches of one packet can each wait for a port held by a
different packet that is itself stuck behind the first. To prevent this, each
router uses a form of virtual cut-through:

- Every input FIFO holds one whole packet (17 flits).
- Every link reports how many slots are free in the FIFO at its far end.
- A waiting head is granted all the output ports it needs in one step, or none.
- A head is granted only when each of those downstream FIFOs has room for
  1 + popcount(key) flits.
- Inputs take turns round-robin.

Once granted, a packet can always finish, so branches never wait on each other
halfway through. Each branch moves at its own pace. A flit leaves the input
FIFO once every branch has taken it.

**Timing.** A head is allocated in one clock and leaves in the next. Body
flits follow at one per clock. `out_valid` never depends on `out_ready`. An
assertion checks that an offered flit stays stable until it is taken.

**Edges and idle.** At the mesh edges, unused ports are tied off. `idle` is
high when no router holds a flit.

## IMA model (`reram_ima`)

The IMA is a behavioural model of an analog part. It stores a 128 x 128
weight matrix, written one weight per clock. At `start`, it latches the
128-entry input vector. It then produces one output column per clock:

`out[c] = sat16((Σ_r in[r]·w[r][c]) >>> 8)`

`done` pulses after 128 columns. The conversions are ideal: the model does not
include the bit slicing across 8 crossbars of 2-bit cells, the bit-serial
1-bit DAC inputs, the 8-bit ADCs, or device noise. If you need analog
accuracy, this is the block to replace.

## Tiles and pipeline stages (`dare_tile`, `dare_pe`)

A tile works in stages. A stage runs as follows:

1. **Receive.** During the previous stage, decoded packets were written into
   the tile's receive buffer, which holds 12 x 128 rows. The configuration bus
   can also write this buffer, which is how the first layer's input is loaded.
2. **`stage_start`.** Each IMA enabled in the tile's `ima_en` latches its
   buffer row set and starts its product. The buffer is then cleared for the
   next stage.
3. **Send.** For each enabled IMA m and each segment s = 0..7, the tile:
   - draws a key;
   - sends output columns 16s..16s+15 of IMA m;
   - sends them to the same rows of IMA m in tile `dst_tile` of every PE in the
     tile's destination mask.

So output column j of one layer feeds input row j of the next. Which PEs and
tiles hold which layer is only configuration. That placement is computed
offline, and the chip takes the result.

A stage in which a tile sends N packets costs about:

- 128 + 2 clocks of compute;
- then, per packet, 17 clocks for the key plus 1 + popcount(key) clocks to
  send, when the NoC does not stall.

The PE ties its four tiles to the router's local port:

- **Injection.** A round-robin arbiter holds the port from a packet's head
  flit to its last flit, so packets from different tiles never interleave.
- **Ejection.** One shared decoder rebuilds each arriving packet and hands it
  to the tile named in the header.

## Top level and configuration bus (`dare_top`)

`dare_top` has no parameters; the sizes are in `dare_pkg`. It is configured
with `cfg_valid` and a `cfg_t` word, which holds
`{pe, tile, op, ima, row, col, data[63:0]}`:

| op | data |
|---|---|
| `CFG_WEIGHT` | weight `w[row][col]` of IMA `ima`, in `data[15:0]` |
| `CFG_INPUT` | receive-buffer entry (`ima`, `row`) |
| `CFG_DEST` | `data[35:0]` destination PE mask, `data[37:36]` destination tile |
| `CFG_DROP` | `data[3:0]` threshold (drop probability thr/16), `data[4]` drop enable |
| `CFG_LFSR` | `data[15:0]` seed, `data[31:16]` taps |
| `CFG_IMA_EN` | `data[11:0]` enabled IMAs |

To run a stage:

1. Pulse `stage_start`.
2. Wait for `busy` to fall. `busy` is high while any tile is working, the NoC
   holds a flit, or a decoder is finishing.
3. Read the results back with `rd_pe/rd_tile/rd_ima/rd_row`.

The chip also has counters, summed over all PEs: packets sent, body flits
sent, body flits dropped, and packets received.

## Simulating

Every module has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/dare_pkg.sv tb/dare_top_tb.sv --top-module dare_top_tb
    ./obj_dir/Vdare_top_tb

Replace `dare_top_tb` with `drop_lfsr_tb`, `drop_packetizer_tb`,
`drop_decoder_tb`, `noc_router_tb`, `noc_3d_mesh_tb`, `reram_ima_tb`,
`dare_tile_tb` or `dare_pe_tb` to test a single block.

What each of the larger testbenches does:

- **`dare_top_tb`** runs the full-size chip through two stages:
  - a multicast from PE 0 to PEs 4 and 31, across two tiers, with drop 5/16;
  - then two senders, one with no drop and one with drop 8/16, both into
    PE 35.

  It checks every received row against products and keys it computes itself.
  It also confirms that dropped values, multicast deliveries, vertical-link
  traffic and router contention all occurred. At full size, the chip holds
  1728 IMA models and 28 million weights. Verilator turns it into a very
  large C++ model, which did not finish compiling in 15 minutes on a 4-core
  machine, so this testbench has not yet been run to completion. The largest
  configurations verified in simulation are:
  - the complete 36-router mesh (`noc_3d_mesh_tb`);
  - a complete PE with 4 tiles of 12 IMAs (`dare_pe_tb`).

  The top-level testbench needs a bigger machine, or a longer compile.
- **`noc_3d_mesh_tb`** sends random multicast traffic through the whole mesh.

To change the machine size, edit the constants in `dare_pkg.sv`
(`N_X/N_Y/N_Z`, `N_TILE`, `N_IMA`, `XBAR_N`, `KEY_W`).

## Where this design departs from the architecture it implements

- **Header size.** The header fits in one wide (70-bit) head flit, and each
  body flit carries one 16-bit value. The architecture has 16-bit data flits
  and does not give a header format.
- **Router internals.** The virtual channels, credits and router pipeline are
  this design's own simple choices: one virtual channel, packet-sized buffers,
  and one-clock allocation.
- **One LFSR per tile.** The architecture's component table places a
  programmable LFSR in each IMA, while its prose and block diagram place one in
  each tile. This design has one per tile.
- **Key width.** The architecture ties the LFSR width to the ratio of LFSR
  clock to crossbar clock (L = N · f_ReRAM / f_LFSR). Here the width is fixed
  at 16, the packet size evaluated. The key is built one bit per clock.
- **Ideal IMA.** The IMA is arithmetically ideal; see above.
- **Forward stages only.** The backward pass and the weight updates are not
  implemented. Neither are the mapping of layers to PEs (done offline by
  simulated annealing) and through-silicon-via physics.
- **Fixed-point format.** Q8.8 is this design's choice. The architecture
  specifies only 16-bit fixed point.
