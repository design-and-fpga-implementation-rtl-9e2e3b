# FREDO 3D NoC subsystem

Three stacked layers of 5 x 5 routers form one 75-node network on chip. Each
router has seven ports: local, east, west, north, south, and top and bottom to
the layers above and below. Packets take the shortest path, one dimension at a
time: first x, then y, then the layer. This is the "exact direction order" of
FREDO. Packets move by wormhole switching. Every link uses stall-and-go flow
control. Around the network sits a small bus subsystem:

```
random packet generator --AHB-Lite--> AHB-to-APB bridge --APB (1/10 clock)-->
  APB/NoC interface --> transmitter FIFO (100) --> router 0 local input
  ... 5x5x3 mesh ...
  every router's local output --> ejection collector --> receive FIFO (100)
  --> target processor (ports of the top)
```

Everything runs on one clock (100 MHz is the intended rate). The APB side
steps at one tenth of that rate, through a clock enable rather than a second
clock.

## Packets and flits

A *packet word* (APB write data, and the low bits of a receive FIFO word):

| bits    | field                                      |
|---------|--------------------------------------------|
| [22:18] | router id within the layer, `y*5 + x` (0..24) |
| [17:16] | layer (0 = bottom .. 2 = top)              |
| [15:0]  | data                                       |

A *flit* (`noc_pkg::flit_t`, 25 bits) is one word on a router link:
`{tail, z[1:0], y[2:0], x[2:0], data[15:0]}`. Each flit carries its
destination. Only the first flit of a packet is routed, and the later flits
follow the path it set up. The last flit has `tail = 1`. The bus path sends
one-flit packets (head and tail in one flit). The external injection ports
accept packets of any length.

A *receive word* (`rx_word`, 32 bits) is `{router index [31:24], 0, packet
word [22:0]}`. The router index (`z*25 + y*5 + x`) is the router the flit left
the network from, so a reader can check that each packet reached its
destination.

Two widths depart from the source description:
- **Router id.** It had a 4-bit router id inside a 22-bit packet. Four bits
  cannot name 25 routers, so the id is 5 bits wide and the packet is 23 bits.
- **Flit.** The 76-bit flit of the earlier 2D design (64-bit payload, next-port
  field) is cut down to the 16-bit data of this packet. No next-port field is
  carried, because every router computes the route itself.

## How a router works (`fredo_router`)

Each input port has a buffer: a FIFO of `BUF_DEPTH` flits (default 4). In the
bufferless build (`BUFFERED = 0`) it is a single flit register. The flit at
the head of each buffer goes through three steps, all inside one clock cycle:

1. **Route computation** (`route_compute`). A head flit's destination is
   compared with the router's own `(MY_X, MY_Y, MY_Z)`. If x differs, the flit
   goes east or west. Otherwise, if y differs, north or south. Otherwise, if
   the layer differs, top or bottom. Otherwise it goes to the local port. The
   result is stored for the rest of the packet.
2. **Switch allocation** (`switch_allocator`). Each output has a round-robin
   arbiter (`rr_arbiter`) over the inputs that want it. An output that has
   passed a head flit without its tail stays *locked* to that input until the
   tail passes, so packets never interleave on a link. An output whose
   receiver signals stall grants nothing, and its arbiter keeps its priority
   order.
3. **Crossbar** (`crossbar`). A multiplexer per output passes the granted
   flit.

**Timing.** A flit is written into an input buffer at one clock edge. If
nothing blocks it, it leaves through the crossbar at the next edge. That is
one cycle per router, and *hops + 1* cycles from injection to the local
output. The source describes an earlier router with a three-stage pipeline,
and also says this NoC was built "with combinational logic" for low latency.
This RTL follows the second statement. To make it a three-stage pipeline, put
registers between the steps.

**Flow control.** A sender drives `valid` and a flit. The receiver raises
`stall` while the buffer for that link is full. A flit moves at a clock edge
when `valid` is high and `stall` is low. `stall` comes straight from the
buffer's count register, so no combinational path runs from router to router
through flow control. The cost is that a one-entry (bufferless) input can
accept only every second cycle. A 4-entry buffer streams one flit per cycle.

Deadlock: x-y-z dimension order is deadlock free on a mesh, and the local and
ejection ports always drain.

## The mesh (`noc_3d`)

The router at (x, y, z) has index `z*25 + y*5 + x` and is built with its own
coordinates as parameters. East/west, north/south and top/bottom neighbours
are joined by pairs of one-way links. Ports on the edge of the mesh have no
link: their inputs are tied idle and their outputs are held in stall, and
dimension-order routing never selects them. The local ports of all 75 routers
are brought out as flat arrays.

## Bus side

- **`trng_pkt_gen`.** Makes random packets and writes each one as an AHB-Lite
  single word write (NONSEQ, address 0). The description uses a true random
  number generator, which is a physical noise source that logic cannot
  express. Here a 32-bit Galois LFSR (x^32 + x^22 + x^2 + x + 1, seed
  `SEED`) stands in for it. The LFSR steps every cycle, and a packet takes
  its fields from the LFSR value of the cycle it is loaded. Ids are folded
  modulo 25 and layers modulo 3, so every packet can be delivered.
- **`ahb2apb_bridge`.** Handles one AHB transfer at a time. It latches the
  address phase, then the write data, and holds HREADY low. Its APB state
  machine steps only on `pclk_en`: IDLE, then SETUP, then ACCESS. It stays in
  ACCESS while PREADY is low. A write without APB wait states takes 20 to 31
  system cycles. PSLVERR becomes the two-cycle AHB ERROR response.
- **`apb_noc_if`.** The APB slave. Its registers are:
  - `0x0` TX, write: the packet word. It is turned into a flit and pushed into
    the transmitter FIFO.
  - `0x4` STATUS, read: bit 0 is "transmitter FIFO full".
  - `0x8` COUNT, read: the number of packets accepted.

  A TX write while the FIFO is full is held with PREADY low. This
  back-pressure from the network reaches the bus. An id of 25 or more, a
  layer of 3, a write to a read-only register or an unknown address gets
  PSLVERR.
- **`eject_collector`.** Has a one-flit slot for every router's local output;
  a router sees stall while its slot is full. A round-robin arbiter empties
  one slot per cycle into the receive FIFO when the FIFO has room. One router
  can deliver every second cycle, and the collector as a whole one word per
  cycle.
- **`sync_fifo`.** A circular buffer with first-word fall-through. It serves
  as router input buffer, transmitter FIFO (100 entries) and receive FIFO
  (100 entries; the receive depth is this design's choice).

## Top (`fredo_noc_subsystem`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | system clock; synchronous active-low reset |
| `gen_enable` | in | run the packet generator |
| `ext_in_valid/flit [75]`, `ext_in_stall [75]` | in/out | local inputs of the routers for extra traffic; entry `SRC_ROUTER` (0) is fed by the transmitter FIFO, so there its stall always reads 1 |
| `rx_valid`, `rx_word`, `rx_pop` | out/out/in | receive FIFO read port to the target processor |
| `gen_pkt_count`, `gen_err_count` | out | packets written by the generator, bus errors |
| `tx_level`, `rx_level` | out | FIFO fill levels |
| `apb_wait` | out | an APB access is being held (PREADY low) |

Parameters: `MESH_X = 5`, `MESH_Y = 5`, `LAYERS = 3`, `BUFFERED = 1`,
`BUF_DEPTH = 4`, `TX_DEPTH = 100`, `RX_DEPTH = 100`, `PCLK_DIV = 10`,
`SRC_ROUTER = 0`, `SEED`. The 3-bit x/y fields allow meshes up to 8 x 8 per
layer. The 5-bit id allows at most 32 routers per layer, and the 2-bit layer
field at most 4 layers.

## Where this departs from the source, and what is left out

- The source names a 3-stage router pipeline and also describes a design
  built from combinational logic. The RTL has one cycle per router.
- The router id is 5 bits (25 routers), not 4.
- The true random source is replaced by an LFSR.
- The router buffer depth (4) and the receive FIFO depth are not given in the
  source; they are choices made here.
- The source's block diagram draws the transmitter FIFO feeding all three
  layers. Here it feeds one source router, and each packet's layer field picks
  the layer it is delivered to.
- The diagram's second bridge, between the destination router and the
  processor, appears here only as the receive FIFO's read port. The target
  processor is outside the design.
- The simulation habit of writing received packets to one text file per router
  is not reproduced. The testbenches check the packets instead.
- Bufferless routing here is the same wormhole router with single-register
  inputs. No deflection routing is described, so none is built.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. The packages must come first. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv \
  tb/tb_fredo_noc_subsystem.sv --top-module tb_fredo_noc_subsystem -Mdir obj
./obj/Vtb_fredo_noc_subsystem
```

- `tb_fredo_noc_subsystem` runs the whole subsystem at its default size. It
  runs free flow, then stops reading the receive FIFO until back-pressure
  holds the APB bus, then drains. It checks every delivered word against a
  scoreboard and counts each mechanism: APB wait, transmitter FIFO full,
  receive FIFO full, injection stall, multi-flit delivery, and delivery on all
  three layers. It also checks the 20 to 32 cycle interval between bus writes.
- `tb_noc_3d` runs the 75-router mesh under uniform random, hotspot
  (everything to the centre router) and neighbour traffic. It checks
  delivery, per-flow order, that packets do not interleave, and the 11-cycle
  latency of a 10-hop flit.
- `tb_fredo_router` tests the buffered and the bufferless router side by side.
- `tb_noc_3d_bufferless_3x3` runs the same checks on a 3 x 3 x 3 mesh built
  from bufferless routers, including the 7-cycle latency of a 6-hop flit.

Building the 75-router testbenches takes a few minutes of C++ compilation.
Running them takes seconds.
