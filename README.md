# Scalable multi-chip DNN inference accelerator: SystemVerilog model

This is synthesizable RTL for an int8 deep-neural-network inference accelerator
that scales by tiling identical small dies on one package. Each die holds 16
processing elements (PEs), each doing 64 multiply-accumulates (MACs) per cycle.
That is 1,024 MACs per die. A 6 x 6 package of 36 dies does 36,864 MACs per cycle.
Everything, on one die and across dies, talks over one packet network:

- **Inside a die:** a mesh network-on-chip (NoC).
- **Between dies:** a mesh network-on-package (NoP) over short serial links. In
  silicon these links use ground-referenced signalling (GRS); here only their
  digital halves are modelled.

A layer runs as a dataflow:

- The global buffer (GB) of a die multicasts input activations to its PEs.
- Each PE accumulates partial sums in a local buffer.
- PEs that share an output add their partial sums through the network.
- The last PE writes finished outputs back to a GB.
- Every unit raises an interrupt when it is done.

Scaling out is the same dataflow spread over more dies. The one addition is
that a lead controller multicasts work to the other dies.

The RISC-V controller of each die is not part of this RTL. Its network port is
brought out, and the testbenches play its role by sending packets through it.

## Packets and flits (`rtl/noc_pkg.sv`)

A flit is 66 bits: `{head, tail, data[63:0]}`. A packet is one header flit
followed by up to 16 payload flits. Seventeen flits is the largest packet, and
every buffer on a full-packet path is 17 flits deep.

The header is `{mcast, type[1:0], len[4:0], dest[55:0]}`.

`type` is one of:

- `STREAM`: activations or partial sums.
- `INTR`: a single-flit interrupt.
- `AXI`: register or memory access.

`dest` depends on `mcast`:

| mcast | dest layout |
|-------|-------------|
| 0 (unicast) | chip [10:5], NoC node [4:0], source node [15:11], source chip [21:16], interrupt line [28:22] |
| 1 (multicast) | one-hot chip mask [55:20] (36 chips), one-hot node mask [19:0] (20 nodes) |

NoC node numbers:

| Node | Unit |
|------|------|
| 0-15 | PEs |
| 16-18 | The three GB ports |
| 19 | The processor |
| 20 | GPIO, unicast only |

The first payload flit of AXI and stream packets is a meta word:
`{op[63:62], burst-1[61:59], addr[31:0]}`.

Ops:

- `WRITE`
- `READ`, which carries a burst of up to 8 words
- `RESP`, a read response
- `PSUM`, partial sums for cross-PE reduction

There are no write responses.

## Router (`rtl/noc_router.sv`)

One design serves two roles:

- The 5-port mesh router. Ports are N, E, S, W and local.
- The 8-port NoP router. Ports 0-3 are the GRS links N, E, S, W, and ports 4-7 are the four NoC columns.

**Unicast routing.** Routing is by lookup table. A packet for another chip
uses `chip_route[chip]`. Otherwise it uses `noc_route[node]`. `chip.sv` fills the
tables from the die's position:

- X-then-Y routing inside the die.
- X-then-Y routing between dies.
- Traffic for another die climbs a column to the NoP router.

**Multicast.** A multicast packet is copied to every port that unicast
routing would use for at least one of its destinations. Each copy's header
keeps only the destinations behind that port.

A header has only one node mask, shared by all the chips it names. So one port
copy cannot carry both other chips and a pruned set of this chip's nodes. This
never happens at a NoP router. It can happen inside the sending die, so a
sender must split a multicast that names its own chip and other chips into two
packets. An assertion reports any packet that breaks this rule.

**Flow control** is cut-through with credits, one credit per free buffer entry.
A packet is granted only when every output it needs is free and holds credits
for the whole packet. Two consequences:

- A packet never stalls once started.
- All copies of a multicast move in lock step.

Inputs are served round-robin. Latency is 2 cycles, with one flit per cycle per
port. A packet granted in the cycle a previous tail leaves the same output
follows it without a gap.

## Processing element (`rtl/pe.sv`, `pe_vector_mac.sv`, `pe_postproc.sv`)

The PE has 8 lanes, one output channel (K) each. Every lane does an 8-wide
int8 dot product over 8 input channels (C) into a 24-bit accumulator. All
lanes share one 8-channel input vector per cycle.

| Buffer | Size | Entry |
|--------|------|-------|
| Weights | 512 x 512 b (32 KB) | One 8 x 8 weight block per filter tap and channel group |
| Inputs | 256 x 64 b | One 8-channel vector |
| Accumulators | 64 x 192 b | 8 lanes x 24 b |

The loop nest keeps a weight entry fixed while it sweeps all output positions.
The outer loops run over R, S and CV, where CV is the number of 8-channel
groups. The inner loops run over P and Q. The MAC phase therefore takes
exactly R·S·CV·P·Q cycles.

A PE starts when all of these hold:

- It was told to go.
- The expected number of input vectors has arrived.
- If `keep` is set, the expected number of partial-sum rows from an upstream
  PE has arrived. Its accumulators then start from those sums, not from zero.

When the MAC phase ends, the PE does one of two things:

- It sends its raw accumulators (PSUM packets) to the next PE of a reduction chain.
- It post-processes each output and sends one 64-bit vector per position to a
  GB. Post-processing is optional 2x2 max pooling, then bias, multiply by
  `scale`, arithmetic shift right, optional ReLU, and saturation to int8.

In both cases it then sends an interrupt.

The PE is configured through AXI writes. Word addresses:

| Address | Contents |
|---------|----------|
| 0x0_0000 + n | Register n |
| 0x1_0000 + w | Weight word w: entry w/8, lane w%8 |
| 0x2_0000 + i | Input-buffer entry i |

Register map:

| Reg | Contents |
|-----|----------|
| 0 | Go |
| 1 | `{CV[31:24], S[23:20], R[19:16], Q[15:8], P[7:0]}` |
| 2 | `{in_base[31:16], stride[11:8], W[7:0]}` |
| 3 | `{pool, relu, final, keep, w_base[15:0]}` at bits 19..16 and 15:0 |
| 4 | `{out_base[21:11], out_node[10:6], out_chip[5:0]}` |
| 5 | `{shift[12:8], scale[7:0]}` |
| 6 | `{expected psum rows[31:16], expected inputs[15:0]}` |
| 7 | Interrupt `{line[17:11], node[10:6], chip[5:0]}` |
| 8-15 | Lane biases |

## Global buffer (`rtl/global_buffer.sv`)

The GB has four 16 KB banks, 2048 words each, forming one word address space.
It has three network ports. Each port has a 17-flit buffer and its own packet
parser. Writes get one grant per bank per cycle.

Registers sit at 0x1_0000 + n:

| Reg | Contents |
|-----|----------|
| 0 | Start: bit 0 stream-out, bit 1 element-wise add |
| 1 | Stream `{DST, COUNT, SRC}` |
| 2 | Stream header, unicast or multicast |
| 3 | Interrupt target and expected incoming words |
| 4 | Add operands `{N, D, B, A}` |

Engines:

- **Stream-out** sends COUNT words from SRC in packets of up to 15 words. It
  typically multicasts to a row of PEs.
- **Element-wise add** computes the saturating int8 add `D[i] = A[i] + B[i]`.

Interrupt lines start at a configured base:

- base + 0: expected stream-in words have all arrived.
- base + 1: stream-out done.
- base + 2: add done.

All outgoing traffic leaves on port 0.

## Chip-to-chip link (`rtl/grs_tx.sv`, `grs_rx.sv`, `cdc_count_sync.sv`)

Each direction of a die-to-die link is 4 data wires plus a forwarded clock.

**Transmitter:**

1. A full packet is collected, so a packet never stalls halfway across the link.
2. Each flit is written, zero-padded, as one 128-bit word of a 15-word ring.
   This happens in the router clock.
3. The same ring is read as 32 chunks of 60 bits in the bit-clock domain.
4. Each chunk gets a 4-bit header `{valid, partial, credit[1:0]}`.
5. The resulting 64-bit word goes out 16:1 on the 4 wires. Bit i of wire w is word bit 16·w + i.

**Partial chunks.** A chunk whose first 128-bit word is written, but not yet
its second, is sent marked *partial*. It is sent again whole later. This keeps
a short packet from waiting for the next one.

**Receiver.** It samples on the falling edge of the forwarded clock, rebuilds
words, stores chunks and hands flits back to the router clock.

**Credits** count 60-bit chunk slots, 32 of them. They ride back in the header
bits of the opposite link. Counters cross clock domains through a toggle
handshake (`cdc_count_sync`).

**Clocking.** The link clock is a simulation input (`bclk`). The testbenches
run it at 25x the core clock, about 25 Gb/s per wire at 1 GHz. The analog
drivers and receivers are not modelled: `tx_data` connects directly to the
neighbour's `rx_data`.

## Host interface (`rtl/gpio_if.sv`)

The host interface is 16 bits of ready-valid data in each direction, clocked
by the core clock divided by 4 (`gpio_clk`). A flit is sent as 5 beats, least
significant beat first. Whole packets are buffered in both directions, so the
slow pins never hold a router. The host reaches any unit of any chip by
sending ordinary packets.

## Die and package (`rtl/chip.sv`, `rtl/mcm.sv`)

The die is a 4-wide, 5-tall NoC mesh:

- Rows 0-3 hold PEs 0-15.
- Row 4 holds GB ports 16-18 and the processor port (node 19).
- GPIO hangs off the south side of router (0,4).
- The top of each column connects to the NoP router.

`mcm` (the top) places NCX x NCY dies, 6 x 6 by default. It wires each
outgoing link to the facing incoming link of the neighbour. It brings out:

- every die's processor port;
- chip 0's GPIO.

Links at the edge of the package are left unconnected.

## Departures from the published design

- **Clocking.** There is one core clock. The published chip clocks every
  partition separately, with adaptive clock generators and pausible FIFOs.
  Only the link bit clock is a separate domain here.
- **Configuration and reset.** There is no JTAG chain. Routing tables come from
  the die position. All other configuration goes over the network.
- **Missing units.** The RISC-V processor and the analog link circuits are absent.
- **PE details are choices of this design:** buffer depths, accumulator width,
  register maps, packet formats and pooling, which is 2x2 max only. The
  published die has about 40 KB of SRAM per PE. This PE has 35.5 KB.
- **Weights do not all fit at once.** Each die's weight buffers hold 512 KB.
  That is enough for any single ResNet-50 layer, but not for all ResNet-50
  weights at once on 36 dies (25.5 MB against 18.9 MB).
- **Pooling and element-wise work.** Pooling is 2x2 max with stride 2 only, so a
  3x3/stride-2 pooling layer (as after the first ResNet-50 convolution) needs
  another unit. The GB's only element-wise operation is a saturating add.
- **Start of a layer.** In the published flow a lead processor multicasts a go
  command to the other dies' processors, which start their local units. Here
  the go write is multicast straight to the PEs, since the processors are not
  modelled.
- **Multicast rule.** A multicast that names the sender's own die and other
  dies must be sent as two packets (see Router).

## Testbenches (`tb/`)

Every testbench checks itself. It ends by printing
`TB_RESULT checks=N failures=M`. Simulate with Verilator 5, from the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style -I. \
  rtl/noc_pkg.sv $(ls rtl/*.sv | grep -v noc_pkg) tb/tb_chip.sv \
  --top-module tb_chip -Mdir obj_chip -o sim
obj_chip/sim +verilator+rand+reset+2
```

| Testbench | What it checks |
|-----------|----------------|
| `tb_pe_vector_mac` | Dot products against a reference: random values, extremes, wrap-around |
| `tb_pe_postproc` | Bias, scale, shift, ReLU and saturation against a reference |
| `tb_noc_router` | Unicast delivery and 2-cycle latency, multicast forking with per-port header pruning, packets kept whole under contention, full throughput, cut-through credit holding |
| `tb_pe` | Three layers against a reference convolution: plain, chained partial sums, pooling. MAC-phase cycle count, interrupt, AXI read |
| `tb_global_buffer` | AXI burst writes and reads, stream-out at one flit per cycle, stream-in on two ports into two banks at once, completion interrupt, saturating add |
| `tb_grs_link` | Two transmitter/receiver pairs at unequal bit clocks, both directions, random packets. Credits, partial chunks, link throughput |
| `tb_gpio_if` | Host-to-chip and chip-to-host packets with random pauses and back-pressure, full-packet buffering, one beat per 4 cycles |
| `tb_chip` | A 3x3, 32-to-32-channel convolution on one die |
| `tb_mcm` | The same convolution on a 2 x 2 package, one output band per die |

In `tb_chip`, input channels are split over the PE rows and output channels
over the columns. Partial sums run down each column, and the bottom row writes
to the GB. Inputs come partly through GPIO and partly through the processor
port. The results are read back with AXI reads and compared with a reference.
It also counts these mechanisms and fails if one never happened:

- multicast hops
- partial-sum packets
- cut-through credit holds
- GPIO flits
- interrupts
- MAC-phase length

In `tb_mcm`, weights are multicast to every die at once. Everything crosses the
links from die 0. It also checks link traffic and partial chunks. The shared
body of both tests is `tb/tb_layer_body.svh`.

`tb_mcm` runs a 2 x 2 package, about 10 s of simulation once built. The
largest package simulated is 3 x 3 dies: a copy of `tb_mcm` with `NCX = NCY = 3`.
It built in 2 minutes, simulated in 15 s, and passed 4,694 checks. The top also builds at its default 6 x 6 size, and
Verilator lint-checks it in about 1.5 minutes with 6 GB of memory. A
simulation model of all 36 dies, however, is several hundred C++ files and
takes far longer to compile than a test is allowed to run. To run a bigger
package, copy `tb/tb_mcm.sv` and change `NCX`/`NCY`. The body scales with
the number of dies.
