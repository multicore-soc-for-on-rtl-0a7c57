# A network-on-chip subsystem for on-board payload processing

This design covers the data side of a multicore platform for signal processing
on board a spacecraft. Two DSP tiles, a shared memory, a DMA engine,
converters and high-speed links all sit on a small packet-switched
network-on-chip. A control processor on an AMBA bus reaches them through a
bridge node. Every device is memory mapped, so any master can read and write
any device. Interrupts travel over the network as messages of their own.

The RTL covers the network (routers, topology, network interfaces), the tiles
built on it (global memory, DMA, ADC/DAC bridge, default slave, the Xentium
tile shell), the real-time clock of the AMBA side, and the top level. It does
not cover anything that is someone else's IP. These devices appear only as
ports on the top level: the Xentium DSP core, the LEON2 processor with its AHB
and APB buses and the other peripherals, the SpaceWire and gigabit codecs, and
the SDRAM controller.

## The network

### Topology

Twelve routers sit on a 4 x 4 grid with the four corners missing. Node
numbers (x, y):

```
            x=0         x=1            x=2             x=3
  y=0        .      0 ADC/DAC      1 default slave      .
  y=1     2 DMA     3 Xentium 0    4 global memory   5 (no tile)
  y=2     6 AMBA    7 SDRAM        8 Xentium 1       9 SpaceWire 2
  y=3        .     10 gigabit     11 SpaceWire 1        .
```

The missing corners are bridged by four diagonal links:

- router 0 west ↔ router 2 north
- router 1 east ↔ router 5 north
- router 10 west ↔ router 6 south
- router 11 east ↔ router 9 south

Routing is dimension-ordered, column (x) first and then row (y). A corner
link is the x step out of the router at the end of its row. It also moves the
packet one row towards the middle. The destination column never holds a
corner node, so routes never have to turn back.

Routes are deadlock-free within a class. Classes cannot block each other,
because they have separate buffers.

### Routers (`noc_router`)

Each router has five ports: N, E, S, W and local. A neighbour link carries one
34-bit flit per cycle in each direction: head bit, tail bit and 32 data bits,
plus a 2-bit class tag. The local port is four separate links, one per class,
in each direction.

There are four priority classes:

| class | use |
|---|---|
| 0 | interrupt messages (highest) |
| 1 | read data and write acknowledges |
| 2 | block transfers (DMA, streams) |
| 3 | single reads and writes (lowest) |

Responses have their own class, so answers never queue behind requests. This
is what keeps the request/response protocol free of deadlock.

How a router works:

- **Buffering.** Every input port has one FIFO per class, `FIFO_DEPTH` flits
  deep.
- **Switching.** Wormhole: the head flit picks an output, and that output's
  class stays locked to the packet until its tail flit.
- **Link arbitration.** A neighbour output sends the highest class that has a
  flit and room downstream. New packets within one class from different inputs
  are served round robin.
- **Flow control.** Each receiver returns one ready bit per class: "this class
  FIFO is not full". It comes from a register, so there are no combinational
  paths between routers.
- **Latency.** One cycle per router when idle. A single flit from node 0 to
  node 6 crosses three routers in 3 cycles.

At 50 MHz a 32-bit link gives 1.6 Gb/s of raw bandwidth per direction.

### Packets

Head flit fields: `[31:28]` destination node, `[27:24]` source node, `[23:21]`
command, `[7:0]` interrupt number.

| packet | flits | class |
|---|---|---|
| WRITE | head, address, data | 2 or 3 |
| READ | head, address | 2 or 3 |
| read answer | head, data | 1 |
| write acknowledge | head | 1 |
| interrupt | head only | 0 |

Global byte address: bits `[31:28]` are the node and `[27:0]` the offset
inside it. Node numbers 12 to 15, and node 5, go to the default slave. Any
access to one of them is answered there and counted, so a stray pointer
cannot hang a master.

### Network interfaces (`noc_ni`)

The network interface connects a tile to its router.

- **Master port.** `m_req` with `m_we`, `m_addr`, `m_wdata` and `m_prio` is
  held until `m_ack`. `m_ack` is a one-cycle pulse, with the read data on
  `m_rdata` in the same cycle. `m_prio` = 2 sends on the block class;
  anything else sends on the single class.
- **Slave port.** `s_req` with `s_we`, `s_addr` (28-bit offset), `s_wdata` and
  `s_src` is held until the tile raises `s_ack`, with read data on `s_rdata`.
  If a block request and a single request are both waiting, the block request
  goes first.
- **Interrupts.** `irq_req`, `irq_dst` and `irq_num` send one message;
  `irq_ack` means it left. A received message pulses `irq_in_valid` with the
  number and source node.
- **Slave-only interfaces.** `HAS_MASTER = 0` gives a slave-only interface.

Each master has one access outstanding at a time. Writes are acknowledged
end to end, so when `m_ack` arrives the write has landed.

Round trips, counted from the request to the acknowledge:

| case | cycles |
|---|---|
| two interfaces wired back to back, zero-wait slave | 4 |
| global memory behind its interface, back to back | 5 |
| across the network | add 2 per router crossed, there and back |

## The tiles

### Global memory (`memory_tile`)

A single-port synchronous SRAM of `WORDS` 32-bit words, 64 KiB by default,
behind a slave interface. It answers one cycle after the access. Byte offsets
wrap at the array size. It gives the converters and links a fast place to
stage data that every master can reach.

### DMA engine (`noc_dma`, node 2)

The DMA engine is programmed through its slave side (byte offsets):

| offset | register | meaning |
|---|---|---|
| 0x00 | SRC | source address |
| 0x04 | DST | destination address |
| 0x08 | LEN | number of words |
| 0x0C | CTRL | see below |
| 0x10 | STATUS | `[0]` busy, `[1]` done, `[31:16]` words left |

CTRL bits:

- `[0]` start
- `[1]` increment source
- `[2]` increment destination
- `[3]` interrupt when done
- `[11:8]` node to interrupt
- `[23:16]` interrupt number

The engine copies word by word: a read, then a write, both on the block class.

A fixed address points at a device data register. This lets the engine
stream between a FIFO and memory, for example:

- ADC_DATA into memory with increment destination only;
- memory into DAC_DATA with increment source only.

### ADC/DAC bridge (`adc_dac_bridge`, node 0)

The bridge packs two 14-bit ADC samples, sign-extended to 16 bits, into one
word: the earlier sample in `[15:0]`, the later in `[31:16]`. Words go into a
16-word FIFO. In the other direction, words written to the bridge are unpacked
into 12-bit DAC samples, taken from bits `[11:0]` of each half.

| offset | register | behaviour |
|---|---|---|
| 0x00 | ADC_DATA | read waits until a word is queued |
| 0x04 | DAC_DATA | write waits until there is room |
| 0x08 | STATUS | queue levels, overflow and underflow flags |
| 0x0C | CTRL | `[0]` ADC enable, `[1]` DAC enable; a write clears the flags |

Because data accesses wait, the DMA engine can pace a stream by itself. A
full ADC FIFO drops the incoming word and sets `adc_overflow`. An empty DAC
FIFO holds the last output and sets `dac_underflow`.

### Xentium tile (`xentium_tile`, nodes 3 and 8)

The tile is everything around the DSP core:

- 32 KiB of data memory;
- a timer;
- a master/slave network interface.

The core's data accesses come in on the `core_*` port.

- **Accesses to the tile's own node** are answered from the local memory or
  timer one cycle later.
- **All other addresses** become network reads and writes.
- **The network** reaches the same memory and timer through the slave side.
  The core has priority; a network access waits for a free cycle.

The timer registers sit at offset 0x8000:

| offset | register | meaning |
|---|---|---|
| 0x8000 | TCOUNT | counter |
| 0x8004 | TCMP | compare value |
| 0x8008 | TCTRL | `[0]` enable, `[1]` interrupt enable, `[2]` pending |

The pending flag is set when TCOUNT equals TCMP, and any write to TCTRL clears
it. `timer_irq` goes to the core.

Interrupt messages from the network, such as "start" or "DMA finished", pulse
`net_irq_*`. The core can send one itself, for example "kernel finished",
with `core_irq_*`.

### Default slave (`default_slave`, node 1)

The default slave answers every access at once:

- reads return `READ_VALUE` (`32'hDEAD_BEEF`);
- writes are acknowledged and dropped.

It counts what it absorbed in `err_count`, which saturates, and keeps the
last offset, direction and source.

### Real-time clock (`rtc_cuc`)

The clock keeps time in the CCSDS unsegmented time code. That format is a
binary count of seconds (coarse time) followed by a binary fraction of a
second (fine time). Telemetry packets can carry the value without
reformatting. Here the coarse time is 4 octets and the fine time 2 octets, so
the fine unit is 2^-16 s.

The fine time comes from a phase accumulator:

- every clock cycle it adds 2^16;
- when it reaches `CLK_HZ` it subtracts `CLK_HZ` and the fine count steps by
  one;
- the fine count carries into the seconds.

After k cycles the fine count has advanced by exactly
floor(k * 2^16 / CLK_HZ).

The clock is an APB slave (byte offsets):

| offset | register | meaning |
|---|---|---|
| 0x00 | PFIELD | the format's preamble octet, 0x2E |
| 0x04 | COARSE | seconds; a write sets them and clears the fine time |
| 0x08 | FINE | the fine time captured by the last COARSE read |
| 0x0C | NOW | the live fine time |

The preamble octet means: agency-defined epoch, 4 coarse octets, 2 fine
octets. Capturing FINE on the COARSE read keeps the two halves of a reading
consistent.

### Top level (`mpsoc_top`)

The top level holds the network and the tiles above. It also builds the
network interfaces of the five nodes whose devices are outside this RTL:

- the AMBA bridge;
- SDRAM, which has a slave-only interface;
- SpaceWire 1;
- SpaceWire 2;
- the gigabit link.

The real-time clock is instantiated here as well. Its APB port comes out as
`rtc_*`, because the peripheral bus it belongs to is not part of this RTL.

Their word ports are arrays on the top (`ext_m`, `ext_m_rsp`, `ext_s`,
`ext_s_rsp` and `ext_irq_*`), indexed `EXT_AMBA`, `EXT_SDRAM`, `EXT_SPW1`,
`EXT_SPW2` and `EXT_GBIF`. The two Xentium core ports are `xen_*`. The
converter pins come out directly.

## What is the platform's and what is this design's

**Taken from the platform:**

- the node list and floor plan;
- the twelve five-port packet-switched routers;
- one 32-bit link to each neighbour and four 32-bit local links;
- four priority classes, from interrupts (highest) to single reads and writes
  (lowest);
- everything memory mapped and reachable from every master;
- slave-only and master/slave interfaces;
- a global SRAM tile;
- a DMA node;
- 14-bit ADC and 12-bit DAC samples packed into 32-bit words, moved by DMA;
- the Xentium tile's 32 KB memory, timer and network interface;
- interrupts from the Xentium back to the control processor;
- a real-time clock in the CCSDS unsegmented time code;
- 50 MHz operation.

**This design's own choices:**

- the routing and the handling of the corner links;
- switching and flow control, and the buffer depth;
- the two middle priority classes;
- the packet formats and the address map;
- all register maps;
- the time code's octet counts and epoch;
- the memory tile size;
- the default slave's behaviour;
- all handshakes.

## Limits

- **ADC rate.** The converters are meant to run at up to 40 MS/s. That is
  0.4 packed words per 50 MHz cycle. The DMA engine keeps one access in flight
  and spends about 23 cycles per word between the bridge and memory (measured
  in the top-level testbench). It therefore sustains roughly 4 MS/s. A
  burst-capable DMA, or a bridge that writes to memory itself, would be needed
  for the full rate.
- **Single-word accesses.** Every access is one word; there are no burst
  packets.
- **No tile DMA.** The Xentium tile has no DMA unit of its own. The platform
  has one, but its programming model is not known. Block copies to and from a
  tile go through the DMA node instead.
- **No DSP core.** The signal-processing kernels (FIR filters and FFTs) run on
  the Xentium core, which is not included. The tile's core port is driven by
  whatever replaces it: a core model, or a testbench as here.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/noc_pkg.sv tb/tb_mpsoc_top.sv --top-module tb_mpsoc_top -o sim -Mdir obj
./obj/sim
```

Replace `tb_mpsoc_top` with any other testbench:

| testbench | what it checks |
|---|---|
| `tb_noc_router` | class order, wormhole, back-pressure |
| `tb_noc_mesh` | all-to-all traffic with random stalls; idle latency |
| `tb_noc_ni` | packet fields, classes, round trips |
| `tb_memory_tile` | random data, 5-cycle round trip |
| `tb_default_slave` | unmapped accesses answered and counted |
| `tb_noc_dma` | copies with and without increments, interrupt |
| `tb_adc_dac_bridge` | packing, waiting reads and writes, overflow, underflow |
| `tb_xentium_tile` | local and remote accesses, contention, timer |
| `tb_rtc_cuc` | preamble; exact fine count over a simulated second; carry into seconds; coherent capture |

`tb_net_master` is a helper: a network master driven by tasks.

`tb_mpsoc_top` runs the whole subsystem at its default sizes through one
processing pass:

1. The control master sets up a Xentium tile and starts it with an
   interrupt.
2. The DMA streams ADC samples into global memory and interrupts the tile.
3. The tile processes the block and writes the results to its own memory and
   to SDRAM, then interrupts the control master.
4. The other tile reads those results.
5. The SpaceWire, gigabit and control ports compete for global memory.
6. The DMA feeds the DAC.
7. An unmapped access is absorbed by the default slave.
8. The real-time clock is read over its bus.

The testbench counts each mechanism and fails if any never happened:

- interrupt messages;
- DMA completions;
- ADC reads that waited;
- block-class and single-class traffic;
- external slave accesses;
- two classes competing at one tile;
- back-pressure into the network;
- DAC output;
- real-time clock ticks.

It takes about 1.5 minutes to build and run.
