# RX data path for 400 Gb Ethernet to many DMA channels

This is synthesizable SystemVerilog for a receive path in an FPGA network card. Received Ethernet frames arrive as a wide MII stream. They leave as PCI Express memory writes into per-channel ring buffers in host memory. The design has 256 independent DMA channels by default and takes up to two frames per clock cycle on a 1024-bit bus.

The main idea is to keep data and control apart. Data moves only once, along the path **buffer → crossbar → buffer**. A separate control path, the *scheduler*, decides which 8-byte block goes where. Every buffer is shared by all channels. The per-channel state is a few counters, so memory use does not grow with the number of channels.

## Block diagram

```
 MII ─► mii_decoder ─► data_buffer ───────┐
            │                             ├─► crossbar ─► dma_buffer ─► pcie_axi_wr ─► PCIe write stream
            └─► process ─► header_buffer ─┘       ▲                          │
                   │                              │ block moves              │ free slot ids
                   ▼                              │                          ▼
            instruction FIFO ─► dma_ctrl ─► pipe ─► scheduler ◄──── free-id FIFO
                                   ▲                   │
                                   └── released transactions
```

Top module: `rx_framework`. Shared types are in the package `rxfw_pkg`.

## How a frame travels

1. **mii_decoder** scans each MII word byte by byte.
   - A frame starts at a Start character (0xFB) on an 8-byte lane, followed by preamble and SFD. It ends at Terminate (0xFD).
   - Every word that holds frame bytes is written whole into the **data_buffer**, at a free-running write pointer.
   - Before it accepts a frame, the decoder checks for room for a maximum-size frame, measured against an approximate read pointer from the scheduler. Without room, the frame is discarded and counted. This way the write pointer never has to be rolled back.
   - For each frame it reports: start word, start block, length, and flags for protocol error, MTU error and runt.
2. **process** is the application core. This build includes an example application:
   - It drops frames that carry an error flag.
   - It takes the DMA channel from the last byte of the destination MAC address.
   - It writes an 8-byte header `{seq[31:0], channel[15:0], length[15:0]}` into the **header_buffer**, at the first block of the frame's region.
   - It queues a packet instruction for every frame, dropped ones included, because those still have to release their buffer space.
3. **dma_ctrl** holds the state of each channel's ring: base, size, hardware write pointer and software read pointer.
   - If the ring cannot take the frame (8-byte header plus the frame rounded up to 8 bytes), the frame is marked dropped. A full channel therefore never stalls the others.
   - Later, each released transaction's stream offset is turned into a host address: base + (offset mod size).
4. The **scheduler** turns frames into PCI Express writes. Its stages are described below.
5. The **crossbar** copies 8-byte blocks from data- or header-buffer columns into **dma_buffer** columns. It follows the scheduler's plan, which never uses a source or destination column twice in one cycle.
6. **pcie_axi_wr** reads each released transaction out of its DMA-buffer slot.
   - It sends the transaction as one write request: address, length and channel in sideband fields, with tsop, tlast and tkeep.
   - It then returns the slot id to the free-id FIFO. After reset it puts all ids into that FIFO.

## Scheduler

There is one item per cycle through each stage.

| Stage | Job |
|---|---|
| `packet_breaker` | Splits a frame into a header subpacket, then one subpacket per data-buffer word. A dropped frame becomes a single "no data" subpacket. |
| `increment_per_dma` | Rounds each subpacket up to whole 8-byte blocks as an increment of its channel's byte stream. It parks the subpacket in a FIFO for the instruction generator. |
| `page_breaker` | Keeps each channel's stream offset in a pipelined register field (`pipe_reg_field`). It cuts increments at 4 KiB page boundaries, because one PCI Express write may not cross a page. |
| `mtu_breaker` | Keeps one open transaction per channel, in a DMA-buffer slot taken from the free-id FIFO. It fills that transaction up to 256 bytes. It closes a transaction when it is full, at a page end, or after `TIMEOUT` idle cycles of its channel (a round-robin scan). For every piece it emits a subtransaction, and for every closed transaction it emits a transaction. |
| `crb_gen` | Combines a subtransaction with its subpacket into a vector of block moves: source word and column, destination row and column. |
| `planner` | Holds two move vectors. Each cycle it picks a greedy maximal set of moves with no collisions, oldest first. |
| `trans_fifo_ctrl` | Lets a transaction go to `dma_ctrl` only once all of its bytes are confirmed to be in the DMA buffer. |

### Barrier and confirmed counts

Moves are planned out of order, so the design needs a way to know when a transaction's blocks have all been written.

- Every piece carries a colour, 0 or 1.
- The planner drains one colour first. When none of that colour is left in its window or upstream, and none was picked in the last few cycles (the crossbar pipeline depth), it pulses **barrier** and switches colour.
- The MTU breaker keeps three per-channel byte counts: *current*, *sampled* and *confirmed*. At each barrier the current count becomes sampled and the sampled count becomes confirmed. Bytes in a confirmed count are therefore known to be in the DMA buffer.
- The same three steps, applied to the data-buffer word, give the decoder its approximate read pointer.

## Generic blocks

- **`fifo`**: a first-word fall-through FIFO with `almost_full`. It joins pipeline parts without ready signals.
- **`fifo_mw`**: the same, with one write port per frame lane.
- **`pipe`**: a two-entry skid buffer that registers the ready signal.
- **`pipe_reg_field`**: a read-modify-write register array with three stages: fetch, execute, write back. It forwards EX→EX and WB→EX, so back-to-back updates of one entry are correct.

## Parameters (top)

| Name | Default | Meaning |
|---|---|---|
| `DATA_W` | 1024 | MII and buffer word width |
| `PPC` | 2 | frames that may end in one word |
| `CHANNELS` | 256 | DMA channels |
| `PCIE_MTU` | 256 | largest PCI Express write payload |
| `PAGE` | 4096 | host page size |
| `NUM_TRS` | 64 | DMA-buffer transaction slots |
| `DBUF_WORDS` | 512 | data and header buffer depth |
| `ETH_MTU` | 1518 | longest accepted frame, FCS included |
| `HDR_LEN` | 8 | header bytes per frame |
| `TIMEOUT` | 1024 | idle cycles before a partial transaction is closed |
| `PKT_FIFO` | 64 | packet instruction FIFO depth |

`DATA_W` and `PPC` can be changed together (for example 512/2, 2048/4). At 2048 bits the single-lane scheduler keeps an even smaller share of short frames. The first five follow the target system: 400 Gb/s on a 1024-bit bus, 256 channels, 256-byte PCI Express payload and 4 KiB pages. The rest are this design's choices.

## Host ring format

Each channel's ring is contiguous, page aligned and a power of two in size (4 KiB or more). The channel's byte stream holds, per frame:

- the 8-byte header;
- the frame (FCS included), padded to a multiple of 8 bytes.

Software configures a channel and exchanges pointers through the `cfg_*` register bus. The address is `{channel, reg}`:

| reg | Contents |
|---|---|
| 0 | base address |
| 1 | `{enable, size_log2[5:0]}` |
| 2 | software read pointer |
| 3 | hardware write pointer (read only) |

## Limits and departures

- **Single-lane scheduler.** The scheduler handles one subpacket per cycle.
  - For 64-byte frames it needs 2–3 cycles per frame, while the MII can deliver about 1.6 frames per cycle. The excess is discarded at the decoder and counted.
  - For 1518-byte frames it needs about 16 cycles per frame: one per subpacket, plus one whenever a subpacket crosses a 256-byte transaction boundary. At 400 Gb/s a frame arrives every 12 cycles, so about 75% of full-size frames are kept.
  - At 100 Gb/s nothing is lost.
  - A faster scheduler clock, or combining several subpackets per cycle in `increment_per_dma`, would be the next step.
- **Planner.** The planner uses a greedy matching over a two-vector window, not a full maximal pair matching. In this top each vector is conflict-free on its own and only one arrives per cycle, so blocks are rarely held back.
- **dma_ctrl.**
  - It does not fetch descriptors or write pointers back to the host over PCI Express. The register bus stands in for both.
  - Rings are assumed contiguous.
- **mii_decoder.** The decoder does not check the CRC.
- **PCI Express interface.** The write stream is a generic stand-in for a vendor PCI Express core's request interface.
- **Not built:**
  - multiple RX streams (parser, stream merge);
  - the TX direction (completion reordering, transaction scheduler, encoder with CRC);
  - the unpipelined register field;
  - the PCI Express hard block, the PHY/PCS and host software.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_rx_framework` runs the top at its default size. It drives mixed traffic:

- random frames of 64–1518 bytes;
- frames with an error character, too-short frames and too-long frames;
- bursts of back-to-back 64-byte frames;
- a period of host backpressure.

A host-memory model parses every ring. The test checks frame content and order per channel, page and length limits, and pointer and loss accounting. It also counts that decoder discards, ring-full drops, page splits, full and timed-out transactions, barriers, two frames per word, scheduler stalls, backpressure and running out of free ids all occur.

`packet_breaker`, `increment_per_dma`, `page_breaker`, `mtu_breaker` and `crb_gen` have their own testbenches as well. The `scheduler` wrapper that joins them is checked through this end-to-end test.

`tb_rx_workloads` also runs the full-size top. It measures how many frames are kept at line rate:

| Workload | Frames sent | Kept |
|---|---|---|
| 400 Gb/s, 1518-byte frames | 300 | 226 (75%) |
| 400 Gb/s, 64-byte frames | 3000 | 842 (28%) |
| 100 Gb/s, 1518-byte frames | 100 | 100 |

For every workload it also checks that the bytes written over PCI Express equal the header plus padded frame for each frame that was kept.

### Running a testbench

Every testbench builds with plain Verilator 5. The package must come first:

```
verilator --binary --timing --assert -Irtl rtl/rxfw_pkg.sv tb/tb_planner.sv --top-module tb_planner
./obj_dir/Vtb_planner
```

The `-Irtl` search path finds each module in `rtl/<name>.sv`. RTL and testbenches compile without warnings at Verilator's default warning level. A run ends with the `TB_RESULT` line; `failures=0` means it passed. The block tests take seconds. `tb_rx_framework` and `tb_rx_workloads` simulate the full-size top, with 256 channels and 1024-bit words, so they take longer to build. The testbenches set every variable they read, so they give the same result when Verilator starts variables at random values (`+verilator+rand+reset+2`).
