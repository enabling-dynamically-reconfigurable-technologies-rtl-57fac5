# A PCI Express co-processor with partially reconfigurable accelerator slots

This design turns an FPGA on a PCIe card into a co-processor for an ordinary PC.
The FPGA is split in two:

- A fixed **static region** talks to the host over PCIe. It moves data by DMA and loads new hardware into the rest of the chip.
- Three **partially reconfigurable regions** (PRRs) each hold one accelerator. Software can swap any of them at run time for another accelerator, while the others keep running.

The host never touches the accelerators directly. It does three things:

- writes and reads a small register file by programmed I/O (PIO);
- starts DMAs, which move 32 KB blocks between host memory and a buffer on the FPGA;
- takes interrupts that report what happened.

A new accelerator is loaded the same way as data. The bitstream is DMA'd into a buffer in front of the FPGA's internal configuration access port (ICAP). The reconfiguration controller streams it into that port at one 32-bit word per cycle.

The target device is a Virtex-5-class FPGA at 125 MHz behind a PCIe 1.0 x4 endpoint. All internal data paths are 64 bits wide.

```
 host memory                                           FPGA
 ───────────            ┌──────────────────────────────────────────────────────────────┐
                        │   PCIe endpoint (vendor PHY + data link layer, not in RTL)    │
   MRd / CplD / MWr ◄──►│   ────────────── 64-bit TLP beat stream ──────────────        │
   PIO MWr / MRd        │   dma_engine  ── PIO ──► reg_file ──► irq_ctrl ──► interrupt  │
                        │     │    ▲                  │ commands / status               │
                        │     ▼    │                  ▼                                  │
                        │  DMA READ FIFO   DMA WRITE FIFO ◄──┐                           │
                        │     │                              │                           │
                        │     ▼ buffer_router (target 0..7)  │                           │
                        │     ├──► ICAP Recv FIFO ─► reconfig_ctrl ─► ICAP (32 bit)      │
                        │     ├──► PRR1 Recv FIFO ─► accelerator ─► PRR1 Send FIFO ──────┤
                        │     ├──► PRR2 Recv FIFO ─► accelerator ─► PRR2 Send FIFO ──────┤
                        │     └──► PRR3 Recv FIFO ─► accelerator ─► PRR3 Send FIFO ──────┘
                        └──────────────────────────────────────────────────────────────┘
```

Every buffer in the picture is the same 32 KB FIFO: 4096 words of 64 bits.

## Reading the RTL

| File | What it is |
|---|---|
| `rtl/pcie_rp_pkg.sv` | Shared types and constants: the TLP beat, header codes, register map, event bits, DMA and reconfiguration commands |
| `rtl/pcie_rp_top.sv` | The whole design: static region plus `NUM_PRR` PRR slots |
| `rtl/dma_engine.sv` | Transaction layer: bus-master DMA in 128-byte TLPs, PIO target, completion realignment |
| `rtl/sync_fifo.sv` | The 64-bit, 32 KB buffer used everywhere (show-ahead read) |
| `rtl/buffer_router.sv` | Steers the DMA READ FIFO to one Recv FIFO, and one Send FIFO to the DMA WRITE FIFO |
| `rtl/reconfig_ctrl.sv` | Feeds the ICAP from its Recv FIFO and asks software for the bitstream chunk by chunk |
| `rtl/reg_file.sv` | Host-visible registers |
| `rtl/irq_ctrl.sv` | Event status register and the interrupt request to the endpoint |
| `rtl/prr_slot.sv` | One PRR: its Recv FIFO, its Send FIFO, decoupling logic, and the three per-accelerator events |
| `rtl/accel_example.sv` | An example accelerator with the standard port map and a stall state |

Every file begins with a comment that gives:

- the module's job and how it works;
- its interface and timing;
- which parts are fixed by the system description and which are local choices.

## The accelerator contract

An accelerator is any module with the ports below. The slot around it connects these ports to its two FIFOs and to its four registers.

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | 125 MHz clock |
| `resetN` | in | 1 | Active-low reset. It is held low until software sets the slot's run bit, and again while the slot is reconfigured. |
| `incomingData` | in | 64 | Head word of the Recv FIFO (show-ahead) |
| `incomingRen` | out | 1 | Pops the word shown |
| `incomingEmpty` | in | 1 | No input available |
| `outgoingData` | out | 64 | Result word |
| `outgoingWen` | out | 1 | Pushes `outgoingData` into the Send FIFO |
| `outgoingFull` | in | 1 | No room for results |
| `reg1`, `reg2` | in | 32 | General-purpose parameters written by software |
| `ressreg` | out | 32 | General-purpose result or status, read by software |
| `complete` | out | 1 | Execution finished |
| `bitstreamID` | out | 32 | Identifies the loaded accelerator |

An accelerator must have a **stall state**. It enters it when `incomingEmpty` is high or `outgoingFull` is high, and leaves it when both clear. Because of the stall state, several I/O-heavy accelerators can share the one DMA engine: each waits, without losing data, until software gets round to it.

`accel_example` is a small accelerator that meets this contract:

- It returns each input word with `reg1` added to both 32-bit halves.
- `reg2` sets how many words to process.
- `ressreg` accumulates the sum of all output halves, which serves as a checksum.
- It raises `complete` after `reg2` words.
- It moves one word per cycle when neither stream stalls.

## Register map (BAR0, 32-bit registers)

| Offset | Name | Access | Contents |
|---|---|---|---|
| 0x00 | `DMA_ADDR` | RW | Host physical address of the DMA segment (DWORD aligned, below 4 GB) |
| 0x04 | `DMA_NTLP` | RW | Number of 128-byte TLPs in the DMA, 16 bits |
| 0x08 | `DMA_CTRL` | RW | [0] start (write 1, self-clearing), [1] direction (0 = host→FPGA, 1 = FPGA→host), [6:4] target (0 = ICAP, p = PRR p) |
| 0x0C | `DMA_STATUS` | R | [0] busy, [31:16] TLPs finished |
| 0x10 | `IRQ_STATUS` | R / W1C | Latched events (see below). Writing 1 to a bit clears it. |
| 0x14 | `IRQ_MASK` | RW | An event raises an interrupt only if its mask bit is 1 |
| 0x18 | `RCFG_CTRL` | RW | [0] start (write 1), [1] needs data, [2] done, [3] busy, [6:4] PRR to reconfigure |
| 0x1C | `RCFG_LEN` | RW | Bitstream length in bytes (multiple of 4) |
| 0x20 | `RCFG_COUNT` | R | 32-bit words written to the ICAP so far |
| 0x24 | `PRR_RUN` | RW | Bit p releases the accelerator in PRR p from reset |
| 0x28 | `PRR_STATUS` | R | Bit p: complete. Bit 8+p: Recv FIFO empty. Bit 16+p: Send FIFO holds a full result buffer. |
| 0x40 + 0x10·(p−1) | PRR p block | | +0 `reg1` (RW), +4 `reg2` (RW), +8 `ressreg` (R), +C `bitstreamID` (R) |

### Interrupt events

There is one interrupt for all events. The handler reads `IRQ_STATUS` to learn the cause, then writes the same value back to clear those bits.

| Bit | Event |
|---|---|
| 0 | A DMA is complete |
| 1 | The reconfiguration controller needs data |
| 2 | Reconfiguration is complete |
| 8 + p − 1 | The accelerator in PRR p needs data: it is running and its Recv FIFO has run dry |
| 16 + p − 1 | The accelerator in PRR p has produced results: its Send FIFO holds one full buffer (`RESULT_WORDS`), or it is complete with results left over |
| 24 + p − 1 | The accelerator in PRR p has completed |

Each event is a one-cycle pulse on the rising edge of its condition. The interrupt request `cfg_interrupt` rises when a new unmasked event arrives. It stays high until the endpoint answers with `cfg_interrupt_rdy`. The endpoint core turns the request into either an MSI memory write or a legacy INTx assert/deassert message, depending on how the host configured it.

## DMA on the transaction layer (`dma_engine`)

### The beat stream

Packets enter and leave as 64-bit beats `{data, sof, eof, half}` with a valid/ready handshake. The first DWORD of a packet is in `data[63:32]`. `half` on the last beat means only its upper DWORD is used.

All headers are 3 DWORDs long:

- MRd32 (type code `0x00`);
- MWr32 (`0x40`);
- CplD (`0x4A`).

### Host → FPGA ("DMA read", the host's write)

The engine sends MRd requests of 128 bytes to consecutive addresses. It keeps going as long as both of these hold:

- at most 32 requests are outstanding (5-bit tag);
- the DMA READ FIFO has room for all the data requested and not yet received.

The second condition means the FIFO can never overflow, however slowly the destination drains it.

Completion data is offset by one DWORD. A CplD header is 3 DWORDs, so its payload starts in the lower half of a beat. A one-DWORD holding register realigns the payload into 64-bit words. The realigner also copes with a read answered by several completions, as a root complex does when it splits at its read completion boundary (the tests split every request at 64 bytes). Completions must arrive in request order, which is what a root complex does for a single requester.

### FPGA → host ("DMA write", the host's read)

The engine starts an MWr TLP only when the DMA WRITE FIFO already holds its 16 words. It then sends the TLP without a gap: 18 beats, 3 header DWORDs plus 32 data DWORDs. TLPs follow each other back to back.

### Transmit priority and PIO

On the transmit side, a PIO read completion goes first, then a DMA write TLP, then a DMA read request.

PIO arrives as single-DWORD MWr/MRd packets addressed to BAR0. Only one PIO read is served at a time. The receive stream stalls until its completion has been sent.

### Routing (`buffer_router`)

The DMA's `target` field is latched when the DMA starts.

- **Host→FPGA:** words from the DMA READ FIFO go to the Recv FIFO of that target, one per cycle. Data for a PRR that does not exist is dropped.
- **FPGA→host:** exactly `NTLP × 16` words are taken from that PRR's Send FIFO. Results beyond the DMA stay there for the next one.

## Loading an accelerator (`reconfig_ctrl`)

This is the most involved protocol. It relies on cooperation between hardware and the driver:

1. Software writes `RCFG_LEN` (bitstream bytes), then writes `RCFG_CTRL` with the PRR number and start bit.
   - The controller becomes busy.
   - It holds that PRR's accelerator in reset. The slot's FIFO enables are gated too, so the region being rewritten cannot disturb its buffers.
2. The controller asks for the bitstream **in chunks of half its Recv FIFO** (2048 words = 16 KB by default).
   - It asks for a chunk only when the previous chunk has fully arrived and the FIFO has room for a whole new one.
   - Each request sets `RCFG_CTRL[1]` and raises event 1.
3. Software answers each request with one host→FPGA DMA of that chunk, with target 0 (the ICAP).
4. Meanwhile the controller writes the FIFO contents to the ICAP:
   - one 32-bit word per clock, upper half of each 64-bit word first;
   - active-low CE and WRITE;
   - all outputs registered.
   - `icap_busy` pauses the feed.
   - `RCFG_COUNT` counts the words written.
5. After the last word, the controller sets `done`, raises event 2 and releases the PRR. The new accelerator starts as soon as the PRR's run bit is set (or at once, if software left it set).

The half-FIFO chunk gives **double buffering**. While one 16 KB chunk drains into the ICAP at 500 MB/s, the next one is already being DMA'd in. As long as software answers a request within the time the ICAP takes to drain a chunk (2048 words × 2 = 4096 cycles ≈ 33 µs), the ICAP never starves.

DMAs move whole 128-byte TLPs, so the last chunk may carry padding beyond `RCFG_LEN`. An odd word count also leaves one padding half-word. The controller discards the padding once it is idle.

The words go to the ICAP exactly as they appear in host memory. Any bit reordering the device needs has to be done by software.

## Timing and throughput

| Operation | This RTL (125 MHz, ideal link) |
|---|---|
| ICAP feed | 1 word/cycle = 500 MB/s. A 1.7 MB bitstream (425,000 words) takes 425,000 cycles from first to last word. |
| FPGA→host DMA, 32 KB | 4625 cycles ≈ 886 MB/s (18 cycles per 128-byte TLP) |
| Host→FPGA DMA, 32 KB | 4685 cycles ≈ 874 MB/s with 40-cycle read latency |
| Accelerator (`accel_example`) | 1 word/cycle, 1 cycle latency |

On a real PCIe 1.0 x4 link:

- The raw rate is 1 GB/s after 8b/10b coding.
- With the 20–28 bytes of packet overhead per 128-byte TLP, about 800 MB/s is the ceiling.
- A full system (driver copies, per-DMA setup by software) reaches roughly 620 MB/s host→FPGA and 545 MB/s FPGA→host with 32 KB DMAs.
- Reconfiguration reaches about 490 MB/s.

The FPGA side runs faster than the link in every case, so the link and the host set the limit.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `NUM_PRR` | 3 | top, `reg_file`, `buffer_router` | Number of PRR slots (1..7; the target field is 3 bits) |
| `FIFO_DEPTH` | 4096 | top, `dma_engine`, `reconfig_ctrl`, `prr_slot` | Words per 64-bit buffer (32 KB) |
| `RESULT_WORDS` | `FIFO_DEPTH` | top, `prr_slot` | Send FIFO level that raises "results produced" (one result DMA) |
| `CHUNK_WORDS` | `FIFO_DEPTH/2` | `reconfig_ctrl` | Bitstream chunk asked for per request |
| `BITSTREAM_ID` | p | `accel_example` | ID reported by the example accelerator in PRR p |

## What is fixed by the system description and what is local

**Fixed by the system description:**

- the block structure;
- 64-bit, 32 KB buffers;
- 128-byte TLPs, with the TLP count given when the DMA starts;
- FPGA bus mastering in both directions;
- PIO access to a register file;
- four 32-bit registers per PRR: two parameters, one result, one bitstream ID;
- the accelerator port map and its stall state;
- the six interrupt events;
- 32-bit ICAP writes at 125 MHz;
- data-driven reconfiguration with double buffering;
- three PRRs, with up to seven supported.

**Local choices:**

- the beat format;
- 32-bit addressing only;
- in-order completions;
- the register map and bit positions;
- the target field that steers the DMA FIFOs;
- the per-PRR run bit;
- the interrupt status/mask scheme;
- the chunk size and request rule of the reconfiguration controller;
- holding and decoupling a PRR while it is reconfigured;
- the "needs data" and "results produced" thresholds;
- the example accelerator's function.

**Not in the RTL:**

- the PCIe physical and data-link layers and the configuration space (a vendor core; the top starts at its transaction-layer stream);
- the ICAP primitive itself;
- 64-bit addressing, error and poisoned-TLP handling, and completion time-outs.

## Simulation

The testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M` and stops, and each has a watchdog. They run with plain Verilator 5 from the repository root:

```
verilator --binary --timing -Irtl -Itb rtl/pcie_rp_pkg.sv tb/tb_pcie_rp_top.sv \
          --top-module tb_pcie_rp_top -Mdir obj_top
./obj_top/Vtb_pcie_rp_top
```

Replace the testbench name to run another one.

| Testbench | What it shows |
|---|---|
| `tb_pcie_rp_top` | End to end with 256-word buffers: PIO, 768 words each through PRR 1 and PRR 3 running at the same time, with their DMAs interleaved and every word checked, and reconfiguration of PRR 2 with an odd-length bitstream while those two run. It runs with random link backpressure, split completions and random ICAP busy. It counts each mechanism (all six events, two accelerators active at once, an accelerator running during reconfiguration, stalls on empty and full, PRR hold, backpressure, ICAP pause, split completions) and fails if one never occurs. |
| `tb_pcie_rp_full` | The design at its default size: a 1.7 MB bitstream into PRR 3 in 16 KB chunks (checks word count, checksum and ≥ 95 % of one word per cycle at the ICAP), and a 32 KB DMA each way through PRR 1 (checks every word and the cycle counts of both DMAs). |
| `tb_pcie_rp_seven` | The design built with seven regions and 64-word buffers: bitstream IDs of all seven, reconfiguration of region 6, and data through region 7, including its event bits 14, 22 and 30 |
| `tb_dma_engine` | TLP engine with 32-word FIFOs: PIO, read credit under a slow consumer, split completions, 18 cycles per write TLP |
| `tb_reconfig_ctrl` | Chunk requests, order of ICAP words, padding discard, busy pause, one word per cycle |
| `tb_buffer_router` | Target selection, dropped data for a missing PRR, write quota |
| `tb_prr_slot` | Hold and run gating, events, ordering |
| `tb_accel_example` | Results, checksum, stalls, one word per cycle |
| `tb_reg_file`, `tb_irq_ctrl`, `tb_sync_fifo` | Register map, event latching and masking, FIFO against a queue model |

Two behavioural models in `tb/` stand in for the parts outside the RTL:

- `pcie_host_model` provides host memory, the root complex and the driver's register sequences. It runs DMAs, services interrupts and reconfigures a PRR chunk by chunk.
- `icap_model` counts and checksums the configuration words.

The full-size test takes well under a second of simulation time.
