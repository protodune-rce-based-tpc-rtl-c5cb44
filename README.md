# RCE readout data path for the ProtoDUNE TPC

A liquid-argon TPC produces a continuous waveform on every wire. In ProtoDUNE
each front-end board (FEB) digitizes 128 wires with 12 bits at 2 MHz, and
warm interface boards forward each FEB's data on a serial link. A
Reconfigurable Computing Element (RCE) is a Zynq system-on-chip on a
cluster-on-board (COB) ATCA card. It takes two such links (256 wires, about
6 Gbit/s of raw samples) and has to make that stream fit into the DRAM and
the Ethernet link of an ARM processor. The main idea is simple. The FPGA
fabric blocks each wire's samples into chunks of 1024 ticks (512 µs),
compresses every wire losslessly as the data arrive, and DMAs the compressed
chunks into a large DRAM ring. The processor then only has to keep the
chunks that an external trigger asks for and ship them out.

This repository holds synthesizable SystemVerilog for the fabric side of one
RCE, plus self-checking testbenches. The processor software, the DRAM, the
transceivers and the timing hardware are outside the RTL. The testbenches
model the processor and the DRAM.

```
 WIB link 0 ─► wib_frame_rx ─┐                 ┌──────────── compressor ─────────────┐
 (16 b/clk)                  ├─ groups of 4 ──►│ chunk_buffer ─► channel_encoder ─► q │─┐
 WIB link 1 ─► wib_frame_rx ─┘  channels       │   (x4 lanes, 64 wires each)          │ │ merge
                  │ frame events               └──────────────────────────────────────┘ │
                  ▼                                   ▲ start / bank / header           ▼
               rce_fsm ───────────────────────────────┘                           tx_dma ─► DRAM ring
                  ▲ timestamp                                                       │ descriptors
 timing bits ─► trigger_listener ─► trigger queue ─► processor ◄────────────────────┘ release
```

Everything runs on one clock (`clk`, 250 MHz assumed). A 2 MHz tick is then
125 clocks, and all rate figures below use that clock.

## Link frames and error checking (`wib_frame_rx`)

The link protocol itself belongs to the warm interface boards. This design
uses a frame of 98 16-bit words per tick per link, which is close to the data
content such a link carries:

| word | content |
|------|---------|
| 0 | header `{feb_err[3:0], reserved[3:0], seq[7:0]}`, flagged with `sof` |
| 1..96 | 128 samples × 12 bits, packed least significant bit first |
| 97 | CRC-16/CCITT (polynomial 0x1021, initial value 0xFFFF, MSB first) over words 0..96 |

Three link words hold exactly four samples. The receiver therefore emits
one 48-bit *group* of four adjacent channels for every third data word, and
the rest of the design stores and moves groups. Four things are checked: the
CRC, the sequence number (it must count up by one per frame), the frame
length (a frame cut short by the next `sof`) and the front-end error bits in
the header. Samples go on before the CRC word arrives (cut-through), so a
bad frame still fills its tick. Its verdict comes with `frame_done`, and the
FSM counts it in the chunk header.

## Chunks: a transposing double buffer (`chunk_buffer`)

Data arrive tick-major (all 128 channels of tick *t*, then tick *t+1*). The
coder needs them wire-major (all 1024 ticks of one wire). So a whole chunk is
stored and read out transposed. Each of the four lanes owns a
`chunk_buffer` with two banks of 1024 ticks × 16 groups × 48 bits. The
receivers fill one bank while the lane compresses the other. Group *g* of
link *l* goes to lane `2l + g/16`: lanes 0–1 hold link 0, lanes 2–3 hold
link 1. In all, 6.3 Mbit of block RAM.

## The compression coder (`channel_encoder`)

The published design compresses wire by wire in parallel hardware but does
not fix the algorithm. This is the simplest lossless coder that gains on
slowly varying, low-noise waveforms:

1. **First difference.** `d[t] = s[t] − s[t−1]` with `s[−1] = 0`, so the first
   value is the raw sample. `d` lies in −4095..4095.
2. **Zig-zag.** `z = 2d` for `d ≥ 0` and `z = −2d − 1` for `d < 0`. This maps
   small differences of either sign to small unsigned numbers (13 bits at most).
3. **Block bit width.** Each block of 16 consecutive `z` gets one width
   `w` = bit length of the largest `z` in it (0..13). Because every value is
   below `2^w`, `w` is also the bit length of the OR of the block, and that is
   how the hardware finds it.
4. **Packing.** Each block is written as the 4-bit `w` followed by its 16
   values in `w` bits each. Bits are appended least significant first into
   64-bit words.

A channel record is one header word `{0xC1, 24'b0, 16'(TICKS), 16'(channel)}`,
then the packed bits, then always exactly one final word holding the 0..63
remaining bits, zero padded (`out_last`). A decoder knows the tick count, so
it needs no length field.

Example: a quiet block where all differences are in −4..3 has `z ≤ 7`, so
`w = 3` and the block takes 4 + 48 bits, 3.25 bits per sample instead of 12.
A block holding a pulse edge takes up to 4 + 16 × 13 = 212 bits. The ratio
depends entirely on the noise. On the test waveforms (noise of ±4 counts plus
pulses) it is 7.1 bits per sample, a factor of 1.7. On white noise over the
full 12-bit range, one tick in three, it grows to 13.2 bits per sample: the
coder then expands the data by about 10%. The throughput studies of
the readout assume a factor of 4 for real data and 2 for noisy data.

**Inside a lane.** A loader reads one sample per clock from the chunk buffer
(one-clock read latency). It fills one of two 16-entry block registers with
`z` values while it keeps the running OR. An emitter packs the other
register. A block costs 17 clocks (one to pick the block, 16 to pack), so a
channel costs 64 × 17 + 1 = 1089 clocks. 64 channels take about 70,000
clocks, well inside the 128,000 clocks that the next chunk takes to arrive.
The emitter pauses when the lane's output queue is nearly full. The loader
pauses only when both block registers are full.

## Merging lanes and the chunk layout (`compressor`)

Each lane writes its records into a 256-word queue. That is more than the
longest possible record (214 words), so a lane can finish one record and
start the next while the merge stage serves the other lanes. With short
queues the four lanes would stall each other and run no faster than one
lane. The merge stage takes one whole record from each lane in turn. The
output order of channels is therefore 0, 64, 128, 192, 1, 65, … A chunk in
the output stream is:

| word | content |
|------|---------|
| 0 | `{0xC0, errs[7:0], seq[15:0], 32'(N_CH)}`: frames with errors, chunk sequence number |
| 1 | 64-bit timestamp of the chunk's first tick |
| 2.. | 256 channel records |
| last | `{0xCF, 24'b0, 32'(total words including header and trailer)}`, with `m_last` |

## DRAM ring and the processor (`tx_dma`)

The DMA writes each 64-bit word to the next address of a ring of
`RING_BYTES` bytes at `RING_BASE`. The default is 500 MiB, the DRAM the
readout can spare as its trigger buffer. The write port is a plain
valid/ready word port that stands in for the AXI write channel to the Zynq
memory controller. When a chunk's last word is written, the DMA queues a
descriptor `{start address, length in bytes}`. A chunk may wrap from the end
of the ring to its start.

The processor keeps each chunk until a trigger covers it or it times out. It
sends what was selected over TCP/IP and then returns the chunk's bytes
through `release_valid`/`release_bytes`. **The processor must release chunks
in descriptor order.** The DMA only counts bytes in use and writes
sequentially, so an out-of-order release would let it overwrite a chunk that
is still held. If the ring has no room for a word, the DMA drops the chunk
being written. It throws away the rest of that chunk, rewinds to the chunk's
start and counts it in `chunks_dropped`. A chunk end waits while the
descriptor queue is full, so descriptors are never lost.

## Timestamps and triggers (`trigger_listener`)

The timing system sends timestamps and triggers encoded on its clock. A CDR
chip recovers clock and data, and the COB fans them out to every RCE. The
real message format is defined elsewhere. This design decodes its own
88-bit, MSB-first message:

`0xA5` start byte · type byte · 64-bit value · check byte (XOR of the type byte and the 8 value bytes)

Type 0x01 loads the timestamp counter. Type 0x02 is a trigger: its time goes
into an 8-entry queue for the processor. Messages with a bad check byte or
an unknown type are counted and ignored. Between messages the decoder hunts
for the start byte bit by bit. The timestamp counts `sys_tick`, the 50 MHz
system clock used as a clock enable. The recovered data bit is assumed to be
already synchronous to `clk`, with a `bit_valid` strobe.

## Chunk sequencing (`rce_fsm`)

When `run` is high, each link starts storing at its next frame (tick 0). A
frame is stored while its link has fewer than `TICKS` ticks in the chunk.
When both links have delivered `TICKS` frames, the chunk is complete:

* If the compressor is idle, it starts on that bank, the header fields are
  latched and the links switch to the other bank.
* If the compressor is still busy, the chunk is dropped (`chunks_skipped` at
  the top) and the same bank is refilled. The sequence number still
  advances, so the gap shows downstream.

The chunk timestamp is `ts_now` when link 0's first frame of the chunk
starts. The two links are assumed to be tick aligned. A link that finishes
early takes no frames until the chunk is closed. Lowering `run` stops
storage at the next frame boundary and discards a partial chunk.

## What follows the source design and what is this design's own

Taken from the published RCE readout description: two links of 128 channels
per RCE, 12-bit samples at 2 MHz, chunks of 1024 ticks, per-wire compression
in parallel, DMA into DRAM with about 500 MB of buffer, the block split (Rx,
compression, Tx DMA, a controlling FSM, a trigger listener feeding the
processor), and the global timestamp applied on reception.

Chosen here, because the source leaves them open or specifies them
elsewhere: the single 250 MHz clock, the link frame format and its checks,
the compression algorithm and record layouts, 4 lanes, the ring and
descriptor protocol, the timing message format, the behaviour on overload
(chunk skipped or dropped) and the synchronous active-high reset.

Not in the RTL: zero suppression, which the platform can run but this data
flow does not use; the ARM software (trigger matching, timeout, TCP/IP), the
DRAM and its controller, the serial transceivers, the CDR chip, the COB's
clock/data fan-out and Ethernet switch, and the warm interface boards. A
COB holds 8 RCEs, i.e. 8 copies of `rce_top` sharing one timing stream.

## Sizing against the readout scenarios

All data is compressed and written to DRAM. For triggered data at 5 ms per
trigger, one trigger is 768 MB/s × 5 ms / 4 = 0.96 MB at compression factor 4.
Take 140 Hz during a 4.8 s spill with 50 MB/s leaving the RCE. That case
holds (134.4 − 50) MB/s × 4.8 s = 405 MB at the end of
the spill, which fits the 524 MB ring and drains in 8.1 s of the 19.2 s
between spills. The other scenarios (45 Hz steady, 100 Hz + 30 Hz cosmics,
200/75 Hz at 100 MB/s, 65/5 Hz at factor 2) need at most 442 MB. This counts only triggered data, which assumes the
trigger decision comes soon: at 192 MB/s of compressed data, each 100 ms of
untriggered data waiting for its decision adds 19 MB. Even in its
worst case the coder writes about 6.9 Gbit/s, below the roughly 7.5 Gbit/s
the fabric-to-DRAM path delivers.

`tb_readout_scenarios` runs these cases through `tx_dma` at scale. One ring word
stands for 40 KiB and one clock for 0.1 ms, so the ring has 12,800 words and a
24 s spill cycle takes 240,000 clocks. Each trigger writes one chunk. A
processor model ships the oldest chunk at the output rate and then releases
its space. All five cases finish the cycle with an empty ring and no drops:

| case | peak in ring | longest wait, trigger to shipped |
|---|---|---|
| 45 Hz steady | 1 MB | 0.02 s |
| 140 Hz spill, 0 Hz off | 422 MB | 8.4 s |
| 100 Hz spill, 30 Hz cosmics | 233 MB | 4.7 s |
| 200/75 Hz at 100 MB/s | 465 MB | 4.6 s |
| 65/5 Hz at factor 2 | 362 MB | 7.2 s |

A sixth case at 170 Hz overfills the ring and must drop chunks. The peaks are a
few percent above the arithmetic because each trigger is rounded up to whole
40 KiB words.

## Files

| file | content |
|------|---------|
| `rtl/rce_pkg.sv` | constants, frame/record/message formats, CRC, zig-zag and width functions |
| `rtl/rce_top.sv` | one RCE: 2 × `wib_frame_rx`, `rce_fsm`, `compressor`, `tx_dma`, `trigger_listener` |
| `rtl/wib_frame_rx.sv` | link receiver, unpacking and error checks |
| `rtl/chunk_buffer.sv` | two-bank transposing chunk store of one lane |
| `rtl/channel_encoder.sv` | per-wire coder of one lane |
| `rtl/compressor.sv` | lanes, lane queues, merge, chunk header/trailer |
| `rtl/tx_dma.sv` | DRAM ring writer and descriptor queue |
| `rtl/rce_fsm.sv` | run control and chunk sequencing |
| `rtl/trigger_listener.sv` | timing message decoder, timestamp, trigger queue |
| `rtl/sync_fifo.sv` | single-clock FIFO used by several blocks |
| `tb/tb_ref_pkg.sv` | reference models: test waveforms, frame builder, bit-serial CRC, reference coder |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_rce_top.sv` | end to end with 32-tick chunks: every overload and error path |
| `tb/tb_rce_top_full.sv` | end to end at full size: three back-to-back 1024-tick chunks, checked word for word |
| `tb/tb_readout_scenarios.sv` | the DRAM ring under the trigger-rate scenarios, scaled in size and time |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a hung run as a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/rce_pkg.sv tb/tb_ref_pkg.sv tb/tb_rce_top_full.sv --top-module tb_rce_top_full
./obj_dir/Vtb_rce_top_full
```

Replace the testbench name to run any other one. The full-size run simulates
about 450,000 clocks in about a second. It sends three chunks without a gap,
the last of them noise, and reports each chunk's compressed size and the
clocks it took: 70,061, 70,056 and 70,351 against a budget of 128,000, so
no chunk is skipped at the full input rate. The reduced
end-to-end run (`tb_rce_top`) makes every mechanism happen at least once: a
CRC error flagged in a chunk header, DRAM back-pressure, a chunk skipped
while the compressor was busy, chunks dropped on a full ring, and triggers
delivered. It checks every chunk that reaches DRAM against the reference
coder.

## Changing it

* `rce_top` parameters: `TICKS` (chunk length), `N_LANES`, `RING_BASE`,
  `RING_BYTES`. `TICKS` must be a power of two and at least 16, because
  blocks are 16 values. `N_LANES` must be a power of two, a multiple of the 2
  links, and leave at least 8 channels per lane (two groups).
* A different link format only touches `wib_frame_rx` and the constants in
  `rce_pkg`. The rest of the design sees groups of four channels.
* A different coder only has to keep the `channel_encoder` ports: read one
  group per clock from the buffer, emit 64-bit words with `out_last` at the
  end of each channel. If its records can exceed 214 words, raise the
  compressor's `Q_DEPTH` above the longest record.
* The DRAM port has no burst or address-alignment rules. An AXI master would
  replace the `mem_*` port in `tx_dma`.
