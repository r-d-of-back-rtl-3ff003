# iRPC back-end board firmware

The improved Resistive Plate Chambers (iRPC) of the CMS end-cap muon upgrade read
each strip at both ends. A front-end board (FEB) measures the arrival time of every
strip end with a TDC and streams the hits over an optical GBT link. This RTL is the
firmware of the back-end board (BEB), which serves eight such FEBs. It does four jobs:

1. **Rebuilds time order.** The FEB sorts hits by channel number before sending them,
   so hits from one bunch crossing (BX) can arrive spread over several uplink frames.
   The BEB puts each hit back into the BX in which it was made.
2. **Makes trigger primitives.** For each BX it finds strip clusters and computes one
   trigger primitive (TP) per cluster: the central strip and the hit position along
   the strip, taken from the time difference between the two ends. It sends all TPs
   to the trigger system.
3. **Reads out events.** It keeps the raw hits and the TPs in ring buffers. For each
   Level-1 accept (L1A) it reads a window of them at a programmable latency. It packs
   all links into one event for the 10-GbE DAQ link, applies zero suppression, and
   raises Busy before its buffers overflow.
4. **Handles slow control.** It converts byte-wide register accesses from a
   GbE/RBCP (SiTCP) host interface into:
   - its own 16-bit configuration registers,
   - FEB register transactions carried in the GBT downlink frames,
   - a port for an external GBT-SCA controller.

   It also runs a bit-error-rate (BER) loopback test of each link.

Everything runs on one 40 MHz clock: one clock cycle is one LHC bunch crossing. The
GBT link clocks are crossed with small dual-clock FIFOs at the edge of each link.

## Block map

```
              per link (x8, input_link)                            shared
 ul_user ─► async_fifo ─► uplink_sel ─┬─► raw hits ─────────────► readout_module ─► daq_*
 (rx_clk)   (RX FIFO)     (frame sel) │                            ▲   (ring buffers,
                                      └─► tdc_demux ─► clusterizer ─┤    trigger FIFO,
                                          (re-timing)  (TPs)        │    packer, Busy)
                                                                    └─► tp_concentrator ─► tp_frame
                          reply words ─► fee_sc ◄──────── sc_sel ◄── rbcp_*
 dl_user ◄─ async_fifo ◄─ downlink_builder ◄─ fee_sc      │  └──► bee_sc (registers, status)
 (tx_clk)   (TX FIFO)     ▲ fast control, BC0             └─────► gbt_sc_* port
                          └ ber_checker pattern (test mode)
 bx_counter ─► bcn, bc0             trigger_sel (external / Trigger Module L1A, Busy gate) ─► l1a
```

| Module | Role |
|---|---|
| `irpc_pkg` | frame, TDC, TP and event-word types; shared constants |
| `irpc_beb_top` | the BEB: 8 `input_link`s plus the shared blocks above |
| `input_link` | one FEB link: RX/TX FIFOs, frame split, DeMux, clustering, FEB slow control, downlink framing, BER test |
| `async_fifo` | Gray-pointer dual-clock FIFO, first-word fall-through |
| `uplink_sel` | splits a 112-bit uplink word into status, 3 TDC hits or an SC reply |
| `bx_counter` | BX number (0..3563), BC0, orbit count, resync |
| `tdc_demux` | the re-timing buffer ("DeMux") |
| `clusterizer` | strip map, cluster finding, central strip, position along the strip |
| `tp_concentrator` | collects the TPs of all links each BX, tags them with the link number, fans them out |
| `trigger_sel` | chooses the L1A source and blocks triggers while Busy is high |
| `readout_module` | ring buffers, trigger FIFO, event packer, zero suppression, Busy |
| `ring_buffer`, `sync_fifo` | memories used by the readout |
| `sc_sel` | routes RBCP accesses by address |
| `bee_sc` | BEB configuration and status registers |
| `fee_sc` | RBCP accesses to FEB request/payload frames and back |
| `downlink_builder` | assembles the 80-bit downlink word |
| `ber_checker` | cyclic-increment pattern generator and checker |

## Link frames

**Uplink** (112-bit GBT wide-bus user word, most significant field first):

| field | MiscStatus | SCFifoFull | DataFifoFull | SCFrame | RSVD | DataValid | TDC ×3 |
|---|---|---|---|---|---|---|---|
| bits | 3 | 3 | 3 | 1 | 3 | 3 | 3 × 32 |

- Each TDC word is an 8-bit channel followed by a 24-bit time.
- This design splits the time into a 12-bit BX number and a 12-bit fine time. The fine
  LSB is 25 ns / 4096 ≈ 6.1 ps.
- The first hit is the most significant one. `DataValid[2]` belongs to it.
- With SCFrame = 1 the frame is a slow-control reply instead. It carries 6 valid bits
  and six 16-bit words: two for each of the three FEB FPGAs.

**Downlink** (80-bit user word): 16 bits of fast control followed by 64 bits of slow
control.

- Fast control: Resync, BC0, Reset SC path, Flush data path, Mute channels, 8 reserved
  bits, and a 3-bit FPGA select.
- The reserved field is 8 bits, so that the word totals 80 bits.
- FPGA select = 0 means the slow-control half is empty.
- A request frame carries 7 reserved bits, a write flag, an 8-bit word count, a 16-bit
  address and the first two 16-bit write words.
- Payload frames that follow carry four more words each.
- In BER test mode the whole 80-bit word is the test pattern.

## Re-timing the hits (DeMux)

The BEB sends BC0 to the FEBs, so a hit's BX field and the BEB's own BX number
(`bcn`) share a time base. When a hit arrives, `bcn − hit.bx` (modulo the orbit) is
how long it spent in transit. `tdc_demux` is a circular buffer:
- One **row per BX** of generation: `DEPTH` = 16 rows.
- Each row has `SLOTS` = 8 **entries**.

How a hit moves through it:
- An arriving hit is written into the row of its own BX, at the next free entry.
  Up to three hits are written per cycle, one uplink frame.
- Every cycle the oldest row, the BX `bcn − 15`, is output whole and cleared.
- So every BX's hits leave together, exactly `DEPTH − 1` = 15 BX after they were
  made, however the FEB spread them over frames.
- A hit that arrives 15 or more BX late, or finds its row full, is dropped and
  counted (`n_late`, `n_full`).

Flush data path clears the buffer. The 16 × 8 size is this design's choice. Judge it
against the FEB's real output queue depth.

## Clusters and trigger primitives

`clusterizer` has two pipeline stages, so a row's TPs appear two cycles after the row.

Stage 1 builds the strip map.
- Channels 0–47 are end A of strips 0–47 and channels 48–95 are end B. This end
  assignment is an assumption.
- A strip fires when both of its ends have a hit in the row. The first hit per end is
  kept.

Stage 2 finds clusters.
- A strip links to its right-hand neighbour when both fire and their end-A times differ
  by no more than `TIME_WIN` (328 LSB ≈ 2 ns).
- One "process" per cluster size k = 1..`MAX_SIZE` (4) slides a k-strip window over
  the 48 strips. It marks positions where exactly k linked strips form a maximal run.
- Runs longer than `MAX_SIZE` are counted in `n_oversize` and dropped.

Each cluster becomes a TP (`tp_t`, 35 bits):
- **strip**: the central strip, first + (k−1)/2.
- **size**: k.
- **dt**: t(end A) − t(end B) of the central strip, in fine LSB.
- **y**: the position along the strip, (dt · 157) >>> 8 mm. This is v·dt/2 with a
  signal speed of 0.67 c (≈ 0.613 mm per LSB).

Notes on the TP output:
- Up to `MAX_TP` (4) TPs per link per BX, lowest strip first.
- The conversion from strip and y to detector coordinates is not included. It is a
  look-up table whose contents depend on the chamber geometry.
- `tp_concentrator` gathers up to `N_OUT_TP` (8) TPs per BX from all links, each
  tagged `{link[3:0], tp}`.
- It drives the same frame to two trigger outputs and counts TPs beyond 8 as dropped.

TP latency is 15 (DeMux) + 2 (clustering) + 1 (link register) + 1 (concentrator) = 19 BX
after the hit was made. The RX FIFO crossing adds 1–3 BX on arrival.

## Readout: latency, window and event format

Every cycle `readout_module` writes each link's raw hits (one uplink frame: 3 TDC words
with valid bits) and TPs into ring buffers.
- There are `RB_DEPTH` = 1024 entries, addressed by a free-running BX pointer.
- The processing latency is fixed, so a trigger arriving at pointer `t` maps to two
  windows:
  - raw window from `t − LATENCY`,
  - TP window from `t − LATENCY + TP_OFFSET`.
- Both windows are `WINDOW` BX long, at most 32.
- All three values are registers, calibrated once for the real trigger latency.

Triggers queue in a 16-entry FIFO. For each trigger the packer does the following:
1. **Scan.** It reads the window of every link once (window + 3 cycles). It counts raw
   hits and TPs per link and marks which BXs hold data.
2. **Zero suppression** (`CTRL.zs_en`). An event with no data at all is dropped and
   counted (`n_zero`). Links with no data are left out.
3. **Pack.** It writes 64-bit words into a 1024-word output FIFO. Empty BXs are skipped
   using the marks from the scan.

| word | [63:60] | content |
|---|---|---|
| Header | `A` | event number [59:36], BX of the trigger [35:24], window [23:16] |
| Input header | `1` | link [59:56], raw hit count [15:0] |
| Input data | `2` | link, BX offset in the window [55:48], TDC word [31:0] |
| Output header | `3` | link, TP count |
| Output data | `4` | link, BX offset, TP [34:0] |
| Trailer | `E` | event number, word count including the trailer [15:0] |

`daq_valid/daq_ready/daq_data/daq_last` is a plain valid/ready stream. `daq_last`
marks the trailer.

**Busy** is the OR of three conditions:
- The trigger FIFO is half full.
- The output FIFO is half full, so a complete event still fits.
- The oldest waiting trigger is within 2 × `READ_MARGIN` (256) BX of the point where
  the ring buffers overwrite its window.

`trigger_sel` drops L1As while Busy is high and counts them.

A trigger that is still within `READ_MARGIN` of that point when the packer takes it is
dropped and counted in `n_trig_lost`, not packed from overwritten data. So is a trigger
that finds the FIFO full. Every L1A therefore ends up counted as an event, a
zero-suppressed event or a lost trigger.

**Throughput limit.** The packer writes one word per cycle and spends about 4 cycles on
each non-empty BX and 3 on each non-empty link.
- An event with one BX of 3 hits and 1 TP on each of 8 links takes about 130 cycles.
  That supports about 300 kHz, not the 750 kHz L1A rate with all 8 links carrying
  data.
- Sparse events, with one link carrying data, take about 25 cycles.
- In the design, Busy protects the data when triggers come too fast.
- Reaching 750 kHz with full occupancy needs a faster packing clock or links packed in
  parallel. This is the main known departure from the target.

## Slow control

The RBCP bus is byte-wide with a 32-bit address. `sc_sel` decodes the address:

| bits | meaning |
|---|---|
| [31:28] | target: 0 BEB registers, 1 FEB (via GBT frames), 2 GBT-SCA port; others are acknowledged with data 0 |
| [27:24] | link (FEB) number |
| [22:20] | FEB FPGA select, one bit per FPGA |
| [16:1] | 16-bit register/word address |
| [0] | byte: 0 = high byte, 1 = low byte |

**BEB registers** (`bee_sc`):

| addr | register | notes |
|---|---|---|
| 0x0000 | ID | reads 0x1BEB |
| 0x0001 | CTRL | [0] DAQ enable, [1] zero suppression, [2] trigger source (1 = Trigger Module), [3] BER test mode, [4] mute channels |
| 0x0002 | FC_CMD | write-1 pulses: [0] resync, [1] reset SC path, [2] flush data path |
| 0x0003 | LATENCY | BX, 10 bits |
| 0x0004 | WINDOW | BX |
| 0x0005 | TP_OFFSET | BX |
| 0x0006 | LINK_EN | one bit per link |

Read-only status registers:

| addr | counter |
|---|---|
| 0x0010 | events sent |
| 0x0011 | zero-suppressed events |
| 0x0012 | lost triggers |
| 0x0013 | Busy |
| 0x0014 | L1As issued |
| 0x0015 | L1As suppressed by Busy |
| 0x0016 | BER errors on link 0 |
| 0x0017 | TPs dropped by the concentrator |

**FEB access** (`fee_sc`). FEB registers are 16-bit words.

Writes:
- Bytes are acknowledged at once; the FEB sends no write response.
- Words are collected for as long as the RBCP transaction stays active (`rbcp_act`),
  up to 255.
- When it ends, the words go out as one request frame plus payload frames.

Reads:
- A read of the high byte sends a one-word read request.
- It then waits for the reply frame of the selected FPGA and returns the high byte.
- The following low-byte read is served from the held word.
- With no reply within `TIMEOUT` cycles, the read returns 0xEE and is counted.

Reset SC path clears this block.

**GBT-SCA**. The SCA protocol engine is not part of this RTL. The `gbt_sc_*` port
offers it the decoded byte accesses with an acknowledge.

## BER test

With `CTRL.ber_mode` set:
- Each link sends an 80-bit counter as its downlink word.
- The FEB is expected to loop it back.
- `ber_checker` counts received words. It counts an error whenever a word is not the
  previous one plus one.

Clearing `ber_mode` resets the counters. The first words after switching on cross
frames still in flight, so read the error count after a short settling time.

## Parameters

| parameter | default | where |
|---|---|---|
| `N_LINKS` | 8 | FEBs per BEB |
| `DEMUX_DEPTH`, `SLOTS` | 16, 8 | DeMux rows (max transit delay + 1) and hits per BX |
| `MAX_SIZE`, `MAX_TP`, `TIME_WIN` | 4, 4, 328 | cluster size, TPs per link per BX, time match in fine LSB |
| `RB_DEPTH` | 1024 | ring-buffer depth in BX; must exceed latency + TP offset + 32 + 128 |
| `N_OUT_TP` | 8 | TPs per BX on the trigger output |
| `ORBIT_LEN` | 3564 | BX per orbit |

The following are design choices that are not fixed by the system requirements:
- the DeMux size,
- cluster limits and time window,
- event word formats,
- the register and address maps,
- the RBCP byte conventions,
- all FIFO depths.

Change them together with the testbenches.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends a hung run. The package
must come first on the command line:

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
    rtl/irpc_pkg.sv $(ls rtl/*.sv | grep -v irpc_pkg) tb/tb_readout_module.sv \
    --top-module tb_readout_module
./obj_dir/Vtb_readout_module
```

`tb/tb_irpc_beb_top.sv` runs the whole board at its default size (8 links), with a
behavioural model of the FEBs. It takes about 20 s. It checks each event's contents
against what was sent, and also makes each of these happen at least once:
- late and multi-frame hits re-timed by the DeMux,
- zero suppression,
- Busy and trigger suppression with a stalled DAQ link,
- the trigger-source switch,
- BC0,
- FEB slow-control write and read,
- the GBT-SCA port,
- TP output,
- BER loopback.

It fails if any of them never happened.

What is not covered:
- Real GBT link behaviour: FEC, scrambling, the serial interface.
- The SCA protocol.
- The SiTCP and 10-GbE cores.
- The Trigger Module.

These are outside this RTL and are represented only by their user-side ports.
