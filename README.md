# GERI / GBTxEMU readout chain — synthesizable core

A small, modular readout chain for detector front-end boards (FEBs carrying SMX ASICs) that
replaces two boards of the standard CBM chain: **GBTxEMU** stands in for the GBTx-based front-end
readout board, and **GERI**, a PCIe card in the DAQ PC, stands in for the common readout
interface. A **TFC model** (Time and Fast Control) provides the reference time. This RTL covers
the digital logic of that chain that can be stated without vendor IP:

* **time distribution and its check** — the TFC time counter travels TFC → GERI → GBTxEMU inside
  GBT frames, and a separate LVDS time signal with periodic *time markers* lets GBTxEMU measure,
  to about 1 ns, where the reference time actually arrives;
* **the GERI data path** — hit words from several uplinks are packed densely, buffered and cut
  into time-slice packets for the DMA engine;
* **Wishbone register banks** of both boards (ID/VER, run control, marker FIFO).

Everything runs on one 120 MHz clock with a 40 MHz frame strobe (one GBT frame period).
`rst_n` resets the whole chain. `geri_rst_n_i` and `emu_rst_n_i` re-initialize one board while
the TFC model keeps counting. A re-initialized board takes its time again from its link.

```
 TFC model                 GERI                                   GBTxEMU
 ---------                 ----                                   -------
 tfc_time_marker_gen --+-> gbt_time_inserter --> [GBT link] --> time_counter_sync --> gbt_time_inserter --> [GBT link] --> time_counter_sync
        |              |   (frame[79:24]=time)                  (GERI time)          (frame[79:24]=time)                  (GBTxEMU time)
        |                                                                                                                    |
        +-- LVDS time signal --> [cable + 960 MHz deserializer] --> time_marker_rx --(phase,time)--> sync_fifo --> wb_csr (GBTxEMU)
                                                                                                                  
 E-Link hits --> data_concentrator --> sync_fifo (data buffer) --> triv_proc (time slices) --> [DMA engine]
                                                                       ^ run
                                                                   wb_csr (GERI)
```
Parts in brackets are outside this RTL; their signals are ports of `readout_chain_top`.

## Time markers: how the synchronization is measured

This is the least obvious part of the design.

**The signal.** The TFC model keeps a time counter `t` that advances once per frame period
(25 ns). Its LVDS time signal is `t[0] XOR t[N]`: normally a square wave that changes level on
every frame boundary. When bit N changes, `t[0]` and `t[N]` flip together at the same boundary,
so that one edge is missing and the level holds for two frame periods. That double-length level
is the *marker*. It appears every 2^N frames, and its centre (where the missing edge would have
been) coincides with the change of bit N. N is selectable (`tfc_mark_bit_i`; 0 selects the
default 10).

**The receiver** (`time_marker_rx`, in GBTxEMU). The signal is sampled at 960 MHz; a
deserializer delivers 8 samples per 120 MHz clock (`sync_in_data`, bit 0 earliest). Three clocks
make a frame, and `frame_stb` marks the first of them (the one following the active edge of the
recovered reference clock). A sample therefore has a phase `0..23` within the frame, one step
being 25 ns / 24 ≈ 1.04 ns. For every word the receiver:

1. finds the first level change (comparing with the last sample of the previous word);
2. computes the length of the level that has just ended, in samples;
3. if that length lies in 36..60 samples (1.5 to 2.5 frames) it is a marker: the centre phase is
   `(phase of the edge that started it + length/2) mod 24`;
4. emits `{phase, GBTxEMU time counter}` one clock later, if enabled by CTRL.run.

With an ideal signal every edge, and so every marker centre, has the same phase; the spread of
the reported phases is the timing jitter, and a jump shows a change of the clock/link delay. The
time value tells which counter value GBTxEMU held when the marker passed. Since the marker is
tied to a change of bit N of the TFC counter, `time mod 2^N` is the total latency of the time
distribution. The software reads these records through Wishbone and watches both numbers stay
constant.

**Where the time counter travels.** `gbt_time_inserter` writes the sender's counter into bits
[79:24] of the 80-bit GBT data field (bits [23:0] keep the normal downlink payload).
`time_counter_sync` on the receiving board keeps a local counter: on each frame with a valid link
it compares the received value with its own count + 1, reloads on a mismatch and counts the
correction (`*_resync_cnt_o`); `*_locked_o` is high while the two agree. Per hop the latency is
one frame in the sender's register, the link latency, and one frame in the receiver's register.

## GERI data path

**`data_concentrator`** takes N W-bit inputs (default 16 × 32 bits; the top uses 8 uplinks), of
which any subset is valid in a given clock. Valid words are appended in input order after the
words already waiting, and every time N words are present one dense N-word row leaves. Empty
slots never reach the output, and because at most N words enter and one N-word row can leave per
clock, the inputs never need to be stalled. Words wait inside until later ones complete a row
(there is no flush). Internally it uses a prefix count and a 2N-slot staging array, which is
the plainest structure with this behaviour. A dedicated interconnection network would do the
same job with less logic for large N.

**`sync_fifo`** (16 rows) absorbs the rows while the packetizer inserts headers or trailers or the
DMA stalls; rows that arrive while it is full are dropped and counted (`dbuf_overflow_o`).

**`triv_proc`** cuts the row stream into time slices of `SLICE_LEN` ticks of the GERI time counter
(default 4 000 000, i.e. 100 ms at 40 MHz). Each slice is one packet of 256-bit rows, with 64-bit
words and word 0 in the low bits:

| row     | word 0                           | word 1     | words 2, 3 |
|---------|----------------------------------|------------|------------|
| header  | `{slice[31:0], 32'h579acce7}`    | start time | 0          |
| data    | concentrated hit words           |            |            |
| trailer | `{slice[31:0], 32'hed9acce7}`    | end time   | 0          |

Boundaries are exact: a slice starting at T ends at T + SLICE_LEN and the next header carries
that same time, even if the output was stalled when the boundary passed. Clearing CTRL.run closes
the open slice immediately with the current time as its end; setting it opens a new slice at the
current time. Slice numbers keep counting across stops. Output uses valid/ready and a row is held
until taken.

## Registers (`wb_csr`)

Classic Wishbone, 32-bit data, word addresses, ack one clock after `cyc & stb`; the master leaves
one idle clock between accesses.

| addr | name    | access | content |
|------|---------|--------|---------|
| 0x00 | ID      | RO | `0x1ed91fca` on both boards |
| 0x01 | VER     | RO | GERI `0xadd15038`, GBTxEMU `0x52c6231d` |
| 0x02 | CTRL    | RW | [0] run: GERI data reception / GBTxEMU marker capture |
| 0x03 | STATUS  | RO | [0] FIFO empty, [1] full, [15:8] count, [31:16] overflows |
| 0x04 | MARK_HI | RO | `{3'b0, phase[4:0], time[55:32]}` of the oldest marker |
| 0x05 | MARK_LO | RO | `time[31:0]` of the oldest marker; reading pops it |

On GERI the FIFO fields read as empty.

## Files

| file | contents |
|------|----------|
| `rtl/readout_pkg.sv` | frame layout, Wishbone structs, register map, magic words |
| `rtl/readout_chain_top.sv` | the three boards wired together |
| `rtl/tfc_time_marker_gen.sv` | TFC time counter and time signal |
| `rtl/gbt_time_inserter.sv`, `rtl/time_counter_sync.sv` | time transport over GBT frames |
| `rtl/time_marker_rx.sv` | 960 MHz marker phase measurement |
| `rtl/sync_fifo.sv` | FIFO (marker records, data buffer) |
| `rtl/wb_csr.sv` | register bank |
| `rtl/data_concentrator.sv`, `rtl/triv_proc.sv` | GERI data path |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_data_concentrator_n32.sv` | the concentrator with 32 inputs |
| `tb/tb_sync_reinit.sv` | the synchronization check across board re-initializations |

`readout_chain_top` parameters: `N_LINKS` (8), `HIT_W` (32), `SLICE_LEN` (4 000 000),
`MARK_BIT` (10), `DBUF_DEPTH` (16), `MFIFO_DEPTH` (16).

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself (a watchdog counts a
failure if it hangs). With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/readout_pkg.sv \
          tb/tb_readout_chain_top.sv --top-module tb_readout_chain_top -Mdir obj_top
./obj_top/Vtb_readout_chain_top
```

Use the same command with another `tb/tb_*.sv` for a single block. `tb_readout_chain_top` runs the top
with all defaults: about 12 million clocks, roughly 15 s. It covers one complete 4 000 000-tick
slice and a stop/restart of reception. It also covers a longer GERI→GBTxEMU link, which costs
exactly one resync and shifts the marker times by −2. Other events it covers: about 4000 markers,
a marker-FIFO overflow, DMA back-pressure and a data-buffer overflow. Along the way it checks the
data words in order, the packet fields and every marker phase.
The link, cable and deserializer models live in that testbench.

`tb_sync_reinit` repeats the synchronization measurement with ±1 sample of edge jitter on the
time signal. It re-initializes GBTxEMU, then GERI, then both. After each step every marker phase
must lie within one sample of the first measurement, and the latency (`time mod 2^10`) must be
unchanged.

## What is modelled differently or left out

* **Clocks.** The real boards recover the reference clock, clean it with an external PLL and
  derive 120/960 MHz clocks; here there is one clock and a frame strobe, so clock-domain
  crossings and real phase drift are not modelled. The deserializer is a vendor I/O primitive and
  appears only as the `emu_sync_in_data_i` port.
* **GBT links** (encoding, scrambling, FEC, frame-clock alignment) are not included; the top
  exposes the 80-bit data fields. The exact position of the time field (bits [79:24]) follows the
  receiver-side signal of the original system. Whether that field is bit-reversed on the link is
  left open.
* **Marker definition.** Reading "inverted when the selected bit changes" as `t[0] XOR t[N]` is
  an interpretation; so is recording the centre of the long level and taking the time value at
  the clock that ends it.
* **Data concentrator.** Same input/output behaviour as a network-based concentrator, but built
  from a prefix count and a staging array, not from its interconnection network; it has no flush.
* **Not in this RTL:** the DMA engine and its PCIe–Wishbone bridge (the top has a valid/ready row
  stream and plain Wishbone ports instead), the SMX configuration controller (HCTSP), E-Link
  receivers and their 80/160 MHz clocking and pin routing, and the front-end ASICs (hits enter as
  `hit_valid_i`/`hit_data_i`).
* **Choices without a reference value:** the 56-bit time counter, the FIFO depths, the register
  addresses and layouts, the resync policy, the stop/restart behaviour of the slicer, and the
  marker window of 36..60 samples.
