# STC logic: host-visible memories and control of a silicon track card

The STC (silicon track card) is the FPGA logic of a trigger board that receives
strip data from eight SMT (silicon microstrip tracker) readout channels, finds
clusters and centroids in them, looks hits up in a road memory and hands the
results to a level-3 (L3) event builder. Everything that logic needs to run is
downloaded by a host through one 18-bit byte address space: per-channel
correction and threshold tables, a test-data player, an 8-Mbyte road memory
protected by check bits, a 4-Mbyte L3 event buffer and a set of control and
status registers.

This RTL implements that address space and every memory, register and
mechanism behind it: the decode, the tables with their data-path lookup ports,
the road-word error correction, the L3 event buffer with its FIFO-style read
window, the monitor counters, the test-data playback and the command/status
registers. The clustering data path itself, the host bus bridge and the L3
event builder are not part of it; their signals are ports of `stc_top`.

## Address map

The host address is a byte address; all registers are 32 bits wide and word
aligned.

| Address bits 17:16 | Range             | Contents                                                        |
|--------------------|-------------------|-----------------------------------------------------------------|
| 0                  | 0x00000-0x0FFFF   | road memory, one 64-kbyte page selected by ROAD-PA              |
| 1                  | 0x10000-0x1FFFF   | L3 memory, one 64-kbyte page selected by L3-PA (debug access)   |
| 2                  | 0x20000-0x27FFF   | L3-DATA read window (oldest L3 event)                           |
| 2                  | 0x28000-0x2807F   | control registers                                               |
| 3                  | 0x30000-0x3FFFF   | channel logic: bits 15:13 = channel 0..7, bits 12:0 = offset    |

Inside a channel (offset = address bits 12:0):

| Offset        | Memory        | Contents                                                                  |
|---------------|---------------|---------------------------------------------------------------------------|
| 0x1B00-0x1B3C | MONITOR       | 16 read-only 32-bit counters (strips of chips 0-8, VTM errors, sequencer/HDI mismatches, chip-id format errors, undefined/stereo/axial/90-degree centroids) |
| 0x1AA0/0x1AA4 | SEQ-HDI       | HDI id (bits 2:0) and sequencer id (bits 7:0); mirror copies read in 18:16 / 23:16 |
| 0x1A88-0x1A9C | THRESHOLD     | stereo, axial and z clustering thresholds 1 and 2 (bits 7:0); mirrors in 23:16 |
| 0x1A40-0x1A7C | DATA-TYPE     | 2-bit type per chip id 0..15 (00 illegal, 01 stereo, 10 axial, 11 Z); bit 15 = channel receives 90-degree (Z) strips |
| 0x1A04-0x1A3C | PULSE-AREA    | 7 axial and 7 z-and-stereo 11-bit energy thresholds (0x1A00, 0x1A20 unused) |
| 0x1800-0x191C | BAD-CHANNEL   | 16 strips per word, word = 8*chip + group; reads show {chip, group} in 22:16 |
| 0x1000-0x17EF | TEST LUT      | 508 words of test data, one copy per channel pair (address bit 13 ignored) |
| 0x0000-0x08FF | GAIN-OFFSET   | corrected 8-bit value for chip (bits 11:8) and raw ADC value (bits 7:0)  |

Unassigned addresses read 0 and ignore writes.

## Road memory and its check bits

The road memory answers "given this track-road address, which centroid
numbers lie on the road?". A 23-bit byte address selects a word:

| Byte address bits | Field                                    |
|-------------------|------------------------------------------|
| 22                | bank (bank 1 is a copy of bank 0)        |
| 21                | sign S                                   |
| 20:19             | Pt bin                                   |
| 18:16             | extended Pt information                  |
| 15:10             | relative phi                             |
| 9:5               | relative sector                          |
| 4:2               | STC channel                              |
| 1:0               | always 0                                 |

A word holds the lower centroid number in bits 10:0, the upper one in bits
21:11, and ten check bits in 31:22, five per 11-bit half. The host computes the
check bits when it downloads (the equations are in `stc_pkg::ecc_half` and in
`road_ecc_enc`); the hardware only checks them.

The five check bits of a half form a SECDED code: number the 15 positions of a
Hamming(15,11) word 1..15, put the data bits d0..d10 at the non-power-of-two
positions 3,5,6,7,9,10,11,12,13,14,15, and let check bit k (k = 0..3) be the
parity of the data bits whose position has bit k set; check bit 4 makes the
parity of all 16 bits even. Check bits 0 and 2 of each half (word bits 22, 24,
27, 29) are stored inverted, so an all-zero word is not a valid code word and
reads of unwritten or stuck-at-zero memory are caught.

`road_ecc_dec` undoes the inversion, recomputes the four Hamming bits and
forms the syndrome:

* overall parity odd: one bit flipped. A syndrome naming a data position
  flips that bit back; a syndrome of 0 or a power of two means a check bit was
  hit and the data are already right. The word is counted as correctable.
* overall parity even, syndrome non-zero: two bits flipped; counted as not
  correctable and passed on unchanged.

Each half is checked on its own, so one error in each half is corrected.

`road_mem` wraps the memory:

* **Download.** The host sees a 64-kbyte page; ROAD-PA (register bits 6:0)
  supplies byte-address bits 22:16. A write to a bank-0 address stores the word
  in both banks, so only bank 0 has to be downloaded. A write to a bank-1
  address changes bank 1 only. Host reads return the raw stored word.
* **Lookup.** `lk_req` with `lk_bank` and the address fields (`road_addr_t`)
  reads the word. Two clocks later `lk_valid` comes with the corrected
  `lk_lower`/`lk_upper`. A correctable error sets MISC-CSR status bit 1 and a
  non-correctable one sets bit 2. Both stay set until command bit 1 clears
  them.

## L3 event buffer and the L3-DATA window

The L3 memory (4 Mbytes, 2^20 words) is used as a circular buffer for the L3
data that the event builder produces. The builder writes one word per `ev_we`
and marks the last word of an event with `ev_last`. The word count of each
finished event goes into a count queue of 256 entries.

The host reads events through the L3-DATA window 0x20000-0x27FFF, which
behaves like a memory that shows one event at a time:

* a read at 0x20000 + 4*i returns word i of the oldest event;
* register 0x28024 returns that event's word count (0 when no event waits);
* a read at or beyond the word count returns 0 and changes nothing, so reading
  over the end is harmless, and any word of the event may be read again;
* reading the last word (i = count - 1) retires the event. The next read of
  0x20000 or 0x28024 already shows the next event.

MISC-CSR status bit 0 says an event is waiting. Bit 7 says the buffer is
full, either because the memory has no free word or because the count queue
is full. Words that arrive while the buffer is full are dropped, so the source
must respect the flag. For debugging, the host can read and write any word
directly through the 0x10000 page. L3-PA (bits 5:0) supplies byte-address bits
21:16.

## Control registers (0x28000-0x2807F)

| Offset | Register    | Fields                                                                 |
|--------|-------------|------------------------------------------------------------------------|
| 0x00   | L3-PA       | bits 5:0 = L3 byte-address bits 21:16                                   |
| 0x04   | ROAD-PA     | bits 6:0 = road byte-address bits 22:16                                 |
| 0x08   | RUN-CTL     | set/reset register, see below                                           |
| 0x0C   | MISC-CSR    | write: command pulses in 15:0, plain register in 31:16; read: status in 15:0, register in 31:16 |
| 0x10   | INIT-TIME   | bits 11:0, SCL init timer value                                         |
| 0x14   | FRC-DL      | bits 7:0 FRC/SMT timing skew, 15:8 module location                      |
| 0x18   | L3-CONF     | bits 9:0 unbiased-L3, 25:16 normal-L3 configuration                     |
| 0x1C   | SEC-OFFSET  | bits 6:0 sector offset (0x48 in crate 1, below 0x40 elsewhere)          |
| 0x20   | TEST        | bits 7:0 FRC/VTM test skew, 8 internal test clock, 9 FRC data from LRB   |
| 0x24   | word count  | word count of the oldest L3 event (read only)                           |
| 0x40-0x7C | LRB monitor | 16 words of 32 bits                                                 |

**RUN-CTL** is a set/reset register. Writing a 1 to bit n (n < 16) sets bit
n, writing a 1 to bit m (m > 15) clears bit m-16, and 0s change nothing, so
several software agents can flip bits without read-modify-write. The bits are:

* 0: run
* 1: test mode
* 2: unused, reads 0
* 3: SCL-READY
* 4: ZVC enable
* 5: accept data with a bad chip id
* 6: three-strip centroids
* 7: internal buffer control
* 15:8: channel enables, all off after reset

Reads also show SCL-DONE (an input) in bit 19 and the design version
(parameter `VERSION`) in bits 31:24.

**MISC-CSR commands** last one clock:

* 0: reset all control and channel logic
* 1: clear the road error flags
* 3: clear the event mismatch flags
* 4: MONITOR-START
* 5: test start

**MISC-CSR status** bits:

* 0: L3 data available
* 1: road correctable error
* 2: road non-correctable error
* 4: MONITOR-DONE, for all channels
* 5: hit buffer full (input)
* 6: Z-centroid buffer full (input)
* 7: L3 buffer full
* 15:8: event mismatch flags of channels 7..0, held until cleared

The reset-all command clears every register one clock after the write. That
includes the counters, flags, pointers, playback state and the per-channel
threshold, data-type, pulse-area and id registers. The array memories keep
their contents: gain/offset, bad channel, Test LUT, road and L3 data.

## Per-channel tables and their data-path ports

Each `stc_channel` gives the clustering logic (outside this design) the
following ports:

* **Gain/offset** (`go_chip`, `go_vtm` -> `go_corr`, one clock). The corrected
  value for raw value v of chip c is byte v mod 4 of the word at
  {c, v/4}. Chip ids above 8 return 0.
* **Bad channel** (`bc_chip`, `bc_strip` -> `bc_bad`, one clock). Strip s of
  chip c is bit s mod 16 of word 8c + s/16.
* **Data type** (`dt_chip` -> `dt_type`, `dt_discard`, combinational). A chip
  whose type is 00 is illegal. Its data are to be discarded unless RUN-CTL
  bit 5 (accept bad chip) is set.
* **Pulse area** (`pa_energy`, `pa_axial` -> `pa_code`, combinational). The
  3-bit code is the number of the seven thresholds of the selected set (axial,
  or z-and-stereo) that the cluster energy reaches.
* **Thresholds, sequencer and HDI ids** (`thr`, `seq_id`, `hdi_id`). These
  come from the mirror registers. Each host write stores a primary copy and a
  mirror copy in the same clock, and a read shows both, so software can check
  that they agree.
* **Z/stereo bit** (`z_not_stereo`). It is set when data type 11 (Z) is
  written for any chip and cleared when 01 (stereo) is written. It reads back
  as bit 15 of every data-type word.
* **Monitor** (`mon_events`). Counter k adds one in each clock its strobe is
  high. MONITOR-START copies all 16 counters into the read-only registers in
  one clock, restarts the counters from zero and raises MONITOR-DONE until
  the next start.

## Test-data playback

A Test LUT serves a channel pair (0/1, 2/3, 4/5, 6/7). Each word holds:

* bits 7:0: data for the even channel
* bits 15:8: data for the odd channel
* bits 19:16: CAV, DAV, LNKRDY and ERROR
* bit 20: END OF FILE
* bit 21: STOP, marking the last word of an event

A file is stored from location 0 upward. Its last word has STOP and END OF
FILE both set.

A test start (MISC-CSR bit 5) while test mode (RUN-CTL bit 1) is set plays
the file from location 0. Words appear on `tw[pair]` with `tw_valid`, and
`tw_event_end` marks the words with STOP. Playback ends after the END OF FILE
word or the 508th location.

The pacing depends on bit 8 of the TEST register:

* set: the internal test clock is used, one word per clock, starting two
  clocks after the command write;
* clear: one word goes out for each clock in which that pair's
  `vtm_strobe` input is high, one clock after the strobe. Without strobes,
  playback waits.

## Interfaces and timing

* One clock, `clk`; synchronous active-high reset `rst`.
* Host bus: `bus_req` (`stc_pkg::bus_req_t`: `rd`, `wr`, `addr[17:0]`,
  `wdata`) is valid for one clock per access. Writes take effect at the next
  edge. Read data come on `bus_rdata` with `bus_rvalid` two clocks after `rd`.
  One access per clock is accepted, with no wait states.
* Inside the design every block answers reads one clock after the request.
  `stc_top` adds one output register.
* Inputs for parts not designed here: `mon_events`, `mismatch`, the lookup
  requests, `ev_*`, `vtm_strobe`, `hit_buf_full`, `zc_buf_full`, `scl_done`. The
  configuration registers are also brought out as outputs (`run_ctl`,
  `init_time`, `frc_dl`, `l3_conf`, `sec_offset`, `test_reg`, `lrb_mon`) for
  that logic to use.

## Parameters and sizes

| Module        | Parameter         | Default | Meaning                                         |
|---------------|-------------------|---------|-------------------------------------------------|
| `stc_top`     | `NCH`             | 8       | channels                                        |
|               | `ROAD_AW`         | 21      | road word-address width (2 banks of 2^20 words, 8 Mbytes) |
|               | `L3_AW`           | 20      | L3 word-address width (4 Mbytes)                |
|               | `VERSION`         | 1       | design version in RUN-CTL bits 31:24            |
| `l3_buffer`   | `EVQ_DEPTH_LOG2`  | 8       | log2 of the number of queued L3 events          |
| `test_lut`    | `DEPTH`           | 508     | words per Test LUT                              |
| `bad_channel_lut`, `gain_offset_lut`, `stc_channel` | `NCHIP` | 9 | chips per ladder |

All defaults are the full sizes. The 8 + 4 Mbytes of memory are plain arrays.
On an FPGA they map to external SRAM or block RAM, which would add read
latency that the lookup pipeline would then have to absorb.

## Departures and choices

The following are this design's own choices where the specification leaves
the behaviour open. They are the first things to revisit when matching an
existing board:

* the host bus protocol and its two-clock read latency;
* reset-all clears registers but not array memories;
* the monitor latch restarts the counters and counts one per strobe clock;
* the Z/stereo bit rule;
* the pulse-area code counts the thresholds reached (>=);
* bit order inside a bad-channel word;
* the internal test clock is taken to be the system clock, and a VTM strobe
  is a one-clock-wide input per channel pair;
* a single road lookup port with a bank input; host reads of the road memory
  are not corrected;
* the L3 window allows any offset inside the event, with no 256-byte limit on
  moving back, and drops words when the buffer is full;
* the word-count register is read only;
* unassigned register bits are not stored;
* SEC-OFFSET, INIT-TIME, FRC-DL, L3-CONF, the LRB monitor words and TEST
  bits other than 8 are stored and brought out, but nothing inside uses them: how the sector offset
  enters the road address, and what the SCL init timer does, are not
  specified.

Not built: the clustering and centroid data path, the SMT/VTM receivers, the
L3 event builder, the host bus bridge, and the FRC test-data memory (which
sits in a separate interface chip).

## Files

`rtl/`, bottom-up:

* `stc_pkg.sv`: bus request type, address constants, data-type enum, road
  address and test-word structs, check-bit function
* `road_ecc_enc.sv`, `road_ecc_dec.sv`: road-word check-bit generation and
  SECDED check
* `road_mem.sv`: road memory, page access, bank copy, lookup, error flags
* `l3_buffer.sv`: L3 memory as event buffer, L3-DATA window, word count
* `ctrl_regs.sv`: control registers and commands
* `chan_monitor.sv`, `chan_misc.sv`, `bad_channel_lut.sv`, `gain_offset_lut.sv`:
  per-channel memories
* `test_lut.sv`: Test LUT and playback
* `stc_channel.sv`: one channel's decode
* `stc_top.sv`: the whole design

`tb/` has one self-checking testbench per module (`<module>_tb.sv`) and two
end-to-end tests sharing `stc_top_body.svh`:

* `stc_top_tb`: reduced memories, 2^12 road words and 2^10 L3 words
* `stc_top_full_tb`: all defaults

The end-to-end sequence:

* downloads tables into all eight channels and reads them back;
* plays the two-event example SMT test file, once on the internal test
  clock and once paced by VTM strobes;
* downloads and looks up road words with zero, one and two flipped bits;
* passes two L3 events through the buffer, including a read over the end;
* latches the monitor;
* exercises illegal-chip discard and accept, the mismatch flags, RUN-CTL
  set/reset and the soft reset.

It counts each of these mechanisms and fails if one never happened. Every
testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module stc_top_tb \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/stc_pkg.sv tb/stc_top_tb.sv
./obj_dir/Vstc_top_tb
```

Replace `stc_top_tb` by any other testbench name. The package must be listed
first, because the modules import it. The full-size end-to-end test builds
and runs in a few seconds.
