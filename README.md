# VDOS receiver: Ethernet and E1 voice from one VC-12 virtual concatenation group

SDH networks were built for voice, but virtual concatenation (VCAT) lets a
group of small SDH containers carry packet data. This receiver takes a
single group of six VC-12 containers (VC-12-6v) and splits it two ways:

* members 1-5 carry a GFP-framed 10 Mbit/s Ethernet stream, spread over the
  five members byte by byte;
* member 6 carries one E1 (PCM-30, 2048 kbit/s) voice signal.

Because voice and data share one group, one receiver and one set of buffers
serve both. Each member may travel a different route through the
network, so the members reach the receiver with different delays. The core
of the design is how it removes that *differential delay*. Every member is
written into its own 64 ms buffer. A controller finds, in each buffer, the
multiframe that carries the same sequence number. All buffers are then read
out in step from those positions.

```
 din[0..4] ──► mem_block ×5 ─┐                ┌─► dout1 / dout1_valid  (clk2, Ethernet)
 din[5]    ──► mem_block     ├─► data_block ──┤
 fin1 ─────► (all)           │                └─► dout2 / dout2_valid  (clk3, E1)
 fin2, din ─► controller ── en[ ], add[ ], reset2 ─► mem_blocks, data_block
```

All RTL is SystemVerilog-2017 in `rtl/`; self-checking testbenches are in `tb/`.

## The incoming streams

Each member arrives as a byte stream on `din[i]`, one byte per `clk1` cycle.
`clk1` is the VC-12 byte clock: 2240 kbit/s / 8 = 280 kHz. The stream is a
sequence of VC-12 *multiframes*. Each multiframe is 140 bytes long and lasts
500 us. It is made of four 35-byte frames:

| multiframe byte | content |
|---|---|
| 0, 35, 70, 105 | path overhead V5, J2, N2, K4 |
| the other 34 bytes of each frame | C-12 container |

Two strobes, common to all six members, mark positions in the stream:

* `fin1` marks byte 0 (V5), the start of a multiframe;
* `fin2` marks the byte holding the member's sequence number. The
  testbenches put it in K4 (byte 105), but the RTL only follows `fin2`.

Because the strobes are shared, the members must arrive frame-aligned.
Upstream pointer processing, which this design leaves out, is expected to
do that. Differential delay therefore appears as a whole number of
multiframes: member *i* shows multiframe *t − D[i]* of the transmitter while
the fastest member shows *t*.

The sequence number is one byte that grows by one per multiframe, modulo
256, like the VCAT multiframe indicator. Member order is fixed by port:
`din[0]` is member 1, and so on. The design does not reorder members.

## Aligning the members

### Slots

Every memory block and the controller track the same *slot*: the multiframe
number modulo 128. Each has a copy of the helper `vdos_mf_counter`, and all
copies see the same `fin1` and resets, so they always agree. The first
multiframe after a reset goes to slot 0. Each later `fin1` starts the next
slot. If a `fin1` is missing, the counter moves on by itself after 140
bytes. 128 slots × 500 us = 64 ms of buffer, which bounds the differential delay
the design can absorb (see the timeout below).

### Hunt

On every `fin2` cycle, the controller stores each member's sequence byte in
that member's 128-entry table, at the current slot. The members form two
groups that are handled independently:

* the **data group**, members 1-5;
* the **voice group**, member 6 alone.

In the HUNT state, when a member's sequence byte equals `SYNC_SEQ` (8'h78),
the controller records that slot as the member's `loc`. When every member of
a group has a `loc`, the group goes to SYNC:

* `en` goes high for the group's memories;
* `add[i] = loc[i]` for each of them.

Each memory then starts reading at byte `add*140`, the start of the
multiframe in which its member carried 8'h78. From then on all memories of
the group output the same transmitter multiframe in the same clock cycle.

Take the most-delayed member. It finds 8'h78 in the slot it is writing at
that moment. Its memory starts reading that slot about 106 bytes behind the
write pointer. Read and write then advance at the same rate, so the read
never overtakes the write.

### Check while in sync

At the start of every multiframe that the memories read, the controller
compares each member's stored sequence byte for the slot being read with
`SYNC_SEQ + k`, where *k* is the number of multiframes read since lock,
modulo 256. A single mismatch in any member (data or voice) drops `en`
and issues `reset2`.

The check has to be made at the start of the multiframe. Consider the least
delayed member when the delay spread is at its limit of 127 multiframes.
That member's memory reads its oldest slot while the writer is only 31
bytes behind, so the writer replaces the slot's sequence byte before the
slot has been read to the end.

### `reset2`

`reset2` is a one-cycle pulse. It does three things:

* clears all six memories: every slot is marked empty and reading stops;
* resets the data block's buffers;
* resets the controller itself.

The hunt then starts again at the next `fin1`, with slot numbering from 0.
`reset2` is also issued when a hunt takes too long. The 64 ms window is
counted from the first member of a group that found 8'h78. If the other
members of that group have not found it when the 128th multiframe after
that begins, the controller issues `reset2`, because the buffer is about
to overwrite the slot where the first member found it. So the largest
differential delay that can lock is 127 multiframes (63.5 ms).

The 8-bit sequence number repeats every 256 multiframes (128 ms). That
creates an ambiguity after a reset. If the first member to find 8'h78 shows
an older transmitter multiframe than the others, the members are more than
64 ms apart in what they show. The hunt then times out once, and the next
attempt locks correctly. The end-to-end testbench goes through exactly this
case.

### Timing

`en` rises on the second `clk1` edge after the `fin2` cycle that completes a
group. A memory's first byte leaves two cycles after that.
`mismatch` and `timeout` are one-cycle status pulses that come out together
with `reset2`.

## Memory block (`vdos_mem_block`)

Each memory block is a 17,920-byte circular RAM (128 slots × 140 bytes),
with one write and one read per `clk1` cycle:

* **Write:** the member's stream is written continuously at
  `slot*140 + byte`. Once the RAM is full, each new multiframe overwrites
  the oldest one.
* **Read:** when `en` is first seen high, the read pointer loads `add*140`.
  The block then streams one byte per cycle, slot after slot, for as long
  as `en` stays high.
* **Outputs:** `dout_sof` marks byte 0 of every multiframe. `dout_valid` is
  low for a slot that has not been written since the last reset.

"Clearing" the memory on `reset2` clears one flag per slot. The RAM
contents themselves are not erased.

## Data block (`vdos_data_block`)

The data block counts the position of each aligned byte in its multiframe
and drops what is not payload:

* **Data members:** only the four path-overhead bytes are dropped. That
  keeps 34 bytes per frame, or 136 per multiframe: 2176 kbit/s per member,
  10.88 Mbit/s for five.
* **Voice member:** three bytes of every frame are dropped:
  * the overhead byte (frame byte 0);
  * frame byte 1, which holds fixed stuff or justification control;
  * frame byte 34, which is fixed stuff.

  That keeps frame bytes 2-33, 32 per frame, or 128 per multiframe. This is
  exactly 2048 kbit/s: the nominal-rate asynchronous E1 mapping, with S1 as
  stuff and S2 as data.

Each member's kept bytes go into its own 16-byte dual-clock FIFO. These
FIFOs use Gray-coded pointers and two-flop synchronisers.

* **Ethernet output:** `dout1` reads the five data FIFOs in turn, one byte
  from each: m1, m2, m3, m4, m5, m1, … This reverses the byte interleaving
  that VCAT applies at the sender. The result is the GFP-framed Ethernet
  byte stream, in the `clk2` domain.
* **Voice output:** `dout2` is member 6's FIFO, read straight out in the
  `clk3` domain.

Both outputs are 8 bits wide with a valid strobe. If an output clock is too
slow, a FIFO overflows: the byte is dropped and `ovf` stays set until the
next reset.

## Clocks and rates

| clock | domain | requirement |
|---|---|---|
| `clk1` | input, memories, controller | VC-12 byte clock (280 kHz in the real system) |
| `clk2` | Ethernet output | ≥ 680/140 = 4.86 × the `clk1` byte rate (≥ 1.36 MHz) |
| `clk3` | E1 output | ≥ 128/140 × `clk1` (the 256 kHz E1 byte clock) |

Across the clock domains, reset is asserted asynchronously and released
synchronously in each domain.

## Top level `vdos_rx`

| port | dir | width | meaning |
|---|---|---|---|
| `clk1`, `clk2`, `clk3` | in | 1 | see above |
| `reset1` | in | 1 | synchronous to `clk1`, active high |
| `fin1`, `fin2` | in | 1 | V5 marker, sequence-byte marker |
| `din` | in | 6 × 8 | member streams (`din[0..4]` data, `din[5]` voice) |
| `dout1`, `dout1_valid` | out | 8, 1 | Ethernet (GFP) bytes, `clk2` |
| `dout2`, `dout2_valid` | out | 8, 1 | E1 bytes, `clk3` |
| `en` | out | 6 | per-memory enable (status) |
| `reset2`, `mismatch`, `timeout` | out | 1 | resynchronisation pulse and its cause |
| `ovf` | out | 1 | output FIFO overflow (sticky) |

| parameter | default | meaning |
|---|---|---|
| `N_LANES` | 6 | members in the group |
| `N_DATA` | 5 | members carrying Ethernet; the rest is the one voice member |
| `MF_SLOTS` | 128 | buffer depth in multiframes (64 ms) |
| `MF_BYTES` | 140 | VC-12 multiframe length |
| `SYNC_SEQ` | 8'h78 | sequence value the hunt looks for |
| `FIFO_DEPTH` | 16 | bytes per output FIFO (power of two) |

Shared constants and the overhead-position functions live in
`rtl/vdos_pkg.sv`. The overhead positions assume VC-12 framing, so
`MF_BYTES` should stay 140.

## How far to trust it, and where it is this design's own

The following come from the receiver as originally specified:

* the block structure (six memories, controller, data block);
* the 128 × 140-byte buffer per member;
* slot addressing (`add = 1` means byte 140);
* hunting for 8'h78 on the `fin2` byte, with one address per memory;
* separate voice alignment;
* overwriting when full;
* `reset2` on mismatch and after 64 ms without sync;
* the round-robin output of m1..m5 and the direct output of m6.

The following are choices made here. Change them if your system differs.

* **`en` is a level.** It is held high while in sync; the memories start on
  its rising edge. A one-cycle enable pulse would also fit the original
  description.
* **Enable and `reset2` wiring.** `en` has one bit per memory, because voice
  and data lock separately. There is a single shared `reset2`, so a voice
  error also restarts the data group.
* **The in-sync check** assumes the sequence number grows by one each
  multiframe.
* **Sequence bytes are not output.** The controller does not output the
  sequence bytes it stores.
* **`add` is a 7-bit slot number,** not a byte address.
* **Byte-wide data paths.** Inputs and outputs are bytes with strobes, not
  bit-serial lines.
* **E1 demapping is byte-level at the nominal rate.** Positive or negative
  justification (the C and S bits) is not acted on. An E1 whose clock
  differs from nominal would slip.
* **Out of scope:**
  * the VCAT SQ field (member identity);
  * LCAS;
  * GFP frame delineation;
  * pointer processing: the streams must arrive frame-aligned with shared
    `fin1`/`fin2`.

## Verification

Each testbench computes its expected values independently of the RTL,
prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_vdos_mem_block` | Two-cycle read latency, start at `add*140`, byte order across slot and RAM wrap, overwrite of the oldest multiframe, `reset2` emptying the buffer and restarting slot numbering. |
| `tb_vdos_controller` | Lock at exactly two cycles after the completing `fin2`, `add[i]` for delays up to 127 multiframes, `en` held for 380 multiframes, data and voice mismatches, timeout at exactly the 128th multiframe after a partial find (twice), independent voice lock. |
| `tb_vdos_data_block` | Overhead and stuff removal, Ethernet de-interleaving, E1 extraction, byte counts per multiframe, voice starting later than data, overflow when `clk2` stops, recovery after reset. |
| `tb_vdos_rx` | Full-size end-to-end run with real clock periods and no parameter overrides; see below. |
| `tb_vdos_rx_maxdelay` | The delay limit at full size. With 127 multiframes between members, both groups lock and every output byte is checked over 300 multiframes. With 128, the data group never locks and the hunt keeps timing out. |

The `tb_vdos_rx` run covers:

* a transmitter model of the whole VC-12-6v group, with member delays of
  0-110 multiframes (55 ms);
* lock of both groups, with every output byte checked;
* Ethernet and E1 rates (680 and 128 bytes per multiframe) measured over
  100 multiframes;
* buffer overwrite;
* a corrupted sequence byte leading to mismatch and `reset2`;
* the hunt timeout that follows, and the relock after it.

It counts each of these events and fails if one never happens. It simulates
about 0.55 s of traffic (1100 multiframes) in well under a second.

To run one with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -Irtl rtl/vdos_pkg.sv tb/tb_vdos_rx.sv --top-module tb_vdos_rx
./obj_dir/Vtb_vdos_rx
```

Verilator prints `SYNCASYNCNET` lint warnings for the reset synchronisers in
the data block. They are expected: the reset is asserted asynchronously and
released synchronously, and the clk1-domain logic uses the same reset
synchronously.

## Files

| file | content |
|---|---|
| `rtl/vdos_pkg.sv` | constants, VC-12 overhead / E1 payload position functions |
| `rtl/vdos_mf_counter.sv` | slot/offset tracker shared by memories and controller |
| `rtl/vdos_mem_block.sv` | 64 ms differential-delay buffer |
| `rtl/vdos_controller.sv` | hunt / sync FSM, sequence tables, `reset2` |
| `rtl/vdos_async_fifo.sv` | dual-clock byte FIFO |
| `rtl/vdos_data_block.sv` | overhead removal, de-interleaving, output clock domains |
| `rtl/vdos_rx.sv` | top level |
| `tb/tb_*.sv` | testbenches as above |
