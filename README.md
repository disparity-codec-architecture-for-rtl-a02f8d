# Disparity map codec for a constant-bit-rate ATM link

A 3D videoconferencing terminal can synthesise an intermediate viewpoint
from two camera images if it also receives a *disparity map* for each frame.
Here the map comes from a disparity estimator as a CCIR 601/656 video stream.
On every fourth active line, each byte carries one of two command values
(ML or MR), so each byte is really one bit. One map per frame at 25 frames/s
is 25,920 bytes of information, or 5.184 Mbit/s.

This RTL is a codec for that stream:

- **The encoder** pulls the bits out of the CCIR stream and compresses each
  map without loss using an external LZ-78 engine. It sends the result in
  fixed-size *ATM blocks*, one block per frame period, on a constant-bit-rate
  channel. The channel rate is set by the call and is usually well below
  5.184 Mbit/s.
- **The decoder** does the reverse. It rebuilds a CCIR stream after a fixed,
  programmable delay, so the maps stay aligned with video that went through
  separate MPEG-2 codecs.

A lossless compressor has a variable output rate, but the channel is
constant. The design settles this with **controlled data loss (CDL)**:

- A map that does not fit its slot is either spread over two slots or
  dropped.
- The decoder shows the last good map in place of a dropped one.

Everything else in the design supports this: buffering, timing, reassembly
and repetition.

## Data path at a glance

```
 encoder                                                        ATM link
 CCIR in -> ccir_rx -> disparity_filter -> in FIFO -> compression_module -> enc_c2m
 (27 MHz)   timing      ML/MR -> bit,       1 KB       LZ-78 engine (ext.)   writes map
            codes, EOF  8 bits -> byte                 raw copy, size check  into 512 KB
                                                                             circular SRAM
 EOF -> delay_queue (slot timer) -> enc_cdl (CB/UB decision) -> enc_m2o -> block bytes
                                                                 header+CRC, payload, padding

 decoder
 block bytes -> dec_rx (header correction, payload -> 512 KB SRAM) -> dec_cdl (reassembly)
   -> delay_queue (release delay) -> decompression_module (LZ-78 or bypass)
   -> out FIFO (32 KB) -> ccir_tx (CCIR frame generator, repeats previous map) -> CCIR out
```

- Everything runs on one 27 MHz clock, the CCIR byte clock.
- The link side moves one byte every second clock (13.5 MHz), framed by
  `atm_valid` and by `atm_sob` on the first byte of a block.
- Reset is asynchronous and active-low.

## Controlled data loss: the encoder side

This is the part to understand first. The relevant modules are `enc_cdl`,
`enc_c2m` and `compression_module`.

**Timing.** Each end-of-frame (EOF) event is put into a `delay_queue` with a
time stamp.

- EOF is detected when the F bit of the timing reference goes from 1 to 0.
- After `delay` clocks the queue offers it to `enc_cdl` as a *slot*. That is
  the moment the block for this frame must start.
- The design times the delay from EOF to the first byte of the block.
- The slot rate is therefore exactly the frame rate.
- The delay is constant for every map, so the disparity stream is delayed as
  much as the video.

**Storage.**

- `compression_module` streams the packed map bytes into the LZ-78 engine
  and keeps a raw copy in a 25,920-byte store.
- It counts the engine's output. If the compressed map turns out larger than
  the raw one, it replays the raw copy with `out_restart`. `enc_c2m` then
  rewinds its write pointer to the start of the map and stores the raw bytes
  instead.
- For each finished map, `enc_c2m` queues a descriptor holding the buffer
  address, the size, and whether the map is raw.

**The decision.** When a slot opens, `enc_cdl` compares the descriptor's
size with the slot capacity, `cap = block_bytes − 4`. It has two states:
**CB** (normal) and **UB** (a second fragment is owed).

| situation at the slot (state CB) | block sent | next state |
|---|---|---|
| size ≤ cap | whole map | CB |
| cap < size ≤ 2·cap | first `cap` bytes, marked *first fragment* | UB |
| size > 2·cap | empty block; map dropped | CB |
| map not yet compressed | empty block; that map is dropped when it arrives | CB |

In UB, the next slot carries the rest of the map, marked *second fragment*.
The map belonging to that slot is dropped; this is how a fragmented map costs
its successor. The state then returns to CB.

**Buffer release.** Space in the circular buffer is freed only after `enc_m2o`
reports that it has sent all of a map, or after the map is dropped. It is
never freed after a first fragment alone, because that would let new maps
overwrite the second fragment before it is sent.

**Priority.** The compressor path and `enc_m2o` share the single-port SRAM
through `mem_arbiter`.

- `enc_m2o` has fixed priority, so the block always leaves on time.
- The compressor path just waits; it is stalled, and nothing is lost.

## ATM block format

```
byte 0      type: bit0 payload present, bit1 compressed,
                  bits3:2 fragment (00 whole, 01 first, 10 second), bits7:4 zero
byte 1..2   payload size, big-endian
byte 3      CRC-8 of bytes 0..2 (x^8+x^2+x+1, initial value 0)
byte 4..    payload, then padding (0x00) up to block_bytes
```

- The CRC is used for correction, not only detection. The 32 possible
  single-bit errors in the 4 header bytes all give different non-zero
  syndromes.
- `codec_pkg::hdr_correct` looks the syndrome up by recomputing it for each
  bit position, and flips that bit.
- If the syndrome matches no single bit, the header is counted as bad and the
  slot is treated as empty.
- The payload itself is not protected. An error in it corrupts only that map,
  because the LZ-78 dictionary restarts with every map.

## Decoder side

1. **`dec_rx`** collects the 4 header bytes and corrects them. It then
   pulses `hdr_valid`, which is the slot sync, and writes the payload into
   its own circular buffer. Padding is not stored.
2. **`dec_cdl`** mirrors the encoder (state UB = holding a first fragment):
   - A *whole* block gives one map.
   - A *first fragment* is remembered.
   - A *second fragment* that follows one with the same compressed flag gives
     one map covering both. The two payloads are adjacent in the buffer, so
     joining them is just adding their sizes.
   - Anything else while a first fragment is held discards that fragment.
     The new block is then handled normally.
3. **`delay_queue`** holds each complete map for the decoder's programmed
   delay.
4. **`decompression_module`** then reads the map from the buffer.
   - A compressed map goes through the external LZ-78 decoder.
   - A raw map bypasses it.
   - Either way the bytes go into the 32 KB output FIFO. A `last` flag marks
     the final byte of each map.
5. **`ccir_tx`**, inside `ddtm`, generates a continuous CCIR frame. At each
   frame start it checks whether a complete map is waiting in the FIFO:
   - If one is waiting, that map is sent, bit by bit, as MR or ML bytes, and
     is also copied into a previous-map store.
   - If none is waiting, the stored map is sent again.

## CCIR framing used

| item | value | meaning |
|---|---|---|
| `LINE_BYTES` | 1720 | bytes per line: EAV, blanking, SAV, active |
| `ACTIVE_BYTES` | 1440 | active bytes per line |
| `LINES_PER_FRAME` | 625 | lines per frame |
| `F2_START` | 313 | first line of field 2 |
| `F1_ACT_START`..`F1_ACT_END` | 23..310 | active lines of field 1 |
| `F2_ACT_START`..`F2_ACT_END` | 336..623 | active lines of field 2 |

- The timing reference codes are `FF 00 00 XY`, with
  XY = `1 F V H P3 P2 P1 P0` and the usual protection bits.
- Disparity is carried on the 1st, 5th, 9th … active line of each field:
  72 + 72 = 144 lines.
- That gives 144 × 1440 / 8 = 25,920 map bytes.
- The first disparity byte is the most significant bit of the first map byte.
- A byte of `MR_VALUE` (0xEB) is a 1; any other value reads as 0, and 0 is
  sent as `ML_VALUE` (0x10).
- Inactive active-area lines and blanking carry `80 10 80 10 …`.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `disparity_codec` | `BUF_AW` | 19 | map buffer of 2^19 = 512 KB in each unit |
| | `IN_FIFO_AW` | 10 | 1 KB input FIFO |
| | `OUT_FIFO_AW` | 15 | 32 KB output FIFO (≥ one 25,920-byte map) |
| | `TIMER_AW` | 5 | 32 pending frame ends (1 s of delay = 25) |
| | `ML_VALUE`, `MR_VALUE` | 0x10, 0xEB | command byte values |
| `enc_c2m` | `DESC_AW` | 5 | 32 map descriptors |
| `enc_m2o` | `PAD_BYTE` | 0x00 | padding value |

Run-time settings are ports, set once per call:

| port | meaning |
|---|---|
| `enc_delay`, `dec_delay` | delay in 27 MHz clocks; 170 ms = 4,590,000 and 1 s = 27,000,000 |
| `enc_block_bytes` | ATM block size in bytes = channel bit rate / 8 / 25 |

For example, 3 Mbit/s gives 15,000 bytes per block, which takes 1.1 ms at
13.5 MHz.

## What is external

**LZ-78 engines.** Each unit uses a commercial LZ-78 compression ASIC with
its own dictionary RAM. They are not part of this RTL.

- The top brings their byte streams out as ports: `enc_lz_*` and `dec_lzd_*`.
  These are valid/ready streams with `last` on the final byte of a map, in
  both directions.
- The engine must restart its dictionary for every map.
- The testbenches use behavioural models: `tb/lz78_enc_model.sv` and
  `tb/lz78_dec_model.sv`. They emit 3-byte tokens: a 16-bit dictionary index
  and one byte.

**Host processor.** In the original units a microprocessor configured the
engines and ran part of the data framing in microcode. Here all of it is in
hardware state machines, and the processor's settings are the ports above.

## Where this design departs from, or adds to, the original

**Additions.** The original gives no encoding for these, so the choices here
are this design's own:

- the header layout and the CRC polynomial
- the ML/MR byte values
- which line of each group of four carries disparity
- the EOF detection rule
- the handshakes between modules
- the empty-block rule
- the treatment of an uncorrectable header
- the discard rule for broken fragment pairs

**Output frame timing.** In the original, the decoder's header logic
produces a sync that paces the CCIR transmitter. Here the transmitter runs
freely at its own line and frame counts, and the header sync is only brought
out as `dec_slot_sync`. This works because both ends use the same frame
format, so the decoder's frame period equals the encoder's. Maps reach the
output through the FIFO, and a frame that starts before its map is complete
shows the previous map instead. Locking the transmitter's phase to the
delayed slot sync is not implemented.

**Line length.** It is kept at the 1720 bytes per line that the original
states. The 625-line CCIR 656 standard line is 1728 bytes; set `LINE_BYTES`
to 1728 for a standard-conforming stream.

At 1720 bytes a frame is 1,075,000 clocks: 39.8 ms instead of 40 ms at
27 MHz. The input side does not count line bytes, so it accepts either.

**Raw fallback.** The compressed and raw sizes are compared only after both
are complete. A compressed map therefore always passes through the buffer
write path once before a raw copy can replace it.

**Buffer size.** With the delay at its 1 s maximum, up to 25 maps wait in the
encoder buffer.

- At the 45–50 % compression the original reports, this is about 324 KB, well
  inside 512 KB.
- If every map were sent raw it would need 648 KB. The compressor would then
  stall, and input bytes would be lost and counted in `enc_in_drop_count`.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_sram_sp`, `tb_mem_arbiter`, `tb_delay_queue` | memory, priority arbitration, programmable delay |
| `tb_ddrm` | CCIR receiver, bit packing, EOF, input FIFO overflow count |
| `tb_compression_module` | forwarding through the engine, raw fallback with restart |
| `tb_enc_c2m`, `tb_enc_cdl`, `tb_enc_m2o` | buffer writing and release, CB/UB decisions, block formatting and timing |
| `tb_dec_rx`, `tb_dec_cdl`, `tb_decompression_module`, `tb_ddtm` | header correction, reassembly and discard, engine/bypass switch, CCIR generation and map repetition |
| `tb_disparity_encoder`, `tb_disparity_decoder` | each unit alone against independently built references |
| `tb_disparity_codec` | end to end at a reduced frame size (23 lines of 80 bytes, 32-byte maps) |
| `tb_codec_rates` | (shares `codec_rate_bench` with `tb_codec_delay`) the top at its defaults at 0.88, 1.40, 2.07 and 2.90 Mbit/s (4400 to 14,500-byte blocks): the maps delivered must be exactly those predicted from reference compressed sizes by the CDL rules; prints the pass rate per rate |
| `tb_codec_delay` | the top at its defaults with a 1 s encoder delay (25 maps waiting in the buffer) and a 170 ms decoder delay: block timing exact, delivered maps as predicted |
| `tb_codec_full` | end to end with the top at its defaults (full 625 × 1720 frame, 25,920-byte maps, 13,000-byte blocks), 16 frames |

The end-to-end bench loops the encoder output into the decoder, with one
header bit flipped on the way. It parses the decoder's CCIR output back into
maps and checks that:

- every map shown equals the source map whose tag it carries;
- tags never go backwards, and a repeated map equals the previous one;
- each block leaves a constant offset after its programmed delay;
- each mechanism happens at least once: whole map, fragmentation, drop, empty
  slot, raw fallback, bus stall, header correction, reassembly, bypass,
  decompression and repetition.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
          rtl/codec_pkg.sv tb/tb_disparity_codec.sv --top-module tb_disparity_codec
./obj_dir/Vtb_disparity_codec +verilator+rand+reset+2
```

Substitute any testbench name. The full-size run needs about 1 minute to
build and 20 seconds to simulate.
