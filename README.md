# On-the-fly attestation of partial FPGA reconfiguration

When an FPGA is partially reconfigured at run time, the bitstream usually
comes from storage that cannot be trusted. A corrupted or forged bitstream
could load the wrong function, or overwrite logic outside the slot it was
meant for: logic that must keep running. This design is an attestation
module that sits next to the FPGA's internal configuration port (ICAP) and
watches the bytes that go into it. It does two things while the bitstream
is being loaded, without slowing the load:

* **Region delimitation.** It parses the configuration packets as they
  pass. It aborts the reconfiguration as soon as a frame outside a fixed
  reconfigurable region is about to be written, or when a command appears
  that would take the configuration out of its control (SWITCH, SHUTDOWN,
  multiple-frame write).
* **Hardware validation.** It computes the SHA-256 digest of everything
  after the sync sequence. It also counts the 32-bit words. When loading
  ends, the host reads back the digest, the word count and the abort code,
  and compares them with the expected values of the bitstream it meant to
  load.

Region delimitation is what makes after-the-fact validation safe. A digest
can only be checked once the whole bitstream is in. Meanwhile a bad
bitstream can at worst damage the region that is being replaced anyway.

The RTL targets the Virtex-II Pro configuration interface: an 8-bit ICAP at
50 MHz and the Virtex-II Pro packet format. Some of the choices below go
beyond what the published design specifies. The section "Where this RTL
makes its own choices" lists them.

## Structure

```
                 clk_icap (50 MHz)                 |        clk_hash (100 MHz)
                                                   |
 icap_data[7:0] ──> sync_filter ──word[31:0]──┬────> async_fifo ──> hash_control ──> sha256_core
 icap_ce/write       (drop header,  new_packet│     |  (128x32)      (feeds blocks,   (65 cycles
                      pack 4 bytes)           │     |   full ─> halt  pads, ready,     per block)
                                              ├──> region_delimiter ──> abort        register mux)
                                              │     |   abort_code[3:0] ──────────┐       │
                                              └──> packet_counter ── count[27:0] ─┴──> data[31:0]
                                                   |                    reset_icap <── (status read)
```

| Module | Clock | Role |
|---|---|---|
| `sync_filter` | ICAP | Drops bytes until `FF FF FF FF AA 99 55 66` has been seen, then packs every 4 bytes into a word (first byte in [31:24]) and pulses `new_packet`. |
| `region_delimiter` | ICAP | Packet parser and rule checker; sticky `abort` and 4-bit `abort_code`. |
| `packet_counter` | ICAP | 28-bit count of packet words, saturating. |
| `async_fifo` | both | 128 x 32 dual-clock FIFO with Gray-coded pointers. It gives `full` (early, used as halt), `empty`, a word count and "512 bits available". |
| `sha256_core` | hash | SHA-256 compression, one round per cycle, 65 cycles per 512-bit block. |
| `hash_control` | hash | Block scheduling, zero completion of the last block, `ready`, register-bank multiplexer, ICAP-side reset. |
| `bit_sync` | – | Two-flop synchroniser for the reset signals that cross into the ICAP domain. |
| `attest_pkg` | – | Packet encodings, register and command codes, abort codes, SHA-256 constants. |
| `attestation_top` | – | Connects everything. |

The hash side runs at a higher clock than the ICAP on purpose. At 50 MHz a
65-cycle SHA-256 core takes in 512/65 x 50 MHz = 393.8 Mbit/s. The ICAP
delivers 8 bits x 50 MHz = 400 Mbit/s, which is slightly more. At 100 MHz the
core takes in 787.7 Mbit/s, so the FIFO only absorbs jitter and `halt`
never rises at full ICAP speed. The end-to-end testbench checks this. If the
hash clock is slower, the FIFO fills, `full` rises and the reconfiguration
master must pause.

## The packet parser and its rules

This is the part to read carefully before changing anything.

After the sync sequence, the Virtex-II Pro stream is made only of packets:

* **Type 1 header** `[31:29]=001, [28:27]=op, [26:13]=register, [10:0]=word count`
* **Type 2 header** `[31:29]=010, [28:27]=op, [26:0]=word count`. It continues
  the register named by the last type 1 header and is used for long
  frame-data writes.
* `op` is `10` for write, `01` for read and `00` for no-op. Only writes carry payload
  words in the input stream.

`region_delimiter` has two states, *header* and *data*. In *data* it counts
down the payload words and sends each one to a check that depends on the
target register:

| Target | What happens |
|---|---|
| FAR (1) | Loads the parser's own frame address, bits [26:9] of the word: block type, major and minor address, taken as one linear frame number. The word index within the frame is cleared. |
| FLR (11) | The value must equal `FLR_VALUE`, which defaults to the frame length `FRAME_WORDS`. Otherwise abort code 2. |
| CMD (4) | SWITCH (9) gives abort code 3, SHUTDOWN (11) code 4, MFWR (2) code 5. Other commands are allowed. |
| FDRI (2) | Frame data. At the first word of each frame, the current frame number must lie in `[REGION_FIRST, REGION_LAST]`, otherwise abort code 1. After `FRAME_WORDS` words the frame number goes up by one. |
| MFWR (10) | Any write header to it aborts at once with code 6. |
| other | Payload skipped. |

A word that is neither a type 1 nor a type 2 header, where a header is due,
aborts with code 7. The parser could not follow the stream after such a
word. Because payload words are counted, frame data that happens to look
like a command is never taken for one. The testbenches mix such look-alike
words into the frame data on purpose.

The first violation sets `abort` and latches its code. Both hold, and
parsing stops, until the ICAP-side reset. The abort is registered one ICAP
cycle after the last byte of the offending word. The ICAP acts on a 32-bit
word only after the next word has arrived, so the reconfiguration master
has most of a word time to stop before the offending word takes effect.

Why these commands are refused:

* SWITCH changes the configuration clock and could push the system outside
  its timing.
* SHUTDOWN stops the configured logic, which includes this module.
* Multiple-frame write copies one frame to several addresses. A parser that
  follows one frame address at a time could not check them all.

### Frame numbering is simplified

The real device advances the frame address column by column: minor addresses
wrap within a column, and then the major address goes up. Here the 18-bit
field is treated as a plain counter. A region is therefore a range of these
numbers. That matches a real region only when the region starts and ends on
column boundaries and the FDRI write stays inside it. The Virtex-II pad
frame, the extra frame written at the end of an FDRI write, is not modelled.
Set `REGION_LAST` one frame past the slot if your bitstreams include it. The
frame length default of 206 words is the usual XC2VP30 figure. Check
it against your device's configuration guide.

## Hashing

`hash_control` starts a block whenever the FIFO reports 16 words (512 bits)
and the core can accept a start. During rounds 0 to 15 the core asks for one
message word per cycle (`msg_req`), and the controller pops the FIFO in the
same cycle. The FIFO read port is fall-through, so the head word is always
on `rd_data`. Rounds 16 to 63 compute the message schedule from a 16-word window.
A block takes 64 round cycles plus one cycle that adds the working variables
into the digest. The next block can start in that last cycle, so blocks run
back to back every 65 cycles.

The digest is **not** standard SHA-256 of the bitstream:

* Hashing starts with the first word after the sync sequence. The header and
  the sync word are not hashed.
* No `1` bit and no length field are appended. If the stream is not a whole
  number of blocks, the last block is completed with zero words. The word
  count is reported separately and must be checked separately.
* Hashing does not stop at the end of a bitstream. Anything appended after
  it, including a second bitstream, is also hashed, so it shows up in the
  digest.

The expected digest for a bitstream file is therefore SHA-256 compression,
starting from the standard initial value, over the words after the sync
sequence, zero-filled to a multiple of 16 words.

## Host interface and end-of-load sequence

The host side is synchronous to `clk_hash`.

| Address | Data |
|---|---|
| 0 to 7 | digest words H0 to H7 (address 0 is the most significant) |
| 8 | status: `{abort_code[3:0], count[27:0]}` |
| 9 to 15 | 0 |

`data` follows `address` combinationally. `rd_strobe` marks a read; only the
status read has a side effect.

Sequence for one bitstream:

1. Pulse `global_reset` for at least two `clk_icap` cycles.
2. Stream the bitstream into the ICAP. Pause while `halt` is high. Stop for
   good if `abort` rises.
3. Pulse `read_hash`. After `SETTLE` (8) cycles, which let the last words
   cross the FIFO synchronisers, the controller hashes any remaining full
   blocks and then the zero-completed partial block. It then raises `ready`.
   `busy_hash` is high while a block is being compressed and from
   `read_hash` until `ready`.
4. Read address 8. This raises the ICAP-side reset: filter, region
   delimiter and counter are cleared for the next bitstream. The reset
   is held until eight digest reads follow.
5. Read addresses 0 to 7, then pulse `global_reset` to clear the hash side.

The host compares digest, count and abort code with the values expected for
the bitstream it sent.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `attestation_top`, `region_delimiter` | `FRAME_WORDS` | 206 | words per configuration frame |
| `region_delimiter` | `FLR_VALUE` | `FRAME_WORDS` | value FLR must be written with |
| `attestation_top`, `region_delimiter` | `REGION_FIRST` / `REGION_LAST` | 0x04000 / 0x04FFF | inclusive range of frame numbers (FAR[26:9]) that may be written |
| `attestation_top`, `async_fifo` | `FIFO_DEPTH` / `DEPTH` | 128 | FIFO words |
| `async_fifo` | `HALT_MARGIN` | 2 | `full` rises this many words before the FIFO is really full |
| `packet_counter` | `WIDTH` | 28 | count width |
| `hash_control` | `SETTLE` | 8 | hash cycles waited after `read_hash` |

## Where this RTL makes its own choices

The published design gives the block structure, the widths (8-bit input,
32-bit words, 28-bit count, 4-bit abort value, 256-bit digest, 32-bit read
bus), the two clock domains, the sync sequence, the refused commands, the
65-cycle SHA-256 block time, the 128-word FIFO, zero completion of the last
block, and the reset order. The following are choices made here:

* The binary encodings are those of the Virtex-II Pro configuration logic:
  packet headers, register addresses and command codes.
* Abort code numbering, given in the parser table above.
* Linear frame numbering, the default region bounds, and FLR holding the
  frame length in words.
* Aborting on a word that is not a packet header, and refusing writes to
  the MFWR register as well as the MFWR command.
* The register map, the placement of the abort code in the status word, and
  the `rd_strobe` signal.
* `ce` and `write` are active high. On the real ICAP primitive they are
  active low, so invert them at the top if you snoop the primitive's pins.
* `global_reset` is synchronous to the hash clock. It is carried into the
  ICAP domain by a synchroniser.
* The count and the abort code cross into the hash domain without a
  handshake. They are static by the time they are read.
* The FIFO is written here as a Gray-pointer FIFO with an array memory. It
  replaces a vendor-generated FIFO, and its `full` rises two entries early.
* The SHA-256 core is an original one-round-per-cycle design. Only its
  65-cycle block time is taken from the published design.
* The counter saturates rather than wrapping.

Not included: the ICAP primitive itself and the reconfiguration master that
drives it. These are parts of the surrounding system; the top exposes their
signals. The SHA-1 variant appears in the published design only as an area
comparison and is not included either.

## Verification

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M`
and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_sha256_core` | The published SHA-256 digests of "abc" and of the 56-byte two-block message, fed back to back. Random block chains against an independent reference model (`tb/sha256_ref_pkg.sv`, which derives the round constants from cube roots of primes). Exactly 65 cycles per block. |
| `tb_sync_filter` | Near misses of the sync sequence do not synchronise. Words come out in order, one cycle after their fourth byte, with random idle cycles. A reset re-arms the filter. |
| `tb_region_delimiter` | Legal streams with type 1 and type 2 counts and look-alike data. FAR below and above the region. Overrun past the region end. Wrong FLR. SWITCH, SHUTDOWN and MFWR. MFWR register. Non-header word. Abort in the cycle after the offending word. |
| `tb_packet_counter` | Count against a model. Saturation at a reduced width. Reset. |
| `tb_async_fifo` | Order and completeness across two unrelated clocks, with fast and slow readers. `full` is reached. Reads of an empty FIFO are ignored. `block_avail` is consistent and the count is conservative. |
| `tb_hash_control` | FIFO, core and controller together, for 0, 16, 37 and 64 words. Zero completion. Status word. `busy_hash` and `ready`. ICAP-side reset held over the eight digest reads. 65-cycle block spacing. |
| `tb_workloads` | The two sizes the design is meant for, at nominal clocks. A 1.4 Mbit partial bitstream (213 frames, 43,905 words) loads in 175,629 ICAP cycles (3.5 ms). A bitstream the size of a full XC2VP30 configuration (1.7 Mbyte, 425,005 words) loads in 1,700,029 cycles (34.0 ms); it runs on an instance whose region covers the whole device. Neither load is ever halted, and `ready` follows `read_hash` within about 130 hash cycles. Digest and count are checked. |
| `tb_attestation_top` | The whole module at its default parameters, driven byte by byte. One legal load, a second legal load with a slowed hash clock (so `halt` must throttle the master), and one load for each of the seven abort codes. Every digest and count is checked against the reference model. It also checks that abort comes before the next word is complete, that no halt occurs at nominal clocks, and that each mechanism happened at least once. |

To run a testbench with Verilator 5 from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb \
  rtl/attest_pkg.sv tb/bitgen_pkg.sv tb/sha256_ref_pkg.sv \
  tb/tb_attestation_top.sv --top-module tb_attestation_top
./obj_dir/Vtb_attestation_top
```

Replace the testbench name to run another one. Every testbench finishes within a few
seconds. The simulator has no X state, so every register that is
read is reset. The only exception is the `bit_sync` flops, which settle after
two cycles of a held input. Assertions in `async_fifo` and `hash_control`
flag a write into a really full FIFO, a pop of an empty FIFO and a block
started while the core is busy.

What has not been verified: behaviour on real hardware, timing closure, and
real Virtex-II Pro bitstreams. The test streams are generated with the same
packet format assumptions as the parser.
