# Chunk headers for the FELIX ToHost block stream

FELIX is the readout system that moves detector data from ATLAS front-end links
into server memory. An FPGA on a PCIe card packs each E-Link's data fragments
("chunks") into fixed 1 KiB blocks. Then a DMA engine writes the blocks into a
host buffer. In the original format every chunk ends with a 32-bit **trailer**
that holds its length. The host can only find where chunks start by walking
each block backwards from its end, and then it reads the block a second time
to publish the chunks. If the length word comes **before** the chunk, as a
header, the host can parse a block front to back in a single pass.

The firmware problem is that the header's contents, mainly the chunk length,
are known only after the last byte of the chunk has gone by. By then the start
of the chunk is already in the FIFO that feeds the DMA engine. This RTL solves
that with a **header-inserting FIFO**:

- When a chunk starts, the FIFO leaves one empty word in front of it.
- When the chunk ends, the header is written into that word.
- The reader is held at the empty word until it has been filled.

Around this FIFO sits a block builder that produces the block format with
headers, and an output multiplexer that feeds whole blocks to the DMA engine.

## Block format produced

A block has `BLOCK_BYTES` bytes (1024 by default), so 256 words of 32 bits.
Word 0 is the block header. After it come (sub)chunks, each one a chunk header
followed by the data, padded to a whole 32-bit word:

```
block header   31:28 0xC | 27:24 size in KiB - 1 | 23:16 0xCE | 15:11 sequence | 10:6 GBT id | 5:0 AXI stream id
chunk header   31:29 type | 28 T | 27 E | 26 C | 25 B | 24:16 reserved | 15:0 length in bytes
```

The chunk header uses the same layout as the old trailer; only its place has
changed. The flags are T (truncated), E (error), C (CRC error) and B (busy).

The type field takes these values:

| type | code | meaning |
|---|---|---|
| WHOLE | 3 | a complete chunk |
| FIRST | 1 | first part of a chunk that was cut at the end of a block |
| MIDDLE | 4 | a part that fills an entire block |
| LAST | 2 | final part of a cut chunk |
| NULL | 0 | zero-length filler in the last word of a block |

A chunk that does not fit in the rest of a block is cut. The part in this
block fills it exactly. The rest continues after the next block header of the
same E-Link.

If a (sub)chunk leaves exactly one free word, a header plus data cannot fit
there. That word then gets a NULL header of length 0, and the next chunk
starts in a new block.

The sequence number counts blocks per E-Link modulo 32, so the host can detect
a lost block.

Example: an E-Link sending 32-byte chunks gives this first block:

```
c0ce0040                                    block header: 1 KiB, seq 0, GBT id 1
60000020 001800aa 10aabb00 03020100 ... 17161514   WHOLE, 32 bytes  (x 28)
20000008 001800aa 10aabb1c                  FIRST, 8 bytes (rest goes to the next block)
```

Both the block-builder testbench and the end-to-end testbench reproduce this
block word for word.

## The header-inserting FIFO (`hififo`)

### Interface

The write side is an ordinary FIFO write port (`wr_en`, `din`, `full`), plus
two qualifiers that are valid together with `wr_en`:

- `new_chunk`: this word is the first word of a chunk. Store it one address
  further on, and keep the skipped address as the reserved header slot.
- `set_header`: this word is the header. Store it in the reserved slot, not at
  the end of the FIFO.

Only one header can be outstanding at a time. `new_chunk` and `set_header` must
never be high together. A chunk must get its header before the next
`new_chunk`. Assertions check both rules.

The read side is first-word fall-through. Whenever `empty` is low, `dout`
already holds the oldest word, and `rd_en` takes it.

### Write sequence

The writer sends A, B with `new_chunk`, C, H with `set_header`, then D:

| clock | word | qualifier | memory address | write counter after |
|---|---|---|---|---|
| 1 | A | - | 0 | 1 |
| 2 | B | new_chunk | 2 (1 is reserved) | 3 |
| 3 | C | - | 3 | 4 |
| 4 | H | set_header | 1 | 4 (unchanged) |
| 5 | D | - | 4 | 5 |

The memory ends up holding A H B C D.

The write-pointer block (`hififo_wr_ptr`) is built from these parts:

- A counter that adds 1 per word, adds 2 on `new_chunk`, and stays put on
  `set_header`.
- A multiplexer that picks counter + 1 as the address while `new_chunk` is
  high, so the first data word lands after the reserved slot in the same
  clock.
- A header-pointer register, loaded with the counter value on `new_chunk`.
- A second multiplexer that picks the header pointer as the address on
  `set_header`.

The memory write strobe, address and data pass through one register stage. The
memory is a long way from the controller, and this extra stage lets the write
path meet timing.

### What the reader may read

The reader must stop at the first word that is not yet valid. That word is at
one of two places:

- the write pointer, when no header is outstanding;
- the reserved slot, while a header is outstanding.

This design computes that bound, the **read limit**, on the write side. It
sends the limit to the read clock as one value, through a Gray-code
synchroniser.

A Gray-code crossing is only safe for a value that steps by one, and two
pointers here do not:

- The write pointer jumps by 2 on `new_chunk`.
- The header pointer jumps to wherever the next chunk starts.

The limit register therefore *walks* towards its target one step per write
clock. The limit itself only ever moves forward.

The cost is latency, not throughput. When a header is set, the data of that
chunk becomes visible one word per clock. The next chunk is being written in
the same period anyway.

The read pointer travels the other way (read clock to write clock) through a
second Gray-code synchroniser. The write side uses it to compute `full`.

### Read side: two output registers and four states

The memory's read path has two registers: a **buffer** register next to the
memory and an **output** register that drives `dout`. A read from memory
therefore takes two clocks. The register arrangement lets the read path meet
timing.

To still give first-word fall-through at one word per clock, a state machine
(`hififo_rd_ctrl`) records which registers hold valid words:

| state | buffer | output | empty |
|---|---|---|---|
| none_ready | - | - | 1 |
| buffer_ready | valid | - | 1 |
| output_ready | - | valid | 0 |
| both_ready | valid | valid | 0 |

Every clock the state machine does two things:

1. It moves the buffer word into the output register if the output register
   is free or is being read.
2. It loads the buffer from memory, and advances the read pointer, if a
   complete word lies below the read limit and the buffer is free or is being
   emptied.

Whether a word lies below the limit is held in a register (the inverse of a
"memory empty" flag), so no comparator sits in front of the memory's read
enable. The register is computed one clock ahead from the next read pointer.
The limit only moves forward, so a word found available stays available. The
register adds one clock of latency and does not reduce the rate.

`buffer_ready` therefore always lasts one clock, and a reader that keeps
`rd_en` high gets one word per clock.

The read word can be wider than the write word. `READ_DATA_WIDTH` must be a
power-of-two multiple of `WRITE_DATA_WIDTH`. The first written word goes in the
least significant bits. A wide word becomes readable only once all of its
parts lie below the read limit.

### Flags and counts

- `full` is high while fewer than two words are free, so a `new_chunk` write
  (two words) always fits. It is also high during reset. A `set_header` write
  is accepted even when `full` is high, because its word is already reserved.
- `prog_full` is a registered `wr_data_count >= PROG_FULL_THRESH`, or `full`.
- `wr_data_count` counts the words in use, reserved slots included, as seen
  from the write clock.
- `rd_data_count` counts the readable read words still in memory. It does not
  include the two output registers.

Because of the synchronisers, each side sees the other side's pointer a few
clocks late. The effect is that `full` may clear late and `empty` may clear
late; neither can clear too early.

### Timing summary

- **Write:** one word per `wr_clk`. The memory is written one clock after the
  word is accepted.
- **Read:** one word per `rd_clk` while data is waiting.
- **Latency:** in the testbench (about 160 MHz write clock, 250 MHz read
  clock), a two-word chunk written to an empty FIFO shows on `dout` within 8
  read clocks of its header being set. The path is:
  1. the limit steps (one write clock per word of the chunk);
  2. one source register and two synchroniser stages;
  3. the availability register, the buffer register and the output register.

## Block builder (`to_block`)

`to_block` takes one E-Link's chunks as a 32-bit AXI stream:

- `s_tlast` marks the last word of a chunk.
- `s_tkeep` gives the valid bytes of that last word. They are contiguous from
  byte 0, and the first byte sits in bits 7:0.
- `s_tuser` carries the flags {T,E,C,B}, taken from the last word.

For each input word it does the following:

- At the start of a block, it writes the block header. The input waits one
  clock.
- On the first word of each (sub)chunk, it writes the word with `new_chunk`.
- On later words, it writes the word and counts it.
- When the chunk ends (`s_tlast`) or the block is full, it writes the header
  with `set_header` in the next clock. The header holds the type, the flags
  (on WHOLE and LAST only) and the length in bytes. The input waits one clock.
  The same control that used to produce the trailer now produces the header,
  and the FIFO moves it to the front.
- If exactly one word of the block is left, it writes the NULL filler. The
  input waits one clock.

Every word of a block is written to the FIFO exactly once. With continuous
input, a 256-word block takes 256 write clocks.

A block is only started when data arrives. There is no timeout, so a partly
filled block stays in the FIFO until more data for that E-Link comes.

## Router top (`crtohost`) and output multiplexer (`block_mux`)

`crtohost` has `NUM_CH` channels. Each channel is a `to_block` followed by an
`hififo`:

- The FIFO writes on `wr_clk`, the front-end side clock, which is a multiple of
  the 40 MHz LHC clock.
- It reads on `rd_clk`, the PCIe side, 250 MHz.
- It widens 32-bit words to `RD_WIDTH` bits.

Channel `c` puts E-Link id {GBT id = c, stream id = 0} into its block headers.

`block_mux` grants one channel at a time and forwards exactly one block:
`BLOCK_BYTES*8/RD_WIDTH` words, which is 32 at the defaults. Blocks of different
E-Links therefore never interleave. Channels are served round robin, and
choosing the next one costs one idle clock.

The output is a valid/ready stream (`m_data`, `m_valid`, `m_ready`) with
channel number `m_ch` and block start/end marks `m_sob` and `m_eob`. This is
the point where the DMA engine connects.

`rst` is synchronous to `wr_clk`. Each FIFO and the multiplexer synchronise it
to `rd_clk`. Keep `rst` high for at least a few cycles of both clocks.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| crtohost | NUM_CH | 2 | number of E-Link channels; this design's choice |
| crtohost | RD_WIDTH | 256 | DMA word width; this design's choice |
| crtohost | FIFO_DEPTH | 2048 | 32-bit words per channel FIFO (8 KiB, eight blocks) |
| crtohost, to_block | BLOCK_BYTES | 1024 | 1 to 16 KiB in whole KiB (4-bit size field) |
| to_block | ELINK_ID | 11'h040 | block header id |
| hififo | FIFO_WRITE_DEPTH / WRITE_DATA_WIDTH / READ_DATA_WIDTH / PROG_FULL_THRESH | 2048 / 32 / 32 / 10 | |

The FIFO is exactly the size of the ordinary FIFO it replaces: 2048 × 32 bits.
No second FIFO is needed to hold headers.

## How far it follows the original firmware, and where it departs

These parts follow the published design of the header-inserting FIFO:

- the reservation counter, the header-pointer register and the address
  multiplexers;
- the rule that the reader never passes an unset header;
- the registered memory write path;
- the two-register first-word fall-through output with its four states;
- Gray-code pointer crossings with two synchronising flip-flops, and reset
  synchronisation;
- the 2048 × 32 default size, `prog_full` and the data counts;
- the way the block builder drives `new_chunk` and `set_header`.

These are this design's own choices:

- **One read limit is crossed instead of three signals.** The original design
  crosses the write pointer, the header pointer and a "header set" flag
  separately. Those signals can arrive in different clocks, and two of them do
  not step by one, so the reader could see a half-updated state. Crossing a
  single value that steps by one avoids both problems.
- **Full is two words early.** `full` rises while fewer than two words are
  free, rather than when one is, so a `new_chunk` write never overruns.
- **No look-ahead "going empty" signal.** The original registers its empty
  flag with the help of a separate look-ahead term. Here the availability
  register is computed directly from the next read pointer and the crossed
  limit, which has the same effect.
- **Type codes MIDDLE = 4 and LAST = 2, and the NULL filler word.**
  WHOLE = 3 and FIRST = 1 are fixed by real FELIX output. MIDDLE = 4, LAST = 2
  and the NULL filler follow the usual FELIX convention, but check them against
  your host software.
- **Flags only on the final part.** Flags are written only into WHOLE and LAST
  headers; FIRST and MIDDLE headers carry zero flags.
- **Whole-block round-robin multiplexer, the AXI-stream input, and the
  defaults for `NUM_CH` and `RD_WIDTH`.**
- **No block timeout.** There is no time-based flushing of partly filled
  blocks, and no handling of other data types (such as TTC data).

Things this RTL does not contain, which connect at its ports:

- the PCIe DMA engine;
- the E-Link decoders;
- the data and trigger emulators;
- the link transceivers;
- the host software.

Resource figures were not compared with the original FPGA implementation
(167 LUTs and 236 registers per FIFO). A generic synthesis of this RTL reports
word-level cells, not LUTs.

## How far it can be trusted

Every module has a self-checking testbench in `tb/`, and each testbench has
been shown to fail on a deliberately broken copy of its module.

- **`tb_crtohost`** runs the whole router at its default parameters:
  - two channels with unrelated write and read clocks;
  - DMA back-pressure, including a period long enough to fill a FIFO;
  - chunk sizes of 32 B, 100 B, 1012 B, 2000 B and random up to 3000 B, with
    random flags and partial last words;
  - 300 chunks of 34 B sent back to back, the chunk size of the GBT-mode test.
    They take 10.07 write clocks each, counting block headers and fillers.
    That is 23.8 M chunks/s at 240 MHz, against the 889 000 chunks/s an 8-bit
    E-Link can deliver. The test fails above 11 clocks per chunk.

  It parses every output block in one pass, as host software would, and
  compares every chunk byte for byte. It also counts each mechanism (all
  split types, the filler word, FIFO full, the reader waiting at an unset
  header, channel switching, sequence wrap-around, back-pressure) and fails if
  any of them never happened.
- **`tb_hififo`** tests the FIFO in its default form and in a widening
  32→128 form. It compares every word read against a model, and checks full,
  latency, and the rate of one word per clock.

The simulation is two-state and cycle-based, so it does not model
metastability. The clock-domain crossing has been reviewed, not proven. The
testbenches use a single random seed.

## Simulating

All files are SystemVerilog-2017. The package `rtl/felix_pkg.sv` must be read
first. To run the end-to-end test at full size with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/felix_pkg.sv tb/tb_crtohost.sv --top-module tb_crtohost
./obj_dir/Vtb_crtohost
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. The other
testbenches run the same way:

- `tb_hififo`
- `tb_to_block`
- `tb_block_mux`
- `tb_hififo_wr_ptr`
- `tb_hififo_rd_ctrl`
- `tb_dp_ram`
- `tb_gray_cdc`

A lint run is `verilator --lint-only -Wall -Irtl rtl/felix_pkg.sv rtl/crtohost.sv`.
The warnings it gives are about open output pins and the reset being used both
synchronously and by the asynchronous-assert reset synchroniser. Both are
intended.

## Files

| file | content |
|---|---|
| `rtl/felix_pkg.sv` | header structs, chunk types, header builders |
| `rtl/crtohost.sv` | top: channels, FIFOs and output multiplexer |
| `rtl/to_block.sv` | block builder |
| `rtl/block_mux.sv` | whole-block round-robin output multiplexer |
| `rtl/hififo.sv` | header-inserting dual-clock FIFO |
| `rtl/hififo_wr_ptr.sv` | write, header and read-limit pointers, write pipeline |
| `rtl/hififo_rd_ctrl.sv` | read pointer and four-state output machine |
| `rtl/dp_ram.sv` | dual-clock memory, narrow write and wide read, two read registers |
| `rtl/gray_cdc.sv` | Gray-code counter synchroniser |
| `rtl/rst_sync.sv` | reset synchroniser |
| `tb/tb_*.sv` | one self-checking testbench per module |
