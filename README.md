# Bus data compression on a phase-based on-chip bus

Neighbouring pixels in images and video usually differ only a little, so
consecutive bytes on a video SoC's bus often have the same upper four bits.
This design sends such a byte as a *half-byte* (H), which is just its lower
nibble, and every other byte as a *full byte* (B). The receiver copies the
missing upper nibble from the byte before it. Nibbles are packed back to back
into the bus word, so a 16-bit bus carries between two and four bytes per
cycle instead of exactly two.

The receiver must know how each bus word is laid out. That layout, the
*pattern*, travels on wires that are idle anyway. The design assumes a
phase-based bus (SNP-style). On such a bus one set of wires, CHANNEL, carries
control, address and data one after another, and a few PHASE lines say which.
During a data burst the phase is known, so the PHASE lines are free. They then
carry a *pattern indicator* (PI): 3 bits per beat on a 16-bit bus. The
compressor is combinational and adds no cycle to a transfer. It needs no
tables and no large buffers.

The RTL in `rtl/` contains:
- the transmitter: comparator, register and aligner;
- the receiver: PI decoder and duplicator/re-shaper;
- the 32-bit block buffer that takes the restored data on the DMA side;
- the read and write engines of an SRAM controller that takes compressed
  writes and returns its read data compressed;
- a top level with the three compressed transfers of a video decoder:
  motion compensation results into on-chip SRAM, loop filter input read from
  that SRAM, and loop filter results out to external memory.

The default configuration is a 16-bit channel with one-byte words. Parameters
give a 32-bit channel (6-bit PI) and two-byte words.

## Beats, slots and tags

A bus word of `BUS_W` bits is split into `SLOTS = BUS_W / (WORD_W/2)` slots.
Each slot holds half a word: a nibble in the default configuration, four slots
on a 16-bit bus. Slot 0 is bits `[3:0]` and comes first in stream order. Each
slot has one of three tags (`bdc_pkg::tag_e`):

| tag     | holds                                          |
|---------|------------------------------------------------|
| `TAG_H` | lower nibble of a half-byte (upper nibble repeats the previous byte's) |
| `TAG_L` | lower nibble of a full byte                    |
| `TAG_U` | upper nibble of a full byte, always right after its `TAG_L` |

A full byte always goes lower nibble first. If its `TAG_L` lands in the last
slot of a beat, its `TAG_U` opens the next beat. That byte is *split*. The
receiver knows it expects a split because the previous beat's pattern ended in
`TAG_L`. The first byte of every burst is sent whole, and the comparison starts
afresh with each burst.

## The pattern indicator

The PI is the heart of the scheme and the least obvious part. The tags of one
beat form a sequence. Only some sequences are legal: `U` only directly after
`L`, and `L` followed by `U` unless it is in the last slot. A beat that
continues a split byte has its slot 0 fixed to `U`, so only `SLOTS-1` slots
remain free. With `n` free slots the number of legal fillings is

    N(0) = 1,  N(1) = 2 (H, or a split L),  N(n) = N(n-1) + N(n-2)

The PI is the rank of the beat's sequence when fillings are listed with a
half-byte ordered before a full byte at each position. When encoding, a full
byte that starts with `n` free slots left adds `N(n-1)` to the PI. The decoder
walks the slots and subtracts the same weights. Both directions are loops over
a constant table (`bdc_pkg::PAT_N`), so the logic stays small.

16-bit bus, one-byte words (`B` = `L U`, a trailing `L` = split byte):

| PI | beat not continuing a split | beat continuing a split (`U` + …) |
|----|-----------------------------|-----------------------------------|
| 0  | H H H H                      | U · H H H                        |
| 1  | H H H L                      | U · H H L                        |
| 2  | H H B                        | U · H B                          |
| 3  | H B H                        | U · B H                          |
| 4  | H B L                        | U · B L                          |
| 5  | B H H                        | —                                |
| 6  | B H L                        | —                                |
| 7  | B B                          | —                                |

Each state needs at most 8 codes, so 3 PHASE lines suffice. A 32-bit bus has
55 and 34 patterns, giving a 6-bit PI and 6 PHASE lines. An 8-bit bus has 3 and
2 patterns, giving a 2-bit PI.

**Differences from the published pattern counts.** The counts the scheme was
published with differ slightly from the table above:
- 16-bit bus: 12 patterns, with 7 (not 8) possible after a beat that does not
  end in a split byte.
- 8-bit bus: 4 patterns instead of 5.
- 32-bit bus: 81 patterns instead of 89.

The packing rules allow every sequence listed above. This design therefore
keeps all of them. The PI widths (2, 3 and 6 bits) are the same either way.
The code values themselves are this design's own.

A short last beat is padded with `TAG_H` slots of value 0. The receiver knows
the burst length from the control beat and drops the extra words these slots
produce.

## Channel protocol

A single channel, `snp_if`, runs from sender to receiver:

| signal    | direction | meaning |
|-----------|-----------|---------|
| `CHANNEL` | →         | control word, address or data |
| `PHASE`   | →         | `PH_CTRL` (1) or `PH_ADDR` (2); in data beats, the PI |
| `VALID`   | →         | a beat is offered |
| `READY`   | ←         | the receiver takes it |

A beat moves on a clock edge where `VALID` and `READY` are both high. While
`READY` is low, the offered beat stays on the wires unchanged. The interface
and the transmitter both assert this rule.

A burst consists of:
1. one control beat;
2. `ADDR_W/BUS_W` address beats (two for a 32-bit address on a 16-bit channel,
   low half first);
3. the data beats.

The 16-bit control word (`ctrl_word_t`), from MSB to LSB:

| bits  | field       | meaning |
|-------|-------------|---------|
| 15    | `cmp_en`    | compression on for this burst; with 0 every byte is sent whole, which is the plain uncompressed bus |
| 14    | `wide_word` | 0 = one-byte words, 1 = two-byte words |
| 13:12 | `traffic`   | traffic type: 0 = write, 1 = read, others free |
| 11:10 | `burst`     | burst type |
| 9:8   | `cache`     | cache control |
| 7:0   | `len_m1`    | burst length in words, minus one (1 to 256 words) |

The bit layout, the phase code values and the address format are choices of
this design. SNP's omission of repeated control phases is not built, so every
burst on a master channel sends its control and address beats.

**Reads.** A master channel carries control, address and write data from a
master to a slave. Read data come back on a separate *slave channel*. A read
request (`traffic = 1`) is a burst of control and address beats only. The
slave answers with data beats only, compressed in the same way, with the PI on
the slave channel's PHASE lines. There is no header on the slave channel, so
the requester's receiver is told the length and the compression bit of its own
request when it sends it (*arming*, below). Response phases (status or errors
returned by the slave) are not built.

## Transmitter (`bdc_transmitter`)

A sending core requests a burst (`req_*`). It then delivers `IN_WORDS` words
per handshake on `in_data`, four bytes (32 bits) by default, word 0 in the low
bits.

1. **Comparator** (`bdc_comparator`). It tests the four bytes of a group
   against each other and against the last byte of the previous group.
2. **Register** (`bdc_queue`, 16 tagged nibbles). It takes the two nibbles of
   each full byte and the single nibble of each half-byte.
3. **Aligner** (`bdc_aligner`). It sends the first four nibbles each cycle,
   with the PI on `PHASE`. Nibbles that do not fit stay at the head of the
   register for the next beat.

The core side accepts input from the control phase on. The register is
therefore already filled while the control and address beats go out, or while
the bus is busy. This is how the scheme uses a core's waiting time.

With input always available and `READY` always high, a burst of `b` data beats
occupies the channel for exactly `3 + b` cycles: one control beat, two address
beats, then one data beat per cycle. `req_ready` returns in the cycle after the
last data beat. `QDEPTH` must be at least `SLOTS + 2*IN_WORDS - 1`;
elaboration stops with an error otherwise.

A request with `traffic = 1` (read) sends its control and address beats and
ends; it takes no data. With `req_data_only = 1` the burst goes out as data
beats only, which is how a slave returns read data. Such a burst has no header
time to fill the register in, so it takes `1 + b` cycles.

## Receiver (`bdc_receiver`)

The receiver reads the control and address beats and pulses `hdr_valid` with
them. For each data beat:

1. **PI decoder** (`bdc_pi_decoder`). It combines the PI with the split state
   of the previous beat to recover the slot tags.
2. **Duplicator/re-shaper** (`bdc_reshaper`). It rebuilds the words:
   - `H` slots take the upper nibble of the word before them;
   - `U` slots join with the preceding `L` nibble, which for slot 0 is the
     nibble kept from the previous beat.
3. **Output queue** (`bdc_queue`, 8 words). Words beyond the burst length are
   dropped. The rest gather here and leave as groups of four (`out_*`, with a
   word count and a last flag).

`READY` goes low in a data phase while the queue, counting the group that
leaves in the same cycle, cannot take a whole beat. So `READY` depends
combinationally on `out_ready`, and a burst into a ready consumer runs at one
beat per clock. `READY` also stays low at the next control beat until the
previous burst has left the queue.

A read header (`traffic = 1`) pulses `hdr_valid` and leaves the receiver idle:
no data follow on that channel. For read data on a slave channel, the
requester arms its receiver with `arm_valid`/`arm_ctrl` (the control word of
its request) while the receiver is idle and empty. The receiver then takes the
next beats as data of that length, without a header. `err` is a sticky flag,
raised by:
- an unexpected phase;
- a PI that names no pattern;
- a control word whose word size differs from `WORD_W`.

`QDEPTH` must be at least `SLOTS + OUT_WORDS - 1`.

## SRAM controller (`bdc_sram_reader`, `bdc_sram_writer`)

The on-chip SRAM has a 32-bit port, so its controller can restore write data
and compress read data at full speed. Its receiver and transmitter are the
same modules as everywhere else; two small engines connect them to the SRAM.

**Read engine.** Each 32-bit read yields four bytes, and the transmitter
sends at most four per beat, so the SRAM keeps up with the compressed bus.
`bdc_sram_reader` sits between the controller's receiver and its
transmitter. On a read header it:
1. asks the transmitter for a data-only burst with the request's control word,
   so the requester's length and compression bit apply;
2. reads `ceil(len/4)` consecutive 32-bit words, starting at the byte address
   divided by four;
3. passes them on through a two-entry holding queue.

The SRAM port is synchronous: `sram_rdata` is valid the cycle after
`sram_re`. Reads are issued only while the holding queue has room for the
data in flight, so one word per clock flows when the transmitter keeps up.
One read is served at a time; a read header during a read is a protocol
error and is asserted against.

**Write engine.** `bdc_sram_writer` takes the groups the controller's
receiver restores from a write burst. A write header sets the SRAM word
address to the byte address divided by four. Each group is then one SRAM write
(`sram_we`, `sram_wdata`) with a per-word mask (`sram_wmask`), so a partial
last group leaves the rest of its SRAM word alone. Bursts must start on a
32-bit boundary.

The SRAM has a single port. A read takes it first: in a cycle where the read
engine issues `sram_re`, the write engine holds its group (`grant` low). The
receiver's queue and its `READY` absorb the wait. `sram_addr` belongs to
whichever strobe is high; the two are never high together.

## Block buffer and top level

`bdc_block_buffer` is the 32-bit block buffer added to the DMA controller for
writes to the 16-bit external SDRAM. It holds 64 groups of up to four bytes,
enough for one 256-byte burst. It is read as 16-bit pieces with a byte count
and a last flag.

`bdc_link_top` holds the three compressed transfers of the VC-1 decoder the
scheme was applied to:

- **Loop filter to SDRAM** (`req_*`, `in_*` in; `hdr_*`, `sd_*` out).
  Transmitter, master channel, receiver and block buffer. The block buffer's
  read side (`sd_*`) is where the SDRAM controller would take the data.
- **SRAM to loop filter** (`rq_*` in, `rdat_*` out). The loop filter's read
  request goes as a header over its own master channel to the SRAM
  controller's receiver. The read engine reads the SRAM through the `sram_*`
  ports and feeds a transmitter in data-only mode. The data return over the
  slave channel to the loop filter's receiver, which was armed when the
  request was sent. `rq_ready` is high only when both the request
  transmitter and the receiver can take the request, so the two happen in the
  same cycle. The top forces the traffic field of read requests to 1.
- **Motion compensation to SRAM** (`mc_*` in). The MC core's bursts are
  compressed by a transmitter on the MC's own master channel. The SRAM
  controller's second receiver restores them and the write engine stores them.

The loop filter's write channel and the slave channel are brought out
(`mch_*`, `sch_*`) so that bus occupancy can be measured. `err` is the OR
of the four receivers' flags. The SRAM itself is outside the top; the
testbench models it.

The decoder's cores are not part of this RTL:
- the ARM7 processor;
- the DMA controller's own logic;
- VLD-IQ, IDCT, and the filtering of motion compensation and loop filter;
- the SRAM macro and the SDRAM;
- the stream input and video output modules;
- a multi-master SNP fabric with arbiters and multiplexers. Each master
  (loop filter writes, loop filter read requests, motion compensation writes)
  therefore has a master channel of its own.

## Parameters

| module | parameter | default | notes |
|--------|-----------|---------|-------|
| all datapath | `SLOTS` | 4 | half-word slots per beat; bus width = `SLOTS*WORD_W/2` |
| all datapath | `WORD_W` | 8 | 16 for two-byte words (then H = one byte) |
| transmitter, top | `IN_WORDS` | 4 | words per core-side transfer (32 bits) |
| transmitter, receiver | `ADDR_W` | 32 | address beats = `ceil(ADDR_W/BUS_W)` |
| transmitter | `QDEPTH` | 16 | register depth in half-words |
| receiver | `QDEPTH` | 8 | output queue depth in words |
| block buffer | `DEPTH` | 64 | 32-bit entries |
| SRAM engines, top | `SRAM_AW` | 12 | SRAM word address width (4096 x 32 bits) |

The top passes `SLOTS`, `WORD_W`, `IN_WORDS`, `ADDR_W` and `SRAM_AW` down and
sets the depths with `TX_QDEPTH` (16), `RX_QDEPTH` (8) and `BUF_DEPTH` (64).
The same values apply to every transmitter and receiver in it.

The documented configurations:
- 16-bit channel, one-byte words: the defaults.
- 32-bit channel: `SLOTS=8` and `RX_QDEPTH>=11`.
- Two-byte words on a 16-bit channel: `SLOTS=2, WORD_W=16, IN_WORDS=2`, with
  `wide_word=1` in the control word.

The word size is fixed at elaboration. The control word only reports it.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb_bdc_ref_pkg` is an
independent reference model. It finds PIs by brute-force enumeration of all
tag strings in lexicographic order rather than by the weight formula. It also
encodes whole bursts.

| testbench | what it covers |
|-----------|----------------|
| `tb_bdc_comparator` | half-byte flags and carried predecessor against a byte-by-byte reference, compression on and off |
| `tb_bdc_queue` | random pushes and pops against a reference queue, every cycle, including clear |
| `tb_bdc_pi_decoder` | every PI in both split states; pattern counts 8/5 |
| `tb_bdc_reshaper` | reference-encoded bursts fed beat by beat with gaps; rebuilt bytes |
| `tb_bdc_block_buffer` | pieces, counts and last flags under back-pressure; takes exactly `DEPTH` groups when not read |
| `tb_bdc_aligner` | reference beats, padding, hold-back without flush |
| `tb_bdc_transmitter` | exact beat sequence of 200 bursts with random stalls, including read requests and data-only bursts; the `3 + b` (`1 + b`) cycle count when not stalled |
| `tb_bdc_receiver` | restored bytes, headers, last flags under back-pressure; read headers; armed data-only bursts; error detection |
| `tb_bdc_sram_reader` | SRAM words in order, burst request, write headers ignored, one word per clock |
| `tb_bdc_sram_writer` | whole SRAM image after each burst (masked last group, nothing else touched) with random port sharing; read headers ignored; one group per clock |
| `tb_bdc_link_top` | end to end at default parameters (see below) |
| `tb_bdc_link_variants` | 32-bit channel and two-byte words side by side; data and beat counts for writes and reads; SRAM writes |

`tb_bdc_link_top` sends 384-byte macroblocks (4:2:0) in bursts of 256 and 128
bytes, each with compression on and then off. It checks every byte, and it
checks the number of data beats against `ceil(len/2)` uncompressed and against
the reference encoder compressed. It counts each mechanism and fails if one
never occurs:
- half-byte beats and all-half beats;
- split bytes and padded beats;
- uncompressed bursts;
- register prefill;
- channel stalls;
- a full block buffer;
- short groups;
- read bursts, compressed read beats and stalls on the slave channel;
- SRAM writes, and writes waiting for the shared SRAM port.

After the writes it reads bursts from a modelled SRAM filled with smooth,
textured and random regions, with compression on and off. Every byte
delivered to the loop-filter side is compared with the SRAM, and the
slave-channel beats with the reference encoder. One read runs alongside a
write. Finally the motion compensation side writes bursts into the SRAM; the
SRAM must hold exactly those bytes, and they are read back through the loop
filter's read path. One SRAM write runs against a read, so the two engines
share the port.

The data cycles it reports for synthetic content:

Data cycles, compressed against uncompressed:

| content | writes | reads |
|---------|--------|-------|
| smooth (steps of ±3) | about 42 % fewer | about 43 % fewer |
| textured | about 39 % fewer | about 36 % fewer |
| random bytes | about 2 % fewer | about 2 % fewer |

These are bus data cycles, not the decoder pipeline period. The published
system-level gain (6 % to 20 % of the macroblock pipeline period on real
video) also depends on how much of that period is bus traffic. That cannot be
reproduced here without the decoder and the test streams.

To run a testbench with plain Verilator, for example the top:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/bdc_pkg.sv tb/tb_bdc_ref_pkg.sv tb/tb_bdc_link_top.sv \
      --top-module tb_bdc_link_top -y rtl -y tb +libext+.sv
    ./obj_dir/Vtb_bdc_link_top

The end-to-end test finishes in a few seconds.

## Where this design goes its own way

- The PI code values, phase codes, control word layout, address beats, queue
  and buffer depths, and the error flag are choices made here.
- All 13 patterns of the 16-bit bus are used, not 12 (see above).
- A burst's first byte is always full. The short last beat is padded with
  zero-valued half-byte slots.
- Word size and bus width are elaboration parameters; switching word size per
  burst at run time is not built.
- Reset is asynchronous, active low, on all state.
- Read data carry no header on the slave channel; the requester's receiver is
  armed with its own request. Response phases are not built.
- The SRAM read and write engines, the one-cycle read timing, the 4096-word
  single-port SRAM, read priority on its port, the word write mask and the
  one-read-at-a-time rule are this design's own.
- Each master has its own master channel; there is no arbitration.
- A channel with fewer PHASE lines than the PI needs could allow only a subset
  of the patterns. That fallback is not built: PHASE is always widened to the
  PI width.
