# Zstd compression kernels, 4 bytes per cycle

This RTL compresses a byte stream into the parts of a Zstandard (Zstd) block.
Each kernel takes 4 input bytes per clock cycle and produces two streams:

- a literal section of raw bytes;
- an FSE-coded sequence bitstream.

Host software only adds the block and section headers to get a valid Zstd
frame. To raise throughput, many kernels run side by side, each on its own
tasks. The configuration here targets financial market data streams. It uses:

- a 64 KB history;
- 4096-entry hash tables with the 4-byte Zstd hash;
- fixed (static) FSE tables;
- no Huffman coding of literals.

Literals often compress poorly with Huffman coding, so Zstd itself frequently
stores them raw.

The top level is `zstd_accel`, ten independent `zstd_kernel` instances. Each
kernel has its own stream ports.

## The problem: finding matches at four positions per cycle

LZ77-style compression needs a hash-table insert and a lookup for every input
byte position. At 4 bytes per cycle that is 4 inserts and 4 lookups each cycle.
A RAM has too few ports for that. The kernel solves it by replication:

- **4 hash match engines**, one per lookup. Engine *e* looks up the string that
  starts at lane *e* of the current word.
- **4 hash tables inside each engine**, one per insert. Table *j* of every
  engine stores the strings that start at lane *j*. So each table gets exactly
  one insert and one lookup per cycle.

All 16 tables hold the same history of positions, split by lane. A lookup reads
the same hash in its engine's 4 tables. It gets up to 4 candidate positions, one
for each possible alignment of the earlier string.

A table entry holds only a 32-bit absolute position (`hash_table`). Candidates
are therefore checked before use:

1. **Screening.** The candidate must come before the current word. It must also
   be at or after the start of the task, and at most `MAX_OFF` = 65520 bytes back.
2. **Verification.** The candidate's 4 bytes are read from the engine's own copy
   of the history and compared with the looked-up string.

The nearest candidate that passes both is the engine's result. Because of this
check, stale entries never need clearing: entries left by earlier tasks, and
hash collisions, are rejected.

The strings at the 4 positions of a word reach up to 3 bytes into the next word.
So the front end holds one word of lookahead. It forms the four 4-byte strings
(`str[k]`) and their 12-bit hashes:

    hash = (u32 * 2654435761) >> 20        (u32 = 4 bytes, little-endian)

### History buffer

`history_buffer` is a 64 KB ring written one aligned word per cycle. Reads are
4 bytes from any byte address. The memory is split into four byte-wide banks,
so an unaligned read takes one byte from each bank. Bank *b* reads row
`addr/4 + 1` when `b < addr%4`, otherwise row `addr/4`. The bytes are then
rotated into order.

Each read port has its own copy of the banks, so copies are not shared:

- each engine has a copy with 4 read ports;
- the match controller has one more.

A kernel therefore holds 17 copies of 64 KB. This costs a lot of memory. It is
the simplest way to get the read bandwidth; a tuned build would share copies or
use wider RAMs.

### Pipeline

| Stage | Work |
|-------|------|
| S0 | Lookahead word, 4 hashes, 16 inserts, 4 lookups, history writes |
| S1 | Candidate positions out of the tables; screening; history reads |
| S2 | Verified results (`m_ok`, `m_pos`) reach the match controller |

The word and its flags travel alongside in pipeline registers. The whole kernel
advances on one enable, `en`. It drops when the downstream stages cannot take a
beat, or while the FSE encoder is busy.

## Parsing: the match controller

`match_controller` turns the engine results into Zstd's two streams. Its rules:

- **Greedy start.** Outside a match, the first lane whose engine has a verified
  match starts a match. Its offset is `position - candidate`.
- **Extension by 4 bytes per cycle.** Each later word is compared with the bytes
  `offset` positions back. These come from the controller's history copy, read
  one cycle ahead. When the offset is less than 4, the bytes are not yet in the
  history, so they come from the current word. This is what makes overlapping
  matches (runs) work.
- **End of a match.** A match ends at the first byte that differs. It also ends
  at the end of the task, or after `MAX_MATCH` bytes.
- **One sequence per cycle.** No new match starts in the word where a match
  ended. This keeps the output to at most one sequence per cycle. The cost is
  some compression on short repeats.
- **Minimum match of 4 bytes**, set by the 4-byte hash.

The literal output is each word with a mask of its literal bytes. A sequence
entry carries the literal length, match length and offset. The last entry of a
task carries the count of trailing literals.

## Offset coding

`repeat_offset_encoder` applies Zstd's repeat-offset rule. The history of the
last three offsets starts as 1, 4, 8 at each task. When the literal length is
greater than 0:

- codes 1, 2 and 3 mean the first, second and third recent offset.

When the literal length is 0, the codes shift:

- codes 1 and 2 mean the second and third recent offset;
- code 3 means the first recent offset minus 1.

Any other offset is coded as `offset + 3`. The history is updated as the format
requires.

## FSE sequence encoding

Each sequence becomes three FSE symbols, plus the extra bits of each code:

- the literal-length code;
- the match-length code;
- the offset code (its highest set bit).

The encoder uses the Zstd predefined distributions for all three. A block in
"predefined" mode needs no table description. Building tables from each
block's statistics is a long sequential job, and fixed tables lose little
compression on uniform data such as market feeds.

`zstd_pkg` computes the encoding tables at elaboration time with constant
functions, exactly as the format defines them:

- Symbols are spread with step `size/2 + size/8 + 3`.
- Low-probability ("-1") symbols go at the top of the table.
- The state table is taken from that spread.
- Each symbol's `deltaNbBits` and `deltaFindState` values are computed from it.

Tables have 64 entries for literal and match lengths and 32 for offsets.

The FSE bitstream is read backwards, so sequences must be encoded from the last
to the first. `fse_seq_encoder` works in these steps:

1. **Collect.** It stores up to `SEQ_DEPTH` = 16385 sequences of a task, which
   covers the most a 128 KB task can produce with this parser.
2. **Encode from the last sequence.** After the end-of-task entry, the last
   sequence sets the three states. Each earlier sequence emits:
   - state bits for the offset, match length and literal length;
   - then extra bits for the literal length, match length and offset.
3. **Close.** The states are flushed in the order match length, offset, literal
   length. A closing 1 bit follows, and the stream is padded to a byte.

Bits build up in a 192-bit register and leave as 64-bit little-endian words.
Encoding uses one sequence per cycle when output space allows. During encoding
`in_ready` is low, which stops the kernel. A task of N sequences costs roughly
N + 16 extra cycles. The testbench accepts up to 2N + 16.

## Interfaces and timing

All streams use valid/ready handshakes. A beat moves when both are high on a
rising clock edge. Reset is synchronous and active-high. It clears control
state only; memory contents are never read before they are checked.

| Port group | Width | Meaning |
|------------|-------|---------|
| `in_valid/in_ready/in_data/in_last/in_nbytes` | 32 data bits | Raw bytes, byte *k* in bits `8k+7:8k`. `in_last` marks the last word of a task; `in_nbytes` (1..4) is its valid byte count. |
| `lit_valid/lit_ready/lit_data/lit_nbytes/lit_last` | 32 data bits | Packed raw literals, 0..4 bytes per beat. The last beat of a task has `lit_last` and may hold 0 bytes. |
| `bs_valid/bs_ready/bs_data/bs_nbytes/bs_last/bs_nseq` | 64 data bits | Sequence bitstream. On the last beat, `bs_nseq` is the task's sequence count. A task without sequences gives one 0-byte last beat. |

In `zstd_accel`, every port is an array indexed by kernel number.

A task is at most 131072 bytes, one Zstd block. It is an independent unit:

- matches never reach into an earlier task;
- the repeat-offset history restarts.

The host builds one Zstd block per task:

- the literals section header in raw mode, then the literal bytes;
- the sequence count;
- a modes byte of 0 (predefined tables for all three symbols);
- the bitstream bytes.

Throughput: without back-pressure, a kernel takes one word per cycle while a
task streams in. The testbench checks that an N-word task is taken in N-1
cycles after its first word. The kernel then pauses while its sequences are
encoded. With 10 kernels at 4 bytes per cycle, 12 GB/s needs a 300 MHz clock.

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench ends with a
`TB_RESULT checks=… failures=…` line and has a watchdog. The reference model
in `tb/zstd_tb_pkg.sv` is written separately from the RTL. It contains:

- an FSE decoder, with decoding tables built from the distributions;
- a backward bit reader;
- a sequence executor that rebuilds the original data.

| Testbench | What it checks |
|-----------|----------------|
| `tb_hash_table` | Read-first behaviour, hold while not enabled, random traffic against a model |
| `tb_history_buffer` | Unaligned reads at every alignment, wrap-around, two ports |
| `tb_hash_match_engine` | The nearest verified candidate against a model of the per-lane tables, with small tables (many collisions), the range limits and task restarts |
| `tb_match_controller` | Data rebuilt from its output, and each match at maximal length |
| `tb_repeat_offset_encoder` | All repeat-code cases against a model |
| `tb_literal_packer` | Byte order and counts, including two-word flushes at task ends |
| `tb_fse_seq_encoder` | Decoded sequences equal the input, leftover bits, cycle budget |
| `tb_zstd_kernel` | 7 tasks up to a full 128 KB block, decoded and rebuilt byte for byte, input rate, mechanism counts (see below) |
| `tb_zstd_accel` | All 10 kernels at default parameters, 2 tasks each, back-pressure on odd kernels, all kernels busy together |

The kernel testbench counts the mechanisms it exercises, and fails if any
count is zero:

- sequences;
- repeat-coded offsets;
- overlapping matches (offset smaller than length);
- matches longer than 64 bytes;
- tasks without sequences;
- input stalls;
- output stalls.

On its mix of repetitive and random data, the output is about 43% of the input.
This figure reflects the test data only.

## Departures and limits

- **FSE tables.** The fixed tables are the Zstd predefined distributions, not
  tables fitted to a particular data set.
- **Single sequence buffer.** The kernel pauses after each task while its
  sequences are encoded. Two buffers, one filling while the other encodes,
  would hide this pause.
- **Parser.** It is greedy and starts at most one match per word: no lazy
  matching and no repeat-offset search before the hash lookup. Compression is
  therefore below what Zstd software reaches at level 3.
- **Minimum match of 4 bytes.** Zstd allows 3.
- **No dictionary mode, and no Huffman literals.**
- **Memory.** The 17 history copies per kernel are far more memory than a tuned
  implementation would use.
- **Synthesis** has been checked only for language acceptance. Timing at any
  clock has not been checked.

## Files and parameters

`rtl/zstd_pkg.sv` holds the sizes, types, hash, code tables and FSE table
construction. The other files each hold one module, listed bottom-up:

`hash_table`, `history_buffer`, `hash_match_engine`, `match_controller`,
`repeat_offset_encoder`, `literal_packer`, `fse_seq_encoder`, `zstd_kernel`,
`zstd_accel`.

Main parameters, with their defaults:

- `N_KERNELS` = 10;
- `HASH_ENTRIES_P` = 4096;
- `HIST_P` = 65536;
- `SEQ_DEPTH_P` = 16385.

`MAX_OFF` is set from `HIST`.

To simulate with Verilator 5, for example the full 10-kernel test:

    verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/zstd_pkg.sv tb/zstd_tb_pkg.sv \
        tb/tb_zstd_accel.sv --top-module tb_zstd_accel -o sim
    ./obj_dir/sim

Any other testbench builds the same way: change the file and `--top-module`.
Modules are found through `-Irtl`. `-Wno-fatal` keeps Verilator's width
warnings, most of them in testbench arithmetic, from stopping the build. Reset memories are not needed, but
`+verilator+rand+reset+2` (random initial values) is a good habit. All
testbenches finish in a few seconds.
