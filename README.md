# Refine-and-recycle Snappy decompressor

Snappy decompression is hard to parallelise. Tokens have variable length, so
you cannot know where token *n+1* starts until token *n* is decoded. Tokens
also depend on each other: a copy token reads bytes that an earlier token
may not have written yet. A 64 KB history buffer on an FPGA is built from
16 narrow memory banks (8 bytes wide). Two tokens handled in the same cycle
therefore often want the same bank.

This design gets around those problems with two ideas:

* **Refine.** Every token is broken into commands that each touch exactly one
  8-byte line of one bank: *write commands* for literal bytes and *copy
  commands* for pieces of a copy. Each bank has its own execution unit, which
  runs its own queue of commands independently. Two tokens that collide in one
  bank only collide there; their pieces for other banks go ahead.
* **Recycle.** Nothing checks for read-after-write hazards. A copy command reads
  its source at once. Every history byte carries a valid flag. Bytes that are
  already valid are written to the destination. The rest of the command is
  trimmed and put into a per-bank *recycle buffer*, then tried again later.
  This is correct because in Snappy each output byte is written exactly once
  and never changes afterwards. Retrying a read later can only see more valid
  data, never different data.

At its default configuration the design takes one 16-byte line of compressed
input per cycle. Six command parsers refine tokens, and 16 banks execute up to
16 commands per cycle, which is 128 output bytes per cycle at the peak.

## Data path at a glance

```
 16B lines ──► slice parser ──► slice arbiter ──► BCP 0 … BCP 5
                (ABM, PV)                            │ 4 write FIFOs  (line mod 4)
                                                     │ 16 copy FIFOs  (source bank)
                                                     ▼
        for each bank k = 0..15:
          write selector k ──► ┌──────────────────────┐
          copy selector  k ──► │ execution module k   │──► generated writes ──► any write selector
               ▲               │  512 x 72-bit bank   │
               └───recycle─────│  recycle buffer (512)│
                               └──────────────────────┘
                                          │
                       history output ◄───┘  (64B lines after each block)
```

| File | Module | Role |
|------|--------|------|
| `rtl/snappy_pkg.sv` | package | sizes, command and slice structs, token header decoder |
| `rtl/slice_parser.sv` | `slice_parser` | finds all token starts of a 16 B line in one cycle |
| `rtl/slice_arbiter.sv` | `slice_arbiter` | hands each slice to a free BCP, round robin |
| `rtl/bram_command_parser.sv` | `bram_command_parser` | refines tokens into per-bank commands |
| `rtl/write_selector.sv` | `write_selector` | picks one write per bank per cycle |
| `rtl/copy_selector.sv` | `copy_selector` | picks one copy per bank per cycle; recycle threshold |
| `rtl/execution_module.sv` | `execution_module` | bank, hit/partial/miss, generated writes, recycling |
| `rtl/history_bank.sv` | `history_bank` | 512 x (8 bytes + 8 valid flags), 1 read + 1 write port |
| `rtl/sync_fifo.sv` | `sync_fifo` | FIFO used for the recycle buffers and command queues |
| `rtl/history_output.sv` | `history_output` | clears the history; streams a block out in 64 B lines |
| `rtl/snappy_decompressor.sv` | `snappy_decompressor` | top level and block control |

## Snappy in brief

A Snappy block is at most 64 KB of output. It starts with a varint giving the
uncompressed length, followed by tokens. The low two bits of the first byte
give the token kind:

| tag | token | header | meaning |
|-----|-------|--------|---------|
| `00` | literal | 1 byte (length ≤ 60), or 2–3 bytes (lengths encoded in 1–2 extra bytes) | copy the next *n* input bytes to the output |
| `01` | copy, 1-byte offset | 2 bytes | length 4–11, offset up to 2047 |
| `10` | copy, 2-byte offset | 3 bytes | length 1–64, offset up to 65535 |
| `11` | copy, 4-byte offset | 5 bytes | only needed for blocks larger than 64 KB |

The 4-byte-offset copy and the literal forms with 3 or 4 length bytes cannot
occur in a 64 KB block. The decoder flags them on the sticky `err` output.

## History buffer layout

The 64 KB history is 16 banks × 512 lines × 8 bytes. Every line also stores
8 valid flags, so a bank is 512 × 72 bits. Consecutive 8-byte lines are
striped across the banks. For output byte address `a[15:0]`:

* byte in line = `a[2:0]`
* bank = `a[6:3]`
* line in bank = `a[15:7]`

A run of 16 consecutive lines therefore touches every bank once. A copy of up
to 64 bytes touches at most 9 lines, all in different banks. The valid flags
are cleared before each block, which makes "valid" mean "already written in
this block".

## Slice parser: finding every token start in one cycle

This is the least obvious part. The parser takes one 16-byte line per cycle,
plus the first 2 bytes of the next line. Those 18 bytes are enough to decode
any header that starts in the line, since a header is at most 3 bytes here.
The goal is to mark which of the 16 bytes start a token. The difficulty is
that each start depends on the length of the previous token.

1. **Assume every byte is a token start.** For each byte *i*, decode a header
   as if it started at *i*. This gives a token length *L(i)*: header bytes plus
   literal bytes for a literal, header bytes for a copy.
2. **Assumption Bit Map (ABM).** The ABM is a 16×16 bit matrix. Row *i*
   starts as all ones. The *L(i)−1* cells after column *i* are set to zero,
   because if byte *i* starts a token, none of the next *L(i)−1* bytes can.
   All rows are computed in parallel.
3. **Chain to the Position Vector (PV).** The slice flag left by the previous
   line says where the first token of this line starts. From that byte, the
   first one in the current row (after the zeros) is the next start. Its row
   gives the one after that, and so on. This is a ripple through at most 16
   rows in one cycle. The marked bytes form the 16-bit PV.

The **slice flag** carried to the next line has three fields:

* `skip`: the number of header bytes of the last token that spill into the
  next line.
* `lit_rem`: the number of literal bytes still to come.
* `base`: the output address reached so far.

A line that starts inside a long literal simply continues it. Such a line may
have no token start at all.

Each slice sent on to a command parser is self-contained. It holds:

* the 18 bytes,
* the PV,
* where the bytes of a literal continued from an earlier line sit, and how
  many there are (`lit_start`, `lit_cnt`),
* the output address of its first output byte (`base`).

That is why any parser can take any slice. Tokens whose output would start
at or beyond the block's length are padding, so they are masked from the PV.
The parser does not emit slices that carry no output.

## BRAM command parsers (BCPs)

A BCP takes one item per cycle. The first item is the literal continuation,
if the slice has one. After that it takes one token per cycle, in PV order.
It also keeps a running output address.

* **Literal path.** A slice holds at most 16 literal bytes. They cover at
  most 3 consecutive history lines. Each covered line gets one *write
  command* (`bank, line, 8-byte data, byte mask`). Write commands go to
  4 FIFOs indexed by global line mod 4, so the 3 commands of one item always
  go to different FIFOs.
* **Copy path.** The source range `[addr−offset, addr−offset+len)` is cut at
  source-line boundaries. Each piece is one *copy command*:
  `source bank, source line, first byte, length ≤ 8, destination address`.
  A 64-byte copy gives up to 9 commands. They go to 16 FIFOs indexed by
  source bank.
* An item is only taken when every FIFO has room. A BCP therefore never needs
  to split an item over several cycles.

Copies whose source overlaps their own destination (offset < length, the
usual Snappy way to repeat a pattern) need no special case. Their later
pieces read bytes that earlier pieces write, so those pieces are simply
recycled until the data is there.

The **slice arbiter** gives each slice to the first BCP that is ready,
searching round robin. With 6 BCPs, up to 6 tokens are refined per cycle.

## Execution module and recycling

Each bank has one execution module. In every cycle it can do one write (the
bank's write port) and one copy read (the read port).

* A **write command** always completes. Its valid bytes are written with
  their flags set.
* A **copy command** reads its source line. Reads return the old data when a
  write hits the same line in the same cycle. One cycle later the module
  checks the valid flags of the wanted bytes, starting from the first one:
  * **hit**: all wanted bytes are valid;
  * **partial hit**: the first *m* wanted bytes are valid;
  * **miss**: the first wanted byte is invalid.

  On a hit or partial hit, the valid bytes are placed at their destination.
  They fall into one or two destination lines, which may be in any banks.
  This gives a pair of *generated write commands*, kept in a small FIFO
  (8 pairs). Each half is offered to its destination bank's write selector.
  The pair leaves the FIFO once both halves have been taken.

  On a partial hit or miss, the command is **renewed**: its first byte and
  destination are moved past the bytes that were done. It is then pushed into
  the bank's 512-entry recycle buffer.
* The module accepts a new copy only when the generated-write FIFO has room
  for the result of the copy in flight and of the new one. A copy is therefore
  never lost.

A partial hit uses only the valid *leading* bytes. The renewed command then
stays one contiguous range. Valid bytes after the first invalid one are read
again next time.

## Selectors and the recycle threshold

**Write selector (one per bank).** It picks one write per cycle:

1. First, generated writes from any of the 16 execution modules, round robin.
   These are the results of copies. Taking them first frees the execution
   modules and releases recycled commands that wait for them.
2. Otherwise, the head of this bank's write FIFO in one of the BCPs, round
   robin.

**Copy selector (one per bank).** It picks one copy per cycle, only when the
execution module accepts one:

* While the bank's recycle buffer holds fewer than `RC_THRESH` commands, new
  commands from the BCPs go first, round robin. This keeps the units busy
  with fresh work.
* At or above the threshold, the recycle buffer goes first, so it cannot
  overflow.
* **Own addition:** above the threshold, a BCP command may still follow
  directly after a recycled one, if the buffer has at least two free entries.

The addition is needed because a recycled copy may wait for data that only a
BCP command *queued for this same bank* will produce. With strict priority,
the recycled commands would cycle through the buffer forever (a livelock
seen with small buffers). The rule still gives the recycle buffer at least
half of the slots while it is above the threshold.

## Block flow and output

The top runs a small controller: `INIT` (clear the history, 512 cycles after
reset) → `DECODE` → `OUTPUT` → `DECODE` …

* During `DECODE`, the top counts the bytes written, summed over all 16 banks
  each cycle. No byte is written twice, so the block is complete when three
  things hold:
  * the count equals the block's length;
  * the parser has seen the block's last line;
  * every FIFO, selector and execution unit is idle.
* `history_output` then reads the history as 64-byte lines and clears each
  line as it reads it. Output line *o* is banks 0–7 (even *o*) or 8–15 (odd
  *o*) at bank line *o*/2. The output runs at one line per cycle unless
  `out_ready` is low. When it is done, the parser is released for the next
  block. The parser halts after each block's last line, so blocks never mix.

## Interfaces and timing (top: `snappy_decompressor`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | handshake for compressed input lines |
| `in_data` | in | 128 | 16 compressed bytes; byte *i* in `[8i+7:8i]` |
| `in_last` | in | 1 | last line of a block |
| `out_valid`, `out_ready` | out/in | 1 | handshake for output lines |
| `out_data` | out | 512 | 64 output bytes; byte *i* in `[8i+7:8i]` |
| `out_bytes` | out | 7 | number of valid bytes in this line (1–64) |
| `out_last` | out | 1 | last line of a block |
| `err` | out | 1 | sticky: token kind not possible in a 64 KB block |

Input framing: each block starts on a new input line with its varint length.
Its last line is marked with `in_last`. Bytes after the block's end in that
line are ignored. The parser takes one line per cycle while a BCP is free.

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `NBCP` | 6 | command parsers |
| `BCP_FIFO_DEPTH` | 16 | depth of each BCP command FIFO |
| `RC_DEPTH` | 512 | recycle buffer entries per bank |
| `RC_THRESH` | 128 | recycle count at which recycled copies get priority |
| `GW_DEPTH` | 8 | generated-write pairs per execution module |

Fixed sizes (`snappy_pkg`) are 16 banks, 512 lines, 8 bytes per line,
16 input bytes, 2 lookahead bytes and 64 output bytes.

## What follows the original method and what is this design's own

The following follow the method:

* the 16 × 512 × 72-bit striped history with per-byte valid flags;
* the 16-byte input line with 2 lookahead bytes;
* the ABM/PV parser with its slice flag;
* the slice arbiter and 6 BCPs;
* up to 3 write commands and up to 9 copy commands per token, with 4 write
  and 16 copy FIFOs per BCP;
* one write and one copy per bank per cycle;
* hit / partial hit / miss handling with one or two generated writes and
  recycling;
* write priority for generated writes, then round-robin BCPs;
* copy priority for BCPs below a threshold and for the recycle buffer above
  it.

The following are this design's own choices. The method leaves them open:

* **Depths.** All FIFO depths; the threshold value (128 of 512); the
  generated-write FIFO and its "room for two" accept rule. The 512-entry
  recycle buffer matches one block RAM.
* **Scheduling.** The alternation rule above the threshold (see above).
  BCPs take one item per cycle and only when all of their FIFOs have room.
* **Partial hits.** A partial hit is the valid *prefix* of the wanted bytes.
* **Framing and output.** Block framing with `in_last`, one block in flight
  at a time. 64-byte output lines produced by a read-and-clear pass after
  each block. Completion detected by counting written bytes.
* **Unsupported tokens.** 4-byte-offset copies and literals with 3–4 length
  bytes are flagged, not decoded.
* **Not included.** The host interface (a CAPI 2.0 link to host memory in the
  original system) is not part of this RTL. The top exposes plain valid/ready
  streams instead.

## Measured behaviour

These are cycle counts from simulation at the default parameters. Input is
offered every cycle and output is always accepted. Two rates matter:

* The **refine rate** counts output bytes per cycle while a block's
  compressed lines are being taken in. It measures the parser and the BCPs.
* The **decode rate** counts output bytes per cycle from a block's first line
  until its last byte is in the history. It includes the time the execution
  modules need to finish all copies.

Results:

* **Refine rate on synthetic 64 KB blocks.** 18–70 bytes per cycle,
  depending on the compression ratio. The parser limit is 16 compressed
  bytes per cycle times the ratio.
* **Decode rate, usual case.** On blocks generated to the compression ratios
  of six benchmark sets, most blocks decode at 27–42 bytes per cycle. The six
  sets are integer and string columns, a database table, a sparse matrix, a
  wiki dump and geographic data. The end-to-end rate, including the output
  pass, is 16–25 bytes per cycle.
* **Published figures.** The original FPGA implementation reports
  17.6–28.8 bytes per cycle end to end on the real files (4.4–7.2 GB/s at
  250 MHz).
* **Number of command parsers.** Going from 1 to 8 parsers, two parsers give
  1.35–1.6× the one-parser rate. The rate flattens after 4–5 parsers. The
  original reports about 1.9× for two parsers and a flat curve after 5 on
  its sparse-matrix file. Extra parsers stop helping once they outnumber the
  tokens in a 16-byte line.
* **Caveat.** The synthetic data only match the real files' compression
  ratios, not their token statistics. These rates are indications, not
  reproductions.

### The slow case: chains of short-offset copies

A copy whose offset is shorter than its length reads bytes that it writes
itself. An example is offset 3 with length 64. Such a copy completes only a
few bytes per trip through the recycle buffer. Copies that read its output
must wait for it in turn.

Each trip waits for a full rotation of the bank's recycle buffer. During
such a chain, that buffer holds a few hundred commands, and most of them are
waiting for the same chain. The decode rate of the block then falls far
below its refine rate. In some random 64 KB blocks with many such copies it
fell to 3.5–8 bytes per cycle, while other blocks of the same mix decoded at
over 30 bytes per cycle. More parsers make this slightly worse: they fill
the recycle buffers sooner, so each trip takes longer.

The method has no special path for this case, and neither does this
design. Two changes would target it, but neither is part of this RTL:

* Extending a partial hit by repeating its valid bytes with the copy's
  period.
* Retrying commands that made progress ahead of the others.

No timing or area numbers from an FPGA flow are claimed here.

## Simulating

All testbenches are self-checking. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. Random data comes from
`tb/snappy_gen_pkg.sv`, a small Snappy compressor that builds blocks with a
chosen mix of literals, long literals, near and far copies, and overlapping
copies.

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/snappy_pkg.sv tb/snappy_gen_pkg.sv tb/tb_snappy_full.sv \
    --top-module tb_snappy_full -Mdir obj -j 8
./obj/Vtb_snappy_full
```

Replace `tb_snappy_full` with any testbench below. Verilator finds the
modules in `rtl/` through `-Irtl`.

| Testbench | What it checks |
|-----------|----------------|
| `tb_snappy_decompressor` | Top level with tiny FIFOs and recycle buffers, so every mechanism happens, and each must happen at least once: hit, partial hit, miss, recycle priority, generated write winning, BCP stall, all BCPs used, arbiter skipping a busy BCP, literal continuation, header spill, padding, output backpressure. Six blocks; every byte checked. |
| `tb_snappy_full` | Default parameters: two 64 KB blocks and a short one. Checks every byte, a refine rate > 8 B/cycle, and ≤ 16 input bytes/cycle. |
| `tb_snappy_workloads` | Default parameters: six 64 KB blocks at the six benchmark compression ratios. Checks every byte and a refine rate > 8 B/cycle; prints refine, decode and end-to-end rates. |
| `tb_snappy_bcp_sweep` | Eight decompressors with 1 to 8 command parsers on the same three 64 KB blocks. Checks every byte; for the refine rate it checks at least 1.3× from one to two parsers and no drop of more than 10% from adding a parser. |
| `tb_slice_parser` | PV, literal continuation and base address against a software token walk; one line per cycle. |
| `tb_bram_command_parser` | Byte-exact command contents, FIFO placement, ≤ 3 / ≤ 9 commands per token, one item per cycle. |
| `tb_slice_arbiter`, `tb_write_selector`, `tb_copy_selector` | Priority and round-robin rules against a reference model. |
| `tb_execution_module` | Hits, partial hits, misses, generated writes and renewed commands against a byte model of the bank. |
| `tb_history_bank`, `tb_sync_fifo`, `tb_history_output` | Memory lanes and read-first behaviour; FIFO order and flags; clear time and one output line per cycle. |

`tb_snappy_full`, `tb_snappy_workloads` and `tb_snappy_bcp_sweep` take
one to a few minutes each with verilator, much of it compile time. The others take seconds.

## Limits and trust

* Decoding was checked byte for byte against an independent software
  generator on many random blocks, including 64 KB blocks. It was not
  checked against files produced by the reference Snappy library.
* No deadlock has been seen at the default sizes. The alternation rule
  removes the livelock found with very small recycle buffers. There is no
  formal proof of freedom from deadlock.
* Only one block is in flight at a time. The output pass (1024 cycles for
  64 KB) is not overlapped with decoding the next block.
